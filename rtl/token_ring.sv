// token_ring: optical token generator and token ring with one delay element
// per processor.
//
// The token generator emits a single token pulse; the ring splits it at every
// processor, one part going to that processor's address port controller and
// the other through a delay element (a fiber loop of one processor clock
// cycle) to the next processor.  Successive processors therefore see the
// token in successive cycles, and each processor owns one insertion slot every
// N_PROC cycles (pre-allocated TDMA).  The delay element of one cycle follows
// the document; re-emitting a new token every N_PROC cycles, when the previous
// one has passed the last processor, is this design's reading of how the
// generator keeps the ring going.
//
// Interface: token[i] is high for exactly one cycle in every N_PROC cycles,
// in cycle (k*N_PROC + i) counted from the first cycle after reset.
// period_tick marks each generator emission.  Exactly one token bit is high
// in every cycle after reset.
//
// Lint: verilator reports SYNCASYNCNET on rst_n because the assertion's
// 'disable iff (!rst_n)' samples the asynchronous reset in a clocked
// context.  This concerns the simulation-only check, not the circuit.
module token_ring #(
  parameter int unsigned N_PROC = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [N_PROC-1:0] token,
  output logic              period_tick
);

  localparam int unsigned CW = (N_PROC > 1) ? $clog2(N_PROC) : 1;

  logic [CW-1:0]     gen_cnt;   // generator period counter
  logic [N_PROC-1:0] dly;       // delay-element outputs along the ring

  // Generator: one pulse when the counter wraps to zero.
  assign period_tick = (gen_cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_cnt <= '0;
    end else if (gen_cnt == CW'(N_PROC - 1)) begin
      gen_cnt <= '0;
    end else begin
      gen_cnt <= gen_cnt + 1'b1;
    end
  end

  // Processor 0 taps the generator output directly; every later tap sits
  // behind one more delay element.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly <= '0;
    end else begin
      dly <= {token[N_PROC-2:0], 1'b0};
    end
  end

  always_comb begin
    token    = dly;
    token[0] = period_tick;
  end

  // Mutual exclusion on the shared channel: the token is with one processor.
  a_one_token : assert property (@(posedge clk) disable iff (!rst_n)
    (token != '0) && ((token & (token - 1'b1)) == '0));

endmodule
