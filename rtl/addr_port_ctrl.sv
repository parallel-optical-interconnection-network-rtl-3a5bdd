// addr_port_ctrl: the address port controller between a cache controller and
// the optical transmitter/receiver ICs of one processor.
//
// Outgoing requests from the cache controller are buffered in a small FIFO
// until the optical token arrives; in the token cycle the oldest request is
// put on the transmit lanes and leaves the buffer (one request per token
// visit).  The snoop-response lane is driven whenever the cache controller
// asks, independent of the token: only the single owner of a block ever
// answers, and requests become visible in distinct cycles, so answers cannot
// collide.  Received bundles are handed to the cache controller unchanged.
// Buffering until the token follows the document; the FIFO depth and the
// ready/valid handshake are this design's choices.
//
// Interface: req_valid/req_ready is a valid/ready handshake (a request is
// taken in a cycle where both are high).  tx is combinational from the FIFO
// head, the token and snoop_in, so a request is on the lanes in the token
// cycle itself.  waiting is high in the cycles in which a buffered request
// waits for the token.
//
// The receive path (rx to rx_pkt/rx_snoop) and the snoop lane (snoop_in to
// tx.snoop) are plain wires, since the receiver IC delivers one bit per lane.
//
// Lint: verilator reports SYNCASYNCNET on rst_n because the assertion's
// 'disable iff (!rst_n)' samples the asynchronous reset in a clocked
// context.  This concerns the simulation-only check, not the circuit.
module addr_port_ctrl
  import symnet_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      token,
  // from the cache controller
  input  logic      req_valid,
  input  addr_pkt_t req_pkt,
  output logic      req_ready,
  input  logic      snoop_in,
  // to the transmitter IC / from the receiver IC
  output link_t     tx,
  input  link_t     rx,
  // to the cache controller
  output addr_pkt_t rx_pkt,
  output logic      rx_snoop,
  output logic      waiting
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  addr_pkt_t         buf_q [DEPTH];
  logic [PW-1:0]     wr_ptr, rd_ptr;
  logic [PW:0]       count;
  logic              push, pop;

  assign req_ready = (count != (PW+1)'(DEPTH));
  assign push      = req_valid && req_ready;
  assign pop       = token && (count != '0);
  assign waiting   = (count != '0) && !token;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) buf_q[i] <= '0;
    end else begin
      if (push) begin
        buf_q[wr_ptr] <= req_pkt;
        wr_ptr        <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (pop) begin
        rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      end
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_comb begin
    tx.pkt   = pop ? buf_q[rd_ptr] : '0;
    tx.snoop = snoop_in;
  end

  assign rx_pkt   = rx.pkt;
  assign rx_snoop = rx.snoop;

  a_push_valid : assert property (@(posedge clk) disable iff (!rst_n)
    push |-> req_pkt.valid);

endmodule
