// symnet_top: a SYMNET shared-memory multiprocessor address subnetwork with
// N_PROC processor nodes and one memory module.
//
// Each processor node is a COSYM cache coherence controller (second-level
// cache tags and states) behind an address port controller.  The optical
// token ring gives node i the right to insert one address request in cycle
// i of every N_PROC-cycle round; the inserted request climbs the coupler tree,
// turns round at the root and reaches every node and the memory in the same
// cycle, 2*log2(N_PROC) cycles after insertion.  Up to one request per cycle
// is in flight, so a new request can enter the tree every cycle.  The single
// owner of a block answers each read with a snoop pulse on a dedicated lane
// one cycle after seeing it; that answer reaches everyone another
// 2*log2(N_PROC) cycles later, and all snoopers then commit the transaction.
//
// Ports per processor: a blocking read/write request interface towards the
// processor, and the data-subnetwork command this cache issues when it must
// supply a block.  The memory's data-subnetwork commands (supply on snoop LOW,
// write-back of an unshared owned block) come out as well.  The data
// subnetwork, the processors and the optical parts (VCSEL and photodetector
// arrays, waveguides, amplifiers) are outside this RTL.  collision is a sticky
// flag set if two pulses ever met in a coupler, which the token protocol
// must prevent.
//
// Defaults: 32 processors (the largest system evaluated), 512-set 4-way tag
// stores (a 64 KB, 4-way, 32-byte-block second-level cache per processor).
// The token ring, the tree and its latency, and the COSYM rules follow the
// document; the memory as a receive-only tap of the tree, the request
// window that serialises requests for the same block (txn_tracker) and the
// buffer depths are this design's choices.
//
// Lint: SYNCASYNCNET on rst_n comes from the submodules' assertions, whose
// 'disable iff (!rst_n)' samples the asynchronous reset in a clocked
// context; it does not concern the circuit.  The token generator's
// period_tick output is not needed here and is left open (PINCONNECTEMPTY).
module symnet_top
  import symnet_pkg::*;
#(
  parameter int unsigned N_PROC    = 32,
  parameter int unsigned SETS      = 512,
  parameter int unsigned WAYS      = 4,
  parameter int unsigned APC_DEPTH = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor request interfaces
  input  logic              cpu_req_valid  [N_PROC],
  input  logic              cpu_req_write  [N_PROC],
  input  logic [ADDR_W-1:0] cpu_req_addr   [N_PROC],
  output logic              cpu_req_ready  [N_PROC],
  output logic              cpu_done       [N_PROC],
  output logic              cpu_done_miss  [N_PROC],
  output state_e            cpu_done_state [N_PROC],
  // cache-to-cache supply commands to the data subnetwork
  output logic              c2c_valid      [N_PROC],
  output logic [ID_W-1:0]   c2c_dest       [N_PROC],
  output logic [BLK_W-1:0]  c2c_blk        [N_PROC],
  // memory commands to the data subnetwork
  output logic              mem_supply_valid,
  output logic [ID_W-1:0]   mem_supply_dest,
  output logic [BLK_W-1:0]  mem_supply_blk,
  output logic              mem_wb_valid,
  output logic [ID_W-1:0]   mem_wb_src,
  output logic [BLK_W-1:0]  mem_wb_blk,
  output logic [31:0]       mem_supply_cnt,
  output logic [31:0]       mem_wb_cnt,
  // observation
  output logic [N_PROC-1:0] token,
  output logic [N_PROC-1:0] token_wait,
  output logic [N_PROC-1:0] ev_e_to_o,
  output logic [N_PROC-1:0] ev_own_xfer,
  output logic [N_PROC-1:0] ev_unlink,
  output logic [N_PROC-1:0] ev_void,
  output logic              collision
);

  link_t            tx      [N_PROC];
  link_t            rx      [N_PROC];
  logic [LINK_W-1:0] tx_bits [N_PROC];
  logic [LINK_W-1:0] rx_bits [N_PROC];
  logic [LINK_W-1:0] rx_mem_bits;
  link_t            rx_mem;

  token_ring #(.N_PROC(N_PROC)) u_token (
    .clk        (clk),
    .rst_n      (rst_n),
    .token      (token),
    .period_tick()
  );

  for (genvar i = 0; i < N_PROC; i++) begin : g_node
    logic      apc_valid, apc_ready, snoop;
    addr_pkt_t apc_pkt, rx_pkt;
    logic      rx_snoop;

    cosym_ctrl #(.N_PROC(N_PROC), .SETS(SETS), .WAYS(WAYS)) u_cache (
      .clk           (clk),
      .rst_n         (rst_n),
      .my_id         (ID_W'(i)),
      .cpu_req_valid (cpu_req_valid[i]),
      .cpu_req_write (cpu_req_write[i]),
      .cpu_req_addr  (cpu_req_addr[i]),
      .cpu_req_ready (cpu_req_ready[i]),
      .cpu_done      (cpu_done[i]),
      .cpu_done_miss (cpu_done_miss[i]),
      .cpu_done_state(cpu_done_state[i]),
      .apc_req_valid (apc_valid),
      .apc_req_pkt   (apc_pkt),
      .apc_req_ready (apc_ready),
      .snoop_out     (snoop),
      .rx_pkt        (rx_pkt),
      .rx_snoop      (rx_snoop),
      .supply_valid  (c2c_valid[i]),
      .supply_dest   (c2c_dest[i]),
      .supply_blk    (c2c_blk[i]),
      .ev_e_to_o     (ev_e_to_o[i]),
      .ev_own_xfer   (ev_own_xfer[i]),
      .ev_unlink     (ev_unlink[i]),
      .ev_void       (ev_void[i])
    );

    addr_port_ctrl #(.DEPTH(APC_DEPTH)) u_apc (
      .clk      (clk),
      .rst_n    (rst_n),
      .token    (token[i]),
      .req_valid(apc_valid),
      .req_pkt  (apc_pkt),
      .req_ready(apc_ready),
      .snoop_in (snoop),
      .tx       (tx[i]),
      .rx       (rx[i]),
      .rx_pkt   (rx_pkt),
      .rx_snoop (rx_snoop),
      .waiting  (token_wait[i])
    );

    assign tx_bits[i] = tx[i];
    assign rx[i]      = rx_bits[i];
  end

  addr_subnet #(.N_PROC(N_PROC), .W(LINK_W)) u_net (
    .clk      (clk),
    .rst_n    (rst_n),
    .tx       (tx_bits),
    .rx       (rx_bits),
    .rx_mem   (rx_mem_bits),
    .collision(collision)
  );

  assign rx_mem = rx_mem_bits;

  mem_ctrl #(.N_PROC(N_PROC)) u_mem (
    .clk         (clk),
    .rst_n       (rst_n),
    .rx          (rx_mem),
    .supply_valid(mem_supply_valid),
    .supply_dest (mem_supply_dest),
    .supply_blk  (mem_supply_blk),
    .wb_valid    (mem_wb_valid),
    .wb_src      (mem_wb_src),
    .wb_blk      (mem_wb_blk),
    .supply_cnt  (mem_supply_cnt),
    .wb_cnt      (mem_wb_cnt)
  );

endmodule
