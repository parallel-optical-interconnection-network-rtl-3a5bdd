// mem_ctrl: the memory module's side of the address network.
//
// The memory snoops every broadcast request.  When a read or read-exclusive
// commits with its snoop response LOW, no cache owns the block and the memory
// must supply the data to the requester; when it commits HIGH the owning cache
// supplies it and the memory stays silent.  When an owner replaces a block
// that has no next sharer the block is written back to memory; when it has a
// next sharer, ownership moves to that sharer and memory takes nothing.
// These rules follow the document's "Snoop High"/"Snoop Low" definitions and
// its write-back rule.  The data transfer itself belongs to the separate data
// subnetwork, so this module issues the data-transfer commands for it.
//
// Timing: an event is reported in the cycle the transaction commits, one
// snoop-response time (SNOOP_LAT + 2*log2(N_PROC) cycles) after the request
// became visible.  supply_cnt and wb_cnt count the events since reset.
//
// Lint: the packet's valid bit and next-sharer id are not needed here
// (cmt_valid already qualifies the packet, and only nxt_v matters for the
// write-back decision), so verilator reports those cmt_pkt bits as unused.
// The tracker outputs this module does not need are left open on purpose
// (PINCONNECTEMPTY).
module mem_ctrl
  import symnet_pkg::*;
#(
  parameter int unsigned N_PROC = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  link_t            rx,
  output logic             supply_valid,
  output logic [ID_W-1:0]  supply_dest,
  output logic [BLK_W-1:0] supply_blk,
  output logic             wb_valid,
  output logic [ID_W-1:0]  wb_src,
  output logic [BLK_W-1:0] wb_blk,
  output logic [31:0]      supply_cnt,
  output logic [31:0]      wb_cnt
);

  logic      cmt_valid, cmt_snoop;
  addr_pkt_t cmt_pkt;

  txn_tracker #(.N_PROC(N_PROC)) u_trk (
    .clk       (clk),
    .rst_n     (rst_n),
    .rx_pkt    (rx.pkt),
    .rx_snoop  (rx.snoop),
    .vis_valid (),
    .vis_void  (),
    .cmt_valid (cmt_valid),
    .cmt_pkt   (cmt_pkt),
    .cmt_snoop (cmt_snoop),
    .query_blk ('0),
    .query_busy()
  );

  always_comb begin
    supply_valid = cmt_valid && !cmt_snoop && ((cmt_pkt.op == OP_RD) || (cmt_pkt.op == OP_RDX));
    supply_dest  = cmt_pkt.src;
    supply_blk   = cmt_pkt.blk;
    wb_valid     = cmt_valid && (cmt_pkt.op == OP_WB) && !cmt_pkt.nxt_v;
    wb_src       = cmt_pkt.src;
    wb_blk       = cmt_pkt.blk;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      supply_cnt <= '0;
      wb_cnt     <= '0;
    end else begin
      if (supply_valid) supply_cnt <= supply_cnt + 1;
      if (wb_valid)     wb_cnt     <= wb_cnt + 1;
    end
  end

endmodule
