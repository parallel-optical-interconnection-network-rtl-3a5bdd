// txn_tracker: the serialisation window that every snooper (cache
// controller or memory) keeps over the broadcast request stream.
//
// All snoopers receive the same requests in the same cycles, so each can keep
// an identical history and reach identical decisions without talking to the
// others.  A request becomes visible in cycle v; its single snoop response
// comes back on the snoop lane in cycle v + RESP, where RESP = SNOOP_LAT +
// 2*log2(N_PROC) (the owner answers SNOOP_LAT cycles after seeing the request
// and the answer crosses the tree like any request).  In that cycle the
// tracker reports the request together with its response as committed, and
// all snoopers apply the COSYM state changes of that transaction at once.
//
// Several requests are in flight in the tree at once, so a request may have
// been formed from a cache state that an earlier, not yet visible request for
// the same block is about to change.  This design makes such a request void:
// a visible request is void if a non-void request for the same block became
// visible in the last HIST cycles, HIST = N_PROC + 2*log2(N_PROC) + RESP + 2.
// That is the longest time from a cache controller forming a request (from
// state that may miss a commit happening in the same cycle) to the request
// becoming visible: one cycle to hand it to the port controller, one to
// enter its buffer, up to N_PROC-1 waiting for the token and 2*log2(N_PROC)
// in the tree, plus the RESP cycles an earlier request needs to commit.  Every snooper ignores a
// void request, and its sender retries.  This window is this design's
// realisation of the transient states the document mentions without
// detailing them.
//
// Outputs: vis_valid / vis_void qualify rx_pkt in the cycle it is visible;
// cmt_valid, cmt_pkt and cmt_snoop describe the request committing in this
// cycle.  query_busy tells whether query_blk has a request visible now or
// still waiting for its response.  cmt_snoop is rx_snoop itself: the snoop
// lane in the commit cycle carries the committing request's answer.
module txn_tracker
  import symnet_pkg::*;
#(
  parameter int unsigned N_PROC    = 32,
  parameter int unsigned SNOOP_LAT = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  addr_pkt_t        rx_pkt,
  input  logic             rx_snoop,
  output logic             vis_valid,
  output logic             vis_void,
  output logic             cmt_valid,
  output addr_pkt_t        cmt_pkt,
  output logic             cmt_snoop,
  input  logic [BLK_W-1:0] query_blk,
  output logic             query_busy
);

  localparam int unsigned NET_LAT = 2 * $clog2(N_PROC);
  localparam int unsigned RESP    = SNOOP_LAT + NET_LAT;
  localparam int unsigned HIST    = N_PROC + NET_LAT + RESP + 2;

  addr_pkt_t hist_q [HIST];
  logic      conflict;

  always_comb begin
    conflict   = 1'b0;
    query_busy = rx_pkt.valid && (rx_pkt.blk == query_blk);
    for (int k = 0; k < HIST; k++) begin
      if (hist_q[k].valid && (hist_q[k].blk == rx_pkt.blk)) conflict = 1'b1;
      if ((k < RESP) && hist_q[k].valid && (hist_q[k].blk == query_blk)) query_busy = 1'b1;
    end
  end

  assign vis_void  = rx_pkt.valid && conflict;
  assign vis_valid = rx_pkt.valid && !conflict;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < HIST; k++) hist_q[k] <= '0;
    end else begin
      hist_q[0] <= vis_valid ? rx_pkt : '0;
      for (int k = 1; k < HIST; k++) hist_q[k] <= hist_q[k-1];
    end
  end

  assign cmt_valid = hist_q[RESP-1].valid;
  assign cmt_pkt   = hist_q[RESP-1];
  assign cmt_snoop = rx_snoop;

endmodule
