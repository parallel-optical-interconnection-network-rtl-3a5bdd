// cosym_ctrl: COSYM coherence controller of one processor's second-level
// cache, snooping the SYMNET address subnetwork.
//
// COSYM is MOESI with one rule changed so that every shared block has exactly
// one owner, which alone gives the single snoop response an optical channel
// allows: a snooped read of an E block turns it into O (not S).  The owner
// (E, M or O) answers every read or read-exclusive with snoop HIGH and
// supplies the data; without an owner nobody answers (LOW) and memory
// supplies it.  A reader loads S after HIGH and E after LOW.  Each O or S line
// also holds the id of the next sharer, so sharers form a list headed by the
// owner; a new reader is appended behind the current tail (the one line with
// no next sharer).  When the owner replaces its line, ownership passes to its
// next sharer (the block is written back only if it has none); when a sharer
// replaces its line, its predecessor takes over its next pointer.  These are
// the document's rules, except the list order, the sharer unlink and the
// replacement broadcast for E/S lines, which are this design's choices.
//
// The tag store has the document's second-level cache geometry: 64 KB,
// 4-way, 32-byte blocks, i.e. 512 sets x 4 ways (data is not stored here; it
// travels on the data subnetwork).  Replacement is round-robin.
//
// Operation: one processor request at a time (cpu_req_valid/ready).  A hit
// with enough permission completes on its own (E->M on a write is silent).
// Otherwise the controller first replaces a victim if the set is full, then
// sends RD (read) or RDX (write) through the address port controller and
// waits for its own request to commit; after each own transaction, committed
// or void, it looks the request up again.  cpu_done pulses with the line's
// final state; cpu_done_miss tells whether a network transaction was needed.
// The snoop response is driven one cycle after the request becomes visible.
// All state changes of a transaction are applied when its snoop response
// arrives (see txn_tracker).
//
// Lint: verilator reports SYNCASYNCNET on rst_n because the assertion's
// 'disable iff (!rst_n)' samples the asynchronous reset in a clocked
// context.  This concerns the simulation-only check, not the circuit.  It
// also reports the block-offset bits of the held processor address and the
// valid bit of the committing packet as unused: the controller works on
// whole blocks, and cmt_valid already qualifies the packet.
module cosym_ctrl
  import symnet_pkg::*;
#(
  parameter int unsigned N_PROC = 32,
  parameter int unsigned SETS   = 512,
  parameter int unsigned WAYS   = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ID_W-1:0]   my_id,
  // processor side
  input  logic              cpu_req_valid,
  input  logic              cpu_req_write,
  input  logic [ADDR_W-1:0] cpu_req_addr,
  output logic              cpu_req_ready,
  output logic              cpu_done,
  output logic              cpu_done_miss,
  output state_e            cpu_done_state,
  // address port controller side
  output logic              apc_req_valid,
  output addr_pkt_t         apc_req_pkt,
  input  logic              apc_req_ready,
  output logic              snoop_out,
  input  addr_pkt_t         rx_pkt,
  input  logic              rx_snoop,
  // data subnetwork command: this cache supplies a block to another node
  output logic              supply_valid,
  output logic [ID_W-1:0]   supply_dest,
  output logic [BLK_W-1:0]  supply_blk,
  // protocol events, one-cycle pulses
  output logic              ev_e_to_o,
  output logic              ev_own_xfer,
  output logic              ev_unlink,
  output logic              ev_void
);

  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned TAG_W = BLK_W - SET_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [SET_W-1:0] set_t;

  // ---------------------------------------------------------------- storage
  tag_t            tag_q [SETS][WAYS];
  state_e          st_q  [SETS][WAYS];
  logic            nv_q  [SETS][WAYS];
  logic [ID_W-1:0] nx_q  [SETS][WAYS];

  // ---------------------------------------------------------------- tracker
  logic             vis_valid, vis_void, cmt_valid, cmt_snoop, req_busy;
  addr_pkt_t        cmt_pkt;
  logic [BLK_W-1:0] req_blk;

  txn_tracker #(.N_PROC(N_PROC)) u_trk (
    .clk       (clk),
    .rst_n     (rst_n),
    .rx_pkt    (rx_pkt),
    .rx_snoop  (rx_snoop),
    .vis_valid (vis_valid),
    .vis_void  (vis_void),
    .cmt_valid (cmt_valid),
    .cmt_pkt   (cmt_pkt),
    .cmt_snoop (cmt_snoop),
    .query_blk (req_blk),
    .query_busy(req_busy)
  );

  // ---------------------------------------------------------------- lookups
  // Three independent look-ups per cycle: the visible request (snoop
  // response), the committing request (state update) and the processor's
  // request.
  set_t v_set, c_set, r_set;
  tag_t v_tag, c_tag, r_tag;
  logic v_hit, c_hit, r_hit, c_free_ok, r_free_ok;
  logic [WAY_W-1:0] v_way, c_way, r_way, c_free;

  assign v_set = rx_pkt.blk[SET_W-1:0];
  assign v_tag = rx_pkt.blk[BLK_W-1:SET_W];
  assign c_set = cmt_pkt.blk[SET_W-1:0];
  assign c_tag = cmt_pkt.blk[BLK_W-1:SET_W];
  assign r_set = req_blk[SET_W-1:0];
  assign r_tag = req_blk[BLK_W-1:SET_W];

  always_comb begin
    v_hit = 1'b0; v_way = '0;
    c_hit = 1'b0; c_way = '0; c_free_ok = 1'b0; c_free = '0;
    r_hit = 1'b0; r_way = '0; r_free_ok = 1'b0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (st_q[v_set][w] != ST_I && tag_q[v_set][w] == v_tag) begin
        v_hit = 1'b1; v_way = WAY_W'(w);
      end
      if (st_q[c_set][w] != ST_I && tag_q[c_set][w] == c_tag) begin
        c_hit = 1'b1; c_way = WAY_W'(w);
      end
      if (st_q[c_set][w] == ST_I) begin
        c_free_ok = 1'b1; c_free = WAY_W'(w);
      end
      if (st_q[r_set][w] != ST_I && tag_q[r_set][w] == r_tag) begin
        r_hit = 1'b1; r_way = WAY_W'(w);
      end
      if (st_q[r_set][w] == ST_I) begin
        r_free_ok = 1'b1;
      end
    end
  end

  state_e v_st, c_st, r_st;
  logic   c_nv;
  logic [ID_W-1:0] c_nx;
  assign v_st = v_hit ? st_q[v_set][v_way] : ST_I;
  assign c_st = c_hit ? st_q[c_set][c_way] : ST_I;
  assign c_nv = c_hit && nv_q[c_set][c_way];
  assign c_nx = nx_q[c_set][c_way];
  assign r_st = r_hit ? st_q[r_set][r_way] : ST_I;

  // ---------------------------------------------------------------- snoop response
  logic snoop_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) snoop_q <= 1'b0;
    else        snoop_q <= vis_valid && ((rx_pkt.op == OP_RD) || (rx_pkt.op == OP_RDX))
                           && is_owner(v_st);
  end
  assign snoop_out = snoop_q;

  // ---------------------------------------------------------------- processor FSM
  typedef enum logic [1:0] {C_IDLE, C_LOOK, C_ISSUE, C_WAIT} cstate_e;
  cstate_e          cs_q;
  logic             wr_q, miss_q;
  logic [ADDR_W-1:0] addr_q;
  addr_pkt_t        pkt_q;
  logic [WAY_W-1:0] rr_q;

  assign req_blk = addr_q[ADDR_W-1:OFF_W];

  logic own_cmt, own_void;
  assign own_cmt  = cmt_valid && (cmt_pkt.src == my_id);
  assign own_void = vis_void && (rx_pkt.src == my_id);

  // Decision of the look-up state.
  logic      look_done, look_issue, look_silent_m;
  addr_pkt_t look_pkt;
  always_comb begin
    look_done     = 1'b0;
    look_issue    = 1'b0;
    look_silent_m = 1'b0;
    look_pkt      = '0;
    look_pkt.valid = 1'b1;
    look_pkt.src   = my_id;
    look_pkt.blk   = req_blk;
    if (!req_busy) begin
      if (r_hit && (!wr_q || r_st == ST_M)) begin
        look_done = 1'b1;
      end else if (r_hit && r_st == ST_E) begin
        look_done     = 1'b1;
        look_silent_m = 1'b1;
      end else if (r_hit || r_free_ok) begin
        // write to S/O, or a miss with a free way
        look_issue  = 1'b1;
        look_pkt.op = wr_q ? OP_RDX : OP_RD;
      end else begin
        // set full: replace the round-robin victim first
        look_issue     = 1'b1;
        look_pkt.op    = (st_q[r_set][rr_q] == ST_S) ? OP_RPL : OP_WB;
        look_pkt.blk   = {tag_q[r_set][rr_q], r_set};
        look_pkt.nxt_v = nv_q[r_set][rr_q];
        look_pkt.nxt   = nx_q[r_set][rr_q];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_q   <= C_IDLE;
      wr_q   <= 1'b0;
      miss_q <= 1'b0;
      addr_q <= '0;
      pkt_q  <= '0;
      rr_q   <= '0;
    end else begin
      unique case (cs_q)
        C_IDLE: if (cpu_req_valid) begin
          wr_q   <= cpu_req_write;
          addr_q <= cpu_req_addr;
          miss_q <= 1'b0;
          cs_q   <= C_LOOK;
        end
        C_LOOK: if (look_done) begin
          cs_q <= C_IDLE;
        end else if (look_issue) begin
          pkt_q  <= look_pkt;
          miss_q <= 1'b1;
          if (look_pkt.op == OP_WB || look_pkt.op == OP_RPL) rr_q <= rr_q + 1'b1;
          cs_q   <= C_ISSUE;
        end
        C_ISSUE: if (apc_req_ready) cs_q <= C_WAIT;
        C_WAIT:  if (own_cmt || own_void) cs_q <= C_LOOK;
        default: cs_q <= C_IDLE;
      endcase
    end
  end

  assign cpu_req_ready  = (cs_q == C_IDLE);
  assign cpu_done       = (cs_q == C_LOOK) && look_done;
  assign cpu_done_miss  = miss_q;
  assign cpu_done_state = look_silent_m ? ST_M : r_st;
  assign apc_req_valid  = (cs_q == C_ISSUE);
  assign apc_req_pkt    = pkt_q;
  assign ev_void        = own_void;

  // ---------------------------------------------------------------- commit
  // State changes of the committing transaction, seen from this cache.
  logic             c_wr, c_own;
  logic [WAY_W-1:0] c_wway;
  state_e           c_nst;
  logic             c_nnv, c_wnx;
  logic [ID_W-1:0]  c_nnx;

  always_comb begin
    c_own  = cmt_valid && (cmt_pkt.src == my_id);
    c_wr   = 1'b0;
    c_wway = c_way;
    c_nst  = c_st;
    c_nnv  = c_nv;
    c_nnx  = c_nx;
    c_wnx  = 1'b0;
    ev_e_to_o   = 1'b0;
    ev_own_xfer = 1'b0;
    ev_unlink   = 1'b0;
    if (cmt_valid) begin
      unique case (cmt_pkt.op)
        OP_RD: if (c_own) begin
          c_wr   = 1'b1;
          c_wway = c_hit ? c_way : c_free;
          c_nst  = cmt_snoop ? ST_S : ST_E;
          c_nnv  = 1'b0;
        end else if (c_hit) begin
          c_wr = 1'b1;
          if (is_owner(c_st)) c_nst = ST_O;
          ev_e_to_o = (c_st == ST_E);
          if (!c_nv) begin        // the tail of the sharer list
            c_nnv = 1'b1;
            c_nnx = cmt_pkt.src;
          end
        end
        OP_RDX: if (c_own) begin
          c_wr   = 1'b1;
          c_wway = c_hit ? c_way : c_free;
          c_nst  = ST_M;
          c_nnv  = 1'b0;
        end else if (c_hit) begin
          c_wr  = 1'b1;
          c_nst = ST_I;
          c_nnv = 1'b0;
        end
        OP_WB: if (c_own) begin
          c_wr  = c_hit;
          c_nst = ST_I;
          c_nnv = 1'b0;
        end else if (c_hit && cmt_pkt.nxt_v && cmt_pkt.nxt == my_id) begin
          c_wr  = 1'b1;
          c_nst = ST_O;
          ev_own_xfer = 1'b1;
        end
        OP_RPL: if (c_own) begin
          c_wr  = c_hit;
          c_nst = ST_I;
          c_nnv = 1'b0;
        end else if (c_hit && c_nv && c_nx == cmt_pkt.src) begin
          c_wr  = 1'b1;
          c_nnv = cmt_pkt.nxt_v;
          c_nnx = cmt_pkt.nxt;
          ev_unlink = 1'b1;
        end
        default: ;
      endcase
    end
    c_wnx = c_wr;
  end

  always_comb begin
    supply_valid = cmt_valid && !c_own && is_owner(c_st)
                   && ((cmt_pkt.op == OP_RD) || (cmt_pkt.op == OP_RDX));
    supply_dest  = cmt_pkt.src;
    supply_blk   = cmt_pkt.blk;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        for (int w = 0; w < WAYS; w++) begin
          st_q[s][w]  <= ST_I;
          nv_q[s][w]  <= 1'b0;
          nx_q[s][w]  <= '0;
          tag_q[s][w] <= '0;
        end
      end
    end else begin
      if (cs_q == C_LOOK && look_silent_m) st_q[r_set][r_way] <= ST_M;
      if (c_wr) begin
        st_q[c_set][c_wway]  <= c_nst;
        tag_q[c_set][c_wway] <= c_tag;
        nv_q[c_set][c_wway]  <= c_nnv;
        if (c_wnx) nx_q[c_set][c_wway] <= c_nnx;
      end
    end
  end

  // A reader or writer always finds a way: the controller replaced a victim
  // before sending the request.
  a_alloc : assert property (@(posedge clk) disable iff (!rst_n)
    (c_own && (cmt_pkt.op == OP_RD || cmt_pkt.op == OP_RDX)) |-> (c_hit || c_free_ok));

endmodule
