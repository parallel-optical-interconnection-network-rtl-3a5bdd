// tb_cosym_ctrl: one COSYM controller (node 1 of 4, 4 sets x 2 ways) with
// the testbench playing the network and the other nodes.  Each request the
// controller sends is broadcast back to it after a few cycles; the snoop
// response reaches it RESP = 1 + 2*log2(4) cycles after visibility, combining
// the controller's own snoop pulse with what the other nodes would answer.
// Directed steps cover: read miss to E, hits, E->O on a snooped read with
// cache-to-cache supply, write upgrade from O, invalidation, reads loading S,
// sharer replacement (RPL) and owner replacement (WB) carrying the next
// sharer, ownership transfer, sharer unlink, a void request and its retry,
// and the silent E->M write.
module tb_cosym_ctrl;
  import symnet_pkg::*;
  localparam int unsigned N    = 4;
  localparam int unsigned RESP = 1 + 2 * $clog2(N);
  localparam logic [ID_W-1:0] ME = 7'd1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cpu_req_valid, cpu_req_write, cpu_req_ready, cpu_done, cpu_done_miss;
  logic [ADDR_W-1:0] cpu_req_addr;
  state_e cpu_done_state;
  logic apc_req_valid, apc_req_ready, snoop_out, rx_snoop;
  addr_pkt_t apc_req_pkt, rx_pkt;
  logic supply_valid;
  logic [ID_W-1:0] supply_dest;
  logic [BLK_W-1:0] supply_blk;
  logic ev_e_to_o, ev_own_xfer, ev_unlink, ev_void;
  logic [ID_W-1:0] my_id;

  cosym_ctrl #(.N_PROC(N), .SETS(4), .WAYS(2)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_e2o = 0, n_xfer = 0, n_unlink = 0, n_void = 0, n_supply = 0;
  logic [ID_W-1:0] last_supply_dest;
  addr_pkt_t issued [$];

  always @(posedge clk) if (rst_n) begin
    if (ev_e_to_o)   n_e2o++;
    if (ev_own_xfer) n_xfer++;
    if (ev_unlink)   n_unlink++;
    if (ev_void)     n_void++;
    if (supply_valid) begin n_supply++; last_supply_dest = supply_dest; end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic addr_pkt_t mk(op_e op, int blk, int src, logic nv, int nx);
    addr_pkt_t p;
    p = '0; p.valid = 1; p.op = op; p.blk = BLK_W'(blk); p.src = ID_W'(src);
    p.nxt_v = nv; p.nxt = ID_W'(nx);
    return p;
  endfunction

  // ------------------------------------------------------------ network model
  // Captured requests and injected ones are made visible one per cycle, in
  // order.  The snoop lane in cycle c carries the answer to the request seen
  // in cycle c-RESP: the other nodes' answer OR the controller's own pulse.
  typedef struct { addr_pkt_t p; logic resp; } ent_t;
  ent_t sched_q [$];
  logic oth_hist  [int];
  logic mine_hist [int];
  int   cyc = 0;
  logic own_resp = 0;          // other nodes' answer to the controller's RD/RDX
  bit   cut_in = 0;            // put cut_pkt just ahead of the next own request
  addr_pkt_t cut_pkt;
  int   last_vis = 0;

  always @(posedge clk) if (rst_n && apc_req_valid && apc_req_ready) begin
    ent_t e;
    if (cut_in) begin
      e.p = cut_pkt; e.resp = 0; sched_q.push_back(e); cut_in = 0;
    end
    e.p = apc_req_pkt;
    e.resp = (apc_req_pkt.op == OP_RD || apc_req_pkt.op == OP_RDX) ? own_resp : 1'b0;
    sched_q.push_back(e);
    issued.push_back(apc_req_pkt);
  end

  always @(negedge clk) begin
    cyc++;
    mine_hist[cyc-1] = snoop_out;
    if (sched_q.size() != 0) begin
      ent_t e;
      e = sched_q.pop_front();
      rx_pkt = e.p;
      oth_hist[cyc] = e.resp;
      last_vis = cyc;
    end else begin
      rx_pkt = '0;
      oth_hist[cyc] = 1'b0;
    end
    rx_snoop = (oth_hist.exists(cyc-RESP) ? oth_hist[cyc-RESP] : 1'b0)
             | (mine_hist.exists(cyc-RESP) ? mine_hist[cyc-RESP] : 1'b0);
  end

  // Another node's request; returns the controller's snoop pulse for it.
  task automatic bcast(addr_pkt_t p, logic other_resp, output logic my_snoop);
    ent_t e;
    e.p = p; e.resp = other_resp;
    sched_q.push_back(e);
    @(negedge clk);
    while (sched_q.size() != 0) @(negedge clk);
    repeat (RESP + 2) @(negedge clk);
    my_snoop = mine_hist[last_vis];
  endtask

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic cpu_issue(bit wr, int blk);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_write = wr; cpu_req_addr = ADDR_W'(blk) << OFF_W;
    @(negedge clk);
    cpu_req_valid = 0;
  endtask

  task automatic cpu_finish(output state_e st, output bit miss);
    int t = 0;
    while (!cpu_done) begin
      @(negedge clk); #1;
      t++;
      if (t > 1000) begin failures++; $display("FAIL: access hangs"); break; end
    end
    st = cpu_done_state; miss = cpu_done_miss;
    idle(16);   // leave the serialisation window
  endtask

  task automatic cpu(bit wr, int blk, logic other_resp, output state_e st, output bit miss);
    own_resp = other_resp;
    cpu_issue(wr, blk);
    cpu_finish(st, miss);
  endtask

  state_e st;
  bit miss;
  logic s;
  initial begin
    my_id = ME;
    cpu_req_valid = 0; cpu_req_write = 0; cpu_req_addr = '0;
    apc_req_ready = 1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    idle(2);

    // 1-2: read miss answered LOW loads E; a second read hits
    cpu(0, 4, 0, st, miss);
    chk(st == ST_E && miss, "read miss, snoop low -> E");
    chk(issued.size() == 1 && issued[0].op == OP_RD && issued[0].blk == 4 && issued[0].src == ME, "RD packet");
    issued.delete();
    cpu(0, 4, 0, st, miss);
    chk(st == ST_E && !miss && issued.size() == 0, "read hit in E");

    // 3: node 2 reads: we own it, answer HIGH, supply, E -> O
    bcast(mk(OP_RD, 4, 2, 0, 0), 0, s); idle(16);
    chk(s == 1, "owner answers a snooped read");
    chk(n_e2o == 1 && n_supply == 1 && last_supply_dest == 2, "E->O and supply to node 2");
    cpu(0, 4, 0, st, miss);
    chk(st == ST_O && !miss, "block now O");

    // 4: node 3 reads too: still the owner
    bcast(mk(OP_RD, 4, 3, 0, 0), 0, s); idle(16);
    chk(s == 1 && n_supply == 2 && last_supply_dest == 3, "O answers and supplies");

    // 5: write to the O block: RDX, we answer ourselves, -> M
    cpu(1, 4, 0, st, miss);
    chk(st == ST_M && miss && issued.size() == 1 && issued[0].op == OP_RDX, "write upgrade O -> M");
    issued.delete();

    // 6: node 0 writes: we supply and invalidate; our read then loads S
    bcast(mk(OP_RDX, 4, 0, 0, 0), 0, s); idle(16);
    chk(s == 1 && last_supply_dest == 0, "M answers an RDX");
    cpu(0, 4, 1, st, miss);
    chk(st == ST_S && miss, "invalidated, read answered HIGH -> S");
    issued.delete();

    // 7: fill set 0 (2 ways) and evict the S block with RPL
    cpu(0, 8, 0, st, miss);
    chk(st == ST_E, "block 8 E");
    issued.delete();
    cpu(0, 12, 0, st, miss);
    chk(st == ST_E && issued.size() == 2 && issued[0].op == OP_RPL && issued[0].blk == 4
        && !issued[0].nxt_v && issued[1].op == OP_RD && issued[1].blk == 12, "S victim replaced by RPL");
    issued.delete();

    // 8: next victim is the E block 8: WB without next sharer
    cpu(0, 16, 0, st, miss);
    chk(issued.size() == 2 && issued[0].op == OP_WB && issued[0].blk == 8 && !issued[0].nxt_v,
        "E victim replaced by WB");
    issued.delete();

    // 9: read block 5 as a sharer, then the owner (node 2) replaces it
    cpu(0, 5, 1, st, miss);
    chk(st == ST_S, "block 5 S");
    bcast(mk(OP_WB, 5, 2, 1, ME), 0, s); idle(16);
    chk(n_xfer == 1, "ownership transferred to the next sharer");
    bcast(mk(OP_RD, 5, 3, 0, 0), 0, s); idle(16);
    chk(s == 1, "new owner answers");
    // 10: node 3 (our next sharer) leaves; node 0 joins behind us
    bcast(mk(OP_RPL, 5, 3, 0, 0), 0, s); idle(16);
    chk(n_unlink == 1, "sharer unlinked");
    bcast(mk(OP_RD, 5, 0, 0, 0), 0, s); idle(16);
    issued.delete();

    cpu(0, 9, 0, st, miss);
    cpu(0, 13, 0, st, miss);
    chk(issued.size() == 3 && issued[1].op == OP_WB && issued[1].blk == 5 && issued[1].nxt_v
        && issued[1].nxt == 0, "owner WB carries next sharer 0");
    issued.delete();

    // 11: our read of block 20 comes right behind node 2's: void, retried
    cut_pkt = mk(OP_RD, 20, 2, 0, 0);   // node 2 reads block 20 just ahead of us
    cut_in  = 1;
    cpu(0, 20, 1, st, miss);
    chk(n_void >= 1 && st == ST_S && issued.size() == 2 + n_void, "void request retried");
    issued.delete();

    // 12: silent E -> M
    cpu(0, 24, 0, st, miss);
    chk(st == ST_E, "block 24 E");
    issued.delete();
    cpu(1, 24, 0, st, miss);
    chk(st == ST_M && !miss && issued.size() == 0, "silent E -> M write");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
