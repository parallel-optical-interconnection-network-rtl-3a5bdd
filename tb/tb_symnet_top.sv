// tb_symnet_top: end-to-end test of the address subnetwork with COSYM
// caches.  Every processor runs a random stream of reads and writes over a
// small pool of blocks that share cache sets, so that sharing, ownership
// moves, invalidations and replacements all occur with several requests in
// the tree at once.
//
// Checked every cycle, from the cache state of all nodes:
//   - at most one owner (E, M or O) per block; E and M exclude all copies;
//     shared copies always have an owner;
//   - the sharer list starting at the owner visits exactly the S copies;
//   - requests enter the tree only in their sender's token slot, and each
//     reaches the memory tap exactly 2*log2(N) cycles later;
//   - no two pulses ever meet in a coupler.
// Checked per access: a write ends in M, a read in a valid state, and every
// access finishes.  Each mechanism (token wait, several requests in flight,
// snoop HIGH and LOW, E->O, ownership transfer, unshared write-back, sharer
// unlink, void and retry, replacement) must occur at least once.
module tb_symnet_top;
  import symnet_pkg::*;
  localparam int unsigned N     = 4;
  localparam int unsigned SETS  = 4;
  localparam int unsigned WAYS  = 2;
  localparam int unsigned OPS   = 150;     // accesses per processor
  localparam int unsigned WR_PCT = 35;      // share of writes, percent
  localparam int unsigned LAT   = 2 * $clog2(N);
  localparam int unsigned NB    = 3 * (WAYS + 1);
  localparam int unsigned SET_W = $clog2(SETS);

  logic clk = 1'b0, rst_n = 1'b0;
  logic              cpu_req_valid [N], cpu_req_write [N], cpu_req_ready [N];
  logic [ADDR_W-1:0] cpu_req_addr [N];
  logic              cpu_done [N], cpu_done_miss [N];
  state_e            cpu_done_state [N];
  logic              c2c_valid [N];
  logic [ID_W-1:0]   c2c_dest [N];
  logic [BLK_W-1:0]  c2c_blk [N];
  logic              mem_supply_valid, mem_wb_valid, collision;
  logic [ID_W-1:0]   mem_supply_dest, mem_wb_src;
  logic [BLK_W-1:0]  mem_supply_blk, mem_wb_blk;
  logic [31:0]       mem_supply_cnt, mem_wb_cnt;
  logic [N-1:0]      token, token_wait, ev_e_to_o, ev_own_xfer, ev_unlink, ev_void;

  symnet_top #(.N_PROC(N), .SETS(SETS), .WAYS(WAYS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t FAIL: %s", $time, what);
    end
  endtask

  function automatic logic [BLK_W-1:0] pool(int k);
    return BLK_W'((k / 3) * SETS + (k % 3));
  endfunction

  // ------------------------------------------------------------ per-node view of each pool block
  state_e          bst [N][NB];
  logic            bnv [N][NB];
  logic [ID_W-1:0] bnx [N][NB];

  for (genvar i = 0; i < N; i++) begin : g_view
    always @(negedge clk) begin
      for (int k = 0; k < NB; k++) begin
        automatic logic [BLK_W-1:0] b = pool(k);
        automatic int s = int'(b[SET_W-1:0]);
        bst[i][k] = ST_I; bnv[i][k] = 0; bnx[i][k] = '0;
        for (int w = 0; w < WAYS; w++) begin
          if (dut.g_node[i].u_cache.st_q[s][w] != ST_I &&
              dut.g_node[i].u_cache.tag_q[s][w] == b[BLK_W-1:SET_W]) begin
            bst[i][k] = dut.g_node[i].u_cache.st_q[s][w];
            bnv[i][k] = dut.g_node[i].u_cache.nv_q[s][w];
            bnx[i][k] = dut.g_node[i].u_cache.nx_q[s][w];
          end
        end
      end
    end
  end

  bit running = 0;
  always @(posedge clk) if (running) begin
    for (int k = 0; k < NB; k++) begin
      automatic int owners = 0, excl = 0, valid = 0, shared = 0, own = -1, visited = 0, cur = 0;
      for (int i = 0; i < N; i++) begin
        if (bst[i][k] != ST_I) valid++;
        if (is_owner(bst[i][k])) begin owners++; own = i; end
        if (bst[i][k] == ST_E || bst[i][k] == ST_M) excl++;
        if (bst[i][k] == ST_S) shared++;
      end
      chk(owners <= 1, $sformatf("block %0d has %0d owners", pool(k), owners));
      chk(excl == 0 || valid == 1, $sformatf("block %0d: E/M copy is not alone", pool(k)));
      chk(shared == 0 || owners == 1, $sformatf("block %0d: sharers without owner", pool(k)));
      if (owners == 1) begin
        cur = own;
        while (bnv[cur][k] && visited <= N) begin
          cur = int'(bnx[cur][k]);
          visited++;
          if (cur >= N || bst[cur][k] != ST_S) begin visited = N + 1; break; end
        end
        chk(visited == shared, $sformatf("block %0d: sharer list covers %0d of %0d", pool(k), visited, shared));
      end
    end
  end

  // ------------------------------------------------------------ network checks
  int cyc = 0, inflight_max = 0, n_token_wait = 0, n_wb = 0, n_rpl = 0;
  int n_c2c = 0, n_mem = 0, n_e2o = 0, n_xfer = 0, n_unlink = 0, n_void = 0, n_wr_hit = 0;
  logic [LINK_W-1:0] ins_hist [LAT+1];
  int ins_cnt_hist [LAT+1];

  always @(posedge clk) if (running) begin
    link_t l, m;
    automatic int n_in = 0, inflight = 0;
    cyc++;
    for (int i = 0; i < N; i++) begin
      l = dut.tx_bits[i];
      if (l.pkt.valid) begin
        n_in++;
        chk(token[i], "request sent outside its token slot");
        chk(l.pkt.src == ID_W'(i), "request carries a wrong source");
      end
      if (token_wait[i]) n_token_wait++;
      if (c2c_valid[i]) n_c2c++;
      if (ev_e_to_o[i]) n_e2o++;
      if (ev_own_xfer[i]) n_xfer++;
      if (ev_unlink[i]) n_unlink++;
      if (ev_void[i]) n_void++;
    end
    // shift the insertion history: ins_hist[k] was inserted k+1 cycles ago
    for (int k = LAT; k > 0; k--) begin ins_hist[k] = ins_hist[k-1]; ins_cnt_hist[k] = ins_cnt_hist[k-1]; end
    ins_hist[0] = '0; ins_cnt_hist[0] = n_in;
    for (int i = 0; i < N; i++) if (LINK_W'(dut.tx_bits[i]) != '0) ins_hist[0] = ins_hist[0] | dut.tx_bits[i];
    m = dut.rx_mem_bits;
    if (m.pkt.valid) begin
      if (m.pkt.op == OP_WB) n_wb++;
      if (m.pkt.op == OP_RPL) n_rpl++;
    end
    begin
      link_t h;
      h = ins_hist[LAT];
      chk(m.pkt == h.pkt, "memory tap does not see the request 2*log2(N) cycles after insertion");
    end
    for (int k = 0; k < LAT; k++) inflight += ins_cnt_hist[k];
    if (inflight > inflight_max) inflight_max = inflight;
    if (mem_supply_valid) n_mem++;
    chk(!collision, "collision in the address tree");
  end

  // ------------------------------------------------------------ processors
  int done_ops [N];
  for (genvar i = 0; i < N; i++) begin : g_cpu
    initial begin
      cpu_req_valid[i] = 0; cpu_req_write[i] = 0; cpu_req_addr[i] = '0;
      done_ops[i] = 0;
      wait (running);
      for (int n = 0; n < OPS; n++) begin
        automatic bit wr = ($urandom_range(99) < WR_PCT);
        automatic int t = 0;
        @(negedge clk);
        cpu_req_valid[i] = 1;
        cpu_req_write[i] = wr;
        cpu_req_addr[i]  = ADDR_W'(pool($urandom_range(NB - 1))) << OFF_W;
        @(negedge clk);
        cpu_req_valid[i] = 0;
        while (!cpu_done[i] && t < 5000) begin @(negedge clk); t++; end
        chk(cpu_done[i], $sformatf("node %0d: access never finished", i));
        if (wr) chk(cpu_done_state[i] == ST_M, "write did not end in M");
        else    chk(cpu_done_state[i] != ST_I, "read ended invalid");
        if (wr && !cpu_done_miss[i]) n_wr_hit++;
        done_ops[i]++;
        repeat ($urandom_range(3)) @(negedge clk);
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= LAT; k++) begin ins_hist[k] = '0; ins_cnt_hist[k] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    running = 1;
    for (int i = 0; i < N; i++) wait (done_ops[i] == OPS);
    repeat (100) @(posedge clk);
    running = 0;
    $display("cycles %0d, in flight max %0d, token waits %0d, snoop HIGH %0d, snoop LOW %0d",
             cyc, inflight_max, n_token_wait, n_c2c, n_mem);
    $display("E->O %0d, ownership moves %0d, write-backs %0d (memory took %0d), RPL %0d, unlinks %0d, voids %0d, write hits %0d",
             n_e2o, n_xfer, n_wb, mem_wb_cnt, n_rpl, n_unlink, n_void, n_wr_hit);
    chk(n_token_wait > 0, "no request waited for the token");
    chk(inflight_max >= 2, "never two requests in flight");
    chk(n_c2c > 0, "no snoop HIGH / cache-to-cache supply");
    chk(n_mem > 0 && n_mem == int'(mem_supply_cnt), "no snoop LOW / memory supply");
    chk(n_e2o > 0, "no E->O on a snooped read");
    chk(n_xfer > 0, "no ownership transfer on replacement");
    chk(mem_wb_cnt > 0, "no write-back of an unshared block");
    chk(n_rpl > 0 && n_unlink > 0, "no sharer replacement / unlink");
    chk(n_void > 0, "no void request and retry");
    chk(n_wr_hit > 0, "no write hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
