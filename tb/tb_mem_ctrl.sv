// tb_mem_ctrl: feeds a broadcast stream to the memory snooper, N=4 so the
// snoop response of a request visible in cycle v arrives in cycle v+5.
// Checks: a read answered LOW makes memory supply the requester; one answered
// HIGH does not; an owner replacement without a next sharer is written back,
// one with a next sharer is not; a second request for a block still in its
// window is void and causes nothing.
module tb_mem_ctrl;
  import symnet_pkg::*;
  localparam int unsigned N    = 4;
  localparam int unsigned RESP = 1 + 2 * $clog2(N);
  logic clk = 1'b0, rst_n = 1'b0;
  link_t rx;
  logic supply_valid, wb_valid;
  logic [ID_W-1:0] supply_dest, wb_src;
  logic [BLK_W-1:0] supply_blk, wb_blk;
  logic [31:0] supply_cnt, wb_cnt;
  int checks = 0, failures = 0;

  mem_ctrl #(.N_PROC(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic addr_pkt_t mk(op_e op, int blk, int src, logic nv, int nx);
    addr_pkt_t p;
    p = '0; p.valid = 1; p.op = op; p.blk = BLK_W'(blk); p.src = ID_W'(src);
    p.nxt_v = nv; p.nxt = ID_W'(nx);
    return p;
  endfunction

  // Show one request, then idle RESP-1 cycles and give the response in the
  // commit cycle; return what the memory reported then.
  task automatic txn(addr_pkt_t p, logic resp, output logic sv, output logic wv,
                     output logic [ID_W-1:0] dst, output logic [BLK_W-1:0] blk);
    @(negedge clk); rx = '0; rx.pkt = p;
    for (int k = 1; k < RESP; k++) begin @(negedge clk); rx = '0; end
    @(negedge clk); rx = '0; rx.snoop = resp;
    #1; sv = supply_valid; wv = wb_valid; dst = supply_dest; blk = sv ? supply_blk : wb_blk;
    @(negedge clk); rx = '0;
  endtask

  logic sv, wv;
  logic [ID_W-1:0] dst;
  logic [BLK_W-1:0] blk;

  initial begin
    rx = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    txn(mk(OP_RD, 100, 2, 0, 0), 1'b0, sv, wv, dst, blk);
    checks++; if (!(sv && !wv && dst == 2 && blk == 100)) begin failures++; $display("RD low: no supply"); end
    txn(mk(OP_RD, 200, 1, 0, 0), 1'b1, sv, wv, dst, blk);
    checks++; if (sv || wv) begin failures++; $display("RD high: memory answered"); end
    txn(mk(OP_RDX, 300, 3, 0, 0), 1'b0, sv, wv, dst, blk);
    checks++; if (!(sv && dst == 3 && blk == 300)) begin failures++; $display("RDX low: no supply"); end
    txn(mk(OP_WB, 400, 0, 0, 0), 1'b0, sv, wv, dst, blk);
    checks++; if (!(wv && !sv && blk == 400)) begin failures++; $display("WB unshared: no write-back"); end
    txn(mk(OP_WB, 500, 0, 1, 2), 1'b0, sv, wv, dst, blk);
    checks++; if (sv || wv) begin failures++; $display("WB with next sharer: written back"); end
    txn(mk(OP_RPL, 600, 1, 0, 0), 1'b0, sv, wv, dst, blk);
    checks++; if (sv || wv) begin failures++; $display("RPL: memory acted"); end
    // block 700 twice, 2 cycles apart: the second must be void
    @(negedge clk); rx = '0; rx.pkt = mk(OP_RD, 700, 1, 0, 0);
    @(negedge clk); rx = '0;
    @(negedge clk); rx = '0; rx.pkt = mk(OP_RD, 700, 2, 0, 0);
    for (int k = 0; k < 3 * RESP; k++) begin
      @(negedge clk); rx = '0;
      #1;
      if (supply_valid) begin
        checks++;
        if (supply_dest != 1) begin failures++; $display("void request was served"); end
      end
    end
    checks++;
    if (supply_cnt != 3 || wb_cnt != 1) begin
      failures++; $display("counts supply %0d wb %0d", supply_cnt, wb_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
