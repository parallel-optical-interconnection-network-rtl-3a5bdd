// tb_addr_port_ctrl: requests are pushed at random times while a token
// visits the port every N cycles.  A request may only appear on the transmit
// lanes in a token cycle, in push order, one per token visit; the buffer
// must push back when full; the snoop lane and the receive path follow
// their inputs in the same cycle.
module tb_addr_port_ctrl;
  import symnet_pkg::*;
  localparam int unsigned N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic token, req_valid, req_ready, snoop_in, rx_snoop, waiting;
  addr_pkt_t req_pkt, rx_pkt;
  link_t tx, rx;
  addr_pkt_t expq [$];
  int checks = 0, failures = 0, cyc = 0, sent = 0, got = 0, full_seen = 0, wait_seen = 0;

  addr_port_ctrl #(.DEPTH(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 0; req_pkt = '0; snoop_in = 0; rx = '0; token = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      token    = ((c % N) == 2);
      snoop_in = $urandom_range(1);
      rx       = link_t'({$urandom, $urandom});
      if (!req_valid || req_ready) begin
        req_valid = (c < 300) && ($urandom_range(1) == 1);
        req_pkt = '0;
        req_pkt.valid = 1'b1;
        req_pkt.op    = op_e'($urandom_range(3));
        req_pkt.blk   = BLK_W'($urandom);
        req_pkt.src   = 7'd3;
      end
      #1;
      // same-cycle checks
      checks += 3;
      if (tx.snoop !== snoop_in) begin failures++; $display("snoop lane"); end
      if (rx_pkt !== rx.pkt || rx_snoop !== rx.snoop) begin failures++; $display("rx path"); end
      if (!token && tx.pkt.valid) begin failures++; $display("cycle %0d: sent without token", c); end
      if (token && tx.pkt.valid) begin
        checks++;
        if (expq.size() == 0 || tx.pkt !== expq[0]) begin
          failures++; $display("cycle %0d: wrong packet", c);
        end
        if (expq.size() != 0) void'(expq.pop_front());
        got++;
      end else if (token) begin
        checks++;
        if (expq.size() != 0) begin failures++; $display("cycle %0d: token unused with a queued request", c); end
      end
      if (waiting) wait_seen++;
      if (req_valid && !req_ready) full_seen++;
      @(posedge clk);
      if (req_valid && req_ready) begin expq.push_back(req_pkt); sent++; end
    end
    checks += 3;
    if (got != sent || got == 0) begin failures++; $display("sent %0d got %0d", sent, got); end
    if (full_seen == 0) begin failures++; $display("buffer never full"); end
    if (wait_seen == 0) begin failures++; $display("never waited for the token"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
