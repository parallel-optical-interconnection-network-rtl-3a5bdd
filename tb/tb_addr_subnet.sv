// tb_addr_subnet: each processor inserts a random bundle in its own slot
// (one insertion per cycle, round robin).  Every bundle must appear on every
// receiver and on the memory tap exactly 2*log2(N) cycles later, with several
// bundles in flight at once and no collision.  Finally two processors insert
// in the same cycle, and the collision flag must rise.
module tb_addr_subnet;
  localparam int unsigned N   = 8;
  localparam int unsigned W   = 16;
  localparam int unsigned LAT = 2 * $clog2(N);
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] tx [N];
  logic [W-1:0] rx [N];
  logic [W-1:0] rx_mem;
  logic collision;
  logic [W-1:0] sent [$];
  int checks = 0, failures = 0, max_inflight = 0;

  addr_subnet #(.N_PROC(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // history of what was inserted each cycle (zero if nothing)
  logic [W-1:0] hist [LAT+1];

  initial begin
    for (int i = 0; i < N; i++) tx[i] = '0;
    for (int k = 0; k <= LAT; k++) hist[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 12 * N; c++) begin
      @(negedge clk);
      // compare receivers against what was inserted LAT cycles ago
      if (c >= LAT) begin
        for (int i = 0; i < N; i++) begin
          checks++;
          if (rx[i] !== hist[LAT-1]) begin
            failures++;
            $display("cycle %0d rx[%0d]=%h expected %h", c, i, rx[i], hist[LAT-1]);
          end
        end
        checks++;
        if (rx_mem !== hist[LAT-1]) begin failures++; $display("rx_mem mismatch"); end
      end
      for (int k = LAT; k > 0; k--) hist[k] = hist[k-1];
      for (int i = 0; i < N; i++) tx[i] = '0;
      hist[0] = '0;
      if (c < 10 * N && ($urandom_range(4) != 0)) begin
        tx[c % N] = W'($urandom) | 1;
        hist[0]   = tx[c % N];
      end
      begin
        automatic int n = 0;
        for (int k = 0; k < LAT; k++) if (hist[k] != 0) n++;
        if (n > max_inflight) max_inflight = n;
      end
    end
    checks++;
    if (collision !== 1'b0) begin failures++; $display("unexpected collision"); end
    checks++;
    if (max_inflight < 2) begin failures++; $display("no pipelining observed"); end
    // two insertions in one cycle
    @(negedge clk);
    tx[0] = 16'h0101; tx[1] = 16'h0100;
    @(negedge clk);
    tx[0] = '0; tx[1] = '0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (collision !== 1'b1) begin failures++; $display("collision not flagged"); end
    $display("max in flight %0d", max_inflight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
