// tb_token_ring: checks that the token visits processor i in cycle
// (k*N + i) after reset, that exactly one processor holds it in every cycle,
// and that the generator fires once per N-cycle round.
module tb_token_ring;
  localparam int unsigned N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] token;
  logic period_tick;
  int checks = 0, failures = 0;
  int visits [N];

  token_ring #(.N_PROC(N)) dut (.clk(clk), .rst_n(rst_n), .token(token), .period_tick(period_tick));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) visits[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 5 * N; c++) begin
      checks++;
      if (token !== (N'(1) << (c % N))) begin
        failures++;
        $display("cycle %0d: token %b expected bit %0d", c, token, c % N);
      end
      checks++;
      if (period_tick !== ((c % N) == 0)) begin
        failures++;
        $display("cycle %0d: period_tick %b", c, period_tick);
      end
      for (int i = 0; i < N; i++) if (token[i]) visits[i]++;
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (visits[i] != 5) begin
        failures++;
        $display("node %0d got the token %0d times, expected 5", i, visits[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
