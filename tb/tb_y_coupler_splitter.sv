// tb_y_coupler_splitter: random stimulus against a one-cycle reference:
// up_o is the OR of the two children a cycle later, both down outputs copy
// the parent input a cycle later, and collision marks cycles where the same
// lane was lit on both children.
module tb_y_coupler_splitter;
  localparam int unsigned W = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] up_a, up_b, up_o, dn_i, dn_a, dn_b;
  logic collision;
  logic [W-1:0] exp_up, exp_dn;
  logic exp_coll;
  int checks = 0, failures = 0, coll_seen = 0;

  y_coupler_splitter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    up_a = '0; up_b = '0; dn_i = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      // mostly one child at a time, sometimes both, sometimes none
      case ($urandom_range(3))
        0: begin up_a = W'($urandom); up_b = '0; end
        1: begin up_a = '0; up_b = W'($urandom); end
        2: begin up_a = '0; up_b = '0; end
        default: begin up_a = W'($urandom) | 1; up_b = W'($urandom) | 1; end
      endcase
      dn_i     = W'($urandom);
      exp_up   = up_a | up_b;
      exp_dn   = dn_i;
      exp_coll = ((up_a & up_b) != 0);
      @(negedge clk);
      checks += 4;
      if (up_o !== exp_up) begin failures++; $display("up_o %h exp %h", up_o, exp_up); end
      if (dn_a !== exp_dn) begin failures++; $display("dn_a %h exp %h", dn_a, exp_dn); end
      if (dn_b !== exp_dn) begin failures++; $display("dn_b %h exp %h", dn_b, exp_dn); end
      if (collision !== exp_coll) begin failures++; $display("collision %b exp %b", collision, exp_coll); end
      if (exp_coll) coll_seen++;
    end
    checks++;
    if (coll_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
