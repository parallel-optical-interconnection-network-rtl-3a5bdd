// y_coupler_splitter: one bidirectional node of the address tree, a 2x1
// up-stream Y-coupler paired with a 1x2 down-stream Y-splitter.
//
// Up-stream, light from the two child links is combined onto the parent link.
// Combining optical pulses adds them, which this digital model writes as the
// bitwise OR of the two child bundles; the TDMA token guarantees that at most
// one child carries a request in any cycle and that at most one node drives
// the snoop-response lane, and the coupler flags a collision (the same lane
// lit on both children) so that a violation is visible.  Down-stream, the
// parent's light is split onto both child links.  Each direction costs one
// processor clock cycle of propagation, modelled as a register, so a tree of
// log2(N) levels gives the 2*log2(N)-cycle request latency of the document.
//
// Interface: up_a/up_b are the child inputs, up_o the parent output; dn_i is
// the parent input, dn_a/dn_b the child outputs.  All outputs are registered.
// collision is registered alongside up_o and is high for the cycle in which
// the overlapping pulses leave the coupler.
module y_coupler_splitter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] up_a,
  input  logic [W-1:0] up_b,
  output logic [W-1:0] up_o,
  input  logic [W-1:0] dn_i,
  output logic [W-1:0] dn_a,
  output logic [W-1:0] dn_b,
  output logic         collision
);

  logic [W-1:0] dn_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_o      <= '0;
      dn_q      <= '0;
      collision <= 1'b0;
    end else begin
      up_o      <= up_a | up_b;
      dn_q      <= dn_i;
      collision <= |(up_a & up_b);
    end
  end

  assign dn_a = dn_q;
  assign dn_b = dn_q;

endmodule
