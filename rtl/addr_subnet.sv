// addr_subnet: the SYMNET address subnetwork, a binary tree of bidirectional
// Y-coupler/splitter nodes with the loop-back at the root.
//
// Every processor drives its lane bundle up into a leaf coupler.  Requests
// climb log2(N_PROC) coupler levels to the root, where they are turned round
// (through the semiconductor optical amplifier array, which has no logic
// function and is a plain connection here) and descend log2(N_PROC) splitter
// levels, so that the same bundle reaches every processor in the same cycle.
// Because each processor inserts only in its own token slot, several requests
// are in flight at once, one per tree stage, without colliding.  The document
// groups two to four processors per board (level k=0) and joins boards at
// higher levels; a binary tree covers those groupings, since a four-port board
// is two coupler levels.
//
// Timing: a bundle driven on tx[i] in cycle t appears on every rx[j] and on
// rx_mem in cycle t + 2*log2(N_PROC) (the "twice the logarithm of the number
// of processors" stage count of the document).  The memory module only
// listens on the address network (it never sends a request or a snoop
// response), so it is attached as one more split of the last leaf's down link
// instead of occupying a transmitting leaf; this is this design's choice.
// collision goes high if any coupler ever saw the same lane lit on both
// children in one cycle.
// N_PROC must be a power of two.
module addr_subnet #(
  parameter int unsigned N_PROC = 32,
  parameter int unsigned W      = symnet_pkg::LINK_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] tx     [N_PROC],
  output logic [W-1:0] rx     [N_PROC],
  output logic [W-1:0] rx_mem,
  output logic         collision
);

  if ((N_PROC < 2) || ((N_PROC & (N_PROC - 1)) != 0)) begin : g_bad_size
    $error("addr_subnet: N_PROC must be a power of two of at least 2");
  end

  // Heap numbering: node k (1..N_PROC-1) has children 2k and 2k+1; link
  // index N_PROC+i is the leaf link of processor i.  Index 0 is unused.
  logic [W-1:0]      up   [2*N_PROC];
  logic [W-1:0]      dn   [2*N_PROC];
  logic [N_PROC-1:0] coll;

  assign up[0]   = '0;
  assign coll[0] = 1'b0;

  for (genvar i = 0; i < N_PROC; i++) begin : g_leaf
    assign up[N_PROC+i] = tx[i];
    assign rx[i]        = dn[N_PROC+i];
  end

  // Root turn-round: the top coupler output feeds the top splitter input.
  assign dn[0] = '0;
  assign dn[1] = up[1];

  for (genvar k = 1; k < N_PROC; k++) begin : g_node
    y_coupler_splitter #(.W(W)) u_node (
      .clk      (clk),
      .rst_n    (rst_n),
      .up_a     (up[2*k]),
      .up_b     (up[2*k+1]),
      .up_o     (up[k]),
      .dn_i     (dn[k]),
      .dn_a     (dn[2*k]),
      .dn_b     (dn[2*k+1]),
      .collision(coll[k])
    );
  end

  assign rx_mem = dn[2*N_PROC-1];

  logic coll_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) coll_q <= 1'b0;
    else if (|coll) coll_q <= 1'b1;
  end
  assign collision = coll_q;

endmodule
