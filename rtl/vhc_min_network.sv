// vhc_min_network -- shared, unfolded self-message-excluded minimum network.
//
// For each input r, excl_min[r] is the minimum of mag[i] over all i != r,
// the magnitude part of the min-sum check node update. Instead of N_IN
// independent trees the network is built from 2-input Min cells
// (vhc_min_cell) whose intermediate minima are shared between outputs. The
// list of cells is produced at elaboration time by vhc_pkg::vhc_build(): node
// k (k >= N_IN) is Min(node A, node B) of two earlier nodes, and each output
// reads the node of its row. Every output is reached through exactly
// ceil(log2(N_IN-1)) Min levels, the minimum possible; for the seven-input
// default this takes 18 Min cells instead of 35.
//
// NUM_CMP and DEPTH expose the cell count and level count of the generated
// network. The block is purely combinational.
module vhc_min_network #(
  parameter int unsigned N_IN = vhc_pkg::N_IN_DEFAULT,
  parameter int unsigned W    = vhc_pkg::W_DEFAULT
) (
  input  logic [W-1:0] mag      [N_IN],
  output logic [W-1:0] excl_min [N_IN]
);

  import vhc_pkg::*;

  localparam vhc_net_t NET       = vhc_build(int'(N_IN));
  localparam int       NUM_NODES = int'(NET.num_nodes);
  localparam int       NUM_CMP   = NUM_NODES - int'(N_IN);
  localparam int       DEPTH     = int'(NET.depth);

  initial begin
    assert (N_IN >= 3 && N_IN <= MAX_N)
      else $error("vhc_min_network: N_IN must lie in 3..%0d", MAX_N);
    assert (NUM_NODES <= int'(MAX_NODES))
      else $error("vhc_min_network: more than MAX_NODES nodes");
    // the network must reach the fastest possible depth and save cells
    assert (DEPTH == int'(clog2_u(N_IN - 1)))
      else $error("vhc_min_network: depth %0d is not ceil(log2(N_IN-1))", DEPTH);
    assert (NUM_CMP <= int'(direct_cmp_count(N_IN)))
      else $error("vhc_min_network: %0d cells exceed the unshared count", NUM_CMP);
  end

  // node values: inputs first, then one entry per Min cell
  logic [W-1:0] node [NUM_NODES];

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    assign node[i] = mag[i];
  end

  for (genvar k = N_IN; k < NUM_NODES; k++) begin : g_cell
    localparam int A = int'(NET.a[k]);
    localparam int B = int'(NET.b[k]);
    vhc_min_cell #(.W(W)) u_min (
      .a (node[A]),
      .b (node[B]),
      .y (node[k])
    );
  end

  for (genvar r = 0; r < N_IN; r++) begin : g_out
    localparam int ROW = int'(NET.row[r]);
    assign excl_min[r] = node[ROW];
  end

endmodule
