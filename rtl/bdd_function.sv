// bdd_function: the function component of the instance-specific engine.
//
// It evaluates one fixed Boolean function f(x), given as a reduced ordered BDD,
// in a single combinational pass. Every BDD node becomes a 2:1 multiplexer whose
// select is the node's input variable and whose data inputs are the outputs of
// its two children; the root's multiplexer is f. The circuit therefore grows
// with the number of BDD nodes, which is what limits how many copies fit.
//
// Interface: x (N_VARS bits) in, f out. Purely combinational, no clock.
// The BDD is handed in as the NODES parameter (see ac_pkg::bdd_node_t): a new
// function means a new parameter set and a new circuit, which is the point of
// the instance-specific approach. The default is the 5-input parity xor5.
// Embedding each node as a multiplexer is this design's reading of "an
// embedding of the BDD"; the node table format is this design's own.
module bdd_function
  import ac_pkg::*;
#(
  parameter int unsigned N_VARS  = XOR5_VARS,
  parameter int unsigned N_NODES = XOR5_NODES,
  parameter bdd_node_t   NODES [N_NODES] = XOR5_BDD
) (
  input  logic [N_VARS-1:0] x,
  output logic              f
);

  // Elaboration-time checks of the table: ordered children, valid variables.
  for (genvar i = 0; i < N_NODES; i++) begin : g_check
    if (NODES[i].lo >= i + 2 || NODES[i].hi >= i + 2 || NODES[i].var_idx >= N_VARS)
    begin : g_bad
      $error("bdd_function: node %0d refers to a later node or a missing input", i);
    end
  end

  logic [N_NODES+1:0] node_val;

  always_comb begin
    node_val           = '0;
    node_val[BDD_ONE]  = 1'b1;
    node_val[BDD_ZERO] = 1'b0;
    for (int i = 0; i < N_NODES; i++)
      node_val[i+2] = x[NODES[i].var_idx] ? node_val[NODES[i].hi] : node_val[NODES[i].lo];
  end

  assign f = node_val[N_NODES+1];

endmodule
