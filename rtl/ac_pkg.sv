// ac_pkg: constants and types shared by the two autocorrelation engines.
//
// The autocorrelation coefficient of a Boolean function f of n inputs is
//   B(u) = sum over v in [0, 2^n) of f(v) * f(v xor u),   u in [0, 2^n).
// Two engines compute it. The instance-specific engine embeds one function as
// a BDD turned into multiplexers and sums the terms directly. The
// parameter-specific engine reads the function as a list of disjoint cubes
// from an external SRAM and is reused for any function within its size limits.
//
// This package holds the default sizes of the parameter-specific engine (32
// cube bits, 64 coefficients in parallel, up to 2^19 cubes), the BDD node
// record used to describe an instance to the instance-specific engine, and the
// default instance, the 5-input parity function xor5.
package ac_pkg;

  // ---- parameter-specific engine defaults ----
  localparam int unsigned PS_CUBE_BITS      = 32;  // inputs per cube word
  localparam int unsigned PS_N_PAR          = 64;  // coefficients computed in parallel
  localparam int unsigned PS_MAX_CUBES_LOG2 = 19;  // up to 2^19 cubes in the list
  localparam int unsigned PS_RESULT_LOG2    = 20;  // result slots per run in SRAM

  // ---- BDD description for the instance-specific engine ----
  // Node i of a table has id i+2; ids 0 and 1 are the constant leaves.
  // A node selects its 'hi' child when input 'var_idx' is 1, else 'lo'.
  // Children must have smaller ids than their parent; the last node is the root.
  localparam int unsigned BDD_ZERO = 0;
  localparam int unsigned BDD_ONE  = 1;

  typedef struct packed {
    logic [31:0] var_idx;
    logic [31:0] lo;
    logic [31:0] hi;
  } bdd_node_t;

  // Default instance: xor5 = x0 ^ x1 ^ x2 ^ x3 ^ x4, variable order x0 (root) .. x4.
  // E_k is the parity of x_k..x_4, N_k its complement.
  localparam int unsigned XOR5_VARS  = 5;
  localparam int unsigned XOR5_NODES = 9;
  localparam bdd_node_t XOR5_BDD [XOR5_NODES] = '{
    '{var_idx: 32'd4, lo: 32'd0, hi: 32'd1},  // id 2  E4
    '{var_idx: 32'd4, lo: 32'd1, hi: 32'd0},  // id 3  N4
    '{var_idx: 32'd3, lo: 32'd2, hi: 32'd3},  // id 4  E3
    '{var_idx: 32'd3, lo: 32'd3, hi: 32'd2},  // id 5  N3
    '{var_idx: 32'd2, lo: 32'd4, hi: 32'd5},  // id 6  E2
    '{var_idx: 32'd2, lo: 32'd5, hi: 32'd4},  // id 7  N2
    '{var_idx: 32'd1, lo: 32'd6, hi: 32'd7},  // id 8  E1
    '{var_idx: 32'd1, lo: 32'd7, hi: 32'd6},  // id 9  N1
    '{var_idx: 32'd0, lo: 32'd8, hi: 32'd9}   // id 10 E0 (root)
  };

endpackage
