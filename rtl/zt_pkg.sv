// zt_pkg: types and constants shared by the zerotree coder.
//
// A wavelet tree of L levels is stored breadth-first: the root at index 0,
// its four children at 1..4, their sixteen children at 5..20 and so on, the
// four children of a node i sitting at 4*i+1 .. 4*i+4. The first index of
// level l is (4^l - 1) / 3, and a tree of L levels holds (4^L - 1) / 3
// coefficients (341 for the five levels the coder supports).
//
// The symbol set is the zerotree alphabet: ZTR (zerotree root), IZ (isolated
// zero), VAL (value), VZTR (value zerotree root) and ZTR_D (descendant of a
// ZTR or VZTR). The first four are decided by the symbol-assignment pass and
// stored with the coefficient; ZTR_D is only produced at the output, from a
// flag register. The 16-bit coefficient width is this design's choice.
package zt_pkg;

  // Largest tree depth (decomposition levels) and number of SNR layers.
  parameter int unsigned MAX_LEVELS = 5;
  parameter int unsigned MAX_SNR    = 5;
  // Width of a wavelet coefficient / residual / quantized value (two's complement).
  parameter int unsigned COEF_W     = 16;
  // Width of a power-of-two quantizer exponent (step = 2**shift).
  parameter int unsigned SHIFT_W    = 4;

  // Symbols decided by the first (bottom-up) pass; stored in the tree memory.
  typedef enum logic [1:0] {
    SA_ZTR  = 2'd0,
    SA_IZ   = 2'd1,
    SA_VAL  = 2'd2,
    SA_VZTR = 2'd3
  } sa_sym_e;

  // Symbols delivered to the arithmetic coder.
  typedef enum logic [2:0] {
    SYM_ZTR   = 3'd0,
    SYM_IZ    = 3'd1,
    SYM_VAL   = 3'd2,
    SYM_VZTR  = 3'd3,
    SYM_ZTR_D = 3'd4
  } sym_e;

  // One tree-memory word: the residual still to be coded by finer layers,
  // the quantized value of the current layer and its first-pass symbol.
  typedef struct packed {
    logic signed [COEF_W-1:0] res;
    logic signed [COEF_W-1:0] qv;
    sa_sym_e                  sym;
  } tree_word_t;

  // Widths of a level number (0..MAX_LEVELS) and of an SNR layer number.
  parameter int unsigned LVL_W = $clog2(MAX_LEVELS + 1);
  parameter int unsigned LAY_W = $clog2(MAX_SNR);
  // Width of a count of SNR layers (1..MAX_SNR).
  parameter int unsigned NSNR_W = $clog2(MAX_SNR + 1);

  // One output symbol for the arithmetic coder. value is the quantized
  // coefficient of the layer (non-zero only for VAL and VZTR); level is the
  // node's tree level (0 = coarsest AC band), which selects the spatial
  // layer; layer is the SNR layer.
  typedef struct packed {
    sym_e                     sym;
    logic signed [COEF_W-1:0] value;
    logic [LVL_W-1:0]         level;
    logic [LAY_W-1:0]         layer;
    logic                     layer_last;  // last symbol of this layer of the tree
    logic                     tree_last;   // last symbol of the tree's last layer
  } sym_out_t;

  // Controller modes; they also set the switch on the memory read port.
  typedef enum logic [2:0] {
    M_IDLE     = 3'd0,
    M_LOAD     = 3'd1,
    M_SA_START = 3'd2,
    M_SA       = 3'd3,
    M_SA_DRAIN = 3'd4,
    M_SG_START = 3'd5,
    M_SG       = 3'd6,
    M_SG_DRAIN = 3'd7
  } mode_e;

  // First index of level lvl in a breadth-first 4-ary tree.
  function automatic int unsigned level_base(int unsigned lvl);
    return ((4 ** lvl) - 1) / 3;
  endfunction

  // Number of nodes in a tree with the given number of levels.
  function automatic int unsigned tree_size(int unsigned levels);
    return ((4 ** levels) - 1) / 3;
  endfunction

endpackage
