// zerotree_coder: zerotree coding of the AC wavelet coefficients of an
// embedded still-texture coder, using tree-depth scanning and multiple
// (successive) power-of-two quantization.
//
// The coefficients of one wavelet tree (a root in the coarsest AC band and
// all its descendants, up to LEVELS levels) arrive in tree-depth order and
// are written to the on-chip tree memory, which holds exactly one tree. For
// each SNR layer the tree is then processed twice:
//   SA  bottom-up: quantize the residual with step 2**shift[layer], decide
//       ZTR / IZ / VAL / VZTR and write residual, value and symbol back;
//       significance is passed to the parent and ZTR_D candidacy to the
//       children through one flag register per node, not through the memory;
//   SG  top-down: read each node again and output its symbol, ZTR_D where
//       the node's flag is set, in tree-depth order to the arithmetic coder.
// The residual left by a layer is quantized by the next, finer layer.
//
// The frame-memory side is a separate address stream: after fm_start the
// scan generator requests, one per cycle, the frame-memory addresses of all
// AC coefficients of an IMG_W x IMG_H map in tree-depth order (trees in the
// order of their DC position, HL, LH then HH); the frame memory returns the
// words, in the same order, on the coefficient input.
//
// Interface: configuration is sampled at the first coefficient of a tree:
// cfg_levels (1..LEVELS, the spatial layers), cfg_layers (1..SNR) and one
// shift per layer. Coefficients enter through in_valid/in_ready; symbols
// leave through out_valid/out_ready as sym_out_t records carrying symbol,
// quantized value, level, layer and end-of-layer / end-of-tree marks. The
// memory is a two-port SRAM; its read port is switched between SA and SG by
// the controller, its write port between the load and SA write-back.
//
// Timing: one node per clock in every pass; a tree of N nodes with L layers
// takes 1 + N + L*(2N+4) cycles without stalls (2400 for N = 341, L = 3).
// The architecture, the memory organisation and the symbol registration
// follow the published design; widths, handshakes and the pass-boundary
// cycles are this design's choices.
module zerotree_coder
  import zt_pkg::*;
#(
  parameter int unsigned LEVELS = MAX_LEVELS,
  parameter int unsigned SNR    = MAX_SNR,
  parameter int unsigned IMG_W  = 704,
  parameter int unsigned IMG_H  = 576,
  localparam int unsigned DEPTH = ((4 ** LEVELS) - 1) / 3,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned FAW   = $clog2(IMG_W * IMG_H)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // frame-memory read requests in tree-depth order (AC coefficients only)
  input  logic                        fm_start,
  output logic                        fm_busy,
  output logic                        fm_req_valid,
  input  logic                        fm_req_ready,
  output logic [FAW-1:0]              fm_req_addr,
  output logic                        fm_req_tree_last,
  output logic                        fm_req_frame_last,
  input  logic [LVL_W-1:0]            cfg_levels,
  input  logic [NSNR_W-1:0]           cfg_layers,
  input  logic [SNR-1:0][SHIFT_W-1:0] cfg_shift,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic signed [COEF_W-1:0]    in_coef,
  output logic                        out_valid,
  input  logic                        out_ready,
  output sym_out_t                    out_data,
  output mode_e                       mode,
  output logic                        tree_done
);

  // frame-memory address generation
  logic fm_dc, fm_tree_first;
  logic [$clog2(IMG_H)-1:0] fm_row;
  logic [$clog2(IMG_W)-1:0] fm_col;

  tds_scan_addr #(.IMG_W(IMG_W), .IMG_H(IMG_H), .LEVELS(LEVELS)) u_scan (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (fm_start),
    .levels    (cfg_levels),
    .with_dc   (1'b0),
    .busy      (fm_busy),
    .valid     (fm_req_valid),
    .ready     (fm_req_ready),
    .addr      (fm_req_addr),
    .row       (fm_row),
    .col       (fm_col),
    .dc        (fm_dc),
    .tree_first(fm_tree_first),
    .tree_last (fm_req_tree_last),
    .frame_last(fm_req_frame_last)
  );

  // controller
  logic                  ld_we, rd_en, sa_issue, sg_issue, sg_can_issue, flags_clr;
  logic [AW-1:0]         ld_waddr, a_idx, a_par, a_chld;
  logic [LVL_W-1:0]      a_lvl;
  logic                  a_leaf, a_root, a_last, last_layer;
  logic [SHIFT_W-1:0]    shift;
  logic [LAY_W-1:0]      layer;

  zt_ctrl #(.LEVELS(LEVELS), .SNR(SNR)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .cfg_levels  (cfg_levels),
    .cfg_layers  (cfg_layers),
    .cfg_shift   (cfg_shift),
    .in_valid    (in_valid),
    .in_ready    (in_ready),
    .ld_we       (ld_we),
    .ld_waddr    (ld_waddr),
    .rd_en       (rd_en),
    .addr_idx    (a_idx),
    .addr_level  (a_lvl),
    .addr_leaf   (a_leaf),
    .addr_root   (a_root),
    .addr_parent (a_par),
    .addr_child  (a_chld),
    .addr_last   (a_last),
    .mode        (mode),
    .sa_issue    (sa_issue),
    .sg_issue    (sg_issue),
    .sg_can_issue(sg_can_issue),
    .flags_clr   (flags_clr),
    .shift       (shift),
    .layer       (layer),
    .last_layer  (last_layer),
    .tree_done   (tree_done)
  );

  // tree memory with its port switches
  tree_word_t    rdata, sa_wdata, ld_wdata, wdata;
  logic          sa_we, we;
  logic [AW-1:0] sa_waddr, waddr;

  assign ld_wdata.res = in_coef;
  assign ld_wdata.qv  = '0;
  assign ld_wdata.sym = SA_ZTR;
  assign we    = ld_we || sa_we;
  assign waddr = ld_we ? ld_waddr : sa_waddr;
  assign wdata = ld_we ? ld_wdata : sa_wdata;

  tree_mem #(.DEPTH(DEPTH), .WIDTH($bits(tree_word_t))) u_mem (
    .clk  (clk),
    .we   (we),
    .waddr(waddr),
    .wdata(wdata),
    .re   (rd_en),
    .raddr(a_idx),
    .rdata(rdata)
  );

  // flag registers, read by SA (during SA passes) or SG
  logic          f_upd, f_par_set, f_chld_wr, f_chld_val, f_rd;
  logic [AW-1:0] f_par, f_chld, f_sa_rd, f_sg_rd, f_rd_idx;
  logic          sa_phase;

  assign sa_phase = (mode == M_SA) || (mode == M_SA_DRAIN);
  assign f_rd_idx = sa_phase ? f_sa_rd : f_sg_rd;

  ztrd_flags #(.DEPTH(DEPTH)) u_flags (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr_all  (flags_clr),
    .upd      (f_upd),
    .self_idx (sa_waddr),
    .par_set  (f_par_set),
    .par_idx  (f_par),
    .chld_wr  (f_chld_wr),
    .chld_base(f_chld),
    .chld_val (f_chld_val),
    .rd_idx   (f_rd_idx),
    .rd_flag  (f_rd)
  );

  // SA stage: quantizer and symbol assignment
  sa_sym_e sa_sym;

  symbol_assign #(.LEVELS(LEVELS)) u_sa (
    .clk           (clk),
    .rst_n         (rst_n),
    .issue         (sa_issue),
    .idx           (a_idx),
    .is_leaf       (a_leaf),
    .is_root       (a_root),
    .parent_idx    (a_par),
    .child_base    (a_chld),
    .shift         (shift),
    .rdata         (rdata),
    .flag_rd_idx   (f_sa_rd),
    .desc_sig      (f_rd),
    .mem_we        (sa_we),
    .mem_waddr     (sa_waddr),
    .mem_wdata     (sa_wdata),
    .flag_upd      (f_upd),
    .flag_par_set  (f_par_set),
    .flag_par_idx  (f_par),
    .flag_chld_wr  (f_chld_wr),
    .flag_chld_base(f_chld),
    .flag_chld_val (f_chld_val),
    .sym           (sa_sym)
  );

  // SG stage
  logic sg_idle;

  symbol_gen #(.LEVELS(LEVELS)) u_sg (
    .clk        (clk),
    .rst_n      (rst_n),
    .issue      (sg_issue),
    .idx        (a_idx),
    .level      (a_lvl),
    .layer      (layer),
    .layer_last (a_last),
    .tree_last  (a_last && last_layer),
    .can_issue  (sg_can_issue),
    .idle       (sg_idle),
    .rdata      (rdata),
    .flag_rd_idx(f_sg_rd),
    .ztrd_flag  (f_rd),
    .out_valid  (out_valid),
    .out_ready  (out_ready),
    .out_data   (out_data)
  );

  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n) !(ld_we && sa_we));

  logic unused;
  assign unused = ^{sa_sym, sg_idle, fm_dc, fm_tree_first, fm_row, fm_col};

endmodule
