// zt_ctrl: controller of the zerotree coder. It sequences, for each wavelet
// tree, the load of the tree into the on-chip tree memory and then, for each
// SNR layer, a symbol-assignment (SA) pass and a symbol-generation (SG) pass,
// and it sets the switch that gives the memory's read port to the SA or the
// SG stage.
//
// Sequence per tree (states of mode_e):
//   IDLE      wait for the first coefficient; latch levels, layers and the
//             per-layer shifts; start a top-down address sweep
//   LOAD      in_ready high; each accepted coefficient is written at the
//             next tree-depth index (residual = coefficient)
//   SA_START  clear the flag registers; start a bottom-up sweep
//   SA        one memory read per cycle for symbol_assign
//   SA_DRAIN  last write-back of the pass
//   SG_START  start a top-down sweep
//   SG        one read per cycle for symbol_gen while it has room
//   SG_DRAIN  last SG read completes; next layer (SA_START) or IDLE
// With a single tree memory the SA and SG passes of a layer run one after
// the other, so each stage is busy half of the time. A tree of N nodes and
// L layers takes 1 + N + L*(2N+4) cycles when the input and output never
// stall. The load / SA / SG order and the single tree memory follow the
// architecture; the start and drain cycles are this design's choices.
module zt_ctrl
  import zt_pkg::*;
#(
  parameter int unsigned LEVELS = 5,
  parameter int unsigned SNR    = 5,
  localparam int unsigned DEPTH = ((4 ** LEVELS) - 1) / 3,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // configuration, sampled when a tree starts
  input  logic [LVL_W-1:0]               cfg_levels,   // 1..LEVELS
  input  logic [NSNR_W-1:0]              cfg_layers,   // 1..SNR
  input  logic [SNR-1:0][SHIFT_W-1:0]    cfg_shift,    // step exponent per layer
  // coefficient input (tree-depth order)
  input  logic                           in_valid,
  output logic                           in_ready,
  // load write to the tree memory
  output logic                           ld_we,
  output logic [AW-1:0]                  ld_waddr,
  // scan addresses
  output logic                           rd_en,
  output logic [AW-1:0]                  addr_idx,
  output logic [LVL_W-1:0]               addr_level,
  output logic                           addr_leaf,
  output logic                           addr_root,
  output logic [AW-1:0]                  addr_parent,
  output logic [AW-1:0]                  addr_child,
  output logic                           addr_last,
  // stage control
  output mode_e                          mode,
  output logic                           sa_issue,
  output logic                           sg_issue,
  input  logic                           sg_can_issue,
  output logic                           flags_clr,
  output logic [SHIFT_W-1:0]             shift,
  output logic [LAY_W-1:0]               layer,
  output logic                           last_layer,
  output logic                           tree_done
);

  mode_e                        state;
  logic [LVL_W-1:0]             lv_q;
  logic [NSNR_W-1:0]            nl_q;
  logic [SNR-1:0][SHIFT_W-1:0]  sh_q;

  logic addr_start, addr_top_down, addr_step, addr_active;

  tree_addr #(.LEVELS(LEVELS)) u_addr (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (addr_start),
    .top_down  (addr_top_down),
    .levels    ((state == M_IDLE) ? cfg_levels : lv_q),
    .step      (addr_step),
    .active    (addr_active),
    .idx       (addr_idx),
    .level     (addr_level),
    .is_leaf   (addr_leaf),
    .is_root   (addr_root),
    .parent_idx(addr_parent),
    .child_base(addr_child),
    .last      (addr_last)
  );

  assign mode       = state;
  assign in_ready   = (state == M_LOAD) && addr_active;
  assign ld_we      = in_ready && in_valid;
  assign ld_waddr   = addr_idx;
  assign sa_issue   = (state == M_SA) && addr_active;
  assign sg_issue   = (state == M_SG) && addr_active && sg_can_issue;
  assign rd_en      = sa_issue || sg_issue;
  assign flags_clr  = (state == M_SA_START);
  assign shift      = sh_q[layer];
  assign last_layer = (NSNR_W'(layer) + 1'b1 == nl_q);

  always_comb begin
    addr_start    = 1'b0;
    addr_top_down = 1'b1;
    addr_step     = 1'b0;
    unique case (state)
      M_IDLE:     addr_start = in_valid;
      M_LOAD:     addr_step  = ld_we;
      M_SA_START: begin addr_start = 1'b1; addr_top_down = 1'b0; end
      M_SA:       addr_step  = sa_issue;
      M_SG_START: addr_start = 1'b1;
      M_SG:       addr_step  = sg_issue;
      default:    ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= M_IDLE;
      lv_q      <= LVL_W'(1);
      nl_q      <= NSNR_W'(1);
      sh_q      <= '0;
      layer     <= '0;
      tree_done <= 1'b0;
    end else begin
      tree_done <= 1'b0;
      unique case (state)
        M_IDLE: if (in_valid) begin
          lv_q  <= cfg_levels;
          nl_q  <= cfg_layers;
          sh_q  <= cfg_shift;
          layer <= '0;
          state <= M_LOAD;
        end
        M_LOAD:     if (ld_we && addr_last) state <= M_SA_START;
        M_SA_START: state <= M_SA;
        M_SA:       if (addr_last) state <= M_SA_DRAIN;
        M_SA_DRAIN: state <= M_SG_START;
        M_SG_START: state <= M_SG;
        M_SG:       if (sg_issue && addr_last) state <= M_SG_DRAIN;
        M_SG_DRAIN: begin
          if (last_layer) begin
            state     <= M_IDLE;
            tree_done <= 1'b1;
          end else begin
            layer <= layer + 1'b1;
            state <= M_SA_START;
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  a_cfg_levels: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == M_IDLE && in_valid) |->
                                 (cfg_levels >= 1 && int'(cfg_levels) <= LEVELS));
  a_cfg_layers: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == M_IDLE && in_valid) |->
                                 (cfg_layers >= 1 && int'(cfg_layers) <= SNR));

endmodule
