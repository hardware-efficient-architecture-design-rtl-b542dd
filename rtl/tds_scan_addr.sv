// tds_scan_addr: frame-memory address generator for tree-depth scanning of
// a wavelet coefficient map of IMG_W x IMG_H with `levels` decompositions.
//
// The map is read so that all coefficients of one wavelet tree come out
// before the next tree. Optionally the DC band (IMG_H>>levels rows by
// IMG_W>>levels columns, top-left corner) is read first in raster order.
// Then, for each DC position (dr, dc) in raster order, three trees follow,
// rooted in the coarsest HL band at (dr, dc + Wdc), LH band at
// (dr + Hdc, dc) and HH band at (dr + Hdc, dc + Wdc). Inside a tree the
// nodes come level by level, the four children of a node at (r, c) being
// (2r, 2c), (2r, 2c+1), (2r+1, 2c), (2r+1, 2c+1) in this order; this is the
// breadth-first order in which the tree memory stores them. With p the
// position of a node within level l, its bits taken alternately give the
// offsets below the root: row = root_r*2^l + (odd bits of p),
// col = root_c*2^l + (even bits of p).
//
// Interface: start (while idle) samples levels and with_dc and begins a
// frame; one address per cycle is offered with valid/ready, addr = row *
// IMG_W + col, tagged with dc (DC band), tree_first / tree_last and
// frame_last. IMG_W and IMG_H must be multiples of 2^levels. The scan order
// is the published one (its 16x16, 3-level example is reproduced exactly);
// the handshake and the bit-interleaving formulation are this design's.
module tds_scan_addr
  import zt_pkg::*;
#(
  parameter int unsigned IMG_W  = 704,
  parameter int unsigned IMG_H  = 576,
  parameter int unsigned LEVELS = 5,
  localparam int unsigned AW    = $clog2(IMG_W * IMG_H),
  localparam int unsigned RW    = $clog2(IMG_H),
  localparam int unsigned CW    = $clog2(IMG_W),
  localparam int unsigned PW    = (LEVELS > 1) ? 2 * (LEVELS - 1) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LVL_W-1:0] levels,
  input  logic             with_dc,
  output logic             busy,
  output logic             valid,
  input  logic             ready,
  output logic [AW-1:0]    addr,
  output logic [RW-1:0]    row,
  output logic [CW-1:0]    col,
  output logic             dc,
  output logic             tree_first,
  output logic             tree_last,
  output logic             frame_last
);

  typedef enum logic [1:0] {BAND_HL = 2'd0, BAND_LH = 2'd1, BAND_HH = 2'd2} band_e;

  logic [LVL_W-1:0] lv_q;
  logic             in_dc;          // scanning the DC band
  logic [RW-1:0]    dr, hdc;        // DC position row, DC band height
  logic [CW-1:0]    dcc, wdc;       // DC position column, DC band width
  band_e            band;
  logic [LVL_W-1:0] l;              // level inside the tree
  logic [PW-1:0]    p;              // position inside the level

  logic [RW-1:0] root_r;
  logic [CW-1:0] root_c;
  logic [RW-1:0] off_r;
  logic [CW-1:0] off_c;
  logic [PW-1:0] p_last;

  always_comb begin
    root_r = dr  + ((band != BAND_HL) ? hdc : '0);
    root_c = dcc + ((band != BAND_LH) ? wdc : '0);
    off_r  = '0;
    off_c  = '0;
    for (int k = 0; k < int'(PW) / 2 + 1; k++) begin
      if (2 * k + 1 < int'(PW)) off_r[k] = p[2 * k + 1];
      if (2 * k     < int'(PW)) off_c[k] = p[2 * k];
    end
    p_last = PW'((1 << (2 * l)) - 1);
    if (in_dc) begin
      row = dr;
      col = dcc;
    end else begin
      row = (root_r << l) | off_r;
      col = (root_c << l) | off_c;
    end
  end

  assign addr  = AW'(row) * AW'(IMG_W) + AW'(col);
  assign valid = busy;
  assign dc    = in_dc;

  logic node_last, tree_end, dc_row_end, dc_col_end;
  assign node_last  = (l == lv_q - 1'b1) && (p == p_last);
  assign dc_col_end = (dcc == wdc - 1'b1);
  assign dc_row_end = (dr == hdc - 1'b1);
  assign tree_end   = !in_dc && node_last;
  assign tree_first = !in_dc && (l == '0);
  assign tree_last  = tree_end;
  assign frame_last = tree_end && (band == BAND_HH) && dc_col_end && dc_row_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      lv_q  <= LVL_W'(1);
      in_dc <= 1'b0;
      dr    <= '0;
      dcc   <= '0;
      hdc   <= RW'(1);
      wdc   <= CW'(1);
      band  <= BAND_HL;
      l     <= '0;
      p     <= '0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        lv_q  <= levels;
        in_dc <= with_dc;
        dr    <= '0;
        dcc   <= '0;
        hdc   <= RW'(IMG_H >> levels);
        wdc   <= CW'(IMG_W >> levels);
        band  <= BAND_HL;
        l     <= '0;
        p     <= '0;
      end
    end else if (ready) begin
      if (in_dc) begin
        if (!dc_col_end) dcc <= dcc + 1'b1;
        else begin
          dcc <= '0;
          if (!dc_row_end) dr <= dr + 1'b1;
          else begin
            dr    <= '0;
            in_dc <= 1'b0;
          end
        end
      end else if (!node_last) begin
        if (p == p_last) begin
          p <= '0;
          l <= l + 1'b1;
        end else begin
          p <= p + 1'b1;
        end
      end else begin
        p <= '0;
        l <= '0;
        if (band != BAND_HH) band <= band_e'(band + 1'b1);
        else begin
          band <= BAND_HL;
          if (!dc_col_end) dcc <= dcc + 1'b1;
          else begin
            dcc <= '0;
            if (!dc_row_end) dr <= dr + 1'b1;
            else busy <= 1'b0;
          end
        end
      end
    end
  end

  a_levels: assert property (@(posedge clk) disable iff (!rst_n)
                             (!busy && start) |-> (levels >= 1 && int'(levels) <= LEVELS));

endmodule
