// tex_gen -- texture generator: turns the current screen row and the column's
// parameters into the address of the texel to draw.
//
// Two combinational paths run side by side and a multiplexer picks one:
//   Wall   texel row = ((2*row + L - 480) * (distance/960)) >> 16, using the
//          parameters of the first wall (rows at or below its top, or always
//          when the first wall is itself tall) or of the tall wall behind it
//          (rows above the first wall's top). Address = {texture, row, col}.
//   Floor  (rows below the wall bottom + 1) the floor point is interpolated
//          between the player and the floor point under the wall with weight
//          w = dist(row) / wall distance, where dist(row) = 240/(row-240) comes
//          from a 240-entry table (4.12 fixed point, kept to 16 bits) and is
//          multiplied by 1/wall distance (12 fraction bits):
//             f = w*floor + (1-w)*player   (three 12x18 multiplies per axis
//          chain: the design's critical path). The texel is the fraction of f
//          in 64ths; floor cells alternate between textures 0 and 3 in a
//          checkerboard.
// The address and the pixel attributes (shade side, which ray, texture numbers)
// are registered on the pixel clock: they are valid one clock after `row` and
// the column word.
//
// Follows the design in all formulas and in the wall/floor selection. Own
// choice: rows whose table index falls outside the table use its last entry.
module tex_gen
  import cudoom_pkg::*;
(
  input  logic       clk,
  input  logic [9:0] row,
  input  col_word_t  col,
  output tex_addr_t  tex_addr_out,
  output logic       side_out,      // shade this pixel (x face)
  output logic       bool_out,      // pixel belongs to the first-wall ray
  output logic [3:0] tex_num_out,
  output logic [3:0] tex_num2_out
);
  // dist(k) = 240*4096/(240-k), k = 480 - row, kept to 16 bits
  typedef logic [15:0] dist_table_t [240];

  function automatic dist_table_t make_dist_table();
    dist_table_t t;
    for (int k = 0; k < 240; k++) t[k] = 16'((240 * 4096) / (240 - k));
    return t;
  endfunction

  localparam dist_table_t DIVTABLE = make_dist_table();

  // ------------------------------------------------------------ wall path
  logic [17:0] ma0, ma1;
  logic [35:0] mr0, mr1;
  logic [5:0]  tex_y0, tex_y1;

  always_comb begin
    ma0 = 18'({8'd0, row, 1'b0}) + col.line_minus_h;
    ma1 = 18'({8'd0, row, 1'b0}) + col.line_minus_h2;
    mr0 = ma0 * col.inv_line;
    mr1 = ma1 * col.inv_line2;
    tex_y0 = mr0[21:16];
    tex_y1 = mr1[21:16];
  end

  // ----------------------------------------------------------- floor path
  logic [8:0]  y;
  logic [8:0]  k;
  logic [15:0] cur_dist;
  logic [27:0] weight;
  logic [11:0] w;
  logic [12:0] wc;
  logic [30:0] fx, fy;
  logic [5:0]  ftx, fty;
  logic        tile_odd;

  always_comb begin
    y        = row[8:0];
    k        = 9'(10'd480 - {1'b0, y});
    cur_dist = DIVTABLE[(k > 9'd239) ? 8'd239 : k[7:0]];
    weight   = 28'(cur_dist * col.inv_dist);
    w        = weight[23:12];
    wc       = 13'h1000 - {1'b0, w};
    fx       = 31'(w * col.floor_x) + 31'(wc * col.pos_x);
    fy       = 31'(w * col.floor_y) + 31'(wc * col.pos_y);
    ftx      = fx[23:18];
    fty      = fy[23:18];
    tile_odd  = fx[24] ^ fy[24];       // lsb of the sum of the cell numbers
  end

  // ------------------------------------------------------------ selection
  tex_addr_t  addr_n;
  logic       side_n, bool_n;
  logic [3:0] tn_n, tn2_n;

  always_comb begin
    if ({1'b0, y} <= {1'b0, col.draw_end} + 10'd1) begin
      if (col.first_is_tall || (y >= col.draw_mid)) begin
        bool_n = 1'b1;
        addr_n = '{tex: col.tex_num[1:0], y: tex_y0, x: col.tex_x};
        side_n = col.is_side;
      end else begin
        bool_n = 1'b0;
        addr_n = '{tex: col.tex_num2[1:0], y: tex_y1, x: col.tex_x2};
        side_n = col.is_side2;
      end
      tn_n  = col.tex_num;
      tn2_n = col.tex_num2;
    end else begin
      addr_n = '{tex: tile_odd ? 2'b11 : 2'b00, y: fty, x: ftx};
      tn_n   = '0;
      tn2_n  = '0;
      side_n = 1'b1;
      bool_n = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    tex_addr_out <= addr_n;
    side_out     <= side_n;
    bool_out     <= bool_n;
    tex_num_out  <= tn_n;
    tex_num2_out <= tn2_n;
  end
endmodule
