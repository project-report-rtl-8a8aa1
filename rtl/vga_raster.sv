// vga_raster -- 640 x 480 @ 60 Hz VGA timing, screen position iterators and the
// final pixel multiplexer.
//
// Horizontal and vertical counters run over 800 x 525 pixel clocks (25 MHz):
// sync 96 / back porch 48 / active 640 / front porch 16 pixels, and sync 2 /
// back porch 33 / active 480 / front porch 10 lines. From them the raster
// gives the column and row being drawn (`cur_col`, `cur_row`, 0 outside the
// active area) to the column memory, the sky generator and, through the
// memory, the texture generator, and gives the vertical blank (`vblank`) to
// the Ray FSM, which swaps frame buffers in it.
//
// The pixel pipeline (counter value at clock t):
//   t+1  cur_col / cur_row registered
//   t+2  column word from the column memory (`row_start`, `row_mid`, `mem_row`)
//        and the sky byte from the asynchronous SRAM (`sky_pixel`)
//   t+3  texture address registered in the texture generator, texel from
//        the asynchronous texture ROM (`tex_color` and attributes); sky byte
//        and the sky/wall decision registered here
//   t+4  RGB output registered, with sync and blank delayed to match
// A pixel shows the sky when its row is at or above both the tall-wall top and
// the normal-wall top, or when the wall it belongs to is a fake (sky) wall,
// texture number 4. Otherwise it shows the texel, at half brightness on x
// faces. 8-bit channels become the 10-bit DAC inputs by appending two zeros;
// the sky byte is a grey level used for all three channels. Outside the
// active area RGB is 0.
//
// Follows the design in timing constants, iterators and the multiplexer. Own
// choices: sync and blank are decoded from the counters and delayed to line
// up with the pixel pipeline; the row starts at 0 on the first active line;
// `vga_blank_n` is the active-video flag expected by the DAC.
module vga_raster #(
  parameter int unsigned HTOTAL       = 800,
  parameter int unsigned HSYNC        = 96,
  parameter int unsigned HBACK_PORCH  = 48,
  parameter int unsigned HACTIVE      = 640,
  parameter int unsigned VTOTAL       = 525,
  parameter int unsigned VSYNC        = 2,
  parameter int unsigned VBACK_PORCH  = 33,
  parameter int unsigned VACTIVE      = 480
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [9:0]  cur_col,
  output logic [9:0]  cur_row,
  output logic        vblank,
  // stage t+2
  input  logic [9:0]  mem_row,
  input  logic [8:0]  row_start,
  input  logic [8:0]  row_mid,
  input  logic [7:0]  sky_pixel,
  // stage t+3
  input  logic [23:0] tex_color,
  input  logic        is_side,
  input  logic        bool_in,
  input  logic [3:0]  tex_num,
  input  logic [3:0]  tex_num2,
  // monitor
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b
);
  localparam int unsigned HSTART = HSYNC + HBACK_PORCH;
  localparam int unsigned VSTART = VSYNC + VBACK_PORCH;

  logic [9:0] hcount, vcount;
  wire end_of_line  = (32'(hcount) == HTOTAL - 1);
  wire end_of_field = (32'(vcount) == VTOTAL - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hcount <= '0;
      vcount <= '0;
    end else if (end_of_line) begin
      hcount <= '0;
      vcount <= end_of_field ? '0 : vcount + 10'd1;
    end else begin
      hcount <= hcount + 10'd1;
    end
  end

  wire h_act = (32'(hcount) >= HSTART) && (32'(hcount) < HSTART + HACTIVE);
  wire v_act = (32'(vcount) >= VSTART) && (32'(vcount) < VSTART + VACTIVE);
  wire hs0   = (32'(hcount) < HSYNC);
  wire vs0   = (32'(vcount) < VSYNC);

  // stage pipes for sync and active video: index 0 is t+1, 3 is t+4
  logic [3:0] act_d, hs_d, vs_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_col <= '0; cur_row <= '0; vblank <= 1'b1;
      act_d <= '0; hs_d <= '0; vs_d <= '0;
    end else begin
      cur_col <= h_act ? 10'(32'(hcount) - HSTART) : '0;
      cur_row <= v_act ? 10'(32'(vcount) - VSTART) : '0;
      vblank  <= !v_act;
      act_d   <= {act_d[2:0], h_act && v_act};
      hs_d    <= {hs_d[2:0], hs0};
      vs_d    <= {vs_d[2:0], vs0};
    end
  end

  // t+2 -> t+3: sky byte and sky region decision
  logic [7:0] sky_q;
  logic       in_sky;
  always_ff @(posedge clk) begin
    sky_q  <= sky_pixel;
    in_sky <= (mem_row[8:0] <= row_start) && (mem_row[8:0] <= row_mid);
  end

  // t+3: colour multiplexer
  logic [9:0] r_n, g_n, b_n;
  always_comb begin
    logic [9:0] rt, gt, bt;
    rt = {tex_color[23:16], 2'b00};
    gt = {tex_color[15:8],  2'b00};
    bt = {tex_color[7:0],   2'b00};
    if (in_sky || (bool_in && tex_num == 4'd4) || (!bool_in && tex_num2 == 4'd4)) begin
      r_n = {sky_q, 2'b00}; g_n = {sky_q, 2'b00}; b_n = {sky_q, 2'b00};
    end else if (is_side) begin
      r_n = rt >> 1; g_n = gt >> 1; b_n = bt >> 1;
    end else begin
      r_n = rt; g_n = gt; b_n = bt;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vga_r <= '0; vga_g <= '0; vga_b <= '0;
    end else if (act_d[2]) begin
      vga_r <= r_n; vga_g <= g_n; vga_b <= b_n;
    end else begin
      vga_r <= '0; vga_g <= '0; vga_b <= '0;
    end
  end

  assign vga_hs      = ~hs_d[3];
  assign vga_vs      = ~vs_d[3];
  assign vga_blank_n = act_d[3];
  assign vga_sync_n  = 1'b0;
endmodule
