// tb_vga_raster -- self-checking test of the VGA timing and pixel multiplexer.
//
// Around the raster the test models the column memory (one clock after the
// screen position: row, tall-wall top, wall top, sky byte) and the texture
// generator (two clocks after: texel colour, side, ray, texture numbers),
// each a fixed function of the pixel. Checked over two full frames at the
// default 640 x 480 timing:
//   - hsync period 800 clocks with 96 low; vsync period 525 lines with 2 low
//   - 640 active pixels per line, 480 active lines per frame, the first
//     active pixel 144 clocks after hsync falls
//   - vblank low exactly during the 480 active lines
//   - every active pixel's RGB equals the expected sky grey, half-bright
//     texel or texel; sky, shaded and plain pixels must all occur
module tb_vga_raster;
  logic clk = 0, rst_n = 0;
  always #20 clk = ~clk;

  logic [9:0] cur_col, cur_row, mem_row;
  logic vblank;
  logic [8:0] row_start, row_mid;
  logic [7:0] sky_pixel;
  logic [23:0] tex_color;
  logic is_side, bool_in;
  logic [3:0] tex_num, tex_num2;
  logic hs, vs, blank_n, sync_n;
  logic [9:0] r, g, b;

  vga_raster dut (.clk, .rst_n, .cur_col, .cur_row, .vblank, .mem_row, .row_start, .row_mid,
                  .sky_pixel, .tex_color, .is_side, .bool_in, .tex_num, .tex_num2,
                  .vga_hs(hs), .vga_vs(vs), .vga_blank_n(blank_n), .vga_sync_n(sync_n),
                  .vga_r(r), .vga_g(g), .vga_b(b));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic int f_start(int x); return x % 300; endfunction
  function automatic int f_mid(int x);   return (x * 7) % 480; endfunction
  function automatic logic [23:0] f_col(int x, int y); return 24'((x * 2654435761) ^ (y * 40503)); endfunction
  function automatic bit f_side(int x, int y); return ((x ^ y) >> 2) & 1; endfunction
  function automatic bit f_bool(int x, int y); return (x + y) % 3 == 0; endfunction
  function automatic logic [3:0] f_tn(int x);  return 4'((x >> 3) % 6); endfunction
  function automatic logic [3:0] f_tn2(int y); return 4'((y >> 3) % 6); endfunction
  function automatic logic [7:0] f_sky(int x, int y); return 8'(x + 3 * y); endfunction

  // models of the memory and texture stages
  logic [9:0] c1, r1;
  always @(posedge clk) begin
    c1 <= cur_col; r1 <= cur_row;
    mem_row   <= cur_row;
    row_start <= 9'(f_start(int'(cur_col)));
    row_mid   <= 9'(f_mid(int'(cur_col)));
    sky_pixel <= f_sky(int'(cur_col), int'(cur_row));
    tex_color <= f_col(int'(c1), int'(r1));
    is_side   <= f_side(int'(c1), int'(r1));
    bool_in   <= f_bool(int'(c1), int'(r1));
    tex_num   <= f_tn(int'(c1));
    tex_num2  <= f_tn2(int'(r1));
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_sky = 0, n_shade = 0, n_plain = 0;
  int hs_fall = -1, hs_low = 0, line_act = 0, lines_act = 0, n_lines = 0;
  int vs_fall_line = -1, vs_low_lines = 0, pix = 0, frames = 0;
  logic hs_q = 0, vs_q = 0, blank_q = 0;
  int first_act_off = -1;

  always @(negedge clk) if (rst_n && cyc > 10) begin
    // horizontal
    if (!hs && hs_q) begin
      if (hs_fall >= 0) check(cyc - hs_fall == 800, $sformatf("hsync period %0d", cyc - hs_fall));
      if (hs_fall >= 0 && line_act != 0) check(line_act == 640, $sformatf("active pixels %0d", line_act));
      if (line_act != 0) lines_act++;
      line_act = 0;
      hs_fall = cyc;
      n_lines++;
      if (!vs) vs_low_lines++;
    end
    if (!vs && vs_q) begin
      if (vs_fall_line >= 0) begin
        check(n_lines - vs_fall_line == 525, $sformatf("vsync period %0d lines", n_lines - vs_fall_line));
        check(lines_act == 480, $sformatf("active lines %0d", lines_act));
        check(vs_low_lines == 2, $sformatf("vsync low %0d lines", vs_low_lines));
        check(pix == 640 * 480, "pixels per frame");
        frames++;
      end
      vs_fall_line = n_lines;
      lines_act = 0; vs_low_lines = 0; pix = 0;
    end
    if (hs && !hs_q && hs_fall >= 0) check(cyc - hs_fall == 96, "hsync width");
    if (blank_n && !blank_q && hs_fall >= 0) begin
      if (first_act_off < 0) first_act_off = cyc - hs_fall;
      check(cyc - hs_fall == 144, $sformatf("active starts %0d after hsync", cyc - hs_fall));
    end
    if (blank_n) begin
      int x, y;
      logic [9:0] er, eg, eb;
      logic [23:0] c;
      x = pix % 640; y = pix / 640;
      c = f_col(x, y);
      if ((y <= f_start(x) && y <= f_mid(x)) || (f_bool(x, y) && f_tn(x) == 4) ||
          (!f_bool(x, y) && f_tn2(y) == 4)) begin
        er = {f_sky(x, y), 2'b0}; eg = er; eb = er; n_sky++;
      end else if (f_side(x, y)) begin
        er = {1'b0, c[23:16], 1'b0}; eg = {1'b0, c[15:8], 1'b0}; eb = {1'b0, c[7:0], 1'b0}; n_shade++;
      end else begin
        er = {c[23:16], 2'b0}; eg = {c[15:8], 2'b0}; eb = {c[7:0], 2'b0}; n_plain++;
      end
      if (vs_fall_line >= 0) check({r, g, b} == {er, eg, eb}, $sformatf("pixel %0d,%0d", x, y));
      line_act++;
      pix++;
    end else if (vs_fall_line >= 0) check({r, g, b} == 0, "black outside the active area");
    hs_q = hs; vs_q = vs; blank_q = blank_n;
  end

  // vblank versus the rows handed to the memory
  always @(posedge clk) if (rst_n && cur_row != 0) check(!vblank, "vblank low in active lines");

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (frames == 2);
    check(sync_n == 1'b0, "composite sync unused");
    check(n_sky > 0 && n_shade > 0 && n_plain > 0,
          $sformatf("coverage sky=%0d shade=%0d plain=%0d", n_sky, n_shade, n_plain));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
