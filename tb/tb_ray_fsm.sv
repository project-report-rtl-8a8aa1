// tb_ray_fsm -- self-checking test of the Ray FSM.
//
// A reference model written as plain loops over the same fixed-point numbers
// (march, back-trace, one step forward, exact integer divisions, wall
// geometry) predicts every field of the column word and the number of clocks
// from the start of a column to its FIFO write (extend steps + refine steps
// + 40). Rays are cast from several positions in many directions, so that
// they end on normal walls, tall walls and sky walls, and on both face
// orientations. Also checked: the FIFO-full stall (no write while full), the
// last column waiting for vertical blank and carrying the buffer-swap bit,
// and the ready/control handshake.
module tb_ray_fsm;
  import cudoom_pkg::*;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic control = 0, vga_blank = 0, wrfull = 0;
  logic [31:0] pos_x, pos_y, count_step;
  logic signed [31:0] dir_x, dir_y;
  logic [9:0] col_in, angle_in;
  logic ready, wrreq;
  col_word_t word;
  logic [11:0] st;

  ray_fsm dut (
    .clk, .rst_n, .control, .pos_x, .pos_y, .count_step,
    .ray_dir_x(dir_x), .ray_dir_y(dir_y), .col_addr_in(col_in), .sky_angle_in(angle_in),
    .ready, .vga_blank, .wrfull, .wrreq, .col_word(word), .state_onehot(st)
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------- reference
  logic [3:0] wmap [1024];
  initial $readmemh("rtl/world_map.hex", wmap);

  function automatic int map_cell(input bit [31:0] x, y);
    return int'(wmap[{x[26:22], y[26:22]}]);
  endfunction

  function automatic bit [31:0] udiv(input bit [31:0] n, d);
    if (d == 0) return 32'hFFFF_FFFF;
    return n / d;
  endfunction

  typedef struct { bit side; bit [5:0] tx; bit [31:0] fx, fy; } g_t;

  function automatic g_t geom(input bit [31:0] x, y, input int dx, dy);
    g_t g;
    longint cx, cy, gx, gy, ex, ey;
    bit [31:0] w;
    cx = longint'(x) & ~longint'(32'h3F_FFFF);
    cy = longint'(y) & ~longint'(32'h3F_FFFF);
    gx = dx < 0 ? cx + (1 << 22) : cx;
    gy = dy < 0 ? cy + (1 << 22) : cy;
    ex = dx < 0 ? gx - x : x - gx;
    ey = dy < 0 ? gy - y : y - gy;
    g.side = (dx != 0) && (dy != 0) && (ex < ey);
    w = g.side ? y : x;
    g.tx = w[21:16];
    if ((g.side && dx > 0) || (!g.side && dy < 0)) g.tx = 63 - g.tx;
    if (g.side) begin
      g.fx = 32'(dx > 0 ? cx : cx + (1 << 22));
      g.fy = 32'(cy + w[21:0]);
    end else begin
      g.fx = 32'(cx + w[21:0]);
      g.fy = 32'(dy > 0 ? cy : cy + (1 << 22));
    end
    return g;
  endfunction

  function automatic void model(input bit [31:0] px, py, cs, input int dx, dy,
                                input bit [9:0] col, ang, input bit last,
                                output col_word_t w, output int lat);
    bit [31:0] x1 = px, y1 = py, x2 = px, y2 = py, c1 = 0, c2 = 0, s = cs;
    int m1 = map_cell(px, py), m2 = map_cell(px, py);
    int n_ext = 0, n_ref = 0, ddx = dx, ddy = dy;
    bit [31:0] L1, IL1, ID, L2, IL2, th, ds, dm, de;
    g_t g1, g2;
    while (n_ext < 4095 && m2 < 5) begin
      if (m1 == 0) begin x1 += ddx; y1 += ddy; c1 += s; m1 = map_cell(x1, y1); end
      x2 += ddx; y2 += ddy; c2 += s; m2 = map_cell(x2, y2);
      n_ext++;
    end
    s = s >> 5; ddx = ddx >>> 5; ddy = ddy >>> 5;
    while (n_ref < 63 && !(m1 == 0 && m2 < 5)) begin
      if (m1 != 0) begin x1 -= ddx; y1 -= ddy; c1 -= s; m1 = map_cell(x1, y1); end
      if (m2 >= 5) begin x2 -= ddx; y2 -= ddy; c2 -= s; m2 = map_cell(x2, y2); end
      n_ref++;
    end
    x1 += ddx; y1 += ddy; c1 += s; m1 = map_cell(x1, y1);
    x2 += ddx; y2 += ddy; c2 += s; m2 = map_cell(x2, y2);
    L1 = udiv(480 << 22, c1);  IL1 = (c1 >> 1) / 480;  ID = udiv(1 << 24, c1 >> 10);
    L2 = udiv(480 << 22, c2);  IL2 = (c2 >> 1) / 480;
    th = (m1 >= 5) ? L1 : L2;
    ds = 240 - 2 * th - th / 2;
    dm = 240 - L1 / 2;
    de = 240 + L1 / 2;
    g1 = geom(x1, y1, dx, dy);
    g2 = geom(x2, y2, dx, dy);
    w = '0;
    w.pad_hi = '1; w.gap2 = '1;
    w.vga_blank = last;
    w.col_addr = col;
    w.tex_num2 = 4'(m2 - 5);
    w.tex_num  = 4'((m1 >= 5) ? m1 - 5 : m1 - 1);
    w.first_is_tall = (m1 >= 5);
    w.line_minus_h2 = 18'(L2 - 480);
    w.inv_line2 = 18'(IL2);
    w.draw_mid = (dm >= 480) ? 9'd0 : 9'(dm);
    w.tex_x2 = g2.tx;
    w.sky_angle = ang;
    w.inv_dist = 12'(ID);
    w.pos_y = 18'(py >> 10);
    w.pos_x = 18'(px >> 10);
    w.floor_y = 18'(g1.fy >> 10);
    w.floor_x = 18'(g1.fx >> 10);
    w.is_side = g1.side;
    w.is_side2 = g2.side;
    w.line_minus_h = 18'(L1 - 480);
    w.inv_line = 18'(IL1);
    w.draw_start = (ds >= 480) ? 9'd0 : 9'(ds);
    w.draw_end = (de >= 480) ? 9'd479 : 9'(de);
    w.tex_x = g1.tx;
    lat = n_ext + n_ref + 40;
  endfunction

  // ---------------------------------------------------------- stimulus
  int n_tall = 0, n_normal = 0, n_sky = 0, n_side = 0, n_stall = 0;

  task automatic cast(input real ax, ay, input real ang, input real fish,
                      input bit [9:0] col, input bit stall);
    col_word_t exp;
    int lat, t0, t1;
    bit last;
    last = (col == 10'd639);
    pos_x = 32'($rtoi(ax * 4194304.0));
    pos_y = 32'($rtoi(ay * 4194304.0));
    dir_x = $rtoi($cos(ang) * 4194304.0) >>> 5;
    dir_y = $rtoi($sin(ang) * 4194304.0) >>> 5;
    count_step = 32'($rtoi($cos(fish) * 4194304.0) >>> 5);
    col_in = col;
    angle_in = 10'($urandom);
    model(pos_x, pos_y, count_step, dir_x, dir_y, col, angle_in, last, exp, lat);
    @(negedge clk);
    check(ready === 1'b1, "ready before start");
    control = 1;
    @(negedge clk);
    t0 = cyc;
    check(ready === 1'b0, "ready drops after start");
    control = 0;
    if (stall) wrfull = 1;
    while (!wrreq) begin
      @(negedge clk);
      if (stall && st[3] && cyc - t0 > lat + 20) begin   // parked in WAIT_FIFO
        n_stall++;
        wrfull = 0;
      end
      if (last && st[1] && !vga_blank && cyc - t0 > lat + 10) vga_blank = 1;
      if (cyc - t0 > 20000) break;
    end
    t1 = cyc;
    if (!stall && !last) check(t1 - t0 == lat, $sformatf("latency %0d, expected %0d", t1 - t0, lat));
    if (stall) check(t1 - t0 > lat + 20, "no FIFO write while full");
    if (last) check(t1 - t0 > lat + 10, "last column waits for vertical blank");
    check(word == exp, $sformatf("column word col %0d", col));
    if (word != exp) $display("  got %h\n  exp %h", word, exp);
    @(negedge clk);
    check(wrreq == 1'b0, "wrreq lasts one clock");
    vga_blank = 0;
    if (exp.first_is_tall) n_tall++; else n_normal++;
    if (exp.tex_num2 == SKY_TEXNUM || (exp.first_is_tall && exp.tex_num == SKY_TEXNUM)) n_sky++;
    if (exp.is_side) n_side++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 40; i++)
      cast(21.5, 11.5, 6.2831853 * i / 40.0 + 0.013, 0.1 * ((i % 7) - 3), 10'(i), 0);
    for (int i = 0; i < 30; i++)
      cast(3.3 + i * 0.8, 2.7 + (i % 5) * 4.9, 0.7 * i + 0.05, 0.0, 10'(100 + i), 0);
    cast(21.5, 11.5, 0.3, 0.0, 10'd200, 1);
    cast(21.5, 11.5, 2.3, 0.0, 10'd639, 0);
    check(n_tall > 0 && n_normal > 0 && n_sky > 0 && n_side > 0 && n_stall > 0,
          $sformatf("coverage tall=%0d normal=%0d sky=%0d side=%0d stall=%0d",
                    n_tall, n_normal, n_sky, n_side, n_stall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
