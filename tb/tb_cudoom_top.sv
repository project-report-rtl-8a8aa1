// tb_cudoom_top -- end-to-end test of the whole ray-casting display at its
// default size (640 x 480, 32 x 32 map, all parameters at their defaults).
//
// Around the top level the test provides: the two clocks (50 MHz system,
// 25 MHz pixel); a model of the board's SRAM; a processor model that loads a
// 1024 x 480 sky picture, hands the SRAM to the display and then, for each
// frame, computes the 640 ray directions and sends each column over the Ray
// FSM's slave exactly as the game software does (parameters, control 0, poll
// ready, control all-ones); a sound driver that answers every interrupt with
// a sample; and a PS/2 keyboard that presses and releases a key.
//
// An independent model (ray march, back-trace and divisions; texture
// coordinates and floor interpolation; the four procedural textures; the sky
// and shading multiplexer) predicts every pixel. Each frame shown after a
// buffer swap is captured from the VGA outputs and compared, pixel for
// pixel, with the frame the software sent before that swap. Frame 2 is sent
// while the pixel clock is held for a while, so the FIFO fills and the
// Ray FSM must stall without losing a column.
//
// Mechanisms counted (each must happen at least once): columns sent, rays
// that needed the fine back-trace, FIFO-full stalls, waits for vertical
// blank, buffer swaps, sky pixels, fake-sky-wall pixels, tall-wall pixels
// above a nearer wall, shaded (x-face) wall pixels, floor pixels of both
// checkerboard textures, sound interrupts answered, keyboard codes read.
module tb_cudoom_top;
  import cudoom_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  // ------------------------------------------------------------ clocks
  logic clk50 = 0, clk25 = 0, rst_n = 0, hold25 = 0;
  always #10 clk50 = ~clk50;
  always begin
    #20;
    if (!hold25) clk25 = ~clk25;
  end

  // ------------------------------------------------------------ DUT
  logic nif_read = 0, nif_write = 0, nif_cs = 0;
  logic [4:0] nif_address = 0;
  logic [31:0] nif_writedata = 0, nif_readdata;
  logic sky_read = 0, sky_write = 0, sky_cs = 0;
  logic [17:0] sky_address = 0;
  logic [15:0] sky_writedata = 0, sky_readdata;
  logic [1:0] sky_be = 2'b11;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ub_n, sram_lb_n, sram_we_n, sram_ce_n, sram_oe_n;
  logic snd_read = 0, snd_write = 0, snd_cs = 0, snd_irq;
  logic [7:0] snd_address = 0, snd_writedata = 0, snd_readdata;
  logic [15:0] snd_led;
  logic aud_adclrck, aud_daclrck, aud_dacdat, aud_bclk, aud_xck;
  logic kb_address = 0, kb_read = 0, kb_cs = 0;
  logic [7:0] kb_readdata;
  logic ps2_clk = 1, ps2_data = 1;
  logic vga_clk, vga_hs, vga_vs, vga_blank_n, vga_sync_n;
  logic [9:0] vga_r, vga_g, vga_b;
  logic [11:0] ray_state;
  logic [7:0] frame_rate;

  cudoom_top dut (
    .clk50, .clk25, .rst_n,
    .nif_read, .nif_write, .nif_chipselect(nif_cs), .nif_address, .nif_writedata, .nif_readdata,
    .sky_read, .sky_write, .sky_chipselect(sky_cs), .sky_address, .sky_writedata,
    .sky_byteenable(sky_be), .sky_readdata,
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .sram_ub_n, .sram_lb_n, .sram_we_n, .sram_ce_n, .sram_oe_n,
    .snd_read, .snd_write, .snd_chipselect(snd_cs), .snd_address, .snd_writedata,
    .snd_readdata, .snd_irq, .aud_adclrck, .aud_adcdat(1'b0), .aud_daclrck, .aud_dacdat,
    .aud_bclk, .aud_xck, .snd_led,
    .kb_address, .kb_read, .kb_chipselect(kb_cs), .kb_readdata, .ps2_clk, .ps2_data,
    .vga_clk, .vga_hs, .vga_vs, .vga_blank_n, .vga_sync_n, .vga_r, .vga_g, .vga_b,
    .ray_state, .frame_rate
  );

  sram_model u_sram (.clk(clk50), .addr(sram_addr), .dq_in(sram_dq_o), .dq_oe(sram_dq_oe),
                     .dq_out(sram_dq_i), .ub_n(sram_ub_n), .lb_n(sram_lb_n), .we_n(sram_we_n),
                     .ce_n(sram_ce_n), .oe_n(sram_oe_n));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------------------ reference: map
  logic [3:0] wmap [1024];
  initial $readmemh("rtl/world_map.hex", wmap);

  function automatic int map_cell(input bit [31:0] x, y);
    return int'(wmap[{x[26:22], y[26:22]}]);
  endfunction

  function automatic bit [31:0] udiv(input bit [31:0] n, d);
    if (d == 0) return 32'hFFFF_FFFF;
    return n / d;
  endfunction

  // ------------------------------------------------------------ reference: ray
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

  int n_refined = 0;

  function automatic col_word_t ray_model(input bit [31:0] px, py, cs, input int dx, dy,
                                          input bit [9:0] col, ang, input bit last);
    col_word_t w;
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
    if (n_ref > 1) n_refined++;
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
    return w;
  endfunction

  // ------------------------------------------------------------ reference: pixel
  function automatic logic [7:0] sky_pic(int r, int a);
    return 8'(((r * 3) ^ (a * 5)) + (a >> 3));
  endfunction

  function automatic logic [23:0] texel(input bit [1:0] t, input bit [5:0] y, x);
    int bx;
    logic [7:0] g, s;
    case (t)
      2'd0: begin
        bx = (x + ((y / 8) % 2) * 8) % 64;
        if (y % 8 == 0 || bx % 16 == 0) return 24'h808080;
        return {8'(8'h90 + 4 * (y % 8)), 8'h20, 8'h18};
      end
      2'd1: begin
        if (x % 32 == 0 || y % 16 == 0) return 24'h303030;
        g = 8'(8'h70 + ((x + y) % 32));
        return {g, g, g};
      end
      2'd2: begin
        if (x % 16 == 0 || y % 16 == 0) return 24'h383838;
        if (x % 16 == 1 || y % 16 == 1) return 24'h000088;
        if (x % 16 == 15 || y % 16 == 15) return 24'h000070;
        return 24'h00007c;
      end
      default: begin
        if (x % 8 == 0) return 24'h3c2810;
        s = 8'(8'h60 + 8 * (x % 8) + y / 4);
        return {8'(s + 8'h30), s, 8'h20};
      end
    endcase
  endfunction

  int n_sky = 0, n_fake_sky = 0, n_tall_px = 0, n_shaded = 0, n_floor0 = 0, n_floor3 = 0;

  function automatic logic [29:0] pixel_model(input col_word_t c, input int r);
    longint a, m, d, wt, w, fx, fy;
    int k;
    bit [5:0] ty, tx;
    bit [1:0] t;
    bit sd, bl, wall;
    logic [23:0] rgb;
    logic [7:0] sk;
    wall = (r <= int'(c.draw_end) + 1);
    if (wall) begin
      bl = c.first_is_tall || (r >= int'(c.draw_mid));
      a = (2 * r + (bl ? c.line_minus_h : c.line_minus_h2)) % (1 << 18);
      m = a * (bl ? c.inv_line : c.inv_line2);
      ty = 6'(m >> 16);
      tx = bl ? c.tex_x : c.tex_x2;
      t = bl ? c.tex_num[1:0] : c.tex_num2[1:0];
      sd = bl ? c.is_side : c.is_side2;
    end else begin
      k = 480 - r;
      if (k > 239) k = 239;
      d = ((240 * 4096) / (240 - k)) % 65536;
      wt = d * c.inv_dist;
      w = (wt >> 12) % 4096;
      fx = w * c.floor_x + (4096 - w) * c.pos_x;
      fy = w * c.floor_y + (4096 - w) * c.pos_y;
      tx = 6'(fx >> 18);
      ty = 6'(fy >> 18);
      t = (((fx >> 24) ^ (fy >> 24)) & 1) ? 2'd3 : 2'd0;
      sd = 1; bl = 0;
    end
    rgb = texel(t, ty, tx);
    sk = sky_pic(r, int'(c.sky_angle));
    if ((r <= int'(c.draw_start) && r <= int'(c.draw_mid)) ||
        (wall && bl && c.tex_num == 4) || (wall && !bl && c.tex_num2 == 4)) begin
      if (r <= int'(c.draw_start) && r <= int'(c.draw_mid)) n_sky++; else n_fake_sky++;
      return {sk, 2'b0, sk, 2'b0, sk, 2'b0};
    end
    if (!wall) begin if (t == 3) n_floor3++; else n_floor0++; end
    else begin
      if (!bl) n_tall_px++;
      if (sd) n_shaded++;
    end
    if (sd) return {1'b0, rgb[23:16], 1'b0, 1'b0, rgb[15:8], 1'b0, 1'b0, rgb[7:0], 1'b0};
    return {rgb[23:16], 2'b0, rgb[15:8], 2'b0, rgb[7:0], 2'b0};
  endfunction

  // ------------------------------------------------------------ processor model
  localparam int NFRAMES = 3;
  col_word_t frames [NFRAMES][640];
  int n_cols = 0;

  task automatic nif_wr(input int a, input logic [31:0] d);
    @(negedge clk50);
    nif_cs = 1; nif_write = 1; nif_address = 5'(a); nif_writedata = d;
    @(negedge clk50);
    nif_cs = 0; nif_write = 0;
  endtask

  task automatic nif_rd(output logic [31:0] d);
    @(negedge clk50);
    nif_cs = 1; nif_read = 1; nif_address = 0;
    @(negedge clk50);
    nif_cs = 0; nif_read = 0;
    d = nif_readdata;
  endtask

  task automatic send_frame(input int f, input real px, py, input int dir);
    for (int x = 0; x < 640; x++) begin
      int a;
      real ang, fish;
      logic [31:0] posx, posy, cs, st;
      int dx, dy;
      a = (dir + x - 320) & 4095;
      ang = 2.0 * 3.14159265358979 * a / 4096.0;
      fish = 2.0 * 3.14159265358979 * (x - 320) / 4096.0;
      posx = 32'($rtoi(px * 4194304.0));
      posy = 32'($rtoi(py * 4194304.0));
      dx = $rtoi($cos(ang) * 4194304.0) >>> 5;
      dy = $rtoi($sin(ang) * 4194304.0) >>> 5;
      cs = 32'($rtoi($cos(fish) * 4194304.0) >>> 5);
      frames[f][x] = ray_model(posx, posy, cs, dx, dy, 10'(x), 10'(a), x == 639);
      nif_wr(8, 32'(x) << 22);
      nif_wr(1, posx);
      nif_wr(2, posy);
      nif_wr(3, cs);
      nif_wr(4, 32'(dx));
      nif_wr(5, 32'(dy));
      nif_wr(6, 32'(a) & 32'h3FF);
      nif_wr(0, 0);
      do nif_rd(st); while (!st[0]);
      check(st[11:4] == frame_rate, "status word carries the frame rate");
      nif_wr(0, 32'hFFFF_FFFF);
      n_cols++;
    end
  endtask

  // ------------------------------------------------------------ counters on the DUT
  int n_stall = 0, n_vblank_wait = 0, n_fine = 0, n_toggle = 0;
  logic tog_q;
  always @(posedge clk50) if (rst_n) begin
    if (ray_state[3]) n_stall++;
    if (ray_state[1]) n_vblank_wait++;
    if (ray_state[8]) n_fine++;
  end
  always @(posedge clk25) begin
    if (rst_n && dut.rst25_n && dut.u_mem.toggle != tog_q) n_toggle++;
    tog_q <= dut.u_mem.toggle;
  end

  // ------------------------------------------------------------ VGA capture
  int pix = 0, frames_checked = 0, cur_frame = -1;
  logic vs_q = 1;
  always @(negedge clk25) if (rst_n) begin
    if (!vga_vs && vs_q) pix = 0;
    vs_q = vga_vs;
    if (vga_blank_n) begin
      int x, y;
      if (pix == 0) cur_frame = n_toggle - 1;
      x = pix % 640; y = pix / 640;
      if (cur_frame >= 0 && cur_frame < NFRAMES) begin
        logic [29:0] e;
        e = pixel_model(frames[cur_frame][x], y);
        check({vga_r, vga_g, vga_b} == e,
              $sformatf("frame %0d pixel %0d,%0d: got %h expected %h", cur_frame, x, y,
                        {vga_r, vga_g, vga_b}, e));
      end
      pix++;
      if (pix == 640 * 480 && cur_frame >= 0 && cur_frame < NFRAMES) frames_checked++;
    end
  end

  // ------------------------------------------------------------ sound driver
  int n_irq = 0;
  initial begin
    forever begin
      @(negedge clk50);
      if (snd_irq && rst_n) begin
        repeat ($urandom_range(5, 200)) @(negedge clk50);
        snd_cs = 1; snd_write = 1; snd_writedata = 8'($urandom);
        @(negedge clk50);
        snd_cs = 0; snd_write = 0;
        n_irq++;
        repeat (3) @(negedge clk50);
        check(!snd_irq, "sound interrupt cleared by the sample write");
      end
    end
  end

  // ------------------------------------------------------------ keyboard
  int n_keys = 0;
  task automatic ps2_send(input logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      repeat (100) @(negedge clk50);
      ps2_clk = 0;
      repeat (200) @(negedge clk50);
      ps2_clk = 1;
      repeat (100) @(negedge clk50);
    end
    ps2_data = 1;
    repeat (500) @(negedge clk50);
  endtask

  task automatic kb_rd(output logic [7:0] d);
    @(negedge clk50);
    kb_cs = 1; kb_read = 1; kb_address = 1;
    #1 d = kb_readdata;
    @(negedge clk50);
    kb_cs = 0; kb_read = 0;
  endtask

  initial begin
    logic [7:0] d;
    wait (rst_n);
    repeat (1000) @(negedge clk50);
    ps2_send(8'h1D);
    kb_rd(d);
    check(d == 8'h1D, $sformatf("key press code %h", d));
    n_keys++;
    ps2_send(8'hF0);
    ps2_send(8'h1D);
    kb_rd(d);
    check(d == 8'hFD, $sformatf("key release code %h", d));
    n_keys++;
  end

  // ------------------------------------------------------------ main sequence
  initial begin
    rst_n = 0;
    repeat (5) @(negedge clk50);
    rst_n = 1;
    repeat (5) @(negedge clk50);
    // sky picture: 480 rows of 512 words, two pixels per word
    for (int r = 0; r < 480; r++)
      for (int w = 0; w < 512; w++) begin
        @(negedge clk50);
        sky_cs = 1; sky_write = 1; sky_address = 18'(r * 512 + w);
        sky_writedata = {sky_pic(r, 2 * w + 1), sky_pic(r, 2 * w)};
      end
    @(negedge clk50);
    sky_address = 18'h3FFFF; sky_writedata = 16'h0001;
    @(negedge clk50);
    sky_cs = 0; sky_write = 0;
    check(dut.u_sky.sram_mux == 1'b1, "sky SRAM handed to the display");

    send_frame(0, 21.5, 11.5, 0);
    send_frame(1, 3.5, 19.5, 3840);
    // frame 2: the pixel clock is held while the first columns are sent
    fork
      send_frame(2, 11.5, 12.5, 2688);
      begin
        wait (n_cols > 1285);
        hold25 = 1;
        #2ms;                 // about 20 columns' worth of rays
        hold25 = 0;
      end
    join
    wait (frames_checked == NFRAMES);
    repeat (100) @(negedge clk50);

    check(n_cols == NFRAMES * 640, "columns sent");
    check(n_toggle >= NFRAMES, $sformatf("buffer swaps %0d", n_toggle));
    check(n_stall > 0, "FIFO-full stall");
    check(n_vblank_wait > 0, "wait for vertical blank");
    check(n_fine > 0 && n_refined > 0, "fine back-trace");
    check(n_sky > 0, "sky pixels");
    check(n_fake_sky > 0, "fake sky wall pixels");
    check(n_tall_px > 0, "tall wall above a nearer wall");
    check(n_shaded > 0, "shaded wall pixels");
    check(n_floor0 > 0 && n_floor3 > 0, "floor checkerboard");
    check(n_irq > 0, "sound interrupts");
    check(n_keys == 2, "keyboard codes");
    $display("columns=%0d swaps=%0d stall_clocks=%0d vblank_wait_clocks=%0d refine_clocks=%0d",
             n_cols, n_toggle, n_stall, n_vblank_wait, n_fine);
    $display("pixels: sky=%0d fake_sky=%0d tall=%0d shaded=%0d floor0=%0d floor3=%0d irq=%0d",
             n_sky, n_fake_sky, n_tall_px, n_shaded, n_floor0, n_floor3, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial forever begin
    #5ms;
    $display("progress: %0t columns=%0d swaps=%0d frames_checked=%0d", $time, n_cols, n_toggle, frames_checked);
    $fflush;
  end

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
