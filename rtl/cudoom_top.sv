// cudoom_top -- ray-casting renderer for a 640 x 480, 60 Hz display, with its
// keyboard and sound peripherals.
//
// Software on a soft processor keeps the player's position and view angle and,
// for each of the 640 screen columns, hands a ray (position, direction,
// distance step, column number, sky angle) to the Ray FSM through the
// `nif_*` Avalon slave. The Ray FSM (50 MHz) marches the ray through the
// 32 x 32 map and produces a 256-bit word of column parameters, which a
// dual-clock FIFO carries into the 25 MHz display domain. There the column
// memory keeps two frames of column words: the display reads one while the
// other is filled, and the last column of a frame, written during vertical
// blank, swaps them. No frame buffer exists: for every pixel the VGA raster
// reads its column's word, the texture generator computes a texel address
// (wall or floor) and the texture ROM returns its colour, while the sky
// generator fetches the sky pixel from the external SRAM; the raster picks
// sky or texel and shades x faces.
//
// Clocks: `clk50` (processor side: Ray FSM, Avalon slaves, sound, keyboard)
// and `clk25` (pixel side: column memory, texture generator, raster), both
// from a PLL outside this module; `vga_clk` is `clk25`. `rst_n` is
// synchronous to `clk50` and is re-synchronised for the pixel domain. The
// processor, Avalon interconnect, SDRAM, flash, audio codec and SRAM chip are
// outside: their connections are the ports. The SRAM data bus is split into
// in, out and output enable. `ray_state` is the Ray FSM state for debug LEDs.
//
// Structure and connections follow the design. Own choices: two-flop
// synchronisers for the vertical blank into the 50 MHz domain and for the
// reset into the 25 MHz domain.
module cudoom_top
  import cudoom_pkg::*;
(
  input  logic        clk50,
  input  logic        clk25,
  input  logic        rst_n,
  // Ray FSM Avalon slave
  input  logic        nif_read,
  input  logic        nif_write,
  input  logic        nif_chipselect,
  input  logic [4:0]  nif_address,
  input  logic [31:0] nif_writedata,
  output logic [31:0] nif_readdata,
  // sky generator Avalon slave and SRAM pins
  input  logic        sky_read,
  input  logic        sky_write,
  input  logic        sky_chipselect,
  input  logic [17:0] sky_address,
  input  logic [15:0] sky_writedata,
  input  logic [1:0]  sky_byteenable,
  output logic [15:0] sky_readdata,
  output logic [17:0] sram_addr,
  output logic [15:0] sram_dq_o,
  output logic        sram_dq_oe,
  input  logic [15:0] sram_dq_i,
  output logic        sram_ub_n,
  output logic        sram_lb_n,
  output logic        sram_we_n,
  output logic        sram_ce_n,
  output logic        sram_oe_n,
  // sound controller Avalon slave, interrupt and codec pins
  input  logic        snd_read,
  input  logic        snd_write,
  input  logic        snd_chipselect,
  input  logic [7:0]  snd_address,
  input  logic [7:0]  snd_writedata,
  output logic [7:0]  snd_readdata,
  output logic        snd_irq,
  output logic        aud_adclrck,
  input  logic        aud_adcdat,
  output logic        aud_daclrck,
  output logic        aud_dacdat,
  output logic        aud_bclk,
  output logic        aud_xck,
  output logic [15:0] snd_led,
  // keyboard Avalon slave and PS/2 pins
  input  logic        kb_address,
  input  logic        kb_read,
  input  logic        kb_chipselect,
  output logic [7:0]  kb_readdata,
  input  logic        ps2_clk,
  input  logic        ps2_data,
  // VGA
  output logic        vga_clk,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b,
  // debug
  output logic [11:0] ray_state,
  output logic [7:0]  frame_rate
);
  // ------------------------------------------------------------ resets, CDC
  logic [1:0] rst25_sync;
  logic       rst25_n;
  always_ff @(posedge clk25) rst25_sync <= {rst25_sync[0], rst_n};
  assign rst25_n = rst25_sync[1];

  logic       vblank25;
  logic [1:0] vblank_sync;
  always_ff @(posedge clk50) vblank_sync <= {vblank_sync[0], vblank25};

  // ------------------------------------------------------------ Ray FSM side
  logic [255:0] nios_data;
  logic         ctrl, ray_ready, wrreq, wrfull;
  col_word_t    ray_word;

  nios_interface u_nif (
    .clk(clk50), .rst_n,
    .read(nif_read), .write(nif_write), .chipselect(nif_chipselect),
    .address(nif_address), .writedata(nif_writedata), .readdata(nif_readdata),
    .hardware_data({20'd0, frame_rate, 3'd0, ray_ready}),
    .ctrl, .nios_data
  );

  ray_fsm u_ray (
    .clk(clk50), .rst_n,
    .control(ctrl),
    .pos_x(nios_data[31:0]), .pos_y(nios_data[63:32]),
    .count_step(nios_data[95:64]),
    .ray_dir_x(nios_data[127:96]), .ray_dir_y(nios_data[159:128]),
    .col_addr_in(nios_data[255:246]), .sky_angle_in(nios_data[169:160]),
    .ready(ray_ready),
    .vga_blank(vblank_sync[1]),
    .wrfull, .wrreq, .col_word(ray_word),
    .state_onehot(ray_state)
  );

  framerate_calc u_fps (
    .clk(clk50), .rst_n, .wr_addr(nios_data[255:246]), .frame_rate
  );

  // ------------------------------------------------------------ clock crossing
  logic       rdempty, rdreq;
  col_word_t  fifo_q;

  column_fifo #(.WIDTH(COL_WORD_W)) u_fifo (
    .wclk(clk50), .wrst_n(rst_n), .wrreq, .data(ray_word), .wrfull,
    .rclk(clk25), .rrst_n(rst25_n), .rdreq, .q(fifo_q), .rdempty
  );
  assign rdreq = !rdempty;

  // ------------------------------------------------------------ pixel side
  logic [9:0]  cur_col, cur_row, mem_row;
  col_word_t   mem_q;
  logic        mem_toggle;
  tex_addr_t   tex_addr;
  logic        side_px, bool_px;
  logic [3:0]  tnum_px, tnum2_px;
  logic [23:0] tex_color;
  logic [7:0]  sky_pixel;
  logic        sram_mux;

  column_memory u_mem (
    .clock(clk25), .rst_n(rst25_n), .data(fifo_q), .rd_req(rdreq),
    .rdaddress(cur_col), .row_in(cur_row), .row_out(mem_row),
    .q(mem_q), .toggle(mem_toggle)
  );

  tex_gen u_tex (
    .clk(clk25), .row(mem_row), .col(mem_q),
    .tex_addr_out(tex_addr), .side_out(side_px), .bool_out(bool_px),
    .tex_num_out(tnum_px), .tex_num2_out(tnum2_px)
  );

  texture_rom u_rom (.tex_addr, .tex_data(tex_color));

  sky_gen u_sky (
    .clk(clk50), .rst_n,
    .read(sky_read), .write(sky_write), .chipselect(sky_chipselect),
    .address(sky_address), .readdata(sky_readdata), .writedata(sky_writedata),
    .byteenable(sky_byteenable),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i,
    .sram_ub_n, .sram_lb_n, .sram_we_n, .sram_ce_n, .sram_oe_n,
    .cur_row(mem_row), .angle(mem_q.sky_angle), .sky_pixel, .sram_mux
  );

  vga_raster u_vga (
    .clk(clk25), .rst_n(rst25_n),
    .cur_col, .cur_row, .vblank(vblank25),
    .mem_row, .row_start(mem_q.draw_start), .row_mid(mem_q.draw_mid),
    .sky_pixel,
    .tex_color, .is_side(side_px), .bool_in(bool_px),
    .tex_num(tnum_px), .tex_num2(tnum2_px),
    .vga_hs, .vga_vs, .vga_blank_n, .vga_sync_n, .vga_r, .vga_g, .vga_b
  );
  assign vga_clk = clk25;

  // ------------------------------------------------------------ peripherals
  sound_controller u_snd (
    .clk(clk50), .rst_n,
    .read(snd_read), .write(snd_write), .chipselect(snd_chipselect),
    .address(snd_address), .readdata(snd_readdata), .writedata(snd_writedata),
    .irq(snd_irq),
    .aud_adclrck, .aud_adcdat, .aud_daclrck, .aud_dacdat, .aud_bclk, .aud_xck,
    .led(snd_led)
  );

  keyboard_controller u_kb (
    .clk(clk50), .reset(!rst_n),
    .address(kb_address), .read(kb_read), .chipselect(kb_chipselect),
    .readdata(kb_readdata), .ps2_clk, .ps2_data
  );
endmodule
