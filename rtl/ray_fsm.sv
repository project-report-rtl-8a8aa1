// ray_fsm -- hardware ray marcher: computes the drawing parameters of one
// screen column per request.
//
// Software writes a column's player position, ray direction, distance step and
// column number, then pulses `control`. On the rising edge of `control`, seen
// while `ready` is high, the FSM latches the inputs and works as follows:
//   EXTEND     Two rays advance together by one step per clock: ray 1 stops in
//              the first wall of any height, ray 2 in the first tall wall
//              (code 5 or more). The map is looked up at each new position.
//   REDUCE     The ray and distance steps are divided by 2^REFINE_SHIFT (32).
//   REFINE     Each ray still inside its wall steps back by the small step
//              until it is out of it.
//   STEP       Both rays step forward once, back onto the wall edge.
//   DIV_INIT / DIVIDE
//              Five 32-bit restoring divisions run side by side, one quotient
//              bit per clock for 32 clocks: line height = 480/distance for
//              both rays, distance/960 for both rays (texture row step) and
//              1/distance with 12 fraction bits (floor interpolation).
//   CALC       Top of tall wall, top of normal wall and bottom row
//              (240 - 2.5 L, 240 - L/2, 240 + L/2, clipped to the screen) and
//              texture numbers.
//   WAIT_FIFO  Waits while the FIFO is full.
//   CHECK_LAST Writes the column word into the FIFO (wrreq for one clock as
//              the FSM re-enters READY) unless this is the last column.
//   WAIT_VBLANK For the last column: waits for the vertical blank of the
//              display, then writes the word with its vga_blank bit set, which
//              makes the column memory swap its two buffers.
// Texture column, hit face and floor point under the wall are combinational
// functions of the final ray positions; they settle during the division.
//
// Distances are accumulated in the same fixed point as positions (22 fraction
// bits), so the step `count_step` is cos(view-relative angle)/32, which
// removes the fish-eye distortion. The `state_onehot` output shows the state
// (bit 11 = READY ... bit 1 = WAIT_VBLANK) for debug LEDs.
//
// Follows the design: states, step sizes, the two-ray scheme for two wall
// heights, the divider and all formulas. Own choices: a synchronous reset;
// the sky angle of the column is latched with the other inputs; a ray that has
// stopped keeps the map code of the cell it stopped in (the map is looked up
// at the position each ray actually moves to); the divider keeps a 33-bit
// remainder so quotients are exact.
//
// Timing: latency per column = 1 + extend steps + 1 + refine steps + 1 + 1
// + 32 + 1 + 1 + 1 clocks (at most 4200) when the FIFO is not full.
module ray_fsm
  import cudoom_pkg::*;
#(
  parameter int unsigned NUM_COLS      = 640,
  parameter int unsigned SCREEN_HEIGHT = 480,
  parameter int unsigned COARSE_LIMIT  = 4095,   // max coarse steps
  parameter int unsigned FINE_LIMIT    = 63,     // max refine steps
  parameter int unsigned REFINE_SHIFT  = 5,      // coarse step / fine step = 32
  parameter string       MAPFILE       = "rtl/world_map.hex"
) (
  input  logic               clk,
  input  logic               rst_n,
  // software side (through the Avalon slave registers)
  input  logic               control,
  input  logic [31:0]        pos_x,
  input  logic [31:0]        pos_y,
  input  logic [31:0]        count_step,
  input  logic signed [31:0] ray_dir_x,
  input  logic signed [31:0] ray_dir_y,
  input  logic [9:0]         col_addr_in,
  input  logic [9:0]         sky_angle_in,
  output logic               ready,
  // display side
  input  logic               vga_blank,    // vertical blank, synchronised to clk
  // FIFO side
  input  logic               wrfull,
  output logic               wrreq,
  output col_word_t          col_word,
  output logic [11:0]        state_onehot
);
  localparam logic [31:0] ONE        = 32'(1) << FRAC_BITS;
  localparam logic [31:0] LINE_NUM   = 32'(SCREEN_HEIGHT) << FRAC_BITS;
  localparam logic [31:0] INVD_NUM   = 32'h0100_0000;   // 1.0 with 24 fraction bits
  localparam logic [31:0] HALF       = 32'(SCREEN_HEIGHT / 2);
  localparam logic [31:0] SCRH       = 32'(SCREEN_HEIGHT);
  localparam int          NDIV       = 5;

  typedef enum logic [3:0] {
    S_READY, S_EXTEND, S_REDUCE, S_REFINE, S_STEP, S_DIV_INIT, S_DIVIDE,
    S_CALC, S_WAIT_FIFO, S_CHECK_LAST, S_WAIT_VBLANK
  } state_t;

  state_t state;

  logic               ctrl_prev;
  logic [31:0]        step;                 // distance step
  logic signed [31:0] dir_x, dir_y;         // ray step (coarse, then fine)
  logic signed [31:0] dir_x0, dir_y0;       // ray direction as given
  logic [31:0]        r1_x, r1_y, r2_x, r2_y;
  logic [31:0]        cnt1, cnt2;           // distances travelled
  logic [31:0]        plr_x, plr_y;
  logic [3:0]         cell1, cell2;
  logic [11:0]        lim1;
  logic [5:0]         lim2;
  logic [9:0]         col_addr, sky_angle;

  // divider lanes
  logic [31:0] dv_num [NDIV];
  logic [31:0] dv_den [NDIV];
  logic [32:0] dv_rem [NDIV];
  logic [31:0] dv_quo [NDIV];
  logic [4:0]  dv_cnt;

  // results
  logic [31:0] draw_start, draw_mid, draw_end;
  logic [31:0] lmh1, lmh2, il1, il2, invd;
  logic [3:0]  tex_num, tex_num2;
  logic        first_tall, blank_out;

  // ---------------------------------------------------------------- map
  logic [31:0] n1_x, n1_y, n2_x, n2_y;   // positions the rays move to
  logic [3:0]  map1, map2;

  world_map_rom #(.MAP_W(32), .MAPFILE(MAPFILE)) u_map (
    .x_a(n1_x[FRAC_BITS+4:FRAC_BITS]), .y_a(n1_y[FRAC_BITS+4:FRAC_BITS]),
    .x_b(n2_x[FRAC_BITS+4:FRAC_BITS]), .y_b(n2_y[FRAC_BITS+4:FRAC_BITS]),
    .cell_a(map1), .cell_b(map2)
  );

  wire start   = (state == S_READY) && control && !ctrl_prev;
  wire ext_go  = (cell2 < CELL_FIRST_TALL) && (lim1 != 0);
  wire ref_end = ((cell1 == CELL_EMPTY) && (cell2 < CELL_FIRST_TALL)) || (lim2 == 0);

  always_comb begin
    n1_x = r1_x; n1_y = r1_y; n2_x = r2_x; n2_y = r2_y;
    unique case (state)
      S_READY: begin
        n1_x = pos_x; n1_y = pos_y; n2_x = pos_x; n2_y = pos_y;
      end
      S_EXTEND: begin
        if (cell1 == CELL_EMPTY) begin
          n1_x = r1_x + dir_x; n1_y = r1_y + dir_y;
        end
        n2_x = r2_x + dir_x; n2_y = r2_y + dir_y;
      end
      S_REFINE: begin
        if (cell1 != CELL_EMPTY) begin
          n1_x = r1_x - dir_x; n1_y = r1_y - dir_y;
        end
        if (cell2 >= CELL_FIRST_TALL) begin
          n2_x = r2_x - dir_x; n2_y = r2_y - dir_y;
        end
      end
      S_STEP: begin
        n1_x = r1_x + dir_x; n1_y = r1_y + dir_y;
        n2_x = r2_x + dir_x; n2_y = r2_y + dir_y;
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk) begin
    ctrl_prev <= control;
    if (!rst_n) begin
      state      <= S_READY;
      ctrl_prev  <= 1'b0;
      wrreq      <= 1'b0;
      blank_out  <= 1'b0;
      lim1       <= 12'(COARSE_LIMIT);
      lim2       <= 6'(FINE_LIMIT);
      {r1_x, r1_y, r2_x, r2_y, plr_x, plr_y} <= '0;
      {cnt1, cnt2, step}        <= '0;
      {dir_x, dir_y, dir_x0, dir_y0} <= '0;
      {cell1, cell2}            <= '0;
      {col_addr, sky_angle}     <= '0;
      {draw_start, draw_mid, draw_end} <= '0;
      {lmh1, lmh2, il1, il2, invd}     <= '0;
      {tex_num, tex_num2, first_tall}  <= '0;
      dv_cnt <= '0;
    end else begin
      unique case (state)
        S_READY: begin
          wrreq     <= 1'b0;
          blank_out <= 1'b0;
          lim1      <= 12'(COARSE_LIMIT);
          lim2      <= 6'(FINE_LIMIT);
          if (start) begin
            cnt1 <= '0; cnt2 <= '0;
            step <= count_step;
            dir_x <= ray_dir_x;  dir_y <= ray_dir_y;
            dir_x0 <= ray_dir_x; dir_y0 <= ray_dir_y;
            r1_x <= pos_x; r1_y <= pos_y; r2_x <= pos_x; r2_y <= pos_y;
            plr_x <= pos_x; plr_y <= pos_y;
            cell1 <= map1; cell2 <= map2;
            col_addr  <= col_addr_in;
            sky_angle <= sky_angle_in;
            state <= S_EXTEND;
          end
        end

        S_EXTEND: begin
          lim1 <= lim1 - 12'd1;
          if (ext_go) begin
            if (cell1 == CELL_EMPTY) cnt1 <= cnt1 + step;
            cnt2 <= cnt2 + step;
            r1_x <= n1_x; r1_y <= n1_y; r2_x <= n2_x; r2_y <= n2_y;
            cell1 <= map1; cell2 <= map2;
          end else begin
            state <= S_REDUCE;
          end
        end

        S_REDUCE: begin
          step  <= step >> REFINE_SHIFT;
          dir_x <= dir_x >>> REFINE_SHIFT;
          dir_y <= dir_y >>> REFINE_SHIFT;
          state <= S_REFINE;
        end

        S_REFINE: begin
          lim2 <= lim2 - 6'd1;
          if (ref_end) begin
            state <= S_STEP;
          end else begin
            if (cell1 != CELL_EMPTY)      cnt1 <= cnt1 - step;
            if (cell2 >= CELL_FIRST_TALL) cnt2 <= cnt2 - step;
            r1_x <= n1_x; r1_y <= n1_y; r2_x <= n2_x; r2_y <= n2_y;
            cell1 <= map1; cell2 <= map2;
          end
        end

        S_STEP: begin
          cnt1 <= cnt1 + step;
          cnt2 <= cnt2 + step;
          r1_x <= n1_x; r1_y <= n1_y; r2_x <= n2_x; r2_y <= n2_y;
          cell1 <= map1; cell2 <= map2;
          state <= S_DIV_INIT;
        end

        S_DIV_INIT: begin
          dv_num[0] <= LINE_NUM;        dv_den[0] <= cnt1;
          dv_num[1] <= cnt1 >> 1;       dv_den[1] <= SCRH;
          dv_num[2] <= INVD_NUM;        dv_den[2] <= cnt1 >> 10;
          dv_num[3] <= LINE_NUM;        dv_den[3] <= cnt2;
          dv_num[4] <= cnt2 >> 1;       dv_den[4] <= SCRH;
          for (int i = 0; i < NDIV; i++) begin
            dv_rem[i] <= '0;
            dv_quo[i] <= '0;
          end
          dv_cnt <= 5'd31;
          state  <= S_DIVIDE;
        end

        S_DIVIDE: begin
          for (int i = 0; i < NDIV; i++) begin
            logic [32:0] r;
            r = {dv_rem[i][31:0], dv_num[i][31]};
            if (r >= {1'b0, dv_den[i]}) begin
              dv_rem[i] <= r - {1'b0, dv_den[i]};
              dv_quo[i] <= {dv_quo[i][30:0], 1'b1};
            end else begin
              dv_rem[i] <= r;
              dv_quo[i] <= {dv_quo[i][30:0], 1'b0};
            end
            dv_num[i] <= dv_num[i] << 1;
          end
          dv_cnt <= dv_cnt - 5'd1;
          if (dv_cnt == 0) state <= S_CALC;
        end

        S_CALC: begin
          logic [31:0] tall_h, ds, dm, de;
          first_tall <= (cell1 >= CELL_FIRST_TALL);
          if (cell1 >= CELL_FIRST_TALL) begin
            tall_h  = dv_quo[0];
            tex_num <= cell1 - 4'd5;
          end else begin
            tall_h  = dv_quo[3];
            tex_num <= cell1 - 4'd1;
          end
          tex_num2 <= cell2 - 4'd5;
          ds = HALF - (tall_h << 1) - (tall_h >> 1);
          dm = HALF - (dv_quo[0] >> 1);
          de = HALF + (dv_quo[0] >> 1);
          draw_start <= (ds >= SCRH) ? 32'd0 : ds;
          draw_mid   <= (dm >= SCRH) ? 32'd0 : dm;
          draw_end   <= (de >= SCRH) ? SCRH - 32'd1 : de;
          lmh1 <= dv_quo[0] - SCRH;
          il1  <= dv_quo[1];
          invd <= dv_quo[2];
          lmh2 <= dv_quo[3] - SCRH;
          il2  <= dv_quo[4];
          state <= S_WAIT_FIFO;
        end

        S_WAIT_FIFO: if (!wrfull) state <= S_CHECK_LAST;

        S_CHECK_LAST: begin
          if (32'(col_addr) >= NUM_COLS - 1) begin
            state <= S_WAIT_VBLANK;
          end else begin
            wrreq <= 1'b1;
            state <= S_READY;
          end
        end

        S_WAIT_VBLANK: begin
          if (vga_blank) begin
            wrreq     <= 1'b1;
            blank_out <= 1'b1;
            state     <= S_READY;
          end
        end

        default: state <= S_READY;
      endcase
    end
  end

  assign ready = (state == S_READY);

  always_comb begin
    state_onehot = '0;
    state_onehot[11 - int'(state)] = 1'b1;
  end

  // ------------------------------------------- hit face, texture column, floor
  typedef struct packed {
    logic        side;
    logic [5:0]  tex_x;
    logic [31:0] floor_x;
    logic [31:0] floor_y;
  } geom_t;

  function automatic geom_t hit_geometry(input logic [31:0] px, py,
                                         input logic signed [31:0] dx, dy);
    geom_t g;
    logic [31:0] cx, cy, gx, gy, dist_x, dist_y, wall;
    logic [21:0] frac;
    cx = {px[31:FRAC_BITS], 22'd0};
    cy = {py[31:FRAC_BITS], 22'd0};
    gx = (dx < 0) ? cx + ONE : cx;          // grid line the ray crossed in x
    gy = (dy < 0) ? cy + ONE : cy;
    dist_x = (dx < 0) ? gx - px : px - gx;
    dist_y = (dy < 0) ? gy - py : py - gy;
    g.side = (dx != 0) && (dy != 0) && (dist_x < dist_y);
    wall = g.side ? py : px;
    frac = wall[FRAC_BITS-1:0];
    g.tex_x = frac[21:16];
    if ((g.side && dx > 0) || (!g.side && dy < 0)) g.tex_x = 6'd63 - g.tex_x;
    if (g.side && dx > 0) begin
      g.floor_x = cx;        g.floor_y = cy + 32'(frac);
    end else if (g.side && dx < 0) begin
      g.floor_x = cx + ONE;  g.floor_y = cy + 32'(frac);
    end else if (!g.side && dy > 0) begin
      g.floor_x = cx + 32'(frac); g.floor_y = cy;
    end else begin
      g.floor_x = cx + 32'(frac); g.floor_y = cy + ONE;
    end
    return g;
  endfunction

  geom_t g1, g2;
  assign g1 = hit_geometry(r1_x, r1_y, dir_x0, dir_y0);
  assign g2 = hit_geometry(r2_x, r2_y, dir_x0, dir_y0);

  always_comb begin
    col_word               = '0;
    col_word.pad_hi        = '1;
    col_word.gap2          = '1;
    col_word.vga_blank     = blank_out;
    col_word.col_addr      = col_addr;
    col_word.tex_num2      = tex_num2;
    col_word.tex_num       = tex_num;
    col_word.first_is_tall = first_tall;
    col_word.line_minus_h2 = lmh2[17:0];
    col_word.inv_line2     = il2[17:0];
    col_word.draw_mid      = draw_mid[8:0];
    col_word.tex_x2        = g2.tex_x;
    col_word.sky_angle     = sky_angle;
    col_word.inv_dist      = invd[11:0];
    col_word.pos_y         = 18'(plr_y >> 10);
    col_word.pos_x         = 18'(plr_x >> 10);
    col_word.floor_y       = 18'(g1.floor_y >> 10);
    col_word.floor_x       = 18'(g1.floor_x >> 10);
    col_word.is_side       = g1.side;
    col_word.is_side2      = g2.side;
    col_word.line_minus_h  = lmh1[17:0];
    col_word.inv_line      = il1[17:0];
    col_word.draw_start    = draw_start[8:0];
    col_word.draw_end      = draw_end[8:0];
    col_word.tex_x         = g1.tex_x;
  end

  // A column is written to the FIFO exactly once: the write strobe lasts one
  // clock.
  property p_single_write;
    @(posedge clk) disable iff (!rst_n) wrreq |=> !wrreq;
  endproperty
  a_single_write: assert property (p_single_write);
endmodule
