// cudoom_pkg -- types and constants shared by the ray-casting display pipeline.
//
// Positions in the world are unsigned fixed point with 22 fraction bits: one
// map cell is 1 << 22, so bits [26:22] of a coordinate select one of the 32
// cells of the map along that axis. The screen is 640 x 480. One column of the
// screen is described by a 256-bit word (col_word_t); the Ray FSM builds it,
// the clock-crossing FIFO carries it and the column memory stores it. Its
// field positions are those of the column parameter table of the design; the
// filler fields are written as ones (upper fillers) or zeros (lower filler).
package cudoom_pkg;

  localparam int unsigned SCREEN_W   = 640;
  localparam int unsigned SCREEN_H   = 480;
  localparam int unsigned HALF_H     = 240;
  localparam int unsigned FRAC_BITS  = 22;   // fraction bits of a world position
  localparam int unsigned MAP_BITS   = 5;    // 32 x 32 map

  // Map cell codes: 0 empty, 1-4 normal-height textures, 5-8 tall textures,
  // 9 "fake" wall through which the sky is seen.
  localparam logic [3:0] CELL_EMPTY     = 4'd0;
  localparam logic [3:0] CELL_FIRST_TALL = 4'd5;
  localparam logic [3:0] SKY_TEXNUM     = 4'd4;   // code 9 minus 5

  typedef struct packed {
    logic [12:0] pad_hi;         // 255:243  filler (ones)
    logic        vga_blank;      // 242      last column of a frame: swap buffers
    logic [9:0]  col_addr;       // 241:232  screen column
    logic [3:0]  tex_num2;       // 231:228  texture of the tall-wall ray
    logic [3:0]  tex_num;        // 227:224  texture of the first wall
    logic        first_is_tall;  // 223      first wall hit is a tall wall
    logic [17:0] line_minus_h2;  // 222:205  line height of tall ray minus 480
    logic [17:0] inv_line2;      // 204:187  distance/960 of tall ray (texture step)
    logic [8:0]  draw_mid;       // 186:178  top row of a normal-height wall
    logic [5:0]  tex_x2;         // 177:172  texture column of the tall wall
    logic [1:0]  gap1;           // 171:170
    logic [9:0]  sky_angle;      // 169:160  view angle of the column (sky column)
    logic [11:0] gap2;           // 159:148  filler (ones)
    logic [11:0] inv_dist;       // 147:136  1/distance, 12 fraction bits
    logic [17:0] pos_y;          // 135:118  player y, 12 fraction bits
    logic [17:0] pos_x;          // 117:100  player x, 12 fraction bits
    logic [17:0] floor_y;        //  99:82   floor point under the wall, y
    logic [17:0] floor_x;        //  81:64   floor point under the wall, x
    logic        is_side;        //  63      first wall: x face hit (shaded)
    logic        is_side2;       //  62      tall wall: x face hit
    logic [17:0] line_minus_h;   //  61:44   line height of first wall minus 480
    logic [17:0] inv_line;       //  43:26   distance/960 of first wall
    logic [8:0]  draw_start;     //  25:17   top row of a tall wall
    logic [8:0]  draw_end;       //  16:8    bottom row of the walls
    logic [5:0]  tex_x;          //   7:2    texture column of the first wall
    logic [1:0]  gap0;           //   1:0
  } col_word_t;

  localparam int unsigned COL_WORD_W = $bits(col_word_t);

  // Texture address: texture number, texel row, texel column.
  typedef struct packed {
    logic [1:0] tex;
    logic [5:0] y;
    logic [5:0] x;
  } tex_addr_t;

endpackage
