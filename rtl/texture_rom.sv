// texture_rom -- four 64 x 64 textures of 24-bit colour (8 bits each of red,
// green, blue), read asynchronously: `tex_data` follows `tex_addr` with no
// clock. Address = {texture[1:0], texel row[5:0], texel column[5:0]}.
//
// The design stores four bitmap textures in a 16384-word ROM; their pixels are
// not available, so this ROM computes four patterns of the same size and
// format from the address instead:
//   0  red brick: 16 x 8 bricks, rows offset by half a brick, grey mortar
//   1  grey stone blocks 32 x 16 with a dark border and a diagonal grain
//   2  blue tiles 16 x 16 with a grey (0x383838) rim, as in the design's blue
//      wall (0x00007C body, 0x000070 edge, 0x000088 highlight)
//   3  wood planks: vertical stripes whose shade varies with the column
// Textures 0 and 3 also form the floor checkerboard.
module texture_rom
  import cudoom_pkg::*;
(
  input  tex_addr_t   tex_addr,
  output logic [23:0] tex_data
);
  always_comb begin
    logic [5:0] x, y;
    logic [5:0] bx;
    logic [7:0] g, s;
    x = tex_addr.x;
    y = tex_addr.y;
    bx = x + (y[3] ? 6'd8 : 6'd0);
    g = 8'h70 + {3'd0, 5'(x + y) & 5'h1f};
    s = 8'h60 + {2'd0, x[2:0], 3'd0} + {4'd0, y[5:2]};
    unique case (tex_addr.tex)
      2'd0: begin                               // brick
        if (y[2:0] == 3'd0 || bx[3:0] == 4'd0) tex_data = 24'h808080;
        else tex_data = {8'h90 + {3'd0, y[2:0], 2'd0}, 8'h20, 8'h18};
      end
      2'd1: begin                               // stone
        if (x[4:0] == 5'd0 || y[3:0] == 4'd0) tex_data = 24'h303030;
        else tex_data = {g, g, g};
      end
      2'd2: begin                               // blue tile
        if (x[3:0] == 4'd0 || y[3:0] == 4'd0)      tex_data = 24'h383838;
        else if (x[3:0] == 4'd1 || y[3:0] == 4'd1) tex_data = 24'h000088;
        else if (x[3:0] == 4'd15 || y[3:0] == 4'd15) tex_data = 24'h000070;
        else                                       tex_data = 24'h00007c;
      end
      default: begin                            // wood
        tex_data = (x[2:0] == 3'd0) ? 24'h3c2810 : {s + 8'h30, s, 8'h20};
      end
    endcase
  end
endmodule
