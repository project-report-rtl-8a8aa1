// world_map_rom -- the 32 x 32 world map read by the ray marcher.
//
// Each cell holds a 4-bit code: 0 empty, 1-4 normal-height walls with
// textures 1-4, 5-8 tall walls with textures 1-4, 9 a fake wall that shows
// the sky. The code layout follows the design; the map contents are this
// implementation's own level (outer ring of sky walls, a few walls of every
// type inside), loaded from world_map.hex, one text line per x, 32 entries
// of y per line.
//
// Two asynchronous read ports, one for each of the two rays the Ray FSM
// marches in parallel. A read port takes the integer parts of a position:
// address = x * 32 + y.
module world_map_rom #(
  parameter int unsigned MAP_W   = 32,
  parameter string       MAPFILE = "rtl/world_map.hex"
) (
  input  logic [$clog2(MAP_W)-1:0] x_a, y_a,
  input  logic [$clog2(MAP_W)-1:0] x_b, y_b,
  output logic [3:0]               cell_a,
  output logic [3:0]               cell_b
);
  logic [3:0] cells [MAP_W*MAP_W];

  initial $readmemh(MAPFILE, cells);

  assign cell_a = cells[{x_a, y_a}];
  assign cell_b = cells[{x_b, y_b}];
endmodule
