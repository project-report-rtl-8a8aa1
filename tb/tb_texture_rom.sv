// tb_texture_rom -- self-checking test of the procedural texture ROM.
//
// Checks, over every texel of all four textures: brick mortar lines every
// 8 rows and every 16 columns with a half-brick offset on alternate courses;
// the stone block border; the blue tile's rim, highlight, edge and body
// colours; the wood plank seams; and that the four textures differ.
module tb_texture_rom;
  import cudoom_pkg::*;
  tex_addr_t a;
  logic [23:0] d;

  texture_rom dut (.tex_addr(a), .tex_data(d));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [23:0] t [4][64][64];
    for (int tx = 0; tx < 4; tx++)
      for (int y = 0; y < 64; y++)
        for (int x = 0; x < 64; x++) begin
          a = '{tex: 2'(tx), y: 6'(y), x: 6'(x)};
          #1 t[tx][y][x] = d;
        end
    for (int y = 0; y < 64; y++)
      for (int x = 0; x < 64; x++) begin
        int bx;
        bx = (x + ((y / 8) % 2) * 8) % 64;
        check((t[0][y][x] == 24'h808080) == (y % 8 == 0 || bx % 16 == 0),
              $sformatf("brick mortar at %0d,%0d", x, y));
        check((t[1][y][x] == 24'h303030) == (x % 32 == 0 || y % 16 == 0),
              $sformatf("stone border at %0d,%0d", x, y));
        if (x % 16 == 0 || y % 16 == 0) check(t[2][y][x] == 24'h383838, "tile rim");
        else if (x % 16 == 1 || y % 16 == 1) check(t[2][y][x] == 24'h000088, "tile highlight");
        else if (x % 16 == 15 || y % 16 == 15) check(t[2][y][x] == 24'h000070, "tile edge");
        else check(t[2][y][x] == 24'h00007c, "tile body");
        check((t[3][y][x] == 24'h3c2810) == (x % 8 == 0), "wood seam");
      end
    for (int i = 0; i < 4; i++)
      for (int j = i + 1; j < 4; j++)
        check(t[i] != t[j], $sformatf("textures %0d and %0d differ", i, j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
