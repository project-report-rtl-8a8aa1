// tb_world_map_rom -- self-checking test of the world map ROM.
//
// Reads every cell on both asynchronous ports with random addresses and
// checks: the outer border is all sky walls (9); the player's start cell
// (21, 11) is empty; a list of hand-placed walls of each kind has the right
// code; no code above 9 exists; both ports agree for the same address.
module tb_world_map_rom;
  logic [4:0] xa, ya, xb, yb;
  logic [3:0] ca, cb;

  world_map_rom dut (.x_a(xa), .y_a(ya), .cell_a(ca), .x_b(xb), .y_b(yb), .cell_b(cb));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  typedef struct { int x, y, c; } known_t;
  known_t known[] = '{
    '{21, 11, 0}, '{5, 5, 1}, '{5, 9, 1}, '{7, 4, 2}, '{10, 4, 2}, '{8, 14, 3},
    '{8, 18, 3}, '{14, 24, 4}, '{26, 20, 5}, '{16, 6, 6}, '{15, 15, 7}, '{16, 16, 8},
    '{24, 4, 7}, '{0, 0, 9}, '{31, 17, 9}, '{12, 31, 9}, '{20, 20, 0}};

  initial begin
    int n_empty = 0, n_wall = 0, n_tall = 0;
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) begin
        xa = 5'(x); ya = 5'(y);
        xb = 5'($urandom); yb = 5'($urandom);
        #1;
        check(ca <= 4'd9, $sformatf("code at (%0d,%0d) is %0d", x, y, ca));
        if (x == 0 || y == 0 || x == 31 || y == 31)
          check(ca == 4'd9, $sformatf("border (%0d,%0d) = %0d", x, y, ca));
        if (ca == 0) n_empty++; else if (ca < 5) n_wall++; else if (ca < 9) n_tall++;
        begin
          logic [3:0] first;
          first = cb;
          xa = xb; ya = yb;
          #1 check(ca == first, "ports agree");
        end
      end
    foreach (known[i]) begin
      xa = 5'(known[i].x); ya = 5'(known[i].y);
      #1 check(int'(ca) == known[i].c,
               $sformatf("cell (%0d,%0d) = %0d, expected %0d", known[i].x, known[i].y, ca, known[i].c));
    end
    check(n_empty > 500 && n_wall > 10 && n_tall > 10, "map holds empty, normal and tall cells");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
