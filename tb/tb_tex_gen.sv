// tb_tex_gen -- self-checking test of the texture generator.
//
// Random column words and rows are applied; an integer reference model
// predicts the registered texel address and pixel attributes, which must
// appear one clock later (and not before). The model recomputes the wall
// texel row ((2*row + L - 480) * distance/960) >> 16, the floor distance table
// 240*4096/(240-k), the weighted floor point and the checkerboard from the
// formulas, written independently of the RTL. Counts wall rows of each ray
// and floor rows of both checkerboard colours; each must occur.
module tb_tex_gen;
  import cudoom_pkg::*;

  logic clk = 0;
  always #20 clk = ~clk;

  logic [9:0] row;
  col_word_t col;
  tex_addr_t addr;
  logic side, boolv;
  logic [3:0] tn, tn2;

  tex_gen dut (.clk, .row, .col, .tex_addr_out(addr), .side_out(side),
               .bool_out(boolv), .tex_num_out(tn), .tex_num2_out(tn2));

  int checks = 0, failures = 0;
  int n_first = 0, n_tall = 0, n_floor0 = 0, n_floor3 = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic bit [23:0] model(input col_word_t c, input int r);
    // returns {side, bool, tex_num, tex_num2, tex[1:0], y[5:0], x[5:0]}
    longint a, m, d, wt, w, fx, fy;
    int k;
    bit [5:0] ty, tx;
    bit [1:0] t;
    bit sd, bl;
    bit [3:0] n1, n2;
    if (r <= int'(c.draw_end) + 1) begin
      bl = c.first_is_tall || (r >= int'(c.draw_mid));
      a = (2 * r + (bl ? c.line_minus_h : c.line_minus_h2)) % (1 << 18);
      m = a * (bl ? c.inv_line : c.inv_line2);
      ty = 6'(m >> 16);
      tx = bl ? c.tex_x : c.tex_x2;
      t = bl ? c.tex_num[1:0] : c.tex_num2[1:0];
      sd = bl ? c.is_side : c.is_side2;
      n1 = c.tex_num; n2 = c.tex_num2;
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
      sd = 1; bl = 0; n1 = 0; n2 = 0;
    end
    return {sd, bl, n1, n2, t, ty, tx};
  endfunction

  initial begin
    bit [23:0] e;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      col = col_word_t'({$urandom, $urandom, $urandom, $urandom,
                         $urandom, $urandom, $urandom, $urandom});
      col.draw_end = 9'(240 + $urandom_range(0, 239));
      col.draw_mid = 9'($urandom_range(0, 240));
      row = 10'($urandom_range(0, 479));
      e = model(col, int'(row));
      #1;
      @(posedge clk); #1;
      check({side, boolv, tn, tn2, addr} == e,
            $sformatf("row %0d: got %h expected %h", row, {side, boolv, tn, tn2, addr}, e));
      if (row <= col.draw_end + 1) begin
        if (e[22]) n_first++; else n_tall++;
      end else if (e[13:12] == 2'd3) n_floor3++;
      else n_floor0++;
    end
    // latency: output holds the previous result until the next clock edge
    @(negedge clk);
    col.draw_end = 9'd479; col.first_is_tall = 1; col.tex_num = 4'd2; row = 10'd10;
    @(posedge clk); #1;
    e = model(col, 10);
    @(negedge clk);
    row = 10'd479; col.draw_end = 9'd250;
    #1 check({side, boolv, tn, tn2, addr} == e, "output unchanged before the clock");
    @(posedge clk); #1;
    check({side, boolv, tn, tn2, addr} == model(col, 479), "output updated one clock later");
    check(n_first > 0 && n_tall > 0 && n_floor0 > 0 && n_floor3 > 0,
          $sformatf("coverage first=%0d tall=%0d floor0=%0d floor3=%0d",
                    n_first, n_tall, n_floor0, n_floor3));
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
