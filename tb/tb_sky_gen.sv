// tb_sky_gen -- self-checking test of the sky SRAM multiplexer.
//
// The processor side writes a 1024 x 480 sky picture (as bytes in 16-bit
// words, with byte enables) and reads some of it back through the Avalon
// port; a write to 0x3FFFF with bit 0 set hands the SRAM to the display. The
// display side then sweeps random rows and angles and every sky byte must be
// the picture's byte at (row, angle). The SRAM must never be written while
// the display owns it.
module tb_sky_gen;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic read = 0, write = 0, cs = 0, mux;
  logic [17:0] address = 0, sram_addr;
  logic [15:0] readdata, writedata = 0, dq_o, dq_i;
  logic [1:0] be = 2'b11;
  logic dq_oe, ub_n, lb_n, we_n, ce_n, oe_n;
  logic [9:0] row = 0, angle = 0;
  logic [7:0] sky;

  sky_gen dut (.clk, .rst_n, .read, .write, .chipselect(cs), .address, .readdata, .writedata,
               .byteenable(be), .sram_addr, .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i),
               .sram_ub_n(ub_n), .sram_lb_n(lb_n), .sram_we_n(we_n), .sram_ce_n(ce_n),
               .sram_oe_n(oe_n), .cur_row(row), .angle, .sky_pixel(sky), .sram_mux(mux));

  sram_model u_sram (.clk, .addr(sram_addr), .dq_in(dq_o), .dq_oe, .dq_out(dq_i),
                     .ub_n, .lb_n, .we_n, .ce_n, .oe_n);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [7:0] pic(int r, int a); return 8'((r * 5) ^ (a * 3) ^ (a >> 4)); endfunction

  task automatic av_write(input int a, input logic [15:0] d, input logic [1:0] bev);
    @(negedge clk);
    cs = 1; write = 1; address = 18'(a); writedata = d; be = bev;
    @(negedge clk);
    cs = 0; write = 0; be = 2'b11;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(mux == 1'b0, "processor owns the SRAM after reset");
    for (int r = 0; r < 480; r++)
      for (int w = 0; w < 512; w++) begin
        if (w % 3 == 0) begin
          av_write(r * 512 + w, {8'h00, pic(r, 2 * w)}, 2'b01);   // low byte first
          av_write(r * 512 + w, {pic(r, 2 * w + 1), 8'hEE}, 2'b10);
        end else
          av_write(r * 512 + w, {pic(r, 2 * w + 1), pic(r, 2 * w)}, 2'b11);
      end
    for (int n = 0; n < 50; n++) begin
      int r, w;
      r = $urandom_range(0, 479); w = $urandom_range(0, 511);
      @(negedge clk);
      cs = 1; read = 1; address = 18'(r * 512 + w);
      #1 check(readdata == {pic(r, 2 * w + 1), pic(r, 2 * w)}, "processor read back");
      @(negedge clk);
      cs = 0; read = 0;
    end
    av_write(18'h3FFFF, 16'h0001, 2'b11);
    check(mux == 1'b1, "display owns the SRAM");
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      row = 10'($urandom_range(0, 479));
      angle = 10'($urandom);
      // the processor keeps issuing writes; they must not reach the SRAM
      cs = (n % 2 == 0); write = cs; address = 18'($urandom); writedata = 16'hFFFF;
      #1 check(sky == pic(int'(row), int'(angle)), $sformatf("sky at row %0d angle %0d", row, angle));
      check(we_n == 1'b1, "no SRAM write while displaying");
    end
    cs = 0; write = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
