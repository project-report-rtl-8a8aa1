// tb_nios_interface -- self-checking test of the Ray FSM's Avalon slave.
//
// Writes random words to addresses 1-8 and checks each lands in its 32-bit
// slice of the 256-bit parameter block; writes the control word and checks
// the control bit follows one clock after the register (two clocks after the
// write edge); checks a write to an unused address clears control; checks a
// read returns the status word one clock after the read and that nothing
// changes without chipselect.
module tb_nios_interface;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  logic read = 0, write = 0, cs = 0;
  logic [4:0] address = 0;
  logic [31:0] writedata = 0, readdata, hw;
  logic ctrl;
  logic [255:0] data;

  nios_interface dut (.clk, .rst_n, .read, .write, .chipselect(cs), .address,
                      .writedata, .readdata, .hardware_data(hw), .ctrl, .nios_data(data));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic wr(input int a, input logic [31:0] d, input bit sel = 1);
    @(negedge clk);
    cs = sel; write = 1; address = 5'(a); writedata = d;
    @(negedge clk);
    cs = 0; write = 0;
  endtask

  initial begin
    logic [255:0] expect_d;
    expect_d = '0;
    hw = 32'h0000_3C01;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int a;
      logic [31:0] d;
      a = $urandom_range(1, 8);
      d = $urandom;
      wr(a, d);
      expect_d[32 * (a - 1) +: 32] = d;
      check(data == expect_d, $sformatf("data block after write to %0d", a));
    end
    wr(3, 32'hDEAD_BEEF, 0);
    check(data == expect_d, "no write without chipselect");
    // control: edge timing
    @(negedge clk);
    cs = 1; write = 1; address = 0; writedata = 32'hFFFF_FFFF;
    @(negedge clk);
    cs = 0; write = 0;
    check(ctrl == 1'b0, "control not yet visible one clock after the write");
    @(negedge clk);
    check(ctrl == 1'b1, "control visible two clocks after the write");
    wr(9, 32'h1);
    @(negedge clk);
    check(ctrl == 1'b0, "write to an unused address clears control");
    wr(0, 32'h1);
    @(negedge clk);
    check(ctrl == 1'b1, "control set again");
    wr(0, 32'h0);
    @(negedge clk);
    check(ctrl == 1'b0, "control cleared by writing 0");
    // read
    @(negedge clk);
    cs = 1; read = 1; address = 0; hw = 32'h0000_2A01;
    @(negedge clk);
    cs = 0; read = 0;
    check(readdata == 32'h0000_2A01, "status read one clock after request");
    hw = 32'h1234;
    @(negedge clk);
    check(readdata == 32'h0000_2A01, "read data held without a new read");
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
