// tb_keyboard_controller -- self-checking test of the keyboard Avalon slave.
//
// A keyboard model sends make and break sequences over PS/2 (40 clocks per
// half bit). Software reads are modelled on the Avalon port. Checked:
//   - status register bit 0 is set once a scan code arrives
//   - a key press shows the scan code in the key register
//   - a release (0xF0, code) shows the code minus 32
//   - the next different key shows its plain code again
//   - reading the key register clears the data-available bit
//   - readdata is 0 without chipselect
module tb_keyboard_controller;
  logic clk = 0, reset = 1;
  always #10 clk = ~clk;
  logic ps2_clk = 1, ps2_data = 1, address = 0, read = 0, cs = 0;
  logic [7:0] readdata;

  keyboard_controller dut (.clk, .reset, .address, .read, .chipselect(cs), .readdata, .ps2_clk, .ps2_data);

  int checks = 0, failures = 0, n_press = 0, n_release = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      repeat (20) @(negedge clk);
      ps2_clk = 0;
      repeat (40) @(negedge clk);
      ps2_clk = 1;
      repeat (20) @(negedge clk);
    end
    ps2_data = 1;
    repeat (100) @(negedge clk);
  endtask

  task automatic rd(input logic a, output logic [7:0] d);
    @(negedge clk);
    cs = 1; read = 1; address = a;
    #1 d = readdata;
    @(negedge clk);
    cs = 0; read = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [7:0] d;
    logic [7:0] keys [] = '{8'h1D, 8'h1C, 8'h1B, 8'h23, 8'h29, 8'h76};
    repeat (3) @(negedge clk);
    reset = 0;
    repeat (20) @(negedge clk);
    rd(0, d);
    check(d == 8'h00, "nothing received after reset");
    foreach (keys[i]) begin
      send(keys[i]);
      rd(0, d);
      check(d[0] == 1'b1, "data available after a press");
      rd(1, d);
      check(d == keys[i], $sformatf("press %h read as %h", keys[i], d));
      rd(0, d);
      check(d[0] == 1'b0, "reading the key clears data available");
      n_press++;
      send(8'hF0);
      send(keys[i]);
      rd(1, d);
      check(d == 8'(keys[i] - 8'd32), $sformatf("release of %h read as %h", keys[i], d));
      n_release++;
    end
    @(negedge clk);
    address = 1;
    #1 check(readdata == 8'h00, "readdata 0 without chipselect");
    check(n_press == 6 && n_release == 6, "presses and releases seen");
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
