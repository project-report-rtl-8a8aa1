// tb_ps2_rx -- self-checking test of the PS/2 receiver.
//
// A keyboard model sends 11-bit frames (start, 8 data bits LSB first, odd
// parity, stop) with the device-generated clock, here 40 system clocks per
// half bit, and with short glitches on the clock line that the 8-sample
// filter must ignore. Checked: every byte arrives with data-available set and
// no error; the byte is available within 20 clocks after the stop bit's
// falling clock edge; a parity error or a missing stop bit sets the error
// flag; a byte arriving before the previous one is read sets the error flag;
// do_read clears data-available.
module tb_ps2_rx;
  logic clk = 0, reset = 1;
  always #10 clk = ~clk;
  logic ps2_clk = 1, ps2_data = 1, do_read = 0;
  logic err, dav;
  logic [7:0] code;

  ps2_rx dut (.clk, .reset, .ps2_clk, .ps2_data, .do_read, .scan_err(err), .scan_dav(dav), .scan_code(code));

  int checks = 0, failures = 0, n_glitch = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int t_stop;

  task automatic send(input logic [7:0] b, input bit bad_parity = 0, input bit bad_stop = 0);
    logic [10:0] f;
    f = {~bad_stop, ~^b ^ bad_parity, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      repeat (20) @(negedge clk);
      ps2_clk = 0;
      if (i == 10) t_stop = cyc;
      repeat (40) @(negedge clk);
      ps2_clk = 1;
      if ($urandom_range(0, 3) == 0) begin      // glitch shorter than the filter
        repeat (5) @(negedge clk);
        ps2_clk = 0;
        repeat ($urandom_range(1, 5)) @(negedge clk);
        ps2_clk = 1;
        n_glitch++;
        repeat (10) @(negedge clk);
      end else repeat (20) @(negedge clk);
    end
    ps2_data = 1;
    repeat (100) @(negedge clk);
  endtask

  task automatic read_byte();
    @(negedge clk) do_read = 1;
    @(negedge clk) do_read = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    repeat (20) @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      logic [7:0] b;
      int t_dav;
      b = 8'($urandom);
      fork
        send(b);
        begin
          while (!dav) @(negedge clk);
          t_dav = cyc;
        end
      join
      check(t_dav - t_stop <= 20, $sformatf("byte ready %0d clocks after the stop edge", t_dav - t_stop));
      check(dav && code == b && !err, $sformatf("byte %h received as %h err %b", b, code, err));
      read_byte();
      check(!dav, "do_read clears data-available");
    end
    send(8'h5A, 1, 0);
    check(dav && err, "parity error flagged");
    read_byte();
    send(8'h33, 0, 0);
    check(dav && !err && code == 8'h33, "clean byte after an error");
    send(8'h44, 0, 0);
    check(dav && err && code == 8'h44, "overrun flagged");
    read_byte();
    send(8'h66, 0, 1);
    check(err, "missing stop bit flagged");
    check(n_glitch > 5, "clock glitches applied");
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
