// tb_wm8731_audio -- self-checking test of the WM8731 serialiser.
//
// Runs with a clock enable every fourth clock (12.5 MHz codec clock from
// 50 MHz) and checks, in clocks of the 50 MHz system clock:
//   - LRCK period 2 * 418 ticks = 3344 clocks; both LRC outputs equal
//   - BCLK period 27 ticks = 108 clocks inside a half-period
//   - one audio_request pulse, one clock wide, per LRCK period, 1-2 ticks
//     after LRCK falls
//   - the bits sent MSB first on rising BCLK equal the sample loaded at the
//     LRCK edge (the 418-tick half-period carries its top 15 bits)
//   - in test mode the samples follow a 48-point sine (within 1 LSB) and
//     every point is sent
module tb_wm8731_audio;
  logic clk = 0, rst_n = 0, ce;
  always #10 clk = ~clk;
  logic [1:0] div = 0;
  always @(posedge clk) div <= div + 1;
  assign ce = (div == 2'd3);

  logic test_mode = 0, req, adclrck, daclrck, dacdat, bclk;
  logic [15:0] data = 0;

  wm8731_audio dut (.clk, .ce, .rst_n, .test_mode, .audio_request(req), .data,
                    .aud_adclrck(adclrck), .aud_daclrck(daclrck), .aud_dacdat(dacdat), .aud_bclk(bclk));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // sample presented: software answers each request with a new random word
  logic [15:0] loaded [$];
  always @(posedge clk) if (req) data <= 16'($urandom);

  int last_lr_fall = -1, last_lr_edge = -1, last_bclk = -1, n_req = 0, n_sine = 0;
  int bits, nbits;
  logic lr_q = 0, bclk_q = 0, req_q = 0;
  logic [15:0] cur;
  int sine_n = -1;
  logic [47:0] seen = '0;
  logic cur_test = 0;

  always @(negedge clk) if (rst_n) begin
    check(adclrck == daclrck, "ADC and DAC LR clocks equal");
    if (daclrck != lr_q) begin
      // LRCK edge: finish the previous word, start a new one
      if (last_lr_edge >= 0) begin
        check(cyc - last_lr_edge == 418 * 4, $sformatf("LRCK half period %0d", cyc - last_lr_edge));
        check(nbits == 15, $sformatf("%0d bits per half period", nbits));
        check(bits[14:0] == cur[15:1], $sformatf("serial word %h, expected %h", bits[14:0], cur[15:1]));
        if (cur_test) begin
          real expv;
          int e;
          expv = 32767.0 * $sin(2.0 * 3.14159265358979 * sine_n / 48.0);
          e = $rtoi(expv + (expv >= 0 ? 0.5 : -0.5));
          check((int'($signed(cur)) - e) <= 1 && (e - int'($signed(cur))) <= 1,
                $sformatf("sine point %0d: %0d vs %0d", sine_n, $signed(cur), e));
          n_sine++;
        end
      end
      cur = dut.shift_out;
      cur_test = test_mode;
      sine_n = int'(dut.sin_counter);     // sine point loaded at this edge
      if (cur_test) seen[sine_n] = 1'b1;
      if (!daclrck) begin
        if (last_lr_fall >= 0) check(cyc - last_lr_fall == 836 * 4, "LRCK period");
        last_lr_fall = cyc;
      end
      last_lr_edge = cyc;
      bits = 0; nbits = 0; last_bclk = -1;
    end
    if (bclk && !bclk_q) begin
      if (last_bclk >= 0) check(cyc - last_bclk == 27 * 4, $sformatf("BCLK period %0d", cyc - last_bclk));
      last_bclk = cyc;
      bits = (bits << 1) | dacdat;
      nbits++;
    end
    if (req && !req_q) begin
      n_req++;
      check(cyc - last_lr_fall > 0 && cyc - last_lr_fall <= 8, $sformatf("request %0d clocks after LRCK fall", cyc - last_lr_fall));
    end
    if (req && req_q) check(0, "request longer than one clock");
    lr_q = daclrck; bclk_q = bclk; req_q = req;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (836 * 4 * 20) @(negedge clk);
    check(n_req >= 19 && n_req <= 21, $sformatf("%0d requests in 20 sample periods", n_req));
    // test mode
    repeat (10) @(negedge clk);
    test_mode = 1;
    repeat (836 * 4 * 100) @(negedge clk);
    check(n_sine > 150, "sine samples checked");
    check(&seen, "all 48 sine points sent");
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
