// tb_sound_controller -- self-checking test of the sound Avalon slave.
//
// A software model answers each interrupt, after a random delay, by writing
// the next 8-bit sample. Checked:
//   - XCK period 4 clocks (12.5 MHz from 50 MHz)
//   - an interrupt is raised once per sample period (3344 clocks) and held
//     until the write; the LEDs show the waiting state meanwhile
//   - readdata returns the last sample written
//   - the sample goes out on the serial line, MSB first, as {sample, 0x00},
//     in the LRCK half-periods after it was written
//   - with no answer the interrupt stays raised
module tb_sound_controller;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic read = 0, write = 0, cs = 0, irq;
  logic [7:0] address = 0, readdata, writedata = 0;
  logic adclrck, daclrck, dacdat, bclk, xck;
  logic [15:0] led;

  sound_controller dut (.clk, .rst_n, .read, .write, .chipselect(cs), .address, .readdata,
                        .writedata, .irq, .aud_adclrck(adclrck), .aud_adcdat(1'b0),
                        .aud_daclrck(daclrck), .aud_dacdat(dacdat), .aud_bclk(bclk),
                        .aud_xck(xck), .led);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // XCK period
  int last_xck = -1;
  logic xck_q = 0;
  always @(negedge clk) if (rst_n) begin
    if (xck && !xck_q) begin
      if (last_xck >= 0) check(cyc - last_xck == 4, "XCK period");
      last_xck = cyc;
    end
    xck_q = xck;
  end

  // serial capture: 15 bits per LRCK half period
  logic lr_q = 0, bclk_q = 0;
  int bits = 0, nbits = 0;
  logic [7:0] words [$];
  always @(negedge clk) if (rst_n) begin
    if (daclrck != lr_q) begin
      if (nbits == 15) words.push_back(8'(bits >> 7));
      bits = 0; nbits = 0;
    end
    if (bclk && !bclk_q) begin bits = (bits << 1) | dacdat; nbits++; end
    lr_q = daclrck; bclk_q = bclk;
  end

  initial begin
    logic [7:0] s;
    int t_irq, last_irq = -1, n_irq = 0;
    logic [7:0] sent [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(led == 16'hF800, "idle LEDs");
    for (int n = 0; n < 30; n++) begin
      while (!irq) @(negedge clk);
      t_irq = cyc;
      if (last_irq >= 0) check(t_irq - last_irq == 3344, $sformatf("sample period %0d", t_irq - last_irq));
      last_irq = t_irq;
      n_irq++;
      repeat ($urandom_range(2, 1000)) begin
        @(negedge clk);
        check(irq == 1'b1, "interrupt held until answered");
      end
      check(led == 16'h000F, "waiting LEDs");
      s = 8'($urandom);
      cs = 1; write = 1; writedata = s;
      @(negedge clk);
      cs = 0; write = 0;
      sent.push_back(s);
      @(negedge clk);
      check(irq == 1'b0, "interrupt cleared by the write");
      cs = 1; read = 1;
      #1 check(readdata == s, "sample read back");
      @(negedge clk);
      cs = 0; read = 0;
    end
    // no answer: interrupt stays up for several periods
    while (!irq) @(negedge clk);
    repeat (3 * 3344) @(negedge clk);
    check(irq == 1'b1, "interrupt stays raised without an answer");
    // every sample written must appear on the serial line
    foreach (sent[i]) begin
      int found = 0;
      foreach (words[j]) if (words[j] == sent[i]) found = 1;
      check(found == 1, $sformatf("sample %h sent to the DAC", sent[i]));
    end
    check(n_irq == 30, "interrupt count");
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
