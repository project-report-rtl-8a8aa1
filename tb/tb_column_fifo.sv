// tb_column_fifo -- self-checking test of the dual-clock column FIFO.
//
// A 50 MHz writer pushes random 256-bit words whenever the FIFO is not full
// (and sometimes pauses); a 25 MHz reader pops with rdreq = not empty, as in
// the design, and sometimes pauses so the FIFO fills. Every word must come out
// once, in order, one read clock after its read request. The test counts
// full and empty events and requires both. Depth is checked by filling the
// FIFO with the reader stopped: exactly DEPTH words are accepted.
module tb_column_fifo;
  localparam int DEPTH = 16;
  logic wclk = 0, rclk = 0, rst_n = 0;
  always #10 wclk = ~wclk;
  always #20 rclk = ~rclk;

  logic wrreq = 0, rdreq, wrfull, rdempty;
  logic [255:0] data, q;
  logic rd_en = 0;

  column_fifo #(.WIDTH(256), .DEPTH(DEPTH)) dut (
    .wclk, .wrst_n(rst_n), .wrreq, .data, .wrfull,
    .rclk, .rrst_n(rst_n), .rdreq, .q, .rdempty);

  assign rdreq = rd_en && !rdempty;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [255:0] sent [$];
  int n_full = 0, n_empty = 0, n_recv = 0, n_sent = 0;
  logic rd_d = 0;

  function automatic logic [255:0] rnd256();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  always @(posedge rclk) begin
    rd_d <= rdreq;
    if (rd_d) begin
      check(sent.size() > 0 && q == sent[0], "word order and value");
      if (sent.size() > 0) void'(sent.pop_front());
      n_recv++;
    end
  end

  initial begin
    repeat (3) @(negedge rclk);
    rst_n = 1;
    // depth: reader stopped
    repeat (2) @(negedge wclk);
    for (int i = 0; i < 40; i++) begin
      @(negedge wclk);
      wrreq = !wrfull;
      data = rnd256();
      if (wrreq) begin sent.push_back(data); n_sent++; end
    end
    @(negedge wclk) wrreq = 0;
    check(n_sent == DEPTH, $sformatf("FIFO accepts %0d words when not read", n_sent));
    check(wrfull, "full flag set");
    n_full++;
    rd_en = 1;
    // streaming with random pauses on both sides
    for (int i = 0; i < 3000; i++) begin
      @(negedge wclk);
      if (wrfull) n_full++;
      wrreq = !wrfull && ($urandom_range(0, 3) != 0);
      data = rnd256();
      if (wrreq) begin sent.push_back(data); n_sent++; end
      if (i % 400 == 0) rd_en = ~rd_en;
      if (i > 2900) rd_en = 1;
    end
    @(negedge wclk) wrreq = 0;
    rd_en = 1;
    repeat (100) @(negedge rclk) if (rdempty) n_empty++;
    check(n_recv == n_sent, $sformatf("received %0d of %0d", n_recv, n_sent));
    check(sent.size() == 0, "nothing left over");
    check(n_full > 1 && n_empty > 0, "full and empty both seen");
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
