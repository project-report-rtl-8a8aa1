// tb_column_memory -- self-checking test of the double-buffered column store.
//
// Writes frames of 640 column words in a random column order, as the FIFO
// delivers them: the write strobe is the read request of the cycle before.
// The last word of a frame carries the vertical-blank bit and must swap the
// buffers. After each swap every column, in particular those around the bank
// switch points (482, 496, 510, 514, 527, 528, 542), is read back and must
// equal the word written for it one clock after the read address; the row
// number must come out with the same one-clock delay. While a frame is being
// written the displayed buffer must not change. Counts buffer swaps.
module tb_column_memory;
  import cudoom_pkg::*;
  logic clk = 0, rst_n = 0;
  always #20 clk = ~clk;

  col_word_t data, q;
  logic rd_req = 0, toggle;
  logic [9:0] rdaddress = 0, row_in = 0, row_out;

  column_memory dut (.clock(clk), .rst_n, .data, .rd_req, .rdaddress, .row_in, .row_out, .q, .toggle);

  int checks = 0, failures = 0, n_toggle = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  col_word_t frame [2][640];

  task automatic write_frame(input int f);
    int order [640];
    foreach (order[i]) order[i] = i;
    order.shuffle();
    // last column last, with the blank bit
    foreach (order[i]) if (order[i] == 639) begin order[i] = order[639]; order[639] = 639; end
    for (int i = 0; i < 640; i++) begin
      col_word_t w;
      w = col_word_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      w.col_addr = 10'(order[i]);
      w.vga_blank = (i == 639);
      frame[f][order[i]] = w;
      @(negedge clk);
      rd_req = 1;
      @(negedge clk);
      rd_req = 0;
      data = w;
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    @(negedge clk);
    @(negedge clk);
  endtask

  task automatic read_all(input int f);
    for (int c = 0; c < 640; c++) begin
      @(negedge clk);
      rdaddress = 10'(c);
      row_in = 10'($urandom_range(0, 524));
      @(posedge clk); #1;
      check(q == frame[f][c], $sformatf("frame %0d column %0d", f, c));
      check(row_out == row_in, "row delayed one clock");
    end
  endtask

  initial begin
    logic t0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      t0 = toggle;
      write_frame(f % 2);
      check(toggle != t0, "buffers swap after the blank word");
      if (toggle != t0) n_toggle++;
      read_all(f % 2);
    end
    // displayed buffer is stable while the next frame is written
    t0 = toggle;
    fork
      write_frame(0);
      begin
        for (int c = 0; c < 600; c++) begin
          @(negedge clk);
          rdaddress = 10'($urandom_range(0, 639));
          @(posedge clk); #1;
          if (toggle == t0) check(q == frame[1][rdaddress], "displayed buffer unchanged");
        end
      end
    join
    check(n_toggle == 4, "four swaps");
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
