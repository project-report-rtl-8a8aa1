// tb_framerate_calc -- self-checking test of the frame-rate counter.
//
// With a shortened second (CLOCK_1_SECOND = 2000 clocks) the column number is
// driven through N complete frames per second, N random; after each second
// the published rate must equal the number of frames finished in it, and the
// publish must happen every CLOCK_1_SECOND + 2 clocks. A second that ends
// while the last column is held must still be published.
module tb_framerate_calc;
  localparam int SEC = 2000;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  logic [9:0] wr_addr = 0;
  logic [7:0] rate;

  framerate_calc #(.CLOCK_1_SECOND(SEC), .MAX_COLUMN(640)) dut (.clk, .rst_n, .wr_addr, .frame_rate(rate));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // state encoding of the DUT: COUNT, PUBLISH, CLEAR, IN_LAST
  localparam logic [1:0] ST_COUNT = 2'd0, ST_PUBLISH = 2'd1, ST_CLEAR = 2'd2;
  logic [1:0] st;
  assign st = dut.state;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // publish detector
  int last_pub = -1, n_pub = 0;
  always @(posedge clk) if (st == ST_PUBLISH) begin
    if (last_pub >= 0 && n_pub < 6) check(cyc - last_pub == SEC + 2, $sformatf("second length %0d", cyc - last_pub));
    last_pub = cyc;
    n_pub++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 5; s++) begin
      int n;
      n = $urandom_range(1, 9);
      // wait for the start of a second
      do @(posedge clk); while (st != ST_CLEAR);
      @(negedge clk);
      for (int f = 0; f < n; f++) begin
        wr_addr = 10'd639;
        repeat (20) @(negedge clk);
        wr_addr = 10'd0;
        repeat (50) @(negedge clk);
      end
      do @(posedge clk); while (st != ST_PUBLISH);
      @(negedge clk);
      check(rate == 8'(n), $sformatf("rate %0d, expected %0d", rate, n));
    end
    // hold the last column across the end of a second
    do @(posedge clk); while (st != ST_CLEAR);
    @(negedge clk);
    wr_addr = 10'd639;
    repeat (SEC + 100) @(negedge clk);
    wr_addr = 10'd1;
    repeat (20) @(negedge clk);
    check(st == ST_COUNT, "back to counting");
    check(rate == 8'd1, $sformatf("held frame published, rate %0d", rate));
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
