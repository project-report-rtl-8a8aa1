// column_fifo -- dual-clock FIFO carrying column words from the 50 MHz Ray FSM
// to the 25 MHz column memory.
//
// Write side (wclk): `wrreq` stores `data` unless the FIFO is full; `wrfull`
// is high while no entry is free. Read side (rclk): `rdreq` pops the oldest
// entry, which appears on `q` one clock later (registered output, not
// show-ahead); `rdempty` is high while nothing can be read. The read and write
// pointers cross between the clock domains in Gray code through two-flop
// synchronisers, so `wrfull` and `rdempty` are pessimistic for two clocks of
// the other domain after a change.
//
// The design names only the function (a FIFO between the two clock domains,
// with WRFULL, WRREQ, RDREQ, RDEMPTY); the Gray-code structure and the depth
// of 16 words are this implementation's choices.
module column_fifo #(
  parameter int unsigned WIDTH = 256,
  parameter int unsigned DEPTH = 16      // power of two
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wrreq,
  input  logic [WIDTH-1:0] data,
  output logic             wrfull,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rdreq,
  output logic [WIDTH-1:0] q,
  output logic             rdempty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  wire [AW:0] wbin_next = wbin + (AW+1)'(wrreq && !wrfull);
  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      if (wrreq && !wrfull) mem[wbin[AW-1:0]] <= data;
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  assign wrfull = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read domain
  wire [AW:0] rbin_next = rbin + (AW+1)'(rdreq && !rdempty);
  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0; q <= '0;
    end else begin
      if (rdreq && !rdempty) q <= mem[rbin[AW-1:0]];
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign rdempty = (rgray == wgray_r2);

  // The writer must not offer a word while the FIFO is full.
  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n) wrreq |-> !wrfull);
endmodule
