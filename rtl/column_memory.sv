// column_memory -- double-buffered store of the 640 column words, written from
// the FIFO and read by the display pipeline.
//
// Two buffers (1 and 2) each hold one frame of column words. While one is
// written the other is read; a word whose vga_blank bit is set (the last
// column of a frame, written during vertical blank) swaps them after it is
// written. Writes need no address or write enable of their own: `rd_req`
// (the FIFO's read request, i.e. "FIFO not empty") is delayed one clock to
// become the write enable, which lines it up with the FIFO's registered
// output, and the column number inside the word is the write address.
//
// Each buffer is built from three single-port RAMs, as the board's block RAM
// only comes in powers of two:
//   A  512 words, written for columns 0-509,   read for columns 0-495
//   B  128 words, written for columns 514-639, read for columns 528-639
//   C   64 words (patch), written for columns 482-541, read for 496-527
// so no bank is switched at column 512 where every address bit flips, and at
// each read switch point the two banks hold the same word. Bank C uses the low
// six address bits, bank B the low seven, bank A the low nine.
//
// Read timing: `rdaddress` and `row_in` are sampled at a clock edge; `q` (the
// word of that column, from the buffer not being written) and `row_out` are
// valid after that edge. All of the module runs on the 25 MHz pixel clock.
//
// Follows the design: bank sizes, the patch bank and all switch points.
// Own choice: reset of the buffer-select flip-flop.
module column_memory
  import cudoom_pkg::*;
#(
  parameter int unsigned W_A_END   = 510,   // A written below this column
  parameter int unsigned W_B_START = 514,   // B written from this column
  parameter int unsigned W_C_START = 482,   // C written in [W_C_START, W_C_END)
  parameter int unsigned W_C_END   = 542,
  parameter int unsigned R_A_END   = 496,   // A read below this column
  parameter int unsigned R_B_START = 528    // B read from this column
) (
  input  logic       clock,
  input  logic       rst_n,
  input  col_word_t  data,
  input  logic       rd_req,
  input  logic [9:0] rdaddress,
  input  logic [9:0] row_in,
  output logic [9:0] row_out,
  output col_word_t  q,
  output logic       toggle        // 1: buffer 1 written, buffer 2 read
);
  typedef enum logic [1:0] {BANK_A, BANK_B, BANK_C} bank_t;

  logic  wren;
  bank_t rd_bank;
  logic  rd_buf;               // buffer read for the word now on q (1 or 2 -> 0/1)
  wire [9:0] wraddress = data.col_addr;

  // per buffer (index 0 = buffer 1, 1 = buffer 2) and per bank
  logic [8:0]   addr_a [2];
  logic [6:0]   addr_b [2];
  logic [5:0]   addr_c [2];
  logic         we_a [2], we_b [2], we_c [2];
  logic [255:0] q_a [2], q_b [2], q_c [2];

  always_ff @(posedge clock) begin
    if (!rst_n) begin
      toggle  <= 1'b1;
      wren    <= 1'b0;
      row_out <= '0;
      rd_bank <= BANK_A;
      rd_buf  <= 1'b1;
    end else begin
      if (wren && data.vga_blank) toggle <= ~toggle;
      wren    <= rd_req;
      row_out <= row_in;
      rd_buf  <= toggle;        // toggle = 1: read buffer 2
      if (32'(rdaddress) < R_A_END)         rd_bank <= BANK_A;
      else if (32'(rdaddress) >= R_B_START) rd_bank <= BANK_B;
      else                                  rd_bank <= BANK_C;
    end
  end

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      // buffer b is written when toggle selects it (toggle = 1 writes buffer 1)
      logic wsel;
      logic [9:0] a;
      wsel = (toggle == (b == 0));
      a    = wsel ? wraddress : rdaddress;
      addr_a[b] = a[8:0];
      addr_b[b] = a[6:0];
      addr_c[b] = a[5:0];
      we_a[b] = wsel && wren && (32'(wraddress) < W_A_END);
      we_b[b] = wsel && wren && (32'(wraddress) >= W_B_START);
      we_c[b] = wsel && wren && (32'(wraddress) >= W_C_START) && (32'(wraddress) < W_C_END);
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_buf
    column_ram #(.WIDTH(256), .WORDS(512)) u_a (
      .clock, .address(addr_a[b]), .data(data), .wren(we_a[b]), .q(q_a[b]));
    column_ram #(.WIDTH(256), .WORDS(128)) u_b (
      .clock, .address(addr_b[b]), .data(data), .wren(we_b[b]), .q(q_b[b]));
    column_ram #(.WIDTH(256), .WORDS(64)) u_c (
      .clock, .address(addr_c[b]), .data(data), .wren(we_c[b]), .q(q_c[b]));
  end

  always_comb begin
    unique case (rd_bank)
      BANK_A:  q = q_a[rd_buf];
      BANK_B:  q = q_b[rd_buf];
      default: q = q_c[rd_buf];
    endcase
  end
endmodule
