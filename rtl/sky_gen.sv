// sky_gen -- shares the board's asynchronous 256K x 16 SRAM between the
// processor, which downloads the sky picture into it at start-up, and the
// VGA raster, which reads one sky pixel per clock while drawing.
//
// Avalon side (50 MHz): an 18-bit word address reaches the SRAM directly
// while `sram_mux` is 0; byte enables map to UB/LB. Writing to the last word
// address (0x3FFFF) also sets `sram_mux` from bit 0 of the written data; once
// it is 1 the SRAM belongs to the display.
// Display side: the sky picture is 1024 x 480 bytes, two pixels per 16-bit
// word, 512 words per row. The pixel for screen row `cur_row` and column
// angle `angle` is the word at row*512 + angle[9:1], low byte when angle[0]
// is 0, high byte otherwise. Because the angle wraps at 1024, the sky is a
// ring that turns with the player's view direction.
// The SRAM is asynchronous: `sky_pixel` follows `cur_row`, `angle` and the
// SRAM data with no clock (the SRAM's read time is at most 15 ns); the VGA
// raster latches it one clock later.
//
// The SRAM data bus is bidirectional on the board; here it is split into
// `sram_dq_o`, `sram_dq_oe` (drive enable) and `sram_dq_i`, and the board-level
// tristate buffer sits outside. Follows the design; the split bus and the
// reset of `sram_mux` to processor ownership are this implementation's.
module sky_gen (
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave
  input  logic        read,
  input  logic        write,
  input  logic        chipselect,
  input  logic [17:0] address,
  output logic [15:0] readdata,
  input  logic [15:0] writedata,
  input  logic [1:0]  byteenable,
  // SRAM pins
  output logic [17:0] sram_addr,
  output logic [15:0] sram_dq_o,
  output logic        sram_dq_oe,
  input  logic [15:0] sram_dq_i,
  output logic        sram_ub_n,
  output logic        sram_lb_n,
  output logic        sram_we_n,
  output logic        sram_ce_n,
  output logic        sram_oe_n,
  // display side
  input  logic [9:0]  cur_row,
  input  logic [9:0]  angle,
  output logic [7:0]  sky_pixel,
  output logic        sram_mux
);
  localparam logic [17:0] MUX_REG_ADDR = 18'h3FFFF;

  always_ff @(posedge clk) begin
    if (!rst_n) sram_mux <= 1'b0;
    else if (chipselect && write && address == MUX_REG_ADDR) sram_mux <= writedata[0];
  end

  logic [17:0] vga_addr;
  assign vga_addr = 18'({cur_row, 9'd0} + {10'd0, angle[9:1]});

  always_comb begin
    if (!sram_mux) begin
      sram_addr  = address;
      sram_dq_o  = writedata;
      sram_dq_oe = write;
      sram_ub_n  = ~byteenable[1];
      sram_lb_n  = ~byteenable[0];
      sram_we_n  = ~write;
      sram_ce_n  = ~chipselect;
      sram_oe_n  = ~read;
    end else begin
      sram_addr  = vga_addr;
      sram_dq_o  = writedata;
      sram_dq_oe = 1'b0;
      sram_ub_n  = 1'b0;
      sram_lb_n  = 1'b0;
      sram_we_n  = 1'b1;
      sram_ce_n  = 1'b0;
      sram_oe_n  = 1'b0;
    end
  end

  assign readdata  = sram_dq_i;
  assign sky_pixel = angle[0] ? sram_dq_i[15:8] : sram_dq_i[7:0];
endmodule
