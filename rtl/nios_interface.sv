// nios_interface -- Avalon-MM slave through which software feeds the Ray FSM.
//
// Word address 0 holds the control bit (bit 0 of the written data); the Ray
// FSM starts a column on its rising edge. Word addresses 1 to 8 fill the 256-bit
// parameter block, address n writing bits 32n-1 .. 32(n-1):
//   1 player x, 2 player y, 3 distance step, 4 ray step x, 5 ray step y,
//   6 sky angle (bits 9:0), 8 column number (bits 31:22).
// A write to any other address clears the control bit. Every read returns the
// status word `hardware_data` (bit 0: Ray FSM ready, bits 11:4: frame rate),
// registered, one clock after the read strobe. All registers are in the
// 50 MHz processor clock domain; `ctrl` is delayed one clock after the write.
//
// Follows the design's register map. Own choice: the parameter block is
// cleared by reset.
module nios_interface (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         read,
  input  logic         write,
  input  logic         chipselect,
  input  logic [4:0]   address,
  input  logic [31:0]  writedata,
  output logic [31:0]  readdata,
  input  logic [31:0]  hardware_data,
  output logic         ctrl,
  output logic [255:0] nios_data
);
  logic control_store;

  always_ff @(posedge clk) begin
    ctrl <= control_store;
    if (!rst_n) begin
      readdata      <= '0;
      control_store <= 1'b0;
      nios_data     <= '0;
    end else if (chipselect) begin
      if (read) begin
        readdata <= hardware_data;
      end else if (write) begin
        if (address == 5'd0)
          control_store <= writedata[0];
        else if (address <= 5'd8)
          nios_data[32*(int'(address)-1) +: 32] <= writedata;
        else
          control_store <= 1'b0;
      end
    end
  end
endmodule
