// keyboard_controller -- Avalon-MM slave that holds the keyboard's last key
// for the game software, which polls it.
//
// Register 0 (address 0): bit 0 = a scan code has been received.
// Register 1 (address 1): the key register; reading it also clears the
// receiver's data-available flag.
// The key register follows the received scan code, and a small state machine
// marks key releases: after a break prefix (0xF0) the next scan code is stored
// minus 32, so software sees a press as one code and the release of the same
// key as a code 32 lower (for letters, the lower-case and upper-case ASCII of
// the scan code byte), held until a different scan code arrives.
//   WAIT_BREAK  key register = scan code; 0xF0 received -> AFTER_BREAK
//   AFTER_BREAK key register = scan code; next code -> RELEASED
//   RELEASED    key register = scan code - 32, until a new, different code
//               has arrived, then back to WAIT_BREAK
// Reads are combinational. Follows the design.
module keyboard_controller (
  input  logic       clk,
  input  logic       reset,
  input  logic       address,
  input  logic       read,
  input  logic       chipselect,
  output logic [7:0] readdata,
  input  logic       ps2_clk,
  input  logic       ps2_data
);
  typedef enum logic [1:0] {WAIT_BREAK, AFTER_BREAK, RELEASED} state_t;
  state_t state;

  logic [7:0] data, data_in, data_lock;
  logic       dav, dav_in, seen, do_read, scan_err;

  ps2_rx u_rx (
    .clk, .reset, .ps2_clk, .ps2_data, .do_read,
    .scan_err, .scan_dav(dav_in), .scan_code(data_in)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= WAIT_BREAK; data <= '0; data_lock <= '0; seen <= 1'b0;
      do_read <= 1'b0; dav <= 1'b0;
    end else begin
      do_read   <= read && chipselect && address;
      dav       <= dav_in;
      data_lock <= data_in;
      unique case (state)
        WAIT_BREAK: begin
          data <= data_in;
          seen <= 1'b0;
          if (data_in == 8'hF0 && dav_in) state <= AFTER_BREAK;
        end
        AFTER_BREAK: begin
          data <= data_in;
          seen <= 1'b0;
          if (!(data_in == 8'hF0 && dav_in)) state <= RELEASED;
        end
        RELEASED: begin
          data <= data_in - 8'd32;
          if (dav_in) seen <= 1'b1;
          if (data_lock != data_in && seen) state <= WAIT_BREAK;
        end
        default: state <= WAIT_BREAK;
      endcase
    end
  end

  always_comb begin
    if (!chipselect)  readdata = '0;
    else if (address) readdata = data;
    else              readdata = {7'd0, dav};
  end
endmodule
