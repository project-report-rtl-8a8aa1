// ps2_rx -- receive-only PS/2 serial interface.
//
// The keyboard clock is filtered with an 8-bit shift register: eight equal
// samples in a row set the filtered clock, and a 1-to-0 change of the filtered
// clock gives a one-clock `fall` strobe. The data line is registered once. On
// each fall the receiver takes a frame of start bit (0), eight data bits (LSB
// first), odd parity and stop bit (1). At the stop bit the byte is presented on
// `scan_code`, `scan_dav` is set and `scan_err` reports bad parity, a missing
// stop bit or a byte that overwrote one not yet read. `do_read` clears
// `scan_dav`.
//
// Follows the design's receiver. Own choice: none beyond the SystemVerilog
// form.
module ps2_rx (
  input  logic       clk,
  input  logic       reset,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  input  logic       do_read,
  output logic       scan_err,
  output logic       scan_dav,
  output logic [7:0] scan_code
);
  typedef enum logic {IDLE, SHIFTING} state_t;
  state_t state;

  logic       data_r, clk_f, fall;
  logic [7:0] filter;
  logic [3:0] bit_cnt;
  logic       parity;
  logic [8:0] s_reg;

  always_ff @(posedge clk) begin
    if (reset) begin
      data_r <= 1'b0; clk_f <= 1'b0; filter <= '0; fall <= 1'b0;
    end else begin
      data_r <= ps2_data;
      fall   <= 1'b0;
      filter <= {ps2_clk, filter[7:1]};
      if (filter == 8'hFF) begin
        clk_f <= 1'b1;
      end else if (filter == 8'h00) begin
        clk_f <= 1'b0;
        if (clk_f) fall <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= IDLE; bit_cnt <= '0; s_reg <= '0; scan_code <= '0;
      parity <= 1'b0; scan_dav <= 1'b0; scan_err <= 1'b0;
    end else begin
      if (do_read) scan_dav <= 1'b0;
      unique case (state)
        IDLE: begin
          parity  <= 1'b0;
          bit_cnt <= '0;
          if (fall && !data_r) begin
            scan_err <= 1'b0;
            state    <= SHIFTING;
          end
        end
        SHIFTING: begin
          if (bit_cnt >= 4'd9) begin
            if (fall) begin
              scan_err  <= !parity || !data_r || scan_dav;
              scan_dav  <= 1'b1;
              scan_code <= s_reg[7:0];
              state     <= IDLE;
            end
          end else if (fall) begin
            bit_cnt <= bit_cnt + 4'd1;
            s_reg   <= {data_r, s_reg[8:1]};
            parity  <= parity ^ data_r;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
