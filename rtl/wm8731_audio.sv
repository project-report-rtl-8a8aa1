// wm8731_audio -- serialiser for the WM8731 audio DAC in left-justified mode.
//
// All registers advance only on clocks where `ce` is high; `ce` marks the
// edges of the codec master clock (the sound controller supplies one every
// fourth system clock, making 12.5 MHz from 50 MHz). Counted in those ticks:
//   LRCK toggles every LRCK_HALF ticks (418: one sample period is 836 ticks).
//   BCLK is rebuilt from a 27-tick counter restarted at each LRCK toggle:
//        it rises at count 12 and falls at count 25.
//   At each LRCK toggle the 16-bit sample (or, in test mode, the next value
//        of a 48-point sine) is loaded into the shift register; it shifts
//        left at each BCLK fall, and its MSB is the DAC data line.
//   `audio_request` pulses for one clock (on a `ce` clock) after each falling
//        edge of LRCK, asking for the next sample while the right channel is
//        sent.
// Follows the design's divider values, BCLK points and request rule. Own
// choices: a clock enable instead of a divided clock; the sine is built from
// a 13-entry quarter wave with exact two's complement negatives.
module wm8731_audio #(
  parameter int unsigned LRCK_HALF = 418,
  parameter int unsigned BCLK_LAST = 26,
  parameter int unsigned BCLK_RISE = 12,
  parameter int unsigned BCLK_FALL = 25
) (
  input  logic        clk,
  input  logic        ce,
  input  logic        rst_n,
  input  logic        test_mode,
  output logic        audio_request,
  input  logic [15:0] data,
  output logic        aud_adclrck,
  output logic        aud_daclrck,
  output logic        aud_dacdat,
  output logic        aud_bclk
);
  logic [11:0] lrck_div;
  logic [7:0]  bclk_div;
  logic        lrck, bclk, lrck_lat;
  logic [15:0] shift_out;
  logic [5:0]  sin_counter;

  wire set_lrck = (32'(lrck_div) == LRCK_HALF - 1);
  wire set_bclk = (32'(bclk_div) == BCLK_RISE);
  wire clr_bclk = (32'(bclk_div) == BCLK_FALL);

  // quarter-wave sine, 32767 * sin(2*pi*k/48), k = 0..12
  function automatic logic [15:0] quarter(input logic [3:0] k);
    unique case (k)
      4'd0: return 16'h0000;  4'd1: return 16'h10b4;  4'd2: return 16'h2120;
      4'd3: return 16'h30fb;  4'd4: return 16'h3fff;  4'd5: return 16'h4deb;
      4'd6: return 16'h5a81;  4'd7: return 16'h658b;  4'd8: return 16'h6ed9;
      4'd9: return 16'h7640;  4'd10: return 16'h7ba2; 4'd11: return 16'h7ee6;
      default: return 16'h7fff;
    endcase
  endfunction

  function automatic logic [15:0] sine48(input logic [5:0] n);
    logic [5:0] m;
    logic [15:0] v;
    m = (n >= 6'd24) ? n - 6'd24 : n;
    v = (m <= 6'd12) ? quarter(m[3:0]) : quarter(4'(6'd24 - m));
    return (n >= 6'd24) ? 16'(-v) : v;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lrck_div <= '0; bclk_div <= '0; lrck <= 1'b0; bclk <= 1'b0;
      shift_out <= '0; sin_counter <= '0; lrck_lat <= 1'b0;
    end else if (ce) begin
      lrck_div <= set_lrck ? '0 : lrck_div + 12'd1;
      bclk_div <= (32'(bclk_div) == BCLK_LAST || set_lrck) ? '0 : bclk_div + 8'd1;
      if (set_lrck) lrck <= ~lrck;
      if (set_lrck || clr_bclk) bclk <= 1'b0;
      else if (set_bclk)        bclk <= 1'b1;
      if (set_lrck)      shift_out <= test_mode ? sine48(sin_counter) : data;
      else if (clr_bclk) shift_out <= {shift_out[14:0], 1'b0};
      lrck_lat <= lrck;
      if (lrck_lat && !lrck) sin_counter <= (sin_counter == 6'd47) ? '0 : sin_counter + 6'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) audio_request <= 1'b0;
    else        audio_request <= ce && lrck_lat && !lrck;
  end

  assign aud_adclrck = lrck;
  assign aud_daclrck = lrck;
  assign aud_dacdat  = shift_out[15];
  assign aud_bclk    = bclk;
endmodule
