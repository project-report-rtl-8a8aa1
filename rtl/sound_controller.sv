// sound_controller -- Avalon-MM slave that feeds 8-bit audio samples from the
// processor to the WM8731 serialiser, one interrupt per sample.
//
// State machine (50 MHz):
//   IDLE     waits for the serialiser's sample request; on it raises `irq`
//            and goes to WAITING.
//   WAITING  keeps `irq` high until the processor writes (chipselect and
//            write); the written byte is stored, `irq` drops and the FSM
//            returns to IDLE.
// The stored byte becomes the top half of the 16-bit sample sent to the DAC
// (low byte zero). The codec master clock AUD_XCK is the system clock divided
// by 4; the serialiser runs on the system clock with an enable at that rate.
// `led` shows the state (0xF800 in IDLE, 0x000F in WAITING) and a read
// returns the stored byte.
//
// Follows the design's two-state interrupt handshake. Own choices: the
// clock-enable scheme and the read-back of the stored byte.
module sound_controller (
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave
  input  logic        read,
  input  logic        write,
  input  logic        chipselect,
  input  logic [7:0]  address,
  output logic [7:0]  readdata,
  input  logic [7:0]  writedata,
  output logic        irq,
  // codec pins
  output logic        aud_adclrck,
  input  logic        aud_adcdat,
  output logic        aud_daclrck,
  output logic        aud_dacdat,
  output logic        aud_bclk,
  output logic        aud_xck,
  output logic [15:0] led
);
  typedef enum logic {IDLE, WAITING} state_t;
  state_t state;

  logic [1:0]  audio_clock;
  logic [7:0]  indata;
  logic [15:0] data_to_music;
  logic        audio_request;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      audio_clock   <= '0;
      data_to_music <= '0;
    end else begin
      audio_clock   <= audio_clock + 2'd1;
      data_to_music <= {indata, 8'h00};
    end
  end
  assign aud_xck = audio_clock[1];

  wm8731_audio u_dac (
    .clk, .ce(audio_clock == 2'd3), .rst_n, .test_mode(1'b0),
    .audio_request, .data(data_to_music),
    .aud_adclrck, .aud_daclrck, .aud_dacdat, .aud_bclk
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= IDLE;
      irq    <= 1'b0;
      indata <= '0;
      led    <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          led <= 16'hF800;
          if (audio_request) begin
            state <= WAITING;
            irq   <= 1'b1;
          end else begin
            irq <= 1'b0;
          end
        end
        WAITING: begin
          led <= 16'h000F;
          if (write && chipselect) begin
            indata <= writedata;
            irq    <= 1'b0;
            state  <= IDLE;
          end else begin
            irq <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign readdata = indata;
endmodule
