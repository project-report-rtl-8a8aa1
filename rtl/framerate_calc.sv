// framerate_calc -- measures frames per second from the column number that
// software writes for each ray.
//
// A frame is counted each time the column number leaves the last column
// (MAX_COLUMN - 1). Every CLOCK_1_SECOND clocks the count is copied to
// `frame_rate` and cleared. The result is read by software through the status
// word of the Ray FSM's Avalon slave.
//   COUNT    counts clocks; last column seen -> IN_LAST; one second -> PUBLISH
//   IN_LAST  waits until the column number changes, then counts one frame
//   PUBLISH  frame_rate = count, clock counter cleared
//   CLEAR    frame count cleared
// Follows the design. Own choices: synchronous reset; the second ends at the
// first clock in COUNT at or after CLOCK_1_SECOND (not only at equality), so
// a tick that falls while the last column is held is delayed, not lost.
module framerate_calc #(
  parameter int unsigned CLOCK_1_SECOND = 50_000_000,
  parameter int unsigned MAX_COLUMN     = 640
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] wr_addr,
  output logic [7:0] frame_rate
);
  typedef enum logic [1:0] {COUNT, PUBLISH, CLEAR, IN_LAST} state_t;
  state_t state;
  logic [7:0]  frame_count;
  logic [25:0] clk_count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= COUNT; frame_count <= '0; clk_count <= '0; frame_rate <= '0;
    end else begin
      clk_count <= clk_count + 26'd1;
      unique case (state)
        COUNT:
          if (32'(clk_count) >= CLOCK_1_SECOND)     state <= PUBLISH;
          else if (32'(wr_addr) == MAX_COLUMN - 1)  state <= IN_LAST;
        PUBLISH: begin
          frame_rate <= frame_count;
          clk_count  <= '0;
          state      <= CLEAR;
        end
        CLEAR: begin
          frame_count <= '0;
          state       <= COUNT;
        end
        IN_LAST:
          if (32'(wr_addr) != MAX_COLUMN - 1) begin
            frame_count <= frame_count + 8'd1;
            state       <= COUNT;
          end
        default: state <= COUNT;
      endcase
    end
  end
endmodule
