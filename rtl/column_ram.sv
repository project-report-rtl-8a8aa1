// column_ram -- single-port synchronous RAM used for the banks of the column
// memory. One port serves both reads and writes: on each clock the word at
// `address` is read into `q` (available after the clock edge, one clock of
// latency) and, if `wren` is high, `data` is written there (read-during-write
// returns the old word). Maps onto FPGA block RAM.
module column_ram #(
  parameter int unsigned WIDTH = 256,
  parameter int unsigned WORDS = 512
) (
  input  logic                     clock,
  input  logic [$clog2(WORDS)-1:0] address,
  input  logic [WIDTH-1:0]         data,
  input  logic                     wren,
  output logic [WIDTH-1:0]         q
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clock) begin
    if (wren) mem[address] <= data;
    q <= mem[address];
  end
endmodule
