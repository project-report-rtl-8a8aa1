// sram_model -- behavioural model of a 256K x 16 asynchronous SRAM with
// separate data-in / data-out buses (the tristate bus split as in the design's
// top level). Reads are combinational while CE and OE are low; a write stores
// the bytes selected by UB/LB while CE and WE are low, sampled on the given
// clock. Test-bench only.
module sram_model (
  input  logic        clk,
  input  logic [17:0] addr,
  input  logic [15:0] dq_in,
  input  logic        dq_oe,
  output logic [15:0] dq_out,
  input  logic        ub_n,
  input  logic        lb_n,
  input  logic        we_n,
  input  logic        ce_n,
  input  logic        oe_n
);
  logic [15:0] mem [262144];

  always @(posedge clk)
    if (!ce_n && !we_n && dq_oe) begin
      if (!ub_n) mem[addr][15:8] <= dq_in[15:8];
      if (!lb_n) mem[addr][7:0]  <= dq_in[7:0];
    end

  assign dq_out = (!ce_n && !oe_n && we_n) ? mem[addr] : 16'hxxxx;
endmodule
