// sram_model: behavioural model of one vendor local memory module, a synchronous
// SRAM of DEPTH 64-bit words with byte write enables. A read sampled at a clock
// edge returns its word LAT clock edges later on rdata, with no valid flag, like
// a pipelined board SRAM. Not synthesizable as a board part; used by testbenches.
module sram_model #(
  parameter int unsigned DEPTH = 512 * 1024,
  parameter int unsigned LAT   = 8,
  parameter int unsigned AW    = 19
) (
  input  logic          clk,
  input  logic          rd,
  input  logic          wr,
  input  logic [AW-1:0] addr,
  input  logic [63:0]   wdata,
  input  logic [7:0]    be,
  output logic [63:0]   rdata
);
  logic [63:0] mem [DEPTH];
  logic [63:0] pipe [LAT];

  always_ff @(posedge clk) begin
    if (wr)
      for (int b = 0; b < 8; b++)
        if (be[b]) mem[addr][b*8 +: 8] <= wdata[b*8 +: 8];
    pipe[0] <= rd ? mem[addr] : 64'h0;
    for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
  end
  assign rdata = pipe[LAT-1];
endmodule
