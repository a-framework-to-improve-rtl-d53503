// pfif_dma_wr: DMA write engine of the services logic (FPGA DMA interface).
//
// On a `start` pulse it takes `words` 64-bit words from a valid/ready input
// stream and writes them to consecutive host main memory word addresses from
// `base`, one per cycle when the host-memory master accepts. Writes are posted:
// `busy` drops in the cycle after the last write has been accepted. Words that
// arrive while the engine is idle are held back (in_ready low). The stream
// protocol is this design's own.
module pfif_dma_wr
  import pfif_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [HMEM_AW-1:0] base,
  input  logic [31:0]        words,
  output logic               busy,
  // host-memory master
  output hmem_req_t          req,
  input  logic               req_ready,
  // input stream
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [HOST_W-1:0]  in_data
);
  logic [31:0]        left;
  logic [HMEM_AW-1:0] addr;
  logic               take;

  assign req.valid = busy && in_valid;
  assign req.we    = 1'b1;
  assign req.addr  = addr;
  assign req.wdata = in_data;
  assign in_ready  = busy && req_ready;
  assign take      = req.valid && req_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      left <= '0;
      addr <= '0;
    end else if (start && !busy) begin
      busy <= (words != 0);
      left <= words;
      addr <= base;
    end else if (take) begin
      left <= left - 1;
      addr <= addr + 1'b1;
      if (left == 1) busy <= 1'b0;
    end
  end
endmodule
