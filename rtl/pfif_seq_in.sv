// pfif_seq_in: Sequential IN logical memory bank.
//
// Source data the host leaves in its main memory are fetched by a DMA read
// engine and handed to the IP in order, from the first word on; the IP sees no
// address. The IP pulses rd_cmd to take the next word, which appears on rd_data
// with rd_data_vld one cycle later; rd_avail tells it a word is waiting, and a
// rd_cmd while rd_avail is low is ignored. The transfer (host word address,
// count of 64-bit host words) is started by the framework controller with
// `start`.
//
// The IP word width DW is the user's choice:
//   * DW = 8, 16 or 32: each 64-bit host word gives 64/DW IP words, the least
//     significant slice first;
//   * DW = 64: one host word per IP word;
//   * DW a multiple of 64: DW/64 consecutive host words are gathered into one
//     IP word, the first host word in the least significant bits.
// The host word count should be a whole number of IP words for DW > 64; a
// partial last group is never presented. Sequential access without an address,
// from the first word and in order, with a user-chosen width, follows the
// document; slice order, rd_avail and the one-cycle latency are this design's.
module pfif_seq_in
  import pfif_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned DW         = 64
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [HMEM_AW-1:0] base,
  input  logic [31:0]        words,
  output logic               busy,
  // host-memory master
  output hmem_req_t          req,
  input  logic               req_ready,
  input  logic               rsp_valid,
  input  logic [HOST_W-1:0]  rsp_data,
  // IP port
  output logic               rd_avail,
  input  logic               rd_cmd,
  output logic [DW-1:0]      rd_data,
  output logic               rd_data_vld
);
  localparam int unsigned R  = (DW < HOST_W) ? HOST_W / DW : 1;   // IP words per host word
  localparam int unsigned K  = (DW > HOST_W) ? DW / HOST_W : 1;   // host words per IP word
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1;
  localparam int unsigned KW = $clog2(K + 1);

  logic [HOST_W-1:0] head;
  logic              h_valid, h_ready, take;

  pfif_dma_rd #(.FIFO_DEPTH(FIFO_DEPTH)) u_dma (
    .clk, .rst, .start, .base, .words, .busy,
    .req, .req_ready, .rsp_valid, .rsp_data,
    .out_valid(h_valid), .out_ready(h_ready), .out_data(head)
  );

  assign take = rd_cmd && rd_avail;

  always_ff @(posedge clk) begin
    if (rst) rd_data_vld <= 1'b0;
    else     rd_data_vld <= take;
  end

  if (DW <= HOST_W) begin : g_narrow
    logic [RW-1:0] sub;
    assign rd_avail = h_valid;
    assign h_ready  = take && (32'(sub) == R - 1);
    always_ff @(posedge clk) begin
      if (rst || start) sub <= '0;
      else if (take)    sub <= (32'(sub) == R - 1) ? '0 : sub + 1'b1;
      if (rst)       rd_data <= '0;
      else if (take) rd_data <= head[32'(sub) * DW +: DW];
    end
  end else begin : g_wide
    logic [DW-1:0] gath;
    logic [KW-1:0] cnt;
    logic          fill;
    assign rd_avail = (32'(cnt) == K);
    // a host word enters while the group is incomplete, or into the first slot
    // in the cycle the complete group is taken
    assign h_ready = (32'(cnt) < K) || take;
    assign fill    = h_valid && h_ready;
    always_ff @(posedge clk) begin
      if (rst || start) begin
        cnt  <= '0;
        gath <= '0;
      end else if (take) begin
        cnt <= fill ? KW'(1) : '0;
        if (fill) gath[HOST_W-1:0] <= head;
      end else if (fill) begin
        cnt <= cnt + 1'b1;
        gath[32'(cnt) * HOST_W +: HOST_W] <= head;
      end
      if (rst)       rd_data <= '0;
      else if (take) rd_data <= gath;
    end
  end

  initial assert (DW == HOST_W || (DW < HOST_W && HOST_W % DW == 0) || DW % HOST_W == 0)
    else $error("DW must divide 64 or be a multiple of 64");
endmodule
