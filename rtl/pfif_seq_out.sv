// pfif_seq_out: Sequential OUT logical memory bank.
//
// Result words the IP writes, in order and without an address, are buffered in
// a FIFO and written by a DMA write engine to consecutive words of host main
// memory. The IP pulses wr_cmd with wr_data while wr_ready is high (a write while
// wr_ready is low is dropped and flagged by an assertion). The transfer (host
// word address, count of 64-bit host words) is started by the framework
// controller with `start`; `busy` stays high until the last host word has been
// handed to the host.
//
// The IP word width DW is the user's choice:
//   * DW = 8, 16 or 32: 64/DW IP words are packed into one host word, the first
//     in the least significant slice, before the FIFO;
//   * DW = 64: one host word per IP word;
//   * DW a multiple of 64: the FIFO holds whole IP words and each is sent as
//     DW/64 host words, least significant first.
// For DW < 64 the IP must write a whole number of host words: a partial last
// host word is never sent. Sequential access with a user-chosen width follows
// the document; the packing order and wr_ready are this design's.
module pfif_seq_out
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
  // IP port
  output logic               wr_ready,
  input  logic               wr_cmd,
  input  logic [DW-1:0]      wr_data
);
  localparam int unsigned R  = (DW < HOST_W) ? HOST_W / DW : 1;   // IP words per host word
  localparam int unsigned K  = (DW > HOST_W) ? DW / HOST_W : 1;   // host words per IP word
  localparam int unsigned FW = K * HOST_W;                        // FIFO width
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1;
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic              fempty, ffull, push, pop, dma_ready, dma_take;
  logic [FW-1:0]     fin, head;
  logic [CW-1:0]     fcount;
  logic [HOST_W-1:0] dma_data;

  assign wr_ready = !ffull;

  // ---- IP side: pack narrow words ----
  if (DW < HOST_W) begin : g_pack
    logic [RW-1:0]     sub;
    logic [HOST_W-1:0] acc;
    always_comb begin
      fin = acc;
      fin[32'(sub) * DW +: DW] = wr_data;
    end
    assign push = wr_cmd && !ffull && (32'(sub) == R - 1);
    always_ff @(posedge clk) begin
      if (rst) begin   // not on start: the IP may write before the DMA starts
        sub <= '0;
        acc <= '0;
      end else if (wr_cmd && !ffull) begin
        sub <= (32'(sub) == R - 1) ? '0 : sub + 1'b1;
        acc <= fin;
      end
    end
  end else begin : g_whole
    assign fin  = FW'(wr_data);
    assign push = wr_cmd && !ffull;
  end

  pfif_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_buf (
    .clk, .rst,
    .push, .wr_data(fin),
    .pop, .rd_data(head),
    .empty(fempty), .full(ffull), .count(fcount)
  );

  // ---- host side: split wide words ----
  assign dma_take = dma_ready && !fempty;
  if (K > 1) begin : g_split
    logic [KW-1:0] part;
    assign dma_data = head[32'(part) * HOST_W +: HOST_W];
    assign pop      = dma_take && (32'(part) == K - 1);
    always_ff @(posedge clk) begin
      if (rst || start)  part <= '0;
      else if (dma_take) part <= (32'(part) == K - 1) ? '0 : part + 1'b1;
    end
  end else begin : g_one
    assign dma_data = head[HOST_W-1:0];
    assign pop      = dma_take;
  end

  pfif_dma_wr u_dma (
    .clk, .rst, .start, .base, .words, .busy,
    .req, .req_ready,
    .in_valid(!fempty), .in_ready(dma_ready), .in_data(dma_data)
  );

  a_no_write_when_full: assert property (@(posedge clk) disable iff (rst) !(wr_cmd && ffull));
  initial assert (DW == HOST_W || (DW < HOST_W && HOST_W % DW == 0) || DW % HOST_W == 0)
    else $error("DW must divide 64 or be a multiple of 64");
endmodule
