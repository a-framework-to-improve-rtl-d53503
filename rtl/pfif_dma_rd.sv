// pfif_dma_rd: DMA read engine of the services logic (FPGA DMA interface).
//
// On a `start` pulse it reads `words` consecutive 64-bit words of host main
// memory from word address `base`, over the host-memory master, and delivers
// them in order on a valid/ready stream. Read data from the host cannot be held
// back, so the engine issues a read only while the words in flight plus the words
// waiting in its FIFO stay below FIFO_DEPTH; the consumer may stall freely.
// `busy` is high from start until the last word has left the stream.
//
// Host-memory master: a request is taken when req.valid and req_ready are both
// high; read data returns in request order on rsp_valid/rsp_data. Up to one word
// per cycle in each direction. The document names DMA capability only; the
// stream protocol and the credit scheme are this design's own.
module pfif_dma_rd
  import pfif_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
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
  // output stream
  output logic               out_valid,
  input  logic               out_ready,
  output logic [HOST_W-1:0]  out_data
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic [31:0]        issued, delivered, total;
  logic [HMEM_AW-1:0] addr;
  logic [CW-1:0]      inflight, fcount;
  logic               fempty, ffull, take, pop;

  assign req.valid = busy && (issued != total) &&
                     ({1'b0, inflight} + {1'b0, fcount} < (CW+1)'(FIFO_DEPTH));
  assign req.we    = 1'b0;
  assign req.addr  = addr;
  assign req.wdata = '0;
  assign take      = req.valid && req_ready;
  assign out_valid = !fempty;
  assign pop       = out_valid && out_ready;

  pfif_fifo #(.WIDTH(HOST_W), .DEPTH(FIFO_DEPTH)) u_buf (
    .clk, .rst,
    .push(rsp_valid), .wr_data(rsp_data),
    .pop, .rd_data(out_data),
    .empty(fempty), .full(ffull), .count(fcount)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      issued    <= '0;
      delivered <= '0;
      total     <= '0;
      addr      <= '0;
      inflight  <= '0;
    end else begin
      inflight <= inflight + CW'(take) - CW'(rsp_valid);
      if (start && !busy) begin
        busy      <= (words != 0);
        issued    <= '0;
        delivered <= '0;
        total     <= words;
        addr      <= base;
      end else begin
        if (take) begin
          issued <= issued + 1;
          addr   <= addr + 1'b1;
        end
        if (pop) begin
          delivered <= delivered + 1;
          if (delivered + 1 == total) busy <= 1'b0;
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) !(rsp_valid && ffull));
endmodule
