// pfif_local_mem_ctrl: local memory controller of the Portable Framework Control
// Logic (PFCL), one per physical local memory module.
//
// It turns the vendor's SRAM port into the platform-independent PFC memory port.
// The vendor port has separate read and write strobes and returns read data a
// fixed number of cycles later with no valid flag. The controller registers each
// request onto the vendor port, follows every read through a shift register as
// deep as the SRAM latency, and registers the returning word together with a
// valid flag. It accepts one request per clock, read or write, with no stall.
//
// Timing: a read presented in cycle c has rsp.valid and rsp.rdata in cycle
// c + RD_LAT. RD_LAT defaults to 10, the default read latency of the Cray XD1
// local memory at 200 MHz; the SRAM itself accounts for RD_LAT-2 of it and the
// two register stages here for the rest. The split and the register stages are
// this design's choice.
module pfif_local_mem_ctrl
  import pfif_pkg::*;
#(
  parameter int unsigned RD_LAT = 10
) (
  input  logic                 clk,
  input  logic                 rst,
  // PFC memory port
  input  pfc_mem_req_t         req,
  output pfc_mem_rsp_t         rsp,
  // vendor SRAM port
  output logic                 sram_rd,
  output logic                 sram_wr,
  output logic [PHYS_AW-1:0]   sram_addr,
  output logic [PHYS_W-1:0]    sram_wdata,
  output logic [PHYS_BE_W-1:0] sram_be,
  input  logic [PHYS_W-1:0]    sram_rdata
);
  localparam int unsigned SRAM_LAT = RD_LAT - 2;

  logic [SRAM_LAT-1:0] rd_pipe;

  always_ff @(posedge clk) begin
    if (rst) begin
      sram_rd <= 1'b0;
      sram_wr <= 1'b0;
      rd_pipe <= '0;
      rsp     <= '0;
    end else begin
      sram_rd   <= req.valid && !req.we;
      sram_wr   <= req.valid && req.we;
      rd_pipe   <= {rd_pipe[SRAM_LAT-2:0], sram_rd};
      rsp.valid <= rd_pipe[SRAM_LAT-1];
      if (rd_pipe[SRAM_LAT-1]) rsp.rdata <= sram_rdata;
    end
  end

  always_ff @(posedge clk) begin
    if (req.valid) begin
      sram_addr  <= req.addr;
      sram_wdata <= req.wdata;
      sram_be    <= req.we ? req.be : '0;
    end
  end

  initial assert (RD_LAT >= 4) else $error("RD_LAT must be at least 4");
endmodule
