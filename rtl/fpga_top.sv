// fpga_top: the FPGA design of the DES example: the framework block (pfif)
// with the DES user logic attached to its IP interface.
//
// The ports are those of the vendor's services: the host slave port, the
// host-memory master port and the four local memory module ports. The IP-side
// services that the DES core does not use (the output register and the
// sequential IN and OUT channels) are brought out as ports too, so another IP
// can be attached beside it.
//
// A typical run: the host writes the key and the word count into input registers
// 0 and 1, fills the load/store descriptors and writes the start bit. The
// framework copies the plaintext from host memory into mem_0, pulses
// user_logic_go, the DES logic encrypts mem_0 into mem_1 at one 128-bit word
// per cycle and pulses user_logic_done, and the framework copies mem_1 back to
// host memory and shows the run as done in its status register.
module fpga_top
  import pfif_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 512 * 1024,
  parameter int unsigned RD_LAT    = 10
) (
  input  logic                 clk,
  input  logic                 rst,
  // host slave
  input  logic                 hs_valid,
  output logic                 hs_ready,
  input  logic                 hs_we,
  input  logic [HOST_AW-1:0]   hs_addr,
  input  logic [HOST_W-1:0]    hs_wdata,
  output logic                 hs_rvalid,
  output logic [HOST_W-1:0]    hs_rdata,
  // host-memory master
  output hmem_req_t            hm_req,
  input  logic                 hm_ready,
  input  logic                 hm_rvalid,
  input  logic [HOST_W-1:0]    hm_rdata,
  // local memory modules
  output logic [NUM_PHYS-1:0]  sram_rd,
  output logic [NUM_PHYS-1:0]  sram_wr,
  output logic [PHYS_AW-1:0]   sram_addr  [NUM_PHYS],
  output logic [PHYS_W-1:0]    sram_wdata [NUM_PHYS],
  output logic [PHYS_BE_W-1:0] sram_be    [NUM_PHYS],
  input  logic [PHYS_W-1:0]    sram_rdata [NUM_PHYS],
  // IP-side services not used by the DES logic
  input  logic [0:0]           reg_out_we,
  input  logic [63:0]          reg_out_wdata [1],
  output logic                 seq_0_rd_avail,
  input  logic                 seq_0_rd_cmd,
  output logic [HOST_W-1:0]    seq_0_rd_data,
  output logic                 seq_0_rd_data_vld,
  output logic                 seq_1_wr_ready,
  input  logic                 seq_1_wr_cmd,
  input  logic [HOST_W-1:0]    seq_1_wr_data
);
  localparam int unsigned AW = $clog2(MEM_DEPTH);

  logic           go, done;
  logic [63:0]    reg_in [2];
  logic           m0_cmd, m0_vld, m1_cmd;
  logic [AW-1:0]  m0_addr, m1_addr;
  logic [127:0]   m0_data, m1_data;
  logic [15:0]    m1_be;

  pfif #(.NUM_IN(2), .NUM_OUT(1), .MEM_W(128), .MEM_DEPTH(MEM_DEPTH), .RD_LAT(RD_LAT)) u_pfif (
    .clk, .rst,
    .hs_valid, .hs_ready, .hs_we, .hs_addr, .hs_wdata, .hs_rvalid, .hs_rdata,
    .hm_req, .hm_ready, .hm_rvalid, .hm_rdata,
    .sram_rd, .sram_wr, .sram_addr, .sram_wdata, .sram_be, .sram_rdata,
    .user_logic_go(go), .user_logic_done(done),
    .reg_in, .reg_out_we, .reg_out_wdata,
    .mem_0_rd_cmd(m0_cmd), .mem_0_rd_addr(m0_addr), .mem_0_rd_data(m0_data),
    .mem_0_rd_data_vld(m0_vld),
    .mem_1_wr_cmd(m1_cmd), .mem_1_wr_addr(m1_addr), .mem_1_wr_data(m1_data),
    .mem_1_wr_be(m1_be),
    .seq_0_rd_avail, .seq_0_rd_cmd, .seq_0_rd_data, .seq_0_rd_data_vld,
    .seq_1_wr_ready, .seq_1_wr_cmd, .seq_1_wr_data
  );

  user_logic #(.AW(AW)) u_user_logic (
    .clk, .rst,
    .user_logic_go(go),
    .reg_in0(reg_in[0]), .reg_in1(reg_in[1]),
    .mem_0_rd_data(m0_data), .mem_0_rd_data_vld(m0_vld),
    .mem_0_rd_cmd(m0_cmd), .mem_0_rd_addr(m0_addr),
    .mem_1_wr_cmd(m1_cmd), .mem_1_wr_data(m1_data),
    .mem_1_wr_addr(m1_addr), .mem_1_wr_be(m1_be),
    .user_logic_done(done)
  );
endmodule
