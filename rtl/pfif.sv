// pfif: the Portable Framework Interface block, in the configuration generated
// for the DES example on a platform with four 64-bit, 4 MB local memory modules
// (the Cray XD1 figures).
//
// It sits between the vendor's services and the user IP. Toward the vendor it
// has a host slave port (the host's reads and writes into the FPGA), a host-
// memory master port (the FPGA's DMA into host main memory) and one SRAM port per
// local memory module. Toward the IP it has only what the IP asked for:
//   * NUM_IN input registers and NUM_OUT output registers of 64 bits;
//   * mem_0, a Shared IN logical bank of MEM_DEPTH x MEM_W bits: read port only;
//   * mem_1, a Shared OUT logical bank of the same size: write port only;
//   * one Sequential IN and one Sequential OUT channel, SEQ_IN_W / SEQ_OUT_W
//     bits wide (64 by default; 8, 16, 32 or a multiple of 64);
//   * user_logic_go / user_logic_done.
// Inside, bottom-up: one local memory controller per module and the
// communication service logic form the platform-specific control layer (PFCL);
// its PFC ports feed the services logic: register block, logical memory banks,
// sequential channels with their DMA engines, and the run controller. The
// 128-bit banks each take two modules side by side: mem_0 modules 0 and 1,
// mem_1 modules 2 and 3. The IP sees the same interface whatever the platform;
// only the PFCL would change.
//
// Timing: the IP read latency of mem_0 is RD_LAT + 1 cycles; both banks accept a
// request every cycle. Which layers exist and the bank geometry follow the
// document; the host address map, descriptor registers, sequential-channel
// handshakes and run controller are this design's own.
module pfif
  import pfif_pkg::*;
#(
  parameter int unsigned NUM_IN    = 2,
  parameter int unsigned NUM_OUT   = 1,
  parameter int unsigned MEM_W     = 128,
  parameter int unsigned MEM_DEPTH = 512 * 1024,
  parameter int unsigned RD_LAT    = 10,
  parameter int unsigned SEQ_FIFO  = 16,
  parameter int unsigned SEQ_IN_W  = 64,   // IP word width of the Sequential IN channel
  parameter int unsigned SEQ_OUT_W = 64,   // IP word width of the Sequential OUT channel
  // derived, not to be overridden
  parameter int unsigned AW        = $clog2(MEM_DEPTH),
  parameter int unsigned BE_W      = MEM_W / 8
) (
  input  logic                 clk,
  input  logic                 rst,
  // vendor side: host slave
  input  logic                 hs_valid,
  output logic                 hs_ready,
  input  logic                 hs_we,
  input  logic [HOST_AW-1:0]   hs_addr,
  input  logic [HOST_W-1:0]    hs_wdata,
  output logic                 hs_rvalid,
  output logic [HOST_W-1:0]    hs_rdata,
  // vendor side: host-memory master
  output hmem_req_t            hm_req,
  input  logic                 hm_ready,
  input  logic                 hm_rvalid,
  input  logic [HOST_W-1:0]    hm_rdata,
  // vendor side: local memory modules
  output logic [NUM_PHYS-1:0]  sram_rd,
  output logic [NUM_PHYS-1:0]  sram_wr,
  output logic [PHYS_AW-1:0]   sram_addr  [NUM_PHYS],
  output logic [PHYS_W-1:0]    sram_wdata [NUM_PHYS],
  output logic [PHYS_BE_W-1:0] sram_be    [NUM_PHYS],
  input  logic [PHYS_W-1:0]    sram_rdata [NUM_PHYS],
  // IP side: synchronisation
  output logic                 user_logic_go,
  input  logic                 user_logic_done,
  // IP side: registers
  output logic [63:0]          reg_in        [NUM_IN],
  input  logic [NUM_OUT-1:0]   reg_out_we,
  input  logic [63:0]          reg_out_wdata [NUM_OUT],
  // IP side: mem_0 read port
  input  logic                 mem_0_rd_cmd,
  input  logic [AW-1:0]        mem_0_rd_addr,
  output logic [MEM_W-1:0]     mem_0_rd_data,
  output logic                 mem_0_rd_data_vld,
  // IP side: mem_1 write port
  input  logic                 mem_1_wr_cmd,
  input  logic [AW-1:0]        mem_1_wr_addr,
  input  logic [MEM_W-1:0]     mem_1_wr_data,
  input  logic [BE_W-1:0]      mem_1_wr_be,
  // IP side: sequential IN channel
  output logic                 seq_0_rd_avail,
  input  logic                 seq_0_rd_cmd,
  output logic [SEQ_IN_W-1:0]  seq_0_rd_data,
  output logic                 seq_0_rd_data_vld,
  // IP side: sequential OUT channel
  output logic                 seq_1_wr_ready,
  input  logic                 seq_1_wr_cmd,
  input  logic [SEQ_OUT_W-1:0] seq_1_wr_data
);
  localparam int unsigned NB  = 2;
  localparam int unsigned NM  = 4;
  localparam int unsigned LANES = (MEM_W >= PHYS_W) ? MEM_W / PHYS_W : 1;
  localparam int unsigned SUBW  = (MEM_W <  PHYS_W) ? PHYS_W / MEM_W : 1;
  localparam int unsigned NMOD  = LANES * (((MEM_DEPTH + SUBW - 1) / SUBW + PHYS_DEPTH - 1) / PHYS_DEPTH);

  // ---------------- PFCL: local memory controllers ----------------
  pfc_mem_req_t mreq [NUM_PHYS];
  pfc_mem_rsp_t mrsp [NUM_PHYS];

  for (genvar p = 0; p < NUM_PHYS; p++) begin : g_lmc
    pfif_local_mem_ctrl #(.RD_LAT(RD_LAT)) u_lmc (
      .clk, .rst, .req(mreq[p]), .rsp(mrsp[p]),
      .sram_rd(sram_rd[p]), .sram_wr(sram_wr[p]), .sram_addr(sram_addr[p]),
      .sram_wdata(sram_wdata[p]), .sram_be(sram_be[p]), .sram_rdata(sram_rdata[p])
    );
  end

  // ---------------- services logic: logical memory banks ----------------
  logic [NB-1:0]          bh_valid, bh_ready, bh_rvalid;
  logic                   bh_we;
  logic [REGION_LSB-1:0]  bh_addr;
  logic [HOST_W-1:0]      bh_wdata;
  logic [HOST_W-1:0]      bh_rdata [NB];
  pfc_mem_req_t           b0_req [NMOD], b1_req [NMOD];
  pfc_mem_rsp_t           b0_rsp [NMOD], b1_rsp [NMOD];
  logic [MEM_W-1:0]       unused_rd1;
  logic                   unused_vld1;

  pfif_logical_mem #(.MEM_TYPE(MEM_SHARED_IN), .LOG_W(MEM_W), .LOG_DEPTH(MEM_DEPTH),
                     .RD_LAT(RD_LAT)) u_mem_0 (
    .clk, .rst,
    .ip_rd_cmd(mem_0_rd_cmd), .ip_rd_addr(mem_0_rd_addr),
    .ip_rd_data(mem_0_rd_data), .ip_rd_data_vld(mem_0_rd_data_vld),
    .ip_wr_cmd(1'b0), .ip_wr_addr('0), .ip_wr_data('0), .ip_wr_be('0),
    .h_valid(bh_valid[0]), .h_ready(bh_ready[0]), .h_we(bh_we), .h_addr(bh_addr),
    .h_wdata(bh_wdata), .h_rvalid(bh_rvalid[0]), .h_rdata(bh_rdata[0]),
    .mreq(b0_req), .mrsp(b0_rsp)
  );

  pfif_logical_mem #(.MEM_TYPE(MEM_SHARED_OUT), .LOG_W(MEM_W), .LOG_DEPTH(MEM_DEPTH),
                     .RD_LAT(RD_LAT)) u_mem_1 (
    .clk, .rst,
    .ip_rd_cmd(1'b0), .ip_rd_addr('0),
    .ip_rd_data(unused_rd1), .ip_rd_data_vld(unused_vld1),
    .ip_wr_cmd(mem_1_wr_cmd), .ip_wr_addr(mem_1_wr_addr), .ip_wr_data(mem_1_wr_data),
    .ip_wr_be(mem_1_wr_be),
    .h_valid(bh_valid[1]), .h_ready(bh_ready[1]), .h_we(bh_we), .h_addr(bh_addr),
    .h_wdata(bh_wdata), .h_rvalid(bh_rvalid[1]), .h_rdata(bh_rdata[1]),
    .mreq(b1_req), .mrsp(b1_rsp)
  );

  // Bank 0 takes modules 0..NMOD-1, bank 1 the next NMOD.
  always_comb begin
    for (int p = 0; p < NUM_PHYS; p++) mreq[p] = '0;
    for (int m = 0; m < NMOD; m++) begin
      mreq[m]        = b0_req[m];
      mreq[NMOD + m] = b1_req[m];
      b0_rsp[m]      = mrsp[m];
      b1_rsp[m]      = mrsp[NMOD + m];
    end
  end

  // ---------------- services logic: registers ----------------
  logic                 reg_wr, reg_rd, reg_rvalid, start;
  logic [REG_IDX_W-1:0] reg_idx;
  logic [HOST_W-1:0]    reg_wdata, reg_rdata, status;
  logic [HOST_W-1:0]    desc [NUM_DESC];

  pfif_reg_block #(.NUM_IN(NUM_IN), .NUM_OUT(NUM_OUT), .REG_W(64)) u_regs (
    .clk, .rst, .reg_wr, .reg_rd, .reg_idx, .reg_wdata, .reg_rvalid, .reg_rdata,
    .reg_in, .reg_out_we, .reg_out_wdata, .desc, .start, .status
  );

  // ---------------- services logic: sequential channels ----------------
  hmem_req_t          m_req [NM];
  logic [NM-1:0]      m_ready, m_rvalid;
  logic [HOST_W-1:0]  m_rdata;
  logic               sqi_start, sqo_start, sqi_busy, sqo_busy;

  pfif_seq_in #(.FIFO_DEPTH(SEQ_FIFO), .DW(SEQ_IN_W)) u_seq_0 (
    .clk, .rst, .start(sqi_start),
    .base(desc[REG_SQI_HADDR][HMEM_AW-1:0]), .words(desc[REG_SQI_WORDS][31:0]), .busy(sqi_busy),
    .req(m_req[2]), .req_ready(m_ready[2]), .rsp_valid(m_rvalid[2]), .rsp_data(m_rdata),
    .rd_avail(seq_0_rd_avail), .rd_cmd(seq_0_rd_cmd), .rd_data(seq_0_rd_data),
    .rd_data_vld(seq_0_rd_data_vld)
  );

  pfif_seq_out #(.FIFO_DEPTH(SEQ_FIFO), .DW(SEQ_OUT_W)) u_seq_1 (
    .clk, .rst, .start(sqo_start),
    .base(desc[REG_SQO_HADDR][HMEM_AW-1:0]), .words(desc[REG_SQO_WORDS][31:0]), .busy(sqo_busy),
    .req(m_req[3]), .req_ready(m_ready[3]),
    .wr_ready(seq_1_wr_ready), .wr_cmd(seq_1_wr_cmd), .wr_data(seq_1_wr_data)
  );

  // ---------------- run controller ----------------
  logic                  c_own, c_valid, c_ready, c_we, c_rvalid, slave_idle;
  logic [$clog2(NB+1)-1:0] c_bank;
  logic [REGION_LSB-1:0] c_addr;
  logic [HOST_W-1:0]     c_wdata, c_rdata;

  pfif_ctrl #(.NUM_BANKS(NB), .FIFO_DEPTH(SEQ_FIFO)) u_ctrl (
    .clk, .rst, .start, .desc, .status,
    .user_logic_go, .user_logic_done,
    .sqi_start, .sqo_start, .sqo_busy,
    .c_own, .c_valid, .c_ready, .c_bank, .c_we, .c_addr, .c_wdata, .c_rvalid, .c_rdata,
    .slave_idle,
    .ld_req(m_req[0]), .ld_ready(m_ready[0]), .ld_rvalid(m_rvalid[0]), .ld_rdata(m_rdata),
    .st_req(m_req[1]), .st_ready(m_ready[1])
  );

  // ---------------- PFCL: communication service ----------------
  pfif_comm_service #(.NUM_BANKS(NB), .NUM_M(NM)) u_comm (
    .clk, .rst,
    .hs_valid, .hs_ready, .hs_we, .hs_addr, .hs_wdata, .hs_rvalid, .hs_rdata,
    .reg_wr, .reg_rd, .reg_idx, .reg_wdata, .reg_rvalid, .reg_rdata,
    .bh_valid, .bh_ready, .bh_we, .bh_addr, .bh_wdata, .bh_rvalid, .bh_rdata,
    .c_own, .c_valid, .c_ready, .c_bank, .c_we, .c_addr, .c_wdata, .c_rvalid, .c_rdata,
    .slave_idle,
    .m_req, .m_ready, .m_rvalid, .m_rdata,
    .hm_req, .hm_ready, .hm_rvalid, .hm_rdata
  );

  initial assert (2 * NMOD <= NUM_PHYS)
    else $error("the two banks need more local memory modules than the platform has");
endmodule
