// pfif_comm_service: communication service logic of the Portable Framework
// Control Logic (PFCL).
//
// Two jobs, both toward the vendor's host link:
//  * Host slave. The host issues 64-bit reads and writes into the FPGA's address
//    space. The word address is split into a region (bits HOST_AW-1..REGION_LSB)
//    and an offset: region 0 is the register block, region 1+k the host port of
//    logical memory bank k. Unmapped regions read as zero and ignore writes (they
//    go to an unused register index). Reads may be pipelined; to keep responses
//    in order, a read to a region other than the one of the reads still in flight
//    waits until those have returned. While the controller owns the banks
//    (c_own, during its load and store phases) host accesses to banks wait and
//    the banks' read data go to the controller instead. slave_idle says no host
//    read is in flight.
//  * Host-memory master. NUM_M DMA engines share the link to host main memory
//    through a round-robin arbiter. A granted read records its engine in a tag
//    FIFO; read data, which the host returns in order, is steered back by it.
// The split into regions, the ordering rule and the arbitration are this
// design's choices; the document says only that this layer wraps the vendor's
// communication services behind a platform-independent interface.
module pfif_comm_service
  import pfif_pkg::*;
#(
  parameter int unsigned NUM_BANKS = 2,
  parameter int unsigned NUM_M     = 4,
  parameter int unsigned MAX_OUT   = 32
) (
  input  logic                  clk,
  input  logic                  rst,
  // host slave (vendor side)
  input  logic                  hs_valid,
  output logic                  hs_ready,
  input  logic                  hs_we,
  input  logic [HOST_AW-1:0]    hs_addr,
  input  logic [HOST_W-1:0]     hs_wdata,
  output logic                  hs_rvalid,
  output logic [HOST_W-1:0]     hs_rdata,
  // register block
  output logic                  reg_wr,
  output logic                  reg_rd,
  output logic [REG_IDX_W-1:0]  reg_idx,
  output logic [HOST_W-1:0]     reg_wdata,
  input  logic                  reg_rvalid,
  input  logic [HOST_W-1:0]     reg_rdata,
  // host ports of the logical memory banks
  output logic [NUM_BANKS-1:0]  bh_valid,
  input  logic [NUM_BANKS-1:0]  bh_ready,
  output logic                  bh_we,
  output logic [REGION_LSB-1:0] bh_addr,
  output logic [HOST_W-1:0]     bh_wdata,
  input  logic [NUM_BANKS-1:0]  bh_rvalid,
  input  logic [HOST_W-1:0]     bh_rdata [NUM_BANKS],
  // controller access to the banks
  input  logic                  c_own,
  input  logic                  c_valid,
  output logic                  c_ready,
  input  logic [$clog2(NUM_BANKS+1)-1:0] c_bank,
  input  logic                  c_we,
  input  logic [REGION_LSB-1:0] c_addr,
  input  logic [HOST_W-1:0]     c_wdata,
  output logic                  c_rvalid,
  output logic [HOST_W-1:0]     c_rdata,
  output logic                  slave_idle,
  // DMA engines
  input  hmem_req_t             m_req    [NUM_M],
  output logic [NUM_M-1:0]      m_ready,
  output logic [NUM_M-1:0]      m_rvalid,
  output logic [HOST_W-1:0]     m_rdata,
  // host-memory master (vendor side)
  output hmem_req_t             hm_req,
  input  logic                  hm_ready,
  input  logic                  hm_rvalid,
  input  logic [HOST_W-1:0]     hm_rdata
);
  localparam int unsigned RW = HOST_AW - REGION_LSB;
  localparam int unsigned OW = $clog2(MAX_OUT + 1);
  localparam int unsigned MW = (NUM_M > 1) ? $clog2(NUM_M) : 1;

  // ---------------- host slave ----------------
  logic [RW-1:0] region, last_region;
  logic [OW-1:0] outstanding;
  logic          is_bank, order_ok, room, hs_take, rd_back;
  int unsigned   bank;

  always_comb begin
    region  = hs_addr[HOST_AW-1:REGION_LSB];
    bank    = 32'(region) - 1;
    is_bank = (region != '0) && (32'(region) <= NUM_BANKS);
    order_ok = hs_we || (outstanding == '0) || (region == last_region);
    room     = hs_we || (outstanding < OW'(MAX_OUT));
    hs_ready = order_ok && room && (is_bank ? (!c_own && bh_ready[bank]) : 1'b1);
    hs_take  = hs_valid && hs_ready;

    reg_wr    = hs_take && !is_bank && hs_we;
    reg_rd    = hs_take && !is_bank && !hs_we;
    reg_idx   = (region == '0) ? hs_addr[REG_IDX_W-1:0] : '1;
    reg_wdata = hs_wdata;

    bh_valid = '0;
    if (c_own) begin
      for (int b = 0; b < NUM_BANKS; b++) bh_valid[b] = c_valid && (32'(c_bank) == b);
      bh_we    = c_we;
      bh_addr  = c_addr;
      bh_wdata = c_wdata;
    end else begin
      if (is_bank) bh_valid[bank] = hs_valid && hs_ready;
      bh_we    = hs_we;
      bh_addr  = hs_addr[REGION_LSB-1:0];
      bh_wdata = hs_wdata;
    end
    c_ready = 1'b0;
    for (int b = 0; b < NUM_BANKS; b++)
      if (32'(c_bank) == b) c_ready = c_own && bh_ready[b];

    // read data return
    rd_back  = reg_rvalid;
    hs_rdata = reg_rdata;
    c_rvalid = 1'b0;
    c_rdata  = '0;
    for (int b = 0; b < NUM_BANKS; b++) begin
      if (bh_rvalid[b]) begin
        if (c_own) begin
          c_rvalid = 1'b1;
          c_rdata  = bh_rdata[b];
        end else begin
          rd_back  = 1'b1;
          hs_rdata = bh_rdata[b];
        end
      end
    end
    hs_rvalid  = rd_back;
    slave_idle = (outstanding == '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      outstanding <= '0;
      last_region <= '0;
    end else begin
      outstanding <= outstanding + OW'(hs_take && !hs_we) - OW'(rd_back);
      if (hs_take && !hs_we) last_region <= region;
    end
  end

  // ---------------- host-memory master ----------------
  logic [MW-1:0] rr, gnt;
  logic          any, tag_empty, tag_full, grant_ok;
  logic [MW-1:0] tag_head;
  logic [$clog2(MAX_OUT+1)-1:0] tag_cnt;

  always_comb begin
    any = 1'b0;
    gnt = '0;
    for (int k = 0; k < NUM_M; k++) begin
      automatic int unsigned i = (32'(rr) + k) % NUM_M;
      if (!any && m_req[i].valid) begin
        any = 1'b1;
        gnt = MW'(i);
      end
    end
    grant_ok = any && !(tag_full && !m_req[gnt].we);
    hm_req   = '0;
    if (grant_ok) hm_req = m_req[gnt];
    m_ready  = '0;
    m_ready[gnt] = grant_ok && hm_ready;
    m_rvalid = '0;
    m_rvalid[tag_head] = hm_rvalid;
    m_rdata  = hm_rdata;
  end

  always_ff @(posedge clk) begin
    if (rst) rr <= '0;
    else if (hm_req.valid && hm_ready) rr <= MW'((32'(gnt) + 1) % NUM_M);
  end

  pfif_fifo #(.WIDTH(MW), .DEPTH(MAX_OUT)) u_tags (
    .clk, .rst,
    .push(hm_req.valid && hm_ready && !hm_req.we), .wr_data(gnt),
    .pop(hm_rvalid), .rd_data(tag_head),
    .empty(tag_empty), .full(tag_full), .count(tag_cnt)
  );

  a_rsp_expected: assert property (@(posedge clk) disable iff (rst) hm_rvalid |-> !tag_empty);
  a_one_bank_rsp: assert property (@(posedge clk) disable iff (rst) $onehot0(bh_rvalid));
endmodule
