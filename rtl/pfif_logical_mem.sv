// pfif_logical_mem: one random-access logical memory bank of the framework
// (types Shared IN, Shared OUT, Shared IN/OUT and Local).
//
// The IP asks for a bank of LOG_DEPTH words of LOG_W bits; this block builds it
// from whole physical local memory modules, none shared with another bank:
//  * LOG_W a multiple of 64: LANES = LOG_W/64 modules side by side make a row.
//  * LOG_W below 64 (32, 16, 8): SUB = 64/LOG_W words share one 64-bit row; the
//    low address bits pick the slice on reads and steer the byte enables on
//    writes, so no bits of a row are left unused.
//  * More rows than one module holds: GROUPS row groups are stacked, the upper
//    address bits pick the group. NMODS = LANES*GROUPS modules are used.
// E.g. 8 MB of 128-bit words is 2 modules side by side, 10 MB of 64-bit words is
// 3 stacked modules, 6 MB of 128-bit words is 2 side by side and 2 stacked.
//
// Ports: the IP port has only what the bank type allows it (a read port for IN,
// a write port for OUT, both otherwise; requests on a hidden port are ignored).
// The host port, used by the communication service and the controller, works in
// 64-bit host words: word h is lane h%LANES of row h/LANES, or row h when
// LOG_W <= 64. The host port is unused for a Local bank (h_ready stays low).
// Both ports are fully pipelined, one request per cycle. The IP has priority; a
// host request waits (h_ready low) in a cycle where the IP issues one. For a
// Shared IN/OUT bank the IP issues at most one of read and write per cycle.
//
// Timing: read data returns RD_LAT+1 cycles after the request, RD_LAT in the
// memory controller plus one register stage here that selects lane, group and
// slice. Writes complete without a response. The mapping rules follow the
// framework description; the host word mapping, the priority and the single
// extra register stage for every geometry are this design's choices.
module pfif_logical_mem
  import pfif_pkg::*;
#(
  parameter mem_type_e   MEM_TYPE  = MEM_SHARED_INOUT,
  parameter int unsigned LOG_W     = 128,
  parameter int unsigned LOG_DEPTH = 512 * 1024,
  parameter int unsigned RD_LAT    = 10,
  // derived, not to be overridden
  parameter int unsigned LANES  = (LOG_W >= PHYS_W) ? LOG_W / PHYS_W : 1,
  parameter int unsigned SUB    = (LOG_W <  PHYS_W) ? PHYS_W / LOG_W : 1,
  parameter int unsigned ROWS   = (LOG_DEPTH + SUB - 1) / SUB,
  parameter int unsigned GROUPS = (ROWS + PHYS_DEPTH - 1) / PHYS_DEPTH,
  parameter int unsigned NMODS  = LANES * GROUPS,
  parameter int unsigned IP_AW  = (LOG_DEPTH > 1) ? $clog2(LOG_DEPTH) : 1,
  parameter int unsigned BE_W   = (LOG_W >= 8) ? LOG_W / 8 : 1
) (
  input  logic                 clk,
  input  logic                 rst,
  // IP port
  input  logic                 ip_rd_cmd,
  input  logic [IP_AW-1:0]     ip_rd_addr,
  output logic [LOG_W-1:0]     ip_rd_data,
  output logic                 ip_rd_data_vld,
  input  logic                 ip_wr_cmd,
  input  logic [IP_AW-1:0]     ip_wr_addr,
  input  logic [LOG_W-1:0]     ip_wr_data,
  input  logic [BE_W-1:0]      ip_wr_be,
  // host port, 64-bit words
  input  logic                 h_valid,
  output logic                 h_ready,
  input  logic                 h_we,
  input  logic [REGION_LSB-1:0] h_addr,
  input  logic [HOST_W-1:0]    h_wdata,
  output logic                 h_rvalid,
  output logic [HOST_W-1:0]    h_rdata,
  // physical modules (PFC memory ports)
  output pfc_mem_req_t         mreq [NMODS],
  input  pfc_mem_rsp_t         mrsp [NMODS]
);
  localparam int unsigned SUB_B = (SUB > 1) ? $clog2(SUB) : 0;
  localparam int unsigned SUB_W = (SUB > 1) ? SUB_B : 1;
  localparam int unsigned G_W   = (GROUPS > 1) ? $clog2(GROUPS) : 1;
  localparam int unsigned L_W   = (LANES > 1) ? $clog2(LANES) : 1;
  localparam int unsigned TAG_W = 1 + G_W + SUB_W + L_W;
  localparam int unsigned TAGQ  = RD_LAT + 4;

  localparam bit IP_RD_EN = (MEM_TYPE == MEM_SHARED_IN)  || (MEM_TYPE == MEM_SHARED_INOUT) ||
                            (MEM_TYPE == MEM_LOCAL);
  localparam bit IP_WR_EN = (MEM_TYPE == MEM_SHARED_OUT) || (MEM_TYPE == MEM_SHARED_INOUT) ||
                            (MEM_TYPE == MEM_LOCAL);
  localparam bit HOST_EN  = (MEM_TYPE != MEM_LOCAL);

  typedef struct packed {
    logic             host;
    logic [G_W-1:0]   grp;
    logic [SUB_W-1:0] sub;
    logic [L_W-1:0]   lane;
  } tag_t;

  logic ip_rd, ip_wr, h_go;
  assign ip_rd   = ip_rd_cmd && IP_RD_EN;
  assign ip_wr   = ip_wr_cmd && IP_WR_EN;
  assign h_ready = HOST_EN && !(ip_rd || ip_wr);
  assign h_go    = h_valid && h_ready;

  // Address decomposition.
  logic [31:0] ip_a, ip_row, h_row;
  logic [31:0] ip_grp, ip_sub, h_grp, h_lane;
  always_comb begin
    ip_a   = 32'(ip_wr ? ip_wr_addr : ip_rd_addr);
    ip_row = ip_a >> SUB_B;
    ip_sub = (SUB > 1) ? (ip_a & 32'(SUB - 1)) : 32'd0;
    ip_grp = ip_row / PHYS_DEPTH;
    h_lane = 32'(h_addr) % LANES;
    h_row  = 32'(h_addr) / LANES;
    h_grp  = h_row / PHYS_DEPTH;
  end

  // Request issue to the modules.
  always_comb begin
    for (int g = 0; g < GROUPS; g++) begin
      for (int l = 0; l < LANES; l++) begin
        automatic int unsigned m = g * LANES + l;
        mreq[m] = '0;
        if (ip_rd || ip_wr) begin
          mreq[m].valid = (ip_grp == 32'(g));
          mreq[m].we    = ip_wr;
          mreq[m].addr  = PHYS_AW'(ip_row % PHYS_DEPTH);
          if (LANES > 1) begin
            mreq[m].wdata = ip_wr_data[l*PHYS_W +: PHYS_W];
            mreq[m].be    = ip_wr_be[l*PHYS_BE_W +: PHYS_BE_W];
          end else begin
            mreq[m].wdata = PHYS_W'({SUB{ip_wr_data}});
            mreq[m].be    = PHYS_BE_W'(ip_wr_be) << (ip_sub * BE_W);
          end
        end else if (h_go) begin
          mreq[m].valid = (h_grp == 32'(g)) && (h_lane == 32'(l));
          mreq[m].we    = h_we;
          mreq[m].addr  = PHYS_AW'(h_row % PHYS_DEPTH);
          mreq[m].wdata = h_wdata;
          mreq[m].be    = '1;
        end
      end
    end
  end

  // Read tags, in request order.
  tag_t tag_in, tag_out;
  logic rd_issue, rsp_any, tag_empty, tag_full;
  logic [$clog2(TAGQ+1)-1:0] tag_cnt;

  always_comb begin
    rd_issue = ip_rd || (h_go && !h_we);
    tag_in.host = !ip_rd;
    tag_in.grp  = G_W'(ip_rd ? ip_grp : h_grp);
    tag_in.sub  = SUB_W'(ip_rd ? ip_sub : 32'd0);
    tag_in.lane = L_W'(ip_rd ? 32'd0 : h_lane);
    rsp_any = 1'b0;
    for (int m = 0; m < NMODS; m++) rsp_any |= mrsp[m].valid;
  end

  pfif_fifo #(.WIDTH(TAG_W), .DEPTH(TAGQ)) u_tags (
    .clk, .rst,
    .push(rd_issue), .wr_data(tag_in),
    .pop(rsp_any),   .rd_data(tag_out),
    .empty(tag_empty), .full(tag_full), .count(tag_cnt)
  );

  // Response select and register stage.
  logic [LANES*PHYS_W-1:0] row_data;
  logic [LOG_W-1:0]        ip_sel;
  always_comb begin
    row_data = '0;
    for (int g = 0; g < GROUPS; g++)
      if (tag_out.grp == G_W'(g))
        for (int l = 0; l < LANES; l++)
          row_data[l*PHYS_W +: PHYS_W] = mrsp[g*LANES + l].rdata;
    if (SUB > 1) ip_sel = LOG_W'(row_data >> (32'(tag_out.sub) * LOG_W));
    else         ip_sel = LOG_W'(row_data);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ip_rd_data_vld <= 1'b0;
      h_rvalid       <= 1'b0;
    end else begin
      ip_rd_data_vld <= rsp_any && !tag_out.host;
      h_rvalid       <= rsp_any && tag_out.host;
    end
  end

  always_ff @(posedge clk) begin
    if (rsp_any) begin
      ip_rd_data <= ip_sel;
      h_rdata    <= row_data[32'(tag_out.lane)*PHYS_W +: PHYS_W];
    end
  end

  a_inout_one_per_cycle: assert property (@(posedge clk) disable iff (rst) !(ip_rd && ip_wr));
  a_rsp_has_tag:         assert property (@(posedge clk) disable iff (rst) rsp_any |-> !tag_empty);
  a_ip_addr_in_range:    assert property (@(posedge clk) disable iff (rst)
                           (ip_rd || ip_wr) |-> (ip_a < LOG_DEPTH));
  initial begin
    assert (LOG_W % PHYS_W == 0 || PHYS_W % LOG_W == 0)
      else $error("LOG_W must divide or be a multiple of the module width");
  end
endmodule
