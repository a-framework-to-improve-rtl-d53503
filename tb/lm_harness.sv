// lm_harness: drives one pfif_logical_mem of a given geometry with random IP
// and host traffic and checks every read against a model of the logical bank.
// The physical modules are modelled here as PFC memory ports with a fixed read
// latency. Reads are checked for data and for the RD_LAT+1 cycle latency; the
// host-word mapping is checked through the model (host word h is lane h%LANES
// of logical word h/LANES for wide banks, logical words h*SUB..h*SUB+SUB-1 for
// narrow ones). The bank type decides which ports are live: requests on the
// others are still driven and must be ignored (no data change, no response,
// h_ready low for a bank without a host port). Reports its own check and
// failure counts.
module lm_harness
  import pfif_pkg::*;
#(
  parameter mem_type_e   MEM_TYPE  = MEM_SHARED_INOUT,
  parameter int unsigned LOG_W     = 128,
  parameter int unsigned LOG_DEPTH = 4096,
  parameter int unsigned OPS       = 2000
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output int   n_host_wait,
  output bit   finished
);
  localparam int unsigned RD_LAT = 6;
  localparam int unsigned LANES  = (LOG_W >= PHYS_W) ? LOG_W / PHYS_W : 1;
  localparam int unsigned SUB    = (LOG_W <  PHYS_W) ? PHYS_W / LOG_W : 1;
  localparam int unsigned ROWS   = (LOG_DEPTH + SUB - 1) / SUB;
  localparam int unsigned GROUPS = (ROWS + PHYS_DEPTH - 1) / PHYS_DEPTH;
  localparam int unsigned NMODS  = LANES * GROUPS;
  localparam int unsigned IP_AW  = $clog2(LOG_DEPTH);
  localparam int unsigned BE_W   = LOG_W / 8;
  localparam bit RD_EN = (MEM_TYPE == MEM_SHARED_IN)  || (MEM_TYPE == MEM_SHARED_INOUT) ||
                         (MEM_TYPE == MEM_LOCAL);
  localparam bit WR_EN = (MEM_TYPE == MEM_SHARED_OUT) || (MEM_TYPE == MEM_SHARED_INOUT) ||
                         (MEM_TYPE == MEM_LOCAL);
  localparam bit H_EN  = (MEM_TYPE != MEM_LOCAL);

  logic ip_rd_cmd = 0, ip_wr_cmd = 0, ip_rd_data_vld;
  logic [IP_AW-1:0] ip_rd_addr = '0, ip_wr_addr = '0;
  logic [LOG_W-1:0] ip_rd_data, ip_wr_data = '0;
  logic [BE_W-1:0]  ip_wr_be = '0;
  logic h_valid = 0, h_ready, h_we = 0, h_rvalid;
  logic [REGION_LSB-1:0] h_addr = '0;
  logic [HOST_W-1:0] h_wdata = '0, h_rdata;
  pfc_mem_req_t mreq [NMODS];
  pfc_mem_rsp_t mrsp [NMODS];

  pfif_logical_mem #(.MEM_TYPE(MEM_TYPE), .LOG_W(LOG_W), .LOG_DEPTH(LOG_DEPTH),
                     .RD_LAT(RD_LAT)) dut (.*);

  // ---- physical module models ----
  logic [63:0] phys [NMODS][logic [31:0]];
  typedef struct { longint t; logic [63:0] d; } prsp_t;
  prsp_t pq [NMODS][$];
  longint now = 0;
  always @(posedge clk) begin
    now <= now + 1;
    for (int m = 0; m < NMODS; m++) begin
      mrsp[m].valid <= 1'b0;
      if (!rst && mreq[m].valid) begin
        if (mreq[m].we) begin
          logic [63:0] w;
          w = phys[m].exists(32'(mreq[m].addr)) ? phys[m][32'(mreq[m].addr)] : 64'h0;
          for (int b = 0; b < 8; b++) if (mreq[m].be[b]) w[b*8 +: 8] = mreq[m].wdata[b*8 +: 8];
          phys[m][32'(mreq[m].addr)] = w;
        end else begin
          pq[m].push_back('{now + RD_LAT - 1,
                            phys[m].exists(32'(mreq[m].addr)) ? phys[m][32'(mreq[m].addr)] : 64'h0});
        end
      end
      if (pq[m].size() > 0 && pq[m][0].t <= now) begin
        mrsp[m].valid <= 1'b1;
        mrsp[m].rdata <= pq[m][0].d;
        void'(pq[m].pop_front());
      end
    end
  end

  // ---- logical model ----
  logic [LOG_W-1:0] lm [logic [31:0]];
  typedef struct { longint t; logic [63:0] d; } exp64_t;
  typedef struct { longint t; logic [LOG_W-1:0] d; } expw_t;
  expw_t  ip_exp[$];
  exp64_t h_exp[$];

  function automatic logic [LOG_W-1:0] lget(input int unsigned a);
    return lm.exists(a) ? lm[a] : '0;
  endfunction
  function automatic logic [63:0] host_word(input int unsigned h);
    logic [63:0] r = '0;
    if (LANES > 1) begin
      logic [LOG_W-1:0] w = lget(h / LANES);
      r = w[(h % LANES) * 64 +: 64];
    end else if (SUB > 1) begin
      for (int k = 0; k < SUB; k++) r[k*LOG_W +: LOG_W] = lget(h * SUB + k);
    end else r = 64'(lget(h));
    return r;
  endfunction
  task automatic host_store(input int unsigned h, input logic [63:0] d);
    if (LANES > 1) begin
      logic [LOG_W-1:0] w = lget(h / LANES);
      w[(h % LANES) * 64 +: 64] = d;
      lm[h / LANES] = w;
    end else if (SUB > 1) begin
      for (int k = 0; k < SUB; k++) lm[h * SUB + k] = d[k*LOG_W +: LOG_W];
    end else lm[h] = LOG_W'(d);
  endtask

  // addresses clustered at the start, the module boundaries and the end
  function automatic int unsigned pick_addr();
    int unsigned base;
    case ($urandom % 4)
      0: base = 0;
      1: base = (PHYS_DEPTH * SUB > 16) ? PHYS_DEPTH * SUB - 8 : 0;
      2: base = (GROUPS > 2) ? 2 * PHYS_DEPTH * SUB - 8 : LOG_DEPTH / 2;
      default: base = LOG_DEPTH - 16;
    endcase
    return (base + $urandom % 16) % LOG_DEPTH;
  endfunction

  always @(posedge clk) begin
    if (!rst && ip_rd_data_vld) begin
      checks++;
      if (ip_exp.size() == 0) begin failures++; $display("FAIL W%0d: unexpected IP data", LOG_W); end
      else begin
        if (ip_rd_data != ip_exp[0].d || now != ip_exp[0].t) begin
          failures++;
          $display("FAIL W%0d IP read: %h vs %h at %0d vs %0d", LOG_W, ip_rd_data, ip_exp[0].d, now, ip_exp[0].t);
        end
        void'(ip_exp.pop_front());
      end
    end
    if (!rst && h_rvalid) begin
      checks++;
      if (h_exp.size() == 0) begin failures++; $display("FAIL W%0d: unexpected host data", LOG_W); end
      else begin
        if (h_rdata != h_exp[0].d) begin
          failures++;
          $display("FAIL W%0d host read: %h vs %h", LOG_W, h_rdata, h_exp[0].d);
        end
        void'(h_exp.pop_front());
      end
    end
  end

  initial begin
    checks = 0; failures = 0; n_host_wait = 0; finished = 0;
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int i = 0; i < OPS; i++) begin
      int unsigned a, op;
      @(negedge clk);
      ip_rd_cmd = 0; ip_wr_cmd = 0; h_valid = 0;
      op = $urandom % 6;
      a = pick_addr();
      if (op == 0 || op == 1) begin
        logic [LOG_W-1:0] d;
        logic [BE_W-1:0] be;
        logic [LOG_W-1:0] w;
        for (int k = 0; k < LOG_W; k += 32) d[k +: 32] = $urandom;
        be = (i % 3 == 0) ? BE_W'($urandom) : '1;
        ip_wr_cmd = 1; ip_wr_addr = IP_AW'(a); ip_wr_data = d; ip_wr_be = be;
        w = lget(a);
        for (int b = 0; b < BE_W; b++) if (be[b]) w[b*8 +: 8] = d[b*8 +: 8];
        if (WR_EN) lm[a] = w;
        h_valid = WR_EN && H_EN && ($urandom % 2);   // host asks in the same cycle: it must wait
        h_we = 0; h_addr = '0;
        if (h_valid) n_host_wait++;
        if (h_valid) begin
          #0.5;
          if (h_ready) begin failures++; $display("FAIL host not held off by IP"); end
          checks++;
          h_valid = 0;
        end
      end else if (op == 2 || op == 3) begin
        ip_rd_cmd = 1; ip_rd_addr = IP_AW'(a);
        if (RD_EN) ip_exp.push_back('{now + RD_LAT + 1, lget(a)});
      end else begin
        int unsigned h = ($urandom % ((LANES > 1) ? LANES * 64 : 64));
        if (LANES > 1) h = (a / 64) * LANES * 64 + h;       // near the picked logical word
        else h = (a / SUB / 64) * 64 + h % 64;
        h = h % ((LANES > 1) ? LOG_DEPTH * LANES : (LOG_DEPTH + SUB - 1) / SUB);
        h_valid = 1; h_we = (op == 4); h_addr = REGION_LSB'(h);
        h_wdata = {$urandom, $urandom};
        if (!H_EN) begin
          #0.5;
          checks++;
          if (h_ready) begin failures++; $display("FAIL host port accepted on a local bank"); end
        end else if (h_we) host_store(h, h_wdata);
        else h_exp.push_back('{0, host_word(h)});
      end
    end
    @(negedge clk);
    ip_rd_cmd = 0; ip_wr_cmd = 0; h_valid = 0;
    repeat (RD_LAT + 5) @(negedge clk);
    checks++;
    if (ip_exp.size() != 0 || h_exp.size() != 0) begin
      failures++; $display("FAIL W%0d: reads never answered", LOG_W);
    end
    finished = 1;
  end
endmodule
