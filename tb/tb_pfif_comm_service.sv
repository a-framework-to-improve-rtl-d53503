// tb_pfif_comm_service: communication service logic.
// Host slave: random reads and writes to the register region, to two bank
// regions whose models answer with different latencies and sometimes refuse,
// and to an unmapped region. Every read must come back in issue order with the
// value of the addressed target; writes must reach the right target.
// Controller access: while c_own is high the controller's requests reach the
// banks, their data come back on c_rdata, and host bank accesses wait.
// DMA side: four engines issue random reads and writes; each engine must get
// back exactly the data of its own reads, in order, and every engine must be
// served.
module tb_pfif_comm_service;
  import pfif_pkg::*;
  localparam int NB = 2, NM = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic hs_valid = 0, hs_ready, hs_we = 0, hs_rvalid;
  logic [HOST_AW-1:0] hs_addr = '0;
  logic [HOST_W-1:0] hs_wdata = '0, hs_rdata;
  logic reg_wr, reg_rd, reg_rvalid = 0;
  logic [REG_IDX_W-1:0] reg_idx;
  logic [HOST_W-1:0] reg_wdata, reg_rdata = '0;
  logic [NB-1:0] bh_valid, bh_ready, bh_rvalid = '0;
  logic bh_we;
  logic [REGION_LSB-1:0] bh_addr;
  logic [HOST_W-1:0] bh_wdata;
  logic [HOST_W-1:0] bh_rdata [NB];
  logic c_own = 0, c_valid = 0, c_ready, c_we = 0, c_rvalid, slave_idle;
  logic [1:0] c_bank = '0;
  logic [REGION_LSB-1:0] c_addr = '0;
  logic [HOST_W-1:0] c_wdata = '0, c_rdata;
  hmem_req_t m_req [NM];
  logic [NM-1:0] m_ready, m_rvalid;
  logic [HOST_W-1:0] m_rdata;
  hmem_req_t hm_req;
  logic hm_ready, hm_rvalid;
  logic [HOST_W-1:0] hm_rdata;

  pfif_comm_service #(.NUM_BANKS(NB), .NUM_M(NM)) dut (.*);
  hmem_model #(.LAT(6), .REFUSE_PCT(20)) u_host (.clk, .rst, .req(hm_req), .ready(hm_ready),
    .rvalid(hm_rvalid), .rdata(hm_rdata));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // ---- target models ----
  logic [63:0] regs [64];
  logic [63:0] bank [NB][logic [31:0]];
  typedef struct { longint t; logic [63:0] d; } r_t;
  r_t bq [NB][$];
  longint now = 0;
  int lat [NB] = '{3, 9};
  always @(posedge clk) now <= now + 1;
  always @(negedge clk) for (int b = 0; b < NB; b++) bh_ready[b] = ($urandom % 4) != 0;
  always @(posedge clk) begin
    reg_rvalid <= 0;
    if (!rst && reg_wr) regs[reg_idx] = reg_wdata;
    if (!rst && reg_rd) begin reg_rvalid <= 1; reg_rdata <= (reg_idx == '1) ? 64'h0 : regs[reg_idx]; end
    for (int b = 0; b < NB; b++) begin
      bh_rvalid[b] <= 0;
      if (!rst && bh_valid[b] && bh_ready[b]) begin
        if (bh_we) bank[b][32'(bh_addr)] = bh_wdata;
        else bq[b].push_back('{now + lat[b], bank[b].exists(32'(bh_addr)) ? bank[b][32'(bh_addr)] : 64'h0});
      end
      if (bq[b].size() > 0 && bq[b][0].t <= now) begin
        bh_rvalid[b] <= 1; bh_rdata[b] <= bq[b][0].d; void'(bq[b].pop_front());
      end
    end
  end

  // ---- host slave ----
  logic [63:0] exp_q[$];
  int n_reads = 0;
  always @(posedge clk) if (!rst && hs_rvalid) begin
    chk(exp_q.size() > 0 && hs_rdata == exp_q[0], "host read data in order");
    if (exp_q.size() > 0) void'(exp_q.pop_front());
    n_reads++;
  end

  function automatic logic [63:0] expect_rd(input logic [HOST_AW-1:0] a);
    int r = int'(a[HOST_AW-1:REGION_LSB]);
    if (r == 0) return regs[a[REG_IDX_W-1:0]];
    if (r <= NB) return bank[r-1].exists(32'(a[REGION_LSB-1:0])) ? bank[r-1][32'(a[REGION_LSB-1:0])] : 64'h0;
    return 64'h0;
  endfunction

  task automatic slave(input bit we, input logic [HOST_AW-1:0] a, input logic [63:0] d);
    @(negedge clk);
    hs_valid = 1; hs_we = we; hs_addr = a; hs_wdata = d;
    #0.5;
    while (!hs_ready) begin @(negedge clk); #0.5; end
    // the target models update at the edge; work out the expected data first
    if (!we) exp_q.push_back(expect_rd(a));
    @(posedge clk);
    @(negedge clk);
    hs_valid = 0;
  endtask

  // ---- DMA engines ----
  int m_sent [NM], m_got [NM];
  logic [63:0] m_exp [NM][$];
  for (genvar i = 0; i < NM; i++) begin : g_m
    logic [31:0] a;
    initial begin
      m_req[i] = '0; m_sent[i] = 0; m_got[i] = 0;
      @(negedge clk);
      while (rst) @(negedge clk);
      for (int k = 0; k < 60; k++) begin
        a = 32'h1000 * (i + 1) + 32'(k % 8);
        m_req[i].valid = 1;
        m_req[i].we = (k < 8) || ($urandom % 3 == 0);
        m_req[i].addr = a;
        m_req[i].wdata = {32'(i), 32'(k)};
        #0.5;
        while (!m_ready[i]) begin @(negedge clk); #0.5; end
        if (m_req[i].we) u_host.poke(a, m_req[i].wdata);   // model: write lands now
        else m_exp[i].push_back(u_host.peek(a));
        m_sent[i]++;
        @(negedge clk);
        m_req[i].valid = 0;
        if ($urandom % 2) @(negedge clk);
      end
    end
    always @(posedge clk) if (!rst && m_rvalid[i]) begin
      chk(m_exp[i].size() > 0 && m_rdata == m_exp[i][0], $sformatf("engine %0d read data", i));
      if (m_exp[i].size() > 0) void'(m_exp[i].pop_front());
      m_got[i]++;
    end
  end

  initial begin
    foreach (regs[i]) regs[i] = 64'(i) * 64'h0101;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 400; i++) begin
      int r = $urandom % 4;
      logic [HOST_AW-1:0] a = HOST_AW'((r << REGION_LSB) | ($urandom % 16));
      slave($urandom % 3 == 0, a, {$urandom, $urandom});
    end
    // directed: a slow bank read followed at once by a fast bank read must
    // still return in issue order
    slave(1, HOST_AW'((2 << REGION_LSB) | 7), 64'hB1B1_0000_0000_0007);
    slave(1, HOST_AW'((1 << REGION_LSB) | 7), 64'hB0B0_0000_0000_0007);
    for (int i = 0; i < 6; i++) begin
      slave(0, HOST_AW'((2 << REGION_LSB) | 7), '0);
      slave(0, HOST_AW'((1 << REGION_LSB) | 7), '0);
      repeat (12) @(negedge clk);
    end
    repeat (12) @(negedge clk);
    // controller owns the banks
    @(negedge clk);
    c_own = 1;
    fork
      slave(1, HOST_AW'((1 << REGION_LSB) | 3), 64'hDEAD);   // must wait for c_own to drop
      begin
        for (int k = 0; k < 8; k++) begin
          @(negedge clk);
          // writes to both banks, then reads from bank 0 only (one bank per read phase)
          c_valid = 1; c_we = (k < 4);
          c_bank  = (k < 4) ? 2'(k % 2) : 2'd0;
          c_addr  = (k < 4) ? REGION_LSB'(k + 100) : REGION_LSB'(100 + 2 * (k % 2));
          c_wdata = 64'hC000 + 64'(k);
          #0.5;
          while (!c_ready) begin @(negedge clk); #0.5; end
          @(posedge clk);
        end
        @(negedge clk) c_valid = 0;
        repeat (15) @(negedge clk);
        chk(n_c == 4, "controller reads answered on c_rdata");
        chk(hs_valid && !hs_ready, "host bank access held while owned");
        chk(bank[0][32'(100)] == 64'hC000 && bank[1][32'(101)] == 64'hC001 &&
            bank[0][32'(102)] == 64'hC002 && bank[1][32'(103)] == 64'hC003, "controller writes reach banks");
        chk(bank[0][32'(3)] != 64'hDEAD, "host bank write waited while owned");
        c_own = 0;
      end
    join
    repeat (20) @(negedge clk);
    chk(bank[0][32'(3)] == 64'hDEAD, "host bank write done after release");
    chk(exp_q.size() == 0 && slave_idle, "all host reads answered");
    for (int i = 0; i < NM; i++)
      chk(m_sent[i] == 60 && m_exp[i].size() == 0, $sformatf("engine %0d served", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int n_c = 0;
  always @(posedge clk) if (!rst && c_rvalid) begin
    chk(c_rdata == 64'hC000 + 64'(2 * (n_c % 2)), "controller read data");
    n_c++;
  end
  initial begin
    repeat (40000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
