// tb_pfif: the framework block on its own, at its default sizes, with SRAM
// models, a host memory model and this testbench acting as host and as IP.
// Checks: host writes to mem_0 seen by the IP read port with the right lane
// order and an RD_LAT+1 cycle latency; IP writes to mem_1 with byte enables
// seen by host reads; input and output registers; a run with go/done; the
// sequential IN and OUT channels looped back through the IP side.
module tb_pfif;
  import pfif_pkg::*;
  localparam int RD_LAT = 10, SEQ_N = 12;
  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic hs_valid = 0, hs_ready, hs_we = 0, hs_rvalid;
  logic [HOST_AW-1:0] hs_addr = '0;
  logic [HOST_W-1:0] hs_wdata = '0, hs_rdata;
  hmem_req_t hm_req;
  logic hm_ready, hm_rvalid;
  logic [HOST_W-1:0] hm_rdata;
  logic [NUM_PHYS-1:0] sram_rd, sram_wr;
  logic [PHYS_AW-1:0] sram_addr [NUM_PHYS];
  logic [PHYS_W-1:0] sram_wdata [NUM_PHYS];
  logic [PHYS_BE_W-1:0] sram_be [NUM_PHYS];
  logic [PHYS_W-1:0] sram_rdata [NUM_PHYS];
  logic user_logic_go, user_logic_done = 0;
  logic [63:0] reg_in [2];
  logic [0:0] reg_out_we = '0;
  logic [63:0] reg_out_wdata [1] = '{64'h0};
  logic mem_0_rd_cmd = 0, mem_0_rd_data_vld, mem_1_wr_cmd = 0;
  logic [18:0] mem_0_rd_addr = '0, mem_1_wr_addr = '0;
  logic [127:0] mem_0_rd_data, mem_1_wr_data = '0;
  logic [15:0] mem_1_wr_be = '0;
  logic seq_0_rd_avail, seq_0_rd_cmd, seq_0_rd_data_vld, seq_1_wr_ready, seq_1_wr_cmd;
  logic [HOST_W-1:0] seq_0_rd_data, seq_1_wr_data;

  pfif dut (.*);
  hmem_model #(.LAT(10), .REFUSE_PCT(20)) u_host (.clk, .rst, .req(hm_req), .ready(hm_ready),
    .rvalid(hm_rvalid), .rdata(hm_rdata));
  for (genvar p = 0; p < NUM_PHYS; p++) begin : g_sram
    sram_model #(.DEPTH(PHYS_DEPTH), .LAT(RD_LAT - 2), .AW(PHYS_AW)) u_sram (
      .clk, .rd(sram_rd[p]), .wr(sram_wr[p]), .addr(sram_addr[p]),
      .wdata(sram_wdata[p]), .be(sram_be[p]), .rdata(sram_rdata[p]));
  end

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  logic [63:0] rd_q[$];
  always @(posedge clk) if (!rst && hs_rvalid) rd_q.push_back(hs_rdata);
  task automatic slave(input bit we, input logic [HOST_AW-1:0] a, input logic [63:0] d);
    @(negedge clk);
    hs_valid = 1; hs_we = we; hs_addr = a; hs_wdata = d;
    #0.5;
    while (!hs_ready) begin @(negedge clk); #0.5; end
    @(posedge clk);
    @(negedge clk);
    hs_valid = 0;
  endtask
  task automatic hread(input logic [HOST_AW-1:0] a, output logic [63:0] d);
    slave(0, a, '0);
    while (rd_q.size() == 0) @(posedge clk);
    d = rd_q.pop_front();
  endtask
  function automatic logic [HOST_AW-1:0] ba(input int b, input int w);
    return HOST_AW'(((b + 1) << REGION_LSB) | w);
  endfunction

  // IP-side loop-back of the sequential channels
  assign seq_0_rd_cmd  = seq_0_rd_avail && seq_1_wr_ready;
  assign seq_1_wr_cmd  = seq_0_rd_data_vld;
  assign seq_1_wr_data = ~seq_0_rd_data;

  longint now = 0;
  logic [127:0] got [$];
  longint got_t [$];
  always @(posedge clk) begin
    now <= now + 1;
    if (!rst && mem_0_rd_data_vld) begin got.push_back(mem_0_rd_data); got_t.push_back(now); end
  end

  int n_go = 0;
  always @(posedge clk) if (!rst && user_logic_go) n_go++;

  initial begin
    logic [63:0] d;
    longint t0;
    for (int i = 0; i < SEQ_N; i++) u_host.poke(32'h5000 + i, 64'h7700 + 64'(i));
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int w = 0; w < 16; w++) slave(1, ba(0, w), 64'h1000 + 64'(w));
    slave(1, HOST_AW'(REG_IN_BASE), 64'hFEED);
    slave(1, HOST_AW'(REG_IN_BASE + 1), 64'hBEEF);
    @(negedge clk);
    chk(reg_in[0] == 64'hFEED && reg_in[1] == 64'hBEEF, "input registers");
    // IP reads mem_0
    @(negedge clk);
    t0 = now;
    for (int i = 0; i < 8; i++) begin
      mem_0_rd_cmd = 1; mem_0_rd_addr = 19'(i);
      @(negedge clk);
    end
    mem_0_rd_cmd = 0;
    repeat (RD_LAT + 4) @(negedge clk);
    chk(got.size() == 8, "eight words back");
    for (int i = 0; i < 8 && i < got.size(); i++) begin
      chk(got[i] == {64'h1000 + 64'(2 * i + 1), 64'h1000 + 64'(2 * i)}, $sformatf("mem_0 word %0d", i));
      chk(got_t[i] - (t0 + i) == RD_LAT + 1, $sformatf("latency %0d", got_t[i] - (t0 + i)));
    end
    // IP writes mem_1
    for (int i = 0; i < 4; i++) begin
      mem_1_wr_cmd = 1; mem_1_wr_addr = 19'(i);
      mem_1_wr_data = {64'hA0 + 64'(i), 64'hB0 + 64'(i)};
      mem_1_wr_be = '1;
      @(negedge clk);
    end
    mem_1_wr_cmd = 1; mem_1_wr_addr = 19'(0);
    mem_1_wr_data = {64'hFFFF_FFFF_FFFF_FFFF, 64'hFFFF_FFFF_FFFF_FFFF};
    mem_1_wr_be = 16'h0101;   // byte 0 of each lane
    @(negedge clk);
    mem_1_wr_cmd = 0;
    for (int i = 0; i < 4; i++) begin
      hread(ba(1, 2 * i), d);
      chk(d == ((i == 0) ? 64'hFF : 64'hB0 + 64'(i)), $sformatf("mem_1 lane 0 word %0d", i));
      hread(ba(1, 2 * i + 1), d);
      chk(d == ((i == 0) ? 64'hFF : 64'hA0 + 64'(i)), $sformatf("mem_1 lane 1 word %0d", i));
    end
    // output register
    @(negedge clk) reg_out_we = 1; reg_out_wdata[0] = 64'h0123;
    @(negedge clk) reg_out_we = 0;
    hread(HOST_AW'(REG_OUT_BASE), d);
    chk(d == 64'h0123, "output register");
    // run with sequential channels
    slave(1, HOST_AW'(REG_SQI_HADDR), 32'h5000);
    slave(1, HOST_AW'(REG_SQI_WORDS), SEQ_N);
    slave(1, HOST_AW'(REG_SQO_HADDR), 32'h6000);
    slave(1, HOST_AW'(REG_SQO_WORDS), SEQ_N);
    slave(1, HOST_AW'(REG_CTRL), 1);
    repeat (5) @(negedge clk);
    chk(n_go == 1, "go");
    repeat (60) @(negedge clk);
    user_logic_done = 1;
    @(negedge clk) user_logic_done = 0;
    do hread(HOST_AW'(REG_CTRL), d); while (d[2:0] != 3'(ST_DONE) && now < 5000);
    chk(d[2:0] == 3'(ST_DONE) && d[47:16] == 1, "run done");
    for (int i = 0; i < SEQ_N; i++)
      chk(u_host.peek(32'h6000 + i) == ~(64'h7700 + 64'(i)), $sformatf("sequential word %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
