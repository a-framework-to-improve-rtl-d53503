// tb_fpga_top: end-to-end test of the DES example with every parameter of the
// top at its default (8 MB logical banks, four 4 MB modules, read latency 10).
//
// The testbench plays the host and the board: a host that reads and writes the
// FPGA through the host slave port, a host main memory answering DMA requests
// after a fixed delay and refusing some requests at random, and four SRAM models.
// It runs the design twice:
//   1. subroutine style: plaintext in host memory, the framework loads it into
//      mem_0, the DES logic encrypts into mem_1, the framework stores mem_1 back
//      to host memory; meanwhile the sequential IN channel streams a block of
//      host memory to a loop-back here that writes it into the sequential OUT
//      channel, which sends it back to another host-memory area;
//   2. interactive style: the host writes mem_0 word by word through the slave
//      port, starts a run with zero load/store counts, reads mem_0 while the
//      DES logic is reading it (the host waits for the IP), and reads mem_1
//      back through the slave port once the run is done.
// Every ciphertext word is compared with a reference DES function. Mechanisms
// counted: DMA loads and stores, sequential IN/OUT words, go/done, host-slave
// bank reads and writes, host stalls behind the IP, refused DMA requests and
// arbitration between DMA engines asking in the same cycle.
module tb_fpga_top;
  import pfif_pkg::*;
  import des_ref_pkg::*;

  localparam int unsigned N_WORDS = 40;        // 128-bit plaintext words per run
  localparam int unsigned SEQ_N   = 24;        // words through the sequential channels
  localparam logic [63:0] KEY     = 64'h133457799BBCDFF1;
  localparam int unsigned LOAD_A  = 32'h1000, STORE_A = 32'h8000;
  localparam int unsigned SQI_A   = 32'h20000, SQO_A = 32'h30000;
  localparam int unsigned HM_LAT  = 12;

  logic clk = 0, rst = 1;
  always #2.5 clk = ~clk;

  logic                 hs_valid = 0, hs_ready, hs_we = 0, hs_rvalid;
  logic [HOST_AW-1:0]   hs_addr = '0;
  logic [HOST_W-1:0]    hs_wdata = '0, hs_rdata;
  hmem_req_t            hm_req;
  logic                 hm_ready, hm_rvalid;
  logic [HOST_W-1:0]    hm_rdata;
  logic [NUM_PHYS-1:0]  sram_rd, sram_wr;
  logic [PHYS_AW-1:0]   sram_addr  [NUM_PHYS];
  logic [PHYS_W-1:0]    sram_wdata [NUM_PHYS];
  logic [PHYS_BE_W-1:0] sram_be    [NUM_PHYS];
  logic [PHYS_W-1:0]    sram_rdata [NUM_PHYS];
  logic [0:0]           reg_out_we = '0;
  logic [63:0]          reg_out_wdata [1] = '{64'h0};
  logic                 seq_0_rd_avail, seq_0_rd_cmd, seq_0_rd_data_vld;
  logic [HOST_W-1:0]    seq_0_rd_data;
  logic                 seq_1_wr_ready, seq_1_wr_cmd;
  logic [HOST_W-1:0]    seq_1_wr_data;

  fpga_top dut (.*);

  for (genvar p = 0; p < NUM_PHYS; p++) begin : g_sram
    sram_model #(.DEPTH(PHYS_DEPTH), .LAT(8), .AW(PHYS_AW)) u_sram (
      .clk, .rd(sram_rd[p]), .wr(sram_wr[p]), .addr(sram_addr[p]),
      .wdata(sram_wdata[p]), .be(sram_be[p]), .rdata(sram_rdata[p])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- host main memory ----------------
  logic [63:0] hmem [logic [31:0]];
  typedef struct { longint t; logic [63:0] d; } rsp_t;
  rsp_t rq[$];
  longint now = 0;
  int n_refused = 0, n_dma_rd = 0, n_dma_wr = 0, n_arb = 0;

  always_ff @(posedge clk) now <= now + 1;

  always @(posedge clk) begin
    hm_ready <= ($urandom % 5) != 0;
  end
  always @(posedge clk) begin
    hm_rvalid <= 1'b0;
    if (hm_req.valid && !hm_ready) n_refused++;
    if (hm_req.valid && hm_ready) begin
      if (hm_req.we) begin
        hmem[hm_req.addr] = hm_req.wdata;
        n_dma_wr++;
      end else begin
        rq.push_back('{now + HM_LAT, hmem.exists(hm_req.addr) ? hmem[hm_req.addr] : 64'h0});
        n_dma_rd++;
      end
    end
    if (rq.size() > 0 && rq[0].t <= now) begin
      hm_rvalid <= 1'b1;
      hm_rdata  <= rq[0].d;
      void'(rq.pop_front());
    end
    if ($countones({dut.u_pfif.m_req[0].valid, dut.u_pfif.m_req[1].valid,
                    dut.u_pfif.m_req[2].valid, dut.u_pfif.m_req[3].valid}) > 1) n_arb++;
  end

  // ---------------- sequential loop-back IP ----------------
  int n_sqi = 0, n_sqo = 0;
  assign seq_0_rd_cmd  = seq_0_rd_avail && seq_1_wr_ready && ($urandom % 3 != 0);
  assign seq_1_wr_cmd  = seq_0_rd_data_vld;
  assign seq_1_wr_data = seq_0_rd_data ^ 64'hA5A5_0000_0000_5A5A;
  always @(posedge clk) begin
    if (seq_0_rd_data_vld) n_sqi++;
    if (seq_1_wr_cmd) n_sqo++;
  end

  // ---------------- event counters ----------------
  int n_go = 0, n_done = 0, n_host_stall_ip = 0, n_slave_bank_wr = 0, n_slave_bank_rd = 0;
  always @(posedge clk) begin
    if (!rst && dut.go) n_go++;
    if (!rst && dut.done) n_done++;
    if (hs_valid && !hs_ready && hs_addr[HOST_AW-1:REGION_LSB] != 0 &&
        (dut.m0_cmd || dut.m1_cmd)) n_host_stall_ip++;
    if (hs_valid && hs_ready && hs_addr[HOST_AW-1:REGION_LSB] != 0) begin
      if (hs_we) n_slave_bank_wr++;
      else       n_slave_bank_rd++;
    end
  end

  // ---------------- host slave tasks ----------------
  logic [63:0] rd_q[$];
  always @(posedge clk) if (!rst && hs_rvalid) rd_q.push_back(hs_rdata);

  // Requests are driven and hs_ready is sampled at the falling edge, so the
  // request is taken at the next rising edge exactly when hs_ready was high.
  task automatic slave_req(input bit we, input logic [HOST_AW-1:0] a, input logic [63:0] d);
    @(negedge clk);
    hs_valid = 1; hs_we = we; hs_addr = a; hs_wdata = d;
    #0.5;  // let hs_ready settle on the new address
    while (!hs_ready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    hs_valid = 0;
  endtask

  task automatic host_write(input logic [HOST_AW-1:0] a, input logic [63:0] d);
    slave_req(1, a, d);
  endtask

  task automatic host_read(input logic [HOST_AW-1:0] a, output logic [63:0] d);
    slave_req(0, a, '0);
    while (rd_q.size() == 0) @(posedge clk);
    d = rd_q.pop_front();
  endtask

  function automatic logic [HOST_AW-1:0] reg_a(input int idx);
    return HOST_AW'(idx);
  endfunction
  function automatic logic [HOST_AW-1:0] bank_a(input int bank, input int word);
    return HOST_AW'(((bank + 1) << REGION_LSB) | word);
  endfunction

  task automatic wait_done(input int runs_before);
    logic [63:0] st;
    do begin
      repeat (20) @(posedge clk);
      host_read(reg_a(REG_CTRL), st);
    end while (st[47:16] == 64'(runs_before));
    check(st[2:0] == 3'(ST_DONE), "status shows done");
  endtask

  function automatic logic [63:0] pt_word(input int run, input int j);
    return {32'(run) ^ 32'h0BAD_F00D, 32'(j) * 32'h9E37_79B9};
  endfunction

  // ---------------- test ----------------
  initial begin
    logic [63:0] d;
    int run_cycles;
    for (int j = 0; j < 2 * N_WORDS; j++) hmem[LOAD_A + j] = pt_word(1, j);
    for (int j = 0; j < SEQ_N; j++) hmem[SQI_A + j] = 64'hC0DE_0000_0000_0000 | 64'(j * 7);

    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);

    check(des_encrypt(64'h133457799BBCDFF1, 64'h0123456789ABCDEF) == 64'h85E813540F0AB405,
          "reference DES known answer");

    // ---- run 1: framework moves the data ----
    host_write(reg_a(REG_IN_BASE + 0), KEY);
    host_write(reg_a(REG_IN_BASE + 1), 64'(N_WORDS));
    host_write(reg_a(REG_LOAD_HADDR), LOAD_A);
    host_write(reg_a(REG_LOAD_WORDS), 2 * N_WORDS);
    host_write(reg_a(REG_LOAD_BANK), 0);
    host_write(reg_a(REG_STORE_HADDR), STORE_A);
    host_write(reg_a(REG_STORE_WORDS), 2 * N_WORDS);
    host_write(reg_a(REG_STORE_BANK), 1);
    host_write(reg_a(REG_SQI_HADDR), SQI_A);
    host_write(reg_a(REG_SQI_WORDS), SEQ_N);
    host_write(reg_a(REG_SQO_HADDR), SQO_A);
    host_write(reg_a(REG_SQO_WORDS), SEQ_N);
    host_read(reg_a(REG_IN_BASE + 1), d);
    check(d == 64'(N_WORDS), $sformatf("input register reads back %h", d));
    host_write(reg_a(REG_CTRL), 1);
    wait_done(0);

    for (int j = 0; j < 2 * N_WORDS; j++)
      check(hmem.exists(STORE_A + j) && hmem[STORE_A + j] == des_encrypt(KEY, pt_word(1, j)),
            $sformatf("run 1 ciphertext word %0d", j));
    for (int j = 0; j < SEQ_N; j++)
      check(hmem.exists(SQO_A + j) &&
            hmem[SQO_A + j] == ((64'hC0DE_0000_0000_0000 | 64'(j * 7)) ^ 64'hA5A5_0000_0000_5A5A),
            $sformatf("sequential loop-back word %0d", j));

    // ---- run 2: host moves the data through the slave port ----
    for (int j = 0; j < 2 * N_WORDS; j++) host_write(bank_a(0, j), pt_word(2, j));
    host_write(reg_a(REG_LOAD_WORDS), 0);
    host_write(reg_a(REG_STORE_WORDS), 0);
    host_write(reg_a(REG_SQI_WORDS), 0);
    host_write(reg_a(REG_SQO_WORDS), 0);
    host_write(reg_a(REG_IN_BASE + 0), ~KEY);
    host_write(reg_a(REG_CTRL), 1);
    // read mem_0 while the IP is reading it: the host has to wait
    run_cycles = 0;
    while (!dut.m0_cmd && run_cycles < 100) begin @(posedge clk); run_cycles++; end
    for (int j = 0; j < 4; j++) begin
      host_read(bank_a(0, j), d);
      check(d == pt_word(2, j), $sformatf("host read of mem_0 during the run %0d: %h vs %h", j, d, pt_word(2, j)));
    end
    wait_done(1);
    for (int j = 0; j < 2 * N_WORDS; j++) begin
      host_read(bank_a(1, j), d);
      check(d == des_encrypt(~KEY, pt_word(2, j)), $sformatf("run 2 ciphertext word %0d", j));
    end

    // ---- every mechanism seen ----
    $display("events: go=%0d done=%0d dma_rd=%0d dma_wr=%0d seq_in=%0d seq_out=%0d",
             n_go, n_done, n_dma_rd, n_dma_wr, n_sqi, n_sqo);
    $display("events: slave_bank_wr=%0d slave_bank_rd=%0d host_stall_ip=%0d refused=%0d arb=%0d",
             n_slave_bank_wr, n_slave_bank_rd, n_host_stall_ip, n_refused, n_arb);
    check(n_go == 2 && n_done == 2, "two go/done handshakes");
    check(n_dma_rd == 2 * N_WORDS + SEQ_N, "DMA reads: load plus sequential IN");
    check(n_dma_wr == 2 * N_WORDS + SEQ_N, "DMA writes: store plus sequential OUT");
    check(n_sqi == SEQ_N && n_sqo == SEQ_N, "sequential words");
    check(n_slave_bank_wr > 0, "host writes to a bank");
    check(n_slave_bank_rd > 0, "host reads from a bank");
    check(n_host_stall_ip > 0, "host waited behind the IP");
    check(n_refused > 0, "host memory refused a request");
    check(n_arb > 0, "DMA engines competed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: state %0d hs_valid %0d hs_ready %0d addr %h outstanding %0d rd_q %0d", dut.u_pfif.u_ctrl.state, hs_valid, hs_ready, hs_addr, dut.u_pfif.u_comm.outstanding, rd_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
