// tb_des_workload: the DES experiment at full size. 8 MB of plaintext (524288
// words of 128 bits, the whole of mem_0) sit in host memory; one subroutine-style
// run loads them into mem_0 by DMA, the two DES cores encrypt them into mem_1,
// and the framework stores mem_1 back to host memory. The top is used with all
// parameters at their defaults. The SRAM and host-memory models are the same
// behavioural models as in the block tests; host memory accepts every request
// here, so the transfers run at the 64-bit host bus rate.
//
// Checks: every ciphertext word against a reference DES function; the IP phase
// (user_logic_go to user_logic_done) takes one cycle per 128-bit word plus a
// fixed pipeline fill, i.e. 128 bits per cycle as two DES cores consume; the
// load and the store each take at least one cycle per 64-bit host word and not
// much more. The measured figures, scaled to a 200 MHz clock, are printed.
module tb_des_workload;
  import pfif_pkg::*;
  import des_ref_pkg::*;

  localparam int unsigned N_WORDS = 524288;    // 8 MB of 128-bit words
  localparam logic [63:0] KEY     = 64'h0E32_9232_EA6D_0D73;
  localparam int unsigned LOAD_A  = 32'h0100_0000, STORE_A = 32'h0200_0000;
  localparam int unsigned FILL    = 64;        // allowed pipeline fill, cycles

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
  logic                 seq_0_rd_avail, seq_0_rd_data_vld, seq_1_wr_ready;
  logic                 seq_0_rd_cmd = 0, seq_1_wr_cmd = 0;
  logic [HOST_W-1:0]    seq_0_rd_data, seq_1_wr_data = '0;

  fpga_top dut (.*);

  for (genvar p = 0; p < NUM_PHYS; p++) begin : g_sram
    sram_model #(.DEPTH(PHYS_DEPTH), .LAT(8), .AW(PHYS_AW)) u_sram (
      .clk, .rd(sram_rd[p]), .wr(sram_wr[p]), .addr(sram_addr[p]),
      .wdata(sram_wdata[p]), .be(sram_be[p]), .rdata(sram_rdata[p])
    );
  end

  hmem_model #(.LAT(12), .REFUSE_PCT(0)) u_host (.clk, .rst, .req(hm_req), .ready(hm_ready),
    .rvalid(hm_rvalid), .rdata(hm_rdata));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // phase timing from the controller's state and the go/done pulses
  longint now = 0, t_start = 0, t_go = 0, t_done = 0, t_end = 0;
  always @(posedge clk) begin
    now <= now + 1;
    if (!rst && dut.go)   t_go   <= now;
    if (!rst && dut.done) t_done <= now;
  end

  logic [63:0] rd_q[$];
  always @(posedge clk) if (!rst && hs_rvalid) rd_q.push_back(hs_rdata);

  task automatic slave_req(input bit we, input logic [HOST_AW-1:0] a, input logic [63:0] d);
    @(negedge clk);
    hs_valid = 1; hs_we = we; hs_addr = a; hs_wdata = d;
    #0.5;
    while (!hs_ready) @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    hs_valid = 0;
  endtask
  task automatic host_read(input logic [HOST_AW-1:0] a, output logic [63:0] d);
    slave_req(0, a, '0);
    while (rd_q.size() == 0) @(posedge clk);
    d = rd_q.pop_front();
  endtask

  function automatic logic [63:0] pt_word(input int j);
    return {32'(j) * 32'h9E37_79B9, 32'(j) ^ 32'h5A5A_1234};
  endfunction

  initial begin
    logic [63:0] st;
    longint load_c, run_c, store_c;
    for (int j = 0; j < 2 * N_WORDS; j++) u_host.poke(LOAD_A + j, pt_word(j));
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);

    slave_req(1, HOST_AW'(REG_IN_BASE + 0), KEY);
    slave_req(1, HOST_AW'(REG_IN_BASE + 1), 64'(N_WORDS));
    slave_req(1, HOST_AW'(REG_LOAD_HADDR), LOAD_A);
    slave_req(1, HOST_AW'(REG_LOAD_WORDS), 2 * N_WORDS);
    slave_req(1, HOST_AW'(REG_LOAD_BANK), 0);
    slave_req(1, HOST_AW'(REG_STORE_HADDR), STORE_A);
    slave_req(1, HOST_AW'(REG_STORE_WORDS), 2 * N_WORDS);
    slave_req(1, HOST_AW'(REG_STORE_BANK), 1);
    slave_req(1, HOST_AW'(REG_SQI_WORDS), 0);
    slave_req(1, HOST_AW'(REG_SQO_WORDS), 0);
    t_start = now;
    slave_req(1, HOST_AW'(REG_CTRL), 1);
    do begin
      repeat (1000) @(posedge clk);
      host_read(HOST_AW'(REG_CTRL), st);
    end while (st[47:16] == 0);
    // the state leaves STORE when the last write is handed to host memory
    t_end = now;
    check(st[2:0] == 3'(ST_DONE), "status shows done");

    for (int j = 0; j < 2 * N_WORDS; j++)
      check(u_host.peek(STORE_A + j) == des_encrypt(KEY, pt_word(j)),
            $sformatf("ciphertext word %0d", j));

    load_c  = t_go - t_start;
    run_c   = t_done - t_go;
    store_c = t_end - t_done;
    $display("cycles: load %0d, encrypt %0d, store+poll %0d; words %0d", load_c, run_c, store_c, N_WORDS);
    $display("at 200 MHz: encrypt %.2f GB/s, whole run %.3f GB/s",
             real'(N_WORDS) * 16.0 * 0.2 / real'(run_c),
             real'(N_WORDS) * 16.0 * 0.2 / real'(t_end - t_start));
    check(u_host.n_wr == 2 * N_WORDS && u_host.n_rd == 2 * N_WORDS, "one DMA access per host word");
    check(run_c >= N_WORDS && run_c <= N_WORDS + FILL, "IP consumes 128 bits per cycle");
    check(load_c >= 2 * N_WORDS && load_c <= 2 * N_WORDS + 2 * FILL, "load at one host word per cycle");
    check(store_c >= 2 * N_WORDS, "store takes a cycle per host word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
