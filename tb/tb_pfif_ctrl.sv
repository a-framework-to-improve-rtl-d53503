// tb_pfif_ctrl: the run sequencer against models of a bank host port, two host
// memories (load and store engines), the sequential OUT channel and an IP.
// Run 1 (subroutine style): host words must be copied into the bank before
// user_logic_go, the store must wait for user_logic_done and for the
// sequential OUT channel to go idle, and the bank contents must reach host
// memory; the status register must step through the phases and count the run.
// Run 2 (interactive style, zero counts): go must follow start directly.
module tb_pfif_ctrl;
  import pfif_pkg::*;
  localparam int NB = 2, NW = 37, BLAT = 5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start = 0, user_logic_go, user_logic_done = 0, sqi_start, sqo_start, sqo_busy = 0;
  logic [HOST_W-1:0] desc [NUM_DESC];
  logic [HOST_W-1:0] status;
  logic c_own, c_valid, c_ready, c_we, c_rvalid = 0, slave_idle = 1;
  logic [1:0] c_bank;
  logic [REGION_LSB-1:0] c_addr;
  logic [HOST_W-1:0] c_wdata, c_rdata = '0;
  hmem_req_t ld_req, st_req;
  logic ld_ready, ld_rvalid, st_ready, st_rv;
  logic [HOST_W-1:0] ld_rdata, st_rd;

  pfif_ctrl #(.NUM_BANKS(NB), .FIFO_DEPTH(8)) dut (.*);
  hmem_model #(.LAT(8), .REFUSE_PCT(25)) u_ld (.clk, .rst, .req(ld_req), .ready(ld_ready),
    .rvalid(ld_rvalid), .rdata(ld_rdata));
  hmem_model #(.LAT(2), .REFUSE_PCT(40)) u_st (.clk, .rst, .req(st_req), .ready(st_ready),
    .rvalid(st_rv), .rdata(st_rd));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // bank host-port model
  logic [63:0] bank [NB][logic [31:0]];
  typedef struct { longint t; logic [63:0] d; } r_t;
  r_t q[$];
  longint now = 0, go_t = -1, done_t = -1, first_store = -1, last_load = -1, sqo_idle_t = -1;
  int n_go = 0, n_bwr = 0, n_brd = 0;
  always @(negedge clk) c_ready = ($urandom % 3) != 0;
  always @(posedge clk) begin
    now <= now + 1;
    c_rvalid <= 0;
    if (!rst) begin
      if (c_valid && c_ready) begin
        chk(c_own, "bank access only while owned");
        if (c_we) begin bank[c_bank][32'(c_addr)] = c_wdata; n_bwr++; last_load = now; end
        else begin
          q.push_back('{now + BLAT, bank[c_bank].exists(32'(c_addr)) ? bank[c_bank][32'(c_addr)] : 64'h0});
          n_brd++;
          if (first_store < 0) first_store = now;
        end
      end
      if (q.size() > 0 && q[0].t <= now) begin
        c_rvalid <= 1; c_rdata <= q[0].d; void'(q.pop_front());
      end
      if (user_logic_go) begin n_go++; go_t = now; end
    end
  end

  initial begin
    foreach (desc[i]) desc[i] = '0;
    for (int i = 0; i < NW; i++) u_ld.poke(32'h300 + i, 64'hAB00 + 64'(i));
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    desc[REG_LOAD_HADDR] = 32'h300; desc[REG_LOAD_WORDS] = NW; desc[REG_LOAD_BANK] = 0;
    desc[REG_STORE_HADDR] = 32'h900; desc[REG_STORE_WORDS] = NW; desc[REG_STORE_BANK] = 1;
    chk(status[2:0] == 3'(ST_IDLE) && !status[8], "idle status");
    start = 1;
    @(negedge clk) start = 0;
    @(negedge clk);
    chk(status[2:0] == 3'(ST_LOAD) && status[8], "load status");
    while (n_go == 0 && now < 3000) @(negedge clk);
    chk(n_bwr == NW && go_t > last_load, "all loaded before go");
    for (int i = 0; i < NW; i++) chk(bank[0][i] == 64'hAB00 + 64'(i), $sformatf("loaded word %0d", i));
    // IP fills bank 1, keeps the sequential OUT channel busy, then reports done
    for (int i = 0; i < NW; i++) bank[1][i] = 64'hCD00 + 64'(i);
    sqo_busy = 1;
    repeat (10) @(negedge clk);
    chk(status[2:0] == 3'(ST_RUN), "run status");
    user_logic_done = 1; done_t = now;
    @(negedge clk) user_logic_done = 0;
    repeat (10) @(negedge clk);
    chk(first_store < 0 && status[2:0] == 3'(ST_DRAIN), "store waits for the sequential channel");
    sqo_busy = 0; sqo_idle_t = now;
    while (status[2:0] != 3'(ST_DONE) && now < 5000) @(negedge clk);
    chk(first_store >= sqo_idle_t, "store after drain");
    chk(n_brd == NW, "store read count");
    for (int i = 0; i < NW; i++) chk(u_st.peek(32'h900 + i) == 64'hCD00 + 64'(i), $sformatf("stored word %0d", i));
    chk(status[47:16] == 1 && !c_own, "one run counted, banks released");
    // interactive run
    desc[REG_LOAD_WORDS] = 0; desc[REG_STORE_WORDS] = 0;
    start = 1;
    @(negedge clk) start = 0;
    @(negedge clk);
    chk(n_go == 2 && status[2:0] == 3'(ST_RUN), "go straight after start");
    user_logic_done = 1;
    @(negedge clk) user_logic_done = 0;
    repeat (4) @(negedge clk);
    chk(status[2:0] == 3'(ST_DONE) && status[47:16] == 2, "second run done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
