// tb_pfif_local_mem_ctrl: a local memory controller in front of an SRAM model.
// Random back-to-back reads and byte-masked writes; every read must come back
// with the right word exactly RD_LAT cycles after it was presented, and the
// valid flag must not fire for writes.
module tb_pfif_local_mem_ctrl;
  import pfif_pkg::*;
  localparam int RD_LAT = 10;
  localparam int DEPTH  = 256;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  pfc_mem_req_t req;
  pfc_mem_rsp_t rsp;
  logic sram_rd, sram_wr;
  logic [PHYS_AW-1:0] sram_addr;
  logic [PHYS_W-1:0] sram_wdata, sram_rdata;
  logic [PHYS_BE_W-1:0] sram_be;
  int checks = 0, failures = 0;
  longint now = 0;

  pfif_local_mem_ctrl #(.RD_LAT(RD_LAT)) dut (.*);
  sram_model #(.DEPTH(DEPTH), .LAT(RD_LAT - 2), .AW(PHYS_AW)) u_sram (
    .clk, .rd(sram_rd), .wr(sram_wr), .addr(sram_addr), .wdata(sram_wdata), .be(sram_be),
    .rdata(sram_rdata));

  logic [63:0] model [DEPTH];
  typedef struct { longint t; logic [63:0] d; } e_t;
  e_t q[$];
  always @(posedge clk) now <= now + 1;
  always @(posedge clk) if (!rst && rsp.valid) begin
    checks++;
    if (q.size() == 0 || q[0].d != rsp.rdata || q[0].t != now) begin
      failures++;
      $display("FAIL read data/latency at %0d", now);
    end
    if (q.size() > 0) void'(q.pop_front());
  end

  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int a = 0; a < DEPTH; a++) begin   // fill
      @(negedge clk);
      req = '{valid: 1, we: 1, addr: PHYS_AW'(a), wdata: {32'(a), $urandom}, be: '1};
      model[a] = req.wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      int a = $urandom % DEPTH;
      @(negedge clk);
      req = '0;
      case ($urandom % 4)
        0: begin
          req = '{valid: 1, we: 1, addr: PHYS_AW'(a), wdata: {$urandom, $urandom}, be: PHYS_BE_W'($urandom)};
          for (int b = 0; b < 8; b++) if (req.be[b]) model[a][b*8 +: 8] = req.wdata[b*8 +: 8];
        end
        1, 2: begin
          req = '{valid: 1, we: 0, addr: PHYS_AW'(a), wdata: '0, be: '0};
          q.push_back('{now + RD_LAT, model[a]});
        end
        default: ;
      endcase
    end
    @(negedge clk) req = '0;
    repeat (RD_LAT + 3) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL missing responses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
