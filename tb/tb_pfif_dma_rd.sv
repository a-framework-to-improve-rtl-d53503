// tb_pfif_dma_rd: DMA read engine against a host memory that refuses requests
// at random, with a consumer that stalls at random. Checks that exactly the
// requested words arrive in order, that the engine never overfills its buffer
// (assertion inside), busy, and a zero-length transfer.
module tb_pfif_dma_rd;
  import pfif_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start = 0, busy, req_ready, rsp_valid, out_valid, out_ready = 0;
  logic [HMEM_AW-1:0] base = '0;
  logic [31:0] words = '0;
  logic [HOST_W-1:0] rsp_data, out_data;
  hmem_req_t req;
  int checks = 0, failures = 0, got = 0, n_stall = 0;

  pfif_dma_rd #(.FIFO_DEPTH(8)) dut (.*);
  hmem_model #(.LAT(9), .REFUSE_PCT(25)) u_host (.clk, .rst, .req, .ready(req_ready),
    .rvalid(rsp_valid), .rdata(rsp_data));

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      chk(out_data == 64'hD00D_0000_0000_0000 + 64'(base) + 64'(got), $sformatf("word %0d", got));
      got++;
    end
  end

  always @(negedge clk) out_ready = ($urandom % 3) != 0;

  task automatic run(input int a, input int n);
    @(negedge clk);
    got = 0; base = HMEM_AW'(a); words = 32'(n); start = 1;
    @(negedge clk); start = 0;
    if (n != 0) chk(busy, "busy after start");
    while (busy) @(negedge clk);
    repeat (20) @(negedge clk);
    chk(got == n, $sformatf("word count %0d vs %0d", got, n));
  endtask

  initial begin
    for (int i = 0; i < 400; i++) u_host.poke(32'h100 + i, 64'hD00D_0000_0000_0100 + 64'(i));
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(32'h100, 200);
    run(32'h150, 37);
    run(32'h100, 0);
    chk(!busy, "idle after zero-length transfer");
    chk(n_stall > 0 && u_host.n_refused > 0, "stalls and refusals happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
