// tb_pfif_dma_wr: DMA write engine fed by a random-rate source, writing into a
// host memory that refuses requests at random. Checks the written words and
// addresses, that nothing is written past the count, and busy.
module tb_pfif_dma_wr;
  import pfif_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start = 0, busy, req_ready, in_valid = 0, in_ready, rv;
  logic [HMEM_AW-1:0] base = '0;
  logic [31:0] words = '0;
  logic [HOST_W-1:0] in_data = '0, rd;
  hmem_req_t req;
  int checks = 0, failures = 0, sent = 0;

  pfif_dma_wr dut (.*);
  hmem_model #(.LAT(5), .REFUSE_PCT(30)) u_host (.clk, .rst, .req, .ready(req_ready),
    .rvalid(rv), .rdata(rd));

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  always @(posedge clk) if (!rst && in_valid && in_ready) sent++;
  always @(negedge clk) begin
    in_valid = ($urandom % 4) != 0;
    in_data  = 64'hF00D_0000_0000_0000 + 64'(sent);
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (5) @(negedge clk);
    chk(sent == 0, "nothing taken while idle");
    base = HMEM_AW'(32'h400); words = 100; start = 1;
    @(negedge clk) start = 0;
    while (busy) @(negedge clk);
    repeat (10) @(negedge clk);
    chk(sent == 100, $sformatf("taken %0d", sent));
    for (int i = 0; i < 100; i++)
      chk(u_host.peek(32'h400 + i) == 64'hF00D_0000_0000_0000 + 64'(i), $sformatf("word %0d", i));
    chk(u_host.peek(32'h400 + 100) == 0, "nothing past the count");
    chk(u_host.n_wr == 100 && u_host.n_refused > 0, "write count and refusals");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
