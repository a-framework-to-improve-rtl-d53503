// tb_pfif_seq_out: Sequential OUT bank at three IP widths: 64 bits (one host
// word per IP word), 16 bits (four IP words packed per host word) and 128 bits
// (each IP word split into two host words). In each, an IP model writes words
// whenever wr_ready is high, at random; the host words must land at
// consecutive addresses in order with the expected packing, busy must last
// until the last one is written, and wr_ready must drop when the buffer fills
// behind a slow host.
module tb_pfif_seq_out;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic d64, d16, d128;
  int   c64, c16, c128, f64, f16, f128;

  seq_out_harness #(.DW(64),  .NIP(60)) u_64  (.clk, .rst, .done(d64),  .checks(c64),  .failures(f64));
  seq_out_harness #(.DW(16),  .NIP(96)) u_16  (.clk, .rst, .done(d16),  .checks(c16),  .failures(f16));
  seq_out_harness #(.DW(128), .NIP(30)) u_128 (.clk, .rst, .done(d128), .checks(c128), .failures(f128));

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (d64 && d16 && d128);
    $display("TB_RESULT checks=%0d failures=%0d", c64 + c16 + c128, f64 + f16 + f128);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c64 + c16 + c128, f64 + f16 + f128 + 1);
    $finish;
  end
endmodule
