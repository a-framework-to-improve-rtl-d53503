// tb_pfif_seq_in: Sequential IN bank at three IP widths: 64 bits (one host
// word per IP word), 16 bits (four IP words from each host word) and 128 bits
// (two host words gathered per IP word). In each, an IP model issues rd_cmd at
// random, also when nothing waits; each word must arrive one cycle after an
// accepted rd_cmd, in host-memory order from the first word, and exactly the
// requested number of them.
module tb_pfif_seq_in;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic d64, d16, d128;
  int   c64, c16, c128, f64, f16, f128;

  seq_in_harness #(.DW(64),  .NIP(50)) u_64  (.clk, .rst, .done(d64),  .checks(c64),  .failures(f64));
  seq_in_harness #(.DW(16),  .NIP(80)) u_16  (.clk, .rst, .done(d16),  .checks(c16),  .failures(f16));
  seq_in_harness #(.DW(128), .NIP(25)) u_128 (.clk, .rst, .done(d128), .checks(c128), .failures(f128));

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
