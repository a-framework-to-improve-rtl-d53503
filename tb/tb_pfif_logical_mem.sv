// tb_pfif_logical_mem: logical memory banks of three geometries under random
// IP and host traffic: 128-bit words over two modules side by side, 32-bit words
// packed two per module word, and 64-bit words over three stacked modules
// (a 10 MB bank), all of type Shared IN/OUT; then one bank of each other
// random-access type: a Local bank of 16-bit words (no host port), a Shared IN
// bank of 128-bit words (IP writes ignored) and a Shared OUT bank of 8-bit
// words (IP reads ignored). See lm_harness for what is checked.
module tb_pfif_logical_mem;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  import pfif_pkg::*;
  int c0, f0, w0, c1, f1, w1, c2, f2, w2, c3, f3, w3, c4, f4, w4, c5, f5, w5;
  bit d0, d1, d2, d3, d4, d5;

  lm_harness #(.LOG_W(128), .LOG_DEPTH(4096))       h_wide   (.clk, .rst, .checks(c0), .failures(f0), .n_host_wait(w0), .finished(d0));
  lm_harness #(.LOG_W(32),  .LOG_DEPTH(8192))       h_narrow (.clk, .rst, .checks(c1), .failures(f1), .n_host_wait(w1), .finished(d1));
  lm_harness #(.LOG_W(64),  .LOG_DEPTH(1310720))    h_deep   (.clk, .rst, .checks(c2), .failures(f2), .n_host_wait(w2), .finished(d2));
  lm_harness #(.MEM_TYPE(MEM_LOCAL),      .LOG_W(16),  .LOG_DEPTH(4096))
    h_local (.clk, .rst, .checks(c3), .failures(f3), .n_host_wait(w3), .finished(d3));
  lm_harness #(.MEM_TYPE(MEM_SHARED_IN),  .LOG_W(128), .LOG_DEPTH(2048))
    h_in    (.clk, .rst, .checks(c4), .failures(f4), .n_host_wait(w4), .finished(d4));
  lm_harness #(.MEM_TYPE(MEM_SHARED_OUT), .LOG_W(8),   .LOG_DEPTH(4096))
    h_out   (.clk, .rst, .checks(c5), .failures(f5), .n_host_wait(w5), .finished(d5));

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst = 0;
    wait (d0 && d1 && d2 && d3 && d4 && d5);
    checks = c0 + c1 + c2 + c3 + c4 + c5 + 1;
    failures = f0 + f1 + f2 + f3 + f4 + f5;
    if (w0 == 0 || w1 == 0 || w2 == 0 || w5 == 0) begin failures++; $display("FAIL host never had to wait"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3 + c4 + c5,
             f0 + f1 + f2 + f3 + f4 + f5 + 1);
    $finish;
  end
endmodule
