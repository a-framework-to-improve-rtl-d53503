// tb_pfif_fifo: random pushes and pops against a queue model; checks data
// order, the empty/full flags and the occupancy count, including pushes and
// pops in the same cycle and attempts to overfill.
module tb_pfif_fifo;
  localparam int W = 16, D = 5;
  logic clk = 0, rst = 1;
  logic push = 0, pop = 0, empty, full;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, n_full = 0, n_both = 0;
  logic [W-1:0] model[$];

  pfif_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (count != model.size() || empty != (model.size() == 0) || full != (model.size() == D)) begin
        failures++;
        $display("FAIL flags: count %0d model %0d", count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (rd_data != model[0]) begin failures++; $display("FAIL data %h vs %h", rd_data, model[0]); end
      end
      push = ($urandom % 100) < ((i / 500) % 2 ? 70 : 35);
      pop  = ($urandom % 100) < ((i / 500) % 2 ? 35 : 70);
      if (full) push = 0;        // the design asserts on overflow; keep the stimulus legal
      if (empty) pop = 0;
      wr_data = W'($urandom);
      if (full) n_full++;
      if (push && pop) n_both++;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wr_data);
    end
    checks++;
    if (n_full == 0 || n_both == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
