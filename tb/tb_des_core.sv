// tb_des_core: checks the pipelined DES core against published DES test
// vectors, issued back to back with a different key on every block, and checks
// the 17-cycle latency.
module tb_des_core;
  logic clk = 0, rst = 1;
  logic in_valid = 0, out_valid;
  logic [63:0] in_block = '0, in_key = '0, out_block;
  int checks = 0, failures = 0;

  localparam int N = 5;
  logic [63:0] KEY [N] = '{64'h133457799BBCDFF1, 64'h0E329232EA6D0D73, 64'h0000000000000000,
                           64'hFFFFFFFFFFFFFFFF, 64'h0123456789ABCDEF};
  logic [63:0] PT  [N] = '{64'h0123456789ABCDEF, 64'h8787878787878787, 64'h0000000000000000,
                           64'hFFFFFFFFFFFFFFFF, 64'h4E6F772069732074};
  logic [63:0] CT  [N] = '{64'h85E813540F0AB405, 64'h0000000000000000, 64'h8CA64DE9C1B123A7,
                           64'h7359B2163E4EDC58, 64'h3FA40E8A984D4815};

  des_core dut (.*);

  always #5 clk = ~clk;

  int cycle = 0, first_in = -1, got = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (out_valid) begin
      checks++;
      if (out_block !== CT[got]) begin
        failures++;
        $display("FAIL vector %0d: got %h expected %h", got, out_block, CT[got]);
      end
      if (got == 0) begin
        checks++;
        // the block is sampled at the edge that ends cycle first_in
        if (cycle - first_in - 1 != 17) begin
          failures++;
          $display("FAIL latency %0d", cycle - first_in);
        end
      end
      got <= got + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      in_valid <= 1; in_block <= PT[i]; in_key <= KEY[i];
      if (i == 0) first_in = cycle;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (30) @(posedge clk);
    checks++;
    if (got != N) begin failures++; $display("FAIL got %0d outputs", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
