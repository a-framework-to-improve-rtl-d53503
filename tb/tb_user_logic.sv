// tb_user_logic: the DES user logic against a model of its two memory banks.
// mem_0 answers reads after a fixed latency; mem_1 writes are captured. After
// user_logic_go the core must read words 0..N-1 one per cycle, write the DES
// ciphertext of both 64-bit halves of each word to the same index of mem_1,
// one per cycle, and pulse user_logic_done right after the last write. Checks
// data, addresses, byte enables, throughput and the done timing; also N = 0.
module tb_user_logic;
  import des_ref_pkg::*;
  localparam int AW = 19, LAT = 11, N = 64;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic user_logic_go = 0, mem_0_rd_data_vld = 0, mem_0_rd_cmd, mem_1_wr_cmd, user_logic_done;
  logic [63:0] reg_in0 = '0, reg_in1 = '0;
  logic [127:0] mem_0_rd_data = '0, mem_1_wr_data;
  logic [AW-1:0] mem_0_rd_addr, mem_1_wr_addr;
  logic [15:0] mem_1_wr_be;
  int checks = 0, failures = 0, n_rd = 0, n_wr = 0, n_done = 0;
  longint now = 0, first_wr = -1, last_wr = -1, done_t = -1, go_t = -1;

  user_logic #(.AW(AW)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic logic [127:0] pt(input int i);
    return {32'h1234_0000 + 32'(i), 32'(i) * 32'h0101_0101, ~32'(i), 32'hCAFE_0000 ^ 32'(i)};
  endfunction

  typedef struct { longint t; logic [127:0] d; } r_t;
  r_t q[$];
  always @(posedge clk) begin
    now <= now + 1;
    mem_0_rd_data_vld <= 0;
    if (!rst) begin
      if (mem_0_rd_cmd) begin
        chk(mem_0_rd_addr == AW'(n_rd), "read address in order");
        q.push_back('{now + LAT - 1, pt(int'(mem_0_rd_addr))});
        n_rd++;
      end
      if (q.size() > 0 && q[0].t <= now) begin
        mem_0_rd_data_vld <= 1; mem_0_rd_data <= q[0].d; void'(q.pop_front());
      end
      if (mem_1_wr_cmd) begin
        chk(mem_1_wr_addr == AW'(n_wr) && mem_1_wr_be == '1, "write address and enables");
        chk(mem_1_wr_data == {des_encrypt(reg_in0, pt(n_wr)[127:64]), des_encrypt(reg_in0, pt(n_wr)[63:0])},
            $sformatf("ciphertext word %0d", n_wr));
        if (first_wr < 0) first_wr = now;
        last_wr = now;
        n_wr++;
      end
      if (user_logic_done) begin n_done++; done_t = now; end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    reg_in0 = 64'h0123456789ABCDEF; reg_in1 = N;
    @(negedge clk) user_logic_go = 1; go_t = now;
    @(negedge clk) user_logic_go = 0;
    while (n_done == 0 && now < 2000) @(negedge clk);
    chk(n_rd == N && n_wr == N, $sformatf("%0d reads %0d writes", n_rd, n_wr));
    chk(last_wr - first_wr == N - 1, "one ciphertext word per cycle");
    chk(done_t == last_wr + 1, "done right after the last write");
    chk(first_wr - go_t == 1 + LAT + 17, $sformatf("first result %0d cycles after go", first_wr - go_t));
    // zero-length run
    reg_in1 = 0;
    @(negedge clk) user_logic_go = 1;
    @(negedge clk) user_logic_go = 0;
    repeat (3) @(negedge clk);
    chk(n_done == 2 && n_rd == N, "zero-length run finishes at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
