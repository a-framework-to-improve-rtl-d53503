// tb_pfif_reg_block: host writes and reads of input, descriptor and control
// registers, IP writes of output registers read back by the host, the start
// pulse, the status passthrough and the one-cycle read latency.
module tb_pfif_reg_block;
  import pfif_pkg::*;
  localparam int NI = 3, NO = 3;
  logic clk = 0, rst = 1;
  logic reg_wr = 0, reg_rd = 0, reg_rvalid, start;
  logic [REG_IDX_W-1:0] reg_idx = '0;
  logic [HOST_W-1:0] reg_wdata = '0, reg_rdata, status = 64'h1234_0000_0000_0005;
  logic [63:0] reg_in [NI];
  logic [NO-1:0] reg_out_we = '0;
  logic [63:0] reg_out_wdata [NO];
  logic [HOST_W-1:0] desc [NUM_DESC];
  int checks = 0, failures = 0, n_start = 0;

  pfif_reg_block #(.NUM_IN(NI), .NUM_OUT(NO), .REG_W(64)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && start) n_start++;

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic wr(input int idx, input logic [63:0] d);
    @(negedge clk); reg_wr = 1; reg_idx = REG_IDX_W'(idx); reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask
  task automatic rd(input int idx, output logic [63:0] d);
    @(negedge clk); reg_rd = 1; reg_idx = REG_IDX_W'(idx);
    @(negedge clk); reg_rd = 0;
    chk(reg_rvalid, "read valid after one cycle");
    d = reg_rdata;
    @(negedge clk);
    chk(!reg_rvalid, "read valid for one cycle only");
  endtask

  initial begin
    logic [63:0] d;
    foreach (reg_out_wdata[i]) reg_out_wdata[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < NI; i++) wr(REG_IN_BASE + i, 64'hA000 + i);
    for (int i = 0; i < NI; i++) chk(reg_in[i] == 64'hA000 + i, "input register to IP");
    for (int i = 0; i < NI; i++) begin rd(REG_IN_BASE + i, d); chk(d == 64'hA000 + i, "input register to host"); end
    for (int i = 1; i < NUM_DESC; i++) wr(i, 64'(i) * 64'h1111);
    for (int i = 1; i < NUM_DESC; i++) chk(desc[i] == 64'(i) * 64'h1111, "descriptor");
    for (int i = 1; i < NUM_DESC; i++) begin rd(i, d); chk(d == 64'(i) * 64'h1111, "descriptor read"); end
    @(negedge clk);
    for (int i = 0; i < NO; i++) begin reg_out_we[i] = 1; reg_out_wdata[i] = 64'hBEEF0 + i; end
    @(negedge clk); reg_out_we = '0;
    for (int i = 0; i < NO; i++) begin rd(REG_OUT_BASE + i, d); chk(d == 64'hBEEF0 + i, "output register"); end
    wr(REG_OUT_BASE, 64'h5);   // host cannot write an output register
    rd(REG_OUT_BASE, d); chk(d == 64'hBEEF0, "output register is read-only to the host");
    rd(REG_CTRL, d); chk(d == status, "status");
    chk(n_start == 0, "no start yet");
    wr(REG_CTRL, 64'h0);
    chk(n_start == 0, "start needs bit 0");
    wr(REG_CTRL, 64'h1);
    @(negedge clk);
    chk(n_start == 1, "one start pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
