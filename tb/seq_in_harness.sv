// seq_in_harness: drives one Sequential IN channel of width DW that reads NIP
// IP words' worth of host memory, behind a host memory that refuses some
// requests. The IP model issues rd_cmd at random, also when no word waits
// (those must be ignored); every word must arrive one cycle after an accepted
// rd_cmd, in order, with the packing of seq_word_pkg, and exactly NIP of them.
// Reports its check and failure counts and raises done when finished.
module seq_in_harness
  import pfif_pkg::*;
  import seq_word_pkg::*;
#(
  parameter int unsigned DW  = 64,
  parameter int unsigned NIP = 50
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned HW = NIP * DW / 64;   // host words
  localparam logic [31:0] BASE = 32'h800;
  logic start = 0, busy, req_ready, rsp_valid, rd_avail, rd_cmd = 0, rd_data_vld;
  logic [HMEM_AW-1:0] base = '0;
  logic [31:0] words = '0;
  logic [HOST_W-1:0] rsp_data;
  logic [DW-1:0] rd_data;
  hmem_req_t req;
  int got = 0;
  logic cmd_q = 0;

  pfif_seq_in #(.FIFO_DEPTH(4), .DW(DW)) dut (.*);
  hmem_model #(.LAT(7), .REFUSE_PCT(20)) u_host (.clk, .rst, .req, .ready(req_ready),
    .rvalid(rsp_valid), .rdata(rsp_data));

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL DW=%0d %s", DW, s); end
  endtask

  always @(negedge clk) rd_cmd = ($urandom % 2) == 1;
  always @(posedge clk) if (!rst) begin
    chk(rd_data_vld == cmd_q, "data valid one cycle after the command");
    cmd_q <= rd_cmd && rd_avail;
    if (rd_data_vld) begin
      chk(rd_data == DW'(ip_word(got)), $sformatf("word %0d: %h", got, rd_data));
      got++;
    end
  end

  initial begin
    done = 0; checks = 0; failures = 0;
    for (int unsigned j = 0; j < HW; j++) u_host.poke(BASE + j, host_word(j, DW));
    @(negedge clk);
    while (rst) @(negedge clk);
    base = BASE; words = HW; start = 1;
    @(negedge clk) start = 0;
    while (busy) @(negedge clk);
    repeat (10) @(negedge clk);
    chk(got == NIP, $sformatf("%0d words", got));
    chk(!rd_avail, "nothing left after the count");
    done = 1;
  end
endmodule
