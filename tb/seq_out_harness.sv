// seq_out_harness: drives one Sequential OUT channel of width DW with NIP IP
// words, written at random whenever wr_ready is high, behind a host memory that
// refuses most requests, and checks the host words that arrive (see
// seq_word_pkg for the expected packing) and the host write count. Reports its
// check and failure counts and raises done when finished.
module seq_out_harness
  import pfif_pkg::*;
  import seq_word_pkg::*;
#(
  parameter int unsigned DW  = 64,
  parameter int unsigned NIP = 60
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned HW = NIP * DW / 64;   // host words
  localparam logic [31:0] BASE = 32'hC00;
  logic start = 0, busy, req_ready, wr_ready, wr_cmd = 0, rv;
  logic [HMEM_AW-1:0] base = '0;
  logic [31:0] words = '0;
  logic [DW-1:0] wr_data = '0;
  logic [HOST_W-1:0] rd;
  hmem_req_t req;
  int sent = 0, n_full = 0;

  pfif_seq_out #(.FIFO_DEPTH(4), .DW(DW)) dut (.*);
  hmem_model #(.LAT(3), .REFUSE_PCT(DW < 64 ? 90 : 60)) u_host (.clk, .rst, .req, .ready(req_ready),
    .rvalid(rv), .rdata(rd));

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL DW=%0d %s", DW, s); end
  endtask

  always @(negedge clk) begin
    wr_cmd  = wr_ready && (sent < NIP) && ($urandom % 4 != 0);
    wr_data = DW'(ip_word(sent));
  end
  always @(posedge clk) if (!rst) begin
    if (wr_cmd) sent++;
    if (!wr_ready) n_full++;
  end

  initial begin
    done = 0; checks = 0; failures = 0;
    @(negedge clk);
    while (rst) @(negedge clk);
    base = BASE; words = HW; start = 1;
    @(negedge clk) start = 0;
    while (busy) @(negedge clk);
    chk(sent == NIP, "all words written by the IP");
    for (int unsigned j = 0; j < HW; j++)
      chk(u_host.peek(BASE + j) == host_word(j, DW),
          $sformatf("host word %0d: %h vs %h", j, u_host.peek(BASE + j), host_word(j, DW)));
    chk(u_host.n_wr == HW, "host write count");
    chk(n_full > 0, "buffer filled");
    done = 1;
  end
endmodule
