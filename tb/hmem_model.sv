// hmem_model: behavioural host main memory behind the host-memory master port.
// Takes a request when valid and ready are both high; ready is refused at
// random (REFUSE_PCT percent of cycles). Writes are stored at once; read data
// return in order LAT cycles later. Word-addressed, sparse. Counts refusals.
module hmem_model
  import pfif_pkg::*;
#(
  parameter int unsigned LAT        = 12,
  parameter int unsigned REFUSE_PCT = 20
) (
  input  logic              clk,
  input  logic              rst,
  input  hmem_req_t         req,
  output logic              ready,
  output logic              rvalid,
  output logic [HOST_W-1:0] rdata
);
  logic [63:0] mem [logic [31:0]];
  typedef struct { longint t; logic [63:0] d; } r_t;
  r_t q[$];
  longint now = 0;
  int n_refused = 0, n_rd = 0, n_wr = 0;

  function automatic logic [63:0] peek(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : 64'h0;
  endfunction
  task automatic poke(input logic [31:0] a, input logic [63:0] d);
    mem[a] = d;
  endtask

  always @(posedge clk) begin
    now <= now + 1;
    ready <= ($urandom % 100) >= REFUSE_PCT;
    rvalid <= 1'b0;
    if (!rst) begin
      if (req.valid && !ready) n_refused++;
      if (req.valid && ready) begin
        if (req.we) begin mem[req.addr] = req.wdata; n_wr++; end
        else begin q.push_back('{now + LAT, peek(req.addr)}); n_rd++; end
      end
      if (q.size() > 0 && q[0].t <= now) begin
        rvalid <= 1'b1;
        rdata  <= q[0].d;
        void'(q.pop_front());
      end
    end
  end
endmodule
