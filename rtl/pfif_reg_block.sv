// pfif_reg_block: the register interface of the framework.
//
// Holds NUM_IN input registers, written by the host and read by the IP (its
// parameters, e.g. a key and a data length), and NUM_OUT output registers,
// written by the IP and read by the host. The IP reads every input register in
// parallel on reg_in, so all parameters are available at once; it writes output
// register i by pulsing reg_out_we[i] with reg_out_wdata[i]. Besides these, the
// block holds the framework's own control registers: the run descriptors used by
// the controller (host addresses and word counts of the load, store and
// sequential transfers) and a status word.
//
// Host side: a register slave at word index reg_idx (see pfif_pkg for the map).
// A write takes effect at the next clock edge; a read returns reg_rdata with
// reg_rvalid one cycle later. Writing bit 0 of REG_CTRL gives a one-cycle
// `start` pulse. Register counts and width follow the configuration shown for
// the register interface (three in, three out, 64 bits); the descriptor and
// status registers and the address map are this design's own.
module pfif_reg_block
  import pfif_pkg::*;
#(
  parameter int unsigned NUM_IN  = 3,
  parameter int unsigned NUM_OUT = 3,
  parameter int unsigned REG_W   = 64
) (
  input  logic                 clk,
  input  logic                 rst,
  // host slave
  input  logic                 reg_wr,
  input  logic                 reg_rd,
  input  logic [REG_IDX_W-1:0] reg_idx,
  input  logic [HOST_W-1:0]    reg_wdata,
  output logic                 reg_rvalid,
  output logic [HOST_W-1:0]    reg_rdata,
  // IP side
  output logic [REG_W-1:0]     reg_in        [NUM_IN],
  input  logic [NUM_OUT-1:0]   reg_out_we,
  input  logic [REG_W-1:0]     reg_out_wdata [NUM_OUT],
  // controller side
  output logic [HOST_W-1:0]    desc          [NUM_DESC],
  output logic                 start,
  input  logic [HOST_W-1:0]    status
);
  logic [REG_W-1:0] out_q [NUM_OUT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_IN; i++)  reg_in[i] <= '0;
      for (int i = 0; i < NUM_OUT; i++) out_q[i]  <= '0;
      for (int i = 0; i < NUM_DESC; i++) desc[i]  <= '0;
      start <= 1'b0;
    end else begin
      start <= reg_wr && (reg_idx == REG_IDX_W'(REG_CTRL)) && reg_wdata[0];
      if (reg_wr) begin
        for (int i = 1; i < NUM_DESC; i++)
          if (reg_idx == REG_IDX_W'(i)) desc[i] <= reg_wdata;
        for (int i = 0; i < NUM_IN; i++)
          if (reg_idx == REG_IDX_W'(REG_IN_BASE + i)) reg_in[i] <= REG_W'(reg_wdata);
      end
      for (int i = 0; i < NUM_OUT; i++)
        if (reg_out_we[i]) out_q[i] <= reg_out_wdata[i];
    end
  end

  // Read path: registered, one cycle latency.
  logic [HOST_W-1:0] rd_mux;
  always_comb begin
    rd_mux = '0;
    if (reg_idx == REG_IDX_W'(REG_CTRL)) rd_mux = status;
    for (int i = 1; i < NUM_DESC; i++)
      if (reg_idx == REG_IDX_W'(i)) rd_mux = desc[i];
    for (int i = 0; i < NUM_IN; i++)
      if (reg_idx == REG_IDX_W'(REG_IN_BASE + i)) rd_mux = HOST_W'(reg_in[i]);
    for (int i = 0; i < NUM_OUT; i++)
      if (reg_idx == REG_IDX_W'(REG_OUT_BASE + i)) rd_mux = HOST_W'(out_q[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_rvalid <= 1'b0;
      reg_rdata  <= '0;
    end else begin
      reg_rvalid <= reg_rd;
      if (reg_rd) reg_rdata <= rd_mux;
    end
  end

  a_rd_wr_exclusive: assert property (@(posedge clk) disable iff (rst) !(reg_rd && reg_wr));
endmodule
