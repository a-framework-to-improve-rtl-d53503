// pfif_ctrl: run sequencer of the framework, the logic behind user_logic_go and
// user_logic_done.
//
// A run is started by the host (a `start` pulse from the register block) and has
// these phases:
//   LOAD   copy LOAD_WORDS 64-bit words from host memory (LOAD_HADDR) into the
//          host port of bank LOAD_BANK, from word 0 up, through its own DMA read
//          engine (skipped when LOAD_WORDS is 0);
//   RUN    pulse user_logic_go for one cycle, start the sequential IN and OUT
//          channels with their descriptors, and wait for user_logic_done;
//   DRAIN  wait until the sequential OUT channel has sent its last word;
//   STORE  read STORE_WORDS words of bank STORE_BANK and write them to host
//          memory at STORE_HADDR through its own DMA write engine (skipped when
//          STORE_WORDS is 0);
//   DONE   report completion in the status register; a new start begins again.
// With zero word counts the host moves the data itself through the host slave,
// which is the interactive style; with non-zero counts the framework moves it,
// the subroutine style. The controller owns the banks' host ports (c_own) only
// in LOAD and STORE, and takes them only when no host read is in flight.
// During STORE bank reads are issued only while their data is sure to find room
// in the store FIFO. Status word: bits 2:0 state, bit 8 busy, bits 47:16 number
// of completed runs. The phases follow the document's three steps of a run; the
// descriptors, status layout and pulse-style go are this design's choices.
module pfif_ctrl
  import pfif_pkg::*;
#(
  parameter int unsigned NUM_BANKS  = 2,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic [HOST_W-1:0]     desc [NUM_DESC],
  output logic [HOST_W-1:0]     status,
  // IP synchronisation
  output logic                  user_logic_go,
  input  logic                  user_logic_done,
  // sequential channels
  output logic                  sqi_start,
  output logic                  sqo_start,
  input  logic                  sqo_busy,
  // bank access through the communication service
  output logic                  c_own,
  output logic                  c_valid,
  input  logic                  c_ready,
  output logic [$clog2(NUM_BANKS+1)-1:0] c_bank,
  output logic                  c_we,
  output logic [REGION_LSB-1:0] c_addr,
  output logic [HOST_W-1:0]     c_wdata,
  input  logic                  c_rvalid,
  input  logic [HOST_W-1:0]     c_rdata,
  input  logic                  slave_idle,
  // host-memory master ports of the load and store engines
  output hmem_req_t             ld_req,
  input  logic                  ld_ready,
  input  logic                  ld_rvalid,
  input  logic [HOST_W-1:0]     ld_rdata,
  output hmem_req_t             st_req,
  input  logic                  st_ready
);
  localparam int unsigned BW = $clog2(NUM_BANKS + 1);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  ctrl_state_e state;
  logic        pend, done_seen;
  logic [31:0] runs, cnt, total;
  logic [CW-1:0] inflight, fcount;

  logic ld_start, ld_busy, ld_valid, ld_ready_s;
  logic [HOST_W-1:0] ld_data;
  logic st_start, st_busy, f_empty, f_full, f_pop, st_in_ready;
  logic [HOST_W-1:0] f_data;
  logic c_take;

  wire [31:0] ld_words = desc[REG_LOAD_WORDS][31:0];
  wire [31:0] st_words = desc[REG_STORE_WORDS][31:0];

  pfif_dma_rd #(.FIFO_DEPTH(FIFO_DEPTH)) u_load (
    .clk, .rst, .start(ld_start),
    .base(desc[REG_LOAD_HADDR][HMEM_AW-1:0]), .words(ld_words), .busy(ld_busy),
    .req(ld_req), .req_ready(ld_ready), .rsp_valid(ld_rvalid), .rsp_data(ld_rdata),
    .out_valid(ld_valid), .out_ready(ld_ready_s), .out_data(ld_data)
  );

  pfif_fifo #(.WIDTH(HOST_W), .DEPTH(FIFO_DEPTH)) u_store_buf (
    .clk, .rst,
    .push(c_rvalid && state == ST_STORE), .wr_data(c_rdata),
    .pop(f_pop), .rd_data(f_data),
    .empty(f_empty), .full(f_full), .count(fcount)
  );

  pfif_dma_wr u_store (
    .clk, .rst, .start(st_start),
    .base(desc[REG_STORE_HADDR][HMEM_AW-1:0]), .words(st_words), .busy(st_busy),
    .req(st_req), .req_ready(st_ready),
    .in_valid(!f_empty), .in_ready(st_in_ready), .in_data(f_data)
  );

  assign f_pop = st_in_ready && !f_empty;

  // Bank requests: writes of loaded words, or credit-limited reads for the store.
  always_comb begin
    c_own   = (state == ST_LOAD) || (state == ST_STORE);
    c_we    = (state == ST_LOAD);
    c_bank  = BW'(c_we ? desc[REG_LOAD_BANK] : desc[REG_STORE_BANK]);
    c_addr  = REGION_LSB'(cnt);
    c_wdata = ld_data;
    c_valid = 1'b0;
    if (state == ST_LOAD)
      c_valid = ld_valid;
    else if (state == ST_STORE)
      c_valid = (cnt != total) &&
                ({1'b0, inflight} + {1'b0, fcount} < (CW+1)'(FIFO_DEPTH));
    c_take     = c_valid && c_ready;
    ld_ready_s = (state == ST_LOAD) && c_ready;
  end

  always_comb begin
    status        = '0;
    status[2:0]   = state;
    status[8]     = (state != ST_IDLE) && (state != ST_DONE);
    status[47:16] = runs;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= ST_IDLE;
      pend          <= 1'b0;
      done_seen     <= 1'b0;
      runs          <= '0;
      cnt           <= '0;
      total         <= '0;
      inflight      <= '0;
      ld_start      <= 1'b0;
      st_start      <= 1'b0;
      user_logic_go <= 1'b0;
      sqi_start     <= 1'b0;
      sqo_start     <= 1'b0;
    end else begin
      ld_start      <= 1'b0;
      st_start      <= 1'b0;
      user_logic_go <= 1'b0;
      sqi_start     <= 1'b0;
      sqo_start     <= 1'b0;
      inflight      <= inflight + CW'(c_take && state == ST_STORE) - CW'(c_rvalid && state == ST_STORE);
      if (c_take) cnt <= cnt + 1;
      if (user_logic_done) done_seen <= 1'b1;

      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (start) pend <= 1'b1;
          if ((start || pend) && slave_idle) begin
            pend  <= 1'b0;
            cnt   <= '0;
            total <= ld_words;
            if (ld_words != 0) begin
              state    <= ST_LOAD;
              ld_start <= 1'b1;
            end else begin
              state         <= ST_RUN;
              done_seen     <= 1'b0;
              user_logic_go <= 1'b1;
              sqi_start     <= 1'b1;
              sqo_start     <= 1'b1;
            end
          end
        end
        ST_LOAD: begin
          if (cnt == total && !ld_busy && !ld_start) begin
            state         <= ST_RUN;
            done_seen     <= 1'b0;
            user_logic_go <= 1'b1;
            sqi_start     <= 1'b1;
            sqo_start     <= 1'b1;
          end
        end
        ST_RUN: begin
          if ((done_seen || user_logic_done) && !user_logic_go) state <= ST_DRAIN;
        end
        ST_DRAIN: begin
          if (!sqo_busy && !sqo_start && slave_idle) begin
            cnt   <= '0;
            total <= st_words;
            if (st_words != 0) begin
              state    <= ST_STORE;
              st_start <= 1'b1;
            end else begin
              state <= ST_DONE;
              runs  <= runs + 1;
            end
          end
        end
        ST_STORE: begin
          if (cnt == total && inflight == '0 && f_empty && !st_busy && !st_start) begin
            state <= ST_DONE;
            runs  <= runs + 1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  a_store_fifo_room: assert property (@(posedge clk) disable iff (rst) !(c_rvalid && f_full));
endmodule
