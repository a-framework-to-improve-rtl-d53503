// user_logic: the example IP core, DES encryption in ECB mode with two DES
// cores, attached to the framework through its generated IP interface.
//
// Interface, as generated for this IP: two input registers (reg_in0 = 64-bit
// DES key, reg_in1 = number of 128-bit plaintext words), the read port of
// logical bank mem_0 (plaintext, Shared IN) and the write port of logical bank
// mem_1 (ciphertext, Shared OUT), each 128 bits wide and 2^19 words (8 MB) deep,
// plus user_logic_go and user_logic_done.
//
// Operation: user_logic_go (a one-cycle pulse) starts a pass. The core issues
// one mem_0 read per cycle, words 0 to N-1. Each returned word is split into two
// 64-bit blocks, the upper half to one DES core and the lower half to the other,
// so 128 bits are encrypted per cycle. Each ciphertext word is written to mem_1
// at the same index as its plaintext. A one-cycle user_logic_done pulse follows
// the write of the last word. The number of cycles is about N + memory latency
// + 17. The interface and the two-core structure are the document's example; the
// meaning of reg_in1 as a count of 128-bit words is this design's reading.
module user_logic #(
  parameter int unsigned AW = 19
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          user_logic_go,
  input  logic [63:0]   reg_in0,
  input  logic [63:0]   reg_in1,
  input  logic [127:0]  mem_0_rd_data,
  input  logic          mem_0_rd_data_vld,
  output logic          mem_0_rd_cmd,
  output logic [AW-1:0] mem_0_rd_addr,
  output logic          mem_1_wr_cmd,
  output logic [127:0]  mem_1_wr_data,
  output logic [AW-1:0] mem_1_wr_addr,
  output logic [15:0]   mem_1_wr_be,
  output logic          user_logic_done
);
  logic        running;
  logic [63:0] total, rd_cnt, wr_cnt;
  logic        v_hi, v_lo;

  assign mem_0_rd_cmd  = running && (rd_cnt != total);
  assign mem_0_rd_addr = AW'(rd_cnt);

  des_core u_des_hi (
    .clk, .rst, .in_valid(mem_0_rd_data_vld), .in_block(mem_0_rd_data[127:64]),
    .in_key(reg_in0), .out_valid(v_hi), .out_block(mem_1_wr_data[127:64])
  );
  des_core u_des_lo (
    .clk, .rst, .in_valid(mem_0_rd_data_vld), .in_block(mem_0_rd_data[63:0]),
    .in_key(reg_in0), .out_valid(v_lo), .out_block(mem_1_wr_data[63:0])
  );

  assign mem_1_wr_cmd  = running && v_hi;
  assign mem_1_wr_addr = AW'(wr_cnt);
  assign mem_1_wr_be   = '1;

  always_ff @(posedge clk) begin
    if (rst) begin
      running         <= 1'b0;
      total           <= '0;
      rd_cnt          <= '0;
      wr_cnt          <= '0;
      user_logic_done <= 1'b0;
    end else begin
      user_logic_done <= 1'b0;
      if (user_logic_go && !running) begin
        total  <= reg_in1;
        rd_cnt <= '0;
        wr_cnt <= '0;
        if (reg_in1 == 0) user_logic_done <= 1'b1;
        else              running <= 1'b1;
      end else if (running) begin
        if (mem_0_rd_cmd) rd_cnt <= rd_cnt + 1;
        if (mem_1_wr_cmd) begin
          wr_cnt <= wr_cnt + 1;
          if (wr_cnt + 1 == total) begin
            running         <= 1'b0;
            user_logic_done <= 1'b1;
          end
        end
      end
    end
  end

  a_cores_in_step: assert property (@(posedge clk) disable iff (rst) v_hi == v_lo);
endmodule
