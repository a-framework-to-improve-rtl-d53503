// des_core: fully pipelined DES block cipher (encryption, ECB), the example IP
// carried by the framework. One 64-bit block enters per cycle and its ciphertext
// leaves 17 cycles later: one register stage after the initial permutation and
// one per Feistel round. The key travels down the pipeline with its block (as
// the two 28-bit halves C and D of the key schedule), so a new key may be used
// from any block on. DES itself is the published standard (FIPS 46): initial and
// final permutations, 16 rounds of expansion, key mixing, eight 6-to-4 S-boxes
// and the P permutation, and the PC-1/PC-2 key schedule with its left rotations.
// Bits are numbered 1..64 from the most significant bit, as in the standard.
// The pipelining is this design's choice; the document states only that its
// DES cores are fully pipelined.
module des_core (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic [63:0] in_block,
  input  logic [63:0] in_key,
  output logic        out_valid,
  output logic [63:0] out_block
);
  localparam byte IP_T [64] = '{
    58,50,42,34,26,18,10,2, 60,52,44,36,28,20,12,4,
    62,54,46,38,30,22,14,6, 64,56,48,40,32,24,16,8,
    57,49,41,33,25,17, 9,1, 59,51,43,35,27,19,11,3,
    61,53,45,37,29,21,13,5, 63,55,47,39,31,23,15,7};
  localparam byte E_T [48] = '{
    32, 1, 2, 3, 4, 5,  4, 5, 6, 7, 8, 9,  8, 9,10,11,12,13, 12,13,14,15,16,17,
    16,17,18,19,20,21, 20,21,22,23,24,25, 24,25,26,27,28,29, 28,29,30,31,32, 1};
  localparam byte P_T [32] = '{
    16, 7,20,21,29,12,28,17,  1,15,23,26, 5,18,31,10,
     2, 8,24,14,32,27, 3, 9, 19,13,30, 6,22,11, 4,25};
  localparam byte PC1_T [56] = '{
    57,49,41,33,25,17, 9,  1,58,50,42,34,26,18, 10, 2,59,51,43,35,27,
    19,11, 3,60,52,44,36, 63,55,47,39,31,23,15,  7,62,54,46,38,30,22,
    14, 6,61,53,45,37,29, 21,13, 5,28,20,12, 4};
  localparam byte PC2_T [48] = '{
    14,17,11,24, 1, 5,  3,28,15, 6,21,10, 23,19,12, 4,26, 8, 16, 7,27,20,13, 2,
    41,52,31,37,47,55, 30,40,51,45,33,48, 44,49,39,56,34,53, 46,42,50,36,29,32};
  localparam byte SHIFTS [16] = '{1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1};
  // S-boxes: SBOX[box][row*16 + column].
  localparam logic [3:0] SBOX [8][64] = '{
    '{14,4,13,1,2,15,11,8,3,10,6,12,5,9,0,7, 0,15,7,4,14,2,13,1,10,6,12,11,9,5,3,8,
      4,1,14,8,13,6,2,11,15,12,9,7,3,10,5,0, 15,12,8,2,4,9,1,7,5,11,3,14,10,0,6,13},
    '{15,1,8,14,6,11,3,4,9,7,2,13,12,0,5,10, 3,13,4,7,15,2,8,14,12,0,1,10,6,9,11,5,
      0,14,7,11,10,4,13,1,5,8,12,6,9,3,2,15, 13,8,10,1,3,15,4,2,11,6,7,12,0,5,14,9},
    '{10,0,9,14,6,3,15,5,1,13,12,7,11,4,2,8, 13,7,0,9,3,4,6,10,2,8,5,14,12,11,15,1,
      13,6,4,9,8,15,3,0,11,1,2,12,5,10,14,7, 1,10,13,0,6,9,8,7,4,15,14,3,11,5,2,12},
    '{7,13,14,3,0,6,9,10,1,2,8,5,11,12,4,15, 13,8,11,5,6,15,0,3,4,7,2,12,1,10,14,9,
      10,6,9,0,12,11,7,13,15,1,3,14,5,2,8,4, 3,15,0,6,10,1,13,8,9,4,5,11,12,7,2,14},
    '{2,12,4,1,7,10,11,6,8,5,3,15,13,0,14,9, 14,11,2,12,4,7,13,1,5,0,15,10,3,9,8,6,
      4,2,1,11,10,13,7,8,15,9,12,5,6,3,0,14, 11,8,12,7,1,14,2,13,6,15,0,9,10,4,5,3},
    '{12,1,10,15,9,2,6,8,0,13,3,4,14,7,5,11, 10,15,4,2,7,12,9,5,6,1,13,14,0,11,3,8,
      9,14,15,5,2,8,12,3,7,0,4,10,1,13,11,6, 4,3,2,12,9,5,15,10,11,14,1,7,6,0,8,13},
    '{4,11,2,14,15,0,8,13,3,12,9,7,5,10,6,1, 13,0,11,7,4,9,1,10,14,3,5,12,2,15,8,6,
      1,4,11,13,12,3,7,14,10,15,6,8,0,5,9,2, 6,11,13,8,1,4,10,7,9,5,0,15,14,2,3,12},
    '{13,2,8,4,6,15,11,1,10,9,3,14,5,0,12,7, 1,15,13,8,10,3,7,4,12,5,6,11,0,14,9,2,
      7,11,4,1,9,12,14,2,0,6,10,13,15,3,5,8, 2,1,14,7,4,10,8,13,15,12,9,0,3,5,6,11}};

  function automatic logic [63:0] ip_perm(input logic [63:0] x);
    for (int i = 0; i < 64; i++) ip_perm[63-i] = x[64-IP_T[i]];
  endfunction

  // Final permutation = inverse of the initial permutation.
  function automatic logic [63:0] fp_perm(input logic [63:0] x);
    for (int i = 0; i < 64; i++) fp_perm[64-IP_T[i]] = x[63-i];
  endfunction

  function automatic logic [55:0] pc1(input logic [63:0] k);
    for (int i = 0; i < 56; i++) pc1[55-i] = k[64-PC1_T[i]];
  endfunction

  function automatic logic [47:0] pc2(input logic [55:0] cd);
    for (int i = 0; i < 48; i++) pc2[47-i] = cd[56-PC2_T[i]];
  endfunction

  function automatic logic [27:0] rotl(input logic [27:0] x, input int unsigned n);
    return (n == 1) ? {x[26:0], x[27]} : {x[25:0], x[27:26]};
  endfunction

  function automatic logic [31:0] feistel(input logic [31:0] r, input logic [47:0] k);
    logic [47:0] e;
    logic [31:0] s;
    logic [5:0]  six;
    for (int i = 0; i < 48; i++) e[47-i] = r[32-E_T[i]];
    e = e ^ k;
    for (int b = 0; b < 8; b++) begin
      six = e[47-6*b -: 6];
      s[31-4*b -: 4] = SBOX[b][{six[5], six[0], six[4:1]}];
    end
    for (int i = 0; i < 32; i++) feistel[31-i] = s[32-P_T[i]];
  endfunction

  // Pipeline state: stage 0 holds the permuted block, stage r the block after round r.
  logic        v  [17];
  logic [31:0] l  [17];
  logic [31:0] r  [17];
  logic [27:0] c  [17];
  logic [27:0] d  [17];

  always_ff @(posedge clk) begin
    logic [63:0] p;
    logic [55:0] k;
    logic [27:0] cn, dn;
    if (rst) begin
      for (int s = 0; s < 17; s++) v[s] <= 1'b0;
    end else begin
      v[0] <= in_valid;
      for (int s = 1; s < 17; s++) v[s] <= v[s-1];
    end
    p = ip_perm(in_block);
    k = pc1(in_key);
    l[0] <= p[63:32];
    r[0] <= p[31:0];
    c[0] <= k[55:28];
    d[0] <= k[27:0];
    for (int s = 1; s < 17; s++) begin
      cn = rotl(c[s-1], 32'(SHIFTS[s-1]));
      dn = rotl(d[s-1], 32'(SHIFTS[s-1]));
      c[s] <= cn;
      d[s] <= dn;
      l[s] <= r[s-1];
      r[s] <= l[s-1] ^ feistel(r[s-1], pc2({cn, dn}));
    end
  end

  // After round 16 the halves are swapped before the final permutation.
  assign out_valid = v[16];
  assign out_block = fp_perm({r[16], l[16]});
endmodule
