// seq_word_pkg: test data for the sequential-channel testbenches. ip_word(i)
// is the i-th IP word (up to 128 bits, truncated to the channel width by the
// caller); host_word(i, DW) is the 64-bit host word that carries IP words of
// width DW: for DW < 64 the 64/DW IP words j*64/DW onward, first in the least
// significant slice; for DW >= 64 the matching 64-bit part of IP word
// j*64/DW, least significant part first.
package seq_word_pkg;
  function automatic logic [127:0] ip_word(input int unsigned i);
    return {32'(i) * 32'h9E37_79B9, 32'hA000_0000 | 32'(i), 32'(i) ^ 32'h1234_5678,
            32'(i) * 32'h85EB_CA6B};
  endfunction

  function automatic logic [63:0] host_word(input int unsigned j, input int unsigned dw);
    logic [63:0]  w = '0;
    logic [127:0] v;
    if (dw < 64) begin
      for (int unsigned r = 0; r < 64 / dw; r++) begin
        v = ip_word(j * (64 / dw) + r);
        for (int unsigned b = 0; b < dw; b++) w[r * dw + b] = v[b];
      end
    end else begin
      v = ip_word(j / (dw / 64));
      w = v[(j % (dw / 64)) * 64 +: 64];
    end
    return w;
  endfunction
endpackage
