// rns_tb_pkg: reference functions shared by the testbenches.
//
// encode_words() packs a residue vector with the variable-length code
// G(0) = '0', G(d) = '1' followed by the n-bit residue, MSB-first into
// 32-bit words, the same format the weight decoder reads.  smod() is the
// least non-negative residue of a signed integer.
package rns_tb_pkg;

  function automatic int smod(input int x, input int m);
    int r;
    r = x % m;
    if (r < 0) r += m;
    return r;
  endfunction

  // Encode `res` (n bits per non-zero residue) into 32-bit words.
  // Returns the number of code bits; unused tail bits are random.
  function automatic int encode_words(input int res[], input int n,
                                      ref logic [31:0] words[]);
    int nbits;
    int total;
    logic bits[$];
    bits = {};
    foreach (res[i]) begin
      if (res[i] == 0) bits.push_back(1'b0);
      else begin
        bits.push_back(1'b1);
        for (int b = n - 1; b >= 0; b--) bits.push_back(1'((res[i] >> b) & 1));
      end
    end
    nbits = bits.size();
    total = (nbits + 31) / 32 + 4;
    words = new[total];
    for (int w = 0; w < total; w++) words[w] = $urandom;
    for (int i = 0; i < nbits; i++) words[i / 32][31 - (i % 32)] = bits[i];
    return nbits;
  endfunction

endpackage
