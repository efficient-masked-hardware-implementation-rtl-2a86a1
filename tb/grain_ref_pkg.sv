// grain_ref_pkg: bit-serial reference model of Grain-128AEADv2 for the testbenches.
//
// It clocks the cipher one round at a time straight from the defining equations (Fibonacci
// LFSR and NFSR, pre-output y, 320 rounds with y fed back, 64 rounds with key re-introduction,
// 128 rounds loading A and R, then two pre-output bits per message bit) and shares no code with
// the RTL, so it checks the parallel and pre-computed datapaths independently.
package grain_ref_pkg;

  class grain_ref;
    bit [127:0] s, b, k;
    bit [63:0]  a, r;

    function bit yfun();
      return (b[12] & s[8]) ^ (s[13] & s[20]) ^ (b[95] & s[42]) ^ (s[60] & s[79]) ^
             (b[12] & b[95] & s[94]) ^ s[93] ^ b[2] ^ b[15] ^ b[36] ^ b[45] ^ b[64] ^
             b[73] ^ b[89];
    endfunction

    // One round; xs/xb are XORed into the LFSR/NFSR inputs. Returns y of this round.
    function bit clock(bit fb_y, bit xs, bit xb);
      bit y, fs, fbn;
      y  = yfun();
      fs = s[0] ^ s[7] ^ s[38] ^ s[70] ^ s[81] ^ s[96];
      fbn = s[0] ^ b[0] ^ b[26] ^ b[56] ^ b[91] ^ b[96] ^ (b[3] & b[67]) ^ (b[11] & b[13]) ^
            (b[17] & b[18]) ^ (b[27] & b[59]) ^ (b[40] & b[48]) ^ (b[61] & b[65]) ^
            (b[68] & b[84]) ^ (b[22] & b[24] & b[25]) ^ (b[70] & b[78] & b[82]) ^
            (b[88] & b[92] & b[93] & b[95]);
      if (fb_y) begin fs ^= y; fbn ^= y; end
      fs ^= xs; fbn ^= xb;
      s = {fs, s[127:1]};
      b = {fbn, b[127:1]};
      return y;
    endfunction

    function void init(bit [127:0] key, bit [95:0] iv);
      bit y;
      k = key;
      b = key;
      s = {1'b0, {31{1'b1}}, iv};
      for (int t = 0; t < 320; t++) y = clock(1'b1, 1'b0, 1'b0);
      for (int t = 320; t < 384; t++) y = clock(1'b1, k[t-256], k[t-320]);
      for (int j = 0; j < 64; j++) a[j] = clock(1'b0, 1'b0, 1'b0);
      for (int j = 0; j < 64; j++) r[j] = clock(1'b0, 1'b0, 1'b0);
    endfunction

    // One authenticated bit m; returns the ciphertext bit m ^ z.
    function bit data_bit(bit m);
      bit z, zp;
      z  = clock(1'b0, 1'b0, 1'b0);
      zp = clock(1'b0, 1'b0, 1'b0);
      if (m) a ^= r;
      r = {zp, r[63:1]};
      return m ^ z;
    endfunction
  endclass

endpackage
