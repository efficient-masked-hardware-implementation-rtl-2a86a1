// tb_masked_y: checks the three-stage masked Y at P = 8. The NFSR and LFSR are kept as two
// random shares that shift P bits per moving clock with random new bits at the top. After a
// reload come the two fill clocks (fill = 0, 1); from then on, in every clock, the XOR of the
// two output shares must equal the unmasked function evaluated on the current state at offset
// k, for random fresh randomness and with random hold clocks in which nothing moves.
module tb_masked_y;
  localparam int P = 8;
  logic clk = 0;
  logic en;
  logic [1:0] fill;
  logic [127:0] b0, b1, s0, s1, bt, st;
  logic [6*P-1:0] rnd;
  logic [P-1:0] y0, y1;
  int checks = 0, failures = 0, holds = 0;

  masked_y #(.P(P)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic gfun(logic [127:0] b, logic [127:0] sv, int o);
    return sv[o] ^ b[o] ^ b[o+26] ^ b[o+56] ^ b[o+91] ^ b[o+96] ^ (b[o+3] & b[o+67]) ^
           (b[o+11] & b[o+13]) ^ (b[o+17] & b[o+18]) ^ (b[o+27] & b[o+59]) ^
           (b[o+40] & b[o+48]) ^ (b[o+61] & b[o+65]) ^ (b[o+68] & b[o+84]) ^
           (b[o+22] & b[o+24] & b[o+25]) ^ (b[o+70] & b[o+78] & b[o+82]) ^
           (b[o+88] & b[o+92] & b[o+93] & b[o+95]);
  endfunction

  function automatic logic yfun(logic [127:0] bv, logic [127:0] sv, int o);
    return (bv[o+12] & sv[o+8]) ^ (sv[o+13] & sv[o+20]) ^ (bv[o+95] & sv[o+42]) ^
           (sv[o+60] & sv[o+79]) ^ (bv[o+12] & bv[o+95] & sv[o+94]) ^ sv[o+93] ^ bv[o+2] ^
           bv[o+15] ^ bv[o+36] ^ bv[o+45] ^ bv[o+64] ^ bv[o+73] ^ bv[o+89];
  endfunction

  always @(negedge clk) for (int i = 0; i < 6*P; i++) rnd[i] = 1'($urandom);

  initial begin
    en = 0; fill = 0;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      #1;
      if (it % 60 == 0) begin
        bt = {$urandom, $urandom, $urandom, $urandom};
        st = {$urandom, $urandom, $urandom, $urandom};
        b1 = {$urandom, $urandom, $urandom, $urandom};
        s1 = {$urandom, $urandom, $urandom, $urandom};
        b0 = bt ^ b1; s0 = st ^ s1;
        en = 1; fill = 0;
        @(negedge clk);
        #1 fill = 1;
        @(negedge clk);
        #1 fill = 2;
      end
      for (int k = 0; k < P; k++) begin
        checks++;
        if ((y0[k] ^ y1[k]) !== yfun(bt, st, k)) begin
          failures++;
          if (failures < 10) $display("iteration %0d lane %0d mismatch", it, k);
        end
      end
      en = ($urandom_range(0, 3) != 0);
      if (!en) holds++;
      @(posedge clk);
      #1;
      if (en) begin
        logic [P-1:0] nb, ns, r0, r1;
        nb = $urandom; ns = $urandom; r0 = $urandom; r1 = $urandom;
        bt = {nb, bt[127:P]}; st = {ns, st[127:P]};
        b1 = {r0, b1[127:P]}; s1 = {r1, s1[127:P]};
        b0 = bt ^ b1; s0 = st ^ s1;
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
