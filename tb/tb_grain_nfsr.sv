// tb_grain_nfsr: checks the P = 32 NFSR with pre-computed feedback against a one-bit-per-step
// model of b_127 <= s0 + g(B) + fb_in. The LFSR input s is a shift register that moves with the
// NFSR (new random bits enter at its top), as in the core. After each load one prime clock fills
// the stage-1 register; random clocks then shift or hold, so the pre-computed part must stay
// consistent through stalls.
module tb_grain_nfsr;
  localparam int P = 32;
  logic clk = 0;
  logic load, prime, en;
  logic [127:0] load_val, s, state, model;
  logic [P-1:0] fb_in;
  int checks = 0, failures = 0, holds = 0;

  grain_nfsr dut (.*);

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

  initial begin
    load = 0; prime = 0; en = 0; fb_in = '0; load_val = '0;
    s = {$urandom, $urandom, $urandom, $urandom};
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      if (it % 60 == 0) begin
        load = 1; load_val = {$urandom, $urandom, $urandom, $urandom};
        model = load_val;
        @(negedge clk);
        load = 0; prime = 1;
        @(negedge clk);
        prime = 0;
      end
      en = ($urandom_range(0, 3) != 0);
      fb_in = $urandom;
      if (!en) holds++;
      @(negedge clk);
      if (en) begin
        logic [127:0] sm;
        sm = s;
        for (int k = 0; k < P; k++) begin
          logic fbit;
          fbit = gfun(model, s >> k, 0) ^ fb_in[k];
          model = {fbit, model[127:1]};
        end
        s = {$urandom, sm[127:P]};
      end
      en = 0;
      checks++;
      if (state !== model) begin
        failures++;
        $display("iteration %0d: state %h expected %h", it, state, model);
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
