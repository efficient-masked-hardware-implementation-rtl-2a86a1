// tb_grain_preout: checks the P = 32 pre-output function with pre-computation. B and S are
// shift registers that move P bits per shifting clock with random new bits at the top; after
// each random reload one prime clock fills the stage-1 register. In every clock each output
// bit y[k] is compared with y evaluated directly on the state at offset k.
module tb_grain_preout;
  localparam int P = 32;
  logic clk = 0;
  logic prime, en;
  logic [127:0] b, s;
  logic [P-1:0] y;
  int checks = 0, failures = 0;

  grain_preout dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic yfun(logic [127:0] bv, logic [127:0] sv, int o);
    return (bv[o+12] & sv[o+8]) ^ (sv[o+13] & sv[o+20]) ^ (bv[o+95] & sv[o+42]) ^
           (sv[o+60] & sv[o+79]) ^ (bv[o+12] & bv[o+95] & sv[o+94]) ^ sv[o+93] ^ bv[o+2] ^
           bv[o+15] ^ bv[o+36] ^ bv[o+45] ^ bv[o+64] ^ bv[o+73] ^ bv[o+89];
  endfunction

  initial begin
    prime = 0; en = 0;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      if (it % 60 == 0) begin
        b = {$urandom, $urandom, $urandom, $urandom};
        s = {$urandom, $urandom, $urandom, $urandom};
        prime = 1;
        @(negedge clk);
        prime = 0;
      end
      for (int k = 0; k < P; k++) begin
        checks++;
        if (y[k] !== yfun(b, s, k)) begin
          failures++;
          if (failures < 10) $display("iteration %0d lane %0d mismatch", it, k);
        end
      end
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
      if (en) begin
        b = {$urandom, b[127:P]};
        s = {$urandom, s[127:P]};
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
