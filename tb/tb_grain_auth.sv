// tb_grain_auth: checks the authenticator at P = 32 (W = 16, with the accumulator pipeline
// step) against the bit-serial rule a += m * r, r <= {z', r[63:1]}. A and R are filled from
// random pre-output bits, then random chunks arrive with random gaps; the accumulator must lag
// by exactly one clock (pend high in that clock) and then equal the model.
module tb_grain_auth;
  localparam int P = 32;
  localparam int W = P / 2;
  logic clk = 0;
  logic rst_n = 0;
  logic fill_a, fill_r, upd, pend;
  logic [P-1:0] fill_in;
  logic [W-1:0] m, zp;
  logic [63:0]  acc, sreg, ma, mr;
  int checks = 0, failures = 0;

  grain_auth dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fill_a = 0; fill_r = 0; upd = 0; fill_in = '0; m = '0; zp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int msg = 0; msg < 5; msg++) begin
      for (int c = 0; c < 128 / P; c++) begin
        @(negedge clk);
        fill_in = $urandom;
        fill_a = (c < 64 / P); fill_r = !fill_a;
        if (fill_a) ma = {fill_in, ma[63:P]}; else mr = {fill_in, mr[63:P]};
      end
      @(negedge clk);
      fill_a = 0; fill_r = 0;
      checks += 2;
      if (acc !== ma) begin failures++; $display("A after fill %h expected %h", acc, ma); end
      if (sreg !== mr) begin failures++; $display("R after fill %h expected %h", sreg, mr); end
      for (int c = 0; c < 20; c++) begin
        upd = ($urandom_range(0, 2) != 0);
        m = $urandom; zp = $urandom;
        if (upd)
          for (int k = 0; k < W; k++) begin
            if (m[k]) ma ^= mr;
            mr = {zp[k], mr[63:1]};
          end
        @(negedge clk);
        checks++;
        if (sreg !== mr) begin failures++; $display("R mismatch"); end
        if (upd) begin
          checks++;
          if (!pend) begin failures++; $display("no pipeline step"); end
        end
        upd = 0;
        @(negedge clk);
        checks++;
        if (acc !== ma || pend) begin failures++; $display("A %h expected %h", acc, ma); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
