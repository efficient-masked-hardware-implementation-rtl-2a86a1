// tb_dom_and: checks the DOM AND gadget with N = 8 lanes: one clock after loading, the two
// output shares must XOR to the product of the unmasked inputs for random shares and random
// fresh bits; with en low the outputs hold. It also checks that the fresh bit is applied: the
// domain-A output share must differ from the unrandomised value whenever z is one.
module tb_dom_and;
  localparam int N = 8;
  logic clk = 0;
  logic en;
  logic [N-1:0] ax, bx, ay, by, z, qa, qb, x, yv, exp_q, exp_a;
  int checks = 0, failures = 0;

  dom_and #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      ax = $urandom; bx = $urandom; ay = $urandom; by = $urandom; z = $urandom;
      x = ax ^ bx; yv = ay ^ by;
      exp_q = x & yv;
      exp_a = (ax & ay) ^ (ax & by) ^ z;
      en = 1;
      @(negedge clk);
      en = 0;
      ax = $urandom; bx = $urandom;  // must not matter while en is low
      checks += 2;
      if ((qa ^ qb) !== exp_q) begin failures++; $display("product wrong"); end
      if (qa !== exp_a) begin failures++; $display("domain A share wrong"); end
      @(negedge clk);
      checks++;
      if ((qa ^ qb) !== exp_q) begin failures++; $display("outputs did not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
