// tb_grain_ctrl: checks the phase sequence of the controller at P = 32 with one prime clock:
// 1 prime clock, 10 initialisation clocks, 2 key clocks, 2 accumulator and 2 register clocks,
// then data until the chunk flagged last. It also checks that nothing moves while rnd_ok is low
// and that stage/adv are asserted exactly in the clocks that move the pipeline / the FSRs.
module tb_grain_ctrl;
  import grain_pkg::*;
  logic clk = 0;
  logic rst_n = 0;
  logic start, rnd_ok, in_valid, in_last, in_ready, stage, adv;
  phase_e phase;
  logic [1:0] fill;
  logic [8:0] cnt;
  int checks = 0, failures = 0;
  int count [8];

  grain_ctrl dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count the clocks in which each phase moved
  always @(posedge clk) if (rst_n && stage) count[phase]++;

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d, expected %0d", what, got, exp); end
  endtask

  initial begin
    start = 0; rnd_ok = 1; in_valid = 0; in_last = 0;
    foreach (count[i]) count[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      foreach (count[i]) count[i] = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      expect_eq(int'(phase), int'(PH_PRIME), "phase after start");
      while (phase != PH_DATA) begin
        rnd_ok = ($urandom_range(0, 3) != 0);
        #1;
        checks++;
        if (stage !== rnd_ok || (adv !== (rnd_ok && phase != PH_PRIME))) begin
          failures++; $display("stage/adv wrong in phase %0d", phase);
        end
        @(negedge clk);
      end
      rnd_ok = 1;
      expect_eq(count[PH_PRIME], 1, "prime clocks");
      expect_eq(count[PH_INIT], 10, "init clocks");
      expect_eq(count[PH_KEY], 2, "key clocks");
      expect_eq(count[PH_ACC], 2, "accumulator clocks");
      expect_eq(count[PH_REG], 2, "register clocks");
      for (int c = 0; c < 5; c++) begin
        in_valid = ($urandom_range(0, 1) != 0);
        in_last = (c == 4);
        if (c == 4) in_valid = 1;
        #1;
        expect_eq(int'(in_ready), 1, "in_ready in data phase");
        expect_eq(int'(adv), int'(in_valid), "adv follows in_valid");
        @(negedge clk);
      end
      in_valid = 0; in_last = 0;
      expect_eq(int'(phase), int'(PH_DONE), "phase after last chunk");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
