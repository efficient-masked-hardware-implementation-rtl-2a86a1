// tb_grain_lfsr: checks the P = 32 LFSR against a one-bit-per-step model of
// s_127 <= s0 + s7 + s38 + s70 + s81 + s96 + fb_in, with random loads, random fb_in and
// random hold clocks.
module tb_grain_lfsr;
  localparam int P = 32;
  logic clk = 0;
  logic load, en;
  logic [127:0] load_val, state, model;
  logic [P-1:0] fb_in;
  int checks = 0, failures = 0;

  grain_lfsr dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; en = 0; fb_in = '0; load_val = '0;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      if (it % 50 == 0) begin
        load = 1; load_val = {$urandom, $urandom, $urandom, $urandom}; en = 0;
        model = load_val;
      end else begin
        load = 0; en = ($urandom_range(0, 3) != 0); fb_in = $urandom;
        if (en)
          for (int k = 0; k < P; k++) begin
            logic fbit;
            fbit = model[0] ^ model[7] ^ model[38] ^ model[70] ^ model[81] ^ model[96] ^ fb_in[k];
            model = {fbit, model[127:1]};
          end
      end
      @(negedge clk);
      load = 0; en = 0;
      checks++;
      if (state !== model) begin
        failures++;
        $display("iteration %0d: state %h expected %h", it, state, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
