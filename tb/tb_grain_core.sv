// tb_grain_core: checks grain_core at every parallel level it supports, P = 32 (the default,
// with the reduced stage-1 split) and 16, 8, 4, 2, 1 (the fixed split), against the bit-serial
// reference model. At P = 1 it also checks the rate of one message bit per two clocks. Each instance encrypts random messages of random length under random keys
// and IVs, with random gaps between chunks (stalls of the pipeline), and compares every
// ciphertext bit, the tag and the initialisation latency of 1 + 512/P clocks.
module tb_grain_core;
  import grain_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0, stalls = 0;
  localparam int NI = 6;
  localparam int PLIST [NI] = '{32, 16, 8, 4, 2, 1};
  bit [NI-1:0] done;

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gi = 0; gi < NI; gi++) begin : g_dut
    localparam int PP = PLIST[gi];
    localparam int WW = (PP + 1) / 2;
    logic          key_load, start, in_valid, in_ready, in_last, init_busy, tag_valid;
    logic [127:0]  key;
    logic [95:0]   iv;
    logic [WW-1:0] in_data, in_auth, ct;
    logic [63:0]   tag;

    grain_core #(.P(PP)) dut (.*);

    initial begin
      grain_ref ref_m;
      bit msg[$];
      bit exp_ct[$];
      int lat, nbits, pos, n;
      ref_m = new();
      key_load = 0; start = 0; in_valid = 0; in_last = 0; in_data = '0; in_auth = '0;
      key = '0; iv = '0;
      wait (rst_n);
      for (int test = 0; test < 4; test++) begin
        @(negedge clk);
        key = {$urandom, $urandom, $urandom, $urandom};
        iv  = {$urandom, $urandom, $urandom};
        key_load = 1;
        @(negedge clk);
        key_load = 0; start = 1;
        @(negedge clk);
        start = 0;
        lat = 0;
        while (init_busy) begin lat++; @(negedge clk); end
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        checks++;
        if (lat != 1 + 512 / PP) begin
          failures++;
          $display("P=%0d init latency %0d, expected %0d", PP, lat, 1 + 512 / PP);
        end
        ref_m.init(key, iv);
        nbits = (test == 0) ? 0 : $urandom_range(1, 200);
        msg.delete(); exp_ct.delete();
        for (int i = 0; i < nbits; i++) begin
          msg.push_back(1'($urandom));
          exp_ct.push_back(ref_m.data_bit(msg[i]));
        end
        void'(ref_m.data_bit(1'b1));  // padding
        pos = 0;
        forever begin
          if ($urandom_range(0, 3) == 0) begin
            in_valid = 0; stalls++;
            @(negedge clk);
            continue;
          end
          n = (nbits - pos >= WW) ? WW : nbits - pos;
          in_data = '0; in_auth = '0;
          for (int k = 0; k < n; k++) begin in_data[k] = msg[pos+k]; in_auth[k] = 1'b1; end
          in_last = (n < WW);
          if (in_last) begin in_data[n] = 1'b1; in_auth[n] = 1'b1; end
          in_valid = 1;
          #1;
          if (PP == 1) begin
            // one message bit every two clocks: at most one clock without in_ready
            int w;
            w = 0;
            while (!in_ready) begin w++; @(negedge clk); #1; end
            checks++;
            if (w > 1) begin failures++; $display("P=1 waited %0d clocks for in_ready", w); end
          end else if (!in_ready) begin
            failures++; $display("P=%0d in_ready low in data phase", PP);
          end
          for (int k = 0; k < n; k++) begin
            checks++;
            if (ct[k] !== exp_ct[pos+k]) begin
              failures++;
              if (failures < 10) $display("P=%0d test %0d ct bit %0d mismatch", PP, test, pos + k);
            end
          end
          @(negedge clk);
          pos += n;
          if (in_last) break;
        end
        in_valid = 0; in_last = 0;
        while (!tag_valid) @(negedge clk);
        checks++;
        if (tag !== ref_m.a) begin
          failures++;
          $display("P=%0d test %0d tag %h expected %h", PP, test, tag, ref_m.a);
        end
      end
      done[gi] = 1;
    end
  end

  initial begin
    done = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("stalls exercised: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
