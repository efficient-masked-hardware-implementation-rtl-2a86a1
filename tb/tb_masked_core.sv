// tb_masked_core: checks the first-order masked core at P = 8 (the default), 4, 2 and 1
// against the bit-serial reference model. The key is split into two random shares and every
// round gets fresh random bits. Each instance encrypts random messages of random length under
// random keys and IVs, with random gaps between chunks (stalls of the pipeline) and clocks
// without fresh randomness during the data phase (the whole core must hold). It compares every
// ciphertext bit, the recombined tag and the initialisation latency of 2 + 512/P clocks (two
// fill clocks before the first round).
module tb_masked_core;
  import grain_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0, stalls = 0, rnd_stalls = 0;
  localparam int NI = 4;
  localparam int PLIST [NI] = '{8, 4, 2, 1};
  bit [NI-1:0] done;

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gi = 0; gi < NI; gi++) begin : g_dut
    localparam int PP = PLIST[gi];
    localparam int WW = (PP + 1) / 2;
    logic          key_load, start, in_valid, in_ready, in_last, init_busy, tag_valid;
    logic [127:0]  key, key0, key1;
    logic [20*PP-1:0] rnd;
    logic          rnd_valid, rnd_ready;
    logic [95:0]   iv;
    logic [WW-1:0] in_data, in_auth, ct;
    logic [63:0]   tag;

    masked_core #(.P(PP)) dut (.*);

    // fresh randomness: new random bits every clock; withheld in some clocks of the data phase
    always @(negedge clk) begin
      for (int i = 0; i < 20*PP; i++) rnd[i] = 1'($urandom);
      rnd_valid = !(dut.phase == grain_pkg::PH_DATA && $urandom_range(0, 4) == 0);
      if (!rnd_valid) rnd_stalls++;
    end

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
        key1 = {$urandom, $urandom, $urandom, $urandom};
        key0 = key ^ key1;
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
        if (lat != 2 + 512 / PP) begin
          failures++;
          $display("P=%0d init latency %0d, expected %0d", PP, lat, 2 + 512 / PP);
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
          while (!in_ready) begin
            @(negedge clk);
            #1;
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
    checks++;
    if (rnd_stalls == 0) begin failures++; $display("no randomness stall exercised"); end
    $display("stalls exercised: %0d, randomness stalls: %0d", stalls, rnd_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
