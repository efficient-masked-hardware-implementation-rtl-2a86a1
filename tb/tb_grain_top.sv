// tb_grain_top: end-to-end test of grain_top at its default parameters (unmasked x32 and masked
// x8 running at the same time). Each side encrypts a series of messages: new or kept keys,
// random IVs, AD and PT of random byte lengths including zero, random gaps between input words
// (the core waits for data), random backpressure on bdo and random withholding of the fresh
// randomness. Ciphertext bytes and tags are compared with the bit-serial reference model fed with
// AD || PT || 1, and every mechanism of the design is counted and must occur: pipeline fill
// clocks, key re-introduction, the accumulator pipeline step, stalls for data, randomness and
// output, partial and padding-only final chunks, partial output words, empty messages and key
// reuse.
module tb_grain_top;
  import grain_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  int   bdo_stalls = 0, partial_words = 0, empty_msgs = 0, key_reuse = 0, bdi_gaps = 0;
  int   prime_clks = 0, key_clks = 0, acc_pipe = 0, data_wait = 0, rnd_wait = 0;
  int   part_final = 0, pad_final = 0;
  bit   done [2];

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gi = 0; gi < 2; gi++) begin : g_dut
    localparam bit MK = (gi == 1);
    localparam int PP = MK ? 8 : 32;
    localparam int RW = MK ? 20 * PP : 1;
    logic [31:0] key, bdi_data, bdo_data;
    logic        key_valid, key_ready, key_update, bdi_valid, bdi_ready, bdi_eoi;
    logic [3:0]  bdi_type, bdi_valid_bytes, bdo_valid_bytes, bdo_type;
    logic [2:0]  bdi_size;
    logic        bdo_valid, bdo_ready, bdo_last, rdi_valid, rdi_ready;
    logic [RW-1:0] rdi_data;


    always @(negedge clk) begin
      for (int i = 0; i < RW; i++) rdi_data[i] = 1'($urandom);
      rdi_valid = ($urandom_range(0, 5) != 0);
      bdo_ready = ($urandom_range(0, 3) != 0);
      if (bdo_valid && !bdo_ready) bdo_stalls++;
    end

    // send one word on bdi
    task automatic send(input logic [3:0] typ, input logic [31:0] w, input int nbytes,
                        input bit eoi);
      bdi_type = typ; bdi_data = w; bdi_size = 3'(nbytes); bdi_eoi = eoi;
      bdi_valid_bytes = 4'((4'hF << (4 - nbytes)) & 4'hF);
      if ($urandom_range(0, 3) == 0) begin
        bdi_gaps++;
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
      end
      bdi_valid = 1;
      @(posedge clk);
      while (!bdi_ready) @(posedge clk);
      #1 bdi_valid = 0;
    endtask

    // send a byte string as words of one segment type
    task automatic send_bytes(input logic [3:0] typ, input byte unsigned by[$], input bit eoi);
      for (int i = 0; i < by.size(); i += 4) begin
        logic [31:0] w = '0;
        int n = (by.size() - i >= 4) ? 4 : by.size() - i;
        for (int j = 0; j < n; j++) w[31-8*j -: 8] = by[i+j];
        send(typ, w, n, eoi && (i + 4 >= by.size()));
      end
    endtask

    byte unsigned got_ct[$];
    logic [63:0]  got_tag;
    bit           got_done;

    // collect bdo
    always @(posedge clk) begin
      if (rst_n && bdo_valid && bdo_ready) begin
        if (bdo_type == grain_pkg::HDR_CT) begin
          for (int j = 0; j < 4; j++) if (bdo_valid_bytes[3-j]) got_ct.push_back(bdo_data[31-8*j -: 8]);
          if (bdo_valid_bytes != 4'hF) partial_words++;
        end else begin
          for (int j = 0; j < 4; j++)
            for (int i = 0; i < 8; i++) got_tag[(bdo_last ? 32 : 0) + 8*j + i] = bdo_data[31-8*j-(7-i)];
          if (bdo_last) got_done = 1;
        end
      end
    end

    initial begin
      grain_ref      ref_m;
      logic [127:0]  k;
      logic [95:0]   iv;
      byte unsigned  ad[$], pt[$], exp_ct[$];
      ref_m = new();
      key_valid = 0; key_update = 0; bdi_valid = 0; bdi_eoi = 0; key = '0;
      bdi_type = '0; bdi_data = '0; bdi_size = '0; bdi_valid_bytes = '0;
      k = '0;
      wait (rst_n);
      for (int test = 0; test < 10; test++) begin
        @(negedge clk);
        got_ct.delete(); got_done = 0;
        if (test == 0 || $urandom_range(0, 2) != 0) begin
          k = {$urandom, $urandom, $urandom, $urandom};
          key_update = 1;
          for (int w = 0; w < 4; w++) begin
            for (int j = 0; j < 4; j++)
              for (int i = 0; i < 8; i++) key[31-8*j-(7-i)] = k[32*w + 8*j + i];
            key_valid = 1;
            @(posedge clk);
            while (!key_ready) @(posedge clk);
            #1 key_valid = 0;
          end
          key_update = 0;
        end else key_reuse++;
        iv = {$urandom, $urandom, $urandom};
        ad.delete(); pt.delete(); exp_ct.delete();
        repeat ((test == 1) ? 0 : $urandom_range(0, 9)) ad.push_back(8'($urandom));
        repeat ((test == 1) ? 0 : $urandom_range(0, 21)) pt.push_back(8'($urandom));
        if (ad.size() == 0 && pt.size() == 0) empty_msgs++;
        for (int w = 0; w < 3; w++) begin
          logic [31:0] word;
          for (int j = 0; j < 4; j++)
            for (int i = 0; i < 8; i++) word[31-8*j-(7-i)] = iv[32*w + 8*j + i];
          send(grain_pkg::HDR_NPUB, word, 4, (w == 2) && ad.size() == 0 && pt.size() == 0);
        end
        send_bytes(grain_pkg::HDR_AD, ad, pt.size() == 0);
        send_bytes(grain_pkg::HDR_PT, pt, 1'b1);
        // reference
        ref_m.init(k, iv);
        foreach (ad[i]) for (int b = 0; b < 8; b++) void'(ref_m.data_bit(ad[i][b]));
        foreach (pt[i]) begin
          byte unsigned c;
          for (int b = 0; b < 8; b++) c[b] = ref_m.data_bit(pt[i][b]);
          exp_ct.push_back(c);
        end
        void'(ref_m.data_bit(1'b1));
        while (!got_done) @(negedge clk);
        checks++;
        if (got_ct.size() != exp_ct.size()) begin
          failures++;
          $display("MK=%0d test %0d: %0d ct bytes, expected %0d", MK, test, got_ct.size(), exp_ct.size());
        end else
          foreach (exp_ct[i]) begin
            checks++;
            if (got_ct[i] != exp_ct[i]) begin
              failures++;
              $display("MK=%0d test %0d ct byte %0d: %h expected %h", MK, test, i, got_ct[i], exp_ct[i]);
            end
          end
        checks++;
        if (got_tag !== ref_m.a) begin
          failures++;
          $display("MK=%0d test %0d tag %h expected %h", MK, test, got_tag, ref_m.a);
        end
      end
      done[gi] = 1;
    end
  end

  grain_top dut (
    .clk, .rst_n,
    .p_key(g_dut[0].key), .p_key_valid(g_dut[0].key_valid), .p_key_ready(g_dut[0].key_ready),
    .p_key_update(g_dut[0].key_update), .p_bdi_data(g_dut[0].bdi_data),
    .p_bdi_valid(g_dut[0].bdi_valid), .p_bdi_ready(g_dut[0].bdi_ready),
    .p_bdi_type(g_dut[0].bdi_type), .p_bdi_valid_bytes(g_dut[0].bdi_valid_bytes),
    .p_bdi_size(g_dut[0].bdi_size), .p_bdi_eoi(g_dut[0].bdi_eoi),
    .p_bdo_data(g_dut[0].bdo_data), .p_bdo_valid(g_dut[0].bdo_valid),
    .p_bdo_ready(g_dut[0].bdo_ready), .p_bdo_valid_bytes(g_dut[0].bdo_valid_bytes),
    .p_bdo_type(g_dut[0].bdo_type), .p_bdo_last(g_dut[0].bdo_last),
    .m_key(g_dut[1].key), .m_key_valid(g_dut[1].key_valid), .m_key_ready(g_dut[1].key_ready),
    .m_key_update(g_dut[1].key_update), .m_bdi_data(g_dut[1].bdi_data),
    .m_bdi_valid(g_dut[1].bdi_valid), .m_bdi_ready(g_dut[1].bdi_ready),
    .m_bdi_type(g_dut[1].bdi_type), .m_bdi_valid_bytes(g_dut[1].bdi_valid_bytes),
    .m_bdi_size(g_dut[1].bdi_size), .m_bdi_eoi(g_dut[1].bdi_eoi),
    .m_bdo_data(g_dut[1].bdo_data), .m_bdo_valid(g_dut[1].bdo_valid),
    .m_bdo_ready(g_dut[1].bdo_ready), .m_bdo_valid_bytes(g_dut[1].bdo_valid_bytes),
    .m_bdo_type(g_dut[1].bdo_type), .m_bdo_last(g_dut[1].bdo_last),
    .m_rdi_data(g_dut[1].rdi_data), .m_rdi_valid(g_dut[1].rdi_valid),
    .m_rdi_ready(g_dut[1].rdi_ready)
  );
  assign g_dut[0].rdi_ready = 1'b0;

  // mechanism counters (observed inside the design)
  always @(posedge clk) if (rst_n) begin
    if (dut.u_plain.g_plain.u_core.phase == grain_pkg::PH_PRIME)   prime_clks++;
    if (dut.u_masked.g_masked.u_core.phase == grain_pkg::PH_PRIME) prime_clks++;
    if (dut.u_plain.g_plain.u_core.phase == grain_pkg::PH_KEY)     key_clks++;
    if (dut.u_plain.g_plain.u_core.u_auth.pend)                    acc_pipe++;
    if (dut.u_plain.g_plain.u_core.phase == grain_pkg::PH_DATA && !dut.u_plain.c_valid)
      data_wait++;
    if (dut.u_masked.g_masked.u_core.phase != grain_pkg::PH_IDLE &&
        dut.u_masked.g_masked.u_core.phase != grain_pkg::PH_DONE && !g_dut[1].rdi_valid)
      rnd_wait++;
    if (dut.u_plain.c_valid && dut.u_plain.c_ready && dut.u_plain.c_last) begin
      if (dut.u_plain.pc != 0) part_final++; else pad_final++;
    end
    if (dut.u_masked.c_valid && dut.u_masked.c_ready && dut.u_masked.c_last) begin
      if (dut.u_masked.pc != 0) part_final++; else pad_final++;
    end
  end

  initial begin
    done = '{0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1]);
    $display("prime clocks %0d, key clocks %0d, accumulator pipeline %0d, data waits %0d, randomness waits %0d",
             prime_clks, key_clks, acc_pipe, data_wait, rnd_wait);
    $display("bdo stalls %0d, bdi gaps %0d, partial final chunks %0d, padding-only final chunks %0d",
             bdo_stalls, bdi_gaps, part_final, pad_final);
    $display("partial ct words %0d, empty messages %0d, key reuse %0d",
             partial_words, empty_msgs, key_reuse);
    checks += 12;
    if (prime_clks == 0)    begin failures++; $display("pipeline fill never seen"); end
    if (key_clks == 0)      begin failures++; $display("key re-introduction never seen"); end
    if (acc_pipe == 0)      begin failures++; $display("accumulator pipeline never seen"); end
    if (data_wait == 0)     begin failures++; $display("data stall never seen"); end
    if (rnd_wait == 0)      begin failures++; $display("randomness stall never seen"); end
    if (bdo_stalls == 0)    begin failures++; $display("output stall never seen"); end
    if (bdi_gaps == 0)      begin failures++; $display("input gap never seen"); end
    if (part_final == 0)    begin failures++; $display("partial final chunk never seen"); end
    if (pad_final == 0)     begin failures++; $display("padding-only final chunk never seen"); end
    if (partial_words == 0) begin failures++; $display("partial output word never seen"); end
    if (empty_msgs == 0)    begin failures++; $display("empty message never seen"); end
    if (key_reuse == 0)     begin failures++; $display("key reuse never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
