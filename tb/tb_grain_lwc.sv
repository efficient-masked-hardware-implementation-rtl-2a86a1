// tb_grain_lwc: end-to-end test of the LWC-style wrapper, unmasked at P = 32 and masked at
// P = 8 (the defaults), and both again at P = 1 (one-bit chunks every second clock). Each instance runs several messages: random key (new or kept), random IV, random AD
// and PT byte lengths including zero, random backpressure on bdo, random withholding of rdi.
// The ciphertext bytes, their valid-byte marks and the tag are compared with the bit-serial
// reference model fed with the stream AD || PT || 1.
module tb_grain_lwc;
  import grain_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  int   bdo_stalls = 0, partial_words = 0, empty_msgs = 0, key_reuse = 0;
  localparam int NI = 4;
  bit [NI-1:0] done;

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gi = 0; gi < NI; gi++) begin : g_dut
    localparam bit MK = (gi % 2 == 1);
    localparam int PP = (gi >= 2) ? 1 : (MK ? 8 : 32);
    localparam int RW = MK ? ((20 * PP > 32) ? 20 * PP : 32) : 1;
    logic [31:0] key, bdi_data, bdo_data;
    logic        key_valid, key_ready, key_update, bdi_valid, bdi_ready, bdi_eoi;
    logic [3:0]  bdi_type, bdi_valid_bytes, bdo_valid_bytes, bdo_type;
    logic [2:0]  bdi_size;
    logic        bdo_valid, bdo_ready, bdo_last, rdi_valid, rdi_ready;
    logic [RW-1:0] rdi_data;

    grain_lwc #(.P(PP), .MASKED(MK)) dut (.*);

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
      for (int test = 0; test < 8; test++) begin
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

  initial begin
    done = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    $display("bdo stalls %0d, partial ct words %0d, empty messages %0d, key reuse %0d",
             bdo_stalls, partial_words, empty_msgs, key_reuse);
    checks += 3;
    if (bdo_stalls == 0)    failures++;
    if (partial_words == 0) failures++;
    if (empty_msgs == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
