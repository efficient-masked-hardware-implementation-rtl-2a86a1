// masked_core: first-order masked Grain-128AEADv2 (domain-oriented masking) with the
// three-stage pipeline-like pre-computation, P pre-output bits per clock (P <= 8).
//
// Both FSRs are held as two shares (S, S') and (B, B'). The LFSR feedback F is f applied to each
// share (two grain_lfsr instances). The NFSR feedback G and the pre-output Y are the three-stage
// pipelines masked_g and masked_y; the controller runs two fill clocks after start (the
// document's t = -2 and t = -1) and then advances P rounds per clock with the same phases as the
// unmasked core: y shares fed back during rounds 0..319, y and key shares during 320..383, then A
// and R loaded. The key is stored and re-introduced as two shares (key0 ^ key1 = key); the IV is
// public and is loaded into share S only (S' starts at zero).
//
// The authenticator is kept as two shares A, A' and R, R' (two grain_auth instances): its update
// is linear in A and R for a given message bit, which arrives unshared on the data input, so no
// randomness is needed there. The ciphertext is in_data ^ z0 ^ z1, z0 and z1 being the two
// shares of the keystream bit z, and the tag is A ^ A'; both are public outputs. Masking the authenticator this way is this
// design's choice; the document masks f, g and y only.
//
// Fresh randomness: rnd carries 20 bits per lane (14 for G, 6 for Y) and is consumed in every
// clock the pipeline moves (rnd_ready); with rnd_valid low the whole core holds. Initialisation
// takes 2 + 512/P clocks when randomness is always available. The data interface is that of
// grain_core, including its alternating data phase at P = 1 (one message bit every two clocks).
module masked_core #(
  parameter int P = 8,
  parameter int W = (P + 1) / 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            key_load,
  input  logic [127:0]    key0,
  input  logic [127:0]    key1,
  input  logic            start,
  input  logic [95:0]     iv,
  input  logic [20*P-1:0] rnd,
  input  logic            rnd_valid,
  output logic            rnd_ready,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [W-1:0]    in_data,
  input  logic [W-1:0]    in_auth,
  input  logic            in_last,
  output logic [W-1:0]    ct,
  output logic            init_busy,
  output logic            tag_valid,
  output logic [63:0]     tag
);
  import grain_pkg::*;

  phase_e        phase;
  logic          stage, adv;
  logic [1:0]    fill;
  logic [8:0]    cnt;
  logic [127:0]  kreg0, kreg1, s0, s1, b0, b1;
  logic [P-1:0]  g0, g1, y0, y1, fbn0, fbn1, fbs0, fbs1;
  logic [W-1:0]  z0, z1, zp0, zp1;
  logic [63:0]   acc0, acc1, sreg0, sreg1;
  logic          pend0, pend1;

  always_ff @(posedge clk) begin
    if (key_load) begin
      kreg0 <= key0;
      kreg1 <= key1;
    end
  end

  grain_ctrl #(.P(P), .NPRIME(2)) u_ctrl (
    .clk, .rst_n, .start, .rnd_ok(rnd_valid), .in_valid, .in_last, .in_ready,
    .phase, .stage, .adv, .fill, .cnt
  );

  assign rnd_ready = stage;

  masked_g #(.P(P)) u_g (
    .clk, .en(stage), .fill, .b0, .b1, .s0, .s1, .rnd(rnd[14*P-1:0]), .g0, .g1
  );

  masked_y #(.P(P)) u_y (
    .clk, .en(stage), .fill, .b0, .b1, .s0, .s1, .rnd(rnd[20*P-1:14*P]), .y0, .y1
  );

  always_comb begin
    unique case (phase)
      PH_INIT: begin
        fbn0 = y0; fbn1 = y1; fbs0 = y0; fbs1 = y1;
      end
      PH_KEY: begin
        fbn0 = y0 ^ kreg0[cnt*P +: P];
        fbn1 = y1 ^ kreg1[cnt*P +: P];
        fbs0 = y0 ^ kreg0[64 + cnt*P +: P];
        fbs1 = y1 ^ kreg1[64 + cnt*P +: P];
      end
      default: begin
        fbn0 = '0; fbn1 = '0; fbs0 = '0; fbs1 = '0;
      end
    endcase
  end

  // keystream shares: even pre-output bits encrypt, odd ones feed R
  if (P == 1) begin : g_serial
    // z arrives one clock before the chunk is taken, together with z'
    logic zr0, zr1;
    always_ff @(posedge clk) begin
      if (adv && phase == PH_DATA && !in_ready) begin
        zr0 <= y0[0];
        zr1 <= y1[0];
      end
    end
    assign z0  = zr0;
    assign z1  = zr1;
    assign zp0 = y0;
    assign zp1 = y1;
  end else begin : g_pairs
    for (genvar k = 0; k < W; k++) begin : g_bit
      assign z0[k]  = y0[2*k];
      assign z1[k]  = y1[2*k];
      assign zp0[k] = y0[2*k+1];
      assign zp1[k] = y1[2*k+1];
    end
  end

  // LFSR shares
  grain_lfsr #(.P(P)) u_lfsr0 (
    .clk, .load(start), .load_val(lfsr_init(iv)), .en(adv), .fb_in(fbs0), .state(s0)
  );
  grain_lfsr #(.P(P)) u_lfsr1 (
    .clk, .load(start), .load_val('0), .en(adv), .fb_in(fbs1), .state(s1)
  );

  // NFSR shares: plain shift registers fed by the stage-3 output of masked_g
  always_ff @(posedge clk) begin
    if (start) begin
      b0 <= kreg0;
      b1 <= kreg1;
    end else if (adv) begin
      b0 <= {g0 ^ fbn0, b0[127:P]};
      b1 <= {g1 ^ fbn1, b1[127:P]};
    end
  end

  grain_auth #(.P(P), .W(W), .PIPE(P >= 16)) u_auth0 (
    .clk, .rst_n,
    .fill_a(adv && phase == PH_ACC), .fill_r(adv && phase == PH_REG), .fill_in(y0),
    .upd(adv && in_ready), .m(in_data & in_auth), .zp(zp0),
    .acc(acc0), .sreg(sreg0), .pend(pend0)
  );
  grain_auth #(.P(P), .W(W), .PIPE(P >= 16)) u_auth1 (
    .clk, .rst_n,
    .fill_a(adv && phase == PH_ACC), .fill_r(adv && phase == PH_REG), .fill_in(y1),
    .upd(adv && in_ready), .m(in_data & in_auth), .zp(zp1),
    .acc(acc1), .sreg(sreg1), .pend(pend1)
  );

  assign ct        = in_data ^ z0 ^ z1;
  assign tag       = acc0 ^ acc1;
  assign init_busy = (phase != PH_IDLE) && (phase != PH_DATA) && (phase != PH_DONE);
  assign tag_valid = (phase == PH_DONE) && !pend0 && !pend1;

  assert property (@(posedge clk) disable iff (!rst_n) (in_valid && in_ready) |-> rnd_valid);
endmodule
