// grain_core: unmasked Grain-128AEADv2 with the pipeline-like pre-computation technique,
// P pre-output bits (P/2 message bits) per clock; at P = 1 one message bit every two clocks.
//
// Datapath: LFSR S (grain_lfsr), NFSR B with its stage-1 register (grain_nfsr), pre-output y
// with its stage-1 register (grain_preout) and the authenticator A/R (grain_auth), sequenced by
// grain_ctrl with one prime clock. During rounds 0..319 y is XORed into the inputs of both FSRs;
// during rounds 320..383 the NFSR also receives k_0..k_63 and the LFSR k_64..k_127; rounds
// 384..447 fill A and rounds 448..511 fill R. In the data phase the even pre-output bits are the
// encryption keystream z and the odd ones the authentication keystream z'.
//
// Interface: key_load stores key (bit i is k_i) for the key re-introduction; start loads B with
// the key register and S with the IV (bit i is IV_i) and begins initialisation, which takes
// 1 + 512/P clocks. Then one W-bit chunk is accepted per clock while in_valid and in_ready are
// high: in_data bit k is the k-th bit of the chunk, in_auth marks the bits that enter the
// authenticator (clear bits beyond the end of the final chunk), ct = in_data ^ z is valid
// combinationally during the accepting clock. The chunk with in_last must already contain the
// padding bit 1; tag_valid then rises (one clock later with the accumulator pipeline) and tag
// holds A (bit j is a_j) until the next start. Framing the data into chunks and padding are left
// to the wrapper; they are not described in the document.
module grain_core #(
  parameter int P = 32,
  parameter int W = (P + 1) / 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         key_load,
  input  logic [127:0] key,
  input  logic         start,
  input  logic [95:0]  iv,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  input  logic [W-1:0] in_auth,
  input  logic         in_last,
  output logic [W-1:0] ct,
  output logic         init_busy,
  output logic         tag_valid,
  output logic [63:0]  tag
);
  import grain_pkg::*;

  phase_e        phase;
  logic          stage, adv, prime;
  logic [1:0]    fill;
  logic [8:0]    cnt;
  logic [127:0]  kreg, s, b;
  logic [P-1:0]  y, fb_n, fb_s, k_n, k_s;
  logic [W-1:0]  z, zp;
  logic          pend;
  logic [63:0]   sreg;

  always_ff @(posedge clk) if (key_load) kreg <= key;

  grain_ctrl #(.P(P), .NPRIME(1)) u_ctrl (
    .clk, .rst_n, .start, .rnd_ok(1'b1), .in_valid, .in_last, .in_ready,
    .phase, .stage, .adv, .fill, .cnt
  );

  assign prime = stage && !adv;

  always_comb begin
    k_n = kreg[cnt*P +: P];       // k_{t-320}
    k_s = kreg[64 + cnt*P +: P];  // k_{t-256}
    unique case (phase)
      PH_INIT: begin fb_n = y;       fb_s = y;       end
      PH_KEY:  begin fb_n = y ^ k_n; fb_s = y ^ k_s; end
      default: begin fb_n = '0;      fb_s = '0;      end
    endcase
  end

  // keystream bits: even pre-output bits encrypt, odd ones feed R
  if (P == 1) begin : g_serial
    // z arrives one clock before the chunk is taken, together with z'
    logic zr;
    always_ff @(posedge clk) if (adv && phase == PH_DATA && !in_ready) zr <= y[0];
    assign z  = zr;
    assign zp = y;
  end else begin : g_pairs
    for (genvar k = 0; k < W; k++) begin : g_bit
      assign z[k]  = y[2*k];
      assign zp[k] = y[2*k+1];
    end
  end

  grain_lfsr #(.P(P)) u_lfsr (
    .clk, .load(start), .load_val(lfsr_init(iv)), .en(adv), .fb_in(fb_s), .state(s)
  );

  grain_nfsr #(.P(P)) u_nfsr (
    .clk, .load(start), .load_val(kreg), .prime, .en(adv), .s, .fb_in(fb_n), .state(b)
  );

  grain_preout #(.P(P)) u_y (
    .clk, .prime, .en(adv), .b, .s, .y
  );

  grain_auth #(.P(P), .W(W), .PIPE(P >= 16)) u_auth (
    .clk, .rst_n,
    .fill_a(adv && phase == PH_ACC), .fill_r(adv && phase == PH_REG), .fill_in(y),
    .upd(adv && in_ready), .m(in_data & in_auth), .zp,
    .acc(tag), .sreg, .pend
  );

  assign ct        = in_data ^ z;
  assign init_busy = (phase != PH_IDLE) && (phase != PH_DATA) && (phase != PH_DONE);
  assign tag_valid = (phase == PH_DONE) && !pend;

  // A chunk is only taken in the data phase.
  assert property (@(posedge clk) disable iff (!rst_n) (in_valid && in_ready) |-> phase == PH_DATA);
endmodule
