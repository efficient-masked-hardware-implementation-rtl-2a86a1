// grain_lfsr: the 128-bit linear feedback shift register S of Grain-128AEADv2, advanced P
// rounds per clock.
//
// Lane k of the feedback computes s_127 of round t+k,
//   f = s_k + s_{k+7} + s_{k+38} + s_{k+70} + s_{k+81} + s_{k+96},
// XORed with fb_in[k], which carries y during initialisation and y plus a key bit during key
// re-introduction (the caller forms it). With P <= 32 every tap of every lane lies inside the
// current state, so all P bits come from one state. A shift moves the register down by P and
// writes the P new bits at the top: state <= {fb, state[127:P]}. Bit i of `state` is s_i.
//
// Timing: load has priority over en; both take effect at the rising edge. The register has no
// reset: it is always loaded before it is used. The same module holds each share of the masked
// LFSR, since f is linear and is applied to each share on its own.
module grain_lfsr #(
  parameter int P = 32
) (
  input  logic         clk,
  input  logic         load,
  input  logic [127:0] load_val,
  input  logic         en,
  input  logic [P-1:0] fb_in,
  output logic [127:0] state
);
  import grain_pkg::*;

  logic [P-1:0] fb;

  always_comb begin
    for (int k = 0; k < P; k++) fb[k] = f_at(state, k) ^ fb_in[k];
  end

  always_ff @(posedge clk) begin
    if (load)    state <= load_val;
    else if (en) state <= {fb, state[127:P]};
  end

  initial assert (P >= 1 && P <= 32) else $fatal(1, "grain_lfsr: P must be 1..32");
endmodule
