// grain_nfsr: the 128-bit non-linear feedback shift register B of Grain-128AEADv2 with the
// pipeline-like pre-computation of its feedback, advanced P rounds per clock.
//
// The feedback s_0 + g(B) is split in two parts. The first part is computed one clock early
// into the register pg (stage 1); the second part is computed from the current state and XORed
// with pg when the register shifts (stage 2). Stage 1 can run early because a shift only moves
// every bit down by P: the first-part terms of the next round are read P positions higher in the
// current state. The split (see grain_pkg) follows the document: for P <= 16 the first part is
// s0, b0, b26, b56, b91, b96, b3b67, b11b13, b17b18, b27b59; for P = 32 every term whose highest
// index is at most 64 goes first and the rest waits for stage 2.
//
// Control: `prime` fills pg from the unshifted state (the document's extra clock t = -1, in
// which the register does not move); `en` shifts and at the same time pre-computes the next
// round from the state P positions up. With neither asserted everything holds, which keeps pg
// consistent with the state during a stall. fb_in[k] is XORed into lane k (y and key bits during
// initialisation). s is the LFSR state (s0 enters the feedback). Bit i of `state` is b_i.
module grain_nfsr #(
  parameter int P = 32
) (
  input  logic         clk,
  input  logic         load,
  input  logic [127:0] load_val,
  input  logic         prime,
  input  logic         en,
  input  logic [127:0] s,
  input  logic [P-1:0] fb_in,
  output logic [127:0] state
);
  import grain_pkg::*;

  logic [P-1:0] pg;       // stage-1 register
  logic [P-1:0] pg_next;  // stage 1 of the round that will be current next clock
  logic [P-1:0] fb;       // stage 2: complete feedback

  always_comb begin
    for (int k = 0; k < P; k++) begin
      pg_next[k] = 1'b0;
      fb[k]      = pg[k] ^ fb_in[k];
      for (int j = 0; j < NTERM_G; j++) begin
        if (g_first(P, j)) pg_next[k] ^= g_term(state, s, j, (en ? P : 0) + k);
        else               fb[k]      ^= g_term(state, s, j, k);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (load)    state <= load_val;
    else if (en) state <= {fb, state[127:P]};
    if (prime || en) pg <= pg_next;
  end

  initial assert (P >= 1 && P <= 32) else $fatal(1, "grain_nfsr: P must be 1..32");
endmodule
