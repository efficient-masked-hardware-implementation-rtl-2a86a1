// grain_preout: the pre-output function y of Grain-128AEADv2 with pipeline-like
// pre-computation, P output bits per clock.
//
//   y = b12 s8 + s13 s20 + b95 s42 + s60 s79 + b12 b95 s94 + s93
//       + b2 + b15 + b36 + b45 + b64 + b73 + b89
//
// As in grain_nfsr, y is split in two. For P <= 16 the first part is every term except
// b12 s8 and s13 s20 (the document's stage-1 equation); for P = 32 it is the terms whose highest
// index is at most 64 (b12 s8, s13 s20, b2, b15, b36, b45, b64). The first part is registered in
// py one clock ahead, from the unshifted state when `prime` is set and from the state P positions
// up when `en` (the FSRs shift) is set; the output y is py XOR the second part evaluated on the
// current state, so y[k] is y_{t+k} for the current round t. y is combinational from registers.
module grain_preout #(
  parameter int P = 32
) (
  input  logic         clk,
  input  logic         prime,
  input  logic         en,
  input  logic [127:0] b,
  input  logic [127:0] s,
  output logic [P-1:0] y
);
  import grain_pkg::*;

  logic [P-1:0] py;
  logic [P-1:0] py_next;

  always_comb begin
    for (int k = 0; k < P; k++) begin
      py_next[k] = 1'b0;
      y[k]       = py[k];
      for (int j = 0; j < NTERM_Y; j++) begin
        if (y_first(P, j)) py_next[k] ^= y_term(b, s, j, (en ? P : 0) + k);
        else               y[k]       ^= y_term(b, s, j, k);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (prime || en) py <= py_next;
  end

  initial assert (P >= 1 && P <= 32) else $fatal(1, "grain_preout: P must be 1..32");
endmodule
