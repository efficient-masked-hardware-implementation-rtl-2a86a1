// masked_g: first-order masked NFSR feedback G = s0 + g(B) of Grain-128AEADv2 with the
// three-stage pipeline-like pre-computation, P lanes (rounds) per clock.
//
// Inputs are the two shares of the NFSR (b0, b1) and of the LFSR (s0, s1). Lane k of stage 1
// reads the state at offset o = fill*P + k: fill is 0 and 1 in the two pipeline-fill clocks,
// when the registers do not shift, and 2 afterwards, when stage 1 works on the round that will
// be current two clocks later. All registers load when en is high and hold otherwise.
//   Stage 1: linear part l = s0+b0+b26+b56+b91+b96 per share (registered); the first DOM AND
//            layer for b3b67, b11b13, b17b18, b27b59, b40b48, b61b65, b68b84 and for the
//            factors b22b24, b70b78, m = b88b92 and n = b93b95; the third factors b25 and b82
//            are registered alongside.
//   Stage 2: p = l + all degree-2 products (registered); second DOM layer computes
//            (b22b24)b25, (b70b78)b82 and q = mn.
//   Stage 3: the outputs g0/g1 = p + the three second-layer products, combinational from the
//            stage-2 registers, so lane k is the share of b_127 for the current round + k.
// Fresh randomness: 14 bits per lane, gadget j of lane k takes rnd[j*P + k], in the order
// b3b67, b11b13, b17b18, b27b59, b40b48, b61b65, b68b84, b22b24, b70b78, b88b92, b93b95,
// (b22b24)b25, (b70b78)b82, mn. This numbering follows the document's r0, r1, r9, r10, r13;
// the gadgets of the cubic terms, which the document does not draw, are this design's.
module masked_g #(
  parameter int P = 8
) (
  input  logic            clk,
  input  logic            en,
  input  logic [1:0]      fill,
  input  logic [127:0]    b0,
  input  logic [127:0]    b1,
  input  logic [127:0]    s0,
  input  logic [127:0]    s1,
  input  logic [14*P-1:0] rnd,
  output logic [P-1:0]    g0,
  output logic [P-1:0]    g1
);
  localparam int NG1 = 11;  // first-layer gadgets
  localparam int NQ  = 7;   // quadratic terms that finish in stage 1
  // operand indices of the first-layer gadgets
  localparam int OPX [NG1] = '{3, 11, 17, 27, 40, 61, 68, 22, 70, 88, 93};
  localparam int OPY [NG1] = '{67, 13, 18, 59, 48, 65, 84, 24, 78, 92, 95};

  logic [NG1*P-1:0] x0, x1, y0, y1, ga, gb;
  logic [P-1:0]     l0_d, l1_d;
  logic [P-1:0]     l0_q, l1_q, b25_0q, b25_1q, b82_0q, b82_1q;
  logic [P-1:0]     p0_d, p1_d, p0_q, p1_q;
  logic [3*P-1:0]   u0, u1, v0, v1, ha, hb;

  // stage 1
  always_comb begin
    for (int k = 0; k < P; k++) begin
      int o;
      o = 32'(fill) * P + k;
      l0_d[k] = s0[o] ^ b0[o] ^ b0[o+26] ^ b0[o+56] ^ b0[o+91] ^ b0[o+96];
      l1_d[k] = s1[o] ^ b1[o] ^ b1[o+26] ^ b1[o+56] ^ b1[o+91] ^ b1[o+96];
      for (int j = 0; j < NG1; j++) begin
        x0[j*P+k] = b0[o + OPX[j]];
        x1[j*P+k] = b1[o + OPX[j]];
        y0[j*P+k] = b0[o + OPY[j]];
        y1[j*P+k] = b1[o + OPY[j]];
      end
    end
  end

  dom_and #(.N(NG1*P)) u_layer1 (
    .clk, .en, .ax(x0), .bx(x1), .ay(y0), .by(y1), .z(rnd[NG1*P-1:0]), .qa(ga), .qb(gb)
  );

  always_ff @(posedge clk) begin
    if (en) begin
      l0_q <= l0_d;
      l1_q <= l1_d;
      for (int k = 0; k < P; k++) begin
        b25_0q[k] <= b0[32'(fill) * P + k + 25];
        b25_1q[k] <= b1[32'(fill) * P + k + 25];
        b82_0q[k] <= b0[32'(fill) * P + k + 82];
        b82_1q[k] <= b1[32'(fill) * P + k + 82];
      end
    end
  end

  // stage 2
  always_comb begin
    p0_d = l0_q;
    p1_d = l1_q;
    for (int j = 0; j < NQ; j++) begin
      p0_d ^= ga[j*P +: P];
      p1_d ^= gb[j*P +: P];
    end
    // second layer operands: (b22b24, b25), (b70b78, b82), (m, n)
    u0 = {ga[9*P +: P],  ga[8*P +: P], ga[7*P +: P]};
    u1 = {gb[9*P +: P],  gb[8*P +: P], gb[7*P +: P]};
    v0 = {ga[10*P +: P], b82_0q,       b25_0q};
    v1 = {gb[10*P +: P], b82_1q,       b25_1q};
  end

  dom_and #(.N(3*P)) u_layer2 (
    .clk, .en, .ax(u0), .bx(u1), .ay(v0), .by(v1), .z(rnd[14*P-1:NG1*P]), .qa(ha), .qb(hb)
  );

  always_ff @(posedge clk) begin
    if (en) begin
      p0_q <= p0_d;
      p1_q <= p1_d;
    end
  end

  // stage 3
  assign g0 = p0_q ^ ha[0 +: P] ^ ha[P +: P] ^ ha[2*P +: P];
  assign g1 = p1_q ^ hb[0 +: P] ^ hb[P +: P] ^ hb[2*P +: P];

  initial assert (P >= 1 && 96 + 3*P - 1 <= 127) else $fatal(1, "masked_g: P must be 1..10");
endmodule
