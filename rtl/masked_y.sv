// masked_y: first-order masked pre-output function Y of Grain-128AEADv2 with the same
// three-stage pipeline-like pre-computation as masked_g, P lanes per clock.
//
//   y = b12 s8 + s13 s20 + b95 s42 + s60 s79 + b12 b95 s94
//       + s93 + b2 + b15 + b36 + b45 + b64 + b73 + b89
//
//   Stage 1: linear part per share (registered); first DOM AND layer for b12s8, s13s20, b95s42,
//            s60s79 and the factor b12b95; s94 is registered alongside. Lane k reads the
//            state at offset fill*P + k (see masked_g).
//   Stage 2: p = linear part + the four quadratic products (registered); second DOM layer
//            computes (b12b95)s94.
//   Stage 3: y0/y1 = p + that product, combinational from the stage-2 registers.
// Fresh randomness: 6 bits per lane, gadget j of lane k takes rnd[j*P + k] in the order above.
// The document only says that Y is built like G; the gadget arrangement is this design's.
module masked_y #(
  parameter int P = 8
) (
  input  logic           clk,
  input  logic           en,
  input  logic [1:0]     fill,
  input  logic [127:0]   b0,
  input  logic [127:0]   b1,
  input  logic [127:0]   s0,
  input  logic [127:0]   s1,
  input  logic [6*P-1:0] rnd,
  output logic [P-1:0]   y0,
  output logic [P-1:0]   y1
);
  localparam int NG1 = 5;
  // operands: bit 7 set marks an LFSR bit
  localparam int OPX [NG1] = '{12, 128+13, 95, 128+60, 12};
  localparam int OPY [NG1] = '{128+8, 128+20, 128+42, 128+79, 95};

  logic [NG1*P-1:0] x0, x1, w0, w1, ga, gb;
  logic [P-1:0]     l0_d, l1_d, l0_q, l1_q, s94_0q, s94_1q, p0_d, p1_d, p0_q, p1_q, ha, hb;

  function automatic logic pick(input logic [127:0] b, input logic [127:0] s, input int code,
                                input int o);
    return (code >= 128) ? s[code - 128 + o] : b[code + o];
  endfunction

  always_comb begin
    for (int k = 0; k < P; k++) begin
      int o;
      o = 32'(fill) * P + k;
      l0_d[k] = s0[o+93] ^ b0[o+2] ^ b0[o+15] ^ b0[o+36] ^ b0[o+45] ^ b0[o+64] ^ b0[o+73] ^
                b0[o+89];
      l1_d[k] = s1[o+93] ^ b1[o+2] ^ b1[o+15] ^ b1[o+36] ^ b1[o+45] ^ b1[o+64] ^ b1[o+73] ^
                b1[o+89];
      for (int j = 0; j < NG1; j++) begin
        x0[j*P+k] = pick(b0, s0, OPX[j], o);
        x1[j*P+k] = pick(b1, s1, OPX[j], o);
        w0[j*P+k] = pick(b0, s0, OPY[j], o);
        w1[j*P+k] = pick(b1, s1, OPY[j], o);
      end
    end
  end

  dom_and #(.N(NG1*P)) u_layer1 (
    .clk, .en, .ax(x0), .bx(x1), .ay(w0), .by(w1), .z(rnd[NG1*P-1:0]), .qa(ga), .qb(gb)
  );

  always_ff @(posedge clk) begin
    if (en) begin
      l0_q <= l0_d;
      l1_q <= l1_d;
      for (int k = 0; k < P; k++) begin
        s94_0q[k] <= s0[32'(fill) * P + k + 94];
        s94_1q[k] <= s1[32'(fill) * P + k + 94];
      end
    end
  end

  always_comb begin
    p0_d = l0_q ^ ga[0 +: P] ^ ga[P +: P] ^ ga[2*P +: P] ^ ga[3*P +: P];
    p1_d = l1_q ^ gb[0 +: P] ^ gb[P +: P] ^ gb[2*P +: P] ^ gb[3*P +: P];
  end

  dom_and #(.N(P)) u_layer2 (
    .clk, .en, .ax(ga[4*P +: P]), .bx(gb[4*P +: P]), .ay(s94_0q), .by(s94_1q),
    .z(rnd[6*P-1:5*P]), .qa(ha), .qb(hb)
  );

  always_ff @(posedge clk) begin
    if (en) begin
      p0_q <= p0_d;
      p1_q <= p1_d;
    end
  end

  assign y0 = p0_q ^ ha;
  assign y1 = p1_q ^ hb;

  initial assert (P >= 1 && 95 + 3*P - 1 <= 127) else $fatal(1, "masked_y: P must be 1..11");
endmodule
