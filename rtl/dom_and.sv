// dom_and: first-order domain-oriented masking (DOM) AND gadget, N independent lanes.
//
// Inputs are two-share encodings x = ax ^ bx and y = ay ^ by (domain A and domain B) and one
// fresh random bit z per lane. Calculation forms the inner-domain products ax&ay, bx&by and the
// cross-domain products ax&by, bx&ay; resharing XORs z into both cross-domain products, and a
// register stage stops glitches from passing the resharing; integration XORs each domain's inner
// product with its reshared cross product:
//   qa = [ax&ay] ^ [ax&by ^ z],   qb = [bx&by] ^ [bx&ay ^ z],   qa ^ qb = x & y.
// The inner products are registered as well, so the whole gadget is one pipeline stage that
// loads when en is high; this matches the stage boundaries of the pipelined masked feedback.
// Latency: one clock; qa/qb are combinational from the registers.
module dom_and #(
  parameter int N = 1
) (
  input  logic         clk,
  input  logic         en,
  input  logic [N-1:0] ax,
  input  logic [N-1:0] bx,
  input  logic [N-1:0] ay,
  input  logic [N-1:0] by,
  input  logic [N-1:0] z,
  output logic [N-1:0] qa,
  output logic [N-1:0] qb
);
  logic [N-1:0] in_a, in_b, cr_a, cr_b;

  always_ff @(posedge clk) begin
    if (en) begin
      in_a <= ax & ay;
      in_b <= bx & by;
      cr_a <= (ax & by) ^ z;
      cr_b <= (bx & ay) ^ z;
    end
  end

  assign qa = in_a ^ cr_a;
  assign qb = in_b ^ cr_b;
endmodule
