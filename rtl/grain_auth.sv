// grain_auth: the authenticator generator of Grain-128AEADv2, a 64-bit shift register R and a
// 64-bit accumulator A, processing W message bits per clock.
//
// Initialisation: while fill_a (fill_r) is high, the P pre-output bits in fill_in are shifted
// into A (R) from the top, P bits per clock, so that after 64/P clocks a_j = y_{384+j}
// (r_j = y_{448+j}).
//
// Update: for a chunk of W message bits m_0..m_{W-1} with their authentication keystream bits
// z'_0..z'_{W-1}, the register window is rwin = {z', R} (64+W bits): the message bit m_k meets
// the register as it stands k single-bit steps later, so
//   a_j += sum_k m_k * rwin[j+k],   R <= rwin[63+W:W].
// For PIPE = 1 (used for P >= 16) the window and the message bits are first captured in a
// pipeline register between R and A, and A is updated from it one clock later, so the update of
// A lags R by one clock; `pend` is high while such an update is in flight. Where exactly the
// pipeline register sits is this design's reading of the document's figure, which shows
// registers between R and A with the new keystream bits entering them.
//
// This module is linear in A and R for a given message, so the masked core uses two copies, one
// per share, fed with the same message bits.
module grain_auth #(
  parameter int P    = 32,
  parameter int W    = (P + 1) / 2,
  parameter bit PIPE = (P >= 16)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fill_a,
  input  logic         fill_r,
  input  logic [P-1:0] fill_in,
  input  logic         upd,
  input  logic [W-1:0] m,
  input  logic [W-1:0] zp,
  output logic [63:0]  acc,
  output logic [63:0]  sreg,
  output logic         pend
);
  logic [63+W:0] rwin;
  logic [63+W:0] rwin_q;    // pipeline register (PIPE = 1 only)
  logic [W-1:0]  m_q;
  logic          v_q;
  logic [63+W:0] a_win;     // window the accumulator uses this clock
  logic [W-1:0]  a_m;
  logic          a_upd;
  logic [63:0]   a_delta;

  assign rwin = {zp, sreg};

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v_q <= 1'b0;
      else        v_q <= upd;
    end
    always_ff @(posedge clk) begin
      if (upd) begin
        rwin_q <= rwin;
        m_q    <= m;
      end
    end
    assign a_win = rwin_q;
    assign a_m   = m_q;
    assign a_upd = v_q;
    assign pend  = v_q;
  end else begin : g_direct
    assign rwin_q = '0;
    assign m_q    = '0;
    assign v_q    = 1'b0;
    assign a_win  = rwin;
    assign a_m    = m;
    assign a_upd  = upd;
    assign pend   = 1'b0;
  end

  always_comb begin
    for (int j = 0; j < 64; j++) begin
      a_delta[j] = 1'b0;
      for (int k = 0; k < W; k++) a_delta[j] ^= a_m[k] & a_win[j+k];
    end
  end

  always_ff @(posedge clk) begin
    if (fill_a)     acc <= {fill_in, acc[63:P]};
    else if (a_upd) acc <= acc ^ a_delta;
    if (fill_r)     sreg <= {fill_in, sreg[63:P]};
    else if (upd)   sreg <= rwin[63+W:W];
  end

  initial assert (W >= 1 && W <= 32 && P <= 64) else $fatal(1, "grain_auth: bad width");
endmodule
