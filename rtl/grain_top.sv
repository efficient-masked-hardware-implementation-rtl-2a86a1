// grain_top: the two Grain-128AEADv2 designs side by side, each behind its own LWC-style port
// set (see grain_lwc).
//
//   p_*  unmasked core with the pipeline-like pre-computation at P_PLAIN = 32 pre-output bits
//        per clock (16 message bits per clock, 1 + 16 clocks of initialisation);
//   m_*  first-order DOM-masked core with the three-stage pre-computation at P_MASKED = 8
//        (4 message bits per clock, 2 + 64 clocks of initialisation), which takes
//        20 * P_MASKED fresh random bits per clock on m_rdi_data from an external generator.
// These are the parallel levels the document presents as giving the best throughput per area for
// each version. The two designs share nothing but the clock and reset.
module grain_top #(
  parameter int P_PLAIN  = 32,
  parameter int P_MASKED = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [31:0]  p_key,
  input  logic         p_key_valid,
  output logic         p_key_ready,
  input  logic         p_key_update,
  input  logic [31:0]  p_bdi_data,
  input  logic         p_bdi_valid,
  output logic         p_bdi_ready,
  input  logic [3:0]   p_bdi_type,
  input  logic [3:0]   p_bdi_valid_bytes,
  input  logic [2:0]   p_bdi_size,
  input  logic         p_bdi_eoi,
  output logic [31:0]  p_bdo_data,
  output logic         p_bdo_valid,
  input  logic         p_bdo_ready,
  output logic [3:0]   p_bdo_valid_bytes,
  output logic [3:0]   p_bdo_type,
  output logic         p_bdo_last,
  input  logic [31:0]  m_key,
  input  logic         m_key_valid,
  output logic         m_key_ready,
  input  logic         m_key_update,
  input  logic [31:0]  m_bdi_data,
  input  logic         m_bdi_valid,
  output logic         m_bdi_ready,
  input  logic [3:0]   m_bdi_type,
  input  logic [3:0]   m_bdi_valid_bytes,
  input  logic [2:0]   m_bdi_size,
  input  logic         m_bdi_eoi,
  output logic [31:0]  m_bdo_data,
  output logic         m_bdo_valid,
  input  logic         m_bdo_ready,
  output logic [3:0]   m_bdo_valid_bytes,
  output logic [3:0]   m_bdo_type,
  output logic         m_bdo_last,
  input  logic [20*P_MASKED-1:0] m_rdi_data,
  input  logic         m_rdi_valid,
  output logic         m_rdi_ready
);
  grain_lwc #(.P(P_PLAIN), .MASKED(1'b0)) u_plain (
    .clk, .rst_n,
    .key(p_key),
    .key_valid(p_key_valid),
    .key_ready(p_key_ready),
    .key_update(p_key_update),
    .bdi_data(p_bdi_data),
    .bdi_valid(p_bdi_valid),
    .bdi_ready(p_bdi_ready),
    .bdi_type(p_bdi_type),
    .bdi_valid_bytes(p_bdi_valid_bytes),
    .bdi_size(p_bdi_size),
    .bdi_eoi(p_bdi_eoi),
    .bdo_data(p_bdo_data),
    .bdo_valid(p_bdo_valid),
    .bdo_ready(p_bdo_ready),
    .bdo_valid_bytes(p_bdo_valid_bytes),
    .bdo_type(p_bdo_type),
    .bdo_last(p_bdo_last),
    .rdi_data(1'b0), .rdi_valid(1'b0), .rdi_ready()
  );

  grain_lwc #(.P(P_MASKED), .MASKED(1'b1)) u_masked (
    .clk, .rst_n,
    .key(m_key),
    .key_valid(m_key_valid),
    .key_ready(m_key_ready),
    .key_update(m_key_update),
    .bdi_data(m_bdi_data),
    .bdi_valid(m_bdi_valid),
    .bdi_ready(m_bdi_ready),
    .bdi_type(m_bdi_type),
    .bdi_valid_bytes(m_bdi_valid_bytes),
    .bdi_size(m_bdi_size),
    .bdi_eoi(m_bdi_eoi),
    .bdo_data(m_bdo_data),
    .bdo_valid(m_bdo_valid),
    .bdo_ready(m_bdo_ready),
    .bdo_valid_bytes(m_bdo_valid_bytes),
    .bdo_type(m_bdo_type),
    .bdo_last(m_bdo_last),
    .rdi_data(m_rdi_data), .rdi_valid(m_rdi_valid), .rdi_ready(m_rdi_ready)
  );
endmodule
