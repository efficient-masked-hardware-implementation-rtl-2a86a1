// grain_pkg: constants, term tables and helper functions shared by the Grain-128AEADv2
// datapaths.
//
// The NFSR feedback g (with the LFSR bit s0 that enters it) and the pre-output function y are
// stored as tables of monomials. Each monomial holds up to four operands; an operand is a state
// bit index, 0..127 for the NFSR bit b_i and 128+i for the LFSR bit s_i, or -1 when unused.
// Evaluating a monomial "at offset o" shifts every operand index by o, which gives the term for
// the round that lies o clocks of one bit ahead. The P-bit parallel datapaths evaluate lane k at
// offset k; the pre-computation stage evaluates it at offset P+k (or 2P+k in the masked core)
// because the state will have shifted by then.
//
// The split of g and y into a pre-computed first part and a late second part follows the
// document: for P <= 16 the fixed split of its stage-1 equations, and for P = 32 "all the terms
// with indexes exceeding 127 are left to the second part", which is a term whose largest index
// is above 128-2P. The phase encoding of the controller is this design's own choice.
package grain_pkg;

  localparam int NTERM_G = 16;
  localparam int NTERM_Y = 13;
  localparam int SOFF    = 128;  // operand code offset of LFSR bits

  // g plus s0: the right-hand side of b_127^{t+1} = s_0 + g(B)
  localparam int G_TERMS [NTERM_G][4] = '{
    '{SOFF+0, -1, -1, -1},  // s0
    '{0,  -1, -1, -1},      // b0
    '{26, -1, -1, -1},      // b26
    '{56, -1, -1, -1},      // b56
    '{91, -1, -1, -1},      // b91
    '{96, -1, -1, -1},      // b96
    '{3,  67, -1, -1},      // b3 b67
    '{11, 13, -1, -1},      // b11 b13
    '{17, 18, -1, -1},      // b17 b18
    '{27, 59, -1, -1},      // b27 b59
    '{40, 48, -1, -1},      // b40 b48
    '{61, 65, -1, -1},      // b61 b65
    '{68, 84, -1, -1},      // b68 b84
    '{22, 24, 25, -1},      // b22 b24 b25
    '{70, 78, 82, -1},      // b70 b78 b82
    '{88, 92, 93, 95}       // b88 b92 b93 b95
  };

  // pre-output function y
  localparam int Y_TERMS [NTERM_Y][4] = '{
    '{12, SOFF+8, -1, -1},        // b12 s8
    '{SOFF+13, SOFF+20, -1, -1},  // s13 s20
    '{95, SOFF+42, -1, -1},       // b95 s42
    '{SOFF+60, SOFF+79, -1, -1},  // s60 s79
    '{12, 95, SOFF+94, -1},       // b12 b95 s94
    '{SOFF+93, -1, -1, -1},       // s93
    '{2,  -1, -1, -1},            // b2
    '{15, -1, -1, -1},            // b15
    '{36, -1, -1, -1},            // b36
    '{45, -1, -1, -1},            // b45
    '{64, -1, -1, -1},            // b64
    '{73, -1, -1, -1},            // b73
    '{89, -1, -1, -1}             // b89
  };

  // Terms that the fixed (P <= 16) split puts in the pre-computed first part.
  localparam bit [NTERM_G-1:0] G_FIRST_LE16 = 16'b0000_0011_1111_1111;  // terms 0..9
  localparam bit [NTERM_Y-1:0] Y_FIRST_LE16 = 13'b1_1111_1111_1100;     // terms 2..12

  // Controller phases.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,  // waiting for a start
    PH_PRIME = 3'd1,  // pipeline fill cycles, FSRs hold
    PH_INIT  = 3'd2,  // rounds 0..319: y fed back into both FSRs
    PH_KEY   = 3'd3,  // rounds 320..383: y and key fed back
    PH_ACC   = 3'd4,  // rounds 384..447: y loaded into accumulator A
    PH_REG   = 3'd5,  // rounds 448..511: y loaded into shift register R
    PH_DATA  = 3'd6,  // keystream: one chunk of P/2 message bits (P = 1: one bit per two advances)
    PH_DONE  = 3'd7   // tag final
  } phase_e;

  // Segment types on bdi_type/bdo_type (codes of the LWC hardware API).
  typedef enum logic [3:0] {
    HDR_AD   = 4'b0001,
    HDR_PT   = 4'b0100,
    HDR_CT   = 4'b0101,
    HDR_TAG  = 4'b1000,
    HDR_NPUB = 4'b1101
  } hdr_e;

  // Byte order of the 32-bit API words: the first byte of a word is bdi_data[31:24]. Inside a
  // byte the bit stream runs from bit 0 upward, so stream bit 8j+i is bit i of byte j. This
  // maps a word to its 32 stream bits (bit n = stream bit n) and, being its own inverse, back.
  function automatic logic [31:0] word_bits(input logic [31:0] w);
    return {w[7:0], w[15:8], w[23:16], w[31:24]};
  endfunction

  function automatic int term_maxidx(input int op0, input int op1, input int op2, input int op3);
    int m = -1;
    int ops[4];
    ops = '{op0, op1, op2, op3};
    for (int k = 0; k < 4; k++)
      if (ops[k] >= 0) begin
        int idx = (ops[k] >= SOFF) ? ops[k] - SOFF : ops[k];
        if (idx > m) m = idx;
      end
    return m;
  endfunction

  // Is g term j in the first (pre-computed) part for parallel level p?
  function automatic bit g_first(input int p, input int j);
    if (p <= 16) return G_FIRST_LE16[j];
    return term_maxidx(G_TERMS[j][0], G_TERMS[j][1], G_TERMS[j][2], G_TERMS[j][3]) <= 128 - 2*p;
  endfunction

  function automatic bit y_first(input int p, input int j);
    if (p <= 16) return Y_FIRST_LE16[j];
    return term_maxidx(Y_TERMS[j][0], Y_TERMS[j][1], Y_TERMS[j][2], Y_TERMS[j][3]) <= 128 - 2*p;
  endfunction

  // One operand of a term at offset off.
  function automatic logic opnd(input logic [127:0] b, input logic [127:0] s, input int code,
                                input int off);
    if (code < 0) return 1'b1;
    if (code >= SOFF) return s[code - SOFF + off];
    return b[code + off];
  endfunction

  function automatic logic g_term(input logic [127:0] b, input logic [127:0] s, input int j,
                                  input int off);
    return opnd(b, s, G_TERMS[j][0], off) & opnd(b, s, G_TERMS[j][1], off) &
           opnd(b, s, G_TERMS[j][2], off) & opnd(b, s, G_TERMS[j][3], off);
  endfunction

  function automatic logic y_term(input logic [127:0] b, input logic [127:0] s, input int j,
                                  input int off);
    return opnd(b, s, Y_TERMS[j][0], off) & opnd(b, s, Y_TERMS[j][1], off) &
           opnd(b, s, Y_TERMS[j][2], off) & opnd(b, s, Y_TERMS[j][3], off);
  endfunction

  // LFSR feedback f at offset off.
  function automatic logic f_at(input logic [127:0] s, input int off);
    return s[off] ^ s[off+7] ^ s[off+38] ^ s[off+70] ^ s[off+81] ^ s[off+96];
  endfunction

  // Initial LFSR state: IV in s0..s95, ones in s96..s126, zero in s127.
  function automatic logic [127:0] lfsr_init(input logic [95:0] iv);
    return {1'b0, {31{1'b1}}, iv};
  endfunction

endpackage
