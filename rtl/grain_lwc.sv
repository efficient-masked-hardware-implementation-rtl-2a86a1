// grain_lwc: Grain-128AEADv2 authenticated encryption behind a 32-bit interface in the style of
// the LWC hardware API, wrapping either the unmasked core (MASKED = 0, grain_core) or the
// first-order masked core (MASKED = 1, masked_core), P pre-output bits per clock.
//
// Ports follow the API: key/key_valid/key_ready/key_update load the key, bdi_* carries the public
// message number (NPUB, 3 words), associated data (AD) and plaintext (PT) as 32-bit words whose
// first byte is in bits 31:24, bdi_size (0..4) gives the number of valid bytes and
// bdi_valid_bytes marks them (bit 3 = bits 31:24); bdo_* returns ciphertext (CT) words and then
// the 64-bit tag as two TAG words. rdi_* supplies fresh randomness to the masked core; the
// unmasked wrapper leaves it unused. bdi_eoi (end of input), bdo_valid_bytes, bdo_type and
// bdo_last are this design's additions.
//
// Operation: with key_update high, four key words are taken and stored in the core (for the
// masked core each word is split into two shares with 32 rdi bits, which is why rdi is at
// least 32 bits wide even at P = 1, where the core itself takes 20). Three NPUB words then
// start the core's initialisation. AD and PT bytes are appended to a 64-bit bit buffer (stream
// bit 8j+i is bit i of byte j, the same mapping as for key and IV); whenever it holds W bits
// (P/2, or 1 at P = 1), a chunk goes to the core, so AD and PT may end on any byte. After the word flagged bdi_eoi the
// remaining bits plus the padding bit 1 form the final chunk. The ciphertext bits of each chunk
// (its PT bits) are collected in a 64-bit output buffer and sent as CT words; the tag follows
// once every CT word has left. Initialisation overlaps the loading of data into the buffer.
//
// The host must supply AD already carrying whatever length encoding the Grain-128AEADv2
// specification prescribes; the wrapper authenticates AD bytes as they come. Only encryption is
// implemented. This framing is this design's own; the document gives only the port list.
module grain_lwc #(
  parameter int P      = 32,
  parameter bit MASKED = 1'b0,
  parameter int W      = (P + 1) / 2,
  parameter int RW     = MASKED ? ((20 * P > 32) ? 20 * P : 32) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [31:0]   key,
  input  logic          key_valid,
  output logic          key_ready,
  input  logic          key_update,
  input  logic [31:0]   bdi_data,
  input  logic          bdi_valid,
  output logic          bdi_ready,
  input  logic [3:0]    bdi_type,
  input  logic [3:0]    bdi_valid_bytes,
  input  logic [2:0]    bdi_size,
  input  logic          bdi_eoi,
  output logic [31:0]   bdo_data,
  output logic          bdo_valid,
  input  logic          bdo_ready,
  output logic [3:0]    bdo_valid_bytes,
  output logic [3:0]    bdo_type,
  output logic          bdo_last,
  input  logic [RW-1:0] rdi_data,
  input  logic          rdi_valid,
  output logic          rdi_ready
);
  import grain_pkg::*;

  localparam int BW = 64;  // input bit buffer
  localparam int OW = 64;  // output bit buffer

  typedef enum logic [1:0] {S_IDLE, S_DATA, S_TAG} state_e;

  state_e        st;
  logic [1:0]    kcnt, ncnt;
  logic [127:0]  kb0, kb1;        // key words (shares for the masked core)
  logic [95:0]   ivb;
  logic          key_load, start;
  logic          in_end, fin_sent, tag_word;
  logic [BW-1:0] pb, pe;
  logic [6:0]    pc;
  logic [OW-1:0] ob;
  logic [6:0]    oc;

  // core interface
  logic          c_valid, c_ready, c_last, c_busy, c_tag_valid, c_rnd_ready;
  logic [W-1:0]  c_data, c_auth, c_enc, c_ct;
  logic [63:0]   c_tag;

  logic          key_fire, npub_fire, data_fire, c_fire, bdo_fire;
  logic [31:0]   wbits, kshare;
  logic [5:0]    nbits;

  assign wbits  = word_bits(bdi_data);
  assign nbits  = {bdi_size, 3'b000};
  assign kshare = MASKED ? 32'(rdi_data) : 32'd0;

  // ---------------- input side ----------------
  assign key_ready = (st == S_IDLE) && key_update && (!MASKED || rdi_valid);
  assign key_fire  = key_valid && key_ready;

  always_comb begin
    bdi_ready = 1'b0;
    if (st == S_IDLE)
      bdi_ready = !key_valid && (bdi_type == HDR_NPUB);
    else if (st == S_DATA)
      bdi_ready = !in_end && (pc <= 7'(BW - 32)) && (bdi_type == HDR_AD || bdi_type == HDR_PT);
  end
  assign npub_fire = bdi_valid && bdi_ready && (st == S_IDLE);
  assign data_fire = bdi_valid && bdi_ready && (st == S_DATA);

  // chunk to the core
  always_comb begin
    logic [W-1:0] low;
    c_last = in_end && !fin_sent && (32'(pc) < W);
    c_valid = (st == S_DATA) && (oc <= 7'(OW - W)) && !fin_sent && ((32'(pc) >= W) || c_last);
    low = W'((W'(1) << pc[5:0]) - W'(1));
    if (c_last) begin
      c_data = (pb[W-1:0] & low) | (W'(1) << pc[5:0]);
      c_auth = low | (W'(1) << pc[5:0]);
      c_enc  = pe[W-1:0] & low;
    end else begin
      c_data = pb[W-1:0];
      c_auth = '1;
      c_enc  = pe[W-1:0];
    end
  end
  assign c_fire = c_valid && c_ready;

  // ---------------- output side ----------------
  always_comb begin
    bdo_valid       = 1'b0;
    bdo_data        = '0;
    bdo_valid_bytes = 4'b0000;
    bdo_type        = HDR_CT;
    bdo_last        = 1'b0;
    if (st == S_DATA || st == S_TAG) begin
      if (oc >= 7'd32 || (fin_sent && oc != 7'd0)) begin
        bdo_valid = 1'b1;
        bdo_data  = word_bits(ob[31:0]);
        unique case (oc >= 7'd32 ? 3'd4 : oc[5:3])
          3'd1:    bdo_valid_bytes = 4'b1000;
          3'd2:    bdo_valid_bytes = 4'b1100;
          3'd3:    bdo_valid_bytes = 4'b1110;
          default: bdo_valid_bytes = 4'b1111;
        endcase
      end else if (st == S_TAG && c_tag_valid) begin
        bdo_valid       = 1'b1;
        bdo_data        = word_bits(tag_word ? c_tag[63:32] : c_tag[31:0]);
        bdo_valid_bytes = 4'b1111;
        bdo_type        = HDR_TAG;
        bdo_last        = tag_word;
      end
    end
  end
  assign bdo_fire = bdo_valid && bdo_ready;

  // ---------------- buffers ----------------
  always_ff @(posedge clk) begin
    logic [BW-1:0] nb, ne;
    logic [6:0]    ncn;
    logic [OW-1:0] nob;
    logic [6:0]    noc;
    int            run0, runn;
    // input bit buffer: pop a chunk, then append a word
    nb  = c_fire ? (pb >> W) : pb;
    ne  = c_fire ? (pe >> W) : pe;
    ncn = c_fire ? ((32'(pc) >= W) ? pc - 7'(W) : 7'd0) : pc;
    if (data_fire) begin
      nb  |= (BW'(wbits) & ((BW'(1) << nbits) - BW'(1))) << ncn;
      if (bdi_type == HDR_PT) ne |= ((BW'(1) << nbits) - BW'(1)) << ncn;
      ncn += 7'(nbits);
    end
    if (st == S_IDLE) begin
      nb = '0; ne = '0; ncn = '0;
    end
    pb <= nb;
    pe <= ne;
    pc <= ncn;
    // output bit buffer: send a word, then append the chunk's PT bits (one contiguous run)
    nob = ob;
    noc = oc;
    if (bdo_fire && bdo_type == HDR_CT) begin
      if (oc >= 7'd32) begin nob = ob >> 32; noc = oc - 7'd32; end
      else             begin nob = '0;       noc = '0;         end
    end
    if (c_fire) begin
      run0 = W;
      runn = 0;
      for (int k = W - 1; k >= 0; k--) if (c_enc[k]) run0 = k;
      for (int k = 0; k < W; k++) runn += int'(c_enc[k]);
      nob |= OW'(W'(c_ct >> run0) & W'((W'(1) << runn) - W'(1))) << noc;
      noc += 7'(runn);
    end
    if (st == S_IDLE) begin
      nob = '0; noc = '0;
    end
    ob <= nob;
    oc <= noc;
  end

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      kcnt     <= '0;
      ncnt     <= '0;
      key_load <= 1'b0;
      start    <= 1'b0;
      in_end   <= 1'b0;
      fin_sent <= 1'b0;
      tag_word <= 1'b0;
    end else begin
      key_load <= key_fire && kcnt == 2'd3;
      start    <= npub_fire && ncnt == 2'd2;
      if (key_fire) kcnt <= kcnt + 2'd1;
      unique case (st)
        S_IDLE: begin
          in_end   <= 1'b0;
          fin_sent <= 1'b0;
          tag_word <= 1'b0;
          if (npub_fire) begin
            ncnt <= (ncnt == 2'd2) ? 2'd0 : ncnt + 2'd1;
            if (ncnt == 2'd2) begin
              st     <= S_DATA;
              in_end <= bdi_eoi;
            end
          end
        end
        S_DATA: begin
          if (data_fire && bdi_eoi) in_end <= 1'b1;
          if (c_fire && c_last) begin
            fin_sent <= 1'b1;
            st       <= S_TAG;
          end
        end
        S_TAG: begin
          if (bdo_fire && bdo_type == HDR_TAG) begin
            tag_word <= 1'b1;
            if (tag_word) st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (key_fire) begin
      kb0 <= {word_bits(key) ^ kshare, kb0[127:32]};
      kb1 <= {kshare, kb1[127:32]};
    end
    if (npub_fire) ivb <= {wbits, ivb[95:32]};
  end

  // ---------------- core ----------------
  if (MASKED) begin : g_masked
    masked_core #(.P(P), .W(W)) u_core (
      .clk, .rst_n, .key_load, .key0(kb0), .key1(kb1), .start, .iv(ivb),
      .rnd(rdi_data[20*P-1:0]), .rnd_valid(rdi_valid && !key_fire), .rnd_ready(c_rnd_ready),
      .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data), .in_auth(c_auth),
      .in_last(c_last), .ct(c_ct), .init_busy(c_busy), .tag_valid(c_tag_valid), .tag(c_tag)
    );
    assign rdi_ready = key_fire || c_rnd_ready;
  end else begin : g_plain
    grain_core #(.P(P), .W(W)) u_core (
      .clk, .rst_n, .key_load, .key(kb0), .start, .iv(ivb),
      .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data), .in_auth(c_auth),
      .in_last(c_last), .ct(c_ct), .init_busy(c_busy), .tag_valid(c_tag_valid), .tag(c_tag)
    );
    assign c_rnd_ready = 1'b0;
    assign rdi_ready   = 1'b0;
  end

  // bdi_valid_bytes must agree with bdi_size for AD and PT words
  assert property (@(posedge clk) disable iff (!rst_n)
    data_fire |-> bdi_valid_bytes == 4'((4'hF << (3'd4 - bdi_size)) & 4'hF) && bdi_size <= 3'd4);
  // a stalled output word must stay stable
  assert property (@(posedge clk) disable iff (!rst_n)
    (bdo_valid && !bdo_ready) |=> bdo_valid && $stable(bdo_data));
endmodule
