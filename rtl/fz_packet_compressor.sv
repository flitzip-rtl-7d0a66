// fz_packet_compressor: FlitZip compressor of a network interface. Takes one
// packet from the processor side (head-flit control fields plus, for a reply,
// the NUM_BODY body flits of the cache block) and emits the possibly
// compressed packet as a stream of flits towards the network.
//
// How it works. NUM_BODY fz_flit_compressor instances work on the body flits
// in parallel (step 1). In step 2 the stripped segments are laid end to end,
// body flit 1 starting at bit 0 of the compressed payload, each at the offset
// given by the sizes of the flits before it (0 bits for encoding 000, k*n for
// 001..110, 8*n for 111). The (encoding, base) pair of body flit i goes to
// head-flit bits [FLIT_W-HDR_CTRL_W-1-META_W*(i-1) -: META_W], encoding on
// top; for the default 128-bit flit these are [74:64], [63:53], [52:42],
// [41:31]. The payload is cut into ceil(bits/FLIT_W) body flits. If that is
// not fewer than NUM_BODY the packet is sent as it was, every encoding set to
// 111, which the receiver decodes exactly like any other packet. A packet
// without a block (request, coherence) is passed through as one head-tail
// flit.
//
// Timing: a packet taken at a clock edge (in_valid && in_ready) puts its head
// flit on the output two edges later; then one flit per cycle while
// out_ready is high. in_ready is low while the previous packet is still
// being sent. The head flit carries ft = FT_HEAD, or FT_HEADTAIL when no body
// flit follows; the last body flit carries FT_TAIL.
//
// Following the design: parallel per-flit compression, metadata in the head
// flit, the bit positions above, packing order, the flit-saving test and the
// two-cycle compression. Own choices: the valid/ready handshakes, the
// whole-block input, the all-111 fallback and the status outputs.
module fz_packet_compressor
  import flitzip_pkg::*;
#(
  parameter int unsigned NB = NUM_BODY
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // processor side
  input  logic                          in_valid,
  output logic                          in_ready,
  input  hdr_ctrl_t                     in_hdr,
  input  logic [NB-1:0][FLIT_W-1:0]     in_body,   // [0] is body flit 1
  // network side
  output logic                          out_valid,
  input  logic                          out_ready,
  output flit_t                         out_flit,
  // one-cycle pulse per packet entering step 2
  output logic                          stat_valid,
  output logic                          stat_compressed,
  output logic [$clog2(NB+1)-1:0]       stat_body_flits,
  output logic [NB-1:0][ENC_W-1:0]      stat_enc
);
  localparam int unsigned CHUNKS   = FLIT_W / CHUNK_W;
  localparam int unsigned META_TOP = FLIT_W - HDR_CTRL_W - 1;
  localparam int unsigned PAY_W    = NB * FLIT_W;
  localparam int unsigned LEN_W    = $clog2(FLIT_W + 1);
  localparam int unsigned OFF_W    = $clog2(PAY_W + 1);
  localparam int unsigned CNT_W    = $clog2(NB + 1);

  initial assert (NB * META_W <= META_TOP + 1)
    else $error("metadata of %0d body flits does not fit in the head flit", NB);

  // ----------------------------------------------------------- flow control
  logic a_valid, b_valid, b_load, advance_a, last_beat;
  logic [CNT_W-1:0] beat_q, nbody_q;

  assign last_beat = out_valid && out_ready && (beat_q == nbody_q);
  assign b_load    = a_valid && (!b_valid || last_beat);
  assign advance_a = !a_valid || b_load;
  assign in_ready  = advance_a;

  // ----------------------------------------------------------------- step 1
  enc_e                        enc_a  [NB];
  logic [CHUNK_W-1:0]          base_a [NB];
  logic [FLIT_W-1:0]           seg_a  [NB];
  logic [FLIT_W-1:0]           orig_a [NB];
  logic [LEN_W-1:0]            len_a  [NB];
  logic [NB-1:0]               fv;

  for (genvar i = 0; i < NB; i++) begin : g_fc
    fz_flit_compressor #(.CHUNKS(CHUNKS)) u_fc (
      .clk      (clk),
      .rst_n    (rst_n),
      .advance  (advance_a),
      .in_valid (in_valid),
      .in_flit  (in_body[i]),
      .out_valid(fv[i]),
      .out_enc  (enc_a[i]),
      .out_base (base_a[i]),
      .out_seg  (seg_a[i]),
      .out_len  (len_a[i]),
      .out_flit (orig_a[i])
    );
  end

  hdr_ctrl_t hdr_a;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0;
      hdr_a   <= '0;
    end else if (advance_a) begin
      a_valid <= in_valid;
      if (in_valid) hdr_a <= in_hdr;
    end
  end

  // ----------------------------------------------------------------- step 2
  logic [PAY_W-1:0]       pay_c, pay_raw;
  logic [OFF_W-1:0]       off;
  logic [CNT_W-1:0]       nbody_c;
  logic                   use_c;
  logic [FLIT_W-1:0]      head_c;
  hdr_ctrl_t              hdr_c;
  logic [NB-1:0][ENC_W-1:0] enc_sel;

  always_comb begin
    pay_c   = '0;
    pay_raw = '0;
    off     = '0;
    for (int i = 0; i < NB; i++) begin
      pay_c   = pay_c | ({{(PAY_W-FLIT_W){1'b0}}, seg_a[i]} << off);
      off     = off + OFF_W'(len_a[i]);
      pay_raw[i*FLIT_W +: FLIT_W] = orig_a[i];
    end
    nbody_c = CNT_W'((off + OFF_W'(FLIT_W - 1)) / OFF_W'(FLIT_W));
    use_c   = nbody_c < CNT_W'(NB);
    for (int i = 0; i < NB; i++)
      enc_sel[i] = use_c ? ENC_W'(enc_a[i]) : ENC_W'(ENC_RAW);

    if (!carries_block(hdr_a.mt)) nbody_c = '0;
    else if (!use_c)              nbody_c = CNT_W'(NB);
    hdr_c    = hdr_a;
    hdr_c.ft = (nbody_c == '0) ? FT_HEADTAIL : FT_HEAD;
    head_c   = '0;
    head_c[FLIT_W-1 -: HDR_CTRL_W] = hdr_c;
    if (carries_block(hdr_a.mt))
      for (int i = 0; i < NB; i++)
        head_c[META_TOP - i*META_W -: META_W] = {enc_sel[i], base_a[i]};
  end

  logic [FLIT_W-1:0] head_q;
  logic [PAY_W-1:0]  pay_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0;
      beat_q  <= '0;
      nbody_q <= '0;
      head_q  <= '0;
      pay_q   <= '0;
    end else begin
      if (b_load) begin
        b_valid <= 1'b1;
        beat_q  <= '0;
        nbody_q <= nbody_c;
        head_q  <= head_c;
        pay_q   <= use_c ? pay_c : pay_raw;
      end else if (last_beat) begin
        b_valid <= 1'b0;
      end else if (out_valid && out_ready) begin
        beat_q  <= beat_q + 1'b1;
      end
    end
  end

  always_comb begin
    out_valid = b_valid;
    if (beat_q == '0) begin
      out_flit.ft   = (nbody_q == '0) ? FT_HEADTAIL : FT_HEAD;
      out_flit.data = head_q;
    end else begin
      out_flit.ft   = (beat_q == nbody_q) ? FT_TAIL : FT_BODY;
      out_flit.data = pay_q[(int'(beat_q) - 1) * FLIT_W +: FLIT_W];
    end
  end

  assign stat_valid      = b_load;
  assign stat_compressed = b_load && carries_block(hdr_a.mt) && use_c;
  assign stat_body_flits = nbody_c;
  assign stat_enc        = enc_sel;

  // fv mirrors a_valid: all flit compressors move in lockstep
  assert property (@(posedge clk) disable iff (!rst_n) fv == {NB{a_valid}});
  // the output holds its flit while it waits for the network
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> out_valid && $stable(out_flit));
endmodule
