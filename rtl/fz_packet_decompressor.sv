// fz_packet_decompressor: FlitZip decompressor of a network interface. Takes
// the flits of one packet from the network side, head flit first, and hands
// the rebuilt packet (head-flit control fields plus NUM_BODY original body
// flits) to the processor side.
//
// How it works. From the head flit it reads, for every body flit i, the
// encoding and base at bits [FLIT_W-HDR_CTRL_W-1-META_W*(i-1) -: META_W], and
// from the encodings the size of each flit inside the compressed payload
// (0, k*n or 8*n bits) and so the payload offset where each flit starts (the
// flit boundaries). Arriving body flits are stored one after the other into
// a payload buffer. A single fz_flit_decompressor rebuilds one original
// flit per cycle: the lowest-numbered flit not yet rebuilt whose bits have
// all arrived. Flits with encoding 000 need no payload and are rebuilt while
// the body flits are still on their way. The flit that arrives at a clock edge is
// already visible to this test in the cycle it is offered, so when the last
// body flit completes only one original flit, the packet is ready one cycle
// after that flit is taken. A packet without a block is handed on right
// after its head flit with an all-zero block.
//
// Interface: valid/ready on both sides; one packet in flight. out_valid stays
// high with stable outputs until out_ready.
//
// Following the design: metadata positions, flit boundaries from the
// encodings, one decompressor circuit, decompression overlapped with arrival
// and one cycle for the last flit. Own choices: the handshakes and the
// number of body flits expected, ceil(payload bits / FLIT_W), which is the
// count the compressor sends.
module fz_packet_decompressor
  import flitzip_pkg::*;
#(
  parameter int unsigned NB = NUM_BODY
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // network side (from the inject queue)
  input  logic                      in_valid,
  output logic                      in_ready,
  input  flit_t                     in_flit,
  // processor side
  output logic                      out_valid,
  input  logic                      out_ready,
  output hdr_ctrl_t                 out_hdr,
  output logic [NB-1:0][FLIT_W-1:0] out_body   // [0] is body flit 1
);
  localparam int unsigned CHUNKS   = FLIT_W / CHUNK_W;
  localparam int unsigned META_TOP = FLIT_W - HDR_CTRL_W - 1;
  localparam int unsigned PAY_W    = NB * FLIT_W;
  localparam int unsigned OFF_W    = $clog2(PAY_W + 1);
  localparam int unsigned CNT_W    = $clog2(NB + 1);
  localparam int unsigned IDX_W    = (NB > 1) ? $clog2(NB) : 1;

  typedef enum logic [1:0] {S_HEAD, S_BODY, S_DONE} state_e;
  state_e state_q;

  hdr_ctrl_t                hdr_q;
  logic [ENC_W-1:0]         enc_q  [NB];
  logic [CHUNK_W-1:0]       base_q [NB];
  logic [OFF_W-1:0]         off_q  [NB];
  logic [OFF_W-1:0]         end_q  [NB];
  logic [CNT_W-1:0]         nbody_q, rx_q, st_q;
  logic [IDX_W-1:0]         pend_q;
  logic [NB-1:0]            issued_q;
  logic [PAY_W-1:0]         pay_q;
  logic [NB-1:0][FLIT_W-1:0] body_q;

  // ------------------------------------------------------ head-flit decode
  hdr_ctrl_t          hdr_d;
  logic [ENC_W-1:0]   enc_d  [NB];
  logic [CHUNK_W-1:0] base_d [NB];
  logic [OFF_W-1:0]   off_d  [NB];
  logic [OFF_W-1:0]   end_d  [NB];
  logic [CNT_W-1:0]   nbody_d;

  always_comb begin
    logic [OFF_W-1:0] acc;
    hdr_d = in_flit.data[FLIT_W-1 -: HDR_CTRL_W];
    acc   = '0;
    for (int i = 0; i < NB; i++) begin
      {enc_d[i], base_d[i]} = in_flit.data[META_TOP - i*META_W -: META_W];
      off_d[i] = acc;
      acc      = acc + OFF_W'(seg_len(enc_d[i], CHUNKS));
      // a flit that sends no bits (000) needs no payload at all
      end_d[i] = (enc_d[i] == ENC_SAME) ? '0 : acc;
    end
    nbody_d = carries_block(hdr_d.mt) ? CNT_W'((acc + OFF_W'(FLIT_W - 1)) / OFF_W'(FLIT_W)) : '0;
  end

  // --------------------------------------------------------------- receive
  logic head_take, body_take;
  assign in_ready  = (state_q == S_HEAD) || (state_q == S_BODY && rx_q < nbody_q);
  assign head_take = in_valid && in_ready && state_q == S_HEAD;
  assign body_take = in_valid && in_ready && state_q == S_BODY;

  // payload as it stands including a flit being taken this cycle
  logic [PAY_W-1:0] avail;
  logic [OFF_W-1:0] bits_avail;
  always_comb begin
    avail      = pay_q;
    bits_avail = OFF_W'(rx_q) * OFF_W'(FLIT_W);
    if (body_take) begin
      avail[int'(rx_q) * FLIT_W +: FLIT_W] = in_flit.data;
      bits_avail = bits_avail + OFF_W'(FLIT_W);
    end
  end

  // ------------------------------------------------------------ decompress
  logic              issue;
  logic [FLIT_W-1:0] seg;
  logic              dv;
  logic [FLIT_W-1:0] dflit;
  logic [ENC_W-1:0]  enc_i;
  logic [CHUNK_W-1:0] base_i;

  // pick the lowest-numbered flit not yet issued whose bits are all there
  logic [IDX_W-1:0] pick;
  always_comb begin
    issue = 1'b0;
    pick  = '0;
    if (state_q == S_BODY)
      for (int i = NB - 1; i >= 0; i--)
        if (!issued_q[i] && end_q[i] <= bits_avail) begin
          issue = 1'b1;
          pick  = IDX_W'(i);
        end
    enc_i  = enc_q[pick];
    base_i = base_q[pick];
    seg    = FLIT_W'(avail >> off_q[pick]);
  end

  fz_flit_decompressor #(.CHUNKS(CHUNKS)) u_dec (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (issue),
    .in_enc   (enc_i),
    .in_base  (base_i),
    .in_seg   (seg),
    .out_valid(dv),
    .out_flit (dflit)
  );

  // ------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_HEAD;
      hdr_q   <= '0;
      nbody_q <= '0;
      rx_q    <= '0;
      issued_q <= '0;
      st_q    <= '0;
      pend_q  <= '0;
      pay_q   <= '0;
      body_q  <= '0;
      for (int i = 0; i < NB; i++) begin
        enc_q[i]  <= '0;
        base_q[i] <= '0;
        off_q[i]  <= '0;
        end_q[i]  <= '0;
      end
    end else begin
      unique case (state_q)
        S_HEAD: if (head_take) begin
          hdr_q   <= hdr_d;
          nbody_q <= nbody_d;
          rx_q    <= '0;
          issued_q <= '0;
          st_q    <= '0;
          pay_q   <= '0;
          body_q  <= '0;
          for (int i = 0; i < NB; i++) begin
            enc_q[i]  <= enc_d[i];
            base_q[i] <= base_d[i];
            off_q[i]  <= off_d[i];
            end_q[i]  <= end_d[i];
          end
          state_q <= carries_block(hdr_d.mt) ? S_BODY : S_DONE;
        end
        S_BODY: begin
          if (body_take) begin
            pay_q <= avail;
            rx_q  <= rx_q + 1'b1;
          end
          if (issue) begin
            pend_q         <= pick;
            issued_q[pick] <= 1'b1;
          end
          if (dv) begin
            body_q[pend_q] <= dflit;
            st_q <= st_q + 1'b1;
            if (st_q == CNT_W'(NB - 1)) state_q <= S_DONE;
          end
        end
        S_DONE: if (out_ready) state_q <= S_HEAD;
        default: state_q <= S_HEAD;
      endcase
    end
  end

  assign out_valid = state_q == S_DONE;
  assign out_hdr   = hdr_q;
  assign out_body  = body_q;

  // a tail flit is the last one the head announced
  assert property (@(posedge clk) disable iff (!rst_n)
                   body_take && in_flit.ft == FT_TAIL |-> rx_q + 1'b1 == nbody_q);
  assert property (@(posedge clk) disable iff (!rst_n)
                   head_take |-> in_flit.ft inside {FT_HEAD, FT_HEADTAIL});
endmodule
