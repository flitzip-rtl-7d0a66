// fz_flit_compressor: FlitZip compression of one flit, as a two-step pipeline.
//
// Step 1 (registered at the clock edge after in_valid): the flit is cut into
// CHUNKS 1-byte chunks C1..Cn (C1 is the most significant byte); the smallest
// and the largest chunk are found, the base is their average
// floor((C_small + C_large)/2), and fz_range_encoder gives the 3-bit
// encoding. Step 2 (combinational, from the step-1 register): n 1-byte
// subtractors form di_j = Base - C_j; for an uncompressed flit (111) the
// multiplexer feeds zero in place of the base so that the chunks come out
// unchanged; fz_bit_strip then keeps k bits of each difference. For encoding
// 000 the base alone describes the flit and nothing is sent.
//
// Interface: `advance` moves the pipeline (the owner stalls it by holding
// advance low); out_* are valid one cycle after in_valid was taken. Outputs:
// the encoding, the base, the stripped payload (difference 1 at bit 0) and
// its length in bits (0, k*n or 8*n), and the original flit itself.
//
// Following the design: chunking, min/max, the average base, di = Base - C,
// the base-or-zero multiplexer, the 6-bit limit, bit-stripping. Own choices:
// the register placement (the design gives two cycles for the whole
// compressor; here step 1 is one of them, the packet assembly the other) and
// that the base of an uncompressed flit is still the computed average (the
// design leaves it undefined).
module fz_flit_compressor
  import flitzip_pkg::*;
#(
  parameter int unsigned CHUNKS = FLIT_W / CHUNK_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      advance,
  input  logic                      in_valid,
  input  logic [CHUNKS*CHUNK_W-1:0] in_flit,
  output logic                      out_valid,
  output enc_e                      out_enc,
  output logic [CHUNK_W-1:0]        out_base,
  output logic [CHUNKS*CHUNK_W-1:0] out_seg,
  output logic [$clog2(CHUNKS*CHUNK_W+1)-1:0] out_len,
  output logic [CHUNKS*CHUNK_W-1:0] out_flit    // the original flit, kept
);
  localparam int unsigned W = CHUNKS * CHUNK_W;

  // ---------------------------------------------------------------- step 1
  logic [CHUNK_W-1:0] c_small, c_large, base_d;
  logic [CHUNK_W:0]   sum;
  enc_e               enc_d;
  logic               compress_d;

  always_comb begin
    c_small = in_flit[W-1 -: CHUNK_W];
    c_large = in_flit[W-1 -: CHUNK_W];
    for (int j = 1; j < CHUNKS; j++) begin
      if (in_flit[(CHUNKS-1-j)*CHUNK_W +: CHUNK_W] < c_small) c_small = in_flit[(CHUNKS-1-j)*CHUNK_W +: CHUNK_W];
      if (in_flit[(CHUNKS-1-j)*CHUNK_W +: CHUNK_W] > c_large) c_large = in_flit[(CHUNKS-1-j)*CHUNK_W +: CHUNK_W];
    end
    sum    = {1'b0, c_small} + {1'b0, c_large};
    base_d = CHUNK_W'(sum >> 1);
  end

  fz_range_encoder u_enc (
    .c_small (c_small),
    .c_large (c_large),
    .enc     (enc_d),
    .compress(compress_d)
  );

  logic [W-1:0]       chunks_q;
  logic [CHUNK_W-1:0] base_q;
  enc_e               enc_q;
  logic               compress_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      chunks_q   <= '0;
      base_q     <= '0;
      enc_q      <= ENC_SAME;
      compress_q <= 1'b0;
    end else if (advance) begin
      out_valid <= in_valid;
      if (in_valid) begin
        chunks_q   <= in_flit;
        base_q     <= base_d;
        enc_q      <= enc_d;
        compress_q <= compress_d;
      end
    end
  end

  // ---------------------------------------------------------------- step 2
  logic [CHUNK_W-1:0] mux_base;   // base, or zero for an uncompressed flit
  logic [W-1:0]       di;

  always_comb begin
    mux_base = compress_q ? base_q : '0;
    for (int j = 0; j < CHUNKS; j++) begin
      // SB_j: one 1-byte subtractor. Compressible: Base - C_j. Otherwise the
      // zero from the multiplexer leaves the chunk as it is (C_j - 0).
      if (compress_q) di[j*CHUNK_W +: CHUNK_W] = mux_base - chunks_q[j*CHUNK_W +: CHUNK_W];
      else            di[j*CHUNK_W +: CHUNK_W] = chunks_q[j*CHUNK_W +: CHUNK_W] - mux_base;
    end
  end

  fz_bit_strip #(.CHUNKS(CHUNKS)) u_strip (
    .di      (di),
    .enc     (enc_q),
    .enable  (compress_q),
    .stripped(out_seg),
    .len     (out_len)
  );

  assign out_enc  = enc_q;
  assign out_flit = chunks_q;
  assign out_base = base_q;
endmodule
