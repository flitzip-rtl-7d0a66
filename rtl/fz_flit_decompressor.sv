// fz_flit_decompressor: rebuilds one original flit from its FlitZip
// encoding, base and compressed segment, in one clock cycle.
//
// The segment holds, from bit 0, the n differences of the flit, k bits each,
// where k is the encoding 001..110. Each difference is sign-extended to one
// byte and n 1-byte subtractors give C_j = Base - di_j (C1 is the most
// significant byte of the flit). For encoding 111 the multiplexer feeds zero
// instead of the base and the subtractors pass the segment through as the
// uncompressed flit. For encoding 000 the base is copied into all n chunks.
//
// Interface and timing: inputs are sampled when in_valid is high and the
// flit appears on out_flit with out_valid one cycle later. No back-pressure:
// the owner only presents a flit when it can take the result.
//
// Following the design: sign extension, the base-or-zero multiplexer, the
// n subtractors, base replication for 000. Own choice: the output register
// that gives the one-cycle decompression.
module fz_flit_decompressor
  import flitzip_pkg::*;
#(
  parameter int unsigned CHUNKS = FLIT_W / CHUNK_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [ENC_W-1:0]          in_enc,
  input  logic [CHUNK_W-1:0]        in_base,
  input  logic [CHUNKS*CHUNK_W-1:0] in_seg,
  output logic                      out_valid,
  output logic [CHUNKS*CHUNK_W-1:0] out_flit
);
  localparam int unsigned W = CHUNKS * CHUNK_W;

  logic [W-1:0]       di_sx;      // sign-extended differences, di_1 in the top byte
  logic [CHUNK_W-1:0] mux_base;
  logic [W-1:0]       flit_d;
  logic               compressed;

  always_comb begin
    compressed = (in_enc != ENC_SAME) && (in_enc != ENC_RAW);
    di_sx = in_seg;
    if (compressed) begin
      for (int j = 0; j < CHUNKS; j++)
        for (int b = 0; b < CHUNK_W; b++)
          // bit b of di_(j+1); bits at and above k repeat the sign bit k-1
          di_sx[(CHUNKS-1-j)*CHUNK_W + b] =
            in_seg[j*int'(in_enc) + ((b < int'(in_enc)) ? b : int'(in_enc) - 1)];
    end
    mux_base = compressed ? in_base : '0;
    for (int j = 0; j < CHUNKS; j++) begin
      if (compressed) flit_d[j*CHUNK_W +: CHUNK_W] = mux_base - di_sx[j*CHUNK_W +: CHUNK_W];
      else            flit_d[j*CHUNK_W +: CHUNK_W] = di_sx[j*CHUNK_W +: CHUNK_W] - mux_base;
    end
    if (in_enc == ENC_SAME) flit_d = {CHUNKS{in_base}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_flit  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_flit <= flit_d;
    end
  end
endmodule
