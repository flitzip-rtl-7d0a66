// fz_range_encoder: turns the smallest and largest chunk of a flit into the
// flit's 3-bit FlitZip encoding.
//
// A 1-byte subtractor forms the range r = c_large - c_small. A zero range
// means every chunk is equal: encoding 000, the flit is not sent at all.
// Otherwise an 8:3 priority encoder finds the index p of the highest set bit
// of r; the differences from the mid-range base then need p+1 magnitude bits
// plus a sign bit, k = p + 2 bits. If k is at most 6 the flit is
// compressible and the encoding is k itself (010..110); otherwise it is 111,
// uncompressed. The selection line `compress` (high for 001..110) drives the
// base/zero multiplexer and the bit-strip enable of the compressor.
//
// Following the design: the subtractor, the all-zero test, the 8:3 priority
// encoder, the 6-bit limit and the encoding values. Own choice: the width is
// taken from the range (so a flit with range 3 needs 3 bits, as in the
// worked example of the design), which is a safe bound for the differences
// from base = floor((c_small + c_large)/2). As a consequence encoding 001 is
// never produced here; the decompressor still accepts it.
//
// Purely combinational.
module fz_range_encoder
  import flitzip_pkg::*;
(
  input  logic [CHUNK_W-1:0] c_small,
  input  logic [CHUNK_W-1:0] c_large,
  output enc_e               enc,
  output logic               compress   // encoding in 001..110
);
  logic [CHUNK_W-1:0] range_q;
  logic [2:0]         msb;
  logic [3:0]         width;

  always_comb begin
    range_q = c_large - c_small;
    // 8:3 priority encoder: index of the most significant one
    msb = '0;
    for (int b = 0; b < CHUNK_W; b++)
      if (range_q[b]) msb = 3'(b);
    width = {1'b0, msb} + 4'd2;
    if (range_q == '0)               enc = ENC_SAME;
    else if (width <= 4'(MAX_DI_W))  enc = enc_e'(width[2:0]);
    else                             enc = ENC_RAW;
    compress = (enc != ENC_SAME) && (enc != ENC_RAW);
  end
endmodule
