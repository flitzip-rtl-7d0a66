// fz_bit_strip: keeps only the low k bits of each of the n 8-bit differences
// of a flit and packs them, difference 1 in the least significant bits.
//
// With `enable` high, k = enc (1..6) and difference j (j = 1..n) lands in
// bits [(j-1)*k +: k] of `stripped`; the upper bits are zero and `len` is
// k*n. With `enable` low nothing is stripped: the n bytes are passed as the
// original flit and `len` is 8*n. Encoding 000 gives len 0 and an all-zero
// output (the flit is not sent). The packing order (difference 1 at bit 0) follows the worked
// example of the design; the n-byte flit layout of an uncompressed flit keeps
// chunk 1 in the most significant byte, as the flit is written in hex.
//
// Purely combinational: a mux per difference width.
module fz_bit_strip
  import flitzip_pkg::*;
#(
  parameter int unsigned CHUNKS = FLIT_W / CHUNK_W
) (
  input  logic [CHUNKS*CHUNK_W-1:0] di,        // difference j in byte CHUNKS-j
  input  logic [ENC_W-1:0]          enc,
  input  logic                      enable,
  output logic [CHUNKS*CHUNK_W-1:0] stripped,
  output logic [$clog2(CHUNKS*CHUNK_W+1)-1:0] len
);
  localparam int unsigned W = CHUNKS * CHUNK_W;

  // packed forms for every width 1..6
  logic [W-1:0] packed_k [1:MAX_DI_W];

  always_comb begin
    for (int k = 1; k <= MAX_DI_W; k++) begin
      packed_k[k] = '0;
      for (int j = 0; j < CHUNKS; j++)
        for (int b = 0; b < k; b++)
          packed_k[k][j*k + b] = di[(CHUNKS-1-j)*CHUNK_W + b];
    end
    if (!enable) begin
      stripped = (enc == ENC_SAME) ? '0 : di;
      len      = ($clog2(W+1))'(enc == ENC_SAME ? 0 : W);
    end else begin
      stripped = (enc >= 3'd1 && enc <= 3'(MAX_DI_W)) ? packed_k[enc] : '0;
      len      = ($clog2(W+1))'(int'(enc) * CHUNKS);
    end
  end
endmodule
