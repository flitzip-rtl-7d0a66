// flitzip_pkg: types, sizes and helper functions shared by the FlitZip
// network-interface compressor and decompressor.
//
// FlitZip compresses a cache-block reply packet one flit at a time. Each
// 128-bit body flit is cut into sixteen 1-byte chunks; the flit is then
// described by an 8-bit base and a 3-bit encoding, and (when compressible)
// by sixteen small signed differences. The 11-bit (encoding, base) pair of
// every body flit travels in the unused low part of the head flit.
//
// Sizes that follow the design description: 128-bit flits (link width),
// 1-byte chunks and base, 3-bit encodings, four body flits per 64-byte
// packet, metadata of flit i at head bits [74-11*(i-1) -: 11] with the
// encoding in the top three bits of each 11-bit field.
//
// Own choices of this implementation: the flit-type codes (a head-tail code
// for single-flit packets), the message-type codes, the exact bit positions
// of the head-flit control fields (packed contiguously from bit 127 down to
// bit 75 using the field widths of the head-flit format), and that only
// reply packets (MT_REP) carry a cache block.
package flitzip_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned FLIT_W      = 128;            // link width = flit size
  localparam int unsigned CHUNK_W     = 8;              // base and chunk size
  localparam int unsigned ENC_W       = 3;              // encoding bits per flit
  localparam int unsigned META_W      = ENC_W + CHUNK_W; // 11 bits per body flit
  localparam int unsigned NUM_BODY    = 4;              // body flits of a 64B block
  localparam int unsigned HDR_CTRL_W  = 53;             // ID..MEM-ADDR fields
  localparam int unsigned MAX_DI_W    = 6;              // widest compressed difference

  // ------------------------------------------------------------- encodings
  // Table of encodings: 000 all chunks equal (flit not sent), 001..110 the
  // width in bits of each two's-complement difference, 111 uncompressed.
  typedef enum logic [ENC_W-1:0] {
    ENC_SAME   = 3'b000,
    ENC_DI1    = 3'b001,
    ENC_DI2    = 3'b010,
    ENC_DI3    = 3'b011,
    ENC_DI4    = 3'b100,
    ENC_DI5    = 3'b101,
    ENC_DI6    = 3'b110,
    ENC_RAW    = 3'b111
  } enc_e;

  // ------------------------------------------------------- head-flit format
  typedef enum logic [1:0] {
    FT_HEAD     = 2'b00,
    FT_BODY     = 2'b01,
    FT_TAIL     = 2'b10,
    FT_HEADTAIL = 2'b11
  } ft_e;

  typedef enum logic [2:0] {
    MT_REQ     = 3'd0,   // cache-miss request, head flit only
    MT_REP     = 3'd1,   // reply carrying one cache block
    MT_COH     = 3'd2,   // coherence message, head flit only
    MT_COH_ACK = 3'd3
  } mt_e;

  // Control fields of a head flit, most significant first: bits 127..75.
  typedef struct packed {
    logic [1:0]  id;
    ft_e         ft;
    logic [1:0]  vc;
    logic [5:0]  src;
    logic [5:0]  dest;
    mt_e         mt;
    logic [31:0] mem_addr;
  } hdr_ctrl_t;

  // One flit on a link, with the flit type repeated as sideband so that body
  // and tail flits, which are all data, can be told apart.
  typedef struct packed {
    ft_e               ft;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // True for packets that carry a cache block and are therefore compressed.
  function automatic logic carries_block(mt_e mt);
    return mt == MT_REP;
  endfunction

  // Size in bits of one body flit inside the compressed payload.
  function automatic int unsigned seg_len(logic [ENC_W-1:0] enc, int unsigned chunks);
    if (enc == ENC_SAME) return 0;
    if (enc == ENC_RAW)  return chunks * CHUNK_W;
    return int'(enc) * chunks;
  endfunction

endpackage
