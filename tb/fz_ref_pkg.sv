// fz_ref_pkg: reference model of FlitZip compression for the testbenches,
// written with plain integer arithmetic and independent of the RTL.
//
// ref_flit: encoding and base of one flit of `chunks` bytes and its segment
// (the differences Base - C_j as k-bit two's-complement fields, difference 1
// at bit 0, or the flit itself when uncompressed). ref_packet: the head flit
// and the body flits a compressor must send for a packet. ref_decode: the
// inverse, from a flit list back to the block. Random flit generators with a
// chosen kind of content are included.
package fz_ref_pkg;
  import flitzip_pkg::*;

  typedef logic [FLIT_W-1:0] flit_w_t;

  // number of bits of the non-negative value v (0 for 0)
  function automatic int bitlen(int v);
    int n = 0;
    while (v > 0) begin n++; v = v / 2; end
    return n;
  endfunction

  function automatic int chunk_of(flit_w_t f, int j, int chunks); // j = 0 is C1
    return int'(f[(chunks-1-j)*8 +: 8]);
  endfunction

  function automatic void ref_flit(input flit_w_t f, input int chunks,
                                   output int enc, output int base,
                                   output flit_w_t seg, output int len);
    int mn = 255, mx = 0, k;
    for (int j = 0; j < chunks; j++) begin
      if (chunk_of(f, j, chunks) < mn) mn = chunk_of(f, j, chunks);
      if (chunk_of(f, j, chunks) > mx) mx = chunk_of(f, j, chunks);
    end
    base = (mn + mx) / 2;
    seg  = '0;
    if (mx == mn) begin
      enc = 0; len = 0; return;
    end
    k = bitlen(mx - mn) + 1;
    if (k > 6) begin
      enc = 7; len = chunks * 8;
      for (int b = 0; b < chunks * 8; b++) seg[b] = f[b];
      return;
    end
    enc = k; len = k * chunks;
    for (int j = 0; j < chunks; j++) begin
      int d = base - chunk_of(f, j, chunks);
      if (d < -(1 << (k-1)) || d >= (1 << (k-1))) $fatal(1, "reference: difference does not fit");
      for (int b = 0; b < k; b++) seg[j*k + b] = 1'((d >>> b) & 1);
    end
  endfunction

  // Expected flit list of one packet: [0] is the head flit.
  function automatic void ref_packet(input hdr_ctrl_t hdr, input flit_w_t body [NUM_BODY],
                                     output flit_t fl [$], output int enc_out [NUM_BODY]);
    logic [NUM_BODY*FLIT_W-1:0] pay = '0;
    flit_w_t   head = '0;
    hdr_ctrl_t h = hdr;
    int total = 0, nb, encs [NUM_BODY], bases [NUM_BODY];
    fl.delete();
    if (hdr.mt != MT_REP) begin
      h.ft = FT_HEADTAIL;
      head[127:75] = h;
      fl.push_back('{FT_HEADTAIL, head});
      for (int i = 0; i < NUM_BODY; i++) enc_out[i] = 7;
      return;
    end
    for (int i = 0; i < NUM_BODY; i++) begin
      flit_w_t s; int l;
      ref_flit(body[i], 16, encs[i], bases[i], s, l);
      for (int b = 0; b < l; b++) pay[total + b] = s[b];
      total += l;
    end
    nb = (total + 127) / 128;
    if (nb >= NUM_BODY) begin
      nb = NUM_BODY;
      for (int i = 0; i < NUM_BODY; i++) begin
        encs[i] = 7;
        pay[i*128 +: 128] = body[i];
      end
    end
    h.ft = (nb == 0) ? FT_HEADTAIL : FT_HEAD;
    head[127:75] = h;
    for (int i = 0; i < NUM_BODY; i++) begin
      head[74 - 11*i -: 3] = 3'(encs[i]);
      head[71 - 11*i -: 8] = 8'(bases[i]);
      enc_out[i] = encs[i];
    end
    fl.push_back('{ (nb == 0) ? FT_HEADTAIL : FT_HEAD, head });
    for (int i = 0; i < nb; i++)
      fl.push_back('{ (i == nb-1) ? FT_TAIL : FT_BODY, pay[i*128 +: 128] });
  endfunction

  // random flit of a given kind: 0 all chunks equal, 1..5 chunks within a
  // range of below 2^kind (compressible), 6 random bytes
  function automatic flit_w_t gen_flit(int kind);
    flit_w_t f;
    int lo, span;
    if (kind == 0) begin
      lo = $urandom_range(255);
      for (int j = 0; j < 16; j++) f[j*8 +: 8] = 8'(lo);
    end else if (kind <= 5) begin
      span = (1 << kind) - 1;
      lo   = $urandom_range(255 - span);
      for (int j = 0; j < 16; j++) f[j*8 +: 8] = 8'(lo + $urandom_range(span));
      f[$urandom_range(15)*8 +: 8] = 8'(lo + span);   // make the range exact
    end else begin
      for (int j = 0; j < 4; j++) f[j*32 +: 32] = $urandom;
    end
    return f;
  endfunction
endpackage
