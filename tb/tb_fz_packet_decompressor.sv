// tb_fz_packet_decompressor: builds compressed flit streams with the
// reference compressor (requests, compressed replies, replies sent
// uncompressed, replies of head flit only), feeds them to the packet
// decompressor with random gaps and random processor-side back-pressure, and
// checks that every packet comes back exactly. Directed check of the timing:
// the worked example laid out on 16-byte flits, body flits three cycles
// apart as on an idle network; the packet must be ready one cycle after its
// last body flit is taken.
module tb_fz_packet_decompressor;
  import flitzip_pkg::*;
  import fz_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  flit_t in_flit = '0;
  hdr_ctrl_t out_hdr;
  logic [NUM_BODY-1:0][FLIT_W-1:0] out_body;
  int checks = 0, failures = 0;
  int n_comp = 0, n_raw = 0, n_headonly = 0, n_req = 0, n_gap = 0, n_hold = 0;

  fz_packet_decompressor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { hdr_ctrl_t h; logic [NUM_BODY-1:0][FLIT_W-1:0] b; } pkt_t;
  pkt_t expq [$];

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && !out_ready) n_hold++;
      if (out_valid && out_ready) begin
        automatic pkt_t e = expq.pop_front();
        checks++;
        if (out_hdr !== e.h || out_body !== e.b) begin
          failures++;
          if (failures < 10) $display("FAIL hdr=%h/%h body=%h exp %h", out_hdr, e.h, out_body, e.b);
        end
      end
    end
  end

  function automatic hdr_ctrl_t rand_hdr(mt_e mt);
    hdr_ctrl_t h;
    h.id = 2'($urandom); h.ft = FT_HEAD; h.vc = 2'($urandom);
    h.src = 6'($urandom); h.dest = 6'($urandom); h.mt = mt; h.mem_addr = $urandom;
    return h;
  endfunction

  // send one packet; gap = idle cycles between flits (-1: random)
  task automatic send(input hdr_ctrl_t h, input logic [NUM_BODY-1:0][FLIT_W-1:0] body,
                      input int gap, output int nflits);
    flit_t fl [$];
    int encs [NUM_BODY];
    logic [FLIT_W-1:0] b [NUM_BODY];
    pkt_t p;
    for (int i = 0; i < NUM_BODY; i++) b[i] = body[i];
    ref_packet(h, b, fl, encs);
    p.h = h; p.h.ft = fl[0].ft;
    p.b = (h.mt == MT_REP) ? body : '0;
    expq.push_back(p);
    nflits = fl.size();
    if (h.mt != MT_REP) n_req++;
    else if (fl.size() == 1) n_headonly++;
    else if (fl.size() < NUM_BODY + 1) n_comp++;
    else n_raw++;
    foreach (fl[i]) begin
      automatic int g = (gap < 0) ? (($urandom_range(3) == 0) ? $urandom_range(3) : 0) : gap;
      if (i > 0) repeat (g) begin @(negedge clk); in_valid = 0; n_gap++; end
      @(negedge clk);
      in_valid = 1; in_flit = fl[i];
      do @(posedge clk); while (!in_ready);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int nf;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- worked example, body flits three cycles apart
    begin
      automatic logic [NUM_BODY-1:0][FLIT_W-1:0] body;
      body[0] = {4{32'h80818283}};
      body[1] = {32'hA47642BB, 32'h1C9E0F55, 32'h6A33D2E1, 32'h07B4C8F9};
      body[2] = {4{32'hFFFFFFFF}};
      body[3] = '0;
      send(rand_hdr(MT_REP), body, 2, nf);
      // send() returns at the negedge after the tail flit was taken
      checks++;
      if (nf != 3 || out_valid) begin failures++; $display("FAIL example: %0d flits, early valid", nf); end
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("FAIL example: not ready one cycle after the last flit"); end
      repeat (3) @(negedge clk);
    end
    // ---- random traffic
    fork
      forever begin
        @(negedge clk);
        out_ready = ($urandom_range(3) != 0);
      end
    join_none
    for (int t = 0; t < 2000; t++) begin
      automatic logic [NUM_BODY-1:0][FLIT_W-1:0] body;
      automatic int mode = $urandom_range(19);
      for (int i = 0; i < NUM_BODY; i++) body[i] = gen_flit($urandom_range(6));
      if (mode == 1) for (int i = 0; i < NUM_BODY; i++) body[i] = gen_flit(0);
      if (mode == 2) for (int i = 0; i < NUM_BODY; i++) body[i] = gen_flit(6);
      send(rand_hdr(mode == 0 ? MT_REQ : MT_REP), body, -1, nf);
    end
    @(negedge clk);
    disable fork;
    out_ready = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d packets missing", expq.size()); end
    $display("compressed=%0d uncompressed=%0d head-only=%0d request=%0d gaps=%0d held=%0d",
             n_comp, n_raw, n_headonly, n_req, n_gap, n_hold);
    checks++;
    if (n_comp == 0 || n_raw == 0 || n_headonly == 0 || n_req == 0 || n_gap == 0 || n_hold == 0) begin
      failures++; $display("FAIL a case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
