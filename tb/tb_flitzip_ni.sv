// tb_flitzip_ni: end-to-end test of the FlitZip network interface at its
// default sizes. The network port is looped back through a link that stalls
// at random, so every packet the processor side sends is compressed, queued,
// sent flit by flit, queued again, decompressed and handed back; each
// received packet must equal the one sent. The traffic mixes requests and
// reply packets whose 128-bit body flits follow a chosen mix of contents
// (all chunks equal, each compressible range, random bytes). Every mechanism
// is counted and must happen at least once: each encoding 000, 010..110 and
// 111, compressed packets, packets left uncompressed because no flit would be
// saved, packets reduced to a head flit, requests, stalls of the processor
// side, of the link and of the full inject queue, and a held received packet.
// At the end the flit count against uncompressed traffic is printed.
module tb_flitzip_ni;
  import flitzip_pkg::*;
  import fz_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic tx_valid = 0, tx_ready, rx_valid, rx_ready = 1;
  hdr_ctrl_t tx_hdr = '0, rx_hdr;
  logic [NUM_BODY-1:0][FLIT_W-1:0] tx_body = '0, rx_body;
  logic net_out_valid, net_out_ready, net_in_valid, net_in_ready;
  flit_t net_out_flit, net_in_flit;
  logic stat_valid, stat_compressed;
  logic [2:0] stat_body_flits;
  logic [NUM_BODY-1:0][ENC_W-1:0] stat_enc;
  logic link_en = 1;
  logic [2:0] ejq_count, inq_count;
  int max_ejq = 0;

  flitzip_ni dut (.*);

  assign net_in_valid  = net_out_valid && link_en;
  assign net_out_ready = net_in_ready && link_en;
  assign net_in_flit   = net_out_flit;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int enc_hist [8] = '{default: 0};
  int n_comp = 0, n_raw = 0, n_headonly = 0, n_req = 0;
  int n_tx_stall = 0, n_link_stall = 0, n_inq_full = 0, n_rx_hold = 0;
  int flits_sent = 0, flits_base = 0, n_rx = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { hdr_ctrl_t h; logic [NUM_BODY-1:0][FLIT_W-1:0] b; } pkt_t;
  pkt_t sent [$];

  always @(posedge clk) begin
    if (rst_n) begin
      if (tx_valid && !tx_ready) n_tx_stall++;
      if (int'(ejq_count) > max_ejq) max_ejq = int'(ejq_count);
      if (net_out_valid && !link_en) n_link_stall++;
      if (net_out_valid && link_en && !net_in_ready) n_inq_full++;
      if (rx_valid && !rx_ready) n_rx_hold++;
      if (net_out_valid && net_out_ready) flits_sent++;
      if (tx_valid && tx_ready) begin
        automatic pkt_t p;
        p.h = tx_hdr; p.b = tx_body;
        sent.push_back(p);
        flits_base += (tx_hdr.mt == MT_REP) ? NUM_BODY + 1 : 1;
      end
      if (stat_valid) begin
        if (stat_compressed) begin
          n_comp++;
          for (int i = 0; i < NUM_BODY; i++) enc_hist[stat_enc[i]]++;
          if (stat_body_flits == 0) n_headonly++;
        end else if (stat_body_flits == NUM_BODY) begin
          n_raw++;
          enc_hist[7]++;
        end else n_req++;
      end
      if (rx_valid && rx_ready) begin
        automatic pkt_t e = sent.pop_front();
        automatic hdr_ctrl_t g = rx_hdr;
        automatic logic [NUM_BODY-1:0][FLIT_W-1:0] eb = (e.h.mt == MT_REP) ? e.b : '0;
        g.ft = e.h.ft;
        checks++;
        n_rx++;
        if (g !== e.h || rx_body !== eb) begin
          failures++;
          if (failures < 10) $display("FAIL packet %0d: hdr %h/%h body %h exp %h", n_rx, rx_hdr, e.h, rx_body, eb);
        end
        checks++;
        if (!(rx_hdr.ft inside {FT_HEAD, FT_HEADTAIL})) begin failures++; $display("FAIL rx ft"); end
      end
    end
  end

  function automatic hdr_ctrl_t rand_hdr(mt_e mt);
    hdr_ctrl_t h;
    h.id = 2'($urandom); h.ft = FT_HEAD; h.vc = 2'($urandom);
    h.src = 6'($urandom); h.dest = 6'($urandom); h.mt = mt; h.mem_addr = $urandom;
    return h;
  endfunction

  // flit content roughly in the proportions of the intra-flit patterns:
  // about half all-equal, a fifth random, the rest in the compressible ranges
  function automatic logic [FLIT_W-1:0] mix_flit();
    int r = $urandom_range(99);
    if (r < 52) return gen_flit(0);
    if (r < 73) return gen_flit(6);
    return gen_flit(1 + $urandom_range(4));
  endfunction

  localparam int NPKT = 3000;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      forever begin
        @(negedge clk);
        link_en  = ($urandom_range(9) != 0);
        rx_ready = ($urandom_range(7) != 0);
      end
    join_none
    for (int t = 0; t < NPKT; t++) begin
      automatic int mode = $urandom_range(19);
      automatic logic [NUM_BODY-1:0][FLIT_W-1:0] body;
      for (int i = 0; i < NUM_BODY; i++) body[i] = mix_flit();
      if (mode == 1) for (int i = 0; i < NUM_BODY; i++) body[i] = gen_flit(6);
      @(negedge clk);
      tx_valid = 1;
      tx_hdr   = rand_hdr(mode == 0 ? MT_REQ : MT_REP);
      tx_body  = body;
      do @(posedge clk); while (!tx_ready);
      @(negedge clk);
      tx_valid = 0;
      if ($urandom_range(3) == 0) repeat ($urandom_range(4)) @(negedge clk);
    end
    // drain
    for (int w = 0; w < 2000 && sent.size() != 0; w++) @(negedge clk);
    disable fork;
    checks++;
    if (sent.size() != 0 || n_rx != NPKT) begin failures++; $display("FAIL %0d packets lost", sent.size()); end
    $display("packets: compressed=%0d (head-only %0d) uncompressed=%0d request=%0d",
             n_comp, n_headonly, n_raw, n_req);
    $display("encodings: 000:%0d 010:%0d 011:%0d 100:%0d 101:%0d 110:%0d 111:%0d",
             enc_hist[0], enc_hist[2], enc_hist[3], enc_hist[4], enc_hist[5], enc_hist[6], enc_hist[7]);
    $display("stalls: processor=%0d link=%0d inject-queue-full=%0d rx-held=%0d",
             n_tx_stall, n_link_stall, n_inq_full, n_rx_hold);
    checks++;
    if (max_ejq != NUM_BODY + 1) begin failures++; $display("FAIL eject queue never full (%0d)", max_ejq); end
    $display("flits sent %0d against %0d uncompressed (ratio %0.3f)",
             flits_sent, flits_base, real'(flits_sent) / real'(flits_base));
    for (int e = 0; e < 8; e++) if (e != 1) begin
      checks++;
      if (enc_hist[e] == 0) begin failures++; $display("FAIL encoding %0d never used", e); end
    end
    checks++;
    if (n_comp == 0 || n_headonly == 0 || n_raw == 0 || n_req == 0) begin
      failures++; $display("FAIL a packet case never happened");
    end
    checks++;
    if (n_tx_stall == 0 || n_link_stall == 0 || n_inq_full == 0 || n_rx_hold == 0) begin
      failures++; $display("FAIL a stall never happened");
    end
    checks++;
    if (flits_sent >= flits_base) begin failures++; $display("FAIL no flit saved"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
