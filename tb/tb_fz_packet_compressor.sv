// tb_fz_packet_compressor: sends request packets and reply packets whose
// body flits are of random kinds through the packet compressor, with random
// back-pressure from the network side, and compares every output flit (head
// flit with metadata, packed body flits, flit types) with the reference
// model. Directed checks: the worked example laid out on 16-byte flits
// (metadata 011_10000001, 111_..., 000_11111111, 000_00000000 at bits 74..31
// and two body flits), the two-cycle latency from taking a packet to its head
// flit, a packet sent uncompressed because compression saves no flit, and a
// packet of four all-equal flits that becomes a single head flit.
module tb_fz_packet_compressor;
  import flitzip_pkg::*;
  import fz_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  hdr_ctrl_t in_hdr = '0;
  logic [NUM_BODY-1:0][FLIT_W-1:0] in_body = '0;
  flit_t out_flit;
  logic stat_valid, stat_compressed;
  logic [2:0] stat_body_flits;
  logic [NUM_BODY-1:0][ENC_W-1:0] stat_enc;
  int checks = 0, failures = 0, cyc = 0;
  int n_comp = 0, n_raw = 0, n_headonly = 0, n_req = 0, n_out_stall = 0, n_in_stall = 0;

  fz_packet_compressor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  flit_t expq [$];
  int    take_cyc [$];
  bit    expect_comp [$];
  bit    check_latency = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (out_valid && !out_ready) n_out_stall++;
      if (in_valid && !in_ready)   n_in_stall++;
      if (out_valid && out_ready) begin
        automatic flit_t e = expq.pop_front();
        checks++;
        if (out_flit !== e) begin
          failures++;
          if (failures < 10) $display("FAIL flit ft=%0d data=%h exp ft=%0d data=%h", out_flit.ft, out_flit.data, e.ft, e.data);
        end
        if (out_flit.ft inside {FT_HEAD, FT_HEADTAIL}) begin
          automatic int t = take_cyc.pop_front();
          if (check_latency) begin
            checks++;
            if (cyc - t != 2) begin failures++; $display("FAIL latency %0d", cyc - t); end
          end
        end
      end
      if (stat_valid) begin
        automatic bit c = expect_comp.pop_front();
        checks++;
        if (stat_compressed != c) begin failures++; $display("FAIL stat_compressed"); end
      end
      if (in_valid && in_ready) begin
        automatic flit_t fl [$];
        automatic int encs [NUM_BODY];
        automatic logic [FLIT_W-1:0] b [NUM_BODY];
        for (int i = 0; i < NUM_BODY; i++) b[i] = in_body[i];
        ref_packet(in_hdr, b, fl, encs);
        foreach (fl[i]) expq.push_back(fl[i]);
        take_cyc.push_back(cyc);
        expect_comp.push_back(in_hdr.mt == MT_REP && fl.size() < NUM_BODY + 1);
        if (in_hdr.mt != MT_REP) n_req++;
        else if (fl.size() == 1) n_headonly++;
        else if (fl.size() < NUM_BODY + 1) n_comp++;
        else n_raw++;
      end
    end
  end

  task automatic send(input hdr_ctrl_t h, input logic [NUM_BODY-1:0][FLIT_W-1:0] body);
    @(negedge clk);
    in_valid = 1; in_hdr = h; in_body = body;
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    in_valid = 0;
  endtask

  function automatic hdr_ctrl_t rand_hdr(mt_e mt);
    hdr_ctrl_t h;
    h.id = 2'($urandom); h.ft = FT_HEAD; h.vc = 2'($urandom);
    h.src = 6'($urandom); h.dest = 6'($urandom); h.mt = mt; h.mem_addr = $urandom;
    return h;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- worked example on 16-byte flits, no back-pressure
    check_latency = 1;
    begin
      automatic hdr_ctrl_t h = rand_hdr(MT_REP);
      automatic logic [NUM_BODY-1:0][FLIT_W-1:0] body;
      body[0] = {4{32'h80818283}};
      body[1] = {32'hA47642BB, 32'h1C9E0F55, 32'h6A33D2E1, 32'h07B4C8F9};
      body[2] = {4{32'hFFFFFFFF}};
      body[3] = '0;
      send(h, body);
      while (!(out_valid && out_flit.ft == FT_HEAD)) @(negedge clk);
      checks++;
      if (out_flit.data[74:64] != 11'b011_10000001 || out_flit.data[63:61] != 3'b111 ||
          out_flit.data[52:42] != 11'b000_11111111 || out_flit.data[41:31] != 11'b000_00000000 ||
          out_flit.data[30:0] != '0) begin
        failures++; $display("FAIL example metadata %b", out_flit.data[74:31]);
      end
      @(negedge clk);
      checks++;
      if (out_flit.ft != FT_BODY || out_flit.data[47:0] != {4{12'b110_111_000_001}} ||
          out_flit.data[127:48] != body[1][79:0]) begin
        failures++; $display("FAIL example body flit 1 %h", out_flit.data);
      end
      @(negedge clk);
      checks++;
      if (out_flit.ft != FT_TAIL || out_flit.data[47:0] != body[1][127:80] || out_flit.data[127:48] != '0) begin
        failures++; $display("FAIL example body flit 2 %h", out_flit.data);
      end
    end
    check_latency = 0;
    repeat (5) @(negedge clk);
    // ---- no flit saved: every flit random -> sent as it was
    send(rand_hdr(MT_REP), {gen_flit(6), gen_flit(6), gen_flit(6), gen_flit(1)});
    // ---- all flits equal -> head flit only
    send(rand_hdr(MT_REP), {gen_flit(0), gen_flit(0), gen_flit(0), gen_flit(0)});
    send(rand_hdr(MT_REQ), '0);
    repeat (10) @(negedge clk);
    // ---- random traffic with back-pressure
    fork
      forever begin
        @(negedge clk);
        out_ready = ($urandom_range(3) != 0);
      end
    join_none
    for (int t = 0; t < 1500; t++) begin
      automatic int mode = $urandom_range(9);
      automatic logic [NUM_BODY-1:0][FLIT_W-1:0] body;
      for (int i = 0; i < NUM_BODY; i++) body[i] = gen_flit($urandom_range(6));
      send(rand_hdr(mode == 0 ? MT_REQ : MT_REP), body);
    end
    @(negedge clk);
    disable fork;
    out_ready = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d flits missing", expq.size()); end
    $display("compressed=%0d uncompressed=%0d head-only=%0d request=%0d net-stall=%0d in-stall=%0d",
             n_comp, n_raw, n_headonly, n_req, n_out_stall, n_in_stall);
    checks++;
    if (n_comp == 0 || n_raw == 0 || n_headonly == 0 || n_req == 0 || n_out_stall == 0 || n_in_stall == 0) begin
      failures++; $display("FAIL a case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
