// tb_flitzip_mesh: end-to-end test of the whole design on a 3x3 mesh of
// tiles with FlitZip network interfaces and VC routers (the same test at the
// default 8x8 size is tb_flitzip_mesh_full; this one builds in seconds).
// Every tile sends request and reply packets to random tiles (its own tile
// included), with block contents of every kind; each packet carries a unique
// serial number in its address field. Every packet must arrive once, at the
// tile its Dest names, identical to what was sent. Counted and required:
// compressed packets, packets left uncompressed, packets reduced to a head
// flit, requests, stalls of a sending tile, held deliveries at a receiving
// tile, and packets crossing the whole mesh corner to corner.
module tb_flitzip_mesh;
  import flitzip_pkg::*;
  import fz_ref_pkg::*;

  localparam int MX = 3, MY = 3, NT = MX * MY;
  localparam int PKT_PER_TILE = 80;

  logic clk = 0, rst_n = 0;
  logic      tx_valid [NT], tx_ready [NT], rx_valid [NT], rx_ready [NT];
  hdr_ctrl_t tx_hdr [NT], rx_hdr [NT];
  logic [NUM_BODY-1:0][FLIT_W-1:0] tx_body [NT], rx_body [NT];
  logic      stat_valid [NT], stat_compressed [NT];
  logic [2:0] stat_body_flits [NT];

  flitzip_mesh #(.MESH_X(MX), .MESH_Y(MY)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, received = 0, sent_n = 0;
  int n_comp = 0, n_raw = 0, n_headonly = 0, n_req = 0, n_tx_stall = 0, n_rx_hold = 0, n_far = 0;

  typedef struct { hdr_ctrl_t h; logic [NUM_BODY-1:0][FLIT_W-1:0] b; } pkt_t;
  pkt_t outstanding [int];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired, %0d packets outstanding", outstanding.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n)
      for (int t = 0; t < NT; t++) begin
        if (tx_valid[t] && !tx_ready[t]) n_tx_stall++;
        if (rx_valid[t] && !rx_ready[t]) n_rx_hold++;
        if (stat_valid[t]) begin
          if (stat_compressed[t] && stat_body_flits[t] == 0) n_headonly++;
          else if (stat_compressed[t]) n_comp++;
          else if (stat_body_flits[t] == NUM_BODY) n_raw++;
          else n_req++;
        end
        if (rx_valid[t] && rx_ready[t]) begin
          automatic int id = int'(rx_hdr[t].mem_addr);
          checks++;
          received++;
          if (!outstanding.exists(id)) begin
            failures++; $display("FAIL tile %0d: unknown or repeated packet %0d", t, id);
          end else begin
            automatic pkt_t e = outstanding[id];
            automatic hdr_ctrl_t g = rx_hdr[t];
            automatic logic [NUM_BODY-1:0][FLIT_W-1:0] eb = (e.h.mt == MT_REP) ? e.b : '0;
            g.ft = e.h.ft;
            if (g !== e.h || rx_body[t] !== eb || int'(e.h.dest) != t) begin
              failures++;
              if (failures < 10) $display("FAIL tile %0d packet %0d differs", t, id);
            end
            outstanding.delete(id);
          end
        end
      end
  end

  function automatic logic [FLIT_W-1:0] mix_flit();
    int r = $urandom_range(99);
    if (r < 52) return gen_flit(0);
    if (r < 73) return gen_flit(6);
    return gen_flit(1 + $urandom_range(4));
  endfunction

  int serial = 0;

  task automatic tile_sender(int t);
    for (int k = 0; k < PKT_PER_TILE; k++) begin
      automatic hdr_ctrl_t h;
      automatic logic [NUM_BODY-1:0][FLIT_W-1:0] body;
      automatic int mode = $urandom_range(9);
      automatic pkt_t p;
      h.id = 2'($urandom); h.ft = FT_HEAD; h.vc = '0; h.src = 6'(t);
      h.dest = 6'($urandom_range(NT - 1));
      if (k == 0 && t == 0) h.dest = 6'(NT - 1);      // corner to corner
      if (k == 0 && t == NT - 1) h.dest = 6'(0);
      h.mt = (mode == 0) ? MT_REQ : MT_REP;
      h.mem_addr = serial++;
      for (int i = 0; i < NUM_BODY; i++) body[i] = mix_flit();
      if (mode == 1) for (int i = 0; i < NUM_BODY; i++) body[i] = gen_flit(6);
      if (mode == 2) for (int i = 0; i < NUM_BODY; i++) body[i] = gen_flit(0);
      p.h = h; p.b = body;
      if ((h.dest % MX == 0 && t % MX == MX - 1 || h.dest % MX == MX - 1 && t % MX == 0) &&
          (h.dest / MX == 0 && t / MX == MY - 1 || h.dest / MX == MY - 1 && t / MX == 0)) n_far++;
      @(negedge clk);
      tx_valid[t] = 1; tx_hdr[t] = h; tx_body[t] = body;
      outstanding[int'(h.mem_addr)] = p;
      sent_n++;
      do @(posedge clk); while (!tx_ready[t]);
      @(negedge clk);
      tx_valid[t] = 0;
      repeat ($urandom_range(6)) @(negedge clk);
    end
  endtask

  initial begin
    for (int t = 0; t < NT; t++) begin
      tx_valid[t] = 0; tx_hdr[t] = '0; tx_body[t] = '0; rx_ready[t] = 1;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      forever begin
        @(negedge clk);
        for (int t = 0; t < NT; t++) rx_ready[t] = ($urandom_range(5) != 0);
      end
    join_none
    for (int t = 0; t < NT; t++) begin
      automatic int tt = t;
      fork tile_sender(tt); join_none
    end
    wait (sent_n == NT * PKT_PER_TILE);
    for (int w = 0; w < 20000 && outstanding.size() != 0; w++) @(negedge clk);
    checks++;
    if (outstanding.size() != 0 || received != NT * PKT_PER_TILE) begin
      failures++; $display("FAIL %0d packets not delivered", outstanding.size());
    end
    $display("packets %0d: compressed=%0d head-only=%0d uncompressed=%0d request=%0d corner-to-corner=%0d",
             received, n_comp, n_headonly, n_raw, n_req, n_far);
    $display("stalls: sending tiles=%0d held deliveries=%0d", n_tx_stall, n_rx_hold);
    checks++;
    if (n_comp == 0 || n_headonly == 0 || n_raw == 0 || n_req == 0 || n_tx_stall == 0 ||
        n_rx_hold == 0 || n_far == 0) begin
      failures++; $display("FAIL a case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
