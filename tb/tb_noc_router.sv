// tb_noc_router: self-checking test of one router, the centre router (1,1)
// of a 3x3 mesh, with its four neighbours and its network interface played
// by the testbench. Each of the five inputs sends wormhole packets of one to
// three flits to random tiles; mesh inputs pick a random VC per packet and
// send only while they hold a credit for it, the local input uses its
// valid/ready handshake. Downstream, the testbench keeps a buffer count per
// output VC, returns credits after random delays and stalls the local output
// at random. Checked: every packet leaves by the port XY routing gives for
// its Dest; its flits leave in order on one VC without another packet in
// between; no downstream VC ever holds more than BUF_DEPTH flits; every
// packet leaves exactly once. Counted and required: credit stalls at the
// inputs and outputs, local inject stalls, local output holds, all five VCs
// of an output in use at once, and traffic on every output port.
module tb_noc_router;
  import flitzip_pkg::*;

  localparam int MX = 3, MY = 3, RX = 1, RY = 1, NV = 5, DEPTH = 4;
  localparam int PKTS = 300;       // per input

  logic clk = 0, rst_n = 0;
  logic [3:0] in_valid, cr_out_valid, out_valid, cr_in_valid;
  flit_t      in_flit [4], out_flit [4];
  logic [2:0] in_vc [4], cr_out_vc [4], out_vc [4], cr_in_vc [4];
  logic       loc_in_valid, loc_in_ready, loc_out_valid, loc_out_ready;
  flit_t      loc_in_flit, loc_out_flit;

  noc_router #(.MESH_X(MX), .MESH_Y(MY), .X(RX), .Y(RY), .NUM_VC(NV), .BUF_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int up_credit [1:4][NV];           // credits the senders hold
  int down_cnt  [0:4][NV];           // flits held downstream per output VC
  int cur_src   [0:4][NV], cur_seq [0:4][NV], cur_idx [0:4][NV];
  bit seen      [0:4][PKTS];
  int recv_pkts = 0, sent_done = 0;
  int n_up_stall = 0, n_down_full = 0, n_loc_stall = 0, n_loc_hold = 0, n_allvc = 0;
  int per_port [0:4];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // XY routing worked out independently: 0 local, 1 N, 2 E, 3 S, 4 W
  function automatic int xy_port(int dest);
    int dx = dest % MX, dy = dest / MX;
    if (dx != RX) return (dx > RX) ? 2 : 4;
    if (dy != RY) return (dy > RY) ? 3 : 1;
    return 0;
  endfunction

  // flit data: [115:110] dest, [26:24] source input, [23:8] packet, [7:0] index
  task automatic check_flit(int o, int v, flit_t f);
    int dest = int'(f.data[115:110]), src = int'(f.data[26:24]);
    int seq = int'(f.data[23:8]), idx = int'(f.data[7:0]);
    checks++;
    per_port[o]++;
    if (f.ft == FT_HEAD || f.ft == FT_HEADTAIL) begin
      if (cur_src[o][v] >= 0) begin
        failures++; $display("FAIL port %0d vc %0d: head inside a packet", o, v);
      end
      if (xy_port(dest) != o) begin
        failures++; $display("FAIL packet to %0d left by port %0d", dest, o);
      end
      if (idx != 0) begin failures++; $display("FAIL head index %0d", idx); end
      cur_src[o][v] = src; cur_seq[o][v] = seq; cur_idx[o][v] = 1;
    end else begin
      if (cur_src[o][v] != src || cur_seq[o][v] != seq || cur_idx[o][v] != idx) begin
        failures++;
        $display("FAIL port %0d vc %0d: flit %0d.%0d.%0d out of place", o, v, src, seq, idx);
      end
      cur_idx[o][v]++;
    end
    if (f.ft == FT_TAIL || f.ft == FT_HEADTAIL) begin
      if (seen[src][seq]) begin failures++; $display("FAIL packet %0d.%0d twice", src, seq); end
      seen[src][seq] = 1;
      recv_pkts++;
      cur_src[o][v] = -1;
    end
  endtask

  // outputs: record, check, and count downstream buffer use
  always @(posedge clk) if (rst_n) begin
    int nbusy;
    for (int d = 0; d < 4; d++) begin
      if (out_valid[d]) begin
        check_flit(d + 1, int'(out_vc[d]), out_flit[d]);
        down_cnt[d+1][out_vc[d]]++;
        checks++;
        if (down_cnt[d+1][out_vc[d]] > DEPTH) begin
          failures++; $display("FAIL port %0d vc %0d overrun", d + 1, out_vc[d]);
        end
        if (down_cnt[d+1][out_vc[d]] == DEPTH) n_down_full++;
      end
      nbusy = 0;
      for (int v = 0; v < NV; v++) nbusy += (cur_src[d+1][v] >= 0 ? 1 : 0);
      if (nbusy == NV) n_allvc++;
      if (cr_out_valid[d]) up_credit[d+1][cr_out_vc[d]]++;
    end
    if (loc_out_valid && loc_out_ready) check_flit(0, 0, loc_out_flit);
    if (loc_out_valid && !loc_out_ready) n_loc_hold++;
    if (loc_in_valid && !loc_in_ready) n_loc_stall++;
  end

  // downstream credit return after random delay, at most one per port per cycle
  always @(negedge clk) begin
    cr_in_valid = '0;
    for (int d = 0; d < 4; d++) begin
      cr_in_vc[d] = '0;
      if (rst_n && $urandom_range(2) == 0) begin
        automatic int start = $urandom_range(NV - 1);
        for (int k = 0; k < NV; k++) begin
          automatic int v = (start + k) % NV;
          if (!cr_in_valid[d] && down_cnt[d+1][v] > 0) begin
            cr_in_valid[d] = 1'b1; cr_in_vc[d] = 3'(v); down_cnt[d+1][v]--;
          end
        end
      end
    end
    loc_out_ready = ($urandom_range(3) != 0);
  end

  function automatic flit_t mk(int src, int seq, int idx, int len, int dest);
    flit_t f;
    f.data = {$urandom, $urandom, $urandom, $urandom};
    f.data[115:110] = 6'(dest);
    f.data[26:24] = 3'(src);
    f.data[23:8] = 16'(seq);
    f.data[7:0] = 8'(idx);
    if (len == 1) f.ft = FT_HEADTAIL;
    else if (idx == 0) f.ft = FT_HEAD;
    else if (idx == len - 1) f.ft = FT_TAIL;
    else f.ft = FT_BODY;
    return f;
  endfunction

  task automatic mesh_sender(int p);
    for (int s = 0; s < PKTS; s++) begin
      int len = 1 + $urandom_range(2), dest = $urandom_range(MX * MY - 1), v = $urandom_range(NV - 1);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        while (up_credit[p][v] == 0) begin n_up_stall++; @(negedge clk); end
        up_credit[p][v]--;
        in_valid[p-1] = 1'b1; in_vc[p-1] = 3'(v); in_flit[p-1] = mk(p, s, i, len, dest);
        @(negedge clk);
        in_valid[p-1] = 1'b0;
        repeat ($urandom_range(1)) @(negedge clk);
      end
    end
    sent_done++;
  endtask

  task automatic loc_sender();
    for (int s = 0; s < PKTS; s++) begin
      int len = 1 + $urandom_range(2), dest = $urandom_range(MX * MY - 1);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        loc_in_valid = 1'b1; loc_in_flit = mk(0, s, i, len, dest);
        do @(posedge clk); while (!loc_in_ready);
      end
      @(negedge clk);
      loc_in_valid = 1'b0;
    end
    sent_done++;
  endtask

  initial begin
    in_valid = '0; loc_in_valid = 0; loc_in_flit = '0; loc_out_ready = 1; cr_in_valid = '0;
    for (int d = 0; d < 4; d++) begin in_flit[d] = '0; in_vc[d] = '0; cr_in_vc[d] = '0; end
    for (int p = 1; p <= 4; p++) for (int v = 0; v < NV; v++) up_credit[p][v] = DEPTH;
    for (int p = 0; p <= 4; p++) begin
      per_port[p] = 0;
      for (int v = 0; v < NV; v++) begin down_cnt[p][v] = 0; cur_src[p][v] = -1; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      loc_sender();
      mesh_sender(1); mesh_sender(2); mesh_sender(3); mesh_sender(4);
    join
    for (int w = 0; w < 2000 && recv_pkts != 5 * PKTS; w++) @(negedge clk);
    checks++;
    if (recv_pkts != 5 * PKTS) begin
      failures++; $display("FAIL %0d of %0d packets left the router", recv_pkts, 5 * PKTS);
    end
    $display("flits per output L N E S W: %0d %0d %0d %0d %0d",
             per_port[0], per_port[1], per_port[2], per_port[3], per_port[4]);
    $display("input credit stalls=%0d downstream VC full=%0d local inject stalls=%0d local holds=%0d all VCs busy=%0d",
             n_up_stall, n_down_full, n_loc_stall, n_loc_hold, n_allvc);
    checks++;
    if (n_up_stall == 0 || n_down_full == 0 || n_loc_stall == 0 || n_loc_hold == 0 || n_allvc == 0 ||
        per_port[0] == 0 || per_port[1] == 0 || per_port[2] == 0 || per_port[3] == 0 || per_port[4] == 0) begin
      failures++; $display("FAIL a case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
