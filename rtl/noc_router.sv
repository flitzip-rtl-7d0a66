// noc_router: input-buffered virtual-channel wormhole router for a 2D mesh,
// the router each FlitZip tile connects its network interface to.
//
// Five ports: 0 local (the tile's NI), 1 north, 2 east, 3 south, 4 west.
// Tiles are numbered row by row, tile = y*MESH_X + x, y growing southwards.
// Every input port has NUM_VC virtual-channel buffers of BUF_DEPTH flits.
// Per cycle:
//  * route computation (RC): for the head flit at the front of an idle VC,
//    dimension-order XY routing on the Dest field of the head flit;
//  * VC allocation (VA): such a VC asks its output port for a free
//    downstream VC; each output grants one request per cycle, round robin,
//    and hands out its lowest free VC (the local output counts as one VC);
//  * switch allocation (SA): each input picks one of its VCs that holds a
//    flit and has a credit downstream, round robin; each output then picks
//    one of the inputs that chose it, round robin;
//  * the winning flits cross the crossbar into the output registers, which
//    drive the links. A tail (or head-tail) flit frees its VCs.
// A flit written into a VC buffer at one edge can leave through an output
// register at the next: two cycles per router with the buffer write, the
// output register being the link stage.
//
// Flow control between routers uses credits: every flit sent uses a credit
// of its downstream VC, and a router returns a credit (cr_out_*) for every
// flit that leaves one of its input VCs. The local ports use valid/ready:
// the NI injects into VC 0 of the local input (ready while it has space),
// and the local output register is drained by the NI with valid/ready.
// The credit counters of the local output (port 0) are therefore never
// updated after reset and are not read by any path that can be taken;
// synthesis reports them as undriven and removes them.
//
// What follows the design description: input VCs, RC, VA, SA and a
// crossbar, XY routing on a mesh, 5 VCs of depth 4. Own choices: the
// arbiters, credit flow control, the local-port handshakes, one injection
// VC, and the exact pipeline (the evaluated router has two pipeline cycles
// plus a one-cycle link; here buffer write plus output register).
module noc_router
  import flitzip_pkg::*;
#(
  parameter int unsigned MESH_X    = 8,
  parameter int unsigned MESH_Y    = 8,
  parameter int unsigned X         = 0,
  parameter int unsigned Y         = 0,
  parameter int unsigned NUM_VC    = 5,
  parameter int unsigned BUF_DEPTH = 4,
  localparam int unsigned VCW      = (NUM_VC > 1) ? $clog2(NUM_VC) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // mesh ports, index 0..3 = north, east, south, west
  input  logic  [3:0]    in_valid,
  input  flit_t          in_flit   [4],
  input  logic [VCW-1:0] in_vc     [4],
  output logic  [3:0]    cr_out_valid,
  output logic [VCW-1:0] cr_out_vc [4],
  output logic  [3:0]    out_valid,
  output flit_t          out_flit  [4],
  output logic [VCW-1:0] out_vc    [4],
  input  logic  [3:0]    cr_in_valid,
  input  logic [VCW-1:0] cr_in_vc  [4],
  // local port (network interface)
  input  logic           loc_in_valid,
  output logic           loc_in_ready,
  input  flit_t          loc_in_flit,
  output logic           loc_out_valid,
  input  logic           loc_out_ready,
  output flit_t          loc_out_flit
);
  localparam int unsigned NP  = 5;
  localparam int unsigned PTW = $clog2(BUF_DEPTH > 1 ? BUF_DEPTH : 2);
  localparam int unsigned CW  = $clog2(BUF_DEPTH + 1);
  localparam int unsigned LOC = 0;

  initial assert (MESH_X * MESH_Y <= 64 && X < MESH_X && Y < MESH_Y)
    else $error("6-bit tile numbers address at most 64 tiles");

  // ------------------------------------------------------------ VC buffers
  flit_t          mem  [NP][NUM_VC][BUF_DEPTH];
  logic [PTW-1:0] wp   [NP][NUM_VC];
  logic [PTW-1:0] rp   [NP][NUM_VC];
  logic [CW-1:0]  cnt  [NP][NUM_VC];
  logic           act  [NP][NUM_VC];          // route and downstream VC held
  logic [2:0]     oport[NP][NUM_VC];
  logic [VCW-1:0] ovc  [NP][NUM_VC];

  // writes into the buffers
  logic           w_en [NP];
  logic [VCW-1:0] w_vc [NP];
  flit_t          w_fl [NP];
  always_comb begin
    w_en[LOC] = loc_in_valid && loc_in_ready;
    w_vc[LOC] = '0;
    w_fl[LOC] = loc_in_flit;
    for (int p = 1; p < NP; p++) begin
      w_en[p] = in_valid[p-1];
      w_vc[p] = in_vc[p-1];
      w_fl[p] = in_flit[p-1];
    end
  end
  assign loc_in_ready = cnt[LOC][0] < CW'(BUF_DEPTH);

  function automatic logic [PTW-1:0] ptr_inc(logic [PTW-1:0] q);
    return (q == PTW'(BUF_DEPTH - 1)) ? '0 : q + 1'b1;
  endfunction

  // ------------------------------------------------------- route compute
  function automatic logic [2:0] route(logic [5:0] dest);
    int dx = int'(dest) % int'(MESH_X);
    int dy = int'(dest) / int'(MESH_X);
    if (dx > int'(X)) return 3'd2;    // east
    if (dx < int'(X)) return 3'd4;    // west
    if (dy > int'(Y)) return 3'd3;    // south
    if (dy < int'(Y)) return 3'd1;    // north
    return 3'd0;                      // local
  endfunction

  flit_t      front [NP][NUM_VC];
  logic [2:0] rc    [NP][NUM_VC];
  always_comb
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < NUM_VC; v++) begin
        front[p][v] = mem[p][v][rp[p][v]];
        rc[p][v]    = route(front[p][v].data[115:110]);
      end

  // -------------------------------------------------------- VC allocation
  logic           busy   [NP][NUM_VC];    // downstream VC held by a packet
  logic [CW-1:0]  credit [NP][NUM_VC];
  logic [$clog2(NP*NUM_VC)-1:0] va_ptr [NP];

  logic           va_gnt  [NP][NUM_VC];   // input VC granted this cycle
  logic [VCW-1:0] va_vc   [NP][NUM_VC];
  logic           va_out  [NP];           // output o granted someone
  logic [$clog2(NP*NUM_VC)-1:0] va_who [NP];

  always_comb begin
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < NUM_VC; v++) begin
        va_gnt[p][v] = 1'b0;
        va_vc[p][v]  = '0;
      end
    for (int o = 0; o < NP; o++) begin
      logic           found_vc;
      logic [VCW-1:0] free_vc;
      va_out[o] = 1'b0;
      va_who[o] = '0;
      found_vc  = 1'b0;
      free_vc   = '0;
      for (int w = NUM_VC - 1; w >= 0; w--)
        if (!busy[o][w] && (o != LOC || w == 0)) begin
          found_vc = 1'b1;
          free_vc  = VCW'(w);
        end
      if (found_vc)
        for (int k = NP*NUM_VC - 1; k >= 0; k--) begin
          automatic int unsigned idx = (int'(va_ptr[o]) + 1 + k) % (NP*NUM_VC);
          automatic int unsigned p = idx / NUM_VC;
          automatic int unsigned v = idx % NUM_VC;
          if (!act[p][v] && cnt[p][v] != '0 && rc[p][v] == 3'(o)) begin
            va_out[o] = 1'b1;
            va_who[o] = ($clog2(NP*NUM_VC))'(idx);
          end
        end
      if (va_out[o]) begin
        va_gnt[int'(va_who[o]) / NUM_VC][int'(va_who[o]) % NUM_VC] = 1'b1;
        va_vc [int'(va_who[o]) / NUM_VC][int'(va_who[o]) % NUM_VC] = free_vc;
      end
    end
  end

  // ---------------------------------------------------- switch allocation
  logic               loc_slot;
  logic               elig   [NP][NUM_VC];
  logic               in_req [NP];
  logic [VCW-1:0]     in_sel [NP];
  logic [VCW-1:0]     sa_vptr[NP];
  logic [2:0]         sa_pptr[NP];
  logic               sa_out [NP];
  logic [2:0]         sa_in  [NP];
  logic               pop    [NP];
  logic [VCW-1:0]     pop_vc [NP];

  assign loc_slot = !loc_out_valid || loc_out_ready;

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      in_req[p] = 1'b0;
      in_sel[p] = '0;
      for (int v = 0; v < NUM_VC; v++)
        elig[p][v] = act[p][v] && cnt[p][v] != '0 &&
                     ((oport[p][v] == 3'(LOC)) ? loc_slot : credit[oport[p][v]][ovc[p][v]] != '0);
      for (int k = NUM_VC - 1; k >= 0; k--) begin
        automatic int unsigned v = (int'(sa_vptr[p]) + 1 + k) % NUM_VC;
        if (elig[p][v]) begin
          in_req[p] = 1'b1;
          in_sel[p] = VCW'(v);
        end
      end
    end
    for (int p = 0; p < NP; p++) begin
      pop[p]    = 1'b0;
      pop_vc[p] = in_sel[p];
    end
    for (int o = 0; o < NP; o++) begin
      sa_out[o] = 1'b0;
      sa_in[o]  = '0;
      for (int k = NP - 1; k >= 0; k--) begin
        automatic int unsigned p = (int'(sa_pptr[o]) + 1 + k) % NP;
        if (in_req[p] && oport[p][in_sel[p]] == 3'(o)) begin
          sa_out[o] = 1'b1;
          sa_in[o]  = 3'(p);
        end
      end
      if (sa_out[o]) pop[sa_in[o]] = 1'b1;
    end
  end

  // ------------------------------------------------------------ registers
  flit_t          oreg_f [NP];
  logic           oreg_v [NP];
  logic [VCW-1:0] oreg_vc[NP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin
        va_ptr[p]  <= '0;
        sa_vptr[p] <= '0;
        sa_pptr[p] <= '0;
        oreg_v[p]  <= 1'b0;
        oreg_f[p]  <= '0;
        oreg_vc[p] <= '0;
        for (int v = 0; v < NUM_VC; v++) begin
          wp[p][v]     <= '0;
          rp[p][v]     <= '0;
          cnt[p][v]    <= '0;
          act[p][v]    <= 1'b0;
          oport[p][v]  <= '0;
          ovc[p][v]    <= '0;
          busy[p][v]   <= 1'b0;
          credit[p][v] <= CW'(BUF_DEPTH);
        end
      end
      cr_out_valid <= '0;
      for (int d = 0; d < 4; d++) cr_out_vc[d] <= '0;
    end else begin
      // buffer writes and reads
      for (int p = 0; p < NP; p++)
        for (int v = 0; v < NUM_VC; v++) begin
          automatic logic wr = w_en[p] && w_vc[p] == VCW'(v);
          automatic logic rd = pop[p] && pop_vc[p] == VCW'(v);
          if (wr) wp[p][v] <= ptr_inc(wp[p][v]);
          if (rd) rp[p][v] <= ptr_inc(rp[p][v]);
          cnt[p][v] <= cnt[p][v] + CW'(wr) - CW'(rd);
        end
      // VC allocation results
      for (int p = 0; p < NP; p++)
        for (int v = 0; v < NUM_VC; v++)
          if (va_gnt[p][v]) begin
            act[p][v]   <= 1'b1;
            oport[p][v] <= rc[p][v];
            ovc[p][v]   <= va_vc[p][v];
          end
      for (int o = 0; o < NP; o++)
        if (va_out[o]) begin
          va_ptr[o] <= va_who[o];
          busy[o][va_vc[int'(va_who[o]) / NUM_VC][int'(va_who[o]) % NUM_VC]] <= 1'b1;
        end
      // credits returned by the downstream routers
      for (int o = 1; o < NP; o++)
        for (int w = 0; w < NUM_VC; w++) begin
          automatic logic used = sa_out[o] && ovc[sa_in[o]][in_sel[sa_in[o]]] == VCW'(w);
          automatic logic back = cr_in_valid[o-1] && cr_in_vc[o-1] == VCW'(w);
          credit[o][w] <= credit[o][w] - CW'(used) + CW'(back);
        end
      // local output register drains towards the NI
      if (oreg_v[LOC] && loc_out_ready) oreg_v[LOC] <= 1'b0;
      for (int o = 1; o < NP; o++) oreg_v[o] <= 1'b0;
      // switch traversal
      for (int o = 0; o < NP; o++)
        if (sa_out[o]) begin
          automatic logic [2:0]     p = sa_in[o];
          automatic logic [VCW-1:0] v = in_sel[p];
          automatic flit_t f = front[p][v];
          oreg_v[o]  <= 1'b1;
          oreg_f[o]  <= f;
          oreg_vc[o] <= ovc[p][v];
          sa_pptr[o] <= 3'(p);
          if (f.ft == FT_TAIL || f.ft == FT_HEADTAIL) begin
            act[p][v]          <= 1'b0;
            busy[o][ovc[p][v]] <= 1'b0;
          end
        end
      for (int p = 0; p < NP; p++)
        if (pop[p]) sa_vptr[p] <= pop_vc[p];
      // credit return for every flit leaving a mesh input VC
      for (int p = 1; p < NP; p++) begin
        cr_out_valid[p-1] <= pop[p];
        cr_out_vc[p-1]    <= pop_vc[p];
      end
    end
  end

  always_ff @(posedge clk)
    for (int p = 0; p < NP; p++)
      if (w_en[p]) mem[p][w_vc[p]][wp[p][w_vc[p]]] <= w_fl[p];

  always_comb begin
    for (int d = 0; d < 4; d++) begin
      out_valid[d] = oreg_v[d+1];
      out_flit[d]  = oreg_f[d+1];
      out_vc[d]    = oreg_vc[d+1];
    end
    loc_out_valid = oreg_v[LOC];
    loc_out_flit  = oreg_f[LOC];
  end

  // a flit never arrives at a full VC buffer
  for (genvar p = 0; p < NP; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     w_en[p] |-> cnt[p][w_vc[p]] < CW'(BUF_DEPTH) || (pop[p] && pop_vc[p] == w_vc[p]));
  end
endmodule
