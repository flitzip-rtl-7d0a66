// flitzip_mesh: a MESH_X x MESH_Y 2D-mesh network-on-chip whose tiles each
// have a FlitZip network interface (flitzip_ni) and a virtual-channel router
// (noc_router). This is the top of the design.
//
// Tile t = y*MESH_X + x sits at column x, row y (row 0 is the north edge).
// Each router's north, east, south and west ports are joined to the
// neighbouring routers by point-to-point links: flit, VC number and valid
// one way, credit and VC number the other way. Ports at the edge of the mesh
// are left unconnected (tied to idle), since XY routing never uses them.
// Each router's local port connects to the NI of its tile: the NI's
// net_out feeds the router's local input and the router's local output
// feeds the NI's net_in.
//
// The processor side of every tile is brought out: tx_* sends a packet
// (head-flit control fields plus, for a reply, a 64-byte block), rx_*
// delivers a received packet after decompression. The Dest field of the
// header names the destination tile, Src the sender. The per-tile
// compressor status outputs are brought out as well.
//
// The default size, 8x8 tiles with 5 VCs of 4 flits per input port, is the
// configuration the design was evaluated in. The cores and caches that would
// drive the processor side are not part of it.
module flitzip_mesh
  import flitzip_pkg::*;
#(
  parameter int unsigned MESH_X    = 8,
  parameter int unsigned MESH_Y    = 8,
  parameter int unsigned NUM_VC    = 5,
  parameter int unsigned BUF_DEPTH = 4,
  localparam int unsigned NT       = MESH_X * MESH_Y
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            tx_valid [NT],
  output logic                            tx_ready [NT],
  input  hdr_ctrl_t                       tx_hdr   [NT],
  input  logic [NUM_BODY-1:0][FLIT_W-1:0] tx_body  [NT],
  output logic                            rx_valid [NT],
  input  logic                            rx_ready [NT],
  output hdr_ctrl_t                       rx_hdr   [NT],
  output logic [NUM_BODY-1:0][FLIT_W-1:0] rx_body  [NT],
  output logic                            stat_valid      [NT],
  output logic                            stat_compressed [NT],
  output logic [$clog2(NUM_BODY+1)-1:0]   stat_body_flits [NT]
);
  localparam int unsigned VCW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  // router outputs, per tile and direction (0 N, 1 E, 2 S, 3 W)
  logic  [3:0]    o_valid [NT];
  flit_t          o_flit  [NT][4];
  logic [VCW-1:0] o_vc    [NT][4];
  logic  [3:0]    c_valid [NT];
  logic [VCW-1:0] c_vc    [NT][4];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_row
    for (genvar x = 0; x < MESH_X; x++) begin : g_col
      localparam int unsigned T = y * MESH_X + x;

      logic  [3:0]    i_valid;
      flit_t          i_flit  [4];
      logic [VCW-1:0] i_vc    [4];
      logic  [3:0]    ci_valid;
      logic [VCW-1:0] ci_vc   [4];

      // neighbour in direction d and the port of it that faces this tile
      for (genvar d = 0; d < 4; d++) begin : g_dir
        localparam bit HAS = (d == 0) ? (y > 0) : (d == 1) ? (x < MESH_X - 1) :
                             (d == 2) ? (y < MESH_Y - 1) : (x > 0);
        localparam int unsigned NBT = (d == 0) ? T - MESH_X : (d == 1) ? T + 1 :
                                      (d == 2) ? T + MESH_X : T - 1;
        localparam int unsigned OPP = (d + 2) % 4;
        if (HAS) begin : g_link
          assign i_valid[d]  = o_valid[NBT][OPP];
          assign i_flit[d]   = o_flit[NBT][OPP];
          assign i_vc[d]     = o_vc[NBT][OPP];
          assign ci_valid[d] = c_valid[NBT][OPP];
          assign ci_vc[d]    = c_vc[NBT][OPP];
        end else begin : g_edge
          assign i_valid[d]  = 1'b0;
          assign i_flit[d]   = '0;
          assign i_vc[d]     = '0;
          assign ci_valid[d] = 1'b0;
          assign ci_vc[d]    = '0;
        end
      end

      logic  ni_out_valid, ni_out_ready, ni_in_valid, ni_in_ready;
      flit_t ni_out_flit, ni_in_flit;

      flitzip_ni u_ni (
        .clk            (clk),
        .rst_n          (rst_n),
        .tx_valid       (tx_valid[T]),
        .tx_ready       (tx_ready[T]),
        .tx_hdr         (tx_hdr[T]),
        .tx_body        (tx_body[T]),
        .rx_valid       (rx_valid[T]),
        .rx_ready       (rx_ready[T]),
        .rx_hdr         (rx_hdr[T]),
        .rx_body        (rx_body[T]),
        .net_out_valid  (ni_out_valid),
        .net_out_ready  (ni_out_ready),
        .net_out_flit   (ni_out_flit),
        .net_in_valid   (ni_in_valid),
        .net_in_ready   (ni_in_ready),
        .net_in_flit    (ni_in_flit),
        .stat_valid     (stat_valid[T]),
        .stat_compressed(stat_compressed[T]),
        .stat_body_flits(stat_body_flits[T]),
        .stat_enc       (),
        .ejq_count      (),
        .inq_count      ()
      );

      noc_router #(
        .MESH_X(MESH_X), .MESH_Y(MESH_Y), .X(x), .Y(y),
        .NUM_VC(NUM_VC), .BUF_DEPTH(BUF_DEPTH)
      ) u_router (
        .clk          (clk),
        .rst_n        (rst_n),
        .in_valid     (i_valid),
        .in_flit      (i_flit),
        .in_vc        (i_vc),
        .cr_out_valid (c_valid[T]),
        .cr_out_vc    (c_vc[T]),
        .out_valid    (o_valid[T]),
        .out_flit     (o_flit[T]),
        .out_vc       (o_vc[T]),
        .cr_in_valid  (ci_valid),
        .cr_in_vc     (ci_vc),
        .loc_in_valid (ni_out_valid),
        .loc_in_ready (ni_out_ready),
        .loc_in_flit  (ni_out_flit),
        .loc_out_valid(ni_in_valid),
        .loc_out_ready(ni_in_ready),
        .loc_out_flit (ni_in_flit)
      );
    end
  end
endmodule
