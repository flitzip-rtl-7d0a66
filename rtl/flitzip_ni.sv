// flitzip_ni: network interface of one tile with FlitZip packet compression.
//
// Outbound: a packet from the processor side (head-flit control fields and,
// for a reply, a 64-byte cache block as NUM_BODY 128-bit flits) is
// compressed by fz_packet_compressor, which writes the per-flit (encoding,
// base) metadata into the unused low bits of the head flit and sends only
// the compressed payload, cut into as few body flits as it needs. The flits
// wait in the eject queue and leave on net_out_* one per cycle.
// Inbound: flits from the network (net_in_*) wait in the inject queue;
// fz_packet_decompressor reads the metadata from the head flit, rebuilds the
// body flits with its single flit decompressor as they arrive and hands the
// original packet to the processor side.
//
// Interfaces: valid/ready everywhere. net_*_flit carry the 128-bit flit and
// a 2-bit flit type (head, body, tail, head-tail). The router, the links and
// the rest of the tile (core, caches) are outside this module.
// Timing: compression adds two cycles before the head flit enters the eject
// queue; decompression adds one cycle after the last flit when only the last
// original flit still waits for data.
//
// Following the design: one compressor and one decompressor per tile, placed
// between the processor side and the two NI queues. Own choices: queue depth
// (one uncompressed packet) and the handshakes.
module flitzip_ni
  import flitzip_pkg::*;
#(
  parameter int unsigned NB        = NUM_BODY,
  parameter int unsigned EJQ_DEPTH = NUM_BODY + 1,
  parameter int unsigned INQ_DEPTH = NUM_BODY + 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // processor side, packets to send
  input  logic                      tx_valid,
  output logic                      tx_ready,
  input  hdr_ctrl_t                 tx_hdr,
  input  logic [NB-1:0][FLIT_W-1:0] tx_body,
  // processor side, packets received
  output logic                      rx_valid,
  input  logic                      rx_ready,
  output hdr_ctrl_t                 rx_hdr,
  output logic [NB-1:0][FLIT_W-1:0] rx_body,
  // network side
  output logic                      net_out_valid,
  input  logic                      net_out_ready,
  output flit_t                     net_out_flit,
  input  logic                      net_in_valid,
  output logic                      net_in_ready,
  input  flit_t                     net_in_flit,
  // compressor status, one pulse per packet
  output logic                      stat_valid,
  output logic                      stat_compressed,
  output logic [$clog2(NB+1)-1:0]   stat_body_flits,
  output logic [NB-1:0][ENC_W-1:0]  stat_enc,
  // queue occupancy in flits
  output logic [$clog2(EJQ_DEPTH+1)-1:0] ejq_count,
  output logic [$clog2(INQ_DEPTH+1)-1:0] inq_count
);
  localparam int unsigned FW = $bits(flit_t);

  logic  c_valid, c_ready;
  flit_t c_flit;
  logic  d_valid, d_ready;
  flit_t d_flit;

  fz_packet_compressor #(.NB(NB)) u_comp (
    .clk            (clk),
    .rst_n          (rst_n),
    .in_valid       (tx_valid),
    .in_ready       (tx_ready),
    .in_hdr         (tx_hdr),
    .in_body        (tx_body),
    .out_valid      (c_valid),
    .out_ready      (c_ready),
    .out_flit       (c_flit),
    .stat_valid     (stat_valid),
    .stat_compressed(stat_compressed),
    .stat_body_flits(stat_body_flits),
    .stat_enc       (stat_enc)
  );

  // eject queue: compressed flits towards the network
  fz_flit_fifo #(.W(FW), .DEPTH(EJQ_DEPTH)) u_eject_q (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (c_valid),
    .in_ready (c_ready),
    .in_data  (c_flit),
    .out_valid(net_out_valid),
    .out_ready(net_out_ready),
    .out_data (net_out_flit),
    .count    (ejq_count)
  );

  // inject queue: flits from the network towards the decompressor
  fz_flit_fifo #(.W(FW), .DEPTH(INQ_DEPTH)) u_inject_q (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (net_in_valid),
    .in_ready (net_in_ready),
    .in_data  (net_in_flit),
    .out_valid(d_valid),
    .out_ready(d_ready),
    .out_data (d_flit),
    .count    (inq_count)
  );

  fz_packet_decompressor #(.NB(NB)) u_decomp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (d_valid),
    .in_ready (d_ready),
    .in_flit  (d_flit),
    .out_valid(rx_valid),
    .out_ready(rx_ready),
    .out_hdr  (rx_hdr),
    .out_body (rx_body)
  );
endmodule
