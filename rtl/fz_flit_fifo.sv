// fz_flit_fifo: first-in first-out flit queue, used in the network interface
// as the eject queue (compressed packets waiting for the network) and as the
// inject queue (flits arriving from the network, waiting for the
// decompressor).
//
// A circular buffer of DEPTH entries of W bits with a read and a write
// pointer and an occupancy count. Valid/ready on both sides: a write is taken
// when in_valid && in_ready (in_ready = not full), a read when
// out_valid && out_ready (out_valid = not empty). The head entry is read
// straight from the array, so a flit written at one edge can leave at the
// next. A write and a read may happen in the same cycle, also when full.
// The queues themselves follow the design; depth, width and handshake are
// own choices (depth defaults to one uncompressed packet, 5 flits).
module fz_flit_fifo #(
  parameter int unsigned W     = 130,
  parameter int unsigned DEPTH = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic          wr, rd;

  assign out_valid = count != '0;
  assign in_ready  = (count != ($clog2(DEPTH+1))'(DEPTH)) || out_ready;
  assign wr        = in_valid && in_ready;
  assign rd        = out_valid && out_ready;
  assign out_data  = mem[rp];

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr) wp <= nxt(wp);
      if (rd) rp <= nxt(rp);
      count <= count + ($clog2(DEPTH+1))'(wr) - ($clog2(DEPTH+1))'(rd);
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wp] <= in_data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= ($clog2(DEPTH+1))'(DEPTH));
endmodule
