// pb_wrapper: the four-FIFO wrapper that turns one PicoBlaze into a tile of
// a nearest-neighbour processor array.
//
// Each tile receives bytes from four neighbours (west, south, south-east
// "diagonal" and east). Every incoming link has its own FIFO, written by the
// sending neighbour's write strobe, so a sender never waits for the receiver
// until that FIFO fills. The processor sees the tile only through its I/O
// bus:
//   INPUT  port 0..3   head of the west/south/diagonal/east FIFO; the read
//                      strobe on these ports pops the FIFO
//   INPUT  port 4..7   {000000, full, empty} of those four FIFOs
//   INPUT  port 8..11  the four status bytes of neighbouring tiles
//   INPUT  other       zero            (decode on port_id[3:0])
//   OUTPUT port_id[1:0] = 0/1/2/3 loads the west/east/diagonal/south output
//                      latch and pulses the matching outgoing write strobe
// The status bytes of this tile's own FIFOs are also driven out (status) so
// that a neighbour can test for room before it writes.
//
// Timing. An OUTPUT loads its latch at the rising edge that ends the
// processor's write_strobe cycle; the outgoing strobe ws_out is registered at
// the same edge, so data and strobe reach the neighbour together, one cycle
// long, and the neighbour's FIFO takes the byte at the following edge. An
// INPUT returns the FIFO head combinationally; the FIFO advances at the edge
// that ends the read_strobe cycle, which is where the processor captures
// in_port. rst (the board button in the original) empties all four FIFOs.
//
// The port map, the FIFO-per-input structure, the four output latches and
// the strobe forwarding follow the published wrapper. The processor itself
// and its program ROM are outside this module: the processor's I/O bus is a
// port (pb / in_port). Registering the outgoing strobe with the data latch is
// this design's reading of a clocked latch process in the original.
module pb_wrapper
  import mc_pkg::*;
#(
  parameter int unsigned FIFO_ADDR_W = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  // processor I/O bus
  input  pb_io_t                     pb,
  output logic [7:0]                 in_port,
  // incoming links, indexed by in_dir_e (west, south, diagonal, east)
  input  logic [NDIR-1:0][7:0]       din,
  input  logic [NDIR-1:0]            ws_in,
  // outgoing links, indexed by out_dir_e (west, east, diagonal, south)
  output logic [NDIR-1:0][7:0]       dout,
  output logic [NDIR-1:0]            ws_out,
  // FIFO status bytes, own (by in_dir_e) and from neighbours
  output logic [NDIR-1:0][7:0]       status,
  input  logic [NDIR-1:0][7:0]       status_in
);

  logic [NDIR-1:0][7:0] fifo_out;
  logic [NDIR-1:0]      empty, full;
  logic [NDIR-1:0]      rv;      // FIFO read enables
  logic [NDIR-1:0]      en_d;    // output latch enables

  for (genvar k = 0; k < NDIR; k++) begin : g_fifo
    fifo #(.DATA_W(8), .ADDR_W(FIFO_ADDR_W)) u_fifo (
      .clk    (clk),
      .rst    (rst),
      .rd     (rv[k]),
      .wr     (ws_in[k]),
      .w_data (din[k]),
      .r_data (fifo_out[k]),
      .empty  (empty[k]),
      .full   (full[k])
    );
    assign status[k] = status_byte(full[k], empty[k]);
  end

  // Input multiplexer selected by port_id[3:0].
  always_comb begin
    unique case (pb.port_id[3:2])
      2'b00:   in_port = fifo_out[pb.port_id[1:0]];
      2'b01:   in_port = status[pb.port_id[1:0]];
      2'b10:   in_port = status_in[pb.port_id[1:0]];
      default: in_port = 8'h00;
    endcase
  end

  // Read-strobe decode: only the four FIFO data ports pop a FIFO.
  always_comb begin
    rv = '0;
    if (pb.read_strobe && pb.port_id[3:2] == 2'b00) rv[pb.port_id[1:0]] = 1'b1;
  end

  // Output decode on port_id[1:0].
  always_comb begin
    en_d = '0;
    if (pb.write_strobe) en_d[pb.port_id[1:0]] = 1'b1;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      dout   <= '0;
      ws_out <= '0;
    end else begin
      ws_out <= en_d;
      for (int k = 0; k < NDIR; k++)
        if (en_d[k]) dout[k] <= pb.out_port;
    end
  end

  a_strobes_exclusive: assert property (@(posedge clk) disable iff (rst)
      !(pb.read_strobe && pb.write_strobe))
    else $error("pb_wrapper: read and write strobe together");

endmodule
