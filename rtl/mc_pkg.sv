// mc_pkg: types and constants shared by the PicoBlaze multiprocessor fabric.
//
// A PicoBlaze talks to the outside world only through its I/O bus: an 8-bit
// port_id, an 8-bit out_port with a one-cycle write_strobe, and an 8-bit
// in_port that it samples at the end of a one-cycle read_strobe. pb_io_t
// bundles the processor-driven half of that bus so that arrays of processors
// can be passed through ports as plain packed structs.
//
// The port numbers of the four-FIFO wrapper follow the published wrapper
// decode: ports 0-3 read the FIFOs, 4-7 read their full/empty flags, 8-11
// read a neighbour's flags, and an OUTPUT selects one of the four output
// latches by port_id[1:0]. Note that the two sides are ordered differently:
// the input FIFOs are west, south, diagonal, east, while the output latches
// are west, east, diagonal, south.
package mc_pkg;

  localparam int unsigned DATA_W = 8;   // PicoBlaze datapath width
  localparam int unsigned NDIR   = 4;   // links per wrapper

  // Processor-driven half of a PicoBlaze I/O bus.
  typedef struct packed {
    logic [7:0] port_id;
    logic [7:0] out_port;
    logic       write_strobe;
    logic       read_strobe;
  } pb_io_t;

  localparam pb_io_t PB_IDLE = '{port_id: 8'h00, out_port: 8'h00,
                                 write_strobe: 1'b0, read_strobe: 1'b0};

  // Input FIFO index (= port_id[1:0] of the FIFO data ports 0..3).
  typedef enum logic [1:0] {
    IN_WEST = 2'd0,
    IN_SOUTH = 2'd1,
    IN_DIAG = 2'd2,
    IN_EAST = 2'd3
  } in_dir_e;

  // Output latch index (= port_id[1:0] of an OUTPUT instruction).
  typedef enum logic [1:0] {
    OUT_WEST = 2'd0,
    OUT_EAST = 2'd1,
    OUT_DIAG = 2'd2,
    OUT_SOUTH = 2'd3
  } out_dir_e;

  // Wrapper input port map (port_id[3:0]); anything else reads as zero.
  localparam logic [3:0] P_FIFO_DATA  = 4'h0;  // 0..3: FIFO data, pops the FIFO
  localparam logic [3:0] P_FIFO_FLAGS = 4'h4;  // 4..7: {000000, full, empty}
  localparam logic [3:0] P_NBR_STATUS = 4'h8;  // 8..11: neighbour status inputs

  // FIFO status byte as read by a processor.
  function automatic logic [7:0] status_byte(input logic full, input logic empty);
    return {6'b0, full, empty};
  endfunction

endpackage
