// count_array: five four-FIFO tiles wired for the counting experiment, a
// check of the FIFOs, their flags and the strobe wiring between tiles.
//
// Four sender tiles each feed one input FIFO of a destination tile (PB4):
//   PB1 diagonal output -> PB4 diagonal FIFO
//   PB2 south output    -> PB4 south FIFO
//   PB3 east output     -> PB4 east FIFO
//   PB5 west output     -> PB4 west FIFO
// Each link carries the sender's output latch and its write strobe (the
// FIFO's wr). Going the other way, the flags of each PB4 input FIFO are
// wired to the neighbour-status input of its sender, so that the sender can
// test "full" before it writes: PB5, PB2, PB1 and PB3 see the flags of the
// west, south, diagonal and east FIFO on their status ports 08, 09, 0A and
// 0B. With senders counting 1, 5, 9 ... / 2, 6, ... / 3, 7, ... / 4, 8, ...
// and PB4 reading west, south, diagonal, east in turn, PB4 puts out 1, 2,
// 3, 4, ... on its west output latch (OUTPUT port 00), brought out as
// out / out_strobe.
//
// Interface: pb / in_port are the five processors' I/O buses, index 0..4 for
// PB1..PB5; clk is the array clock; rst empties all FIFOs.
//
// The data links follow the published experiment setup; which status port
// of a sender carries which FIFO's flags is read from the senders' programs
// (each tests the flag port 08 + the index of its target FIFO). Unused
// inputs are tied to zero; those are this design's own choices.
module count_array
  import mc_pkg::*;
#(
  parameter int unsigned FIFO_ADDR_W = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  pb_io_t     pb      [5],
  output logic [7:0] in_port [5],
  output logic [7:0] out,
  output logic       out_strobe
);

  typedef enum int {PB1 = 0, PB2 = 1, PB3 = 2, PB4 = 3, PB5 = 4} tile_e;

  logic [NDIR-1:0][7:0] din       [5];
  logic [NDIR-1:0]      ws_in     [5];
  logic [NDIR-1:0][7:0] dout      [5];
  logic [NDIR-1:0]      ws_out    [5];
  logic [NDIR-1:0][7:0] status    [5];
  logic [NDIR-1:0][7:0] status_in [5];

  for (genvar n = 0; n < 5; n++) begin : g_tile
    pb_wrapper #(.FIFO_ADDR_W(FIFO_ADDR_W)) u_tile (
      .clk       (clk),
      .rst       (rst),
      .pb        (pb[n]),
      .in_port   (in_port[n]),
      .din       (din[n]),
      .ws_in     (ws_in[n]),
      .dout      (dout[n]),
      .ws_out    (ws_out[n]),
      .status    (status[n]),
      .status_in (status_in[n])
    );
  end

  // Sender tile and its output latch for each input FIFO of PB4.
  localparam tile_e     SRC_TILE [NDIR] = '{PB5, PB2, PB1, PB3};  // W, S, D, E
  localparam out_dir_e  SRC_DIR  [NDIR] = '{OUT_WEST, OUT_SOUTH, OUT_DIAG, OUT_EAST};

  always_comb begin
    for (int n = 0; n < 5; n++) begin
      din[n]       = '0;
      ws_in[n]     = '0;
      status_in[n] = '0;
    end
    for (int i = 0; i < NDIR; i++) begin
      din[PB4][i]   = dout[SRC_TILE[i]][SRC_DIR[i]];
      ws_in[PB4][i] = ws_out[SRC_TILE[i]][SRC_DIR[i]];
      status_in[SRC_TILE[i]][i] = status[PB4][i];
    end
  end

  assign out        = dout[PB4][OUT_WEST];
  assign out_strobe = ws_out[PB4][OUT_WEST];

endmodule
