// fir_array: fourteen four-FIFO tiles wired as a 4-tap FIR filter
//   Y[i] = sum_j A[j] * U[i-j]
// laid out on a 5 x 4 grid from which six unused tiles are left out.
//
// Tiles U0..U3 are sources: each streams samples of one input U[k] out of
// its south port. Tiles P1..P10 are identical multiply-accumulate stages:
// each waits until its south, east and diagonal FIFOs hold a byte, forms
//   diagonal_out = diagonal_in + south_in * east_in
// and passes south_in on to the south and east_in on to the east. Input
// samples flow down the columns, coefficients flow east along the rows and
// partial sums flow south-east along the diagonals, so the diagonal outputs
// of the bottom row P7..P10 are Y[0]..Y[3]:
//
//   row 0: U0
//   row 1: P1(A3)  U1
//   row 2: P2(A2)  P3   U2
//   row 3: P4(A1)  P5   P6   U3
//   row 4: P7(A0)  P8   P9   P10
//           Y0     Y1   Y2   Y3
//
// The coefficient and zero partial sum entering the left column are
// constants; they are written into the east and diagonal FIFOs of a
// left-column tile by the same strobe that delivers its south input, so all
// three FIFOs of a tile fill in step. All connections are taken from the
// published array; the processors run programs and are outside this module,
// reached through pb / in_port (index = node_e). Links that the original
// leaves unconnected (west inputs, the U tiles' inputs, neighbour status)
// are tied to zero here.
//
// Interface: clk is the array clock (clk190 in the original), rst empties all
// FIFOs. y / y_strobe are the diagonal outputs of P7..P10 and the strobe
// that accompanies each new value.
module fir_array
  import mc_pkg::*;
#(
  parameter int unsigned FIFO_ADDR_W = 4,
  parameter logic [7:0]  A0 = 8'd2,
  parameter logic [7:0]  A1 = 8'd1,
  parameter logic [7:0]  A2 = 8'd3,
  parameter logic [7:0]  A3 = 8'd2
) (
  input  logic            clk,
  input  logic            rst,
  input  pb_io_t          pb      [14],
  output logic [7:0]      in_port [14],
  output logic [3:0][7:0] y,
  output logic [3:0]      y_strobe
);

  typedef enum int {
    U0 = 0, U1 = 1, U2 = 2, U3 = 3,
    P1 = 4, P2 = 5, P3 = 6, P4 = 7, P5 = 8,
    P6 = 9, P7 = 10, P8 = 11, P9 = 12, P10 = 13
  } node_e;

  logic [NDIR-1:0][7:0] din    [14];
  logic [NDIR-1:0]      ws_in  [14];
  logic [NDIR-1:0][7:0] dout   [14];
  logic [NDIR-1:0]      ws_out [14];
  logic [NDIR-1:0][7:0] status [14];

  for (genvar n = 0; n < 14; n++) begin : g_tile
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
      .status_in ('0)
    );
  end

  // Link from node src's output latch o into node dst's input FIFO i.
  `define FIR_LINK(dst, i, src, o) \
    assign din[dst][i] = dout[src][o]; \
    assign ws_in[dst][i] = ws_out[src][o];
  // Constant byte into node dst's input FIFO i, written by src's strobe o.
  `define FIR_CONST(dst, i, value, src, o) \
    assign din[dst][i] = value; \
    assign ws_in[dst][i] = ws_out[src][o];
  // Unused input.
  `define FIR_OPEN(dst, i) \
    assign din[dst][i] = '0; \
    assign ws_in[dst][i] = 1'b0;

  // Source tiles have no inputs.
  for (genvar n = U0; n <= U3; n++) begin : g_src_open
    for (genvar i = 0; i < NDIR; i++) begin : g_in
      `FIR_OPEN(n, i)
    end
  end
  // No tile uses its west input.
  for (genvar n = P1; n <= P10; n++) begin : g_west_open
    `FIR_OPEN(n, IN_WEST)
  end

  // South inputs: samples U[k] moving down the columns.
  `FIR_LINK(P1,  IN_SOUTH, U0, OUT_SOUTH)
  `FIR_LINK(P2,  IN_SOUTH, P1, OUT_SOUTH)
  `FIR_LINK(P3,  IN_SOUTH, U1, OUT_SOUTH)
  `FIR_LINK(P4,  IN_SOUTH, P2, OUT_SOUTH)
  `FIR_LINK(P5,  IN_SOUTH, P3, OUT_SOUTH)
  `FIR_LINK(P6,  IN_SOUTH, U2, OUT_SOUTH)
  `FIR_LINK(P7,  IN_SOUTH, P4, OUT_SOUTH)
  `FIR_LINK(P8,  IN_SOUTH, P5, OUT_SOUTH)
  `FIR_LINK(P9,  IN_SOUTH, P6, OUT_SOUTH)
  `FIR_LINK(P10, IN_SOUTH, U3, OUT_SOUTH)

  // East inputs: coefficients moving along the rows.
  `FIR_CONST(P1, IN_EAST, A3, U0, OUT_SOUTH)
  `FIR_CONST(P2, IN_EAST, A2, P1, OUT_SOUTH)
  `FIR_LINK (P3, IN_EAST, P2, OUT_EAST)
  `FIR_CONST(P4, IN_EAST, A1, P2, OUT_SOUTH)
  `FIR_LINK (P5, IN_EAST, P4, OUT_EAST)
  `FIR_LINK (P6, IN_EAST, P5, OUT_EAST)
  `FIR_CONST(P7, IN_EAST, A0, P4, OUT_SOUTH)
  `FIR_LINK (P8, IN_EAST, P7, OUT_EAST)
  `FIR_LINK (P9, IN_EAST, P8, OUT_EAST)
  `FIR_LINK (P10, IN_EAST, P9, OUT_EAST)

  // Diagonal inputs: partial sums moving south-east.
  `FIR_CONST(P1, IN_DIAG, 8'h00, U0, OUT_SOUTH)
  `FIR_CONST(P2, IN_DIAG, 8'h00, P1, OUT_SOUTH)
  `FIR_LINK (P3, IN_DIAG, P1, OUT_DIAG)
  `FIR_CONST(P4, IN_DIAG, 8'h00, P2, OUT_SOUTH)
  `FIR_LINK (P5, IN_DIAG, P2, OUT_DIAG)
  `FIR_LINK (P6, IN_DIAG, P3, OUT_DIAG)
  `FIR_CONST(P7, IN_DIAG, 8'h00, P4, OUT_SOUTH)
  `FIR_LINK (P8, IN_DIAG, P4, OUT_DIAG)
  `FIR_LINK (P9, IN_DIAG, P5, OUT_DIAG)
  `FIR_LINK (P10, IN_DIAG, P6, OUT_DIAG)

  `undef FIR_LINK
  `undef FIR_CONST
  `undef FIR_OPEN

  // Filter outputs: diagonal outputs of the bottom row.
  for (genvar k = 0; k < 4; k++) begin : g_y
    assign y[k]        = dout[P7 + k][OUT_DIAG];
    assign y_strobe[k] = ws_out[P7 + k][OUT_DIAG];
  end

endmodule
