// mp_top: the two inter-processor communication schemes for PicoBlaze
// arrays, side by side.
//
//  * Mailbox (FIFO) scheme: a clock divider makes the slow array clock from
//    the board clock, and fir_array holds fourteen four-FIFO tiles wired as
//    a 4-tap FIR filter. count_array, five more tiles on the same clock, is
//    the counting experiment that checks tiles, FIFOs and flags. fifo_link
//    is the minimal form of the same idea, two processors and one FIFO.
//  * Shared-memory scheme: shm_system, four processors reaching one data
//    memory over a common bus under a round-robin bus arbiter.
//
// The processors and their program memories are not part of this RTL: each
// processor's I/O bus is a port (fir_pb / fir_in_port and so on), so that
// processor cores, or a testbench, can be attached. The FIR tiles run on
// fir_clk (clk190, board clock / 2**(CLK190_BIT+1)), which is brought out
// for the processors attached to them, and so do the counting tiles; shm_system and fifo_link run on the
// board clock. rst resets everything asynchronously (the board button).
//
// led shows the Y[2] output of the filter, as on the original board.
module mp_top
  import mc_pkg::*;
#(
  parameter int unsigned CLK190_BIT  = 17,
  parameter int unsigned FIFO_ADDR_W = 4,
  parameter int unsigned SHM_ADDR_W  = 7
) (
  input  logic            clk,
  input  logic            rst,
  // FIR array
  output logic            fir_clk,
  output logic            clk48,
  input  pb_io_t          fir_pb      [14],
  output logic [7:0]      fir_in_port [14],
  output logic [3:0][7:0] fir_y,
  output logic [3:0]      fir_y_strobe,
  output logic [7:0]      led,
  // counting experiment (index 0..4 = PB1..PB5)
  input  pb_io_t          cnt_pb      [5],
  output logic [7:0]      cnt_in_port [5],
  output logic [7:0]      cnt_out,
  output logic            cnt_out_strobe,
  // shared memory system
  input  pb_io_t          shm_pb      [4],
  output logic [7:0]      shm_in_port [4],
  output logic [3:0]      shm_grant,
  // two-processor FIFO link
  input  pb_io_t          link_pb1,
  output logic [7:0]      link_pb1_in_port,
  input  pb_io_t          link_pb2,
  output logic [7:0]      link_pb2_in_port,
  input  logic [7:0]      link_sw,
  input  logic            link_btn,
  output logic [7:0]      link_led
);

  clkdiv #(.CLK190_BIT(CLK190_BIT)) u_clkdiv (
    .mclk   (clk),
    .clr    (rst),
    .clk190 (fir_clk),
    .clk48  (clk48)
  );

  fir_array #(.FIFO_ADDR_W(FIFO_ADDR_W)) u_fir (
    .clk      (fir_clk),
    .rst      (rst),
    .pb       (fir_pb),
    .in_port  (fir_in_port),
    .y        (fir_y),
    .y_strobe (fir_y_strobe)
  );

  assign led = fir_y[2];

  count_array #(.FIFO_ADDR_W(FIFO_ADDR_W)) u_count (
    .clk        (fir_clk),
    .rst        (rst),
    .pb         (cnt_pb),
    .in_port    (cnt_in_port),
    .out        (cnt_out),
    .out_strobe (cnt_out_strobe)
  );

  shm_system #(.M(4), .ADDR_W(SHM_ADDR_W)) u_shm (
    .clk     (clk),
    .rst     (rst),
    .pb      (shm_pb),
    .in_port (shm_in_port),
    .grant   (shm_grant)
  );

  fifo_link #(.FIFO_ADDR_W(FIFO_ADDR_W)) u_link (
    .clk         (clk),
    .rst         (rst),
    .pb1         (link_pb1),
    .pb1_in_port (link_pb1_in_port),
    .pb2         (link_pb2),
    .pb2_in_port (link_pb2_in_port),
    .sw          (link_sw),
    .btn         (link_btn),
    .led         (link_led)
  );

endmodule
