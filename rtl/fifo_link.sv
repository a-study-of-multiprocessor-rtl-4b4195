// fifo_link: two processors joined by a single FIFO mailbox.
//
// The producer (PB1) writes the FIFO with its write strobe: whatever it
// sends on out_port is queued. The consumer (PB2) pops the FIFO by reading
// its data port. Each processor has an input multiplexer selected by
// port_id, through which it can poll the FIFO flags before it writes or
// reads, so neither side has to run in step with the other:
//   PB1 INPUT  0x01  {000000, full, empty}    0x02  switches sw
//   PB2 INPUT  0x01  {000000, full, empty}    0x02  FIFO head (pops it)
//             0x04  {0000000, btn}
//   PB1 OUTPUT any port: queued in the FIFO
//   PB2 OUTPUT 0x06: loads the led register
// Other input ports read as zero. FIFO timing is that of fifo: the head is
// combinational, a read is taken at the edge that ends PB2's read strobe.
//
// The single FIFO, the strobes that drive wr and rd and the flag byte on the
// input multiplexers follow the published two-processor set-up and the port
// numbers follow its programs. Two points are this design's own: rd is
// gated with PB2's FIFO port, because the consumer program polls the flags
// through the same read strobe and an ungated strobe would drop a byte on
// every poll; and PB2's output is held in an led register.
module fifo_link
  import mc_pkg::*;
#(
  parameter int unsigned FIFO_ADDR_W = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  pb_io_t     pb1,
  output logic [7:0] pb1_in_port,
  input  pb_io_t     pb2,
  output logic [7:0] pb2_in_port,
  input  logic [7:0] sw,
  input  logic       btn,
  output logic [7:0] led
);

  localparam logic [7:0] P_FLAGS = 8'h01;
  localparam logic [7:0] P_DATA  = 8'h02;  // switches on PB1, FIFO on PB2
  localparam logic [7:0] P_BTN   = 8'h04;
  localparam logic [7:0] P_LED   = 8'h06;

  logic [7:0] r_data, flags;
  logic       empty, full, rd;

  assign rd = pb2.read_strobe && pb2.port_id == P_DATA;

  fifo #(.DATA_W(8), .ADDR_W(FIFO_ADDR_W)) u_fifo (
    .clk    (clk),
    .rst    (rst),
    .rd     (rd),
    .wr     (pb1.write_strobe),
    .w_data (pb1.out_port),
    .r_data (r_data),
    .empty  (empty),
    .full   (full)
  );

  assign flags = status_byte(full, empty);

  always_comb begin
    unique case (pb1.port_id)
      P_FLAGS: pb1_in_port = flags;
      P_DATA:  pb1_in_port = sw;
      default: pb1_in_port = 8'h00;
    endcase
    unique case (pb2.port_id)
      P_FLAGS: pb2_in_port = flags;
      P_DATA:  pb2_in_port = r_data;
      P_BTN:   pb2_in_port = {7'b0, btn};
      default: pb2_in_port = 8'h00;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) led <= 8'h00;
    else if (pb2.write_strobe && pb2.port_id == P_LED) led <= pb2.out_port;
  end

endmodule
