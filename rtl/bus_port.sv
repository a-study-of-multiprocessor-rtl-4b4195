// bus_port: one processor's attachment to the shared memory bus.
//
// The processor reaches the bus through its I/O ports:
//   OUTPUT port 0x00        bit 0 of the byte sets (1) or clears (0) the bus
//                           request sent to the arbiter
//   INPUT  port 0x00        reads {0000000, grant}
//   OUTPUT port 0x80..0xFF  writes the byte to shared address port_id[6:0]
//   INPUT  port 0x80..0xFF  reads shared address port_id[6:0]
//   other ports            read as zero, written without effect
// While grant is high this port drives the processor's address (port_id)
// and data (out_port) onto the shared buses, and its write strobe onto the
// memory's write enable; while grant is low it drives zeros, so the buses
// are the OR of all ports' drivers. This is the tri-state buffer of the
// original, built as an AND-OR so that it stays inside the FPGA fabric.
// Clearing the request while granted ends the tenure: ack pulses for one
// cycle and the arbiter moves the token on. ack looks at the grant of the
// cycle before (granted), not at grant itself, because the arbiter's grant
// depends on ack; a processor only clears its request after it has read
// its grant, so the two agree whenever it matters.
//
// Protocol: request, poll grant until it reads 1, access memory, clear the
// request. A memory write without grant is a protocol error (assertion).
//
// The request/grant handshake over I/O ports and the buffered connection to
// the address and data buses follow the published system; the port numbers
// and the 128-byte window are this design's own.
module bus_port
  import mc_pkg::*;
#(
  parameter int unsigned ADDR_W = 7
) (
  input  logic              clk,
  input  logic              rst,
  input  pb_io_t            pb,
  output logic [7:0]        in_port,
  // arbiter
  output logic              req,
  input  logic              grant,
  output logic              ack,
  // shared bus drivers (zero when not granted)
  output logic [ADDR_W-1:0] addr_drv,
  output logic [7:0]        data_drv,
  output logic              we_drv,
  // memory output bus
  input  logic [7:0]        mem_data
);

  localparam logic [7:0] P_REQ = 8'h00;

  logic mem_sel, ctl_wr, granted;

  assign mem_sel = pb.port_id[7];
  assign ctl_wr  = pb.write_strobe && pb.port_id == P_REQ;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) req <= 1'b0;
    else if (ctl_wr) req <= pb.out_port[0];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) granted <= 1'b0;
    else     granted <= grant;
  end

  assign ack = ctl_wr && !pb.out_port[0] && req && granted;

  assign addr_drv = grant ? pb.port_id[ADDR_W-1:0] : '0;
  assign data_drv = grant ? pb.out_port : '0;
  assign we_drv   = grant && pb.write_strobe && mem_sel;

  always_comb begin
    if (mem_sel)              in_port = mem_data;
    else if (pb.port_id == P_REQ) in_port = {7'b0, grant};
    else                      in_port = 8'h00;
  end

  a_write_needs_grant: assert property (@(posedge clk) disable iff (rst)
      (pb.write_strobe && mem_sel) |-> grant)
    else $error("bus_port: shared memory written without grant");

endmodule
