// shm_system: M processors sharing one data memory over a common bus.
//
// Every processor has a bus_port. The ports' requests go to a round-robin
// bus arbiter, whose one-hot grant decides which port drives the shared
// address bus, data bus and write enable (the buses are the OR of the
// ports' drivers, which are zero unless granted). The memory's output bus
// goes back to every port, and a processor reads it through an INPUT from
// the memory window. When the granted processor clears its request the
// port pulses ack and the arbiter passes the token on. Only one processor
// reaches the memory in any cycle; which one is fair in ring order.
//
// Interface: pb / in_port are the processors' I/O buses (see bus_port for
// the port map); grant is brought out for observation; rst asynchronous,
// active high. One clock for everything.
//
// The structure (four processors, bus arbiter with request/grant per
// processor, buffered address and data buses, one shared memory) follows the
// published system; the memory size and port map are this design's own.
module shm_system
  import mc_pkg::*;
#(
  parameter int unsigned M      = 4,
  parameter int unsigned ADDR_W = 7
) (
  input  logic         clk,
  input  logic         rst,
  input  pb_io_t       pb      [M],
  output logic [7:0]   in_port [M],
  output logic [M-1:0] grant
);

  logic [M-1:0]        req, ack;
  logic [ADDR_W-1:0]   addr_drv [M];
  logic [7:0]          data_drv [M];
  logic [M-1:0]        we_drv;
  logic [ADDR_W-1:0]   addr_bus;
  logic [7:0]          data_bus, mem_data;
  logic                we_bus;

  for (genvar i = 0; i < M; i++) begin : g_port
    bus_port #(.ADDR_W(ADDR_W)) u_port (
      .clk      (clk),
      .rst      (rst),
      .pb       (pb[i]),
      .in_port  (in_port[i]),
      .req      (req[i]),
      .grant    (grant[i]),
      .ack      (ack[i]),
      .addr_drv (addr_drv[i]),
      .data_drv (data_drv[i]),
      .we_drv   (we_drv[i]),
      .mem_data (mem_data)
    );
  end

  always_comb begin
    addr_bus = '0;
    data_bus = '0;
    for (int i = 0; i < M; i++) begin
      addr_bus |= addr_drv[i];
      data_bus |= data_drv[i];
    end
  end
  assign we_bus = |we_drv;

  rr_arbiter #(.M(M)) u_arb (
    .clk   (clk),
    .rst   (rst),
    .req   (req),
    .ack   (|ack),
    .grant (grant)
  );

  shared_mem #(.ADDR_W(ADDR_W)) u_mem (
    .clk      (clk),
    .write_en (we_bus),
    .address  (addr_bus),
    .data_in  (data_bus),
    .data_out (mem_data)
  );

endmodule
