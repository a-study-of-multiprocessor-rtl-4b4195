// tb_bus_port: one processor's bus interface, with the testbench as arbiter
// and memory. A processor model requests the bus, polls the grant port,
// writes and reads the memory window and releases the bus. Checked: the
// request register follows OUTPUT 0x00, the grant port reads the grant, the
// drivers are zero without grant and carry port_id[6:0], out_port and the
// write strobe with it, ack pulses once on release while granted and not
// on a release without grant, and a memory INPUT returns mem_data.
module tb_bus_port;
  import mc_pkg::*;
  localparam int ADDR_W = 7;

  logic clk = 1'b0, rst = 1'b0;
  initial #1 rst = 1'b1;  // a rising edge, so that the asynchronous reset acts
  pb_io_t pb;
  logic [7:0] in_port;
  logic req, grant = 1'b0, ack;
  logic [ADDR_W-1:0] addr_drv;
  logic [7:0] data_drv, mem_data = 8'h00;
  logic we_drv;
  int checks = 0, failures = 0;
  int n_ack = 0, n_we = 0;
  logic [ADDR_W-1:0] we_addr;
  logic [7:0] we_data;

  bus_port #(.ADDR_W(ADDR_W)) dut (.*);
  pb_model #(.PROG(0)) cpu (.clk(clk), .rst(rst), .bus(pb), .in_port(in_port));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (ack) n_ack++;
    if (we_drv) begin n_we++; we_addr <= addr_drv; we_data <= data_drv; end
    if (!grant && (addr_drv != 0 || data_drv != 0 || we_drv)) begin
      failures++;
      $display("FAIL drivers active without grant");
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(!req, "no request after reset");
    cpu.out(8'h00, 8'h01);
    check(req, "request set by OUTPUT 0x00");
    cpu.inp(8'h00, d);
    check(d == 8'h00, "grant port reads 0");
    grant = 1'b1;
    cpu.inp(8'h00, d);
    check(d == 8'h01, "grant port reads 1");
    cpu.out(8'h85, 8'h3C);
    check(n_we == 1 && we_addr == 7'h05 && we_data == 8'h3C, "memory write on the bus");
    mem_data = 8'h77;
    cpu.inp(8'h9A, d);
    check(d == 8'h77, "memory read through in_port");
    cpu.inp(8'h10, d);
    check(d == 8'h00, "unused port reads zero");
    check(n_ack == 0, "no ack before release");
    cpu.out(8'h00, 8'h00);
    check(!req, "request cleared");
    check(n_ack == 1, "one ack on release");
    grant = 1'b0;
    cpu.out(8'h00, 8'h01);
    cpu.out(8'h00, 8'h00);
    check(n_ack == 1, "no ack on a release without grant");
    check(n_we == 1, "one write in all");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
