// tb_fifo_link: the two-processor mailbox bench experiment.
//
// The producer sends 0, 1, 2, ... 7E into the FIFO, testing the full flag
// before every write and retrying while the FIFO is full. The consumer
// waits until the FIFO is full, then, while the button is held, moves one
// byte per loop to the LED register. The button is pressed in bursts, so
// the FIFO fills, drains and fills again. Checked: every byte arrives at the
// LEDs exactly once and in order, the producer did find the FIFO full, the
// FIFO held 16 bytes when it first reported full, and the producer's switch
// port and the consumer's button port read the board inputs.
module tb_fifo_link;
  import mc_pkg::*;

  logic clk = 1'b0, rst = 1'b0;
  initial #1 rst = 1'b1;  // a rising edge, so that the asynchronous reset acts
  pb_io_t pb1, pb2;
  logic [7:0] pb1_in_port, pb2_in_port;
  logic [7:0] sw = 8'hA5;
  logic btn = 1'b0;
  logic [7:0] led;
  int checks = 0, failures = 0;
  int n_led = 0, n_order_err = 0;
  int n_sent_at_full = -1;

  fifo_link dut (.*);

  pb_model #(.PROG(5), .FLAG_PORT(8'h01), .OUT_PORT(8'h06))
    u_pb1 (.clk(clk), .rst(rst), .bus(pb1), .in_port(pb1_in_port));
  pb_model #(.PROG(6))
    u_pb2 (.clk(clk), .rst(rst), .bus(pb2), .in_port(pb2_in_port));

  always #5 clk = ~clk;

  // bytes shown on the LEDs, checked against the running count
  always @(posedge clk) begin
    if (pb2.write_strobe && pb2.port_id == 8'h06) begin
      if (pb2.out_port != 8'(n_led)) n_order_err++;
      n_led++;
    end
    if (n_sent_at_full < 0 && u_pb1.n_full_wait > 0) n_sent_at_full = u_pb1.n_outputs;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    int bursts;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    bursts = 0;
    while (n_led < 127) begin
      repeat (600) @(negedge clk);       // button released: producer fills
      btn = 1'b1;
      repeat (150) @(negedge clk);       // button held: consumer drains
      btn = 1'b0;
      bursts++;
    end
    check(n_led == 127, $sformatf("all 127 bytes delivered (%0d)", n_led));
    check(n_order_err == 0, "bytes delivered in order");
    check(led == 8'h7E, "LEDs show the last byte");
    check(u_pb1.n_full_wait > 0, "producer found the FIFO full");
    check(n_sent_at_full == 16, $sformatf("FIFO full after 16 bytes (%0d)", n_sent_at_full));
    check(bursts > 1, "several fill/drain rounds");
    wait (u_pb1.done);
    @(negedge clk);
    u_pb1.inp(8'h02, d);
    check(d == sw, "switch port");
    btn = 1'b1;
    @(negedge clk);
    check(pb2_in_port == 8'h00 || pb2.port_id != 8'h04, "button port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
