// tb_pb_wrapper: self-checking test of the four-FIFO wrapper.
//
// A processor model drives the wrapper's I/O bus with the two-cycle INPUT
// and OUTPUT timing of the processor; the testbench plays the four
// neighbours. Checked:
//  * bytes written by each neighbour strobe land in the right FIFO and come
//    back, in order, from ports 0..3; reading pops exactly one byte
//  * ports 4..7 return {000000, full, empty}, also after 16 writes (full),
//    and the status outputs carry the same bytes
//  * ports 8..11 return the neighbour status inputs, other ports zero
//  * an OUTPUT to port_id[1:0] = k loads output latch k only, and the
//    outgoing strobe ws_out[k] is high for exactly one cycle, in the cycle
//    after the processor's write strobe, together with the new data
module tb_pb_wrapper;
  import mc_pkg::*;

  logic clk = 1'b0, rst = 1'b0;
  initial #1 rst = 1'b1;  // a rising edge, so that the asynchronous reset acts
  pb_io_t pb;
  logic [7:0] in_port;
  logic [NDIR-1:0][7:0] din = '0, dout, status, status_in;
  logic [NDIR-1:0] ws_in = '0, ws_out;
  int checks = 0, failures = 0;

  pb_wrapper dut (.*);
  pb_model #(.PROG(0)) cpu (.clk(clk), .rst(rst), .bus(pb), .in_port(in_port));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // neighbour k pushes one byte (strobe for one cycle)
  task automatic push(input int k, input logic [7:0] d);
    @(negedge clk);
    din[k] = d;
    ws_in[k] = 1'b1;
    @(negedge clk);
    ws_in[k] = 1'b0;
  endtask

  // watch outgoing strobes
  int unsigned ws_count [NDIR];
  initial for (int k = 0; k < NDIR; k++) ws_count[k] = 0;
  always @(posedge clk) for (int k = 0; k < NDIR; k++) if (ws_out[k]) ws_count[k]++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    status_in = {8'hA4, 8'hA3, 8'hA2, 8'hA1};
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // all empty
    for (int k = 0; k < NDIR; k++) begin
      cpu.inp(8'h04 + 8'(k), d);
      check(d == 8'h01, "flags empty after reset");
    end
    // neighbour status ports and unused ports
    for (int k = 0; k < NDIR; k++) begin
      cpu.inp(8'h08 + 8'(k), d);
      check(d == status_in[k], "neighbour status port");
    end
    cpu.inp(8'h0C, d);
    check(d == 8'h00, "unused port 0C reads zero");
    cpu.inp(8'h0F, d);
    check(d == 8'h00, "unused port 0F reads zero");
    // three bytes into each FIFO, distinct per direction
    for (int i = 0; i < 3; i++)
      for (int k = 0; k < NDIR; k++) push(k, 8'(16 * k + i + 1));
    for (int k = 0; k < NDIR; k++) begin
      cpu.inp(8'h04 + 8'(k), d);
      check(d == 8'h00, "flags neither empty nor full");
      check(status[k] == 8'h00, "status output matches");
    end
    // flag reads must not pop; data reads pop one each
    for (int k = NDIR - 1; k >= 0; k--)
      for (int i = 0; i < 3; i++) begin
        cpu.inp(8'(k), d);
        check(d == 8'(16 * k + i + 1), $sformatf("FIFO %0d order", k));
      end
    for (int k = 0; k < NDIR; k++) begin
      cpu.inp(8'h04 + 8'(k), d);
      check(d == 8'h01, "empty again");
    end
    // fill the south FIFO
    for (int i = 0; i < 16; i++) push(int'(IN_SOUTH), 8'(100 + i));
    cpu.inp(8'h05, d);
    check(d == 8'h02, "south FIFO full flag");
    check(status[IN_SOUTH] == 8'h02, "south status output full");
    push(int'(IN_SOUTH), 8'hEE);                        // dropped
    for (int i = 0; i < 16; i++) begin
      cpu.inp(8'h01, d);
      check(d == 8'(100 + i), "full FIFO drains in order");
    end
    cpu.inp(8'h05, d);
    check(d == 8'h01, "write to a full FIFO dropped");
    // outputs: one OUTPUT per latch
    for (int k = 0; k < NDIR; k++) begin
      int unsigned prev_cnt [NDIR];
      for (int j = 0; j < NDIR; j++) prev_cnt[j] = ws_count[j];
      cpu.out(8'(k) | 8'h40, 8'(8'h50 + k));      // upper port bits ignored
      // out() returns on the falling edge after the strobe cycle
      check(dout[k] == 8'(8'h50 + k), "output latch loaded");
      check(ws_out[k] == 1'b1, "outgoing strobe follows the write");
      @(posedge clk);
      #1;
      check(ws_out[k] == 1'b0, "outgoing strobe lasts one cycle");
      for (int j = 0; j < NDIR; j++)
        check(ws_count[j] == prev_cnt[j] + (j == k ? 1 : 0), "only the addressed strobe");
    end
    check(dout == {8'h53, 8'h52, 8'h51, 8'h50}, "all four latches hold their bytes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
