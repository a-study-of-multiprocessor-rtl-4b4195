// tb_shm_system: four processor models share the memory through the
// round-robin bus arbiter.
//
// Each processor, NROUNDS times, requests the bus, waits for its grant,
// increments a shared counter at memory address 0 (read, add one, write)
// and writes its own mailbox byte, then releases the bus. The increment is
// a read-modify-write, so the final counter equals 4*NROUNDS only if no two
// processors were ever inside the memory at once. Also checked: every
// mailbox holds its processor's last byte, the processors did contend (some
// grant polls failed), every processor was served, only one grant was ever
// active, and grants were handed out in ring order under full load.
module tb_shm_system;
  import mc_pkg::*;
  localparam int M = 4;
  localparam int NROUNDS = 8;

  logic clk = 1'b0, rst = 1'b0;
  initial #1 rst = 1'b1;  // a rising edge, so that the asynchronous reset acts
  pb_io_t pb [M];
  logic [7:0] in_port [M];
  logic [M-1:0] grant;
  int checks = 0, failures = 0;

  shm_system #(.M(M), .ADDR_W(7)) dut (.*);

  for (genvar i = 0; i < M; i++) begin : g_cpu
    pb_model #(.PROG(7), .ID(i), .NROUNDS(NROUNDS), .PAUSE(1 + 2 * i))
      cpu (.clk(clk), .rst(rst), .bus(pb[i]), .in_port(in_port[i]));
  end

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int n_multi = 0;
  int grant_seq [$];
  logic [M-1:0] prev_grant = '0;
  always @(posedge clk) begin
    if (!$onehot0(grant)) n_multi++;
    if (grant != 0 && grant != prev_grant)
      for (int i = 0; i < M; i++) if (grant[i]) grant_seq.push_back(i);
    prev_grant <= grant;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int waits;
    logic [7:0] d;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wait (g_cpu[0].cpu.done && g_cpu[1].cpu.done && g_cpu[2].cpu.done && g_cpu[3].cpu.done);
    // processor 0 reads the results back over the bus
    @(negedge clk);
    g_cpu[0].cpu.out(8'h00, 8'h01);
    do g_cpu[0].cpu.inp(8'h00, d); while (!d[0]);
    g_cpu[0].cpu.inp(8'h80, d);
    check(d == 8'(M * NROUNDS), $sformatf("shared counter %0d, expected %0d", d, M * NROUNDS));
    for (int i = 0; i < M; i++) begin
      g_cpu[0].cpu.inp(8'h81 + 8'(i), d);
      check(d == 8'(16 * i + NROUNDS - 1), $sformatf("mailbox %0d", i));
    end
    g_cpu[0].cpu.out(8'h00, 8'h00);
    check(n_multi == 0, "never more than one grant");
    check(grant_seq.size() == M * NROUNDS + 1, $sformatf("one grant per round (%0d)", grant_seq.size()));
    // first rounds: all four request together, service goes round the ring
    for (int i = 0; i < M; i++) check(grant_seq[i] == i, "first grants in ring order 0,1,2,3");
    waits = g_cpu[0].cpu.n_grant_wait + g_cpu[1].cpu.n_grant_wait
          + g_cpu[2].cpu.n_grant_wait + g_cpu[3].cpu.n_grant_wait;
    check(waits > 0, "processors had to wait for the bus");
    $display("grant polls that failed: %0d, cycles: %0d", waits, $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
