// tb_fifo: self-checking test of the circular-queue FIFO.
//
// Random reads and writes, biased in phases towards filling and towards
// draining, are applied for several thousand cycles. A queue in the
// testbench is the reference: every cycle the head word, empty and full are
// compared with it. It also checks that a write to a full buffer is
// dropped, that a read of an empty buffer does nothing, that a simultaneous
// read and write of a full buffer keeps it full, and that the buffer holds
// exactly 2**ADDR_W words.
module tb_fifo;
  localparam int ADDR_W = 4;
  localparam int DEPTH  = 2 ** ADDR_W;

  logic clk = 1'b0, rst = 1'b0;
  initial #1 rst = 1'b1;  // a rising edge, so that the asynchronous reset acts
  logic rd = 1'b0, wr = 1'b0;
  logic [7:0] w_data = '0, r_data;
  logic empty, full;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0;
  logic [7:0] q[$];

  fifo #(.DATA_W(8), .ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare();
    check(empty == (q.size() == 0), "empty flag");
    check(full == (q.size() == DEPTH), "full flag");
    if (q.size() > 0) check(r_data == q[0], "head word");
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    compare();
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int bias;
      bit do_w, do_r;
      bias = (cyc / 500) % 3;           // 0: fill, 1: drain, 2: balanced
      do_w = ($urandom_range(0, 99) < (bias == 0 ? 80 : bias == 1 ? 20 : 50));
      do_r = ($urandom_range(0, 99) < (bias == 0 ? 20 : bias == 1 ? 80 : 50));
      wr = do_w;
      rd = do_r;
      w_data = 8'($urandom);
      @(posedge clk);
      // reference update with the rules of the buffer
      begin
        bit acc_r, acc_w;
        acc_r = do_r && q.size() > 0;
        acc_w = do_w && (q.size() < DEPTH || acc_r);
        if (do_w && q.size() == DEPTH && acc_r) n_full++;
        if (acc_r) void'(q.pop_front());
        if (acc_w) q.push_back(w_data);
        if (q.size() == 0) n_empty++;
      end
      @(negedge clk);
      compare();
    end
    // fill completely, count capacity
    wr = 1'b0; rd = 1'b1;
    while (!empty) begin @(posedge clk); void'(q.pop_front()); @(negedge clk); end
    q.delete();
    rd = 1'b0;
    for (int i = 0; i < DEPTH + 3; i++) begin
      wr = 1'b1; w_data = 8'(i);
      @(posedge clk);
      if (q.size() < DEPTH) q.push_back(8'(i));
      @(negedge clk);
      compare();
    end
    check(q.size() == DEPTH && full, "capacity is 2**ADDR_W");
    // drain and compare order
    wr = 1'b0; rd = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      check(r_data == 8'(i), "drain order");
      @(posedge clk); @(negedge clk);
    end
    check(empty, "empty after drain");
    @(posedge clk); @(negedge clk);
    check(empty && !full, "read of empty buffer ignored");
    check(n_full > 0, "full buffer read and written in one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
