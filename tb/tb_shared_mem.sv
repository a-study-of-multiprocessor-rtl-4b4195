// tb_shared_mem: random writes and reads against an array model.
// Checks that memory starts at zero, that data_out shows the word at the
// address of the previous cycle (one-cycle read latency), and that a write
// returns the old contents in the same cycle (read-first).
module tb_shared_mem;
  localparam int ADDR_W = 7;
  logic clk = 1'b0;
  logic write_en = 1'b0;
  logic [ADDR_W-1:0] address = '0;
  logic [7:0] data_in = '0, data_out;
  logic [7:0] model [2**ADDR_W];
  int checks = 0, failures = 0;

  shared_mem #(.ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] expected;
    for (int i = 0; i < 2 ** ADDR_W; i++) model[i] = 8'h00;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      write_en = ($urandom_range(0, 2) == 0);
      address  = ADDR_W'($urandom);
      data_in  = 8'($urandom);
      expected = model[address];
      if (write_en) model[address] = data_in;
      @(posedge clk);
      #1;
      checks++;
      if (data_out != expected) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %02x expected %02x", address, data_out, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
