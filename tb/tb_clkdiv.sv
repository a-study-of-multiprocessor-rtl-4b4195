// tb_clkdiv: checks the divided clocks at the default tap positions.
// Counts board-clock cycles between rising edges of clk190 and clk48:
// they must be 2**(CLK190_BIT+1) = 262144 and 2**(CLK48_BIT+1) = 1048576,
// high and low for half of that each, both low after clr.
module tb_clkdiv;
  logic mclk = 1'b0, clr = 1'b1;
  logic clk190, clk48;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint r190 [$], r48 [$], f190 [$];

  clkdiv dut (.*);

  always #5 mclk = ~mclk;
  always @(posedge mclk) cyc++;

  logic p190 = 1'b0, p48 = 1'b0;
  always @(negedge mclk) begin
    if (!clr) begin
      if (clk190 && !p190) r190.push_back(cyc);
      if (!clk190 && p190) f190.push_back(cyc);
      if (clk48 && !p48) r48.push_back(cyc);
    end
    p190 = clk190;
    p48  = clk48;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (4000000) @(posedge mclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge mclk);
    check(!clk190 && !clk48, "clocks low during clr");
    clr = 1'b0;
    wait (r48.size() >= 3);
    check(r190.size() >= 9, "enough clk190 edges");
    for (int i = 1; i < r190.size(); i++)
      check(r190[i] - r190[i-1] == 262144, $sformatf("clk190 period %0d", r190[i] - r190[i-1]));
    for (int i = 0; i < f190.size() && i < r190.size(); i++)
      check(f190[i] - r190[i] == 131072, "clk190 high for half a period");
    for (int i = 1; i < r48.size(); i++)
      check(r48[i] - r48[i-1] == 1048576, "clk48 period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
