// tb_fir_array: the 4-tap FIR filter running on the 14-tile array.
//
// Four source models stream five samples each of U0..U3 into the top of the
// columns; ten stage models run the multiply-accumulate program on P1..P10.
// The testbench collects the diagonal outputs of the bottom row and compares
// them, sample by sample, with the filter worked out here:
//   Y0 = A0*U0
//   Y1 = A0*U1 + A1*U0
//   Y2 = A0*U2 + A1*U1 + A2*U0
//   Y3 = A0*U3 + A1*U2 + A2*U1 + A3*U0          (all modulo 256)
// U0 = 1, 2, 3, 4, 3 is the input of the original experiment; the other
// inputs are chosen so that products and sums wrap past 8 bits. It also
// checks that stages did wait on empty FIFOs (the array is data-driven) and
// that every stage finished exactly five rounds.
module tb_fir_array;
  import mc_pkg::*;

  localparam logic [7:0] A0 = 8'd2, A1 = 8'd1, A2 = 8'd3, A3 = 8'd2;
  localparam logic [39:0] U_VALS [4] = '{
    40'h03_04_03_02_01,
    40'h09_08_07_06_05,
    40'h90_2B_FF_41_80,
    40'h7F_01_C3_00_FE
  };

  logic clk = 1'b0, rst = 1'b0;
  initial #1 rst = 1'b1;  // a rising edge, so that the asynchronous reset acts
  pb_io_t pb [14];
  logic [7:0] in_port [14];
  logic [3:0][7:0] y;
  logic [3:0] y_strobe;
  int checks = 0, failures = 0;
  logic [7:0] got [4][$];

  fir_array dut (.*);

  for (genvar n = 0; n < 4; n++) begin : g_src
    pb_model #(.PROG(1), .U_VALS(U_VALS[n]))
      u_pb (.clk(clk), .rst(rst), .bus(pb[n]), .in_port(in_port[n]));
  end
  for (genvar n = 4; n < 14; n++) begin : g_stage
    pb_model #(.PROG(2))
      u_pb (.clk(clk), .rst(rst), .bus(pb[n]), .in_port(in_port[n]));
  end

  always #5 clk = ~clk;

  always @(posedge clk)
    for (int k = 0; k < 4; k++)
      if (y_strobe[k]) got[k].push_back(y[k]);

  function automatic logic [7:0] u(int k, int t);
    return U_VALS[k][8*t +: 8];
  endfunction

  function automatic logic [7:0] expect_y(int k, int t);
    logic [7:0] a [4];
    logic [7:0] s;
    a = '{A0, A1, A2, A3};
    s = 8'h00;
    for (int j = 0; j <= k; j++) s += a[j] * u(k - j, t);
    return s;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int waits;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wait (got[0].size() >= 5 && got[1].size() >= 5 && got[2].size() >= 5 && got[3].size() >= 5);
    repeat (2000) @(negedge clk);   // nothing more may arrive
    for (int k = 0; k < 4; k++) begin
      check(got[k].size() == 5, $sformatf("Y%0d has %0d samples", k, got[k].size()));
      for (int t = 0; t < 5 && t < got[k].size(); t++)
        check(got[k][t] == expect_y(k, t),
              $sformatf("Y%0d[%0d] = %02h, expected %02h", k, t, got[k][t], expect_y(k, t)));
    end
    waits = 0;
    waits += g_stage[4].u_pb.n_empty_wait;
    waits += g_stage[13].u_pb.n_empty_wait;
    check(waits > 0, "stages waited on empty FIFOs");
    check(g_stage[4].u_pb.n_rounds == 5 && g_stage[13].u_pb.n_rounds == 5,
          "first and last stage ran five rounds");
    check(g_src[0].u_pb.done && g_src[3].u_pb.done, "sources finished");
    $display("Y0..Y3 = %p %p %p %p", got[0], got[1], got[2], got[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
