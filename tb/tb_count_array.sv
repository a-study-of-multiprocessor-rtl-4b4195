// tb_count_array: the counting experiment on five tiles.
//
// Two copies of the array run side by side, each with four sender models
// and one destination model:
//  * run A is the experiment as published: the senders stop after five
//    numbers each, and the destination must put out 1, 2, ..., 20;
//  * run B lets every sender count forty numbers, so the destination,
//    which reads only one FIFO at a time, falls behind, the FIFOs fill and
//    the senders have to wait on their full flags; the output must still
//    be 1, 2, ..., 160 with nothing lost or repeated.
// Senders: PB1 starts at 3, PB2 at 2, PB3 at 4, PB5 at 1, all step 4,
// each testing the flags of its target FIFO on its own status port.
module tb_count_array;
  import mc_pkg::*;

  localparam int N_A = 5, N_B = 40;
  // per tile PB1..PB5: first number, flag port, output port (PB4 unused)
  localparam logic [7:0] K0   [5] = '{8'd3, 8'd2, 8'd4, 8'd0, 8'd1};
  localparam logic [7:0] FLAG [5] = '{8'h0A, 8'h09, 8'h0B, 8'h00, 8'h08};
  localparam logic [7:0] OUTP [5] = '{8'h02, 8'h03, 8'h01, 8'h00, 8'h00};

  logic clk = 1'b0, rst = 1'b0;
  initial #1 rst = 1'b1;  // a rising edge, so that the asynchronous reset acts
  pb_io_t pb_a [5], pb_b [5];
  logic [7:0] in_port_a [5], in_port_b [5];
  logic [7:0] out_a, out_b;
  logic out_strobe_a, out_strobe_b;
  int checks = 0, failures = 0;
  int n_a = 0, n_b = 0, err_a = 0, err_b = 0;

  count_array dut_a (.clk, .rst, .pb(pb_a), .in_port(in_port_a), .out(out_a), .out_strobe(out_strobe_a));
  count_array dut_b (.clk, .rst, .pb(pb_b), .in_port(in_port_b), .out(out_b), .out_strobe(out_strobe_b));

  for (genvar n = 0; n < 5; n++) begin : g_pb
    if (n == 3) begin : g_dst
      pb_model #(.PROG(4)) u_a (.clk, .rst, .bus(pb_a[n]), .in_port(in_port_a[n]));
      pb_model #(.PROG(4)) u_b (.clk, .rst, .bus(pb_b[n]), .in_port(in_port_b[n]));
    end else begin : g_src
      pb_model #(.PROG(3), .K0(K0[n]), .KMAX(K0[n] + 8'(4 * N_A)), .FLAG_PORT(FLAG[n]), .OUT_PORT(OUTP[n]))
        u_a (.clk, .rst, .bus(pb_a[n]), .in_port(in_port_a[n]));
      pb_model #(.PROG(3), .K0(K0[n]), .KMAX(K0[n] + 8'(4 * N_B)), .FLAG_PORT(FLAG[n]), .OUT_PORT(OUTP[n]))
        u_b (.clk, .rst, .bus(pb_b[n]), .in_port(in_port_b[n]));
    end
  end

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (out_strobe_a) begin
      n_a++;
      if (out_a != 8'(n_a)) err_a++;
    end
    if (out_strobe_b) begin
      n_b++;
      if (out_b != 8'(n_b)) err_b++;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int full_a, full_b;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wait (n_a >= 4 * N_A && n_b >= 4 * N_B);
    repeat (1000) @(negedge clk);
    check(n_a == 4 * N_A, $sformatf("run A: %0d outputs", n_a));
    check(err_a == 0, "run A: outputs 1, 2, 3, ... in order");
    check(out_a == 8'(4 * N_A), "run A: last output");
    check(n_b == 4 * N_B, $sformatf("run B: %0d outputs", n_b));
    check(err_b == 0, "run B: outputs 1, 2, 3, ... in order");
    full_a = g_pb[0].g_src.u_a.n_full_wait + g_pb[1].g_src.u_a.n_full_wait
           + g_pb[2].g_src.u_a.n_full_wait + g_pb[4].g_src.u_a.n_full_wait;
    full_b = g_pb[0].g_src.u_b.n_full_wait + g_pb[1].g_src.u_b.n_full_wait
           + g_pb[2].g_src.u_b.n_full_wait + g_pb[4].g_src.u_b.n_full_wait;
    check(full_b > 0, "run B: senders waited on full FIFOs");
    check(g_pb[3].g_dst.u_b.n_empty_wait > 0, "destination waited on empty FIFOs");
    $display("run A: full waits %0d; run B: full waits %0d, empty waits %0d",
             full_a, full_b, g_pb[3].g_dst.u_b.n_empty_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
