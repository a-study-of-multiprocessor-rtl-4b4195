// tb_mp_top: end-to-end run of the whole design, every part at once.
//
// Processor models are attached to every I/O bus of the top:
//  * 4 sources and 10 multiply-accumulate stages on the FIR array, clocked
//    by the divided clock that the top brings out;
//  * 4 senders and a collector on the counting tiles, on the same clock;
//  * 4 clients on the shared-memory system, each incrementing a shared
//    counter under the bus arbiter;
//  * a producer and a consumer on the FIFO link, with the button pressed in
//    bursts.
// The divider tap is lowered (CLK190_BIT = 1, array clock = board clock / 4)
// so that the run is short; all other parameters are the defaults.
//
// Each mechanism of the design is counted, and a mechanism that never
// happened is a failure: clock division (board cycles per array cycle),
// FIFO empty waits in the array, the producer stalling on a full FIFO,
// filter output strobes, bus contention (failed grant polls), grant
// hand-over between processors and the arbiter's token passing. The
// results are checked as well: the 20 filter outputs, the LED byte, the
// counting output 1..20, the shared counter (read back over the bus) and
// the order of the bytes delivered over the link.
module tb_mp_top;
  import mc_pkg::*;

  localparam int CLK190_BIT = 1;
  localparam logic [7:0] A [4] = '{8'd2, 8'd1, 8'd3, 8'd2};
  localparam logic [39:0] U_VALS [4] = '{
    40'h03_04_03_02_01,
    40'h09_08_07_06_05,
    40'h90_2B_FF_41_80,
    40'h7F_01_C3_00_FE
  };
  localparam int NROUNDS = 6;

  logic clk = 1'b0, rst = 1'b0;
  initial #1 rst = 1'b1;  // a rising edge, so that the asynchronous reset acts
  logic fir_clk, clk48;
  pb_io_t fir_pb [14];
  logic [7:0] fir_in_port [14];
  logic [3:0][7:0] fir_y;
  logic [3:0] fir_y_strobe;
  logic [7:0] led;
  pb_io_t cnt_pb [5];
  logic [7:0] cnt_in_port [5];
  logic [7:0] cnt_out;
  logic cnt_out_strobe;
  pb_io_t shm_pb [4];
  logic [7:0] shm_in_port [4];
  logic [3:0] shm_grant;
  pb_io_t link_pb1, link_pb2;
  logic [7:0] link_pb1_in_port, link_pb2_in_port;
  logic [7:0] link_sw = 8'h3C;
  logic link_btn = 1'b0;
  logic [7:0] link_led;

  int checks = 0, failures = 0;

  mp_top #(.CLK190_BIT(CLK190_BIT)) dut (.*);

  // ---- processor models ---------------------------------------------------
  for (genvar n = 0; n < 4; n++) begin : g_src
    pb_model #(.PROG(1), .U_VALS(U_VALS[n]))
      u_pb (.clk(fir_clk), .rst(rst), .bus(fir_pb[n]), .in_port(fir_in_port[n]));
  end
  for (genvar n = 4; n < 14; n++) begin : g_stage
    pb_model #(.PROG(2))
      u_pb (.clk(fir_clk), .rst(rst), .bus(fir_pb[n]), .in_port(fir_in_port[n]));
  end
  // counting experiment: PB1, PB2, PB3, PB5 send, PB4 (index 3) collects
  localparam logic [7:0] C_K0   [5] = '{8'd3, 8'd2, 8'd4, 8'd0, 8'd1};
  localparam logic [7:0] C_FLAG [5] = '{8'h0A, 8'h09, 8'h0B, 8'h00, 8'h08};
  localparam logic [7:0] C_OUTP [5] = '{8'h02, 8'h03, 8'h01, 8'h00, 8'h00};
  for (genvar n = 0; n < 5; n++) begin : g_cnt
    pb_model #(.PROG(n == 3 ? 4 : 3), .K0(C_K0[n]), .KMAX(C_K0[n] + 8'd20),
               .FLAG_PORT(C_FLAG[n]), .OUT_PORT(C_OUTP[n]))
      u_pb (.clk(fir_clk), .rst(rst), .bus(cnt_pb[n]), .in_port(cnt_in_port[n]));
  end
  for (genvar i = 0; i < 4; i++) begin : g_shm
    pb_model #(.PROG(7), .ID(i), .NROUNDS(NROUNDS), .PAUSE(2 + 3 * i))
      u_pb (.clk(clk), .rst(rst), .bus(shm_pb[i]), .in_port(shm_in_port[i]));
  end
  pb_model #(.PROG(5), .FLAG_PORT(8'h01), .OUT_PORT(8'h06))
    u_prod (.clk(clk), .rst(rst), .bus(link_pb1), .in_port(link_pb1_in_port));
  pb_model #(.PROG(6))
    u_cons (.clk(clk), .rst(rst), .bus(link_pb2), .in_port(link_pb2_in_port));

  always #5 clk = ~clk;

  // ---- event counters -----------------------------------------------------
  // They wake only on the events they count, not on every board clock, so
  // that the full-size run stays fast.
  longint n_fir_clk = 0;
  realtime t_run = 0, t_fir_first = 0, t_fir_last = 0;
  int n_cnt = 0, n_cnt_order = 0;
  int n_y = 0, n_handover = 0, n_token_laps = 0, n_led = 0, n_led_order = 0;
  logic [7:0] got [4][$];
  logic [3:0] prev_grant = '0;

  always @(posedge fir_clk) begin
    if (!rst) begin
      if (n_fir_clk == 0) t_fir_first = $realtime;
      t_fir_last = $realtime;
      n_fir_clk++;
      for (int k = 0; k < 4; k++)
        if (fir_y_strobe[k]) begin
          if (n_y == 19) $display("filter done after %0d array cycles", n_fir_clk);
          got[k].push_back(fir_y[k]);
          n_y++;
        end
    end
  end
  always @(posedge fir_clk)
    if (!rst && cnt_out_strobe) begin
      n_cnt++;
      if (cnt_out != 8'(n_cnt)) n_cnt_order++;
    end
  // grant hand-over from one processor to another, and the token coming
  // back to processor 0 after processor 3 (a full lap of the ring)
  always @(shm_grant) begin
    if (shm_grant != 0) begin
      if (prev_grant != 0 && shm_grant != prev_grant) n_handover++;
      if (shm_grant[0] && prev_grant[3]) n_token_laps++;
      prev_grant = shm_grant;
    end
  end
  always @(posedge link_pb2.write_strobe) begin
    if (link_pb2.port_id == 8'h06) begin
      if (link_pb2.out_port != 8'(n_led)) n_led_order++;
      n_led++;
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [7:0] expect_y(int k, int t);
    logic [7:0] s = 8'h00;
    for (int j = 0; j <= k; j++) s += A[j] * U_VALS[k - j][8*t +: 8];
    return s;
  endfunction

  initial begin
    #(1000000 * 10);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // button pressed in bursts until every byte has crossed the link
  initial begin
    wait (!rst);
    while (n_led < 127) begin
      repeat (700) @(negedge clk);
      link_btn = 1'b1;
      repeat (150) @(negedge clk);
      link_btn = 1'b0;
    end
  end

  initial begin
    int waits_empty, waits_grant;
    longint n_clk;
    logic [7:0] d;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    t_run = $realtime;
    wait (n_y >= 20 && n_cnt >= 20 && n_led >= 127 &&
          g_shm[0].u_pb.done && g_shm[1].u_pb.done && g_shm[2].u_pb.done && g_shm[3].u_pb.done);
    repeat (200) @(negedge clk);

    // clock division
    check(n_fir_clk > 100, "array clock runs");
    n_clk = longint'(($realtime - t_run) / 10);
    // board clock period is 10 time units
    check((t_fir_last - t_fir_first) == real'(10 * (2 ** (CLK190_BIT + 1)) * (n_fir_clk - 1)),
          $sformatf("board cycles per array cycle %0.1f",
                    (t_fir_last - t_fir_first) / 10.0 / real'(n_fir_clk - 1)));

    // FIR filter
    check(n_y == 20, $sformatf("20 filter output strobes (%0d)", n_y));
    for (int k = 0; k < 4; k++)
      for (int t = 0; t < 5 && t < got[k].size(); t++)
        check(got[k][t] == expect_y(k, t), $sformatf("Y%0d[%0d]", k, t));
    check(led == expect_y(2, 4), "LEDs show the last Y2");
    waits_empty = g_stage[4].u_pb.n_empty_wait + g_stage[13].u_pb.n_empty_wait;
    check(waits_empty > 0, "array tiles waited on empty FIFOs");

    // counting experiment
    check(n_cnt == 20 && n_cnt_order == 0, $sformatf("counting: %0d outputs, %0d out of order", n_cnt, n_cnt_order));
    check(g_cnt[3].u_pb.n_empty_wait > 0, "counting: destination waited on empty FIFOs");

    // FIFO link
    check(u_prod.n_full_wait > 0, "producer stalled on a full FIFO");
    check(n_led == 127 && n_led_order == 0, "link bytes delivered once, in order");
    check(link_led == 8'h7E, "link LEDs show the last byte");

    // shared memory
    waits_grant = g_shm[0].u_pb.n_grant_wait + g_shm[1].u_pb.n_grant_wait
                + g_shm[2].u_pb.n_grant_wait + g_shm[3].u_pb.n_grant_wait;
    check(waits_grant > 0, "bus contention");
    check(n_handover > 0, "grant handed from one processor to another");
    check(n_token_laps > 0, "token passed round the ring");
    g_shm[0].u_pb.out(8'h00, 8'h01);
    do g_shm[0].u_pb.inp(8'h00, d); while (!d[0]);
    g_shm[0].u_pb.inp(8'h80, d);
    check(d == 8'(4 * NROUNDS), $sformatf("shared counter %0d", d));
    g_shm[0].u_pb.out(8'h00, 8'h00);

    $display("board cycles %0d, array cycles %0d, empty waits %0d, full waits %0d, grant waits %0d, hand-overs %0d, token laps %0d",
             n_clk, n_fir_clk, waits_empty, u_prod.n_full_wait, waits_grant, n_handover, n_token_laps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
