// tb_rr_arbiter: self-checking test of the round-robin bus arbiter.
//
// Reference: the token starts at master 0 and moves one place for every
// ack, one cycle after it; a master that holds the bus keeps it while its
// request is high; no new grant is made in the cycle of an ack and the one
// after; otherwise the grant goes to the first requester found going round
// the ring from the token holder. Masters behave like bus
// users: they raise a request at random, hold it for a random tenure once
// granted, drop it (with ack) and pause. Checked every cycle: grant equals
// the reference, and the waiting time of every request is at most M-1
// tenures of other masters after the one running when it was raised. A directed phase with all four masters
// requesting checks the order 0,1,2,3,0,...
module tb_rr_arbiter;
  localparam int M = 4;
  logic clk = 1'b0, rst = 1'b0;
  initial #1 rst = 1'b1;  // a rising edge, so that the asynchronous reset acts
  logic [M-1:0] req = '0, grant;
  logic ack = 1'b0;
  int checks = 0, failures = 0;

  rr_arbiter #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference state
  int tok = 0;
  bit ack_d = 0;
  logic [M-1:0] held = '0;

  function automatic logic [M-1:0] ref_grant(input logic [M-1:0] r);
    if ((held & r) != 0) return held;
    if (ack || ack_d) return '0;           // token moving
    for (int i = 0; i < M; i++) begin
      int m;
      m = (tok + i) % M;
      if (r[m]) return M'(1) << m;
    end
    return '0;
  endfunction

  // per-master bus behaviour
  int tenure_left [M];
  int others_served [M];       // tenures of other masters while waiting
  int max_wait_tenures = 0;
  int n_handover = 0;
  bit directed = 0;
  int order [$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [M-1:0] g;

  initial begin
    for (int i = 0; i < M; i++) begin tenure_left[i] = 0; others_served[i] = 0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // compare just after the rising edge
      @(posedge clk);
      #1;
      g = ref_grant(req);
      check(grant == g, $sformatf("grant %b expected %b (req %b tok %0d)", grant, g, req, tok));
      // decide next inputs
      @(negedge clk);
      begin
        logic [M-1:0] nreq;
        bit nack;
        nreq = req;
        nack = 0;
        for (int m = 0; m < M; m++) begin
          if (req[m] && grant[m]) begin
            if (tenure_left[m] == 0) tenure_left[m] = $urandom_range(1, 4);
            tenure_left[m]--;
            if (tenure_left[m] == 0) begin
              nreq[m] = 1'b0;
              nack = 1'b1;
              order.push_back(m);
              for (int o = 0; o < M; o++) if (o != m && req[o]) others_served[o]++;
            end
          end else if (!req[m]) begin
            if (directed || $urandom_range(0, 9) < 3) begin
              nreq[m] = 1'b1;
              others_served[m] = 0;
            end
          end else begin
            if (others_served[m] > max_wait_tenures) max_wait_tenures = others_served[m];
          end
        end
        // reference update at the coming edge
        req = nreq;
        ack = nack;
        // grant_q samples the grant of the cycle that ends at the coming edge
        held = ref_grant(req);
        if (ack_d) tok = (tok + 1) % M;
        ack_d = nack;
        if (nack) n_handover++;
      end
      if (cyc == 15000) begin
        directed = 1;
        order.delete();
      end
    end
    // M-1 tenures, plus the one already running when the request was raised
    check(max_wait_tenures <= M, $sformatf("wait bounded by M-1 tenures (%0d)", max_wait_tenures));
    check(n_handover > 1000, "many bus tenures");
    // with everybody always requesting, service goes round the ring
    for (int i = 8; i + 1 < order.size(); i++)
      check(order[i + 1] == (order[i] + 1) % M, "ring order under full load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
