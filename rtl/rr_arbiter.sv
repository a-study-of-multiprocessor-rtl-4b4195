// rr_arbiter: M x M round-robin bus arbiter built from a token ring.
//
// A one-hot M-bit ring counter holds the token. Token bit k enables priority
// logic block k, which sees the requests rotated so that master k has the
// highest priority, then k+1, and so on around the ring. Output i of block k
// is a grant for master (k+i) mod M, and an M-input OR gate per master
// collects its grant from whichever block is enabled. So the token holder
// gets the bus if it asks for it, and an unused slot goes to the next
// requester in ring order. Each ack (end of a bus tenure) is delayed by one
// cycle in a D flip-flop and then rotates the token one place left
// (0001 -> 0010 -> 0100 -> 1000 -> 0001). Reset puts the token on master 0.
// A master waits at most M-1 tenures for its turn.
//
// Grant hold: a master that holds the bus keeps its grant for as long as it
// keeps its request high, even if the token meanwhile favours another
// requester. Arbitration cycle: while the token is moving (the cycle of ack
// and the one after, when the delayed ack rotates the ring) no new grant is
// issued, so every grant decision sees the token already advanced. With
// both rules every tenure moves the token one place, and a waiting master
// is served within M-1 tenures of others.
//
// Interface: req[i] level requests; grant[i] one-hot or zero, combinational
// from req and the registered state; ack pulse from the bus when a tenure
// ends; rst asynchronous, active high.
//
// The ring counter, the priority logic blocks, the OR gates, the delayed ack
// and the left rotation follow the published arbiter (after Shin, Mooney and
// Riley). The grant hold and the idle arbitration cycle are this design's
// own: the published text states that the other processors wait until the
// granted one clears its request and that a master waits no longer than M-1
// slots; without the two rules a request arriving mid-tenure would take the
// bus away, and a grant made with the old token could let the token pass a
// waiting master.
module rr_arbiter #(
  parameter int unsigned M = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [M-1:0] req,
  input  logic         ack,
  output logic [M-1:0] grant
);

  logic [M-1:0] token;
  logic         ack_d;
  logic [M-1:0] pl_out [M];
  logic [M-1:0] rr_grant;
  logic [M-1:0] grant_q;
  logic         holding;

  // D flip-flop on ack and the ring counter.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ack_d <= 1'b0;
      token <= M'(1);
    end else begin
      ack_d <= ack;
      if (ack_d) token <= {token[M-2:0], token[M-1]};
    end
  end

  // Priority logic block k: inputs rotated so that req[k] comes first.
  for (genvar k = 0; k < M; k++) begin : g_pl
    logic [M-1:0] rot_req;
    for (genvar i = 0; i < M; i++) begin : g_rot
      assign rot_req[i] = req[(k + i) % M];
    end
    priority_logic #(.M(M)) u_pl (
      .en  (token[k]),
      .in  (rot_req),
      .out (pl_out[k])
    );
  end

  // One OR gate per master over the matching outputs of all blocks.
  always_comb begin
    rr_grant = '0;
    for (int k = 0; k < M; k++)
      for (int i = 0; i < M; i++)
        rr_grant[(k + i) % M] |= pl_out[k][i];
  end

  assign holding = |(grant_q & req);
  assign grant   = holding ? grant_q : ((ack || ack_d) ? '0 : rr_grant);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) grant_q <= '0;
    else     grant_q <= grant;
  end

  a_grant_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(grant))
    else $error("rr_arbiter: more than one grant");
  a_token_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(token))
    else $error("rr_arbiter: token ring lost its single one");
  a_grant_needs_req: assert property (@(posedge clk) disable iff (rst) (grant & ~req) == '0)
    else $error("rr_arbiter: grant without request");

endmodule
