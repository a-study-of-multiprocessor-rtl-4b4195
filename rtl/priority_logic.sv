// priority_logic: fixed-priority grant stage of the round-robin bus arbiter.
//
// When en is high, the lowest-numbered active input wins: out[i] is high
// only if in[i] is high and every in[j] with j < i is low, so in[0] has the
// highest and in[M-1] the lowest priority. When en is low all outputs are
// low. Purely combinational.
//
// The arbiter holds M of these blocks, each fed with the requests in a
// different rotation and enabled by one bit of the token ring; the
// descending priority order in[0]..in[M-1] follows the published arbiter.
module priority_logic #(
  parameter int unsigned M = 4
) (
  input  logic         en,
  input  logic [M-1:0] in,
  output logic [M-1:0] out
);

  always_comb begin
    logic taken;
    taken = 1'b0;
    out   = '0;
    for (int i = 0; i < M; i++) begin
      if (en && in[i] && !taken) begin
        out[i] = 1'b1;
        taken  = 1'b1;
      end
    end
  end

endmodule
