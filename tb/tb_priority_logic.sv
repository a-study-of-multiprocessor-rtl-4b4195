// tb_priority_logic: exhaustive test of the fixed-priority grant stage.
// For all 2*2**M combinations of enable and requests the output must be
// the lowest-numbered request when enabled, and zero otherwise.
module tb_priority_logic;
  localparam int M = 4;
  logic en;
  logic [M-1:0] in, out;
  int checks = 0, failures = 0;

  priority_logic #(.M(M)) dut (.*);

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int v = 0; v < 2 ** M; v++) begin
        logic [M-1:0] exp;
        en = e[0];
        in = M'(v);
        #1;
        exp = '0;
        if (e == 1) begin
          for (int i = M - 1; i >= 0; i--) if (in[i]) exp = M'(1) << i;
        end
        checks++;
        if (out !== exp) begin
          failures++;
          $display("FAIL en=%0d in=%b out=%b exp=%b", en, in, out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
