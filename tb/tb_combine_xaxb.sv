// tb_combine_xaxb: exhaustive check over all 4096 (theta, q, m) triples:
// lambda_o must be {q*theta, m*theta} with the reference GF(2^4) multiplier
// of sbox_ref_pkg. A watchdog bounds the run.
module tb_combine_xaxb;
  import sbox_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] theta, q, m;
  logic [7:0] lambda_o, exp_l;
  int checks = 0, failures = 0;

  combine_xaxb dut (.theta(theta), .q(q), .m(m), .lambda_o(lambda_o));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      {theta, q, m} = 12'(i);
      @(posedge clk);
      exp_l = {gf4_mul(q, theta), gf4_mul(m, theta)};
      checks++;
      if (lambda_o !== exp_l) begin
        failures++;
        if (failures < 10)
          $display("FAIL theta=%h q=%h m=%h got=%h exp=%h", theta, q, m, lambda_o, exp_l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
