// tb_stage1: exhaustive check of stage1 over all 256 (q, w) pairs.
// Expected values come from the loop-based tower arithmetic in
// sbox_ref_pkg: gamma = lambda*q^2 + (q^w)*w, m = q^w.
// A free-running clock paces the stimuli; a watchdog ends the run with a
// failure if the sweep does not finish in time.
module tb_stage1;
  import sbox_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] q, w, gamma, m, exp_g;
  int checks = 0, failures = 0;

  stage1 dut (.q(q), .w(w), .gamma(gamma), .m(m));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {q, w} = 8'(i);
      @(posedge clk);
      exp_g = gf4_mul(gf4_mul(q, q), 4'b1000) ^ gf4_mul(q ^ w, w);
      checks += 2;
      if (gamma !== exp_g) begin
        failures++;
        $display("FAIL q=%h w=%h gamma=%h exp=%h", q, w, gamma, exp_g);
      end
      if (m !== (q ^ w)) begin
        failures++;
        $display("FAIL q=%h w=%h m=%h", q, w, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
