// tb_gf4_inv: exhaustive check of the GF(2^4) inverter. For every nonzero
// gamma the product gamma*theta must be 1 (reference multiplier from
// sbox_ref_pkg) and theta must equal the inverse found by search; zero must
// map to zero. A watchdog bounds the run.
module tb_gf4_inv;
  import sbox_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] gamma, theta;
  int checks = 0, failures = 0;

  gf4_inv dut (.gamma(gamma), .theta(theta));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      gamma = 4'(i);
      @(posedge clk);
      checks += 2;
      if (theta !== gf4_inv(gamma)) begin
        failures++;
        $display("FAIL gamma=%h theta=%h exp=%h", gamma, theta, gf4_inv(gamma));
      end
      if (i != 0 && gf4_mul(gamma, theta) !== 4'h1) begin
        failures++;
        $display("FAIL gamma=%h theta=%h product not 1", gamma, theta);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
