// tb_mult_inverse: exhaustive check of the composite-field inverter. For
// every nonzero a, a * a_inv must be 1 under the reference tower multiplier
// of sbox_ref_pkg; a = 0 must give 0. A watchdog bounds the run.
module tb_mult_inverse;
  import sbox_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] a, a_inv;
  int checks = 0, failures = 0;

  mult_inverse dut (.a(a), .a_inv(a_inv));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      @(posedge clk);
      checks++;
      if (i == 0 ? (a_inv !== 8'h00) : (gf8c_mul(a, a_inv) !== 8'h01)) begin
        failures++;
        $display("FAIL a=%h a_inv=%h", a, a_inv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
