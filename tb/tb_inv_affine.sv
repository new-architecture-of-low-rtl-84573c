// tb_inv_affine: exhaustive check of the composite-domain inverse affine.
// For every byte y, feeding q_in = T(y) must give q_out equal to
// i.e. the reference image iso(aes_inv_affine(y)); T and the inverse affine
// come from sbox_ref_pkg. A watchdog bounds the run.
module tb_inv_affine;
  import sbox_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] q_in, q_out, exp_q;
  int checks = 0, failures = 0;

  inv_affine dut (.q_in(q_in), .q_out(q_out));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      q_in = iso(8'(i));
      @(posedge clk);
      exp_q = iso(aes_inv_affine(8'(i)));
      checks++;
      if (q_out !== exp_q) begin
        failures++;
        $display("FAIL y=%h q_out=%h exp=%h", i, q_out, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
