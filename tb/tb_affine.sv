// tb_affine: exhaustive check of the AES affine transformation against its
// rotate-and-XOR definition, plus the published S-box entries that follow
// directly from it: affine(0) = {63} (S(00)) and affine(1) = {7c} (S(01)).
// A watchdog bounds the run.
module tb_affine;
  import sbox_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] b, s;
  int checks = 0, failures = 0;

  affine dut (.b(b), .s(s));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      b = 8'(i);
      @(posedge clk);
      checks++;
      if (s !== aes_affine(b)) begin
        failures++;
        $display("FAIL affine(%h)=%h exp=%h", b, s, aes_affine(b));
      end
      if (i == 0) begin
        checks++;
        if (s !== 8'h63) begin failures++; $display("FAIL affine(00)=%h", s); end
      end
      if (i == 1) begin
        checks++;
        if (s !== 8'h7c) begin failures++; $display("FAIL affine(01)=%h", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
