// tb_iso_map: checks that Map T is the field isomorphism it must be.
//   - every byte maps as the reference T built from powers of beta
//   - T({02}) = beta and T({01}) = {01}
//   - multiplicative: T(a*b) = T(a) (x) T(b) for 2000 random pairs, AES
//     multiply on the left, composite multiply on the right
//   - bijective: all 256 images are distinct
// A watchdog bounds the run.
module tb_iso_map;
  import sbox_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] b, q;
  logic [7:0] img [256];
  logic       seen [256];
  int checks = 0, failures = 0;

  iso_map dut (.b(b), .q(q));

  task automatic apply(input logic [7:0] v, output logic [7:0] r);
    b = v;
    @(posedge clk);
    r = q;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ra, rb, rab;
    logic [7:0] x, y;
    for (int i = 0; i < 256; i++) begin
      apply(8'(i), img[i]);
      seen[i] = 1'b0;
      checks++;
      if (img[i] !== iso(8'(i))) begin
        failures++;
        $display("FAIL T(%h)=%h exp=%h", i, img[i], iso(8'(i)));
      end
    end
    checks += 2;
    if (img[2] !== BETA) begin failures++; $display("FAIL T(02)=%h", img[2]); end
    if (img[1] !== 8'h01) begin failures++; $display("FAIL T(01)=%h", img[1]); end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (seen[img[i]]) begin failures++; $display("FAIL image %h repeated", img[i]); end
      seen[img[i]] = 1'b1;
    end
    for (int k = 0; k < 2000; k++) begin
      x = 8'($urandom);
      y = 8'($urandom);
      apply(x, ra);
      apply(y, rb);
      apply(aes_mul(x, y), rab);
      checks++;
      if (rab !== gf8c_mul(ra, rb)) begin
        failures++;
        $display("FAIL T(%h*%h)=%h, T(a)xT(b)=%h", x, y, rab, gf8c_mul(ra, rb));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
