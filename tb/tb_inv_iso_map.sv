// tb_inv_iso_map: checks the inverse mapping T^-1.
//   - T^-1(T(x)) = x for every byte, T taken from the reference (powers of
//     beta) in sbox_ref_pkg
//   - T^-1(beta) = {02}
//   - multiplicative: T^-1(a (x) b) = T^-1(a) * T^-1(b) for 2000 random pairs
// A watchdog bounds the run.
module tb_inv_iso_map;
  import sbox_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] q, b;
  int checks = 0, failures = 0;

  inv_iso_map dut (.q(q), .b(b));

  task automatic apply(input logic [7:0] v, output logic [7:0] r);
    q = v;
    @(posedge clk);
    r = b;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r, ra, rb, rab, x, y;
    for (int i = 0; i < 256; i++) begin
      apply(iso(8'(i)), r);
      checks++;
      if (r !== 8'(i)) begin
        failures++;
        $display("FAIL T^-1(T(%h))=%h", i, r);
      end
    end
    apply(BETA, r);
    checks++;
    if (r !== 8'h02) begin failures++; $display("FAIL T^-1(beta)=%h", r); end
    for (int k = 0; k < 2000; k++) begin
      x = 8'($urandom);
      y = 8'($urandom);
      apply(x, ra);
      apply(y, rb);
      apply(gf8c_mul(x, y), rab);
      checks++;
      if (rab !== aes_mul(ra, rb)) begin
        failures++;
        $display("FAIL T^-1(%h x %h)=%h exp=%h", x, y, rab, aes_mul(ra, rb));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
