// tb_sbox_invsbox: end-to-end test of the shared S-box / inverse S-box at
// its default (and only) configuration.
//   1. Published FIPS-197 S-box and inverse S-box entries.
//   2. All 256 inputs in both directions against the reference S-box built
//      from a searched GF(2^8) inverse and the AES affine (sbox_ref_pkg).
//   3. Round trip: each S-box output fed back with enc_dec = 0 must return
//      the original byte.
//   4. Mode switches: enc_dec toggled with data_in held, the output must
//      follow in the same evaluation.
// The testbench counts how often each mechanism happened: encrypt
// evaluations, decrypt evaluations, mode switches, and the zero case of the
// inverter (enc of {00}, dec of {63}); a mechanism that never happened is a
// failure. The design is combinational, so each output is checked one
// clock step after its input changes (zero-cycle latency). A watchdog
// bounds the run.
module tb_sbox_invsbox;
  import sbox_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] data_in, data_out;
  logic       enc_dec;
  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_switch = 0, n_zero = 0;

  sbox_invsbox dut (.data_in(data_in), .enc_dec(enc_dec), .data_out(data_out));

  task automatic eval(input logic [7:0] d, input logic e, input logic [7:0] exp_v,
                      output logic [7:0] got);
    if (e != enc_dec) n_switch++;
    data_in = d;
    enc_dec = e;
    #1;
    got = data_out;
    @(posedge clk);
    if (e) n_enc++; else n_dec++;
    if ((e && d == 8'h00) || (!e && d == 8'h63)) n_zero++;
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s(%h)=%h exp=%h", e ? "S" : "InvS", d, got, exp_v);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r, r2;
    logic [7:0] ref_s [256];
    enc_dec = 1'b1;
    data_in = 8'h00;
    for (int i = 0; i < 256; i++) ref_s[i] = sbox(8'(i));

    // 1. published values
    eval(8'h00, 1'b1, 8'h63, r);
    eval(8'h01, 1'b1, 8'h7c, r);
    eval(8'h53, 1'b1, 8'hed, r);
    eval(8'hff, 1'b1, 8'h16, r);
    eval(8'h63, 1'b0, 8'h00, r);
    eval(8'h00, 1'b0, 8'h52, r);
    eval(8'hed, 1'b0, 8'h53, r);
    eval(8'h16, 1'b0, 8'hff, r);

    // 2. and 3. all inputs, both directions, and the round trip
    for (int i = 0; i < 256; i++) begin
      eval(8'(i), 1'b1, ref_s[i], r);
      eval(r, 1'b0, 8'(i), r2);
      eval(8'(i), 1'b0, inv_sbox(8'(i)), r);
    end

    // 4. mode switches with the data held
    for (int k = 0; k < 64; k++) begin
      logic [7:0] d = 8'($urandom);
      eval(d, 1'b1, ref_s[d], r);
      eval(d, 1'b0, inv_sbox(d), r);
    end

    $display("mechanisms: encrypt=%0d decrypt=%0d mode_switch=%0d zero_inverse=%0d",
             n_enc, n_dec, n_switch, n_zero);
    checks += 4;
    if (n_enc == 0)    begin failures++; $display("FAIL no encrypt evaluation"); end
    if (n_dec == 0)    begin failures++; $display("FAIL no decrypt evaluation"); end
    if (n_switch == 0) begin failures++; $display("FAIL no mode switch"); end
    if (n_zero == 0)   begin failures++; $display("FAIL zero inverse never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
