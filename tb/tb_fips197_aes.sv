// tb_fips197_aes: runs the FIPS-197 known-answer examples through complete
// AES encryptions and decryptions in which every SubBytes, InvSubBytes and
// key-schedule SubWord byte is looked up in the shared S-box / inverse
// S-box (sbox_invsbox at its default configuration). The rest of AES (key
// expansion, ShiftRows, MixColumns, AddRoundKey) is behavioural testbench
// code. Vectors:
//   FIPS-197 Appendix B  (AES-128, key 2b7e1516...)
//   FIPS-197 Appendix C.1/C.2/C.3 (AES-128/192/256, key 000102...)
// Each vector checks the ciphertext, then decrypts it back to the plaintext.
// The S-box is combinational: every lookup is read 1 time unit after its
// input is applied, with one lookup per clock. A watchdog bounds the run.
module tb_fips197_aes;
  import sbox_ref_pkg::aes_mul;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] data_in, data_out;
  logic       enc_dec;
  int checks = 0, failures = 0;
  int n_sub = 0, n_invsub = 0;

  sbox_invsbox dut (.data_in(data_in), .enc_dec(enc_dec), .data_out(data_out));

  typedef logic [7:0] state_t [16];

  task automatic lookup(input logic [7:0] d, input logic e, output logic [7:0] r);
    data_in = d;
    enc_dec = e;
    #1;
    r = data_out;
    if (e) n_sub++; else n_invsub++;
    @(posedge clk);
  endtask

  // round keys, one byte per entry, up to 15 round keys
  logic [7:0] rk [240];
  int         nr;

  task automatic expand_key(input logic [255:0] key, input int nk);
    logic [7:0] t [4];
    logic [7:0] rcon = 8'h01;
    logic [7:0] tmp;
    nr = nk + 6;
    for (int i = 0; i < 4 * nk; i++) rk[i] = key[255 - 8 * i -: 8];
    for (int i = nk; i < 4 * (nr + 1); i++) begin
      for (int j = 0; j < 4; j++) t[j] = rk[4 * (i - 1) + j];
      if (i % nk == 0) begin
        tmp = t[0]; t[0] = t[1]; t[1] = t[2]; t[2] = t[3]; t[3] = tmp;
        for (int j = 0; j < 4; j++) lookup(t[j], 1'b1, t[j]);
        t[0] ^= rcon;
        rcon = aes_mul(rcon, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        for (int j = 0; j < 4; j++) lookup(t[j], 1'b1, t[j]);
      end
      for (int j = 0; j < 4; j++) rk[4 * i + j] = rk[4 * (i - nk) + j] ^ t[j];
    end
  endtask

  function automatic void add_rk(ref state_t s, input int r);
    for (int i = 0; i < 16; i++) s[i] ^= rk[16 * r + i];
  endfunction

  // byte i of the state is row i%4, column i/4
  function automatic void shift_rows(ref state_t s, input bit inv);
    state_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (!inv) o[4 * c + r] = s[4 * ((c + r) % 4) + r];
        else      o[4 * ((c + r) % 4) + r] = s[4 * c + r];
    s = o;
  endfunction

  function automatic void mix_columns(ref state_t s, input bit inv);
    logic [7:0] a [4];
    logic [7:0] k0, k1, k2, k3;
    {k0, k1, k2, k3} = inv ? {8'h0e, 8'h0b, 8'h0d, 8'h09} : {8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = s[4 * c + r];
      for (int r = 0; r < 4; r++)
        s[4 * c + r] = aes_mul(a[r], k0) ^ aes_mul(a[(r + 1) % 4], k1) ^
                       aes_mul(a[(r + 2) % 4], k2) ^ aes_mul(a[(r + 3) % 4], k3);
    end
  endfunction

  task automatic sub_bytes(ref state_t s, input logic e);
    for (int i = 0; i < 16; i++) lookup(s[i], e, s[i]);
  endtask

  task automatic run_vector(input string name, input logic [255:0] key, input int nk,
                            input logic [127:0] pt, input logic [127:0] ct);
    state_t s;
    logic [127:0] out;
    expand_key(key, nk);
    // encrypt
    for (int i = 0; i < 16; i++) s[i] = pt[127 - 8 * i -: 8];
    add_rk(s, 0);
    for (int r = 1; r <= nr; r++) begin
      sub_bytes(s, 1'b1);
      shift_rows(s, 1'b0);
      if (r != nr) mix_columns(s, 1'b0);
      add_rk(s, r);
    end
    for (int i = 0; i < 16; i++) out[127 - 8 * i -: 8] = s[i];
    checks++;
    if (out !== ct) begin
      failures++;
      $display("FAIL %s encrypt: got %h exp %h", name, out, ct);
    end
    // decrypt (inverse cipher)
    for (int i = 0; i < 16; i++) s[i] = ct[127 - 8 * i -: 8];
    add_rk(s, nr);
    for (int r = nr - 1; r >= 0; r--) begin
      shift_rows(s, 1'b1);
      sub_bytes(s, 1'b0);
      add_rk(s, r);
      if (r != 0) mix_columns(s, 1'b1);
    end
    for (int i = 0; i < 16; i++) out[127 - 8 * i -: 8] = s[i];
    checks++;
    if (out !== pt) begin
      failures++;
      $display("FAIL %s decrypt: got %h exp %h", name, out, pt);
    end
    $display("%s done", name);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_in = 8'h00;
    enc_dec = 1'b1;
    run_vector("FIPS-197 B AES-128",
               {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0}, 4,
               128'h3243f6a8885a308d313198a2e0370734,
               128'h3925841d02dc09fbdc118597196a0b32);
    run_vector("FIPS-197 C.1 AES-128",
               {128'h000102030405060708090a0b0c0d0e0f, 128'h0}, 4,
               128'h00112233445566778899aabbccddeeff,
               128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run_vector("FIPS-197 C.2 AES-192",
               {192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0}, 6,
               128'h00112233445566778899aabbccddeeff,
               128'hdda97ca4864cdfe06eaf70a0ec0d7191);
    run_vector("FIPS-197 C.3 AES-256",
               256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 8,
               128'h00112233445566778899aabbccddeeff,
               128'h8ea2b7ca516745bfeafc49904b496089);
    $display("S-box lookups: SubBytes/SubWord=%0d InvSubBytes=%0d", n_sub, n_invsub);
    checks += 2;
    if (n_sub == 0)    begin failures++; $display("FAIL no SubBytes lookup"); end
    if (n_invsub == 0) begin failures++; $display("FAIL no InvSubBytes lookup"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
