// Self-checking testbench for tea_encrypt.
// Checks the published all-zero-key chain of test vectors (each ciphertext is
// the next plaintext) and random key/plaintext pairs against a reference model
// of the algorithm written here as a function.
module tb_tea_encrypt;
  logic [127:0] key;
  logic [63:0]  pt, ct;
  int checks = 0, failures = 0;

  tea_encrypt dut (.key(key), .plaintext(pt), .ciphertext(ct));

  function automatic logic [63:0] ref_enc(logic [127:0] k, logic [63:0] v);
    logic [31:0] y, z, s;
    logic [31:0] kk [4];
    kk = '{k[127:96], k[95:64], k[63:32], k[31:0]};
    y = v[63:32]; z = v[31:0]; s = 0;
    repeat (32) begin
      s += 32'h9E3779B9;
      y += ((z << 4) + kk[0]) ^ (z + s) ^ ((z >> 5) + kk[1]);
      z += ((y << 4) + kk[2]) ^ (y + s) ^ ((y >> 5) + kk[3]);
    end
    return {y, z};
  endfunction

  task automatic check(input logic [127:0] k, input logic [63:0] v, input logic [63:0] expv);
    key = k; pt = v; #1;
    checks++;
    if (ct !== expv) begin
      failures++;
      $display("FAIL key=%h pt=%h got %h expected %h", k, v, ct, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, 64'h00000000_00000000, 64'h41ea3a0a_94baa940);
    check('0, 64'h41ea3a0a_94baa940, 64'hb9354a86_1ea75492);
    check('0, 64'hb9354a86_1ea75492, 64'h1dbae8aa_ae2bba9a);
    check('0, 64'h1dbae8aa_ae2bba9a, 64'h0eb60bc9_0296522d);
    for (int i = 0; i < 200; i++) begin
      logic [127:0] k;
      logic [63:0]  v;
      k = {$urandom, $urandom, $urandom, $urandom};
      v = {$urandom, $urandom};
      check(k, v, ref_enc(k, v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
