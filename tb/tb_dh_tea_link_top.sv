// End-to-end testbench for dh_tea_link_top, at the default parameters
// (128-bit numbers, modulus 35653, 50 MHz clock, 9600 baud).
//
// The testbench plays the part of the two nodes' processors and runs the
// whole protocol over the real serial lines:
//   1-2. node 1 computes 911^7 mod P, node 2 computes 911^6 mod P (in parallel)
//   3-4. each node sends its 16-byte result to the other (full duplex)
//   5-6. each node re-arms its unit and raises the received value to its own
//        secret, giving the shared key on both sides
//   7.   node 1 encrypts a message with TEA under its key and sends the
//        8-byte ciphertext; node 2 decrypts it under its own key.
// Checks: the intermediate and key values of the worked example (16187,
// 13598, 25697), every byte received intact and without framing error, the
// ciphertext against a reference TEA function and the decrypted message.
// It also counts how often each mechanism happened (squarings, multiplies by
// the base, subtraction steps of the reduction, multiplier runs, bytes in each
// direction, cycles with both lines busy at once) and fails if one never did.
module tb_dh_tea_link_top;
  localparam int unsigned W = 128;

  logic         clk = 1'b0;
  logic         reset;
  logic         n1_dh_reset, n1_dh_start, n1_dh_finish;
  logic [W-1:0] n1_dh_a, n1_dh_b, n1_dh_c;
  logic [127:0] n1_tea_key;
  logic [63:0]  n1_plaintext, n1_ciphertext;
  logic         n1_tx_start, n1_tx_busy, n1_tx_done, n1_rx_valid, n1_rx_err;
  logic [7:0]   n1_tx_data, n1_rx_data;
  logic         n2_dh_reset, n2_dh_start, n2_dh_finish;
  logic [W-1:0] n2_dh_a, n2_dh_b, n2_dh_c;
  logic [127:0] n2_tea_key;
  logic [63:0]  n2_ciphertext, n2_plaintext;
  logic         n2_tx_start, n2_tx_busy, n2_tx_done, n2_rx_valid, n2_rx_err;
  logic [7:0]   n2_tx_data, n2_rx_data;
  logic         tx1, tx2;

  int checks = 0, failures = 0;

  dh_tea_link_top dut (.*);

  always #10 clk = ~clk;                     // 20 ns period, 50 MHz

  // ---------------- mechanism counters ----------------
  int n_square = 0, n_mul_base = 0, n_sub_steps = 0, n_mult_runs = 0;
  int n_bytes_1to2 = 0, n_bytes_2to1 = 0, n_duplex_cycles = 0, n_frame_err = 0;
  logic n1_mdone_q = 1'b0, n2_mdone_q = 1'b0;

  always @(posedge clk) begin
    if (dut.u_n1_dh.u_mult.done && !n1_mdone_q) begin
      n_mult_runs++;
      if (int'(dut.u_n1_dh.state) == 4) n_mul_base++; else n_square++;
    end
    if (dut.u_n2_dh.u_mult.done && !n2_mdone_q) begin
      n_mult_runs++;
      if (int'(dut.u_n2_dh.state) == 4) n_mul_base++; else n_square++;
    end
    n1_mdone_q <= dut.u_n1_dh.u_mult.done;
    n2_mdone_q <= dut.u_n2_dh.u_mult.done;
    if (int'(dut.u_n1_dh.u_mod.state) == 1 && dut.u_n1_dh.u_mod.no_borrow) n_sub_steps++;
    if (int'(dut.u_n2_dh.u_mod.state) == 1 && dut.u_n2_dh.u_mod.no_borrow) n_sub_steps++;
    if (n1_tx_busy && n2_tx_busy) n_duplex_cycles++;
    if (n1_rx_valid && !reset) n_bytes_2to1++;
    if (n2_rx_valid && !reset) n_bytes_1to2++;
    if (!reset && ((n1_rx_valid && n1_rx_err) || (n2_rx_valid && n2_rx_err))) n_frame_err++;
  end

  // ---------------- reference model ----------------
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

  task automatic expect_eq(input string what, input logic [W-1:0] got, input logic [W-1:0] expv);
    checks++;
    if (got !== expv) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, expv);
    end else $display("%s = %0d", what, got);
  endtask

  // ---------------- processor-side sequences ----------------
  task automatic n1_send(input logic [7:0] d);
    while (n1_tx_busy) @(negedge clk);
    n1_tx_data = d; n1_tx_start = 1'b1;
    @(negedge clk); n1_tx_start = 1'b0;
    while (n1_tx_busy) @(negedge clk);
  endtask

  task automatic n2_send(input logic [7:0] d);
    while (n2_tx_busy) @(negedge clk);
    n2_tx_data = d; n2_tx_start = 1'b1;
    @(negedge clk); n2_tx_start = 1'b0;
    while (n2_tx_busy) @(negedge clk);
  endtask

  task automatic n1_recv(output logic [7:0] d);
    do @(posedge clk); while (!n1_rx_valid);
    d = n1_rx_data;
  endtask

  task automatic n2_recv(output logic [7:0] d);
    do @(posedge clk); while (!n2_rx_valid);
    d = n2_rx_data;
  endtask

  task automatic n1_exp(input logic [W-1:0] a, input logic [W-1:0] b);
    @(negedge clk); n1_dh_reset = 1'b1; n1_dh_start = 1'b0;
    @(negedge clk); n1_dh_reset = 1'b0; n1_dh_a = a; n1_dh_b = b; n1_dh_start = 1'b1;
    while (!n1_dh_finish) @(negedge clk);
    n1_dh_start = 1'b0;
  endtask

  task automatic n2_exp(input logic [W-1:0] a, input logic [W-1:0] b);
    @(negedge clk); n2_dh_reset = 1'b1; n2_dh_start = 1'b0;
    @(negedge clk); n2_dh_reset = 1'b0; n2_dh_a = a; n2_dh_b = b; n2_dh_start = 1'b1;
    while (!n2_dh_finish) @(negedge clk);
    n2_dh_start = 1'b0;
  endtask

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [W-1:0] G = 128'd911, SECRET1 = 128'd7, SECRET2 = 128'd6;
  localparam logic [63:0]  MESSAGE = 64'h00000000_1234ABCD;

  initial begin
    logic [W-1:0] r1, r2, got_at_1, got_at_2, key1, key2;
    logic [63:0]  cipher, got_cipher;
    logic [7:0]   b;
    reset = 1'b1;
    n1_dh_reset = 1'b0; n1_dh_start = 1'b0; n1_dh_a = '0; n1_dh_b = '0;
    n2_dh_reset = 1'b0; n2_dh_start = 1'b0; n2_dh_a = '0; n2_dh_b = '0;
    n1_tea_key = '0; n1_plaintext = '0; n2_tea_key = '0; n2_ciphertext = '0;
    n1_tx_start = 1'b0; n1_tx_data = '0; n2_tx_start = 1'b0; n2_tx_data = '0;
    got_at_1 = '0; got_at_2 = '0; got_cipher = '0;
    repeat (4) @(negedge clk);
    reset = 1'b0;

    // steps 1-2: public values
    fork
      n1_exp(G, SECRET1);
      n2_exp(G, SECRET2);
    join
    r1 = n1_dh_c; r2 = n2_dh_c;
    expect_eq("node 1 public value 911^7 mod 35653", r1, 128'd16187);
    expect_eq("node 2 public value 911^6 mod 35653", r2, 128'd13598);

    // steps 3-4: exchange over the serial lines, both directions at once
    fork
      for (int i = 0; i < W / 8; i++) n1_send(r1[i*8 +: 8]);
      for (int i = 0; i < W / 8; i++) n2_send(r2[i*8 +: 8]);
      for (int i = 0; i < W / 8; i++) begin n2_recv(b); got_at_2[i*8 +: 8] = b; end
      for (int i = 0; i < W / 8; i++) begin n1_recv(b); got_at_1[i*8 +: 8] = b; end
    join
    expect_eq("value received by node 2", got_at_2, r1);
    expect_eq("value received by node 1", got_at_1, r2);

    // steps 5-6: shared key
    fork
      n1_exp(got_at_1, SECRET1);
      n2_exp(got_at_2, SECRET2);
    join
    key1 = n1_dh_c; key2 = n2_dh_c;
    expect_eq("node 1 key", key1, 128'd25697);
    expect_eq("node 2 key", key2, 128'd25697);

    // step 7: encrypt on node 1, send, decrypt on node 2
    n1_tea_key = key1; n1_plaintext = MESSAGE;
    #1 cipher = n1_ciphertext;
    checks++;
    if (cipher !== ref_enc(key1, MESSAGE)) begin
      failures++; $display("FAIL ciphertext %h expected %h", cipher, ref_enc(key1, MESSAGE));
    end else $display("ciphertext = %h", cipher);
    fork
      for (int i = 0; i < 8; i++) n1_send(cipher[i*8 +: 8]);
      for (int i = 0; i < 8; i++) begin n2_recv(b); got_cipher[i*8 +: 8] = b; end
    join
    n2_tea_key = key2; n2_ciphertext = got_cipher;
    #1;
    checks++;
    if (n2_plaintext !== MESSAGE) begin
      failures++; $display("FAIL decrypted %h expected %h", n2_plaintext, MESSAGE);
    end else $display("decrypted message = %h", n2_plaintext);

    // mechanisms
    $display("squarings=%0d base-multiplies=%0d subtraction-steps=%0d multiplier-runs=%0d",
             n_square, n_mul_base, n_sub_steps, n_mult_runs);
    $display("bytes 1->2=%0d 2->1=%0d full-duplex-cycles=%0d framing-errors=%0d",
             n_bytes_1to2, n_bytes_2to1, n_duplex_cycles, n_frame_err);
    checks++; if (n_square == 0)        begin failures++; $display("FAIL no squaring step"); end
    checks++; if (n_mul_base == 0)      begin failures++; $display("FAIL no multiply-by-base step"); end
    checks++; if (n_sub_steps == 0)     begin failures++; $display("FAIL no subtraction step"); end
    checks++; if (n_mult_runs != n_square + n_mul_base) begin failures++; $display("FAIL multiplier run count"); end
    checks++; if (n_bytes_1to2 != 24 || n_bytes_2to1 != 16) begin failures++; $display("FAIL byte counts"); end
    checks++; if (n_duplex_cycles == 0) begin failures++; $display("FAIL no full-duplex transfer"); end
    checks++; if (n_frame_err != 0)     begin failures++; $display("FAIL framing errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
