// Two-node secure serial link: Diffie-Hellman key agreement plus TEA.
//
// Two nodes share an insecure serial line. Each computes g^secret mod P with
// its own modular-exponentiation unit, sends the result to the other over the
// UART, then raises the received value to its own secret to obtain the common
// key g^(a*b) mod P. Node 1 encrypts a message with TEA under that key and
// sends the ciphertext; node 2 decrypts it with the same key.
//
// Structure (as in the design's system diagram):
//   node 1: a_over_b_mod_p, tea_encrypt, uart_tx + uart_rx
//   node 2: a_over_b_mod_p, tea_decrypt, uart_tx + uart_rx
//   node 1 txd drives node 2 rxd, node 2 txd drives node 1 rxd.
// In the design every unit of a node is attached only to that node's
// processor, which runs the protocol in software: it writes operands, starts
// the units, polls their done flags and moves bytes to and from the UART. That
// processor is not part of this RTL, so the processor side of each unit is
// brought out here as plain ports (prefix n1_ / n2_), and the two serial
// lines are also visible as outputs. All units share one clock and one
// synchronous active-high reset; each exponentiation unit also has its own
// re-arm reset (n1_dh_reset / n2_dh_reset) because it is run twice per key
// exchange.
//
// Timing: see the units. The TEA units are combinational; the UART moves one
// byte per 10 bit periods.
module dh_tea_link_top
  import dh_tea_pkg::*;
#(
  parameter int unsigned  W      = DH_WIDTH,
  parameter logic [W-1:0] P      = W'(DH_MODULUS_DEFAULT),
  parameter int unsigned  CLK_HZ = CLK_HZ_DEFAULT,
  parameter int unsigned  BAUD   = BAUD_DEFAULT
) (
  input  logic         clk,
  input  logic         reset,

  // node 1: exponentiation unit
  input  logic         n1_dh_reset,
  input  logic         n1_dh_start,
  input  logic [W-1:0] n1_dh_a,
  input  logic [W-1:0] n1_dh_b,
  output logic [W-1:0] n1_dh_c,
  output logic         n1_dh_finish,
  // node 1: TEA encryption
  input  logic [127:0] n1_tea_key,
  input  logic [63:0]  n1_plaintext,
  output logic [63:0]  n1_ciphertext,
  // node 1: UART, byte side
  input  logic         n1_tx_start,
  input  logic [7:0]   n1_tx_data,
  output logic         n1_tx_busy,
  output logic         n1_tx_done,
  output logic [7:0]   n1_rx_data,
  output logic         n1_rx_valid,
  output logic         n1_rx_err,

  // node 2: exponentiation unit
  input  logic         n2_dh_reset,
  input  logic         n2_dh_start,
  input  logic [W-1:0] n2_dh_a,
  input  logic [W-1:0] n2_dh_b,
  output logic [W-1:0] n2_dh_c,
  output logic         n2_dh_finish,
  // node 2: TEA decryption
  input  logic [127:0] n2_tea_key,
  input  logic [63:0]  n2_ciphertext,
  output logic [63:0]  n2_plaintext,
  // node 2: UART, byte side
  input  logic         n2_tx_start,
  input  logic [7:0]   n2_tx_data,
  output logic         n2_tx_busy,
  output logic         n2_tx_done,
  output logic [7:0]   n2_rx_data,
  output logic         n2_rx_valid,
  output logic         n2_rx_err,

  // the serial lines between the nodes (Tx1 -> Rx2, Tx2 -> Rx1)
  output logic         tx1,
  output logic         tx2
);

  // ---------------- node 1 ----------------
  a_over_b_mod_p #(.W(W), .P(P)) u_n1_dh (
    .clk   (clk),
    .reset (reset | n1_dh_reset),
    .start (n1_dh_start),
    .a     (n1_dh_a),
    .b     (n1_dh_b),
    .c     (n1_dh_c),
    .finish(n1_dh_finish)
  );

  tea_encrypt u_n1_enc (
    .key       (n1_tea_key),
    .plaintext (n1_plaintext),
    .ciphertext(n1_ciphertext)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_n1_tx (
    .clk     (clk),
    .reset   (reset),
    .tx_start(n1_tx_start),
    .tx_data (n1_tx_data),
    .txd     (tx1),
    .tx_busy (n1_tx_busy),
    .tx_done (n1_tx_done)
  );

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_n1_rx (
    .clk      (clk),
    .reset    (reset),
    .rxd      (tx2),
    .rx_data  (n1_rx_data),
    .rx_valid (n1_rx_valid),
    .frame_err(n1_rx_err)
  );

  // ---------------- node 2 ----------------
  a_over_b_mod_p #(.W(W), .P(P)) u_n2_dh (
    .clk   (clk),
    .reset (reset | n2_dh_reset),
    .start (n2_dh_start),
    .a     (n2_dh_a),
    .b     (n2_dh_b),
    .c     (n2_dh_c),
    .finish(n2_dh_finish)
  );

  tea_decrypt u_n2_dec (
    .key       (n2_tea_key),
    .ciphertext(n2_ciphertext),
    .plaintext (n2_plaintext)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_n2_tx (
    .clk     (clk),
    .reset   (reset),
    .tx_start(n2_tx_start),
    .tx_data (n2_tx_data),
    .txd     (tx2),
    .tx_busy (n2_tx_busy),
    .tx_done (n2_tx_done)
  );

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_n2_rx (
    .clk      (clk),
    .reset    (reset),
    .rxd      (tx1),
    .rx_data  (n2_rx_data),
    .rx_valid (n2_rx_valid),
    .frame_err(n2_rx_err)
  );

endmodule
