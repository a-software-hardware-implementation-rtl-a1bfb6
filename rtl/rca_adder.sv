// Ripple-carry adder.
//
// A chain of W full-adder cells: cell i adds a[i], b[i] and the carry out of
// cell i-1, so the carry ripples from bit 0 to bit W-1. It is purely
// combinational; the result is valid one carry-chain delay after the inputs.
// The same cell chain serves as a subtractor when the caller feeds ~b and
// cin = 1 (a - b = a + ~b + 1); cout is then 1 exactly when a >= b.
// A ripple-carry structure was chosen for the arithmetic of this design
// because it is the smallest adder; it is used by the multiplier to sum its
// partial products and by the modular-reduction unit to subtract the modulus.
//
// Ports: a, b (W bits), cin -> sum (W bits), cout.
module rca_adder #(
  parameter int unsigned W = 256
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  always_comb begin
    logic carry;                    // carry into the current cell
    carry = cin;
    for (int unsigned i = 0; i < W; i++) begin
      sum[i] = a[i] ^ b[i] ^ carry;
      carry  = (a[i] & b[i]) | (a[i] & carry) | (b[i] & carry);
    end
    cout = carry;
  end

endmodule
