// Modular reduction by repeated subtraction: y = x mod p.
//
// After start the remainder register is loaded with x; then, once per clock,
// the ripple-carry adder (used as a subtractor) forms r - p and, while r >= p,
// r is replaced by r - p. When r < p the unit stops, y = r and finish is raised
// and held until reset. The number of cycles is therefore 2 + floor(x / p):
// this follows the mechanism of one subtraction per clock; it is fast when
// x < p^2 and p is small, and impractical when the quotient is large.
// A modulus of 0 is treated as "no reduction": y takes the low WP bits of x
// after one cycle (a choice of this design).
//
// Handshake (level based, as for all units of this design): start is sampled
// while idle; finish stays high until the synchronous, active-high reset.
// Ports: clk, reset, start, x (WX bits), p (WP bits) -> y (WP bits), finish.
module mod_reduce #(
  parameter int unsigned WX = 256,
  parameter int unsigned WP = 128
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          start,
  input  logic [WX-1:0] x,
  input  logic [WP-1:0] p,
  output logic [WP-1:0] y,
  output logic          finish
);

  typedef enum logic [1:0] {M_IDLE, M_SUB, M_DONE} mstate_t;
  mstate_t        state;
  logic [WX-1:0]  r;
  logic [WX-1:0]  diff;
  logic           no_borrow;   // 1 when r >= p

  rca_adder #(.W(WX)) u_sub (
    .a   (r),
    .b   (~{{(WX-WP){1'b0}}, p}),
    .cin (1'b1),
    .sum (diff),
    .cout(no_borrow)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state  <= M_IDLE;
      r      <= '0;
      finish <= 1'b0;
    end else begin
      unique case (state)
        M_IDLE: if (start) begin
          r     <= x;
          state <= M_SUB;
        end
        M_SUB: begin
          if (p != '0 && no_borrow) begin
            r <= diff;
          end else begin
            finish <= 1'b1;
            state  <= M_DONE;
          end
        end
        M_DONE: finish <= 1'b1;
        default: state <= M_IDLE;
      endcase
    end
  end

  assign y = r[WP-1:0];

endmodule
