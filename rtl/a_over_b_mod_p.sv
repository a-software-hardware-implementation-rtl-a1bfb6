// Modular exponentiation unit: c = a^b mod P (the Diffie-Hellman operation).
//
// Left-to-right square and multiply over the W bits of the exponent b, from
// bit W-1 down to bit 0: the running value C starts at 1; for every exponent
// bit C is squared and reduced mod P, and when the bit is 1 it is also
// multiplied by a and reduced mod P. Multiplication uses one karatsuba_mult
// (W x W -> 2W bits) and reduction one mod_reduce (repeated subtraction of P),
// both started and re-armed through their start / reset / done handshakes.
// The states follow the design's state chart: S0 idle and initialise (C = 1,
// counter = W-1), S1 square, S2 reduce, S3 test exponent bit, S4 multiply by
// a, S5 reduce, S6 finished. Bit 0 of the exponent is processed too (the
// counter is tested before it is decremented), which is what makes the
// worked example come out: with P = 35653, 911^7 mod P = 16187.
// The modulus P is a constant of the unit, as in the design (no modulus
// port); its default is the package's DH_MODULUS_DEFAULT.
//
// Handshake: start is a level sampled in S0; finish rises with c valid and
// stays high until the synchronous active-high reset.
// Timing: each exponent bit costs one multiplication (1616 cycles at W = 128)
// plus one reduction (2 + quotient cycles, the quotient being below P when
// both factors are below P), and the same again when the bit is 1, plus a few
// handshake cycles. With P = 35653 a run takes about 0.21-0.24 million cycles.
module a_over_b_mod_p
  import dh_tea_pkg::*;
#(
  parameter int unsigned W    = DH_WIDTH,
  parameter logic [W-1:0] P   = W'(DH_MODULUS_DEFAULT),
  parameter int unsigned LEAF = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] c,
  output logic         finish
);

  typedef enum logic [2:0] {S0, S1, S2, S3, S4, S5, S6} sstate_t;

  localparam int unsigned CW = $clog2(W);

  sstate_t         state;
  logic [CW-1:0]   counter;
  logic [W-1:0]    a_mult, b_mult;
  logic            start_mult, reset_mult, done_mult;
  logic [2*W-1:0]  c_mult, x_mod;
  logic            start_mod, reset_mod, finish_mod;
  logic [W-1:0]    y_mod;

  karatsuba_mult #(.W(W), .LEAF(LEAF)) u_mult (
    .clk  (clk),
    .reset(reset | reset_mult),
    .start(start_mult),
    .a    (a_mult),
    .b    (b_mult),
    .c    (c_mult),
    .done (done_mult)
  );

  mod_reduce #(.WX(2*W), .WP(W)) u_mod (
    .clk   (clk),
    .reset (reset | reset_mod),
    .start (start_mod),
    .x     (x_mod),
    .p     (P),
    .y     (y_mod),
    .finish(finish_mod)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state      <= S0;
      counter    <= CW'(W - 1);
      c          <= W'(1);
      a_mult     <= '0;
      b_mult     <= '0;
      x_mod      <= '0;
      start_mult <= 1'b0;
      reset_mult <= 1'b0;
      start_mod  <= 1'b0;
      reset_mod  <= 1'b0;
      finish     <= 1'b0;
    end else begin
      unique case (state)
        S0: begin
          reset_mod  <= 1'b0;
          reset_mult <= 1'b0;
          start_mult <= 1'b0;
          start_mod  <= 1'b0;
          counter    <= CW'(W - 1);
          c          <= W'(1);
          if (start) state <= S1;
        end
        S1, S4: begin                       // square (S1) or multiply by a (S4)
          reset_mod  <= 1'b0;
          reset_mult <= 1'b0;
          a_mult     <= c;
          b_mult     <= (state == S1) ? c : a;
          start_mult <= 1'b1;
          if (done_mult && start_mult && !reset_mult) begin
            x_mod      <= c_mult;
            reset_mult <= 1'b1;
            start_mult <= 1'b0;
            state      <= (state == S1) ? S2 : S5;
          end
        end
        S2, S5: begin                       // reduce the product mod P
          reset_mod  <= 1'b0;
          reset_mult <= 1'b0;
          start_mod  <= 1'b1;
          if (finish_mod && start_mod && !reset_mod) begin
            c         <= y_mod;
            reset_mod <= 1'b1;
            start_mod <= 1'b0;
            if (state == S2) begin
              state <= S3;
            end else if (counter == '0) begin
              state <= S6;
            end else begin
              counter <= counter - 1'b1;
              state   <= S1;
            end
          end
        end
        S3: begin                           // test the exponent bit
          reset_mod  <= 1'b0;
          reset_mult <= 1'b0;
          if (b[counter]) begin
            state <= S4;
          end else if (counter == '0) begin
            state <= S6;
          end else begin
            counter <= counter - 1'b1;
            state   <= S1;
          end
        end
        S6: begin
          reset_mod  <= 1'b0;
          reset_mult <= 1'b0;
          finish     <= 1'b1;
        end
        default: state <= S0;
      endcase
    end
  end

endmodule
