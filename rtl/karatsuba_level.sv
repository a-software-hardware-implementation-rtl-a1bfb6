// One halving level of the sequential multiplier (helper of karatsuba_mult).
//
// Computes c = a * b (W x W -> 2W bits) from four half-width products that it
// obtains, one after the other, from a half-width multiplier attached to its
// child port (x, y, sub_start, sub_reset -> z, sub_done):
//   P1 = AH*BH, P2 = AH*BL, P3 = AL*BH, P4 = AL*BL
// and then combines them with one 2W-bit ripple-carry adder in three clocks:
//   sum1 = P2 + P3, sum2 = (sum1 << W/2) + P4, c = sum2 + (P1 << W).
// For each half product there is a "send" state, which waits for the child's
// done to be low and then starts it, and a "get" state, which waits for done,
// stores z and raises the child's reset. The four products, the state
// sequence and the three adder steps follow the design's flow chart; the
// shifts in the adder steps and the one-clock-per-state timing are this
// design's choices. The carry out of the adder is left open on purpose: a
// W x W product always fits in 2W bits.
//
// Handshake: start is a level sampled while idle; done rises with c valid and
// stays high until the synchronous active-high reset. The child must be reset
// by (reset | sub_reset). Latency: 4*T_child + 16 clocks from start to done.
module karatsuba_level #(
  parameter int unsigned W = 128
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic [W-1:0]     a,
  input  logic [W-1:0]     b,
  output logic [2*W-1:0]   c,
  output logic             done,
  // half-width child multiplier
  output logic [W/2-1:0]   x,
  output logic [W/2-1:0]   y,
  output logic             sub_start,
  output logic             sub_reset,
  input  logic [W-1:0]     z,
  input  logic             sub_done
);

  localparam int unsigned H = W / 2;

  typedef enum logic [3:0] {
    K_IDLE,
    K_AHBH_SEND, K_AHBH_GET,
    K_AHBL_SEND, K_AHBL_GET,
    K_ALBH_SEND, K_ALBH_GET,
    K_ALBL_SEND, K_ALBL_GET,
    K_ADD1, K_ADD2, K_ADD3, K_FINAL
  } kstate_t;

  kstate_t        state;
  logic [W-1:0]   p1, p2, p3, p4;
  logic [2*W-1:0] ra, rb, sum;
  logic           sum_cout;

  rca_adder #(.W(2*W)) u_add (
    .a   (ra),
    .b   (rb),
    .cin (1'b0),
    .sum (sum),
    .cout(sum_cout)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= K_IDLE;
      x         <= '0;
      y         <= '0;
      sub_start <= 1'b0;
      sub_reset <= 1'b0;
      p1        <= '0;
      p2        <= '0;
      p3        <= '0;
      p4        <= '0;
      ra        <= '0;
      rb        <= '0;
      c         <= '0;
      done      <= 1'b0;
    end else begin
      unique case (state)
        K_IDLE: if (start) state <= K_AHBH_SEND;
        // Each SEND state waits for the child to be idle, then starts it.
        K_AHBH_SEND, K_AHBL_SEND, K_ALBH_SEND, K_ALBL_SEND:
          if (!sub_done) begin
            sub_start <= 1'b1;
            sub_reset <= 1'b0;
            unique case (state)
              K_AHBH_SEND: begin x <= a[W-1:H]; y <= b[W-1:H]; state <= K_AHBH_GET; end
              K_AHBL_SEND: begin x <= a[W-1:H]; y <= b[H-1:0]; state <= K_AHBL_GET; end
              K_ALBH_SEND: begin x <= a[H-1:0]; y <= b[W-1:H]; state <= K_ALBH_GET; end
              default:     begin x <= a[H-1:0]; y <= b[H-1:0]; state <= K_ALBL_GET; end
            endcase
          end
        // Each GET state waits for the child's product, stores it and resets the child.
        K_AHBH_GET, K_AHBL_GET, K_ALBH_GET, K_ALBL_GET:
          if (sub_done && sub_start) begin
            sub_start <= 1'b0;
            sub_reset <= 1'b1;
            unique case (state)
              K_AHBH_GET: begin p1 <= z; state <= K_AHBL_SEND; end
              K_AHBL_GET: begin p2 <= z; state <= K_ALBH_SEND; end
              K_ALBH_GET: begin p3 <= z; state <= K_ALBL_SEND; end
              default:    begin p4 <= z; state <= K_ADD1;      end
            endcase
          end
        K_ADD1: begin
          sub_reset <= 1'b0;
          ra    <= {{W{1'b0}}, p2};
          rb    <= {{W{1'b0}}, p3};
          state <= K_ADD2;
        end
        K_ADD2: begin
          ra    <= sum << H;
          rb    <= {{W{1'b0}}, p4};
          state <= K_ADD3;
        end
        K_ADD3: begin
          ra    <= sum;
          rb    <= {p1, {W{1'b0}}};
          state <= K_FINAL;
        end
        K_FINAL: begin
          c    <= sum;
          done <= 1'b1;
        end
        default: state <= K_IDLE;
      endcase
    end
  end

endmodule
