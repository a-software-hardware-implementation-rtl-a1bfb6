// Sequential divide-and-conquer multiplier: c = a * b (W x W -> 2W bits).
//
// The multiplier is a chain of halving levels. Level 0 (width W) splits its
// operands into high and low halves and asks level 1 (width W/2) for the four
// half products AH*BH, AH*BL, AL*BH and AL*BL one after the other, then adds
// them with a ripple-carry adder (see karatsuba_level). Level 1 does the same
// with level 2, and so on down to the leaf of width LEAF, which forms its
// product directly in one clock. With the defaults the chain has 128-, 64-,
// 32- and 16-bit levels and an 8-bit leaf, as in the design; the leaf's
// direct multiplication is this design's choice. Only one multiplier of each
// width exists, so a 128-bit product costs 4^4 = 256 leaf multiplications.
//
// Each level starts and re-arms the level below with the same handshake the
// multiplier offers its user: start is a level sampled while idle; done rises
// when c is valid and stays high, with c held, until the synchronous
// active-high reset. A level resets its child with (its own reset | its
// sub_reset pulse).
// Latency from the first clock that samples start to done:
// T(LEAF) = 1 and T(W) = 4*T(W/2) + 16, i.e. 20, 96, 400 and 1616 clocks
// for 16, 32, 64 and 128 bits.
// W must be LEAF times a power of two.
module karatsuba_mult #(
  parameter int unsigned W    = 128,
  parameter int unsigned LEAF = 8
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           start,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] c,
  output logic           done
);

  localparam int unsigned LEVELS = (W > LEAF) ? $clog2(W / LEAF) : 0;

  // Per-level buses, sized for the widest level; level i uses the low
  // W >> i bits of its operands and the low 2*(W >> i) bits of its product.
  logic [W-1:0]   lv_a     [LEVELS+1];
  logic [W-1:0]   lv_b     [LEVELS+1];
  logic [2*W-1:0] lv_c     [LEVELS+1];
  logic           lv_start [LEVELS+1];
  logic           lv_reset [LEVELS+1];
  logic           lv_done  [LEVELS+1];

  assign lv_a[0]     = a;
  assign lv_b[0]     = b;
  assign lv_start[0] = start;
  assign lv_reset[0] = reset;
  assign c           = lv_c[0];
  assign done        = lv_done[0];

  for (genvar i = 0; i < LEVELS; i++) begin : g_level
    localparam int unsigned WI = W >> i;
    logic sub_reset;

    karatsuba_level #(.W(WI)) u_level (
      .clk      (clk),
      .reset    (lv_reset[i]),
      .start    (lv_start[i]),
      .a        (lv_a[i][WI-1:0]),
      .b        (lv_b[i][WI-1:0]),
      .c        (lv_c[i][2*WI-1:0]),
      .done     (lv_done[i]),
      .x        (lv_a[i+1][WI/2-1:0]),
      .y        (lv_b[i+1][WI/2-1:0]),
      .sub_start(lv_start[i+1]),
      .sub_reset(sub_reset),
      .z        (lv_c[i+1][WI-1:0]),
      .sub_done (lv_done[i+1])
    );

    assign lv_reset[i+1] = lv_reset[i] | sub_reset;
    if (i > 0) begin : g_pad_c
      assign lv_c[i][2*W-1:2*WI] = '0;
    end
    assign lv_a[i+1][W-1:WI/2] = '0;
    assign lv_b[i+1][W-1:WI/2] = '0;
  end

  // Leaf multiplier of width LEAF
  localparam int unsigned WL = W >> LEVELS;
  logic [2*WL-1:0] leaf_c;

  always_ff @(posedge clk) begin
    if (lv_reset[LEVELS]) begin
      leaf_c           <= '0;
      lv_done[LEVELS]  <= 1'b0;
    end else if (lv_start[LEVELS] && !lv_done[LEVELS]) begin
      leaf_c          <= lv_a[LEVELS][WL-1:0] * lv_b[LEVELS][WL-1:0];
      lv_done[LEVELS] <= 1'b1;
    end
  end

  if (LEVELS > 0) begin : g_pad_leaf
    assign lv_c[LEVELS] = {{(2*W-2*WL){1'b0}}, leaf_c};
  end else begin : g_only_leaf
    assign lv_c[LEVELS] = leaf_c;
  end

endmodule
