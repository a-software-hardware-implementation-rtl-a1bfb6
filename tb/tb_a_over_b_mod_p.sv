// Self-checking testbench for a_over_b_mod_p.
// The default instance (128 bits, modulus 35653) runs the key-exchange
// example: 911^7 = 16187, 911^6 = 13598 and both 13598^7 and 16187^6 = 25697,
// plus the textbook case with exponent 0 and 1. A second 128-bit instance
// with a small modulus (1009) keeps the repeated-subtraction reduction short
// enough to try random full-width exponents, so that every exponent bit from
// 127 down to 0 is exercised; results are checked against a reference
// square-and-multiply written with the % operator. Each run re-arms the
// unit with reset, as its user does.
module tb_a_over_b_mod_p;
  localparam int unsigned  W  = 128;
  localparam logic [W-1:0] P2 = 128'd1009;

  logic         clk = 1'b0;
  logic         reset1, start1, finish1;
  logic [W-1:0] a1, b1, c1;
  logic         reset2, start2, finish2;
  logic [W-1:0] a2, b2, c2;
  int checks = 0, failures = 0;

  a_over_b_mod_p dut1 (.clk(clk), .reset(reset1), .start(start1), .a(a1), .b(b1), .c(c1), .finish(finish1));
  a_over_b_mod_p #(.W(W), .P(P2)) dut2 (.clk(clk), .reset(reset2), .start(start2), .a(a2), .b(b2), .c(c2), .finish(finish2));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] ref_pow(logic [W-1:0] base, logic [W-1:0] e, logic [W-1:0] m);
    logic [2*W-1:0] r, bb;
    r  = 1;
    bb = {{W{1'b0}}, base} % {{W{1'b0}}, m};
    for (int i = 0; i < W; i++) begin
      if (e[i]) r = (r * bb) % {{W{1'b0}}, m};
      bb = (bb * bb) % {{W{1'b0}}, m};
    end
    return r[W-1:0];
  endfunction

  task automatic run1(input logic [W-1:0] av, input logic [W-1:0] bv, input logic [W-1:0] expv);
    int cycles = 0;
    @(negedge clk); reset1 = 1'b1;
    @(negedge clk); reset1 = 1'b0; a1 = av; b1 = bv; start1 = 1'b1;
    do begin @(posedge clk); #1; cycles++; end while (!finish1 && cycles < 5000000);
    @(negedge clk); start1 = 1'b0;
    checks++;
    if (c1 !== expv) begin
      failures++;
      $display("FAIL %0d^%0d mod 35653 got %0d expected %0d", av, bv, c1, expv);
    end else $display("%0d^%0d mod 35653 = %0d in %0d cycles", av, bv, c1, cycles);
  endtask

  task automatic run2(input logic [W-1:0] av, input logic [W-1:0] bv);
    int cycles = 0;
    logic [W-1:0] expv;
    expv = ref_pow(av, bv, P2);
    @(negedge clk); reset2 = 1'b1;
    @(negedge clk); reset2 = 1'b0; a2 = av; b2 = bv; start2 = 1'b1;
    do begin @(posedge clk); #1; cycles++; end while (!finish2 && cycles < 5000000);
    @(negedge clk); start2 = 1'b0;
    checks++;
    if (c2 !== expv) begin
      failures++;
      $display("FAIL %0d^%h mod 1009 got %0d expected %0d", av, bv, c2, expv);
    end
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset1 = 1'b1; start1 = 1'b0; a1 = '0; b1 = '0;
    reset2 = 1'b1; start2 = 1'b0; a2 = '0; b2 = '0;
    fork
      begin
        run1(128'd911,   128'd7, 128'd16187);
        run1(128'd911,   128'd6, 128'd13598);
        run1(128'd13598, 128'd7, 128'd25697);
        run1(128'd16187, 128'd6, 128'd25697);
        run1(128'd911,   128'd0, 128'd1);
        run1(128'd911,   128'd1, 128'd911);
      end
      begin
        run2(128'd5, 128'd6);
        run2(128'd1008, '1);
        for (int i = 0; i < 6; i++)
          run2(W'($urandom_range(0, 1008)), {$urandom, $urandom, $urandom, $urandom});
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
