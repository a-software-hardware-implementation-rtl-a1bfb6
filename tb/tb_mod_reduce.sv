// Self-checking testbench for mod_reduce.
// A 256-bit by 128-bit instance (the sizes of the exponentiation unit) reduces
// operands whose quotient is small enough to simulate; each result is checked
// against the % operator, and the cycle count from start to finish against
// the one-subtraction-per-clock rule, 2 + floor(x / p). The re-arm through
// reset and the hold of finish are checked as well.
module tb_mod_reduce;
  localparam int unsigned WX = 256, WP = 128;

  logic          clk = 1'b0;
  logic          reset, start, finish;
  logic [WX-1:0] x;
  logic [WP-1:0] p, y;
  int checks = 0, failures = 0;

  mod_reduce #(.WX(WX), .WP(WP)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input logic [WX-1:0] xv, input logic [WP-1:0] pv);
    int cycles;
    logic [WX-1:0] q;
    @(negedge clk);
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0; x = xv; p = pv; start = 1'b1;
    cycles = 0;
    do begin
      @(posedge clk); #1; cycles++;
    end while (!finish && cycles < 100000);
    @(negedge clk);
    start = 1'b0;
    q = xv / {{(WX-WP){1'b0}}, pv};
    checks++;
    if ({{(WX-WP){1'b0}}, y} !== xv % {{(WX-WP){1'b0}}, pv}) begin
      failures++;
      $display("FAIL x=%0d p=%0d y=%0d", xv, pv, y);
    end
    checks++;
    if (cycles != int'(q) + 2) begin
      failures++;
      $display("FAIL cycles x=%0d p=%0d got %0d expected %0d", xv, pv, cycles, int'(q) + 2);
    end
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (!finish || {{(WX-WP){1'b0}}, y} !== xv % {{(WX-WP){1'b0}}, pv}) begin
      failures++;
      $display("FAIL finish/result not held");
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WP-1:0] pv;
    logic [WX-1:0] xv;
    reset = 1'b1; start = 1'b0; x = '0; p = 1;
    run(256'd15625, 128'd23);                 // 5^6 mod 23 = 8
    run(256'd22, 128'd23);                    // already reduced
    run(256'd23, 128'd23);                    // exact multiple
    run(256'd1271131009, 128'd35653);         // 35653^2 - 1 ... largest square below P^2 region
    for (int i = 0; i < 40; i++) begin
      // large operands with a bounded quotient: x = q*p + r
      pv = {$urandom, $urandom, $urandom, $urandom};
      if (pv == '0) pv = 1;
      xv = {{(WX-WP){1'b0}}, pv} * WX'($urandom_range(0, 300)) + WX'(pv - 1 - WP'($urandom_range(0, 5)));
      run(xv, pv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
