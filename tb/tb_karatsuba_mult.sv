// Self-checking testbench for karatsuba_mult.
// The 128-bit instance (the design's size) multiplies random and corner-case
// operands; each product is compared with the simulator's own multiplication
// and the latency from start to done with the recurrence of the state
// sequence, T(8) = 1 and T(W) = 4*T(W/2) + 16, i.e. 1616 cycles at 128 bits.
// Every run re-arms the unit through reset, as its users do.
module tb_karatsuba_mult;
  localparam int unsigned W = 128;

  logic           clk = 1'b0;
  logic           reset, start, done;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] c;
  int checks = 0, failures = 0;

  karatsuba_mult #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int expected_latency(int unsigned w);
    return (w <= 8) ? 1 : 4 * expected_latency(w / 2) + 16;
  endfunction

  function automatic logic [W-1:0] rand_w();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic run(input logic [W-1:0] av, input logic [W-1:0] bv);
    int cycles;
    @(negedge clk);
    reset = 1'b1;
    @(negedge clk);
    reset = 1'b0; a = av; b = bv; start = 1'b1;
    cycles = 0;
    do begin
      @(posedge clk); #1; cycles++;
    end while (!done && cycles < 10000);
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (c !== {{W{1'b0}}, av} * {{W{1'b0}}, bv}) begin
      failures++;
      $display("FAIL %h * %h got %h", av, bv, c);
    end
    checks++;
    if (cycles != expected_latency(W)) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cycles, expected_latency(W));
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; start = 1'b0; a = '0; b = '0;
    run(128'd4561, 128'd481);                  // 2193841
    run('1, '1);
    run('0, rand_w());
    run(128'd1, rand_w());
    run({1'b1, 127'b0}, {1'b1, 127'b0});
    for (int i = 0; i < 60; i++) run(rand_w(), rand_w());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
