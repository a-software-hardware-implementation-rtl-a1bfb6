// Self-checking testbench for rca_adder.
// Drives random and corner-case operands into a 256-bit instance (the width the
// multiplier uses) and compares sum/cout with the simulator's own wide
// addition; also checks subtraction mode (a + ~b + 1) and its no-borrow flag.
module tb_rca_adder;
  localparam int unsigned W = 256;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  rca_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  function automatic logic [W-1:0] rand_w();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic check_add(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    logic [W:0] ref_sum;
    a = x; b = y; cin = ci;
    #1;
    ref_sum = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, ci};
    checks++;
    if ({cout, sum} !== ref_sum) begin
      failures++;
      $display("FAIL add a=%h b=%h cin=%b got %b_%h", x, y, ci, cout, sum);
    end
  endtask

  task automatic check_sub(input logic [W-1:0] x, input logic [W-1:0] y);
    a = x; b = ~y; cin = 1'b1;
    #1;
    checks++;
    if (sum !== x - y || cout !== (x >= y)) begin
      failures++;
      $display("FAIL sub x=%h y=%h got %b_%h", x, y, cout, sum);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_add('0, '0, 1'b0);
    check_add('1, '0, 1'b1);          // carry ripples through every cell
    check_add('1, '1, 1'b1);
    check_add({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}}, 1'b0);
    for (int i = 0; i < 300; i++) check_add(rand_w(), rand_w(), 1'($urandom));
    check_sub(W'(5), W'(5));
    check_sub(W'(4), W'(5));
    for (int i = 0; i < 300; i++) check_sub(rand_w(), rand_w());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
