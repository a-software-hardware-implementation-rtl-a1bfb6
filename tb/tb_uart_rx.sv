// Self-checking testbench for uart_rx.
// A transmitter model in the testbench drives frames onto rxd at 10 clocks
// per bit (CLK_HZ = 1 MHz, BAUD = 100 kHz). Checks: every byte is received
// with one rx_valid pulse and no framing error; a frame with a low stop bit
// raises frame_err; a short low glitch on the idle line produces no byte.
module tb_uart_rx;
  localparam int unsigned CLK_HZ = 1_000_000, BAUD = 100_000, DIV = CLK_HZ / BAUD;

  logic       clk = 1'b0;
  logic       reset, rxd, rx_valid, frame_err;
  logic [7:0] rx_data;
  int checks = 0, failures = 0;
  int valid_count = 0;
  logic [7:0] last_data;
  logic       last_err;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rx_valid) begin
    valid_count++;
    last_data <= rx_data;
    last_err  <= frame_err;
  end

  task automatic drive_frame(input logic [7:0] d, input logic stop);
    logic [9:0] f;
    f = {stop, d, 1'b0};
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) rxd = f[i];
      repeat (DIV - 1) @(negedge clk);
    end
    @(negedge clk) rxd = 1'b1;
  endtask

  task automatic rx_check(input logic [7:0] d, input logic stop);
    int n_before;
    n_before = valid_count;
    drive_frame(d, stop);
    repeat (DIV) @(posedge clk);
    #1;
    checks++;
    if (valid_count != n_before + 1 || last_data !== d || last_err !== !stop) begin
      failures++;
      $display("FAIL byte %h stop %b: %0d pulses, data %h err %b", d, stop,
               valid_count - n_before, last_data, last_err);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_before;
    reset = 1'b1; rxd = 1'b1;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    repeat (5) @(posedge clk);
    rx_check(8'h55, 1'b1);
    rx_check(8'hC3, 1'b1);
    rx_check(8'h00, 1'b1);
    rx_check(8'hFF, 1'b1);
    rx_check(8'h5A, 1'b0);                    // framing error
    // glitch shorter than half a bit
    n_before = valid_count;
    @(negedge clk) rxd = 1'b0;
    repeat (2) @(negedge clk);
    rxd = 1'b1;
    repeat (20 * DIV) @(posedge clk);
    checks++;
    if (valid_count != n_before) begin failures++; $display("FAIL glitch produced a byte"); end
    for (int i = 0; i < 20; i++) rx_check(8'($urandom), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
