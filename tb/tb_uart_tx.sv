// Self-checking testbench for uart_tx.
// Runs the transmitter at 10 clocks per bit (CLK_HZ = 1 MHz, BAUD = 100 kHz)
// to keep the simulation short. A receiver model in the testbench samples the
// line in the middle of each bit and checks start bit, data (LSB first) and
// stop bit; the frame length is checked to be 10 bit periods, the busy flag
// to cover exactly that time, and tx_done to pulse once at its end. Bytes
// are sent back to back and with idle gaps.
module tb_uart_tx;
  localparam int unsigned CLK_HZ = 1_000_000, BAUD = 100_000, DIV = CLK_HZ / BAUD;

  logic       clk = 1'b0;
  logic       reset, tx_start, txd, tx_busy, tx_done;
  logic [7:0] tx_data;
  int checks = 0, failures = 0;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;

  task automatic send_and_check(input logic [7:0] d);
    int busy_cycles = 0, done_pulses = 0;
    logic [9:0] seen;
    @(negedge clk);
    tx_data = d; tx_start = 1'b1;
    @(negedge clk);
    tx_start = 1'b0; tx_data = ~d;           // the latched byte must be sent
    // line is now in the start bit; sample each bit in its middle
    fork
      begin
        repeat (DIV / 2 - 1) @(posedge clk);
        for (int i = 0; i < 10; i++) begin
          #1 seen[i] = txd;
          repeat (DIV) @(posedge clk);
        end
      end
      begin
        while (tx_busy) begin
          busy_cycles++;
          @(posedge clk); #2;
          if (tx_done) done_pulses++;
        end
      end
    join
    checks++;
    if (seen !== {1'b1, d, 1'b0}) begin
      failures++;
      $display("FAIL frame %b expected %b", seen, {1'b1, d, 1'b0});
    end
    checks++;
    if (busy_cycles != 10 * DIV || done_pulses != 1) begin
      failures++;
      $display("FAIL busy %0d cycles (expected %0d), %0d done pulses", busy_cycles, 10 * DIV, done_pulses);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; tx_start = 1'b0; tx_data = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (txd !== 1'b1) begin failures++; $display("FAIL line not idle high"); end
    reset = 1'b0;
    send_and_check(8'h55);
    send_and_check(8'hA3);
    repeat (17) @(posedge clk);
    send_and_check(8'h00);
    send_and_check(8'hFF);
    for (int i = 0; i < 20; i++) send_and_check(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
