// tb_cycle_timer: checks the cycle timer.
//
// Starts and stops it after random intervals and checks the count equals
// the number of clocks between the start and the stop pulse, that it holds
// afterwards, that a new start clears it, and that running follows.
module tb_cycle_timer;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, running;
  logic [31:0] count;
  int checks = 0, failures = 0;

  cycle_timer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (running || count != 0) failures++;
    for (int i = 0; i < 50; i++) begin
      n = $urandom_range(1, 500);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      checks++;
      if (!running || count != 1) failures++;
      repeat (n - 1) @(negedge clk);
      stop = 1;
      @(negedge clk); stop = 0;
      repeat ($urandom_range(0, 5)) @(negedge clk);
      checks++;
      if (running || count != 32'(n)) begin
        failures++;
        $display("n=%0d count=%0d running=%0d", n, count, running);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
