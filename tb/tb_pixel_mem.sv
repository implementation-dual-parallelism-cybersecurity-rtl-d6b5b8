// tb_pixel_mem: checks the pixel buffer at its full 64K x 32 size.
//
// Writes a pattern (address-dependent hash) to every word, reads every word
// back and compares; checks the one-clock read latency, that a read with
// rd_en low keeps the previous output, and that a read of the word being
// written in the same clock returns the old contents.
module tb_pixel_mem;
  localparam int DEPTH = 65536;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [15:0] wr_addr = '0, rd_addr = '0;
  logic [31:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;

  pixel_mem dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] pat(input int a, input int salt);
    return (32'(a) * 32'h9e3779b1) ^ 32'(salt);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = 16'(a); wr_data = pat(a, 1);
    end
    @(negedge clk); wr_en = 0;
    // read back; data of the read issued at one edge is checked before the next
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); rd_en = 1; rd_addr = 16'(a);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_data !== pat(a, 1)) begin
        failures++;
        if (failures < 10) $display("addr %0d got %h", a, rd_data);
      end
    end
    // rd_en low holds the output
    @(negedge clk); rd_addr = 16'd5;
    @(negedge clk);
    checks++;
    if (rd_data !== pat(DEPTH-1, 1)) failures++;
    // read during write of the same word returns the old word
    @(negedge clk); rd_en = 1; rd_addr = 16'd77; wr_en = 1; wr_addr = 16'd77; wr_data = 32'hcafef00d;
    @(negedge clk); rd_en = 0; wr_en = 0;
    checks++;
    if (rd_data !== pat(77, 1)) failures++;
    @(negedge clk); rd_en = 1;
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_data !== 32'hcafef00d) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
