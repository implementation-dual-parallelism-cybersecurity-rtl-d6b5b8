// tb_image_splitter: checks the vertical split of an image stream.
//
// For several random even-width images, pixels (value = unique id built
// from row and column) are offered with random gaps and each output is
// stalled at random. Each output must carry exactly its half, row-major:
// output 0 columns 0..w/2-1, output 1 columns w/2..w-1. Also checks done
// and that no pixel is accepted before start.
module tb_image_splitter;
  import dual_engine_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [DIM_W-1:0] img_w = '0, img_h = '0;
  logic active, done, in_valid = 0, in_ready;
  pixel_t in_data = '0, out_data;
  logic [1:0] out_valid, out_ready = '0;
  int checks = 0, failures = 0, stalls = 0;
  pixel_t exp_q [2][$];
  int done_seen;

  image_splitter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (done) done_seen++;
    if (in_valid && !in_ready && active) stalls++;
    for (int o = 0; o < 2; o++) if (out_valid[o] && out_ready[o]) begin
      checks++;
      if (exp_q[o].size() == 0 || out_data !== exp_q[o][0]) begin
        failures++;
        $display("out%0d got %h", o, out_data);
      end
      if (exp_q[o].size() != 0) void'(exp_q[o].pop_front());
    end
  end

  always @(negedge clk) out_ready = 2'($urandom_range(0, 3));

  initial begin
    int w, h;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // nothing accepted before start
    in_valid = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (in_ready) failures++;
    in_valid = 0;
    for (int img = 0; img < 6; img++) begin
      w = 2 * $urandom_range(1, 12); h = $urandom_range(1, 9);
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++)
          exp_q[c >= w/2].push_back({16'(r), 16'(c)});
      done_seen = 0;
      @(negedge clk); start = 1; img_w = DIM_W'(w); img_h = DIM_W'(h);
      @(negedge clk); start = 0;
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++) begin
          while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_data = {16'(r), 16'(c)};
          do @(posedge clk); while (!in_ready);
          @(negedge clk); in_valid = 0;
        end
      repeat (2) @(negedge clk);
      checks++;
      if (exp_q[0].size() != 0 || exp_q[1].size() != 0 || done_seen != 1 || active) begin
        failures++;
        $display("image %0d: left %0d/%0d done %0d", img, exp_q[0].size(), exp_q[1].size(), done_seen);
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
