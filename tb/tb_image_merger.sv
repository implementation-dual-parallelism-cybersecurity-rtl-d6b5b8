// tb_image_merger: checks that two half-image streams are joined row by row.
//
// For several random even-width images, input 0 offers the left half and
// input 1 the right half (row-major, with random gaps), and the output is
// stalled at random. The output must be the whole image in row-major order.
// Also checks done.
module tb_image_merger;
  import dual_engine_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [DIM_W-1:0] img_w = '0, img_h = '0;
  logic active, done;
  logic [1:0] in_valid = '0, in_ready;
  pixel_t in_data [2] = '{default: '0};
  logic out_valid, out_ready = 0;
  pixel_t out_data;
  int checks = 0, failures = 0, done_seen;
  pixel_t src [2][$];
  pixel_t exp_q [$];

  image_merger dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sources: present the head of each queue with random gaps
  always @(negedge clk) begin
    for (int s = 0; s < 2; s++) begin
      in_valid[s] = (src[s].size() != 0) && ($urandom_range(0, 3) != 0);
      in_data[s]  = (src[s].size() != 0) ? src[s][0] : '0;
    end
    out_ready = ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (done) done_seen++;
    for (int s = 0; s < 2; s++)
      if (in_valid[s] && in_ready[s]) void'(src[s].pop_front());
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_data !== exp_q[0]) begin
        failures++;
        $display("got %h", out_data);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    int w, h;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int img = 0; img < 6; img++) begin
      w = 2 * $urandom_range(1, 12); h = $urandom_range(1, 9);
      done_seen = 0;
      @(negedge clk); start = 1; img_w = DIM_W'(w); img_h = DIM_W'(h);
      @(negedge clk); start = 0;
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++) begin
          exp_q.push_back({16'(r), 16'(c)});
          src[c >= w/2].push_back({16'(r), 16'(c)});
        end
      while (exp_q.size() != 0) @(negedge clk);
      repeat (2) @(negedge clk);
      checks++;
      if (done_seen != 1 || active || src[0].size() != 0 || src[1].size() != 0) begin
        failures++;
        $display("image %0d: done %0d active %0d", img, done_seen, active);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
