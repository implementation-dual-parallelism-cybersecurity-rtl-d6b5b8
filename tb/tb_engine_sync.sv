// tb_engine_sync: checks the engine scheduler on its own.
//
// The scheduler drives a real pixel_mem; in place of the AES unit the
// testbench has a stand-in with the same 11-clock latency that maps each
// block through an easily predicted bijection (encrypt: XOR with a
// constant and add 1 in each word; decrypt: rotate by 8 bits). Segments of
// random length (multiples of four) are loaded with random input gaps and
// unloaded with a randomly stalled output. Checks: every output pixel, the
// number of pixels, one done pulse per job, the length of the PROCESS phase
// (seg_len + 16 clocks, measured from proc_start to proc_stop), and that
// blocks reach the cipher at most every fourth clock.
module tb_engine_sync;
  import aes_pkg::*;
  import dual_engine_pkg::*;
  localparam int DEPTH = 1024;
  localparam int AW = 10, LEN_W = 11;

  logic clk = 0, rst_n = 0, start = 0;
  aes_mode_e mode = AES_ENCRYPT;
  logic [LEN_W-1:0] seg_len = '0;
  logic busy, done, proc_start, proc_stop, in_process;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  pixel_t in_data = '0, out_data;
  logic mem_wr_en, mem_rd_en;
  logic [AW-1:0] mem_wr_addr, mem_rd_addr;
  pixel_t mem_wr_data, mem_rd_data;
  logic aes_in_valid;
  aes_mode_e aes_in_mode;
  block_t aes_in_block;
  logic aes_out_valid;
  block_t aes_out_block;

  int checks = 0, failures = 0, done_seen = 0, out_stalls = 0;
  longint cycle = 0, t_pstart = -1, t_last_blk = -100;
  pixel_t exp_q [$];

  engine_sync #(.DEPTH(DEPTH)) dut (.*);
  pixel_mem #(.DEPTH(DEPTH), .WIDTH(32)) u_mem (
    .clk, .wr_en(mem_wr_en), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data));

  // cipher stand-in
  function automatic pixel_t xf(input pixel_t p, input aes_mode_e m);
    return (m == AES_ENCRYPT) ? (p ^ 32'h5a5aa5a5) + 32'd1 : {p[23:0], p[31:24]};
  endfunction
  logic   sv [AES_LATENCY];
  block_t sb [AES_LATENCY];
  always @(posedge clk) begin
    sv[0] <= aes_in_valid;
    for (int i = 0; i < 4; i++) sb[0][127-32*i -: 32] <= xf(aes_in_block[127-32*i -: 32], aes_in_mode);
    for (int i = 1; i < int'(AES_LATENCY); i++) begin sv[i] <= sv[i-1]; sb[i] <= sb[i-1]; end
  end
  assign aes_out_valid = rst_n && sv[AES_LATENCY-1];
  assign aes_out_block = sb[AES_LATENCY-1];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 4) != 0);

  always @(posedge clk) if (rst_n) begin
    if (done) done_seen++;
    if (out_valid && !out_ready) out_stalls++;
    if (proc_start) t_pstart = cycle;
    if (proc_stop) begin
      checks++;
      if (cycle - t_pstart != longint'(seg_len) + 16) begin
        failures++;
        $display("PROCESS took %0d clocks for %0d words", cycle - t_pstart, seg_len);
      end
    end
    if (aes_in_valid) begin
      checks++;
      if (cycle - t_last_blk < 4) begin failures++; $display("blocks too close"); end
      t_last_blk = cycle;
    end
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_data !== exp_q[0]) begin
        failures++;
        $display("out got %h exp %h", out_data, exp_q.size() ? exp_q[0] : 0);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    int n;
    pixel_t p;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int job = 0; job < 12; job++) begin
      n = (job == 11) ? DEPTH : 4 * $urandom_range(1, 64);
      mode = aes_mode_e'(job % 2);
      done_seen = 0;
      @(negedge clk); start = 1; seg_len = LEN_W'(n);
      @(negedge clk); start = 0;
      for (int i = 0; i < n; i++) begin
        p = $urandom;
        exp_q.push_back(xf(p, mode));
        while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = p;
        do @(posedge clk); while (!in_ready);
        @(negedge clk); in_valid = 0;
      end
      while (busy) @(negedge clk);
      @(negedge clk);
      checks++;
      if (exp_q.size() != 0 || done_seen != 1) begin
        failures++;
        $display("job %0d: %0d pixels missing, done %0d", job, exp_q.size(), done_seen);
        exp_q.delete();
      end
    end
    checks++;
    if (out_stalls == 0) begin failures++; $display("output never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
