// tb_engine: checks one complete engine (buffer, AES-128 pipeline,
// scheduler, timers) against the AES reference model.
//
// Loads a random key, encrypts a random segment, checks every output pixel
// against the reference (four pixels per block, first pixel in the high
// word), then decrypts the ciphertext and checks the original comes back.
// Also checks the cipher-phase timer (seg_len + 16 clocks) and that the job
// timer covers the whole job. Uses a 4K-word buffer to keep the run short.
module tb_engine;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  import dual_engine_pkg::*;
  localparam int DEPTH = 4096;
  localparam int LEN_W = 13;

  logic clk = 0, rst_n = 0, key_load = 0, key_ready, start = 0;
  key_t key = '0;
  aes_mode_e mode = AES_ENCRYPT;
  logic [LEN_W-1:0] seg_len = '0;
  logic busy, done, in_process;
  logic [TIMER_W-1:0] proc_cycles, job_cycles;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  pixel_t in_data = '0, out_data;
  int checks = 0, failures = 0;
  longint cycle = 0, t_start;

  engine #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 5) != 0);

  // run one job: send src, collect dst
  task automatic run(input aes_mode_e m, input pixel_t src [$], output pixel_t dst [$]);
    int n;
    n = src.size();
    dst.delete();
    @(negedge clk); start = 1; mode = m; seg_len = LEN_W'(n); t_start = cycle;
    @(negedge clk); start = 0;
    fork
      for (int i = 0; i < n; i++) begin
        in_valid = 1; in_data = src[i];
        do @(posedge clk); while (!in_ready);
        @(negedge clk); in_valid = 0;
      end
      while (dst.size() < n) begin
        @(posedge clk);
        if (out_valid && out_ready) dst.push_back(out_data);
      end
    join
    @(negedge clk);
    checks++;
    if (busy || proc_cycles != 32'(n + 16) || job_cycles < 32'(2 * n + 16)) begin
      failures++;
      $display("busy %0d proc_cycles %0d job_cycles %0d for %0d words", busy, proc_cycles, job_cycles, n);
    end
  endtask

  initial begin
    pixel_t pt [$], ct [$], back [$];
    key_t k;
    logic [127:0] b, e;
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    k = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk); key = k; key_load = 1;
    @(negedge clk); key_load = 0;
    checks++;
    if (!key_ready) failures++;
    n = 4 * 200;
    for (int i = 0; i < n; i++) pt.push_back($urandom);
    run(AES_ENCRYPT, pt, ct);
    for (int blk = 0; blk < n / 4; blk++) begin
      b = {pt[4*blk], pt[4*blk+1], pt[4*blk+2], pt[4*blk+3]};
      e = encrypt(k, b);
      checks++;
      if ({ct[4*blk], ct[4*blk+1], ct[4*blk+2], ct[4*blk+3]} !== e) begin
        failures++;
        if (failures < 5) $display("block %0d: got %h exp %h", blk, {ct[4*blk], ct[4*blk+1], ct[4*blk+2], ct[4*blk+3]}, e);
      end
    end
    run(AES_DECRYPT, ct, back);
    for (int i = 0; i < n; i++) begin
      checks++;
      if (back[i] !== pt[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
