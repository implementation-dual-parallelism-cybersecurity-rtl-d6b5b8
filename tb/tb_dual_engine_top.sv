// tb_dual_engine_top: end-to-end test of the dual-engine image cipher.
//
// Loads a random key, then for each test image: streams the image in
// (random gaps), lets the output stall at random, and compares the
// encrypted image with the reference: split into left and right halves,
// each half cut row-major into blocks of four pixels, each block encrypted
// with AES-128, the halves put back side by side. The ciphertext is then
// decrypted and must give the original image. Checks the per-engine timers
// (cipher phase = half size + 16 clocks) and that both engines' cipher
// phases overlap. Counts how often each mechanism happened and fails if
// one never did: pixels routed to each engine, clocks with both engines
// ciphering at once, encrypt jobs, decrypt jobs, merge switches between
// halves, output back-pressure, input gaps, a rejected image size.
// Runs with a 4K-word pixel buffer per engine.
module tb_dual_engine_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  import dual_engine_pkg::*;

  localparam int NIMG = 3;
  localparam int IMG_W [NIMG] = '{64, 24, 8};
  localparam int IMG_H [NIMG] = '{128, 10, 2};

  logic clk = 0, rst_n = 0, key_load = 0, key_ready, start = 0;
  key_t key = '0;
  aes_mode_e mode = AES_ENCRYPT;
  logic [DIM_W-1:0] img_w = '0, img_h = '0;
  logic busy, done, cfg_error;
  logic [1:0] engine_in_process;
  logic [TIMER_W-1:0] proc_cycles [2], job_cycles [2];
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  pixel_t in_data = '0, out_data;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_to_e0 = 0, n_to_e1 = 0, n_both_proc = 0, n_enc = 0, n_dec = 0;
  int n_merge_sw = 0, n_out_stall = 0, n_in_gap = 0, n_cfg_err = 0;
  logic last_src;

  dual_engine_top #(.MEM_DEPTH(4096)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 5) != 0);

  always @(posedge clk) if (rst_n) begin
    if (dut.sp_valid[0] && dut.sp_ready[0]) n_to_e0++;
    if (dut.sp_valid[1] && dut.sp_ready[1]) n_to_e1++;
    if (engine_in_process == 2'b11) n_both_proc++;
    if (out_valid && !out_ready) n_out_stall++;
    if (dut.u_split.active && !in_valid) n_in_gap++;
    if (cfg_error) n_cfg_err++;
    if (out_valid && out_ready) begin
      if (dut.u_merge.sel != last_src) n_merge_sw++;
      last_src = dut.u_merge.sel;
    end
  end

  function automatic void reference(input key_t k, input aes_mode_e m, input int w, input int h,
                                    input pixel_t src [$], output pixel_t dst [$]);
    pixel_t half [2][$];
    logic [127:0] b;
    int hw;
    hw = w / 2;
    dst = src;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) half[c >= hw].push_back(src[r*w + c]);
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < half[s].size(); i += 4) begin
        b = {half[s][i], half[s][i+1], half[s][i+2], half[s][i+3]};
        b = (m == AES_ENCRYPT) ? encrypt(k, b) : decrypt(k, b);
        for (int j = 0; j < 4; j++) half[s][i+j] = b[127-32*j -: 32];
      end
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) dst[r*w + c] = (c < hw) ? half[0][r*hw + c] : half[1][r*hw + c - hw];
  endfunction

  task automatic run(input aes_mode_e m, input int w, input int h,
                     input pixel_t src [$], output pixel_t dst [$]);
    int n;
    n = w * h;
    dst.delete();
    @(negedge clk); start = 1; mode = m; img_w = DIM_W'(w); img_h = DIM_W'(h);
    @(negedge clk); start = 0;
    if (m == AES_ENCRYPT) n_enc++; else n_dec++;
    fork
      for (int i = 0; i < n; i++) begin
        while ($urandom_range(0, 7) == 0) begin in_valid = 0; @(negedge clk); end
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
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("still busy after the image left"); end
    for (int e = 0; e < 2; e++) begin
      checks++;
      if (proc_cycles[e] != 32'(n / 2 + 16)) begin
        failures++;
        $display("engine %0d cipher phase %0d clocks, expected %0d", e, proc_cycles[e], n / 2 + 16);
      end
    end
  endtask

  task automatic compare(input pixel_t got [$], input pixel_t exp [$], input string what);
    int bad;
    bad = 0;
    checks++;
    if (got.size() != exp.size()) bad++;
    else for (int i = 0; i < got.size(); i++) if (got[i] !== exp[i]) begin
      bad++;
      if (bad < 4) $display("%s pixel %0d: got %h exp %h", what, i, got[i], exp[i]);
    end
    if (bad != 0) failures++;
  endtask

  initial begin
    pixel_t img [$], ct [$], exp_ct [$], back [$];
    key_t k;
    repeat (2) @(negedge clk);
    rst_n = 1;
    k = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk); key = k; key_load = 1;
    @(negedge clk); key_load = 0;
    @(negedge clk);
    checks++;
    if (!key_ready) failures++;

    for (int t = 0; t < NIMG; t++) begin
      img.delete();
      for (int i = 0; i < IMG_W[t] * IMG_H[t]; i++) img.push_back($urandom);
      run(AES_ENCRYPT, IMG_W[t], IMG_H[t], img, ct);
      reference(k, AES_ENCRYPT, IMG_W[t], IMG_H[t], img, exp_ct);
      compare(ct, exp_ct, "encrypt");
      run(AES_DECRYPT, IMG_W[t], IMG_H[t], ct, back);
      compare(back, img, "decrypt");
    end

    // an image that does not fit (odd width) is refused
    @(negedge clk); start = 1; img_w = 16'd7; img_h = 16'd4;
    @(negedge clk); start = 0;
    @(negedge clk);
    checks++;
    if (busy) failures++;

    $display("routed to engine 0: %0d, engine 1: %0d, both ciphering: %0d clocks",
             n_to_e0, n_to_e1, n_both_proc);
    $display("encrypt jobs %0d, decrypt jobs %0d, merge switches %0d, output stalls %0d, input gaps %0d, size errors %0d",
             n_enc, n_dec, n_merge_sw, n_out_stall, n_in_gap, n_cfg_err);
    checks++;
    if (n_to_e0 == 0 || n_to_e1 == 0 || n_both_proc == 0 || n_enc == 0 || n_dec == 0 ||
        n_merge_sw == 0 || n_out_stall == 0 || n_in_gap == 0 || n_cfg_err == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
