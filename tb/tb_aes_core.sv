// tb_aes_core: self-checking test of the pipelined AES-128 unit.
//
// Checks the FIPS-197 example vectors (Appendix B and C.1) in both
// directions, then streams 300 random blocks with random encrypt/decrypt
// tags, back to back with occasional gaps, under two random keys, against
// the independent reference model in aes_ref_pkg. Every result must leave
// exactly AES_LATENCY clocks after its block entered, which also checks the
// rate of one block per clock.
module tb_aes_core;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic key_load = 0, key_ready;
  key_t key = '0;
  logic in_valid = 0;
  aes_mode_e in_mode = AES_ENCRYPT;
  block_t in_block = '0;
  logic out_valid;
  aes_mode_e out_mode;
  block_t out_block;

  int checks = 0, failures = 0;
  longint cycle = 0;

  typedef struct { block_t exp; aes_mode_e mode; longint t_in; } exp_t;
  exp_t q[$];

  aes_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("unexpected output %h", out_block);
    end else begin
      e = q.pop_front();
      if (out_block !== e.exp || out_mode !== e.mode || cycle - e.t_in != AES_LATENCY) begin
        failures++;
        $display("mismatch: got %h exp %h latency %0d", out_block, e.exp, cycle - e.t_in);
      end
    end
  end

  task automatic load_key(input key_t k);
    @(negedge clk); key = k; key_load = 1;
    @(negedge clk); key_load = 0;
    checks++;
    if (!key_ready) begin failures++; $display("key_ready low"); end
  endtask

  task automatic send(input aes_mode_e m, input block_t b, input block_t exp);
    @(negedge clk);
    in_valid = 1; in_mode = m; in_block = b;
    q.push_back('{exp, m, cycle});
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic drain();
    while (q.size() != 0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    key_t k;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (key_ready) begin failures++; $display("key_ready high after reset"); end

    // FIPS-197 Appendix C.1
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    send(AES_ENCRYPT, 128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    send(AES_DECRYPT, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h00112233445566778899aabbccddeeff);
    drain();
    // FIPS-197 Appendix B
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    send(AES_ENCRYPT, 128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32);
    send(AES_DECRYPT, 128'h3925841d02dc09fbdc118597196a0b32, 128'h3243f6a8885a308d313198a2e0370734);
    drain();

    // random streams, one block per clock
    for (int pass = 0; pass < 2; pass++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      load_key(k);
      for (int i = 0; i < 150; i++) begin
        block_t b;
        aes_mode_e m;
        @(negedge clk);
        if ($urandom_range(0, 7) == 0) begin
          in_valid = 0;
        end else begin
          b = {$urandom, $urandom, $urandom, $urandom};
          m = aes_mode_e'($urandom_range(0, 1));
          in_valid = 1; in_mode = m; in_block = b;
          q.push_back('{(m == AES_ENCRYPT) ? encrypt(k, b) : decrypt(k, b), m, cycle});
        end
      end
      @(negedge clk); in_valid = 0;
      drain();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
