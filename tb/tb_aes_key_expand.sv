// tb_aes_key_expand: checks the AES-128 key schedule.
//
// Compares all 11 round keys with the FIPS-197 Appendix A.1 expansion of
// key 2b7e1516..., and with the reference model's schedule for 20 random
// keys. Also checks that key_ready is low after reset, rises one clock after
// key_load and that the keys hold while key_load is low.
module tb_aes_key_expand;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, key_load = 0, key_ready;
  key_t key = '0;
  round_keys_t round_keys;
  int checks = 0, failures = 0;

  aes_key_expand dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic load_and_compare(input key_t k);
    logic [31:0] w [44];
    @(negedge clk); key = k; key_load = 1;
    @(negedge clk); key_load = 0; key = ~k;
    checks++;
    if (!key_ready) failures++;
    expand(k, w);
    for (int r = 0; r <= 10; r++)
      check(round_keys[r], {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]}, $sformatf("rk%0d", r));
  endtask

  initial begin
    init();
    repeat (2) @(negedge clk);
    checks++;
    if (key_ready) failures++;
    rst_n = 1;
    @(negedge clk); key = 128'h2b7e151628aed2a6abf7158809cf4f3c; key_load = 1;
    @(negedge clk); key_load = 0;
    check(round_keys[0],  128'h2b7e151628aed2a6abf7158809cf4f3c, "A.1 rk0");
    check(round_keys[1],  128'ha0fafe1788542cb123a339392a6c7605, "A.1 rk1");
    check(round_keys[2],  128'hf2c295f27a96b9435935807a7359f67f, "A.1 rk2");
    check(round_keys[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "A.1 rk10");
    // keys hold while key_load is low
    key = '0;
    repeat (3) @(negedge clk);
    check(round_keys[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "hold rk10");
    for (int i = 0; i < 20; i++) load_and_compare({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
