// tb_aes_core: runs the core alone, with the testbench supplying the round
// keys on the cycles the core expects them (round key n from cycle 2n).
// Checks the FIPS-197 vectors and random blocks in both modes against the
// reference model, and the 20-cycle start-to-done latency.
module tb_aes_core;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic       clk = 0, rst_n = 0, start = 0;
  aes_mode_e  mode = AES_ENC;
  block_t     message = '0, key = '0, round_key = '0, out_text;
  logic       busy, done;
  logic [3:0] round;
  int         checks = 0, failures = 0;

  aes_core dut (.clk, .rst_n, .start, .mode, .message, .key, .round_key,
                .busy, .done, .round, .out_text);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input block_t txt, input block_t cipher_key, input bit dec, input block_t exp);
    blk_t rk [11];
    int   lat;
    expand_key(cipher_key, rk);
    message   <= txt;
    key       <= dec ? rk[10] : rk[0];
    round_key <= '0;
    mode      <= aes_mode_e'(dec);
    start     <= 1;
    @(posedge clk);
    start <= 0;
    lat = 1;
    while (1) begin
      int n;
      n = lat / 2;
      if (n > 10) n = 10;
      round_key <= dec ? rk[10 - n] : rk[n];
      #1;
      if (done) break;
      @(posedge clk);
      lat++;
      if (lat > 40) break;
    end
    checks++;
    if (lat != 20) begin
      failures++;
      $display("FAIL latency %0d, expected 20", lat);
    end
    checks++;
    if (out_text !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", dec ? "decrypt" : "encrypt", out_text, exp);
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(KAT_PT0, KAT_KEY0, 0, KAT_CT0);
    run(KAT_PT1, KAT_KEY1, 0, KAT_CT1);
    run(KAT_CT0, KAT_KEY0, 1, KAT_PT0);
    run(KAT_CT1, KAT_KEY1, 1, KAT_PT1);
    for (int n = 0; n < 40; n++) begin
      block_t k, t;
      k = rand128();
      t = rand128();
      if (n % 2 == 0) run(t, k, 0, encrypt(t, k));
      else            run(t, k, 1, decrypt(t, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
