// tb_aes_unit: end-to-end test of the assembled AES unit. Blocks are fed as
// four words (back to back, or with random gaps), encrypted or decrypted, and
// read back through the output buffer. Results are compared with the
// reference model (FIPS-197 vectors and random data); the start-to-done
// latency (24 cycles encrypt, 44 decrypt with back-to-back words) and the
// four-clock read-out are checked.
module tb_aes_unit;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic      clk = 0, rst_n = 0, start = 0, msg_valid = 0, out_req = 0, out_ack = 0;
  aes_mode_e mode = AES_ENC;
  block_t    key = '0;
  word_t     msg_word = '0, out_word;
  logic      done_bin, busy, done_encrypt, result_ready, out_valid, done_bout;
  int        checks = 0, failures = 0;

  aes_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(input block_t txt, input block_t k, input bit dec, input bit gaps);
    block_t exp, got;
    int     lat, cyc;
    exp = dec ? decrypt(txt, k) : encrypt(txt, k);
    key   <= k;
    mode  <= aes_mode_e'(dec);
    start <= 1;
    lat = 0;
    for (int i = 0; i < 4; i++) begin
      if (gaps) begin
        int g;
        g = $urandom() % 3;
        msg_valid <= 0;
        repeat (g) begin @(posedge clk); start <= 0; lat++; end
      end
      msg_valid <= 1;
      msg_word  <= txt[127 - 32*i -: 32];
      @(posedge clk);
      start <= 0;
      lat++;
    end
    msg_valid <= 0;
    while (lat < 200) begin
      #1;
      if (done_encrypt) break;
      @(posedge clk);
      lat++;
    end
    if (!gaps) check(lat == (dec ? 44 : 24), $sformatf("latency %0d", lat));
    @(posedge clk); #1;
    check(result_ready && !busy, "result held");
    out_req <= 1; out_ack <= 1;
    @(posedge clk);
    out_req <= 0;
    cyc = 0;
    for (int i = 0; i < 4; i++) begin
      #1;
      check(out_valid, "out_valid");
      got[127 - 32*i -: 32] = out_word;
      @(posedge clk);
      cyc++;
    end
    out_ack <= 0;
    #1;
    check(done_bout && cyc == 4, "four-clock read-out");
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", dec ? "decrypt" : "encrypt", got, exp);
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(KAT_PT0, KAT_KEY0, 0, 0);
    run(KAT_CT0, KAT_KEY0, 1, 0);
    run(KAT_PT1, KAT_KEY1, 0, 0);
    run(KAT_CT1, KAT_KEY1, 1, 0);
    for (int n = 0; n < 40; n++) run(rand128(), rand128(), n[0], n[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
