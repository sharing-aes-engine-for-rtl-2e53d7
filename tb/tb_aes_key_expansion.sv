// tb_aes_key_expansion: checks that the forward schedule presents k1..k10 and
// the inverse schedule k9..k0 on the cycles the core reads them (key n of the
// sequence on cycles 2n and 2n+1), and the done pulse on cycle 20.
module tb_aes_key_expansion;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic      clk = 0, rst_n = 0, start = 0;
  aes_mode_e mode = AES_ENC;
  block_t    key_in = '0, round_key;
  logic      valid, busy, done;
  int        checks = 0, failures = 0;

  aes_key_expansion dut (.clk, .rst_n, .start, .mode, .key_in, .round_key, .valid, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input block_t k, input bit inv);
    blk_t rk [11];
    expand_key(k, rk);
    key_in <= inv ? rk[10] : rk[0];
    mode   <= aes_mode_e'(inv);
    start  <= 1;
    @(posedge clk);
    start  <= 0;
    key_in <= rand128();   // the key is only read on the start cycle
    for (int c = 1; c <= 21; c++) begin
      #1;
      if (c >= 2) begin
        int n;
        n = (c / 2 > 10) ? 10 : c / 2;
        checks++;
        if (round_key !== (inv ? rk[10 - n] : rk[n])) begin
          failures++;
          $display("FAIL %s cycle %0d: got %h exp %h", inv ? "inverse" : "forward", c, round_key,
                   inv ? rk[10 - n] : rk[n]);
        end
      end
      checks++;
      if (done !== (c == 20)) begin failures++; $display("FAIL done at cycle %0d", c); end
      checks++;
      if (valid !== (c <= 19 && c % 2 == 1)) begin failures++; $display("FAIL valid at cycle %0d", c); end
      @(posedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(KAT_KEY0, 0);
    run(KAT_KEY0, 1);
    for (int n = 0; n < 20; n++) run(rand128(), n[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
