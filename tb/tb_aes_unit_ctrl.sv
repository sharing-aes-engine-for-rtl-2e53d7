// tb_aes_unit_ctrl: drives the controller's handshake inputs directly and
// checks the start pulses it issues for an encryption (core and key expansion
// together) and a decryption (forward key pass first, then inverse pass with
// the expanded key selected), and the gating of the read-out request.
module tb_aes_unit_ctrl;
  import aes_pkg::*;

  logic      clk = 0, rst_n = 0, start = 0, out_req = 0, done_bin = 0, kexp_done = 0;
  logic      core_done = 0, bout_full = 0;
  aes_mode_e mode = AES_ENC;
  logic      start_bin, start_kexp, kexp_key_sel, start_core, load_bout, start_bout, busy, done_encrypt;
  aes_mode_e kexp_mode, core_mode;
  int        checks = 0, failures = 0;

  aes_unit_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic block(input bit dec);
    start <= 1; mode <= aes_mode_e'(dec); #1;
    check(start_bin && !busy, "start_bin on start");
    @(posedge clk); start <= 0; mode <= aes_mode_e'(!dec); #1;
    check(busy && !start_core && !start_kexp, "loading");
    out_req <= 1; bout_full <= 1; #1;
    check(!start_bout, "no read-out while busy");
    out_req <= 0;
    repeat (3) @(posedge clk);
    done_bin <= 1; #1;
    check(start_kexp && kexp_mode == AES_ENC && !kexp_key_sel, "forward key start");
    check(start_core == !dec, "core starts at once only for encryption");
    @(posedge clk); done_bin <= 0;
    if (dec) begin
      repeat (5) begin #1; check(!start_core && !start_kexp, "key pre-pass running"); @(posedge clk); end
      kexp_done <= 1; #1;
      check(start_core && start_kexp && kexp_mode == AES_DEC && kexp_key_sel, "inverse pass start");
      check(core_mode == AES_DEC, "core mode decrypt");
      @(posedge clk); kexp_done <= 0;
    end else begin
      #1; check(core_mode == AES_ENC, "core mode encrypt");
    end
    repeat (4) @(posedge clk);
    core_done <= 1; #1;
    check(load_bout && done_encrypt, "result captured on core done");
    @(posedge clk); core_done <= 0; #1;
    check(!busy, "idle afterwards");
    out_req <= 1; #1;
    check(start_bout, "read-out passed on when idle and full");
    @(posedge clk); out_req <= 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    block(0); block(1); block(1); block(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
