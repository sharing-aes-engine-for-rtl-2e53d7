// tb_aes_cipher_word0_key: checks g(w) = SubWord(RotWord(w)) ^ Rcon for all
// ten round constants and random words, and the continue enable.
module tb_aes_cipher_word0_key;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic       clk = 0, rst_n = 0, cont = 0;
  logic [3:0] step = 1;
  word_t      w_in = '0, g_out;
  int         checks = 0, failures = 0;
  logic [7:0] rc_exp [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  aes_cipher_word0_key dut (.clk, .rst_n, .cont, .step, .w_in, .g_out);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t w, e, prev;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // FIPS-197 A.1: w3 = 09cf4f3c, SubWord(RotWord) = 8a84eb01, ^ Rcon[1] = 8b84eb01
    w_in <= 32'h09cf4f3c; step <= 4'd1; cont <= 1;
    @(posedge clk); #1;
    checks++;
    if (g_out !== 32'h8b84eb01) begin failures++; $display("FAIL A.1 g: %h", g_out); end
    for (int n = 0; n < 200; n++) begin
      int s;
      s = 1 + n % 10;
      w = $urandom();
      e = {sb(w[23:16]) ^ rc_exp[s - 1], sb(w[15:8]), sb(w[7:0]), sb(w[31:24])};
      w_in <= w; step <= 4'(s); cont <= 1;
      @(posedge clk); #1;
      checks++;
      if (g_out !== e) begin failures++; $display("FAIL step %0d w %h: got %h exp %h", s, w, g_out, e); end
    end
    prev = g_out;
    w_in <= ~w_in; cont <= 0;
    @(posedge clk); #1;
    checks++;
    if (g_out !== prev) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
