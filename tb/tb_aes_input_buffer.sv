// tb_aes_input_buffer: checks word order, the done pulse after the fourth
// word, gaps between words, a first word offered with start, and that the
// block holds until the next start.
module tb_aes_input_buffer;
  import aes_pkg::*;

  logic   clk = 0, rst_n = 0, start = 0, word_valid = 0;
  word_t  word_in = '0;
  block_t block_out;
  logic   done;
  int     checks = 0, failures = 0;

  aes_input_buffer dut (.clk, .rst_n, .start, .word_valid, .word_in, .block_out, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic fill(input word_t w [4], input bit with_start, input int gap);
    int dones;
    dones = 0;
    if (!with_start) begin
      start <= 1; @(posedge clk); start <= 0;
    end
    for (int i = 0; i < 4; i++) begin
      if (with_start && i == 0) start <= 1;
      word_valid <= 1; word_in <= w[i];
      @(posedge clk);
      start <= 0;
      #1; if (done) dones++;
      if (gap > 0 || i == 3) word_valid <= 0;
      for (int g = 0; g < gap; g++) begin @(posedge clk); #1; if (done) dones++; end
    end
    if (gap == 0) begin
      #1; check(done, "done right after fourth word");
      @(posedge clk); #1; check(!done, "done one cycle");
    end else begin
      check(dones == 1, "one done pulse");
    end
    check(block_out == {w[0], w[1], w[2], w[3]}, "word order");
    repeat (3) @(posedge clk);
    check(block_out == {w[0], w[1], w[2], w[3]}, "block held");
  endtask

  initial begin
    word_t w [4];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 30; n++) begin
      for (int i = 0; i < 4; i++) w[i] = $urandom();
      fill(w, n % 3 == 0, n % 4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
