// tb_aes_output_buffer: checks that a loaded block comes out as four words,
// most significant first, in four successive clocks when ack is held, that a
// slow consumer can stretch the transfer, that start without a held block does
// nothing, and the full/done flags.
module tb_aes_output_buffer;
  import aes_pkg::*;

  logic   clk = 0, rst_n = 0, load = 0, start = 0, ack = 0;
  block_t din = '0;
  logic   full, word_valid, done;
  word_t  word_out;
  int     checks = 0, failures = 0;

  aes_output_buffer dut (.clk, .rst_n, .load, .din, .start, .ack, .full, .word_valid, .word_out, .done);

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

  initial begin
    block_t b;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    start <= 1; @(posedge clk); start <= 0; #1;
    check(!word_valid && !full, "start while empty ignored");
    for (int n = 0; n < 30; n++) begin
      int got, cyc;
      bit slow, a;
      slow = n[0];
      b = {$urandom(), $urandom(), $urandom(), $urandom()};
      din <= b; load <= 1; @(posedge clk); load <= 0; #1;
      check(full && !word_valid, "full after load");
      start <= 1; @(posedge clk); start <= 0;
      got = 0; cyc = 0;
      while (got < 4 && cyc < 40) begin
        #1;
        a = slow ? ($urandom() % 2 == 1) : 1'b1;
        ack <= a;
        if (word_valid && a) begin
          check(word_out == b[127 - 32*got -: 32], "word value and order");
          got++;
        end
        @(posedge clk);
        cyc++;
      end
      ack <= 0;
      if (!slow) check(cyc == 4, "four successive clocks");
      #1;
      check(done && !full && !word_valid, "done after last word");
      @(posedge clk); #1;
      check(!done, "done one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
