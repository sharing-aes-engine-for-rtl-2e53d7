// tb_aes_core_ctrl: checks the round controller's enables, round number, last
// flag and the 20-cycle start-to-done latency, and that a start while busy is
// ignored.
module tb_aes_core_ctrl;
  logic       clk = 0, rst_n = 0, start = 0;
  logic       busy, sbox_en, state_en, last, done;
  logic [3:0] round;
  int         checks = 0, failures = 0;

  aes_core_ctrl dut (.clk, .rst_n, .start, .busy, .sbox_en, .state_en, .last, .round, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int blk = 0; blk < 2; blk++) begin
      start <= 1;
      #1;
      check(sbox_en && !state_en && !busy, "start cycle enables S-box only");
      @(posedge clk);
      start <= 0;
      for (int c = 1; c <= 20; c++) begin
        #1;
        if (c < 20) begin
          check(busy, "busy");
          check(sbox_en == (c % 2 == 0), "sbox_en on even cycles");
          check(state_en == (c % 2 == 1), "state_en on odd cycles");
          check(round == 4'((c + 1) / 2 + (c % 2 == 0 ? 1 : 0)), "round number");
          check(last == (c == 19), "last flag on cycle 19");
          check(!done, "no early done");
          if (c == 7) start <= 1;   // ignored while busy
          if (c == 8) start <= 0;
        end else begin
          check(done && !busy && round == 0, "done on cycle 20");
        end
        @(posedge clk);
      end
      #1;
      check(!done, "done is one cycle");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
