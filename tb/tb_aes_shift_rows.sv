// tb_aes_shift_rows: checks ShiftRows and InvShiftRows on a byte-index pattern
// and on random blocks against the reference model.
module tb_aes_shift_rows;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  aes_mode_e mode;
  block_t    din, dout;
  int        checks = 0, failures = 0;

  aes_shift_rows dut (.mode, .din, .dout);

  task automatic check(input block_t got, input block_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    // Byte i holds i; ShiftRows moves byte (r, c+r) to (r, c).
    din = 128'h000102030405060708090a0b0c0d0e0f;
    mode = AES_ENC; #1;
    check(dout, 128'h00050a0f04090e03080d02070c01060b, "ShiftRows pattern");
    mode = AES_DEC; #1;
    check(dout, 128'h000d0a0704010e0b0805020f0c090603, "InvShiftRows pattern");
    for (int n = 0; n < 200; n++) begin
      din = rand128();
      mode = aes_mode_e'(n[0]); #1;
      check(dout, shift_rows(din, n[0]), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
