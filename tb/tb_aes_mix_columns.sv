// tb_aes_mix_columns: checks MixColumns and InvMixColumns on the standard
// column test values and on random blocks against the reference model.
module tb_aes_mix_columns;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  aes_mode_e mode;
  block_t    din, dout;
  int        checks = 0, failures = 0;

  aes_mix_columns dut (.mode, .din, .dout);

  task automatic check(input block_t got, input block_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    din = 128'hdb135345_f20a225c_01010101_c6c6c6c6;
    mode = AES_ENC; #1;
    check(dout, 128'h8e4da1bc_9fdc589d_01010101_c6c6c6c6, "MixColumns known columns");
    din = dout; mode = AES_DEC; #1;
    check(dout, 128'hdb135345_f20a225c_01010101_c6c6c6c6, "InvMixColumns known columns");
    for (int n = 0; n < 200; n++) begin
      din = rand128();
      mode = aes_mode_e'(n[0]); #1;
      check(dout, mix_columns(din, n[0]), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
