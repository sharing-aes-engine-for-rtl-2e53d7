// tb_aes_sbox: checks the registered S-box stage against the reference
// S-box for every byte value in every byte lane, in both modes, and checks the
// one-cycle latency and the enable.
module tb_aes_sbox;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic      clk = 0, rst_n = 0, en = 0;
  aes_mode_e mode = AES_ENC;
  block_t    din = '0, dout;
  int        checks = 0, failures = 0;

  aes_sbox dut (.clk, .rst_n, .en, .mode, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input block_t got, input block_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    block_t v, prev;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int m = 0; m < 2; m++) begin
      for (int x = 0; x < 256; x++) begin
        for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = 8'(x + 17*i);
        din  <= v;
        mode <= aes_mode_e'(m);
        en   <= 1;
        @(posedge clk);
        en   <= 0;
        #1;
        check(dout, sub_bytes(v, m[0]), m ? "InvSubBytes" : "SubBytes");
      end
    end
    // Known table entries.
    din <= {8'h00, 8'h53, 8'hff, 8'h01, 96'h0}; mode <= AES_ENC; en <= 1;
    @(posedge clk); #1;
    check(dout[127:96], 32'h63ed167c, "S(00,53,ff,01)");
    // Enable low holds the register.
    prev = dout;
    din <= ~din; en <= 0;
    @(posedge clk); #1;
    check(dout, prev, "hold while en low");
    // Inverse of forward is identity.
    v = rand128();
    din <= v; mode <= AES_ENC; en <= 1; @(posedge clk); #1;
    din <= dout; mode <= AES_DEC; @(posedge clk); #1;
    check(dout, v, "InvSubBytes(SubBytes(x))");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
