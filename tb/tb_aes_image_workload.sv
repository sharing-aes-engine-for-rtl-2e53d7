// tb_aes_image_workload: the verification workloads, run through the custom
// instructions at the default configuration. A 32x32 8-bit test image
// (1024 bytes, 64 blocks) is generated, encrypted block by block with
// load-AES/store-AES, and the ciphertext is decrypted again; every block is
// checked against the reference model and the decrypted image must equal the
// original. Then transfers of 16, 128 and 1024 bytes are encrypted with a
// zero-wait memory; their cycle counts (issue of the first instruction to
// completion of the last) are printed and checked against this design's
// budget of 34 cycles per 16-byte block: load-AES, the wait for the 24-cycle
// encryption inside store-AES, the 4-word write-back and the issue cycles.
module tb_aes_image_workload;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0, instr_valid = 0;
  logic [127:0] key = '0;
  logic [31:0]  instr = '0;
  logic         instr_ready, instr_done, illegal;
  logic [4:0]   rf_raddr, rf_waddr;
  logic [31:0]  rf_rdata, rf_wdata, mem_addr, mem_wdata, mem_rdata;
  logic         rf_we, mem_req, mem_we, mem_ack, aes_busy, aes_msg_loaded, aes_done;
  int           checks = 0, failures = 0, cycle = 0;

  aes_riscv_ext dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [31:0] regs [32];
  logic [31:0] mem  [4096];
  assign rf_rdata  = (rf_raddr == 0) ? 32'h0 : regs[rf_raddr];
  assign mem_ack   = mem_req;
  assign mem_rdata = mem[mem_addr[13:2]];
  always_ff @(posedge clk) begin
    if (rf_we && rf_waddr != 0) regs[rf_waddr] <= rf_wdata;
    if (mem_ack && mem_we) mem[mem_addr[13:2]] <= mem_wdata;
  end

  function automatic logic [31:0] i_load(input bit m, input logic [4:0] rs);
    return {19'h0, rs, 1'b0, m, 6'b001011};
  endfunction
  function automatic logic [31:0] i_store(input logic [4:0] rs);
    return {19'h0, 1'b0, rs, 7'b0101011};
  endfunction

  task automatic issue(input logic [31:0] ins);
    int n;
    instr <= ins; instr_valid <= 1;
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    instr_valid <= 0;
    n = 0;
    do begin @(posedge clk); n++; #1; end while (!instr_done && n < 1000);
    check(instr_done, "instruction completes");
  endtask

  task automatic xfer(input logic [31:0] src, input logic [31:0] dst, input int nblk, input bit dec);
    for (int b = 0; b < nblk; b++) begin
      regs[5] = src + 32'(16 * b);
      regs[6] = dst + 32'(16 * b);
      issue(i_load(dec, 5'd5));
      issue(i_store(5'd6));
    end
  endtask

  initial begin
    int t0, cyc_total, nb;
    int sizes [3] = '{16, 128, 1024};
    for (int i = 0; i < 32; i++) regs[i] = 0;
    for (int i = 0; i < 4096; i++) mem[i] = 0;
    // 32x32 test image: gradients and a diagonal line, four pixels per word.
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x += 4)
        mem[(y * 32 + x) / 4] = {8'(y * 8 + x), 8'(y * 8 + x + 1) ^ ((x == y) ? 8'hff : 8'h00),
                                 8'(x * 8 + y), 8'(255 - x - y)};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    key = KAT_KEY0;
    // Encrypt the image at 0x0000 into 0x1000, decrypt that into 0x2000.
    xfer(32'h0000, 32'h1000, 64, 0);
    for (int b = 0; b < 64; b++) begin
      blk_t p, c;
      for (int i = 0; i < 4; i++) begin
        p[127 - 32*i -: 32] = mem[4*b + i];
        c[127 - 32*i -: 32] = mem[1024 + 4*b + i];
      end
      check(c == encrypt(p, key), $sformatf("image block %0d ciphertext", b));
    end
    xfer(32'h1000, 32'h2000, 64, 1);
    for (int i = 0; i < 256; i++) check(mem[2048 + i] == mem[i], "decrypted image equals original");
    // Transfer sizes.
    for (int s = 0; s < 3; s++) begin
      nb = sizes[s] / 16;
      t0 = cycle;
      xfer(32'h0000, 32'h3000, nb, 0);
      cyc_total = cycle - t0;
      $display("transfer of %0d bytes: %0d cycles (%0d blocks)", sizes[s], cyc_total, nb);
      check(cyc_total <= 34 * nb, $sformatf("cycle budget for %0d bytes", sizes[s]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
