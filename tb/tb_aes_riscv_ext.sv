// tb_aes_riscv_ext: end-to-end test of the AES extension at its default
// configuration. The testbench plays the processor: it issues load-AES,
// readReg-AES, store-AES and writeReg-AES instructions, and models the
// register file and a word memory with optional wait states. Each block is
// encrypted or decrypted through the real AES unit and compared with the
// reference model, including the FIPS-197 vectors and a full
// encrypt-then-decrypt round trip.
//
// Mechanisms counted (each must occur at least once): encryption, decryption
// with its forward key pre-pass, memory source, register source, memory
// destination, register destination, memory wait states, a store stalled by
// a busy unit, a load stalled by a busy unit, and an illegal opcode.
module tb_aes_riscv_ext;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic         clk = 0, rst_n = 0, instr_valid = 0;
  logic [127:0] key = '0;
  logic [31:0]  instr = '0;
  logic         instr_ready, instr_done, illegal;
  logic [4:0]   rf_raddr, rf_waddr;
  logic [31:0]  rf_rdata, rf_wdata, mem_addr, mem_wdata, mem_rdata;
  logic         rf_we, mem_req, mem_we, mem_ack, aes_busy, aes_msg_loaded, aes_done;
  int           checks = 0, failures = 0;

  aes_riscv_ext dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Processor-side models
  logic [31:0] regs [32];
  logic [31:0] mem  [4096];
  assign rf_rdata = (rf_raddr == 0) ? 32'h0 : regs[rf_raddr];
  always_ff @(posedge clk) if (rf_we && rf_waddr != 0) regs[rf_waddr] <= rf_wdata;

  logic [1:0] wait_cnt = 0;
  bit         slow_mem = 0;
  int         n_wait = 0;
  assign mem_ack   = mem_req && (wait_cnt == 0);
  assign mem_rdata = mem[mem_addr[13:2]];
  always_ff @(posedge clk) begin
    if (mem_req && !mem_ack) begin
      wait_cnt <= wait_cnt - 2'd1;
      n_wait   <= n_wait + 1;
    end else if (mem_ack) begin
      wait_cnt <= slow_mem ? 2'($urandom() % 3) : 2'd0;
    end
    if (mem_ack && mem_we) mem[mem_addr[13:2]] <= mem_wdata;
  end

  // Mechanism counters
  int n_enc = 0, n_dec = 0, n_keypre = 0, n_ld_mem = 0, n_ld_reg = 0, n_st_mem = 0, n_st_reg = 0;
  int n_st_stall = 0, n_ld_stall = 0, n_illegal = 0;
  always_ff @(posedge clk) begin
    if (dut.u_aes.start_core) begin
      if (dut.u_aes.core_mode == AES_DEC) n_dec <= n_dec + 1;
      else                                n_enc <= n_enc + 1;
    end
    if (dut.u_aes.start_kexp && dut.u_aes.u_ctrl.state_q == dut.u_aes.u_ctrl.S_LOAD &&
        dut.u_aes.u_ctrl.mode_q == AES_DEC) n_keypre <= n_keypre + 1;
    if (illegal) n_illegal <= n_illegal + 1;
  end

  function automatic logic [31:0] i_load(input bit reg_src, input bit m, input logic [4:0] rs);
    return {19'h0, rs, reg_src, m, 6'b001011};
  endfunction
  function automatic logic [31:0] i_store(input bit reg_dst, input logic [4:0] r);
    return {19'h0, reg_dst, r, 7'b0101011};
  endfunction

  task automatic issue(input logic [31:0] ins, output int cycles);
    instr <= ins; instr_valid <= 1;
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    instr_valid <= 0;
    cycles = 0;
    do begin @(posedge clk); cycles++; #1; end while (!instr_done && cycles < 1000);
    check(instr_done, "instruction completes");
  endtask

  // Put a block in memory (at byte address a) or in registers x[r..r+3].
  task automatic put_mem(input logic [31:0] a, input blk_t b);
    for (int i = 0; i < 4; i++) mem[a[13:2] + i] = b[127 - 32*i -: 32];
  endtask
  function automatic blk_t get_mem(input logic [31:0] a);
    blk_t b;
    for (int i = 0; i < 4; i++) b[127 - 32*i -: 32] = mem[a[13:2] + i];
    return b;
  endfunction

  // One block: load from memory or registers, store to memory or registers.
  task automatic one_block(input blk_t txt, input bit dec, input bit src_reg, input bit dst_reg);
    blk_t exp, got;
    int   cyc;
    exp = dec ? decrypt(txt, key) : encrypt(txt, key);
    if (src_reg) begin
      for (int i = 0; i < 4; i++) regs[8 + i] = txt[127 - 32*i -: 32];
      issue(i_load(1, dec, 5'd8), cyc);
      n_ld_reg++;
    end else begin
      regs[5] = 32'h100;
      put_mem(32'h100, txt);
      issue(i_load(0, dec, 5'd5), cyc);
      n_ld_mem++;
    end
    if (dst_reg) begin
      issue(i_store(1, 5'd20), cyc);
      for (int i = 0; i < 4; i++) got[127 - 32*i -: 32] = regs[20 + i];
      n_st_reg++;
    end else begin
      regs[6] = 32'h800;
      issue(i_store(0, 5'd6), cyc);
      got = get_mem(32'h800);
      n_st_mem++;
    end
    if (cyc > 8) n_st_stall++;   // the store waited for the unit
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s src=%s dst=%s: got %h exp %h", dec ? "decrypt" : "encrypt",
               src_reg ? "reg" : "mem", dst_reg ? "reg" : "mem", got, exp);
    end
  endtask

  initial begin
    int   cyc;
    blk_t pt, ct;
    for (int i = 0; i < 32; i++) regs[i] = 0;
    for (int i = 0; i < 4096; i++) mem[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // FIPS-197 vectors through every source/destination combination.
    key = KAT_KEY0;
    one_block(KAT_PT0, 0, 0, 0);
    one_block(KAT_CT0, 1, 0, 1);
    key = KAT_KEY1;
    one_block(KAT_PT1, 0, 1, 0);
    one_block(KAT_CT1, 1, 1, 1);

    // Random blocks and keys, with and without memory wait states.
    for (int n = 0; n < 24; n++) begin
      key = rand128();
      slow_mem = n[2];
      one_block(rand128(), n[0], n[1], n[3]);
    end

    // Round trip: encrypt then decrypt the result.
    key = rand128();
    pt  = rand128();
    regs[5] = 32'h200; put_mem(32'h200, pt);
    regs[6] = 32'h300;
    issue(i_load(0, 0, 5'd5), cyc);
    issue(i_store(0, 5'd6), cyc);
    ct = get_mem(32'h300);
    check(ct == encrypt(pt, key), "round trip: ciphertext");
    regs[5] = 32'h300; regs[6] = 32'h400;
    issue(i_load(0, 1, 5'd5), cyc);
    issue(i_store(0, 5'd6), cyc);
    check(get_mem(32'h400) == pt, "round trip: plaintext recovered");

    // A second load while the unit is still busy stalls until it is free;
    // the first block's result is overwritten by the second.
    slow_mem = 0;
    regs[5] = 32'h200;
    issue(i_load(0, 1, 5'd5), cyc);
    issue(i_load(0, 0, 5'd5), cyc);
    if (cyc > 20) n_ld_stall++;
    issue(i_store(0, 5'd6), cyc);
    check(get_mem(32'h400) == encrypt(pt, key), "result of the later load");

    // Unknown opcode.
    instr <= 32'h0000_0013; instr_valid <= 1;
    @(posedge clk); instr_valid <= 0;
    repeat (2) @(posedge clk);

    $display("mechanisms: enc=%0d dec=%0d keypre=%0d ld_mem=%0d ld_reg=%0d st_mem=%0d st_reg=%0d",
             n_enc, n_dec, n_keypre, n_ld_mem, n_ld_reg, n_st_mem, n_st_reg);
    $display("mechanisms: mem_wait=%0d st_stall=%0d ld_stall=%0d illegal=%0d",
             n_wait, n_st_stall, n_ld_stall, n_illegal);
    check(n_enc > 0, "encryption happened");
    check(n_dec > 0, "decryption happened");
    check(n_keypre > 0 && n_keypre == n_dec, "key pre-pass for every decryption");
    check(n_ld_mem > 0, "load-AES used");
    check(n_ld_reg > 0, "readReg-AES used");
    check(n_st_mem > 0, "store-AES used");
    check(n_st_reg > 0, "writeReg-AES used");
    check(n_wait > 0, "memory wait states seen");
    check(n_st_stall > 0, "store stalled on busy unit");
    check(n_ld_stall > 0, "load stalled on busy unit");
    check(n_illegal > 0, "illegal opcode flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
