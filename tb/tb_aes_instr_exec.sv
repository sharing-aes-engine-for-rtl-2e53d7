// tb_aes_instr_exec: checks decoding and execution of the four AES custom
// instructions. The testbench provides a register file, a word memory with
// random wait states and a simple stand-in for the AES unit (it records the
// four words it receives, stays busy for a while and returns the words
// XOR-ed with a constant). Checked: addresses and registers used, word order,
// mode bit, store data and destinations, stalls while the unit is busy, the
// instr_done pulse and the illegal flag.
module tb_aes_instr_exec;
  import aes_pkg::*;

  logic        clk = 0, rst_n = 0, instr_valid = 0;
  logic [31:0] instr = '0;
  logic        instr_ready, instr_done, illegal;
  logic [4:0]  rf_raddr, rf_waddr;
  word_t       rf_rdata, rf_wdata;
  logic        rf_we;
  logic        mem_req, mem_we, mem_ack;
  logic [31:0] mem_addr;
  word_t       mem_wdata, mem_rdata;
  logic        aes_start, aes_msg_valid, aes_busy, aes_result_ready, aes_out_req, aes_out_ack;
  logic        aes_out_valid, aes_done_bout;
  aes_mode_e   aes_mode;
  word_t       aes_msg_word, aes_out_word;
  int          checks = 0, failures = 0;

  aes_instr_exec dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Register file and memory
  word_t regs [32];
  word_t mem  [1024];
  assign rf_rdata = (rf_raddr == 0) ? 32'h0 : regs[rf_raddr];
  always_ff @(posedge clk) if (rf_we && rf_waddr != 0) regs[rf_waddr] <= rf_wdata;

  logic [1:0] wait_cnt = 0;
  logic       slow_mem = 0;
  assign mem_ack   = mem_req && (wait_cnt == 0);
  assign mem_rdata = mem[mem_addr[11:2]];
  always_ff @(posedge clk) begin
    if (mem_req && !mem_ack) wait_cnt <= wait_cnt - 2'd1;
    else if (mem_ack)        wait_cnt <= slow_mem ? 2'($urandom() % 3) : 2'd0;
    if (mem_ack && mem_we) mem[mem_addr[11:2]] <= mem_wdata;
  end

  // AES unit stand-in
  localparam word_t MASK = 32'h5a5a_0f0f;
  word_t     got [4];
  int        got_n = 0, busy_cnt = 0, out_idx = 0, starts = 0;
  logic      held = 0, sending = 0, done_q = 0;
  aes_mode_e got_mode;
  assign aes_busy         = (busy_cnt > 0) || (got_n > 0 && got_n < 4);
  assign aes_result_ready = held;
  assign aes_out_valid    = sending;
  assign aes_out_word     = got[out_idx] ^ MASK;
  assign aes_done_bout    = done_q;
  always_ff @(posedge clk) begin
    done_q <= 1'b0;
    if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt == 1) held <= 1'b1;
    end
    if (aes_start) begin
      got_n    <= 0;
      got_mode <= aes_mode;
      starts   <= starts + 1;
    end
    if (aes_msg_valid) begin
      got[got_n] <= aes_msg_word;
      got_n      <= got_n + 1;
      if (got_n == 3) busy_cnt <= 10;
    end
    if (aes_out_req && held && !sending) begin
      sending <= 1'b1;
      out_idx <= 0;
    end else if (sending && aes_out_ack) begin
      out_idx <= out_idx + 1;
      if (out_idx == 3) begin
        sending <= 1'b0;
        held    <= 1'b0;
        done_q  <= 1'b1;
      end
    end
  end

  function automatic logic [31:0] enc_load(input bit reg_src, input bit m, input logic [4:0] rs,
                                           input logic [4:0] rd);
    return {14'h0, rd, rs, reg_src, m, 6'b001011};
  endfunction
  function automatic logic [31:0] enc_store(input bit reg_dst, input logic [4:0] r);
    return {19'h0, reg_dst, r, 7'b0101011};
  endfunction

  task automatic issue(input logic [31:0] ins, output int cycles);
    instr <= ins; instr_valid <= 1;
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    instr_valid <= 0;
    cycles = 0;
    do begin @(posedge clk); cycles++; #1; end while (!instr_done && cycles < 500);
    check(instr_done, "instruction completes");
  endtask

  initial begin
    int cyc, stalls;
    word_t base;
    for (int i = 0; i < 32; i++) regs[i] = $urandom();
    regs[0] = 0;
    for (int i = 0; i < 1024; i++) mem[i] = $urandom();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 24; n++) begin
      logic [4:0] rs, rd;
      bit m, use_reg, st_reg;
      slow_mem = n[2];
      m = n[0]; use_reg = n[1]; st_reg = $urandom() % 2;
      rs = 5'(1 + $urandom() % 31); rd = 5'(1 + $urandom() % 28);
      base = 32'(($urandom() % 200) * 4);
      if (!use_reg) regs[rs] = base;
      issue(enc_load(use_reg, m, rs, 5'd0), cyc);
      check(got_mode == aes_mode_e'(m), "mode bit passed to the unit");
      for (int i = 0; i < 4; i++) begin
        word_t e;
        e = use_reg ? ((5'(rs + i) == 0) ? 32'h0 : regs[5'(rs + i)]) : mem[base[11:2] + i];
        check(got[i] == e, $sformatf("load word %0d (%s)", i, use_reg ? "register" : "memory"));
      end
      // A store right away must wait for the unit to finish.
      if (st_reg) begin
        issue(enc_store(1, rd), cyc);
        check(cyc > 8, "store waited for the busy unit");
        for (int i = 0; i < 4; i++) check(regs[rd + 5'(i)] == (got[i] ^ MASK), "writeReg-AES data");
      end else begin
        rd = 5'(1 + $urandom() % 31);
        base = 32'(400 * 4 + ($urandom() % 100) * 4);
        regs[rd] = base;
        issue(enc_store(0, rd), cyc);
        check(cyc > 8, "store waited for the busy unit");
        for (int i = 0; i < 4; i++) check(mem[base[11:2] + i] == (got[i] ^ MASK), "store-AES data");
      end
    end
    // A load while the unit is busy stalls until it is free.
    regs[5] = 32'h40;
    issue(enc_load(0, 0, 5'd5, 5'd0), cyc);
    stalls = starts;
    issue(enc_load(0, 1, 5'd5, 5'd0), cyc);
    check(cyc > 8 && starts == stalls + 1, "second load stalled while busy");
    // Illegal opcode
    instr <= 32'h0000_0033; instr_valid <= 1;
    @(posedge clk); instr_valid <= 0; #1;
    check(illegal && instr_done, "illegal opcode flagged");
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
