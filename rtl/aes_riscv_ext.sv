// aes_riscv_ext: AES-128 engine attached to a RISC-V core through four custom
// instructions (load-AES, readReg-AES, store-AES, writeReg-AES).
//
// The top joins the instruction sequencer (aes_instr_exec) to the shared
// encrypt/decrypt AES unit (aes_unit). The processor itself is not part of
// this RTL: its instruction issue, its register file and its data memory port
// are brought out as plain ports, so the block can sit beside any multi-cycle
// RV32 controller that hands it AES instructions. The 128-bit cipher key is an
// input that must be stable while a block is processed.
//
// Interface and timing: see aes_instr_exec for the instruction encodings and
// handshakes and aes_unit for the latencies. aes_busy is high while a block is
// in flight, aes_msg_loaded pulses when the unit's input buffer holds
// all four words of a block, aes_done pulses when a result has been written to the output
// buffer. Encryption finishes 24 cycles after the unit's start (decryption
// 44); with a zero-wait memory a load-AES/store-AES pair takes 34 cycles.
module aes_riscv_ext
  import aes_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [127:0]  key,
  input  logic          instr_valid,
  input  logic [31:0]   instr,
  output logic          instr_ready,
  output logic          instr_done,
  output logic          illegal,
  output logic [4:0]    rf_raddr,
  input  logic [31:0]   rf_rdata,
  output logic          rf_we,
  output logic [4:0]    rf_waddr,
  output logic [31:0]   rf_wdata,
  output logic          mem_req,
  output logic          mem_we,
  output logic [31:0]   mem_addr,
  output logic [31:0]   mem_wdata,
  input  logic [31:0]   mem_rdata,
  input  logic          mem_ack,
  output logic          aes_busy,
  output logic          aes_msg_loaded,
  output logic          aes_done
);

  logic      aes_start, msg_valid, result_ready, out_req, out_ack, out_valid, done_bout;
  aes_mode_e aes_mode;
  word_t     msg_word, out_word;

  aes_instr_exec u_exec (
    .clk              (clk),
    .rst_n            (rst_n),
    .instr_valid      (instr_valid),
    .instr            (instr),
    .instr_ready      (instr_ready),
    .instr_done       (instr_done),
    .illegal          (illegal),
    .rf_raddr         (rf_raddr),
    .rf_rdata         (rf_rdata),
    .rf_we            (rf_we),
    .rf_waddr         (rf_waddr),
    .rf_wdata         (rf_wdata),
    .mem_req          (mem_req),
    .mem_we           (mem_we),
    .mem_addr         (mem_addr),
    .mem_wdata        (mem_wdata),
    .mem_rdata        (mem_rdata),
    .mem_ack          (mem_ack),
    .aes_start        (aes_start),
    .aes_mode         (aes_mode),
    .aes_msg_valid    (msg_valid),
    .aes_msg_word     (msg_word),
    .aes_busy         (aes_busy),
    .aes_result_ready (result_ready),
    .aes_out_req      (out_req),
    .aes_out_ack      (out_ack),
    .aes_out_valid    (out_valid),
    .aes_out_word     (out_word),
    .aes_done_bout    (done_bout)
  );

  aes_unit u_aes (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (aes_start),
    .mode         (aes_mode),
    .key          (key),
    .msg_valid    (msg_valid),
    .msg_word     (msg_word),
    .done_bin     (aes_msg_loaded),
    .busy         (aes_busy),
    .done_encrypt (aes_done),
    .result_ready (result_ready),
    .out_req      (out_req),
    .out_ack      (out_ack),
    .out_valid    (out_valid),
    .out_word     (out_word),
    .done_bout    (done_bout)
  );

endmodule
