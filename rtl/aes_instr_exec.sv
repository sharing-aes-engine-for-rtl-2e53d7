// aes_instr_exec: execution states of the four AES custom instructions.
//
// This block plays the part of the processor controller states added for the
// AES instructions. It decodes one 32-bit instruction at a time and moves
// data between the AES unit and either data memory (through a word-wide
// read/write port standing in for the processor's memory adjustment units) or
// the register file.
//
//   load-AES     [5:0]=001011, [6]=mode, [7]=0, [12:8]=rs
//                starts the unit, then reads mem[x[rs]], +4, +8, +12
//   readReg-AES  [5:0]=001011, [6]=mode, [7]=1, [12:8]=rs, [17:13]=rd field
//                starts the unit with x[rs], x[rs+1], x[rs+2], x[rs+3]
//   store-AES    [6:0]=0101011, [11:7]=rs, [12]=0
//                writes the result to mem[x[rs]], +4, +8, +12
//   writeReg-AES [6:0]=0101011, [11:7]=rd, [12]=1
//                writes the result to x[rd], x[rd+1], x[rd+2], x[rd+3]
//
// Opcodes, the mode bit and the field positions of load-AES, readReg-AES and
// store-AES follow the instruction formats of the design. The document gives
// no format for writeReg-AES beyond sharing store-AES's opcode; bit 12 as its
// selector and the four consecutive registers are this design's choice, as
// are the consecutive registers of readReg-AES, whose rd field is decoded but
// not used. Register numbers wrap modulo 32. Writes to x0 are issued and left
// to the register file to drop.
//
// Handshakes: an instruction is taken when instr_valid and instr_ready are
// both high; instr_done pulses when it has finished. A load waits while the
// unit is busy; a store waits until the unit is idle and holds a result. The
// memory port holds mem_req (with mem_we, mem_addr, mem_wdata) until mem_ack;
// read data is taken with mem_ack. The register file has one combinational
// read port and one write port. Other opcodes are ignored and flagged on
// illegal for one cycle.
module aes_instr_exec
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // instruction
  input  logic        instr_valid,
  input  logic [31:0] instr,
  output logic        instr_ready,
  output logic        instr_done,
  output logic        illegal,
  // register file
  output logic [4:0]  rf_raddr,
  input  word_t       rf_rdata,
  output logic        rf_we,
  output logic [4:0]  rf_waddr,
  output word_t       rf_wdata,
  // data memory
  output logic        mem_req,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output word_t       mem_wdata,
  input  word_t       mem_rdata,
  input  logic        mem_ack,
  // AES unit
  output logic        aes_start,
  output aes_mode_e   aes_mode,
  output logic        aes_msg_valid,
  output word_t       aes_msg_word,
  input  logic        aes_busy,
  input  logic        aes_result_ready,
  output logic        aes_out_req,
  output logic        aes_out_ack,
  input  logic        aes_out_valid,
  input  word_t       aes_out_word,
  input  logic        aes_done_bout
);

  localparam logic [5:0] OPC_LOAD_AES  = 6'b001011;
  localparam logic [6:0] OPC_STORE_AES = 7'b0101011;

  typedef enum logic [2:0] {
    OP_LOAD_MEM, OP_LOAD_REG, OP_STORE_MEM, OP_STORE_REG, OP_NONE
  } op_e;

  typedef enum logic [2:0] {S_IDLE, S_LSTART, S_LXFER, S_SWAIT, S_SXFER, S_DONE} state_e;

  state_e      state_q;
  op_e         op_q, op_dec;
  aes_mode_e   mode_q;
  logic [31:0] base_q;
  logic [4:0]  reg_q;
  logic [1:0]  idx_q;

  // Decode
  always_comb begin
    op_dec = OP_NONE;
    if (instr[5:0] == OPC_LOAD_AES)       op_dec = instr[7]  ? OP_LOAD_REG  : OP_LOAD_MEM;
    else if (instr[6:0] == OPC_STORE_AES) op_dec = instr[12] ? OP_STORE_REG : OP_STORE_MEM;
  end

  wire logic [4:0] rs_dec   = (op_dec == OP_LOAD_MEM || op_dec == OP_LOAD_REG) ? instr[12:8] : instr[11:7];
  wire logic       take     = instr_valid && instr_ready;
  wire logic       is_load  = (op_q == OP_LOAD_MEM) || (op_q == OP_LOAD_REG);

  assign instr_ready = (state_q == S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      op_q       <= OP_NONE;
      mode_q     <= AES_ENC;
      base_q     <= '0;
      reg_q      <= '0;
      idx_q      <= '0;
      instr_done <= 1'b0;
      illegal    <= 1'b0;
    end else begin
      instr_done <= 1'b0;
      illegal    <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (take) begin
            op_q   <= op_dec;
            mode_q <= aes_mode_e'(instr[6]);
            reg_q  <= rs_dec;
            base_q <= rf_rdata;
            idx_q  <= '0;
            if (op_dec == OP_NONE) begin
              illegal    <= 1'b1;
              instr_done <= 1'b1;
            end else if (op_dec == OP_LOAD_MEM || op_dec == OP_LOAD_REG) begin
              state_q <= S_LSTART;
            end else begin
              state_q <= S_SWAIT;
            end
          end
        end
        S_LSTART: if (!aes_busy) state_q <= S_LXFER;
        S_LXFER: begin
          if (aes_msg_valid) begin
            idx_q <= idx_q + 2'd1;
            if (idx_q == 2'd3) state_q <= S_DONE;
          end
        end
        S_SWAIT: if (!aes_busy && aes_result_ready) state_q <= S_SXFER;
        S_SXFER: begin
          if (aes_out_valid && aes_out_ack) idx_q <= idx_q + 2'd1;
          if (aes_done_bout) state_q <= S_DONE;
        end
        S_DONE: begin
          instr_done <= 1'b1;
          state_q    <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  wire logic [31:0] word_addr = base_q + {28'd0, idx_q, 2'b00};
  wire logic [4:0]  word_reg  = reg_q + {3'd0, idx_q};

  always_comb begin
    rf_raddr      = (state_q == S_IDLE) ? rs_dec : word_reg;
    rf_we         = 1'b0;
    rf_waddr      = word_reg;
    rf_wdata      = aes_out_word;
    mem_req       = 1'b0;
    mem_we        = 1'b0;
    mem_addr      = word_addr;
    mem_wdata     = aes_out_word;
    aes_start     = (state_q == S_LSTART) && !aes_busy;
    aes_mode      = mode_q;
    aes_msg_valid = 1'b0;
    aes_msg_word  = mem_rdata;
    aes_out_req   = (state_q == S_SWAIT) && !aes_busy && aes_result_ready;
    aes_out_ack   = 1'b0;
    if (state_q == S_LXFER) begin
      if (op_q == OP_LOAD_MEM) begin
        mem_req       = 1'b1;
        aes_msg_valid = mem_ack;
        aes_msg_word  = mem_rdata;
      end else begin
        aes_msg_valid = 1'b1;
        aes_msg_word  = rf_rdata;
      end
    end
    if (state_q == S_SXFER && aes_out_valid) begin
      if (op_q == OP_STORE_MEM) begin
        mem_req     = 1'b1;
        mem_we      = 1'b1;
        aes_out_ack = mem_ack;
      end else begin
        rf_we       = 1'b1;
        aes_out_ack = 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) aes_start |-> !aes_busy);
  assert property (@(posedge clk) disable iff (!rst_n) (state_q == S_LXFER) |-> is_load)
    else $error("aes_instr_exec: load transfer for a store instruction");

endmodule
