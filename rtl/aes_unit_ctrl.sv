// aes_unit_ctrl: main controller of the AES unit.
//
// It sequences one block through the unit by handshaking with the buffers,
// the key expansion unit and the core:
//
//   IDLE      start: latch mode, clear the input buffer (start_bin)
//   LOAD      wait for done_bin (four words received), then
//               encrypt: start core and key expansion (forward) together
//               decrypt: start a forward key-expansion pass (KEY_PRE)
//   KEY_PRE   wait for the pass to end with k10 in the key registers, then
//             start core and key expansion (inverse) with k10 as first key
//   CORE      wait for the core's done: the output buffer captures the
//             result, done_encrypt pulses, back to IDLE
//
// Read-out of the output buffer (start_bout) is requested separately with
// out_req and is passed on only while a result is held and no block is in
// flight. The document names the controller's handshake signals (Start bin,
// Done bin, Start enc, Start dec, Done encrypt, Start bout, Done bout, start);
// the state sequence, and the forward key pre-pass that provides the last
// round key for decryption, are this design's.
module aes_unit_ctrl
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  aes_mode_e mode,
  input  logic      out_req,
  input  logic      done_bin,
  input  logic      kexp_done,
  input  logic      core_done,
  input  logic      bout_full,
  output logic      start_bin,
  output logic      start_kexp,
  output aes_mode_e kexp_mode,
  output logic      kexp_key_sel,   // 1: first key = key expansion output (k10)
  output logic      start_core,
  output aes_mode_e core_mode,
  output logic      load_bout,
  output logic      start_bout,
  output logic      busy,
  output logic      done_encrypt
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_KEY_PRE, S_CORE} state_e;

  state_e    state_q, state_d;
  aes_mode_e mode_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      mode_q  <= AES_ENC;
    end else begin
      state_q <= state_d;
      if (state_q == S_IDLE && start) mode_q <= mode;
    end
  end

  always_comb begin
    state_d      = state_q;
    start_bin    = 1'b0;
    start_kexp   = 1'b0;
    kexp_mode    = AES_ENC;
    kexp_key_sel = 1'b0;
    start_core   = 1'b0;
    load_bout    = 1'b0;
    done_encrypt = 1'b0;
    unique case (state_q)
      S_IDLE: begin
        if (start) begin
          start_bin = 1'b1;
          state_d   = S_LOAD;
        end
      end
      S_LOAD: begin
        if (done_bin) begin
          start_kexp = 1'b1;
          if (mode_q == AES_DEC) begin
            state_d = S_KEY_PRE;
          end else begin
            start_core = 1'b1;
            state_d    = S_CORE;
          end
        end
      end
      S_KEY_PRE: begin
        if (kexp_done) begin
          start_kexp   = 1'b1;
          kexp_mode    = AES_DEC;
          kexp_key_sel = 1'b1;
          start_core   = 1'b1;
          state_d      = S_CORE;
        end
      end
      S_CORE: begin
        if (core_done) begin
          load_bout    = 1'b1;
          done_encrypt = 1'b1;
          state_d      = S_IDLE;
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  assign core_mode  = mode_q;
  assign busy       = (state_q != S_IDLE);
  assign start_bout = out_req && bout_full && (state_q == S_IDLE);

endmodule
