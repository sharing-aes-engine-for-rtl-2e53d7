// aes_unit: the assembled AES-128 encrypt/decrypt unit.
//
// A block arrives as four 32-bit words (msg_valid/msg_word) after a start
// pulse that carries the mode (0 encrypt, 1 decrypt). The input buffer joins
// the words, the core and the key expansion unit run ten two-cycle rounds in
// lock-step, and the output buffer keeps the 128-bit result until it is asked
// for (out_req) and then hands it out as four 32-bit words (out_valid /
// out_word, stepped by out_ack). The main controller does the handshaking.
// For decryption the key expansion first runs a forward pass to reach the last
// round key, then runs backwards alongside the core.
//
// Latency, counting the start cycle as 0 and one word per cycle from cycle 0:
// encrypt: done_encrypt on cycle 24 (4 load + 20 core), result readable from
// cycle 25; decrypt: cycle 44 (4 load + 20 key pre-pass + 20 core). Read-out
// takes four further cycles when out_ack is held high.
//
// The cipher key arrives on the key port, held stable while a block is in
// flight; the document does not say where the key is kept, so it is a port.
// Blocks, their connections and the handshake names follow the unit
// schematic; the out_req/out_ack read-out handshake and the key pre-pass are
// this design's choices.
module aes_unit
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  aes_mode_e mode,
  input  block_t    key,
  input  logic      msg_valid,
  input  word_t     msg_word,
  output logic      done_bin,
  output logic      busy,
  output logic      done_encrypt,
  output logic      result_ready,
  input  logic      out_req,
  input  logic      out_ack,
  output logic      out_valid,
  output word_t     out_word,
  output logic      done_bout
);

  logic      start_bin, start_kexp, kexp_key_sel, start_core, load_bout, start_bout;
  aes_mode_e kexp_mode, core_mode;
  logic      kexp_done, kexp_valid, kexp_busy, core_done, core_busy;
  logic [3:0] core_round;
  block_t    message, round_key, first_key, cipher;

  aes_unit_ctrl u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (start),
    .mode         (mode),
    .out_req      (out_req),
    .done_bin     (done_bin),
    .kexp_done    (kexp_done),
    .core_done    (core_done),
    .bout_full    (result_ready),
    .start_bin    (start_bin),
    .start_kexp   (start_kexp),
    .kexp_mode    (kexp_mode),
    .kexp_key_sel (kexp_key_sel),
    .start_core   (start_core),
    .core_mode    (core_mode),
    .load_bout    (load_bout),
    .start_bout   (start_bout),
    .busy         (busy),
    .done_encrypt (done_encrypt)
  );

  aes_input_buffer u_bin (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start_bin),
    .word_valid (msg_valid),
    .word_in    (msg_word),
    .block_out  (message),
    .done       (done_bin)
  );

  assign first_key = kexp_key_sel ? round_key : key;

  aes_key_expansion u_kexp (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start_kexp),
    .mode      (kexp_mode),
    .key_in    (first_key),
    .round_key (round_key),
    .valid     (kexp_valid),
    .busy      (kexp_busy),
    .done      (kexp_done)
  );

  aes_core u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start_core),
    .mode      (core_mode),
    .message   (message),
    .key       (first_key),
    .round_key (round_key),
    .busy      (core_busy),
    .done      (core_done),
    .round     (core_round),
    .out_text  (cipher)
  );

  aes_output_buffer u_bout (
    .clk        (clk),
    .rst_n      (rst_n),
    .load       (load_bout),
    .din        (cipher),
    .start      (start_bout),
    .ack        (out_ack),
    .full       (result_ready),
    .word_valid (out_valid),
    .word_out   (out_word),
    .done       (done_bout)
  );

  // The core and the key expansion must finish together.
  assert property (@(posedge clk) disable iff (!rst_n) core_done |-> kexp_done)
    else $error("aes_unit: core and key expansion out of step");
  assert property (@(posedge clk) disable iff (!rst_n) start_core |-> !core_busy && !kexp_busy);
  assert property (@(posedge clk) disable iff (!rst_n) (core_round != 4'd0) |-> kexp_busy)
    else $error("aes_unit: core running without round keys");
  assert property (@(posedge clk) disable iff (!rst_n) kexp_valid |-> kexp_busy);

endmodule
