// aes_key_expansion: on-the-fly AES-128 round key generator, forward or
// inverse.
//
// The key is held as four 32-bit words. Every step, cipher_word0_key forms
// g() of one word and three XORs chain the remaining words, so one new round
// key appears every two cycles, in step with the core's two-cycle rounds.
//
//   forward (mode 0), k(n) -> k(n+1):
//     w0' = w0 ^ g(w3), w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'
//   inverse (mode 1), k(n+1) -> k(n):
//     w3 = w3' ^ w2', w2 = w2' ^ w1', w1 = w1' ^ w0', w0 = w0' ^ g(w3)
//
// With mode 1 and key_in = k10 the unit produces k9, k8, ..., k0, which is
// the order the shared core needs for decryption; the inverse step reuses the
// same g() block and XORs. The controller, the key-input multiplexer, the XOR
// gates, the registers and cipher_word0_key follow the key expansion
// schematic. The schematic draws two register banks; here a single bank of
// four words serves as both, and the inverse direction is this design's way of
// sharing the schedule between encryption and decryption.
//
// Timing: start on cycle 0 loads key_in; round key n (k(n) forward, k(10-n)
// inverse) is on round_key from cycle 2n to cycle 2n+1, the last one from
// cycle 20 until the next start. valid pulses on the cycles that write a key
// (the key is on round_key from the cycle after), done pulses on cycle 20.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  aes_mode_e mode,
  input  block_t    key_in,
  output block_t    round_key,
  output logic      valid,
  output logic      busy,
  output logic      done
);

  logic       load, cont;
  logic [3:0] cnt_val;
  aes_mode_e  mode_q, mode_eff;
  block_t     key_q, src, next_key;
  word_t      g_q, g_word, w0, w1, w2, w3;
  logic [3:0] rcon_step;

  aes_key_exp_ctrl u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .load    (load),
    .cont    (cont),
    .valid   (valid),
    .cnt_val (cnt_val),
    .busy    (busy),
    .done    (done)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)    mode_q <= AES_ENC;
    else if (load) mode_q <= mode;
  end
  assign mode_eff = load ? mode : mode_q;

  // Key-input multiplexer: the external key on start, the fed-back key after.
  assign src = load ? key_in : key_q;
  assign {w0, w1, w2, w3} = src;

  // Forward steps 1..10 use Rcon[1..10]; the inverse step that recovers k(n)
  // from k(n+1) uses Rcon[n+1], i.e. Rcon[11 - step].
  assign rcon_step = (mode_eff == AES_DEC) ? 4'(NUM_ROUNDS + 1) - cnt_val : cnt_val;
  assign g_word    = (mode_eff == AES_DEC) ? (w3 ^ w2) : w3;

  aes_cipher_word0_key u_word0 (
    .clk   (clk),
    .rst_n (rst_n),
    .cont  (cont),
    .step  (rcon_step),
    .w_in  (g_word),
    .g_out (g_q)
  );

  always_comb begin
    word_t n0, n1, n2, n3;
    if (mode_eff == AES_DEC) begin
      n0 = w0 ^ g_q;
      n1 = w1 ^ w0;
      n2 = w2 ^ w1;
      n3 = w3 ^ w2;
    end else begin
      n0 = w0 ^ g_q;
      n1 = w1 ^ n0;
      n2 = w2 ^ n1;
      n3 = w3 ^ n2;
    end
    next_key = {n0, n1, n2, n3};
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     key_q <= '0;
    else if (load)  key_q <= key_in;
    else if (valid) key_q <= next_key;
  end

  assign round_key = key_q;

endmodule
