// aes_core: iterative AES-128 round datapath shared by encryption and
// decryption.
//
// One S-box bank, one MixColumns bank and one AddRoundKey XOR serve both
// directions; mode (0 encrypt, 1 decrypt, sampled with start) reroutes them
// through multiplexers. Each round takes two cycles: the S-box output is
// registered (first half) and the state register is written next (second
// half). Round keys come from the key expansion unit, which runs in lock-step
// and must present round key n on cycle 2n (n = 1..10), counted from the start
// cycle 0.
//
//   encrypt, first half : sbox_q <= SubBytes(x ^ k)        x = message or state
//   encrypt, second half: state  <= MixColumns(ShiftRows(sbox_q)),
//                         last round: state <= ShiftRows(sbox_q)
//   decrypt, first half : sbox_q <= InvSubBytes(InvShiftRows(y)),
//                         y = message ^ k10 initially, else InvMixColumns(state ^ k)
//   decrypt, second half: state  <= sbox_q
//   output              : out_text = state ^ round_key (k10, or k0 for decrypt)
//
// Moving AddRoundKey to the front of the following half-round lets the key
// expansion deliver each key from a register. For decryption the InvMixColumns
// is applied after AddRoundKey, exactly as in the standard inverse cipher.
// The document gives the set of shared units, the mode-controlled multiplexers
// and the omitted final MixColumns; this exact split of a round into two
// cycles is this implementation's own.
//
// Interface: key is the first round key (the cipher key for encryption, the
// last round key for decryption) and is read on the start cycle only.
// round reports the round in progress (1..10, 0 when idle).
// out_text is valid while done (a one-cycle pulse, 20 cycles after start) is
// high, and for as long afterwards as round_key holds.
module aes_core
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  aes_mode_e mode,
  input  block_t    message,
  input  block_t    key,
  input  block_t    round_key,
  output logic      busy,
  output logic      done,
  output logic [3:0] round,
  output block_t    out_text
);

  aes_mode_e mode_q;
  aes_mode_e mode_eff;
  block_t    state_q;
  block_t    sbox_q;
  logic      sbox_en, state_en, last, ctrl_busy;

  block_t ark, ark_src, ark_key;
  block_t sr_fwd_out, sr_inv_in, sr_inv_out;
  block_t mc_in, mc_out, sbox_in, state_d;
  logic   dec;

  aes_core_ctrl u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .busy     (ctrl_busy),
    .sbox_en  (sbox_en),
    .state_en (state_en),
    .last     (last),
    .round    (round),
    .done     (done)
  );

  wire start_now = start && !ctrl_busy;

  always_ff @(posedge clk) begin
    if (!rst_n)         mode_q <= AES_ENC;
    else if (start_now) mode_q <= mode;
  end

  assign mode_eff = start_now ? mode : mode_q;
  assign dec      = (mode_eff == AES_DEC);

  // Add Round Key: the message and first key on the start cycle, the state and
  // the current round key afterwards.
  assign ark_src = start_now ? message : state_q;
  assign ark_key = start_now ? key     : round_key;
  assign ark     = ark_src ^ ark_key;

  // ShiftRows is pure wiring, so the forward and inverse permutations are two
  // instances; the S-box and MixColumns banks are single shared instances.
  aes_shift_rows u_sr_fwd (.mode(AES_ENC), .din(sbox_q),    .dout(sr_fwd_out));
  aes_shift_rows u_sr_inv (.mode(AES_DEC), .din(sr_inv_in), .dout(sr_inv_out));

  assign mc_in     = dec ? ark : sr_fwd_out;
  aes_mix_columns u_mc (.mode(mode_eff), .din(mc_in), .dout(mc_out));

  assign sr_inv_in = start_now ? ark : mc_out;
  assign sbox_in   = dec ? sr_inv_out : ark;

  aes_sbox u_sbox (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (sbox_en),
    .mode  (mode_eff),
    .din   (sbox_in),
    .dout  (sbox_q)
  );

  assign state_d = dec ? sbox_q : (last ? sr_fwd_out : mc_out);

  always_ff @(posedge clk) begin
    if (!rst_n)        state_q <= '0;
    else if (state_en) state_q <= state_d;
  end

  assign busy     = ctrl_busy;
  assign out_text = state_q ^ round_key;

endmodule
