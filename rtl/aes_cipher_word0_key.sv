// aes_cipher_word0_key: the non-linear part of one AES-128 key-schedule step.
//
// It computes g(w) = SubWord(RotWord(w)) ^ {Rcon[step], 24'h0} for the word w
// that feeds word 0 of the next round key, and registers the result when cont
// ("continue") is high. step (1..10) selects the round constant. The block's
// name, its registered output and its continue input follow the key expansion
// schematic; the four S-box lookups share the tables of aes_pkg.
//
// Timing: one cycle, g_out holds the value captured on the last enabled edge.
module aes_cipher_word0_key
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cont,
  input  logic [3:0] step,
  input  word_t      w_in,
  output word_t      g_out
);

  word_t rot, g;

  assign rot = {w_in[23:0], w_in[31:24]};
  assign g   = {SBOX[rot[31:24]] ^ rcon(step), SBOX[rot[23:16]],
                SBOX[rot[15:8]], SBOX[rot[7:0]]};

  always_ff @(posedge clk) begin
    if (!rst_n)    g_out <= '0;
    else if (cont) g_out <= g;
  end

endmodule
