// aes_sbox: registered SubBytes / InvSubBytes stage of the AES core.
//
// All 16 bytes of the 128-bit input go through the S-box in parallel; mode
// selects the forward table (0, encrypt) or the inverse table (1, decrypt).
// The result is captured in a 128-bit register when en is high, so the stage
// adds one clock cycle of latency and splits every AES round into two cycles.
// The document draws the S-box with a clock, a mode and a start-round input;
// the parallel 16-byte layout and the tables built from GF(2^8) arithmetic
// (see aes_pkg) are this design's choices.
//
// Interface: din, mode and en are sampled on the rising clock edge; dout holds
// the last captured value. rst_n (active low, synchronous) clears dout.
module aes_sbox
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  aes_mode_e mode,
  input  block_t    din,
  output block_t    dout
);

  block_t sub;

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      sub[127 - 8*i -: 8] = (mode == AES_DEC) ? INV_SBOX[din[127 - 8*i -: 8]]
                                              : SBOX[din[127 - 8*i -: 8]];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  dout <= '0;
    else if (en) dout <= sub;
  end

endmodule
