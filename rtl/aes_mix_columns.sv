// aes_mix_columns: MixColumns (mode 0) or InvMixColumns (mode 1), combinational.
//
// Each 4-byte column is multiplied in GF(2^8) by the circulant matrix
// (02 03 01 01) for encryption or (0e 0b 0d 09) for decryption. The four
// columns are processed in parallel. One instance serves both directions.
module aes_mix_columns
  import aes_pkg::*;
(
  input  aes_mode_e mode,
  input  block_t    din,
  output block_t    dout
);

  function automatic logic [31:0] mix_col(input logic [31:0] col, input aes_mode_e m);
    logic [7:0] a [4];
    logic [7:0] b [4];
    logic [7:0] c0, c1, c2, c3;
    for (int i = 0; i < 4; i++) a[i] = col[31 - 8*i -: 8];
    if (m == AES_DEC) begin
      c0 = 8'h0e; c1 = 8'h0b; c2 = 8'h0d; c3 = 8'h09;
    end else begin
      c0 = 8'h02; c1 = 8'h03; c2 = 8'h01; c3 = 8'h01;
    end
    for (int i = 0; i < 4; i++) begin
      b[i] = gmul(a[i], c0) ^ gmul(a[(i + 1) % 4], c1) ^
             gmul(a[(i + 2) % 4], c2) ^ gmul(a[(i + 3) % 4], c3);
    end
    return {b[0], b[1], b[2], b[3]};
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++) dout[127 - 32*c -: 32] = mix_col(din[127 - 32*c -: 32], mode);
  end

endmodule
