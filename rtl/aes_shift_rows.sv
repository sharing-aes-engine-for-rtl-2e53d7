// aes_shift_rows: ShiftRows (mode 0) or InvShiftRows (mode 1), combinational.
//
// Row r of the 4x4 byte state is rotated left by r positions for encryption
// and right by r positions for decryption; row 0 is unchanged. Bytes are in
// the column-major order of aes_pkg. One instance serves both directions, as
// the design shares its round hardware between encryption and decryption.
module aes_shift_rows
  import aes_pkg::*;
(
  input  aes_mode_e mode,
  input  block_t    din,
  output block_t    dout
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        if (mode == AES_DEC)
          dout[127 - 8*(4*c + r) -: 8] = din[127 - 8*(4*((c + 4 - r) % 4) + r) -: 8];
        else
          dout[127 - 8*(4*c + r) -: 8] = din[127 - 8*(4*((c + r) % 4) + r) -: 8];
      end
    end
  end

endmodule
