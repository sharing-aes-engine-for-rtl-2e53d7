// aes_input_buffer: gathers four 32-bit words into the 128-bit block for the
// AES core.
//
// start clears the buffer; each cycle with word_valid high shifts word_in in
// from the right, so the first word ends up in bits [127:96] (state bytes
// 0..3). A word offered together with start is taken as the first word. When
// the fourth word has been written, done pulses for one cycle on the next
// cycle and block_out is complete; it then stays unchanged until the next
// start. The document gives the buffer's job (collect four words from memory
// into one 128-bit input); the word order and the start/done timing are this
// design's choices.
module aes_input_buffer
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   word_valid,
  input  word_t  word_in,
  output block_t block_out,
  output logic   done
);

  logic [2:0] count;   // words held, 0..4

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count     <= 3'd4;
      block_out <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        count <= word_valid ? 3'd1 : 3'd0;
        if (word_valid) block_out <= {block_out[95:0], word_in};
      end else if (word_valid && count < 3'd4) begin
        count     <= count + 3'd1;
        block_out <= {block_out[95:0], word_in};
        done      <= (count == 3'd3);
      end
    end
  end

  // A fifth word before the next start would be lost.
  assert property (@(posedge clk) disable iff (!rst_n) (word_valid && !start) |-> count < 3'd4)
    else $error("aes_input_buffer: word offered while the buffer is full");

endmodule
