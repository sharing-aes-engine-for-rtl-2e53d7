// aes_output_buffer: holds the 128-bit result of the core and hands it out as
// four 32-bit words.
//
// load captures din (from the core, on its done cycle) and sets full. start
// begins the read-out: word_valid rises and word_out shows bits [127:96]
// first; each cycle the consumer raises ack the buffer steps to the next word,
// so a consumer that acknowledges at once receives the block in four
// successive clocks, as the design specifies. done pulses on the cycle after
// the fourth word was taken, and full is cleared then. The word order and the
// ack handshake (which lets a slower memory stretch the transfer) are this
// design's choices.
module aes_output_buffer
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  block_t din,
  input  logic   start,
  input  logic   ack,
  output logic   full,
  output logic   word_valid,
  output word_t  word_out,
  output logic   done
);

  block_t     data_q;
  logic       sending;
  logic [1:0] idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_q  <= '0;
      full    <= 1'b0;
      sending <= 1'b0;
      idx     <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load && !sending) begin
        data_q <= din;
        full   <= 1'b1;
      end else if (!sending) begin
        if (start && full) begin
          sending <= 1'b1;
          idx     <= '0;
        end
      end else if (ack) begin
        idx <= idx + 2'd1;
        if (idx == 2'd3) begin
          sending <= 1'b0;
          full    <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  assign word_valid = sending;
  assign word_out   = data_q[127 - 32*idx -: 32];

  assert property (@(posedge clk) disable iff (!rst_n) load |-> !sending)
    else $error("aes_output_buffer: new result while the old one is being read out");

endmodule
