// aes_core_ctrl: local round controller of the AES core.
//
// It tracks the current round of one block and steers the core's two-cycle
// round. A start pulse (cycle 0) performs the initial AddRoundKey and the first
// S-box pass; after that, odd cycles 1..19 are the "second half" of rounds
// 1..10 (ShiftRows/MixColumns for encryption, state update for decryption) and
// even cycles 2..18 the "first half" of rounds 2..10 (AddRoundKey and S-box).
// On cycle 19 the final round is flagged (last), so MixColumns is skipped, and
// done is a one-cycle pulse on cycle 20, when the core's output is valid.
// That gives the 20-cycle core latency the design reports. The document names
// the controller's job (knowing the round, ending after the 10th, signalling
// done); the cycle split is this implementation's.
//
// Interface: start is honoured only while not busy. sbox_en and state_en are
// the load enables of the S-box register and the state register; round is the
// round whose second half runs this cycle, or whose first half runs on an even
// cycle (1..10, 0 when idle).
module aes_core_ctrl
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       busy,
  output logic       sbox_en,
  output logic       state_en,
  output logic       last,
  output logic [3:0] round,
  output logic       done
);

  logic       active;
  logic [4:0] cnt;     // cycles since start, 1..19 while active

  localparam logic [4:0] LAST_CNT = 5'(2*NUM_ROUNDS - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
      done   <= 1'b0;
    end else begin
      done <= active && (cnt == LAST_CNT);
      if (!active) begin
        if (start) begin
          active <= 1'b1;
          cnt    <= 5'd1;
        end
      end else if (cnt == LAST_CNT) begin
        active <= 1'b0;
        cnt    <= '0;
      end else begin
        cnt <= cnt + 5'd1;
      end
    end
  end

  assign busy     = active;
  assign sbox_en  = (start && !active) || (active && !cnt[0]);
  assign state_en = active && cnt[0];
  assign last     = active && (cnt == LAST_CNT);
  assign round    = active ? 4'((cnt + 5'd1) >> 1) + (cnt[0] ? 4'd0 : 4'd1) : 4'd0;

endmodule
