// aes_key_exp_ctrl: controller of the key expansion unit.
//
// After start (cycle 0) it alternates two kinds of cycle for ten steps:
// a "continue" cycle that lets cipher_word0_key capture g() of the current
// key (cycle 0 and even cycles 2..18) and a "valid" cycle that writes the next
// round key into the key registers (odd cycles 1..19). cnt_val is the number
// (1..10) of the key-schedule step being prepared; done pulses on cycle 20,
// when the tenth new key is in the registers. The signal names valid, continue
// and Cnt_val[3:0] come from the key expansion schematic; the alternation is
// this implementation's way of keeping the keys in step with the two-cycle
// rounds of the core.
module aes_key_exp_ctrl
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       load,
  output logic       cont,
  output logic       valid,
  output logic [3:0] cnt_val,
  output logic       busy,
  output logic       done
);

  logic       active;
  logic       upd_phase;   // 1: this cycle writes a new key
  logic [3:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active    <= 1'b0;
      upd_phase <= 1'b0;
      cnt       <= '0;
      done      <= 1'b0;
    end else begin
      done <= active && upd_phase && (cnt == 4'(NUM_ROUNDS));
      if (!active) begin
        if (start) begin
          active    <= 1'b1;
          upd_phase <= 1'b1;
          cnt       <= 4'd1;
        end
      end else if (upd_phase) begin
        upd_phase <= 1'b0;
        if (cnt == 4'(NUM_ROUNDS)) begin
          active <= 1'b0;
          cnt    <= '0;
        end else begin
          cnt <= cnt + 4'd1;
        end
      end else begin
        upd_phase <= 1'b1;
      end
    end
  end

  assign load    = start && !active;
  assign cont    = load || (active && !upd_phase);
  assign valid   = active && upd_phase;
  assign cnt_val = load ? 4'd1 : cnt;
  assign busy    = active;

endmodule
