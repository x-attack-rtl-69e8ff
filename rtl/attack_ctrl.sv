// attack_ctrl: hardware controller of the two ring-oscillator banks.
//
// A start pulse from the host latches the requested mode and runs one
// attack of exactly ATTACK_CYCLES clock cycles, after which both enables
// drop and done pulses for one cycle; a start during an attack is ignored.
// Modes:
//   MODE_PERIODIC  en1 = en2, in phase, ON_CYCLES high out of every
//                  PERIOD cycles (12 of 16 = 75 % duty by default);
//   MODE_HALF      only en1 is high;
//   MODE_ALL       en1 and en2 are both high.
// The three modes, the 75 % duty ratio and the fact that the hardware, not
// the software, bounds the attack length follow the attack description;
// the default length of 4096 cycles is the top of the range it found
// suitable (2048 to 4096 victim clock cycles). The period of 16 cycles and
// the start/done handshake are this design's choices. The enables are
// decoded from registered state: they rise in the cycle after start and
// fall in the cycle in which done is high.
module attack_ctrl
  import xattack_pkg::*;
#(
  parameter int unsigned ATTACK_CYCLES = 4096,
  parameter int unsigned PERIOD        = 16,
  parameter int unsigned ON_CYCLES     = 12
) (
  input  logic         clk,
  input  logic         rst,      // asynchronous, active high
  input  logic         start,    // one-cycle request from the host
  input  attack_mode_e mode,     // mode for the requested run
  output logic         busy,     // attack in progress
  output logic         done,     // one-cycle pulse at the end of a run
  output logic         en1,      // RO bank 1 enable
  output logic         en2       // RO bank 2 enable
);
  localparam int unsigned LW = $clog2(ATTACK_CYCLES + 1);
  localparam int unsigned PW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  attack_mode_e  mode_q;
  logic [LW-1:0] remaining;
  logic [PW-1:0] phase;
  logic          on_phase;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      mode_q    <= MODE_PERIODIC;
      remaining <= '0;
      phase     <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          mode_q    <= mode;
          remaining <= LW'(ATTACK_CYCLES);
          phase     <= '0;
          busy      <= 1'b1;
        end
      end else begin
        remaining <= remaining - 1'b1;
        phase     <= (phase == PW'(PERIOD - 1)) ? '0 : phase + 1'b1;
        if (remaining == LW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign on_phase = (phase < PW'(ON_CYCLES));

  always_comb begin
    en1 = 1'b0;
    en2 = 1'b0;
    if (busy) begin
      unique case (mode_q)
        MODE_PERIODIC: begin en1 = on_phase; en2 = on_phase; end
        MODE_HALF:     begin en1 = 1'b1;     en2 = 1'b0;     end
        MODE_ALL:      begin en1 = 1'b1;     en2 = 1'b1;     end
        default:       begin en1 = 1'b0;     en2 = 1'b0;     end
      endcase
    end
  end

  // The remaining-cycle counter never runs out while an attack is on.
  a_bounded: assert property (@(posedge clk) disable iff (rst)
    busy |-> (remaining != '0) && (remaining <= LW'(ATTACK_CYCLES)));
endmodule
