// grain_ctrl: phase and round controller of the Grain-128AEADv2 cores.
//
// After `start` (the FSRs are loaded in the same clock) it runs NPRIME pipeline-fill clocks in
// which the FSRs hold and only the pre-computation registers load (the document's clock t = -1
// of the unmasked core; t = -2 and t = -1 of the masked one). It then advances the FSRs P rounds
// per clock: 320/P clocks of initialisation with y fed back, 64/P clocks with y and the key fed
// back, 64/P clocks loading the accumulator and 64/P clocks loading the register. In the data
// phase it advances once per accepted input chunk (in_valid and in_ready) and stops in PH_DONE
// after the chunk flagged in_last. At P = 1 a message bit needs two rounds (z, then z'), so the
// data phase alternates: a clock that advances without taking a chunk (the core keeps z), then
// a clock that takes the chunk with z'; this gives the document's rate of one message bit every
// two clocks for x1. Nothing moves in a clock where rnd_ok is low (the masked core
// has no fresh randomness); the unmasked core ties it high.
//
// Outputs: `stage` is high in every clock the pipeline registers load, `adv` when the FSRs shift,
// `fill` counts the prime clocks already done (it selects the offset of stage 1: fill*P) and
// `cnt` is the clock index inside the current phase. Counting in clocks and the phase encoding
// are this design's choices; the round boundaries are the document's.
module grain_ctrl #(
  parameter int P      = 32,
  parameter int NPRIME = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              rnd_ok,
  input  logic              in_valid,
  input  logic              in_last,
  output logic              in_ready,
  output grain_pkg::phase_e phase,
  output logic              stage,
  output logic              adv,
  output logic [1:0]        fill,
  output logic [8:0]        cnt
);
  import grain_pkg::*;

  localparam int C_INIT = 320 / P;
  localparam int C_64   = 64 / P;

  logic last_clk;
  logic half;  // P = 1 only: the z round of the current message bit is done

  always_comb begin
    in_ready = (phase == PH_DATA) && rnd_ok && (P > 1 || half);
    unique case (phase)
      PH_PRIME:                    adv = 1'b0;
      PH_INIT, PH_KEY, PH_ACC, PH_REG: adv = rnd_ok;
      PH_DATA:                     adv = rnd_ok && ((P == 1 && !half) || in_valid);
      default:                     adv = 1'b0;
    endcase
    stage = adv || (phase == PH_PRIME && rnd_ok);
    unique case (phase)
      PH_PRIME: last_clk = (32'(fill) == NPRIME - 1);
      PH_INIT:  last_clk = (32'(cnt) == C_INIT - 1);
      PH_KEY, PH_ACC, PH_REG: last_clk = (32'(cnt) == C_64 - 1);
      default:  last_clk = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      fill  <= '0;
      cnt   <= '0;
      half  <= 1'b0;
    end else if (start) begin
      phase <= PH_PRIME;
      fill  <= '0;
      cnt   <= '0;
      half  <= 1'b0;
    end else if (stage) begin
      if (phase == PH_PRIME) fill <= fill + 2'd1;
      if (phase == PH_DATA && P == 1) half <= !half;
      cnt <= last_clk ? '0 : cnt + 9'd1;
      unique case (phase)
        PH_PRIME: if (last_clk) phase <= PH_INIT;
        PH_INIT:  if (last_clk) phase <= PH_KEY;
        PH_KEY:   if (last_clk) phase <= PH_ACC;
        PH_ACC:   if (last_clk) phase <= PH_REG;
        PH_REG:   if (last_clk) phase <= PH_DATA;
        PH_DATA:  if (in_valid && in_ready && in_last) phase <= PH_DONE;
        default: ;
      endcase
    end
  end

  initial assert (P >= 1 && 64 % P == 0 && NPRIME >= 1 && NPRIME <= 2)
    else $fatal(1, "grain_ctrl: P must divide 64, NPRIME must be 1 or 2");
endmodule
