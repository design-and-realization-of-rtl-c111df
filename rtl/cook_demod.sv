// cook_demod: non-coherent COOK demodulator (bit energy estimator).
//
// Each received sample r is squared, scaled by the integration constant
// KSCALE (0.0009768, about 2^-10) and accumulated over one bit period.  On
// the last sample of a bit (sym_end with en) the accumulated energy,
// including that sample, is compared with the run-time threshold, and the
// accumulator restarts for the next bit.  One clock later bit_o holds the
// decision (energy > threshold means 1) and bit_valid pulses for one cycle;
// energy holds the estimate behind the decision.  Squarer, scaling
// multiplier, accumulator, one-cycle delay and threshold comparison follow
// the published design's demodulator; the strict "greater than" test, the
// integrate-and-dump restart and the threshold as an input port are this
// design's choices (the published design notes the threshold must follow the noise).
module cook_demod
  import hc_pkg::*;
#(
  parameter real KSCALE = 0.0009768
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  fix_t r,
  input  logic sym_end,
  input  fix_t threshold,
  output logic bit_o,
  output logic bit_valid,
  output fix_t energy
);

  localparam fix_t K_SCALE = to_fix(KSCALE);

  fix_t acc_q, acc_d;

  always_comb acc_d = acc_q + fmul(fmul(r, r), K_SCALE);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q     <= '0;
      bit_o     <= 1'b0;
      bit_valid <= 1'b0;
      energy    <= '0;
    end else begin
      bit_valid <= 1'b0;
      if (en) begin
        if (sym_end) begin
          acc_q     <= '0;
          energy    <= acc_d;
          bit_o     <= acc_d > threshold;
          bit_valid <= 1'b1;
        end else begin
          acc_q <= acc_d;
        end
      end
    end
  end

  // A decision is only ever produced by a bit end in the previous cycle.
  a_valid_after_end: assert property (@(posedge clk) disable iff (rst)
    bit_valid |-> $past(en && sym_end));

endmodule
