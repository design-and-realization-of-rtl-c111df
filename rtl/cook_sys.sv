// cook_sys: COOK (chaotic on-off keying) digital link around one hyperchaotic
// generator.
//
// The generator (hc_master, initial state 0.1,0,0,0) runs one Euler step per
// enabled clock; its u state is the chaotic carrier.  A bit timer splits the
// samples into bits of SAMPLES_PER_BIT samples.  tx_bit is taken on an
// enabled clock while bit_req is high: once right after reset, then on the
// last sample of every bit.  The modulator sends the carrier for a 1 and
// zero for a 0 on s_out.  The channel is outside: r_in must carry the
// channel output of s_out in the same cycle (a zero-latency channel model).
// The demodulator integrates r_in^2 over each bit and, one clock after the
// bit's last sample, gives rx_bit with a one-cycle rx_valid pulse.  Bit
// latency from the start of a bit on s_out to rx_valid is therefore
// SAMPLES_PER_BIT clocks.
//
// SAMPLES_PER_BIT = 10 follows from the published design's bit duration Tb = 0.01
// with its Euler step T = 1e-3; the bit timer itself and the handshake are
// this design's choices.
module cook_sys
  import hc_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_BIT = 10
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      en,
  input  logic      tx_bit,
  output logic      bit_req,
  output fix_t      s_out,
  input  fix_t      r_in,
  input  fix_t      threshold,
  output logic      rx_bit,
  output logic      rx_valid,
  output fix_t      energy,
  output hc_state_t chaos_state
);

  localparam int CW = (SAMPLES_PER_BIT > 1) ? $clog2(SAMPLES_PER_BIT) : 1;

  logic          started;
  logic [CW-1:0] cnt;
  logic          cur_bit;
  logic          last_sample;

  hc_master u_gen (
    .clk   (clk),
    .rst   (rst),
    .en    (en),
    .state (chaos_state)
  );

  always_comb begin
    last_sample = started && (cnt == CW'(SAMPLES_PER_BIT - 1));
    bit_req     = !started || last_sample;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      started <= 1'b0;
      cnt     <= '0;
      cur_bit <= 1'b0;
    end else if (en) begin
      if (bit_req) begin
        cur_bit <= tx_bit;
        cnt     <= '0;
        started <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  fix_t s_mod;

  cook_mod u_mod (
    .chaos (chaos_state.u),
    .bit_i (cur_bit),
    .s     (s_mod)
  );

  always_comb s_out = started ? s_mod : '0;

  cook_demod u_demod (
    .clk       (clk),
    .rst       (rst),
    .en        (en && started),
    .r         (r_in),
    .sym_end   (last_sample),
    .threshold (threshold),
    .bit_o     (rx_bit),
    .bit_valid (rx_valid),
    .energy    (energy)
  );

endmodule
