// training_tx: transmit-side training burst generator of a radio hub.
//
// When the power manager probes a link, the source hub sends a known
// pseudo-random burst at the probed power level; the destination hub
// regenerates the same sequence and counts bit errors (ber_estimator).
// The sequence is PRBS-9 (x^9 + x^5 + 1) started from winoc_pkg::PRBS_SEED.
//
// Interface / timing: a one-cycle `start` while idle begins a burst. The
// next BURST_BITS cycles drive tx_en = 1 with one bit each; `busy` is high
// from the cycle after `start` until the last bit, and `done` pulses in the
// cycle after the last bit. `start` while busy is ignored.
// That the receiver's BER estimate comes from a training burst, its length
// and its polynomial are this design's choices.
module training_tx
  import winoc_pkg::*;
#(
  parameter int unsigned BURST_BITS = BURST_BITS_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic tx_en,
  output logic tx_bit,
  output logic done
);
  localparam int unsigned CW = $clog2(BURST_BITS + 1);

  logic [8:0]    lfsr;
  logic [CW-1:0] left;

  assign busy   = (left != '0);
  assign tx_en  = busy;
  assign tx_bit = lfsr[8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= PRBS_SEED;
      left <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        lfsr <= PRBS_SEED;
        left <= CW'(BURST_BITS);
      end else if (busy) begin
        lfsr <= prbs9_next(lfsr);
        left <= left - 1'b1;
        if (left == CW'(1)) done <= 1'b1;
      end
    end
  end
endmodule
