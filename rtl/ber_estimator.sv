// ber_estimator: receive-side bit error rate estimator of a radio hub.
//
// The receiver compares each received training bit with a locally
// regenerated PRBS-9 sequence (same seed and polynomial as training_tx) and
// counts mismatches. After BURST_BITS received bits it reports the error
// count and a verdict: pass when the count is at most MAX_ERR, i.e. the link
// meets the required maximum error rate at the probed power level.
//
// Interface / timing: rx_en marks a valid received bit; the first valid bit
// after a verdict (or reset) is matched against the seed state. Bits need
// not be contiguous. verdict_valid pulses for one cycle in the cycle after
// the last bit of the burst, with err_count and pass held until the next
// verdict. The estimate being an error count over a training burst is this
// design's choice; the document only says the BER is estimated at the
// receiver.
module ber_estimator
  import winoc_pkg::*;
#(
  parameter int unsigned BURST_BITS = BURST_BITS_DEF,
  parameter int unsigned MAX_ERR    = MAX_ERR_DEF
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              rx_en,
  input  logic                              rx_bit,
  output logic                              verdict_valid,
  output logic [$clog2(BURST_BITS+1)-1:0]   err_count,
  output logic                              pass
);
  localparam int unsigned CW = $clog2(BURST_BITS + 1);

  logic [8:0]    lfsr;
  logic [CW-1:0] nbits;
  logic [CW-1:0] nerr;
  logic          mism;

  assign mism = rx_bit ^ lfsr[8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr          <= PRBS_SEED;
      nbits         <= '0;
      nerr          <= '0;
      verdict_valid <= 1'b0;
      err_count     <= '0;
      pass          <= 1'b0;
    end else begin
      verdict_valid <= 1'b0;
      if (rx_en) begin
        if (nbits == CW'(BURST_BITS - 1)) begin
          // last bit of the burst: publish and rearm
          verdict_valid <= 1'b1;
          err_count     <= nerr + CW'(mism);
          pass          <= (32'(nerr) + 32'(mism)) <= MAX_ERR;
          nbits         <= '0;
          nerr          <= '0;
          lfsr          <= PRBS_SEED;
        end else begin
          nbits <= nbits + 1'b1;
          nerr  <= nerr + CW'(mism);
          lfsr  <= prbs9_next(lfsr);
        end
      end
    end
  end
endmodule
