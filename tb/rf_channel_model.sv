// rf_channel_model: behavioural model (not synthesizable logic) of the radio
// front ends and the on-chip wireless channel, for simulation only.
//
// Each ordered hub pair (s,d) has a required power level req[s][d] (an
// attenuation map: the testbench fills it, typically growing with the
// distance between the hubs). A training bit sent by hub s to hub d at a
// level below req[s][d] is flipped with probability 1/4; at or above it the
// bit arrives intact. A pair can be muted (mute[s][d] = 1): its bits never
// reach the receiver. The received stream appears one cycle after it was
// sent. Only training bits are carried; data flits are counted by the
// testbench directly from the transmit strobes.
module rf_channel_model #(
  parameter int unsigned N_HUBS = 16,
  parameter int unsigned LEVELS = 16
) (
  input  logic                                  clk,
  input  logic [N_HUBS-1:0]                     tx_en,
  input  logic [N_HUBS-1:0]                     tx_bit,
  input  logic [N_HUBS-1:0][$clog2(N_HUBS)-1:0] tx_dst,
  input  logic [N_HUBS-1:0][$clog2(LEVELS)-1:0] tx_level,
  output logic [N_HUBS-1:0]                     rx_en,
  output logic [N_HUBS-1:0]                     rx_bit
);
  int unsigned req  [N_HUBS][N_HUBS];
  bit          mute [N_HUBS][N_HUBS];
  int unsigned n_flipped = 0;
  int unsigned n_bits    = 0;

  initial begin
    rx_en  = '0;
    rx_bit = '0;
    for (int s = 0; s < N_HUBS; s++)
      for (int d = 0; d < N_HUBS; d++) begin
        req[s][d]  = 0;
        mute[s][d] = 0;
      end
  end

  always @(posedge clk) begin
    logic [N_HUBS-1:0] en_n, bit_n;
    en_n  = '0;
    bit_n = '0;
    for (int s = 0; s < N_HUBS; s++) begin
      if (tx_en[s] && !mute[s][tx_dst[s]]) begin
        bit flip;
        flip = (int'(tx_level[s]) < req[s][tx_dst[s]]) && ($urandom_range(0, 3) == 0);
        en_n[tx_dst[s]]  = 1'b1;
        bit_n[tx_dst[s]] = tx_bit[s] ^ flip;
        n_bits++;
        if (flip) n_flipped++;
      end
    end
    rx_en  <= en_n;
    rx_bit <= bit_n;
  end
endmodule
