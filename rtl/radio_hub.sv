// radio_hub: control logic of one radio hub of the wireless NoC.
//
// A radio hub serves one cluster of cores (4 of the 64) and owns one radio
// transmitter and receiver. This module groups its per-hub pieces:
//   - packet_relocator: keeps the cluster's outgoing wireless packets on this
//     hub's transmitter, or hands them to an adjacent hub's transmitter while
//     this hub is over its energy threshold (nb_out_* ports, one per
//     direction N, E, S, W);
//   - radio_tx: arbitrates between the local packets and the ones relocated
//     here by adjacent hubs (nb_in_*), sends them at the calibrated power
//     level, and sends training bursts for the power manager;
//   - energy_monitor: meters the energy this hub's transmitter spends;
//   - ber_estimator: checks training bursts arriving at this hub's receiver
//     and returns the verdict to the power manager.
// Interface / timing: all handshakes are valid/ready; a relocated packet
// crosses to the neighbour in the cycle its nb_out_valid/nb_out_ready meet.
// energy_all/over_all carry every hub's energy state (only the neighbours'
// entries are used). The grouping is this design's choice.
module radio_hub
  import winoc_pkg::*;
#(
  parameter int unsigned N_HUBS     = N_HUBS_DEF,
  parameter int unsigned GRID_X     = GRID_X_DEF,
  parameter int unsigned HUB_ID     = 0,
  parameter int unsigned LEVELS     = LEVELS_DEF,
  parameter int unsigned BURST_BITS = BURST_BITS_DEF,
  parameter int unsigned MAX_ERR    = MAX_ERR_DEF,
  parameter int unsigned E_W        = E_W_DEF,
  parameter int unsigned THRESH     = THRESH_DEF,
  parameter int unsigned WINDOW     = WINDOW_DEF
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               reloc_en,
  // packets from the cluster
  input  logic                               pkt_valid,
  output logic                               pkt_ready,
  input  logic [$clog2(N_HUBS)-1:0]          pkt_dst,
  input  logic [FLITS_W-1:0]                 pkt_flits,
  // relocated packets to the neighbours, index 0..3 = N, E, S, W
  output logic [3:0]                         nb_out_valid,
  input  logic [3:0]                         nb_out_ready,
  output logic [$clog2(N_HUBS)-1:0]          nb_out_dst,
  output logic [FLITS_W-1:0]                 nb_out_flits,
  // relocated packets from the neighbours, index 0..3 = from N, E, S, W
  input  logic [3:0]                         nb_in_valid,
  output logic [3:0]                         nb_in_ready,
  input  logic [3:0][$clog2(N_HUBS)-1:0]     nb_in_dst,
  input  logic [3:0][FLITS_W-1:0]            nb_in_flits,
  // energy state of all hubs
  input  logic [N_HUBS-1:0][E_W-1:0]         energy_all,
  input  logic [N_HUBS-1:0]                  over_all,
  output logic [E_W-1:0]                     energy,
  output logic                               over,
  output logic [31:0]                        n_reloc,
  // power manager
  input  logic                               probe_valid,
  output logic                               probe_ready,
  input  logic [$clog2(N_HUBS)-1:0]          probe_dst,
  input  logic [$clog2(LEVELS)-1:0]          probe_level,
  output logic [$clog2(N_HUBS)-1:0]          rd_dst,
  input  logic [$clog2(LEVELS)-1:0]          rd_level,
  output logic                               vd_valid,
  output logic                               vd_pass,
  output logic [$clog2(BURST_BITS+1)-1:0]    vd_errs,
  // radio front end
  output logic                               rf_data,
  output logic                               rf_train_en,
  output logic                               rf_train_bit,
  output logic [$clog2(N_HUBS)-1:0]          rf_dst,
  output logic [$clog2(LEVELS)-1:0]          rf_level,
  input  logic                               rf_rx_en,
  input  logic                               rf_rx_bit
);
  localparam int unsigned HW = $clog2(N_HUBS);

  logic          rl_valid, rl_ready, rl_reloc;
  dir_e          rl_dir;
  logic [HW-1:0] rl_dst;
  logic [FLITS_W-1:0] rl_flits;
  logic [4:0]    s_valid, s_ready;
  logic [4:0][HW-1:0] s_dst;
  logic [4:0][FLITS_W-1:0] s_flits;

  packet_relocator #(.N_HUBS(N_HUBS), .GRID_X(GRID_X), .HUB_ID(HUB_ID), .E_W(E_W)) u_reloc (
    .clk, .rst_n, .reloc_en,
    .in_valid(pkt_valid), .in_ready(pkt_ready), .in_dst(pkt_dst), .in_flits(pkt_flits),
    .energy(energy_all), .over(over_all),
    .out_valid(rl_valid), .out_ready(rl_ready), .out_dir(rl_dir),
    .out_dst(rl_dst), .out_flits(rl_flits), .out_reloc(rl_reloc), .n_reloc
  );

  // steer the relocator's output: local transmitter or one neighbour
  always_comb begin
    for (int k = 0; k < 4; k++)
      nb_out_valid[k] = rl_valid && rl_reloc && (rl_dir == dir_e'(k + 1));
    s_valid[0] = rl_valid && !rl_reloc;
    rl_ready   = rl_reloc ? nb_out_ready[int'(rl_dir) - 1] : s_ready[0];
  end
  assign nb_out_dst   = rl_dst;
  assign nb_out_flits = rl_flits;

  assign s_valid[4:1] = nb_in_valid;
  assign nb_in_ready  = s_ready[4:1];
  assign s_dst        = {nb_in_dst, rl_dst};
  assign s_flits      = {nb_in_flits, rl_flits};

  radio_tx #(.N_HUBS(N_HUBS), .LEVELS(LEVELS), .BURST_BITS(BURST_BITS)) u_tx (
    .clk, .rst_n,
    .src_valid(s_valid), .src_ready(s_ready), .src_dst(s_dst), .src_flits(s_flits),
    .probe_valid, .probe_ready, .probe_dst, .probe_level,
    .rd_dst, .rd_level,
    .rf_data, .rf_train_en, .rf_train_bit, .rf_dst, .rf_level
  );

  energy_monitor #(.LEVELS(LEVELS), .E_W(E_W), .THRESH(THRESH), .WINDOW(WINDOW)) u_emon (
    .clk, .rst_n, .flit_tx(rf_data), .flit_level(rf_level), .energy, .over
  );

  ber_estimator #(.BURST_BITS(BURST_BITS), .MAX_ERR(MAX_ERR)) u_ber (
    .clk, .rst_n, .rx_en(rf_rx_en), .rx_bit(rf_rx_bit),
    .verdict_valid(vd_valid), .err_count(vd_errs), .pass(vd_pass)
  );
endmodule
