// winoc_radio_ctrl: joint run-time transmit power control and energy-aware
// packet relocation for the radio hubs of a 64-core wireless NoC.
//
// N_HUBS radio hubs (default 16 on a 4x4 grid, 4 cores each) share one
// central tx_power_manager. The manager keeps a power level for every
// (source, destination) hub pair and re-calibrates them every
// reconfiguration period from BER verdicts returned by the receiving hubs.
// Each hub (radio_hub) transmits its cluster's wireless packets at the
// calibrated level of their pair and, while its energy in the current window
// is over threshold, relocates packets to an adjacent hub's transmitter.
//
// Outside this module: the wired mesh that delivers packet descriptors
// (pkt_*) and carries relocated packets between adjacent hubs is modelled
// here only by the direct hub-to-hub handshakes; the RF front ends and the
// wireless channel are outside and connect through the rf_* ports: per hub a
// data flit strobe with its destination and power level, a training bit
// stream, and the received training bit stream.
//
// pc_en and reloc_en switch the two mechanisms on and off independently,
// giving the four configurations: fixed maximum power (both off), power
// control only, relocation only, and the joint scheme (both on, the main
// configuration).
//
// Timing: see the submodules. A probe's verdict reaches the manager in the
// cycle after the destination's estimator has seen the last training bit
// (plus whatever latency the external channel adds).
// The power control and relocation ideas follow the document; the hub count,
// grid, sizes and every protocol detail are this design's choices.
module winoc_radio_ctrl
  import winoc_pkg::*;
#(
  parameter int unsigned N_HUBS     = N_HUBS_DEF,
  parameter int unsigned GRID_X     = GRID_X_DEF,
  parameter int unsigned LEVELS     = LEVELS_DEF,
  parameter int unsigned BURST_BITS = BURST_BITS_DEF,
  parameter int unsigned MAX_ERR    = MAX_ERR_DEF,
  parameter int unsigned RP_CYCLES  = RP_CYCLES_DEF,
  parameter int unsigned TIMEOUT    = TIMEOUT_DEF,
  parameter int unsigned E_W        = E_W_DEF,
  parameter int unsigned THRESH     = THRESH_DEF,
  parameter int unsigned WINDOW     = WINDOW_DEF
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  pc_en,     // run-time power control on
  input  logic                                  reloc_en,  // packet relocation on
  input  logic                                  cal_req,
  // wireless packets from the clusters
  input  logic [N_HUBS-1:0]                     pkt_valid,
  output logic [N_HUBS-1:0]                     pkt_ready,
  input  logic [N_HUBS-1:0][$clog2(N_HUBS)-1:0] pkt_dst,
  input  logic [N_HUBS-1:0][FLITS_W-1:0]        pkt_flits,
  // radio front ends
  output logic [N_HUBS-1:0]                     rf_data,
  output logic [N_HUBS-1:0]                     rf_train_en,
  output logic [N_HUBS-1:0]                     rf_train_bit,
  output logic [N_HUBS-1:0][$clog2(N_HUBS)-1:0] rf_dst,
  output logic [N_HUBS-1:0][$clog2(LEVELS)-1:0] rf_level,
  input  logic [N_HUBS-1:0]                     rf_rx_en,
  input  logic [N_HUBS-1:0]                     rf_rx_bit,
  // status
  output logic [N_HUBS-1:0][E_W-1:0]            energy,
  output logic [N_HUBS-1:0]                     over,
  output logic [N_HUBS-1:0][31:0]               n_reloc,
  output logic [N_HUBS-1:0][$clog2(BURST_BITS+1)-1:0] vd_errs,  // each receiver's last burst error count
  output logic                                  reconfig,
  output logic [31:0]                           n_up,
  output logic [31:0]                           n_down,
  output logic [31:0]                           n_timeout,
  output logic [31:0]                           n_passes
);
  localparam int unsigned HW     = $clog2(N_HUBS);
  localparam int unsigned LW     = $clog2(LEVELS);
  localparam int unsigned GRID_Y = N_HUBS / GRID_X;

  // power manager side
  logic          p_valid, p_ready;
  logic [HW-1:0] p_src, p_dst;
  logic [LW-1:0] p_level;
  logic [N_HUBS-1:0][HW-1:0] rd_dst;
  logic [N_HUBS-1:0][LW-1:0] rd_level;

  // hub side
  logic [N_HUBS-1:0]       h_probe_valid, h_probe_ready, h_vd_valid, h_vd_pass;
  logic [N_HUBS-1:0][3:0]  o_valid, o_ready, i_valid, i_ready;
  logic [N_HUBS-1:0][HW-1:0]      o_dst;
  logic [N_HUBS-1:0][FLITS_W-1:0] o_flits;
  logic [N_HUBS-1:0][3:0][HW-1:0]      i_dst;
  logic [N_HUBS-1:0][3:0][FLITS_W-1:0] i_flits;

  tx_power_manager #(.N_HUBS(N_HUBS), .LEVELS(LEVELS), .RP_CYCLES(RP_CYCLES), .TIMEOUT(TIMEOUT)) u_pm (
    .clk, .rst_n, .pc_en, .cal_req,
    .probe_valid(p_valid), .probe_ready(p_ready), .probe_src(p_src), .probe_dst(p_dst),
    .probe_level(p_level),
    .vd_valid(h_vd_valid[p_dst]), .vd_pass(h_vd_pass[p_dst]),
    .rd_dst, .rd_level,
    .reconfig, .n_up, .n_down, .n_timeout, .n_passes
  );

  assign p_ready = h_probe_ready[p_src];
  always_comb begin
    h_probe_valid = '0;
    h_probe_valid[p_src] = p_valid;
  end

  for (genvar h = 0; h < N_HUBS; h++) begin : g_hub
    localparam int unsigned X = h % GRID_X;
    localparam int unsigned Y = h / GRID_X;
    localparam int unsigned NB [4] = '{h - GRID_X, h + 1, h + GRID_X, h - 1};
    localparam bit          OK [4] = '{Y > 0, X + 1 < GRID_X, Y + 1 < GRID_Y, X > 0};

    // neighbour in direction k sends towards the opposite direction (k+2)%4
    for (genvar k = 0; k < 4; k++) begin : g_dir
      if (OK[k]) begin : g_link
        assign i_valid[h][k] = o_valid[NB[k]][(k + 2) % 4];
        assign i_dst[h][k]   = o_dst[NB[k]];
        assign i_flits[h][k] = o_flits[NB[k]];
        assign o_ready[h][k] = i_ready[NB[k]][(k + 2) % 4];
      end else begin : g_edge
        assign i_valid[h][k] = 1'b0;
        assign i_dst[h][k]   = '0;
        assign i_flits[h][k] = '0;
        assign o_ready[h][k] = 1'b0;
      end
    end

    radio_hub #(
      .N_HUBS(N_HUBS), .GRID_X(GRID_X), .HUB_ID(h), .LEVELS(LEVELS),
      .BURST_BITS(BURST_BITS), .MAX_ERR(MAX_ERR), .E_W(E_W), .THRESH(THRESH), .WINDOW(WINDOW)
    ) u_hub (
      .clk, .rst_n, .reloc_en,
      .pkt_valid(pkt_valid[h]), .pkt_ready(pkt_ready[h]), .pkt_dst(pkt_dst[h]),
      .pkt_flits(pkt_flits[h]),
      .nb_out_valid(o_valid[h]), .nb_out_ready(o_ready[h]), .nb_out_dst(o_dst[h]),
      .nb_out_flits(o_flits[h]),
      .nb_in_valid(i_valid[h]), .nb_in_ready(i_ready[h]), .nb_in_dst(i_dst[h]),
      .nb_in_flits(i_flits[h]),
      .energy_all(energy), .over_all(over), .energy(energy[h]), .over(over[h]),
      .n_reloc(n_reloc[h]),
      .probe_valid(h_probe_valid[h]), .probe_ready(h_probe_ready[h]), .probe_dst(p_dst),
      .probe_level(p_level), .rd_dst(rd_dst[h]), .rd_level(rd_level[h]),
      .vd_valid(h_vd_valid[h]), .vd_pass(h_vd_pass[h]), .vd_errs(vd_errs[h]),
      .rf_data(rf_data[h]), .rf_train_en(rf_train_en[h]), .rf_train_bit(rf_train_bit[h]),
      .rf_dst(rf_dst[h]), .rf_level(rf_level[h]), .rf_rx_en(rf_rx_en[h]), .rf_rx_bit(rf_rx_bit[h])
    );
  end
endmodule
