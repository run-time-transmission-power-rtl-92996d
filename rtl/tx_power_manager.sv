// tx_power_manager: run-time transmit power manager for all radio hubs.
//
// A table holds one transmit power level code for every ordered
// (source hub, destination hub) pair; each hub's transmitter reads the entry
// for its current destination (rd_dst -> rd_level, combinational). After
// reset every entry is the maximum level, the fixed worst-case setting of a
// WiNoC without power control. With pc_en low the manager starts no pass and
// every lookup returns the maximum level (the fixed-power baseline); a pass
// already running finishes. pc_en may change at any time.
//
// Every reconfiguration period (RP_CYCLES idle cycles, or at once on
// cal_req) the manager enters its reconfiguration state and walks over all
// ordered pairs (s,d), s != d, in order s-major. For each pair it runs a
// closed loop with the receiver's BER verdict:
//   1. probe at the current level L: fail -> L+1 (saturating), pair done;
//                                     pass and L = 0 -> pair done;
//   2. probe at L-1:                  pass -> L-1; fail -> keep L.
// So each period a link may step down by one level if the lower level still
// meets the error requirement, and steps up by one if the current level no
// longer does. A probe is a request (probe_valid until probe_ready) to hub s
// to send a training burst to hub d at probe_level; the verdict comes back
// on vd_valid/vd_pass. If no verdict arrives within TIMEOUT cycles of the
// handshake the probe counts as failed.
//
// The closed-loop idea (BER estimated at the receiver steers the transmit
// power of each pair) follows the document; the two-probe step rule, the
// pair order, the timeout and all sizes are this design's choices.
module tx_power_manager
  import winoc_pkg::*;
#(
  parameter int unsigned N_HUBS    = N_HUBS_DEF,
  parameter int unsigned LEVELS    = LEVELS_DEF,
  parameter int unsigned RP_CYCLES = RP_CYCLES_DEF,
  parameter int unsigned TIMEOUT   = TIMEOUT_DEF
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic                                        pc_en,
  input  logic                                        cal_req,
  // probe request to the source hub
  output logic                                        probe_valid,
  input  logic                                        probe_ready,
  output logic [$clog2(N_HUBS)-1:0]                   probe_src,
  output logic [$clog2(N_HUBS)-1:0]                   probe_dst,
  output logic [$clog2(LEVELS)-1:0]                   probe_level,
  // verdict from the destination hub's BER estimator
  input  logic                                        vd_valid,
  input  logic                                        vd_pass,
  // per-hub level lookup
  input  logic [N_HUBS-1:0][$clog2(N_HUBS)-1:0]       rd_dst,
  output logic [N_HUBS-1:0][$clog2(LEVELS)-1:0]       rd_level,
  // status
  output logic                                        reconfig,
  output logic [31:0]                                 n_up,
  output logic [31:0]                                 n_down,
  output logic [31:0]                                 n_timeout,
  output logic [31:0]                                 n_passes
);
  localparam int unsigned HW   = $clog2(N_HUBS);
  localparam int unsigned LW   = $clog2(LEVELS);
  localparam logic [LW-1:0] LMAX = LW'(LEVELS - 1);

  typedef enum logic [1:0] {S_IDLE, S_PROBE, S_WAIT} state_e;

  state_e        state;
  logic          phase;          // 0: probe at L, 1: probe at L-1
  logic [HW-1:0] s_q, d_q;
  logic [31:0]   rp_cnt;
  logic [31:0]   to_cnt;
  logic [LW-1:0] lvl [N_HUBS*N_HUBS];
  logic [LW-1:0] cur;
  logic          got, ok;
  logic          last_pair;
  logic [HW-1:0] s_nx, d_nx;

  assign cur = lvl[int'(s_q) * N_HUBS + int'(d_q)];

  always_comb begin
    for (int h = 0; h < N_HUBS; h++)
      rd_level[h] = pc_en ? lvl[h * N_HUBS + int'(rd_dst[h])] : LMAX;
  end

  assign probe_valid = (state == S_PROBE);
  assign probe_src   = s_q;
  assign probe_dst   = d_q;
  assign probe_level = phase ? cur - 1'b1 : cur;
  assign reconfig    = (state != S_IDLE);

  // verdict or timeout while waiting
  assign got = (state == S_WAIT) && (vd_valid || to_cnt == TIMEOUT - 1);
  assign ok  = vd_valid && vd_pass;

  // next ordered pair with s != d
  always_comb begin
    s_nx = s_q;
    d_nx = d_q + 1'b1;
    if (int'(d_q) == N_HUBS - 1) begin
      d_nx = '0;
      s_nx = s_q + 1'b1;
    end
    if (d_nx == s_nx) begin
      if (int'(d_nx) == N_HUBS - 1) begin
        d_nx = '0;
        s_nx = s_nx + 1'b1;
      end else begin
        d_nx = d_nx + 1'b1;
      end
    end
  end
  assign last_pair = (int'(s_q) == N_HUBS - 1) && (int'(d_q) == N_HUBS - 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      phase     <= 1'b0;
      s_q       <= '0;
      d_q       <= HW'(1);
      rp_cnt    <= '0;
      to_cnt    <= '0;
      n_up      <= '0;
      n_down    <= '0;
      n_timeout <= '0;
      n_passes  <= '0;
      for (int i = 0; i < N_HUBS * N_HUBS; i++) lvl[i] <= LMAX;
    end else begin
      unique case (state)
        S_IDLE: begin
          rp_cnt <= pc_en ? rp_cnt + 1 : '0;
          if (pc_en && (cal_req || rp_cnt >= RP_CYCLES - 1)) begin
            rp_cnt <= '0;
            s_q    <= '0;
            d_q    <= HW'(1);
            phase  <= 1'b0;
            state  <= S_PROBE;
          end
        end
        S_PROBE: begin
          to_cnt <= '0;
          if (probe_ready) state <= S_WAIT;
        end
        S_WAIT: begin
          to_cnt <= to_cnt + 1;
          if (got) begin
            logic pair_done;
            pair_done = 1'b1;
            if (!vd_valid) n_timeout <= n_timeout + 1;
            if (!phase) begin
              if (!ok) begin
                if (cur != LMAX) begin
                  lvl[int'(s_q) * N_HUBS + int'(d_q)] <= cur + 1'b1;
                  n_up <= n_up + 1;
                end
              end else if (cur != '0) begin
                pair_done = 1'b0;
                phase    <= 1'b1;
                state    <= S_PROBE;
              end
            end else if (ok) begin
              lvl[int'(s_q) * N_HUBS + int'(d_q)] <= cur - 1'b1;
              n_down <= n_down + 1;
            end
            if (pair_done) begin
              phase <= 1'b0;
              if (last_pair) begin
                state    <= S_IDLE;
                n_passes <= n_passes + 1;
              end else begin
                s_q   <= s_nx;
                d_q   <= d_nx;
                state <= S_PROBE;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A probe request stays up, with stable fields, until it is taken.
  property p_probe_hold;
    @(posedge clk) disable iff (!rst_n)
      probe_valid && !probe_ready |=> probe_valid && $stable(probe_src) && $stable(probe_dst);
  endproperty
  assert property (p_probe_hold);
endmodule
