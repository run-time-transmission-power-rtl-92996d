// tb_winoc_radio_ctrl: end-to-end test of the joint power control and packet
// relocation logic, at the design's default sizes (16 hubs on a 4x4 grid,
// 16 power levels, 256-bit training bursts, 200000-cycle reconfiguration
// period, 10000-cycle energy window, threshold 20000).
//
// The radio side is rf_channel_model with a distance-based attenuation map:
// req[s][d] = min(15, 2 * manhattan(s,d) + (s+d) % 3). Traffic: every hub
// sends random packets (1..8 flits) at a light rate to random other hubs;
// hub 5 sends back-to-back, so its energy crosses the threshold and its
// packets are relocated to adjacent hubs.
//
// Checked:
//   - after k calibration passes every link runs at max(15 - k, req): once
//     converged (15 passes) every data flit leaves at exactly the required
//     level of its (transmitting hub, destination) pair;
//   - flits are conserved per destination (injected = transmitted), and no
//     hub transmits more than its own and its neighbours' traffic;
//   - raising one pair's requirement raises its level one step per pass;
//   - a muted pair times out and is driven back up to maximum power;
//   - passes are started by the reconfiguration period timer, not only by
//     cal_req;
//   - with reloc_en low nothing is relocated, with pc_en low every flit
//     leaves at maximum power.
// Each of these mechanisms is counted and must occur: power-down, power-up,
// probe timeout, relocation, threshold crossing, timer-started pass, bit
// errors seen by a receiver, both mode switches.
module tb_winoc_radio_ctrl;
  import winoc_pkg::*;
  localparam int N = 16, GX = 4, L = 16;
  localparam int HW = 4, LW = 4, EW = 24;

  logic clk = 0, rst_n = 0, cal_req = 0, pc_en = 1, reloc_en = 1;
  logic [N-1:0] pkt_valid = '0, pkt_ready;
  logic [N-1:0][HW-1:0] pkt_dst = '0;
  logic [N-1:0][7:0] pkt_flits = '0;
  logic [N-1:0] rf_data, rf_train_en, rf_train_bit, rf_rx_en, rf_rx_bit;
  logic [N-1:0][HW-1:0] rf_dst;
  logic [N-1:0][LW-1:0] rf_level;
  logic [N-1:0][EW-1:0] energy;
  logic [N-1:0] over;
  logic [N-1:0][31:0] n_reloc;
  logic [N-1:0][8:0] vd_errs;
  logic reconfig;
  logic [31:0] n_up, n_down, n_timeout, n_passes;

  int checks = 0, failures = 0;

  winoc_radio_ctrl dut (.*);

  rf_channel_model #(.N_HUBS(N), .LEVELS(L)) chan (
    .clk, .tx_en(rf_train_en), .tx_bit(rf_train_bit), .tx_dst(rf_dst), .tx_level(rf_level),
    .rx_en(rf_rx_en), .rx_bit(rf_rx_bit));

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int absd(input int a, input int b);
    return a > b ? a - b : b - a;
  endfunction

  function automatic bit adjacent(input int a, input int b);
    return (absd(a % GX, b % GX) + absd(a / GX, b / GX)) == 1;
  endfunction

  // ---------------------------------------------------------------- state
  longint cyc = 0;
  longint inj_flits [N];      // injected, per destination
  longint tx_flits  [N];      // transmitted, per destination
  longint src_inj   [N];      // injected, per source hub
  longint hub_tx    [N];      // transmitted, per transmitting hub
  longint e_cal = 0, e_max = 0;
  int n_over_seen = 0, n_rp_pass = 0, n_err_verdicts = 0, n_mode_sw = 0;
  bit converged = 0, level_check = 0;
  int skip_s = -1, skip_d = -1, skip2_s = -1, skip2_d = -1;
  bit force_idle [N];          // stop new packets at the end

  initial begin
    // 30 M cycles at 10 time units
    #300000000;
    failures++;
    $display("watchdog expired at cycle %0d, passes %0d", cyc, n_passes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // traffic generators (drive after the edge, sample before it)
  initial begin
    int gap [N];
    for (int h = 0; h < N; h++) begin gap[h] = 0; force_idle[h] = 0; inj_flits[h] = 0; tx_flits[h] = 0; src_inj[h] = 0; hub_tx[h] = 0; end
    wait (rst_n);
    forever begin
      @(negedge clk);
      for (int h = 0; h < N; h++) if (pkt_valid[h] && pkt_ready[h]) begin
        inj_flits[pkt_dst[h]] += pkt_flits[h];
        src_inj[h] += pkt_flits[h];
      end
      @(posedge clk);
      #1;
      for (int h = 0; h < N; h++) begin
        if (pkt_valid[h] && pkt_ready_q[h]) pkt_valid[h] = 0;
        if (!pkt_valid[h] && !force_idle[h]) begin
          if (gap[h] > 0) gap[h]--;
          else begin
            int d;
            d = $urandom_range(0, N - 2);
            if (d >= h) d++;
            pkt_valid[h] = 1;
            pkt_dst[h]   = HW'(d);
            pkt_flits[h] = 8'($urandom_range(1, 8));
            gap[h] = (h == 5) ? 0 : $urandom_range(20, 200);
          end
        end
      end
    end
  end

  // handshake seen at the negedge before the edge
  logic [N-1:0] pkt_ready_q;
  always @(negedge clk) pkt_ready_q <= pkt_valid & pkt_ready;

  // transmit monitor
  always @(negedge clk) if (rst_n) begin
    cyc++;
    for (int t = 0; t < N; t++) begin
      if (rf_data[t]) begin
        int d;
        d = rf_dst[t];
        tx_flits[d]++;
        hub_tx[t]++;
        e_cal += rf_level[t] + 1;
        e_max += L;
        if (level_check && !((t == skip_s && d == skip_d) || (t == skip2_s && d == skip2_d)))
          chk(int'(rf_level[t]) == chan.req[t][d],
              $sformatf("flit %0d->%0d at level %0d, required %0d", t, d, rf_level[t], chan.req[t][d]));
      end
      if (over[t]) n_over_seen++;
    end
    if (dut.u_pm.vd_valid && !dut.u_pm.vd_pass) n_err_verdicts++;
  end

  // count passes started by the period timer
  logic reconfig_q = 0, cal_req_q = 0;
  always @(posedge clk) begin
    reconfig_q <= reconfig;
    cal_req_q  <= cal_req;
    if (reconfig && !reconfig_q && !cal_req_q) n_rp_pass++;
  end

  task automatic wait_passes(input int k, input bit kick);
    while (n_passes < k) begin
      @(negedge clk);
      cal_req = kick && !reconfig && !cal_req;
    end
    cal_req = 0;
  endtask

  task automatic check_table(input int k);
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++) if (s != d && !(s == skip_s && d == skip_d) && !(s == skip2_s && d == skip2_d)) begin
        int e;
        e = (L - 1 - k) > int'(chan.req[s][d]) ? (L - 1 - k) : chan.req[s][d];
        chk(int'(dut.u_pm.lvl[s * N + d]) == e,
            $sformatf("after %0d passes level(%0d,%0d)=%0d expected %0d", k, s, d, dut.u_pm.lvl[s * N + d], e));
      end
  endtask

  initial begin
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++) begin
        int r;
        r = 2 * (absd(s % GX, d % GX) + absd(s / GX, d / GX)) + (s + d) % 3;
        chan.req[s][d] = (r > L - 1) ? L - 1 : r;
      end
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // passes 1..3 checked one at a time, then kicked on to convergence
    for (int k = 1; k <= 3; k++) begin
      wait_passes(k, 1);
      check_table(k);
    end
    wait_passes(L - 1, 1);
    check_table(L - 1);
    converged   = 1;
    level_check = 1;
    $display("converged at cycle %0d: down=%0d", cyc, n_down);
    // let the period timer start the next pass, traffic runs at calibrated levels
    wait_passes(L, 0);
    check_table(L - 1);
    // pair 0->15 degrades by 2 levels; pair 3->12 goes silent
    skip_s = 0;  skip_d = 15;
    skip2_s = 3; skip2_d = 12;
    begin
      int r0;
      r0 = chan.req[0][15];
      chan.req[0][15] = r0 + 2 > L - 1 ? L - 1 : r0 + 2;
      chan.mute[3][12] = 1;
      wait_passes(L + 1, 1);
      chk(int'(dut.u_pm.lvl[0 * N + 15]) == r0 + 1, "degraded link one step up");
      wait_passes(L + 2, 1);
      chk(int'(dut.u_pm.lvl[0 * N + 15]) == chan.req[0][15], "degraded link at requirement");
      for (int k = 3; k <= L; k++) wait_passes(L + k, 1);
      chk(int'(dut.u_pm.lvl[3 * N + 12]) == L - 1, "silent link back at maximum power");
    end
    // mode switches: relocation off, then power control off
    begin
      longint r0, r1;
      int nmax, nflit;
      r0 = 0;
      for (int h = 0; h < N; h++) r0 += n_reloc[h];
      reloc_en = 0;
      repeat (20000) @(negedge clk);
      r1 = 0;
      for (int h = 0; h < N; h++) r1 += n_reloc[h];
      chk(r1 == r0, "relocation off: nothing relocated");
      n_mode_sw++;
      reloc_en = 1;
      level_check = 0;
      pc_en = 0;
      nmax = 0; nflit = 0;
      repeat (20000) begin
        @(negedge clk);
        for (int t = 0; t < N; t++) if (rf_data[t]) begin
          nflit++;
          if (rf_level[t] == LW'(L - 1)) nmax++;
        end
      end
      chk(nflit > 0 && nmax == nflit, "power control off: every flit at maximum level");
      n_mode_sw++;
      pc_en = 1;
    end
    // drain traffic
    for (int h = 0; h < N; h++) force_idle[h] = 1;
    repeat (3000) @(negedge clk);
    for (int d = 0; d < N; d++)
      chk(inj_flits[d] == tx_flits[d], $sformatf("flits to hub %0d: injected %0d sent %0d", d, inj_flits[d], tx_flits[d]));
    for (int t = 0; t < N; t++) begin
      longint lim;
      lim = src_inj[t];
      for (int a = 0; a < N; a++) if (adjacent(a, t)) lim += src_inj[a];
      chk(hub_tx[t] <= lim, $sformatf("hub %0d sends only its own and neighbours' traffic", t));
    end
    begin
      longint nrel;
      nrel = 0;
      for (int h = 0; h < N; h++) nrel += n_reloc[h];
      $display("cycles=%0d passes=%0d timer-started=%0d down=%0d up=%0d timeouts=%0d relocated=%0d",
               cyc, n_passes, n_rp_pass, n_down, n_up, n_timeout, nrel);
      $display("failed verdicts=%0d flipped bits=%0d over-threshold hub-cycles=%0d",
               n_err_verdicts, chan.n_flipped, n_over_seen);
      $display("data energy at calibrated levels: %0d units, at maximum power: %0d units", e_cal, e_max);
      chk(n_down > 0, "power-down steps happened");
      chk(n_up > 0, "power-up steps happened");
      chk(n_timeout > 0, "probe timeouts happened");
      chk(nrel > 0, "packets were relocated");
      chk(n_over_seen > 0, "energy threshold crossed");
      chk(n_rp_pass > 0, "a pass was started by the period timer");
      chk(n_err_verdicts > 0 && chan.n_flipped > 0, "receivers saw bit errors");
      chk(e_cal < e_max, "calibrated levels spend less than maximum power");
      chk(n_mode_sw == 2, "both mechanisms switched off and on");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
