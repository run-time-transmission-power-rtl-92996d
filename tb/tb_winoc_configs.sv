// tb_winoc_configs: runs one fixed synthetic workload through the top at its
// default sizes in each of the four configurations the design supports:
//   baseline (fixed maximum power, no relocation), power control only,
//   relocation only, and the joint scheme.
// The workload is the same in every run (a fixed-seed generator): hub 5
// offers 2000 back-to-back packets, every other hub 100 packets with random
// gaps, 1..8 flits each, to random other hubs. In the power-controlled runs
// the links are first calibrated to convergence (15 passes, no traffic).
// The channel is rf_channel_model with a distance-based attenuation map.
//
// Measured per run from the radio outputs: data energy per transmitting hub
// (level + 1 units per flit, training bursts excluded), the total, the
// largest single-hub energy, relocations and completion time. Checked:
// every injected flit is sent; power control lowers total energy; the joint
// scheme spends less than relocation alone; relocation lowers the energy of
// the overloaded hub and the largest single-hub energy; nothing is relocated
// with relocation off.
module tb_winoc_configs;
  import winoc_pkg::*;
  localparam int N = 16, L = 16, HW = 4, LW = 4, EW = 24, GX = 4;

  logic clk = 0, rst_n = 0, cal_req = 0, pc_en = 0, reloc_en = 0;
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
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int absd(input int a, input int b);
    return a > b ? a - b : b - a;
  endfunction

  // fixed-seed generator, one stream per hub
  int unsigned lcg [N];
  function automatic int unsigned rnd(input int h, input int unsigned lim);
    lcg[h] = lcg[h] * 32'd1664525 + 32'd1013904223;
    return (lcg[h] >> 8) % lim;
  endfunction

  longint e_hub [N];
  longint flits_in, flits_out;
  bit     meter = 0;

  always @(negedge clk) if (meter) begin
    for (int t = 0; t < N; t++) if (rf_data[t]) begin
      e_hub[t] += rf_level[t] + 1;
      flits_out++;
    end
  end

  longint r_total [4], r_hub5 [4], r_peak [4], r_reloc [4], r_cycles [4];

  task automatic run(input int cfg);
    int left [N], gap [N];
    longint cyc;
    bit busy;
    pc_en = cfg[0];
    reloc_en = cfg[1];
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    if (pc_en) begin
      while (n_passes < L - 1) begin
        @(negedge clk);
        cal_req = !reconfig && !cal_req;
      end
      cal_req = 0;
    end
    for (int h = 0; h < N; h++) begin
      lcg[h] = 32'(h * 7919 + 1); e_hub[h] = 0;
      left[h] = (h == 5) ? 2000 : 100; gap[h] = 0;
    end
    flits_in = 0; flits_out = 0; meter = 1; cyc = 0;
    busy = 1;
    while (busy) begin
      @(negedge clk);
      cyc++;
      for (int h = 0; h < N; h++) if (pkt_valid[h] && pkt_ready[h]) flits_in += pkt_flits[h];
      @(posedge clk);
      #1;
      for (int h = 0; h < N; h++) begin
        if (pkt_valid[h] && pkt_ready_q[h]) pkt_valid[h] = 0;
        if (!pkt_valid[h] && left[h] > 0) begin
          if (gap[h] > 0) gap[h]--;
          else begin
            int d;
            d = rnd(h, N - 1);
            if (d >= h) d++;
            pkt_valid[h] = 1;
            pkt_dst[h]   = HW'(d);
            pkt_flits[h] = 8'(1 + rnd(h, 8));
            left[h]--;
            gap[h] = (h == 5) ? 0 : 20 + rnd(h, 180);
          end
        end
      end
      busy = (pkt_valid != 0);
      for (int h = 0; h < N; h++) if (left[h] > 0) busy = 1;
    end
    repeat (500) @(negedge clk);
    meter = 0;
    chk(flits_in == flits_out, $sformatf("config %0d: %0d flits in, %0d sent", cfg, flits_in, flits_out));
    r_total[cfg] = 0; r_peak[cfg] = 0; r_reloc[cfg] = 0;
    for (int h = 0; h < N; h++) begin
      r_total[cfg] += e_hub[h];
      if (e_hub[h] > r_peak[cfg]) r_peak[cfg] = e_hub[h];
      r_reloc[cfg] += n_reloc[h];
    end
    r_hub5[cfg] = e_hub[5];
    r_cycles[cfg] = cyc;
  endtask

  logic [N-1:0] pkt_ready_q;
  always @(negedge clk) pkt_ready_q <= pkt_valid & pkt_ready;

  initial begin
    string names [4] = '{"baseline", "power control", "relocation", "joint"};
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++) begin
        int r;
        r = 2 * (absd(s % GX, d % GX) + absd(s / GX, d / GX)) + (s + d) % 3;
        chan.req[s][d] = (r > L - 1) ? L - 1 : r;
      end
    for (int cfg = 0; cfg < 4; cfg++) run(cfg);
    for (int cfg = 0; cfg < 4; cfg++)
      $display("%-14s total energy %0d  hub5 %0d  largest hub %0d  relocated %0d  cycles %0d",
               names[cfg], r_total[cfg], r_hub5[cfg], r_peak[cfg], r_reloc[cfg], r_cycles[cfg]);
    chk(r_total[1] < r_total[0], "power control lowers total energy");
    chk(r_total[3] < r_total[2], "joint scheme below relocation alone");
    chk(r_hub5[2] < r_hub5[0] && r_hub5[3] < r_hub5[1], "relocation offloads the busy hub");
    chk(r_peak[2] < r_peak[0] && r_peak[3] < r_peak[1], "relocation lowers the largest hub energy");
    chk(r_reloc[0] == 0 && r_reloc[1] == 0, "nothing relocated with relocation off");
    chk(r_reloc[2] > 0 && r_reloc[3] > 0, "packets relocated with relocation on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
