// tb_tx_power_manager: closed-loop test of the power manager with 4 hubs and
// 4 power levels. The testbench plays the hubs and the radio channel: every
// pair (s,d) has a required level req[s][d], and a probe is answered, a few
// cycles after its handshake, with pass = (probe_level >= req). One pair
// never answers, so its probes time out.
// Expected table after k passes from reset (levels start at 3):
// max(3 - k, req), because each pass lowers a link by at most one level;
// the silent pair stays at 3. Raising a requirement must then raise the
// level by one per pass until it is met again. Passes are started once by
// cal_req and then by the reconfiguration period timer. Finally pc_en is
// dropped: every lookup must give the maximum level and no pass may start.
module tb_tx_power_manager;
  localparam int N = 4, L = 4, RP = 30, TO = 40;
  localparam int HW = 2, LW = 2;
  logic clk = 0, rst_n = 0, cal_req = 0, pc_en = 1;
  logic probe_valid, probe_ready = 0;
  logic [HW-1:0] probe_src, probe_dst;
  logic [LW-1:0] probe_level;
  logic vd_valid = 0, vd_pass = 0;
  logic [N-1:0][HW-1:0] rd_dst = '0;
  logic [N-1:0][LW-1:0] rd_level;
  logic reconfig;
  logic [31:0] n_up, n_down, n_timeout, n_passes;
  int checks = 0, failures = 0;
  int req [N][N];
  int nprobes = 0;

  tx_power_manager #(.N_HUBS(N), .LEVELS(L), .RP_CYCLES(RP), .TIMEOUT(TO)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // hubs + channel: accept the probe after a random delay, answer later
  initial begin
    forever begin
      @(negedge clk);
      if (probe_valid && rst_n) begin
        int s, d, lv;
        chk(probe_src != probe_dst, "no probe of a hub to itself");
        repeat ($urandom_range(0, 2)) @(negedge clk);
        s = probe_src; d = probe_dst; lv = probe_level;
        probe_ready = 1;
        @(negedge clk) probe_ready = 0;
        nprobes++;
        if (!(s == 2 && d == 1)) begin
          repeat ($urandom_range(3, 8)) @(negedge clk);
          vd_valid = 1;
          vd_pass  = (lv >= req[s][d]);
          @(negedge clk) vd_valid = 0;
        end
      end
    end
  end

  task automatic check_table(input int k, input string tag);
    for (int d = 0; d < N; d++) begin
      for (int s = 0; s < N; s++) rd_dst[s] = HW'(d);
      #1;
      for (int s = 0; s < N; s++) begin
        int e;
        if (s == d) continue;
        e = (s == 2 && d == 1) ? L - 1 : ((L - 1 - k) > req[s][d] ? (L - 1 - k) : req[s][d]);
        chk(rd_level[s] == LW'(e), $sformatf("%s pass %0d: level(%0d,%0d)=%0d expected %0d",
                                             tag, k, s, d, rd_level[s], e));
      end
    end
  endtask

  task automatic wait_pass(input int target);
    while (n_passes != target) @(negedge clk);
  endtask

  initial begin
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++) req[s][d] = $urandom_range(0, L - 1);
    req[0][1] = 0; req[1][0] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_table(0, "reset");
    cal_req = 1;
    @(negedge clk) cal_req = 0;
    chk(reconfig, "reconfiguration state entered on request");
    for (int k = 1; k <= L; k++) begin
      wait_pass(k);
      chk(!reconfig, "idle between passes");
      check_table(k, "down");
    end
    chk(n_timeout >= L, "silent pair timed out every pass");
    // channel to (0,1) degrades: needs level 2 now (was 0)
    req[0][1] = 2;
    wait_pass(L + 1);
    rd_dst[0] = 1; #1;
    chk(rd_level[0] == 1, "level steps up by one");
    wait_pass(L + 2);
    #1;
    chk(rd_level[0] == 2, "level steps up to the requirement");
    wait_pass(L + 3);
    #1;
    chk(rd_level[0] == 2, "level stays at the requirement");
    chk(n_up == 2, $sformatf("two power-up steps, got %0d", n_up));
    // power control off: fixed maximum power, no passes, table kept
    pc_en = 0;
    for (int s = 0; s < N; s++) rd_dst[s] = HW'((s + 1) % N);
    #1;
    for (int s = 0; s < N; s++) chk(rd_level[s] == LW'(L - 1), "disabled: maximum level");
    begin
      logic [31:0] p0;
      p0 = n_passes;
      repeat (5 * RP) @(negedge clk);
      cal_req = 1;
      @(negedge clk) cal_req = 0;
      repeat (RP) @(negedge clk);
      chk(n_passes == p0 && !reconfig, "disabled: no pass starts");
      pc_en = 1;
      rd_dst[0] = 1; #1;
      chk(rd_level[0] == 2, "re-enabled: calibrated level back");
    end
    $display("passes=%0d probes=%0d up=%0d down=%0d timeouts=%0d", n_passes, nprobes, n_up, n_down, n_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
