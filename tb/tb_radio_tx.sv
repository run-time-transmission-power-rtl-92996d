// tb_radio_tx: the hub transmit controller with five random packet sources
// and occasional training-burst probes. The power table is modelled by the
// testbench as level(dst) = dst XOR 5. Checked against a reference:
// round-robin grant order, each packet sent as exactly F contiguous flits
// (F = 0 sent as one) starting the cycle after its grant, at the level for
// its destination; probes taken before any waiting packet, between packets,
// and sent as BURST_BITS PRBS-9 bits at the probed level to the probed hub.
module tb_radio_tx;
  localparam int N = 16, L = 16, BB = 12;
  logic clk = 0, rst_n = 0;
  logic [4:0] src_valid = '0, src_ready;
  logic [4:0][3:0] src_dst = '0;
  logic [4:0][7:0] src_flits = '0;
  logic probe_valid = 0, probe_ready;
  logic [3:0] probe_dst = 0, probe_level = 0;
  logic [3:0] rd_dst, rd_level;
  logic rf_data, rf_train_en, rf_train_bit;
  logic [3:0] rf_dst, rf_level;
  int checks = 0, failures = 0;

  radio_tx #(.N_HUBS(N), .LEVELS(L), .BURST_BITS(BB)) dut (.*);

  assign rd_level = rd_dst ^ 4'h5;

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rr = 0, left = 0, cur_dst = 0, tr_left = 0, tr_tail = 0, npk = 0, nprobe = 0;
    int cyc = 0;
    logic [8:0] prbs;
    logic [4:0] hs;
    bit phs;
    int gap[5];
    int ntie = 0;
    logic [3:0] p_lvl, p_dst;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5; i++) gap[i] = $urandom_range(0, 4);
    while (npk < 600) begin
      @(negedge clk);
      cyc++;
      hs  = src_valid & src_ready;
      phs = probe_valid & probe_ready;
      // outputs of this cycle
      if (left > 0) begin
        chk(rf_data && !rf_train_en, "flit expected");
        chk(int'(rf_dst) == cur_dst, "flit destination");
        chk(rf_level == (rf_dst ^ 4'h5), "flit level from table");
        left--;
        chk(hs == 0 && !phs, "no grant while sending");
      end else if (tr_left > 0) begin
        chk(rf_train_en && !rf_data, "training bit expected");
        chk(rf_train_bit == prbs[8], "training bit value");
        chk(rf_level == p_lvl && rf_dst == p_dst, "training level/destination");
        prbs = {prbs[7:0], prbs[8] ^ prbs[4]};
        tr_left--;
        if (tr_left == 0) tr_tail = 1;
      end else if (tr_tail) begin
        chk(!rf_train_en && !rf_data && hs == 0 && !phs, "one closing cycle after a burst");
        tr_tail = 0;
      end else begin
        chk(!rf_data && !rf_train_en, "idle");
        if (probe_valid) begin
          chk(phs && hs == 0, "probe has priority");
        end else if (src_valid != 0) begin
          int g;
          g = -1;
          for (int k = 0; k < 5; k++) if (g < 0 && src_valid[(rr + k) % 5]) g = (rr + k) % 5;
          if ($countones(src_valid) > 1) ntie++;
          chk(hs == (5'b1 << g), $sformatf("round-robin grant %b expected src %0d", hs, g));
        end
      end
      // bookkeeping for handshakes at the coming edge
      for (int i = 0; i < 5; i++) if (hs[i]) begin
        left = (src_flits[i] == 0) ? 1 : src_flits[i];
        cur_dst = src_dst[i];
        rr = (i + 1) % 5;
        npk++;
      end
      if (phs) begin tr_left = BB; prbs = 9'h1FF; nprobe++; p_lvl = probe_level; p_dst = probe_dst; end
      @(posedge clk);
      #1;
      for (int i = 0; i < 5; i++) begin
        if (hs[i]) begin src_valid[i] = 0; gap[i] = $urandom_range(0, 6); end
        if (!src_valid[i]) begin
          if (gap[i] == 0) begin
            src_valid[i] = 1;
            src_dst[i]   = 4'($urandom_range(0, N - 1));
            src_flits[i] = 8'($urandom_range(0, 6));
          end else gap[i]--;
        end
      end
      if (phs) probe_valid = 0;
      if (!probe_valid && $urandom_range(0, 60) == 0) begin
        probe_valid = 1;
        probe_dst   = 4'($urandom_range(0, N - 1));
        probe_level = 4'($urandom_range(0, L - 1));
      end
    end
    chk(nprobe > 2 && ntie > 50, "probes and contention exercised");
    $display("packets=%0d probes=%0d contended=%0d cycles=%0d", npk, nprobe, ntie, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
