// tb_radio_hub: one inner radio hub (id 5 on the 4x4 grid: N=1, E=6, S=9,
// W=4) with reduced energy window (200 cycles) and threshold (150 units).
// The testbench plays the power table (every level 3, so 4 energy units per
// flit), the neighbours and the channel (training bits looped back to this
// hub's own receiver with chosen bit flips). Phases:
//   1. light local traffic: every flit leaves on this hub's radio, the
//      energy reading equals 4 units per flit sent in the window;
//   2. heavy traffic: the hub goes over threshold and packets leave towards
//      the neighbour with the lowest energy (E, then W after E goes over);
//   3. packets relocated here from the neighbours are transmitted;
//   4. probes: the looped-back burst gives the expected error count and
//      verdict.
module tb_radio_hub;
  import winoc_pkg::*;
  localparam int N = 16, EW = 16, BB = 32, TH = 150, WIN = 200;
  logic clk = 0, rst_n = 0, reloc_en = 1;
  logic pkt_valid = 0, pkt_ready;
  logic [3:0] pkt_dst = 0;
  logic [7:0] pkt_flits = 0;
  logic [3:0] nb_out_valid, nb_out_ready = '1;
  logic [3:0] nb_out_dst;
  logic [7:0] nb_out_flits;
  logic [3:0] nb_in_valid = '0, nb_in_ready;
  logic [3:0][3:0] nb_in_dst = '0;
  logic [3:0][7:0] nb_in_flits = '0;
  logic [N-1:0][EW-1:0] energy_all;
  logic [N-1:0] over_all;
  logic [EW-1:0] energy;
  logic over;
  logic [31:0] n_reloc;
  logic probe_valid = 0, probe_ready;
  logic [3:0] probe_dst = 0, probe_level = 0;
  logic [3:0] rd_dst, rd_level;
  logic vd_valid, vd_pass;
  logic [5:0] vd_errs;
  logic rf_data, rf_train_en, rf_train_bit, rf_rx_en = 0, rf_rx_bit = 0;
  logic [3:0] rf_dst, rf_level;
  logic [N-1:0][EW-1:0] nb_energy = '0;
  logic [N-1:0] nb_over = '0;
  int checks = 0, failures = 0;
  int flips_left = 0;
  int sent = 0, sent_win = 0, n_out [4] = '{0, 0, 0, 0}, out_flits = 0;

  radio_hub #(.N_HUBS(N), .GRID_X(4), .HUB_ID(5), .LEVELS(16), .BURST_BITS(BB), .MAX_ERR(0),
              .E_W(EW), .THRESH(TH), .WINDOW(WIN)) dut (.*);

  assign rd_level = 4'd3;
  always_comb begin
    energy_all = nb_energy;
    over_all   = nb_over;
    energy_all[5] = energy;
    over_all[5]   = over;
  end

  // channel: loop training bits back, flipping the first flips_left bits
  always @(posedge clk) begin
    rf_rx_en  <= rf_train_en;
    rf_rx_bit <= rf_train_bit ^ (rf_train_en && flips_left > 0);
    if (rf_train_en && flips_left > 0) flips_left <= flips_left - 1;
  end

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  always @(negedge clk) if (rst_n) begin
    if (rf_data) begin
      sent++;
      chk(rf_level == 4'd3, "flit at table level");
    end
    for (int k = 0; k < 4; k++) if (nb_out_valid[k] && nb_out_ready[k]) begin
      n_out[k]++;
      out_flits += nb_out_flits;
    end
  end

  task automatic send_pkt(input int dst, input int fl);
    @(posedge clk) #1;
    pkt_valid = 1; pkt_dst = 4'(dst); pkt_flits = 8'(fl);
    do @(negedge clk); while (!pkt_ready);
    @(posedge clk) #1 pkt_valid = 0;
  endtask

  initial begin
    int lp_flits;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: light traffic inside one window; expect 4 units per flit
    lp_flits = 0;
    for (int i = 0; i < 5; i++) begin
      send_pkt(12, 3);
      lp_flits += 3;
      repeat (4) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    chk(sent == lp_flits, $sformatf("light traffic all local: %0d of %0d", sent, lp_flits));
    chk(energy == EW'(4 * lp_flits), $sformatf("energy %0d expected %0d", energy, 4 * lp_flits));
    chk(!over && n_reloc == 0, "under threshold, nothing relocated");
    // phase 2: neighbours' energy: E lowest
    nb_energy[1] = 90; nb_energy[6] = 10; nb_energy[9] = 50; nb_energy[4] = 20;
    while (!over) send_pkt(12, 8);
    repeat (2) @(negedge clk);
    begin
      int b0;
      int r0;
      r0 = n_reloc;
      b0 = n_out[1];
      send_pkt(12, 5);
      repeat (2) @(negedge clk);
      chk(n_out[1] == b0 + 1, "relocated to E (lowest energy)");
      nb_over[6] = 1;
      b0 = n_out[3];
      send_pkt(12, 5);
      repeat (2) @(negedge clk);
      chk(n_out[3] == b0 + 1, "E over threshold: relocated to W");
      // destination is W itself: skip it, next lowest is S
      b0 = n_out[2];
      send_pkt(4, 5);
      repeat (2) @(negedge clk);
      chk(n_out[2] == b0 + 1, "destination neighbour skipped: relocated to S");
      nb_over[1] = 1; nb_over[4] = 1; nb_over[9] = 1;
      b0 = sent;
      send_pkt(12, 5);
      repeat (8) @(negedge clk);
      chk(sent >= b0 + 5, "all neighbours over: packet stays local");
      chk(n_reloc == r0 + 3, $sformatf("relocation counter %0d", n_reloc));
      // relocation disabled while E is free again: stays local
      nb_over[6] = 0;
      reloc_en = 0;
      b0 = sent;
      send_pkt(12, 5);
      repeat (8) @(negedge clk);
      chk(sent >= b0 + 5 && n_reloc == r0 + 3, "relocation disabled: packet stays local");
      reloc_en = 1;
    end
    // phase 3: packets relocated here from N and W
    begin
      int b0;
      b0 = sent;
      @(posedge clk) #1;
      nb_in_valid = 4'b1001; nb_in_dst[0] = 4'd13; nb_in_flits[0] = 8'd4;
      nb_in_dst[3] = 4'd14; nb_in_flits[3] = 8'd2;
      while (nb_in_valid != 0) begin
        @(negedge clk);
        begin
          logic [3:0] r;
          r = nb_in_ready & nb_in_valid;
          @(posedge clk) #1 nb_in_valid &= ~r;
        end
      end
      repeat (10) @(negedge clk);
      chk(sent == b0 + 6, $sformatf("relocated-in packets sent: %0d", sent - b0));
    end
    // phase 4: probes with 0, 3 and 1 flipped bits
    for (int t = 0; t < 3; t++) begin
      int nf;
      nf = (t == 0) ? 0 : (t == 1) ? 3 : 1;
      flips_left = nf;
      @(posedge clk) #1;
      probe_valid = 1; probe_dst = 4'd5; probe_level = 4'(t + 7);
      do @(negedge clk); while (!probe_ready);
      @(posedge clk) #1 probe_valid = 0;
      while (!vd_valid) begin
        @(negedge clk);
        if (rf_train_en) chk(rf_level == 4'(t + 7), "burst at probed level");
      end
      chk(int'(vd_errs) == nf, $sformatf("burst errors %0d expected %0d", vd_errs, nf));
      chk(vd_pass == (nf == 0), "verdict");
    end
    $display("sent=%0d relocated N/E/S/W=%0d/%0d/%0d/%0d", sent, n_out[0], n_out[1], n_out[2], n_out[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
