// tb_energy_monitor: drives random flit strobes at random power levels and
// compares the accumulated energy and the over-threshold flag every cycle
// with a reference: energy of a flit at level l is l+1 units, the sum
// restarts every WINDOW cycles (with that cycle's flit), and saturates at
// the accumulator's width. Reduced sizes: WINDOW 20, THRESH 30, 7-bit
// accumulator so saturation is reached in bursty windows.
module tb_energy_monitor;
  localparam int W = 20, TH = 30, EW = 7, L = 16;
  logic clk = 0, rst_n = 0, flit_tx = 0;
  logic [3:0] flit_level = 0;
  logic [EW-1:0] energy;
  logic over;
  int checks = 0, failures = 0;
  int ref_e = 0, ref_w = 0, n_over = 0, n_sat = 0;

  energy_monitor #(.LEVELS(L), .E_W(EW), .THRESH(TH), .WINDOW(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      int add;
      // bursty load: heavy in some windows, light in others
      flit_tx    = ((c / 200) % 2 == 0) ? ($urandom_range(0, 9) < 9) : ($urandom_range(0, 9) < 2);
      flit_level = 4'($urandom_range(0, L - 1));
      add = flit_tx ? flit_level + 1 : 0;
      @(posedge clk);
      if (ref_w == W - 1) begin ref_w = 0; ref_e = add; end
      else begin
        ref_w++;
        ref_e += add;
        if (ref_e > (1 << EW) - 1) begin ref_e = (1 << EW) - 1; n_sat++; end
      end
      @(negedge clk);
      chk(energy == EW'(ref_e), $sformatf("cycle %0d energy %0d expected %0d", c, energy, ref_e));
      chk(over == (ref_e > TH), $sformatf("cycle %0d over", c));
      if (over) n_over++;
    end
    chk(n_over > 0 && n_sat > 0, "threshold and saturation both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
