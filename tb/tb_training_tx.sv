// tb_training_tx: checks the training burst generator against an
// independently coded PRBS-9 (x^9 + x^5 + 1, seed all ones) reference:
// every burst bit, the burst length, the done pulse and that a start while
// busy is ignored. BURST_BITS is reduced to 40 for two bursts.
module tb_training_tx;
  localparam int BB = 40;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, tx_en, tx_bit, done;
  int checks = 0, failures = 0;

  training_tx #(.BURST_BITS(BB)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] ref_s;
    int nbits, ndone;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    chk(!busy && !tx_en, "idle after reset");
    for (int b = 0; b < 2; b++) begin
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      ref_s = 9'h1FF; nbits = 0; ndone = 0;
      for (int c = 0; c < BB + 5; c++) begin
        if (c == 3) start = 1;           // ignored while busy
        if (c == 4) start = 0;
        if (tx_en) begin
          chk(tx_bit == ref_s[8], $sformatf("burst %0d bit %0d", b, nbits));
          ref_s = {ref_s[7:0], ref_s[8] ^ ref_s[4]};
          nbits++;
        end
        if (done) begin
          ndone++;
          chk(nbits == BB, "done right after the last bit");
        end
        @(negedge clk);
      end
      chk(nbits == BB, $sformatf("burst length %0d", nbits));
      chk(ndone == 1, "one done pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
