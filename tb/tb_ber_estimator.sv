// tb_ber_estimator: feeds bursts of an independently generated PRBS-9
// training sequence with a chosen number of flipped bits (0, 1, 5) and
// gaps between valid bits, and checks the reported error count, the
// pass/fail verdict for MAX_ERR = 1, and that the verdict arrives exactly
// one cycle after the last bit, including an error in the last bit. BURST_BITS is reduced to 64.
module tb_ber_estimator;
  localparam int BB = 64;
  logic clk = 0, rst_n = 0, rx_en = 0, rx_bit = 0;
  logic verdict_valid, pass;
  logic [$clog2(BB+1)-1:0] err_count;
  int checks = 0, failures = 0;

  ber_estimator #(.BURST_BITS(BB), .MAX_ERR(1)) dut (.*);

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

  task automatic burst(input int nerr, input bit gaps, input bit lastbit = 0);
    logic [8:0] s;
    int flip[$];
    s = 9'h1FF;
    for (int e = 0; e < nerr; e++) flip.push_back((lastbit && e == 0) ? BB - 1 : (e * 13 + 7) % BB);
    for (int i = 0; i < BB; i++) begin
      if (gaps && (i % 3 == 1)) begin
        @(negedge clk) rx_en = 0;
      end
      @(negedge clk);
      rx_en  = 1;
      rx_bit = s[8] ^ (i inside {flip});
      s = {s[7:0], s[8] ^ s[4]};
      if (i < BB - 1) chk(!verdict_valid, "no early verdict");
    end
    @(negedge clk) rx_en = 0;
    chk(verdict_valid, "verdict one cycle after last bit");
    chk(err_count == nerr, $sformatf("err_count %0d expected %0d", err_count, nerr));
    chk(pass == (nerr <= 1), $sformatf("pass for %0d errors", nerr));
    @(negedge clk);
    chk(!verdict_valid, "verdict is a pulse");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    burst(0, 0);
    burst(5, 1);
    burst(1, 0);
    burst(2, 1);
    burst(0, 1);
    burst(1, 0, 1);
    burst(3, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
