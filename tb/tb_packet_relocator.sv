// tb_packet_relocator: two relocators on a 4x4 hub grid, an inner hub (5:
// neighbours N=1, E=6, S=9, W=4) and a corner hub (0: E=1, S=4). For random
// energy states and destinations the chosen transmitter is compared with a
// reference: stay local unless this hub is over threshold; otherwise the
// existing neighbour that is under threshold and is not the destination,
// with the lowest energy (ties N, E, S, W); local if none. Output
// back-pressure checks that the presented packet is held until taken. Every
// seventh packet is offered with relocation disabled and must stay local.
module tb_packet_relocator;
  import winoc_pkg::*;
  localparam int N = 16, GX = 4, EW = 8;
  logic clk = 0, rst_n = 0, reloc_en = 0;
  logic [N-1:0][EW-1:0] energy;
  logic [N-1:0] over;
  int checks = 0, failures = 0;
  int n_reloc_seen = 0, n_local_over = 0;

  logic        iv [2];
  logic        ir [2];
  logic [3:0]  idst [2];
  logic [7:0]  ifl [2];
  logic        ov [2];
  logic        ordy [2];
  dir_e        odir [2];
  logic [3:0]  odst [2];
  logic [7:0]  ofl [2];
  logic        orel [2];
  logic [31:0] nrel [2];

  packet_relocator #(.N_HUBS(N), .GRID_X(GX), .HUB_ID(5), .E_W(EW)) u5 (
    .clk, .rst_n, .reloc_en, .in_valid(iv[0]), .in_ready(ir[0]), .in_dst(idst[0]), .in_flits(ifl[0]),
    .energy, .over, .out_valid(ov[0]), .out_ready(ordy[0]), .out_dir(odir[0]),
    .out_dst(odst[0]), .out_flits(ofl[0]), .out_reloc(orel[0]), .n_reloc(nrel[0]));
  packet_relocator #(.N_HUBS(N), .GRID_X(GX), .HUB_ID(0), .E_W(EW)) u0 (
    .clk, .rst_n, .reloc_en, .in_valid(iv[1]), .in_ready(ir[1]), .in_dst(idst[1]), .in_flits(ifl[1]),
    .energy, .over, .out_valid(ov[1]), .out_ready(ordy[1]), .out_dir(odir[1]),
    .out_dst(odst[1]), .out_flits(ofl[1]), .out_reloc(orel[1]), .n_reloc(nrel[1]));

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

  function automatic int expect_dir(input int hub, input int dst);
    int ids[4], d, best;
    bit ex[4];
    ids = '{hub - GX, hub + 1, hub + GX, hub - 1};
    ex  = '{hub >= GX, (hub % GX) != GX - 1, hub < N - GX, (hub % GX) != 0};
    if (!reloc_en || !over[hub]) return 0;
    d = 0; best = 1 << 30;
    for (int k = 0; k < 4; k++)
      if (ex[k] && !over[ids[k]] && ids[k] != dst && int'(energy[ids[k]]) < best) begin
        d = k + 1; best = energy[ids[k]];
      end
    return d;
  endfunction

  initial begin
    int nexp[2] = '{0, 0};
    for (int u = 0; u < 2; u++) begin iv[u] = 0; ordy[u] = 0; idst[u] = 0; ifl[u] = 0; end
    energy = '0; over = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int e[2];
      for (int h = 0; h < N; h++) begin
        energy[h] = EW'($urandom_range(0, 255));
        over[h]   = ($urandom_range(0, 9) < ((t % 2) ? 8 : 3));
      end
      if (t % 5 == 0) energy[1] = energy[6];   // force some ties
      reloc_en = (t % 7 != 3);
      for (int u = 0; u < 2; u++) begin
        idst[u] = 4'($urandom_range(0, N - 1));
        ifl[u]  = 8'($urandom_range(1, 20));
        iv[u]   = 1;
        e[u]    = expect_dir(u == 0 ? 5 : 0, idst[u]);
      end
      @(negedge clk);
      for (int u = 0; u < 2; u++) begin
        iv[u] = 0;
        chk(ov[u], "packet presented");
        chk(int'(odir[u]) == e[u], $sformatf("t=%0d hub%0d dir %0d expected %0d", t, u == 0 ? 5 : 0, odir[u], e[u]));
        chk(orel[u] == (e[u] != 0), "reloc flag");
        chk(odst[u] == idst[u] && ofl[u] == ifl[u], "descriptor carried");
        if (e[u] != 0) begin nexp[u]++; n_reloc_seen++; end
        else if (over[u == 0 ? 5 : 0] && reloc_en) n_local_over++;
      end
      // change the energy state while the output waits: it must hold
      energy = ~energy; over = ~over;
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        for (int u = 0; u < 2; u++) chk(ov[u] && int'(odir[u]) == e[u], "held under back-pressure");
      end
      ordy[0] = 1; ordy[1] = 1;
      @(negedge clk);
      ordy[0] = 0; ordy[1] = 0;
      for (int u = 0; u < 2; u++) chk(!ov[u], "taken");
    end
    for (int u = 0; u < 2; u++) chk(nrel[u] == 32'(nexp[u]), "relocation counter");
    chk(n_reloc_seen > 0 && n_local_over > 0, "relocation and over-threshold fallback both seen");
    $display("relocated=%0d kept-local-while-over=%0d", n_reloc_seen, n_local_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
