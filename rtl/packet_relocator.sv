// packet_relocator: energy-aware adaptive packet relocator of one radio hub.
//
// Packets from the hub's cluster that must cross the chip over the radio
// normally leave through the hub's own transmitter. While this hub's
// transmission energy in the current window is over the threshold, a packet
// is instead handed (over the wired link) to an adjacent hub's transmitter,
// which then sends it to the destination hub. Among the adjacent hubs (N, E,
// S, W on the GRID_X-wide grid) that exist, are under the threshold and are
// not the packet's destination, the one with the lowest energy wins; ties go
// in the order N, E, S, W. With no such neighbour the packet stays local.
// With reloc_en low every packet stays local.
//
// Interface / timing: one-entry registered stage. A packet is accepted when
// in_valid && in_ready; its decision is made from the energy state of that
// cycle and presented on out_* from the next cycle, held stable until
// out_ready. in_ready = !full || out_ready (full throughput).
// Relocating to an adjacent transmitter on an energy threshold follows the
// document; the neighbour set, the choice rule and the fallback are this
// design's choices.
module packet_relocator
  import winoc_pkg::*;
#(
  parameter int unsigned N_HUBS = N_HUBS_DEF,
  parameter int unsigned GRID_X = GRID_X_DEF,
  parameter int unsigned HUB_ID = 0,
  parameter int unsigned E_W    = E_W_DEF
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               reloc_en,
  input  logic                               in_valid,
  output logic                               in_ready,
  input  logic [$clog2(N_HUBS)-1:0]          in_dst,
  input  logic [FLITS_W-1:0]                 in_flits,
  input  logic [N_HUBS-1:0][E_W-1:0]         energy,
  input  logic [N_HUBS-1:0]                  over,
  output logic                               out_valid,
  input  logic                               out_ready,
  output dir_e                               out_dir,
  output logic [$clog2(N_HUBS)-1:0]          out_dst,
  output logic [FLITS_W-1:0]                 out_flits,
  output logic                               out_reloc,
  output logic [31:0]                        n_reloc
);
  localparam int unsigned GRID_Y = N_HUBS / GRID_X;
  localparam int unsigned X      = HUB_ID % GRID_X;
  localparam int unsigned Y      = HUB_ID / GRID_X;

  // neighbour ids and existence, indexed N, E, S, W
  localparam int unsigned NB_ID [4] = '{HUB_ID - GRID_X, HUB_ID + 1, HUB_ID + GRID_X, HUB_ID - 1};
  localparam bit          NB_OK [4] = '{Y > 0, X + 1 < GRID_X, Y + 1 < GRID_Y, X > 0};

  dir_e          pick;
  logic [E_W-1:0] best_e;

  always_comb begin
    pick   = DIR_LOCAL;
    best_e = '1;
    if (reloc_en && over[HUB_ID]) begin
      for (int k = 0; k < 4; k++) begin
        if (NB_OK[k] && !over[NB_ID[k] % N_HUBS] && (32'(in_dst) != NB_ID[k])
            && (pick == DIR_LOCAL || energy[NB_ID[k] % N_HUBS] < best_e)) begin
          pick   = dir_e'(k + 1);
          best_e = energy[NB_ID[k] % N_HUBS];
        end
      end
    end
  end

  assign in_ready  = !out_valid || out_ready;
  assign out_reloc = (out_dir != DIR_LOCAL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_dir   <= DIR_LOCAL;
      out_dst   <= '0;
      out_flits <= '0;
      n_reloc   <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_dir   <= pick;
        out_dst   <= in_dst;
        out_flits <= in_flits;
        if (pick != DIR_LOCAL) n_reloc <= n_reloc + 1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_dir) && $stable(out_dst));
endmodule
