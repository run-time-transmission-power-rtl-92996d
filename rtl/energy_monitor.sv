// energy_monitor: transmission energy meter of one radio hub.
//
// Every transmitted flit adds the energy of the power level it was sent at
// (winoc_pkg::flit_energy: level code + 1 units, a linear model) to an
// accumulator. The accumulator covers a monitoring window of WINDOW cycles
// and restarts at the end of each window, so the reading tracks recent load
// rather than lifetime totals. `over` is high while the window's energy
// exceeds THRESH; it is what the packet relocators of this hub and its
// neighbours compare against.
//
// Interface / timing: flit_tx/flit_level are sampled each cycle; energy and
// over are registered and reflect flits up to the previous cycle. In the
// first cycle of a new window the accumulator restarts from that cycle's
// flit. The accumulator saturates at its maximum.
// The use of a predefined energy threshold follows the document; the
// energy model, window and threshold values are this design's choices.
module energy_monitor
  import winoc_pkg::*;
#(
  parameter int unsigned LEVELS = LEVELS_DEF,
  parameter int unsigned E_W    = E_W_DEF,
  parameter int unsigned THRESH = THRESH_DEF,
  parameter int unsigned WINDOW = WINDOW_DEF
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        flit_tx,
  input  logic [$clog2(LEVELS)-1:0]   flit_level,
  output logic [E_W-1:0]              energy,
  output logic                        over
);
  localparam int unsigned WW = $clog2(WINDOW + 1);

  logic [WW-1:0]  wcnt;
  logic [E_W-1:0] add;
  logic [E_W:0]   sum;

  assign add  = flit_tx ? E_W'(flit_energy(32'(flit_level))) : '0;
  assign sum  = {1'b0, energy} + {1'b0, add};
  assign over = (32'(energy) > THRESH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt   <= '0;
      energy <= '0;
    end else if (wcnt == WW'(WINDOW - 1)) begin
      wcnt   <= '0;
      energy <= add;
    end else begin
      wcnt   <= wcnt + 1'b1;
      energy <= sum[E_W] ? '1 : sum[E_W-1:0];
    end
  end
endmodule
