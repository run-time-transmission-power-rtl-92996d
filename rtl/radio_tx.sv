// radio_tx: transmit controller of one radio hub.
//
// Five packet sources share the hub's radio transmitter: index 0 is the
// hub's own cluster (after its relocator), indices 1..4 are packets relocated
// here by the adjacent hubs to the N, E, S and W. A round-robin arbiter picks
// one packet at a time; the packet is then sent one flit per cycle, each
// flit strobed on rf_data with the destination hub on rf_dst and the power
// level the power manager holds for (this hub, rf_dst) on rf_level. A probe
// request from the power manager (training burst to probe_dst at
// probe_level) is taken in preference to packets, but only between packets;
// the burst is produced by training_tx and leaves on rf_train_en /
// rf_train_bit with its level on rf_level.
//
// Interface / timing: src_ready[i] and probe_ready are combinational grants
// given only when idle. A packet of F flits (F = 0 is sent as 1) occupies
// the transmitter for F cycles starting the cycle after its grant; a probe
// occupies it for BURST_BITS + 1 cycles. rd_dst/rd_level is the level lookup
// into the power manager's table.
// Sending each packet at its pair's calibrated level follows the document;
// arbitration, priority and timing are this design's choices.
module radio_tx
  import winoc_pkg::*;
#(
  parameter int unsigned N_HUBS     = N_HUBS_DEF,
  parameter int unsigned LEVELS     = LEVELS_DEF,
  parameter int unsigned BURST_BITS = BURST_BITS_DEF
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // packet sources: 0 local, 1..4 relocated from N, E, S, W
  input  logic [4:0]                         src_valid,
  output logic [4:0]                         src_ready,
  input  logic [4:0][$clog2(N_HUBS)-1:0]     src_dst,
  input  logic [4:0][FLITS_W-1:0]            src_flits,
  // training burst request
  input  logic                               probe_valid,
  output logic                               probe_ready,
  input  logic [$clog2(N_HUBS)-1:0]          probe_dst,
  input  logic [$clog2(LEVELS)-1:0]          probe_level,
  // power level lookup
  output logic [$clog2(N_HUBS)-1:0]          rd_dst,
  input  logic [$clog2(LEVELS)-1:0]          rd_level,
  // radio front-end control
  output logic                               rf_data,
  output logic                               rf_train_en,
  output logic                               rf_train_bit,
  output logic [$clog2(N_HUBS)-1:0]          rf_dst,
  output logic [$clog2(LEVELS)-1:0]          rf_level
);
  localparam int unsigned HW = $clog2(N_HUBS);
  localparam int unsigned LW = $clog2(LEVELS);

  typedef enum logic [1:0] {T_IDLE, T_SEND, T_TRAIN} tstate_e;

  tstate_e          state;
  logic [2:0]       rr;        // source with highest priority next
  logic [2:0]       gnt;
  logic             any;
  logic [HW-1:0]    dst_q;
  logic [LW-1:0]    plvl_q;
  logic [FLITS_W-1:0] left;
  logic             tr_start, tr_busy, tr_done;

  // round-robin choice starting at rr
  always_comb begin
    gnt = 3'd0;
    any = 1'b0;
    for (int k = 0; k < 5; k++) begin
      logic [2:0] j;
      j = 3'((32'(rr) + k) % 5);
      if (!any && src_valid[j]) begin
        any = 1'b1;
        gnt = j;
      end
    end
  end

  assign probe_ready = (state == T_IDLE) && probe_valid;
  always_comb begin
    src_ready = '0;
    if (state == T_IDLE && !probe_valid && any) src_ready[gnt] = 1'b1;
  end
  assign tr_start = probe_ready;

  assign rd_dst   = dst_q;
  assign rf_dst   = dst_q;
  assign rf_data  = (state == T_SEND);
  assign rf_level = (state == T_TRAIN) ? plvl_q : rd_level;

  training_tx #(.BURST_BITS(BURST_BITS)) u_train (
    .clk, .rst_n, .start(tr_start), .busy(tr_busy),
    .tx_en(rf_train_en), .tx_bit(rf_train_bit), .done(tr_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= T_IDLE;
      rr     <= '0;
      dst_q  <= '0;
      plvl_q <= '0;
      left   <= '0;
    end else begin
      unique case (state)
        T_IDLE: begin
          if (probe_valid) begin
            dst_q  <= probe_dst;
            plvl_q <= probe_level;
            state  <= T_TRAIN;
          end else if (any) begin
            dst_q <= src_dst[gnt];
            left  <= (src_flits[gnt] == '0) ? FLITS_W'(1) : src_flits[gnt];
            rr    <= (gnt == 3'd4) ? 3'd0 : gnt + 3'd1;
            state <= T_SEND;
          end
        end
        T_SEND: begin
          left <= left - 1'b1;
          if (left == FLITS_W'(1)) state <= T_IDLE;
        end
        T_TRAIN: begin
          if (tr_done) state <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // the training generator is only ever started from idle
  assert property (@(posedge clk) disable iff (!rst_n) tr_start |-> !tr_busy);
endmodule
