// vtp_trigger: the three trigger output bits of a crate's VTP.
//
// Every clock the cluster finder delivers one cluster word per seed
// crystal. From these:
//  * Bit 0: some cluster has energy >= trigger_thr (single-cluster
//    trigger). Output pulse TRIG_WIDTH cycles wide.
//  * Bit 3: some cluster has energy > pair_thr. Output pulse BIT3_WIDTH
//    cycles wide; this width is a fixed constant, not a setting.
//  * Bit 4: at least two clusters with energy > pair_thr were seen within
//    the last PAIR_WIDTH cycles (the current one included; two in the same
//    cycle count). Output pulse PAIR_WIDTH cycles wide.
// The pulses are retriggerable: a new event restarts the width.
//
// Interface: clusters[ROWS][COLS] and cfg in, bit0/bit3/bit4 out.
// Timing: a cluster in cycle c raises its bits in cycle c+1.
//
// Follows the document: the three conditions, the >= test for Bit 0, the
// > tests for the pair threshold, the widths (20 ns = 5 clocks) and the
// hard-coded Bit 3 width equal to the pair width. This design's choices:
// retriggering, and a sliding window for the two-cluster coincidence.
module vtp_trigger
  import nps_pkg::*;
#(
  parameter int unsigned ROWS       = 36,
  parameter int unsigned COLS       = 6,
  parameter int unsigned TRIG_WIDTH = 5,  // VTP_NPS_TRIG_WIDTH, 20 ns
  parameter int unsigned PAIR_WIDTH = 5   // ..._CLUSTER_PAIR_WIDTH, 20 ns
) (
  input  logic     clk,
  input  logic     rst,
  input  vtp_cfg_t cfg,
  input  cluster_t clusters [ROWS][COLS],
  output logic     bit0,
  output logic     bit3,
  output logic     bit4
);

  localparam int unsigned BIT3_WIDTH = 5;  // fixed in hardware, 20 ns

  logic       any_trig;
  logic [1:0] npair;       // clusters above pair_thr this cycle, capped at 2
  logic [1:0] npair_hist [PAIR_WIDTH];  // [0] = this cycle
  logic [$clog2(2*PAIR_WIDTH+1)-1:0] npair_win;

  always_comb begin
    any_trig = 1'b0;
    npair    = '0;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        if (clusters[r][c].valid) begin
          if (clusters[r][c].energy >= cfg.trigger_thr) any_trig = 1'b1;
          if (clusters[r][c].energy > cfg.pair_thr && npair != 2'd2) npair += 1'b1;
        end
      end
    end
  end

  // Pair counts of the previous PAIR_WIDTH-1 cycles.
  logic [1:0] npair_q [PAIR_WIDTH];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < PAIR_WIDTH; i++) npair_q[i] <= '0;
    end else begin
      npair_q[0] <= npair;
      for (int i = 1; i < PAIR_WIDTH; i++) npair_q[i] <= npair_q[i-1];
    end
  end

  always_comb begin
    npair_hist[0] = npair;
    for (int i = 1; i < PAIR_WIDTH; i++) npair_hist[i] = npair_q[i-1];
    npair_win = '0;
    for (int i = 0; i < PAIR_WIDTH; i++) npair_win += $bits(npair_win)'(npair_hist[i]);
  end

  pulse_stretch #(.WIDTH(TRIG_WIDTH)) u_bit0 (
    .clk(clk), .rst(rst), .event_in(any_trig), .pulse(bit0));
  pulse_stretch #(.WIDTH(BIT3_WIDTH)) u_bit3 (
    .clk(clk), .rst(rst), .event_in(npair != 2'd0), .pulse(bit3));
  pulse_stretch #(.WIDTH(PAIR_WIDTH)) u_bit4 (
    .clk(clk), .rst(rst), .event_in(npair_win >= 2), .pulse(bit4));

endmodule
