// fadc_hit_finder: hit finding and integration for one FADC250 channel.
//
// Each clock a 12-bit sample arrives. The pedestal is subtracted (negative
// results clip to zero), the result is multiplied by the channel gain
// (MeV per count) and saturated to 13 bits. These calibrated samples run
// down a delay line of NSB+NSA taps. A sample that is above the threshold
// TET while the channel is not in its dead time creates a Hit whose value
// is the sum of the NSB samples before it and the NSA samples from it on
// (the crossing sample counted in the NSA part), saturated to 13 bits.
// After a Hit no new Hit can start for DEAD-1 samples, so the next one can
// be at the DEAD-th sample after it at the earliest. A long pulse that stays
// above threshold therefore makes a Hit every DEAD samples.
//
// Interface: sample/pedestal/gain/tet in, hit (valid + energy) out.
// Timing: the Hit of a threshold crossing at input cycle c is presented on
// `hit` in cycle c+NSA+1, i.e. it appears as soon as its last sample is in.
// Every hit has the same latency, so hits of different channels keep their
// relative timing.
//
// Follows the document: pedestal subtraction before threshold, gain applied
// before the threshold, NSB/NSA integration window, 13-bit hit, 8-sample
// dead time. This design's choices: the gain format (unsigned, GAIN_FRAC
// fraction bits), gain applied to each sample before summing, clipping of
// below-pedestal samples, saturation of each sample and of the sum, and a
// strict "greater than" threshold.
module fadc_hit_finder
  import nps_pkg::*;
#(
  parameter int unsigned NSB       = 4,
  parameter int unsigned NSA       = 9,
  parameter int unsigned DEAD      = 8,
  parameter int unsigned GAIN_FRAC = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SAMPLE_W-1:0] sample,
  input  logic [SAMPLE_W-1:0] pedestal,
  input  logic [GAIN_W-1:0]   gain,
  input  logic [HIT_E_W-1:0]  tet,
  output hit_t                hit
);

  localparam int unsigned NTAP  = NSB + NSA;
  localparam int unsigned PROD_W = SAMPLE_W + GAIN_W;
  localparam int unsigned SUM_W = HIT_E_W + $clog2(NTAP + 1);
  localparam logic [HIT_E_W-1:0] E_MAX = '1;
  localparam int unsigned DCNT_W = $clog2(DEAD + 1);

  // ---- calibration: pedestal, gain, saturation -------------------------
  logic [SAMPLE_W-1:0] above_ped;
  logic [PROD_W-1:0]   product;
  logic [PROD_W-1:0]   scaled;
  logic [HIT_E_W-1:0]  cal;

  always_comb begin
    above_ped = (sample > pedestal) ? sample - pedestal : '0;
    product   = PROD_W'(above_ped) * PROD_W'(gain);
    scaled    = product >> GAIN_FRAC;
    cal       = (scaled > PROD_W'(E_MAX)) ? E_MAX : scaled[HIT_E_W-1:0];
  end

  // ---- delay line: taps[0] newest, taps[NTAP-1] oldest -----------------
  logic [HIT_E_W-1:0] taps [NTAP];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NTAP; i++) taps[i] <= '0;
    end else begin
      taps[0] <= cal;
      for (int i = 1; i < NTAP; i++) taps[i] <= taps[i-1];
    end
  end

  // The candidate sample sits at tap NSA-1: NSA-1 later samples are in front
  // of it and NSB earlier samples behind it, so the whole window is present.
  logic [HIT_E_W-1:0] cand;
  logic [SUM_W-1:0]   win_sum;
  logic [DCNT_W-1:0]  dead_cnt;
  logic               fire;

  always_comb begin
    cand    = taps[NSA-1];
    win_sum = '0;
    for (int i = 0; i < NTAP; i++) win_sum += SUM_W'(taps[i]);
    fire    = (cand > tet) && (dead_cnt == '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dead_cnt <= '0;
      hit      <= '0;
    end else begin
      if (fire)                dead_cnt <= DCNT_W'(DEAD - 1);
      else if (dead_cnt != '0) dead_cnt <= dead_cnt - 1'b1;
      hit.valid  <= fire;
      hit.energy <= !fire ? '0
                  : (win_sum > SUM_W'(E_MAX)) ? E_MAX : win_sum[HIT_E_W-1:0];
    end
  end

endmodule
