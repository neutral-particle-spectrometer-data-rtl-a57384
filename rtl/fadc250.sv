// fadc250: the hit-finding logic of one 16-channel FADC250 module.
//
// Sixteen independent channels, each a fadc_hit_finder with its own
// pedestal and gain and a common hit threshold. The module turns 16
// streams of 12-bit samples (one per 4 ns clock) into 16 clocked streams
// of 13-bit Hits, all with the same latency (NSA+1 cycles from the
// threshold crossing), which the crate's VTP collects.
//
// The channel count and the per-channel pedestal and gain follow the
// document; the threshold being shared by all channels is this design's
// choice (the nominal setting is one value for the whole detector).
module fadc250
  import nps_pkg::*;
#(
  parameter int unsigned NCH       = 16,
  parameter int unsigned NSB       = 4,
  parameter int unsigned NSA       = 9,
  parameter int unsigned DEAD      = 8,
  parameter int unsigned GAIN_FRAC = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SAMPLE_W-1:0] sample   [NCH],
  input  logic [SAMPLE_W-1:0] pedestal [NCH],
  input  logic [GAIN_W-1:0]   gain     [NCH],
  input  logic [HIT_E_W-1:0]  tet,
  output hit_t                hit      [NCH]
);

  for (genvar ch = 0; ch < NCH; ch++) begin : g_ch
    fadc_hit_finder #(
      .NSB(NSB), .NSA(NSA), .DEAD(DEAD), .GAIN_FRAC(GAIN_FRAC)
    ) u_hit (
      .clk     (clk),
      .rst     (rst),
      .sample  (sample[ch]),
      .pedestal(pedestal[ch]),
      .gain    (gain[ch]),
      .tet     (tet),
      .hit     (hit[ch])
    );
  end

endmodule
