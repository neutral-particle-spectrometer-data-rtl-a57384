// nps_pkg: types and default settings shared by the NPS trigger logic.
//
// The logic runs on the 250 MHz FADC sample clock (4 ns per cycle); every
// time window below is a number of these cycles. Energies are in MeV with
// 1 MeV per LSB: a hit carries 13 bits, a cluster 14 bits, both saturating.
// The default numbers are the nominal settings of the spectrometer (hit
// threshold 10 MeV, seed threshold 50 MeV, single-cluster trigger 900 MeV,
// pair threshold 500 MeV, 20 ns windows). The crate geometry (5 crates of
// 6 columns x 36 rows) and the fixed-point gain format are this design's
// choices.
package nps_pkg;

  // Detector geometry: 30 columns x 36 rows of crystals.
  localparam int unsigned NPS_ROWS = 36;
  localparam int unsigned NPS_COLS = 30;
  localparam int unsigned NPS_CRATES = 5;
  localparam int unsigned NPS_CRATE_COLS = NPS_COLS / NPS_CRATES;

  localparam int unsigned SAMPLE_W = 12;  // ADC sample width
  localparam int unsigned HIT_E_W = 13;  // hit energy width
  localparam int unsigned CLUS_E_W = 14;  // cluster energy width
  localparam int unsigned GAIN_W = 16;  // gain word width
  localparam int unsigned NHIT_W = 6;  // hits-per-cluster counter width

  localparam int unsigned CLOCK_NS = 4;

  // One hit in the clocked hit stream of a channel.
  typedef struct packed {
    logic                valid;
    logic [HIT_E_W-1:0]  energy;
  } hit_t;

  // One cluster, reported at the position of its seed crystal.
  typedef struct packed {
    logic                valid;
    logic [CLUS_E_W-1:0] energy;
    logic [NHIT_W-1:0]   nhits;
  } cluster_t;

  // Run-time thresholds of a VTP.
  typedef struct packed {
    logic [CLUS_E_W-1:0] seed_thr;
    logic [NHIT_W-1:0]   nhit_min;
    logic [CLUS_E_W-1:0] trigger_thr;
    logic [CLUS_E_W-1:0] pair_thr;
  } vtp_cfg_t;

  // Nominal settings.
  localparam logic [HIT_E_W-1:0]  DEF_TET         = 13'd10;
  localparam logic [CLUS_E_W-1:0] DEF_SEED_THR    = 14'd50;
  localparam logic [NHIT_W-1:0]   DEF_NHIT_MIN    = 6'd1;
  localparam logic [CLUS_E_W-1:0] DEF_TRIGGER_THR = 14'd900;
  localparam logic [CLUS_E_W-1:0] DEF_PAIR_THR    = 14'd500;
  localparam logic [GAIN_W-1:0]   DEF_GAIN        = 16'h0100;  // 1.0 MeV/count
  localparam logic [SAMPLE_W-1:0] DEF_PEDESTAL    = 12'd410;  // ~10% of full scale

  localparam vtp_cfg_t DEF_VTP_CFG = '{
    seed_thr:    DEF_SEED_THR,
    nhit_min:    DEF_NHIT_MIN,
    trigger_thr: DEF_TRIGGER_THR,
    pair_thr:    DEF_PAIR_THR
  };

endpackage
