// nps_top: trigger logic of the Neutral Particle Spectrometer calorimeter.
//
// The calorimeter is a 36-row x 30-column array of crystals, each read by
// one FADC250 channel. The channels are spread over NCRATES crates; crate
// k reads the CRATE_COLS columns k*CRATE_COLS .. k*CRATE_COLS+CRATE_COLS-1,
// row by row, through NFADC 16-channel FADC250 modules (crate-local
// channel n = 16*module + channel sits at row n / CRATE_COLS, column
// n % CRATE_COLS; the last channels of the last module are unused).
// Each crate's VTP receives its own Hit streams plus the adjacent column
// of each neighbouring crate, builds clusters and drives bits 0, 3 and 4.
// One V1495 combines the bits of all crates into the TS1 (single-cluster)
// and TS6 (cluster-pair) trigger outputs.
//
// Interface: one 12-bit sample per crystal per 4 ns clock, per-crystal
// pedestal and gain, the hit threshold tet and the VTP thresholds cfg.
// Out: ts1, ts6, every VTP's bits and the cluster stream of the whole
// detector (one word per seed crystal per clock).
// Timing: a threshold crossing in cycle c gives its Hit in c+NSA+1, the
// cluster of a seed in c+NSA+HIT_DT+3, the VTP bits one cycle later and
// TS1/TS6 one cycle after that: c+NSA+HIT_DT+5 (19 clocks, 76 ns, with the
// nominal settings).
//
// The crystal count, the module types and how they are chained follow the
// document. The column-wise split into crates, the channel order and the
// one-column halo are this design's choices.
module nps_top
  import nps_pkg::*;
#(
  parameter int unsigned ROWS       = 36,
  parameter int unsigned NCRATES    = 5,
  parameter int unsigned CRATE_COLS = 6,
  parameter int unsigned NSB        = 4,
  parameter int unsigned NSA        = 9,
  parameter int unsigned DEAD       = 8,
  parameter int unsigned GAIN_FRAC  = 8,
  parameter int unsigned HIT_DT     = 5,
  parameter int unsigned TRIG_WIDTH = 5,
  parameter int unsigned PAIR_WIDTH = 5
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SAMPLE_W-1:0] sample   [ROWS][NCRATES*CRATE_COLS],
  input  logic [SAMPLE_W-1:0] pedestal [ROWS][NCRATES*CRATE_COLS],
  input  logic [GAIN_W-1:0]   gain     [ROWS][NCRATES*CRATE_COLS],
  input  logic [HIT_E_W-1:0]  tet,
  input  vtp_cfg_t            cfg,
  output cluster_t            clusters [ROWS][NCRATES*CRATE_COLS],
  output logic [NCRATES-1:0]  vtp_bit0,
  output logic [NCRATES-1:0]  vtp_bit3,
  output logic [NCRATES-1:0]  vtp_bit4,
  output logic                ts1,
  output logic                ts6
);

  localparam int unsigned NCOLS = NCRATES * CRATE_COLS;
  localparam int unsigned NCH   = 16;
  localparam int unsigned CRATE_CH = ROWS * CRATE_COLS;
  localparam int unsigned NFADC = (CRATE_CH + NCH - 1) / NCH;

  hit_t hits [ROWS][NCOLS];

  for (genvar k = 0; k < NCRATES; k++) begin : g_crate
    // ---- FADC250 modules of this crate --------------------------------
    for (genvar m = 0; m < NFADC; m++) begin : g_fadc
      logic [SAMPLE_W-1:0] f_sample [NCH];
      logic [SAMPLE_W-1:0] f_ped    [NCH];
      logic [GAIN_W-1:0]   f_gain   [NCH];
      hit_t                f_hit    [NCH];

      for (genvar ch = 0; ch < NCH; ch++) begin : g_map
        localparam int unsigned N = m * NCH + ch;
        if (N < CRATE_CH) begin : g_used
          localparam int unsigned R = N / CRATE_COLS;
          localparam int unsigned C = k * CRATE_COLS + N % CRATE_COLS;
          assign f_sample[ch] = sample[R][C];
          assign f_ped[ch]    = pedestal[R][C];
          assign f_gain[ch]   = gain[R][C];
          assign hits[R][C]   = f_hit[ch];
        end else begin : g_unused
          assign f_sample[ch] = '0;
          assign f_ped[ch]    = '0;
          assign f_gain[ch]   = '0;
        end
      end

      fadc250 #(
        .NCH(NCH), .NSB(NSB), .NSA(NSA), .DEAD(DEAD), .GAIN_FRAC(GAIN_FRAC)
      ) u_fadc (
        .clk     (clk),
        .rst     (rst),
        .sample  (f_sample),
        .pedestal(f_ped),
        .gain    (f_gain),
        .tet     (tet),
        .hit     (f_hit)
      );
    end

    // ---- VTP: own columns plus one halo column on each side -----------
    hit_t     v_hits [ROWS][CRATE_COLS+2];
    cluster_t v_clus [ROWS][CRATE_COLS];

    for (genvar r = 0; r < ROWS; r++) begin : g_vr
      for (genvar j = 0; j < CRATE_COLS + 2; j++) begin : g_vc
        localparam int GC = int'(k * CRATE_COLS + j) - 1;
        if (GC >= 0 && GC < int'(NCOLS)) begin : g_in
          assign v_hits[r][j] = hits[r][GC];
        end else begin : g_edge
          assign v_hits[r][j] = '0;
        end
      end
      for (genvar j = 0; j < CRATE_COLS; j++) begin : g_oc
        assign clusters[r][k*CRATE_COLS+j] = v_clus[r][j];
      end
    end

    vtp #(
      .ROWS(ROWS), .COLS(CRATE_COLS), .HIT_DT(HIT_DT),
      .TRIG_WIDTH(TRIG_WIDTH), .PAIR_WIDTH(PAIR_WIDTH)
    ) u_vtp (
      .clk     (clk),
      .rst     (rst),
      .cfg     (cfg),
      .hits    (v_hits),
      .clusters(v_clus),
      .bit0    (vtp_bit0[k]),
      .bit3    (vtp_bit3[k]),
      .bit4    (vtp_bit4[k])
    );
  end

  v1495_trigger #(.NVTP(NCRATES)) u_v1495 (
    .clk (clk),
    .rst (rst),
    .bit0(vtp_bit0),
    .bit3(vtp_bit3),
    .bit4(vtp_bit4),
    .ts1 (ts1),
    .ts6 (ts6)
  );

endmodule
