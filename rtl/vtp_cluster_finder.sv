// vtp_cluster_finder: real-time 3x3 cluster finding over one crate.
//
// Input is one hit stream per crystal of a ROWS x (COLS+2) block: the COLS
// columns read out by this crate plus one halo column on each side taken
// from the neighbouring crates (zero at the edge of the detector). Seeds
// are searched only in the COLS own columns, so every crystal is a seed
// candidate in exactly one crate.
//
// A delay line keeps the last 2*W+1 hit words of every crystal, W being the
// coincidence window HIT_DT in clock cycles. The hit in the middle tap, at
// time t, is judged when the window around it is complete:
//  * it is a seed if its energy exceeds seed_thr and it is a local maximum
//    in space and time: no hit of the 3x3 neighbourhood (the seed crystal
//    itself at other times included) in [t-W, t+W] is larger. On equal
//    energies the earlier hit wins, and at the same time the crystal with
//    the lower (row, column) index wins, so of two touching equal seeds only
//    one survives. This is what merges two seeds that are not separated by a
//    lower hit into one cluster owned by the larger seed;
//  * its cluster energy is the seed plus every hit of the 8 surrounding
//    crystals in [t, t+W], the window following the seed hit, saturated to
//    14 bits; nhits counts the hits summed, seed included;
//  * the cluster is reported if it is a seed and nhits >= nhit_min.
// Two seeds separated by a lower crystal both make clusters; a hit in the
// overlap is counted in full by each of them.
//
// Interface: hits[ROWS][COLS+2] in, clusters[ROWS][COLS] out, one cluster
// word per seed crystal per clock; cfg carries the thresholds.
// Timing: a seed hit presented in cycle c gives its cluster in cycle c+W+2,
// so all clusters keep the time order of their seed hits.
//
// Follows the document: seed threshold, local maximum in space and time,
// 3x3 sum, neighbours taken only in the HIT_DT window following the seed,
// merging of seeds not separated by a lower hit, 14-bit saturated energy,
// minimum hit count. This design's choices: the +-W time span of the
// local-maximum test, the tie-break order, counting shared hits in full
// in each cluster, strict "greater than" for the seed threshold.
module vtp_cluster_finder
  import nps_pkg::*;
#(
  parameter int unsigned ROWS = 36,
  parameter int unsigned COLS = 6,
  parameter int unsigned W    = 5   // HIT_DT = 20 ns = 5 clocks
) (
  input  logic     clk,
  input  logic     rst,
  input  vtp_cfg_t cfg,
  input  hit_t     hits     [ROWS][COLS+2],
  output cluster_t clusters [ROWS][COLS]
);

  localparam int unsigned GC    = COLS + 2;     // columns incl. halo
  localparam int unsigned DEPTH = 2 * W + 1;    // taps per crystal
  localparam int unsigned NTERM = 1 + 8 * (W + 1);
  localparam int unsigned CNT_W = $clog2(NTERM + 1);
  localparam int unsigned SUM_W = HIT_E_W + CNT_W;
  localparam logic [CLUS_E_W-1:0] CE_MAX = '1;
  localparam logic [NHIT_W-1:0]   NH_MAX = '1;

  // hist[k]: the hit words of k cycles ago (k = 0 is the newest registered).
  hit_t hist [DEPTH][ROWS][GC];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < DEPTH; k++)
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < GC; c++) hist[k][r][c] <= '0;
    end else begin
      hist[0] <= hits;
      for (int k = 1; k < DEPTH; k++) hist[k] <= hist[k-1];
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned GCOL = c + 1;  // column in the halo'd block

      hit_t             seed;
      logic             is_max;
      logic [SUM_W-1:0] esum;
      logic [CNT_W-1:0] ncnt;
      cluster_t         clus_d;

      always_comb begin
        hit_t q;
        logic beats;
        seed   = hist[W][r][GCOL];
        is_max = 1'b1;
        esum   = SUM_W'(seed.energy);
        ncnt   = CNT_W'(1);
        for (int dr = -1; dr <= 1; dr++) begin
          for (int dc = -1; dc <= 1; dc++) begin
            for (int k = 0; k < DEPTH; k++) begin
              if ((r + dr >= 0) && (r + dr < ROWS) && !(dr == 0 && dc == 0 && k == W)) begin
                q = hist[k][r+dr][GCOL+dc];
                // k > W: q is earlier than the seed; (dr,dc) < (0,0): lower index.
                beats = q.valid &&
                        ((q.energy > seed.energy) ||
                         ((q.energy == seed.energy) &&
                          ((k > W) || ((k == W) && ((dr < 0) || (dr == 0 && dc < 0))))));
                if (beats) is_max = 1'b0;
                // neighbours in the window following the seed: k = W .. 0
                if (!(dr == 0 && dc == 0) && (k <= W) && q.valid) begin
                  esum += SUM_W'(q.energy);
                  ncnt += 1'b1;
                end
              end
            end
          end
        end
        clus_d.valid  = seed.valid && (CLUS_E_W'(seed.energy) > cfg.seed_thr)
                        && is_max && (int'(ncnt) >= int'(cfg.nhit_min));
        clus_d.energy = (esum > SUM_W'(CE_MAX)) ? CE_MAX : CLUS_E_W'(esum);
        clus_d.nhits  = (int'(ncnt) > int'(NH_MAX)) ? NH_MAX : NHIT_W'(ncnt);
        if (!clus_d.valid) begin
          clus_d.energy = '0;
          clus_d.nhits  = '0;
        end
      end

      always_ff @(posedge clk) begin
        if (rst) clusters[r][c] <= '0;
        else     clusters[r][c] <= clus_d;
      end
    end
  end

endmodule
