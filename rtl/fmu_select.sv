// fmu_select: the FMU's selection mechanism, turning the N table readings of
// a GET into one flow-size estimate.
//
// For a GET(k), table i supplies T_i = T_i[h_i(k)] and C_i = C_i[h_i(k)],
// and the unit knows sum, the total of all UPDATE values so far (every
// update adds its value to one bucket of each table, so sum is the same for
// every table). Four estimates are computed in parallel:
//   MIFMU  min_i T_i
//   MEFMU  median_i (T_i - sum/S)             (sum/S: the average bucket)
//   CEFMU  min_i (T_i - C_i)
//   HYFMU  MIFMU - D, where D = MIFMU - CEFMU if MIFMU < threshold, else 0;
//          that is, the min estimate for flows at or above the threshold
//          and the collision estimate for smaller ones.
// in_mode selects which one is returned on out_value; all four are also
// brought out for observation.
//
// Timing: two register stages. Inputs with in_valid in cycle t give
// out_valid in cycle t + 2, one result per clock.
//
// From the document: the four formulas, the use of a threshold to pick the
// min estimate for large and the collision estimate for small flows, and
// the difference of the two as the means. This design's choices: T_i - C_i
// and the median saturate at zero, because a flow size cannot be negative;
// sum/S rounds down; for an even N the median is the mean of the two middle
// values, rounded down; the hybrid compares the min estimate with the
// threshold, inclusive on the min side.
module fmu_select
  import fmu_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned S     = 2048,
  parameter int unsigned SUM_W = CNT_W + 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  fmu_mode_e         in_mode,
  input  logic [CNT_W-1:0]  in_thresh,
  input  logic [CNT_W-1:0]  in_t   [N],
  input  logic [CNT_W-1:0]  in_c   [N],
  input  logic [SUM_W-1:0]  in_sum,
  output logic              out_valid,
  output logic [CNT_W-1:0]  out_value,
  output logic [CNT_W-1:0]  out_min,
  output logic [CNT_W-1:0]  out_median,
  output logic [CNT_W-1:0]  out_ce,
  output logic [CNT_W-1:0]  out_hybrid,
  output logic              out_hy_min     // hybrid took the min estimate
);

  localparam int unsigned SW = CNT_W + 2;   // signed width of T_i - sum/S

  // ------------------------------------------------------- stage A: inputs
  logic              a_valid;
  fmu_mode_e         a_mode;
  logic [CNT_W-1:0]  a_thresh;
  logic [CNT_W-1:0]  a_t [N];
  logic [CNT_W-1:0]  a_c [N];
  logic [SUM_W-1:0]  a_sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_valid <= 1'b0;
    else        a_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    a_mode   <= in_mode;
    a_thresh <= in_thresh;
    a_t      <= in_t;
    a_c      <= in_c;
    a_sum    <= in_sum;
  end

  // ------------------------------------------- stage B: the four estimates
  logic [SUM_W-1:0]        avg_full;
  logic [CNT_W-1:0]        avg;
  logic [CNT_W-1:0]        ce_i [N];
  logic signed [SW-1:0]    me_i [N];
  int unsigned             rank [N];
  logic signed [SW-1:0]    lo_mid, hi_mid;
  logic signed [SW:0]      mid_sum;
  logic signed [SW-1:0]    med_s;
  logic [CNT_W-1:0]        mi, ce, me, hy, dif;
  logic                    hy_min;
  logic [CNT_W-1:0]        sel;

  always_comb begin
    avg_full = a_sum / SUM_W'(S);
    avg      = (avg_full > SUM_W'({CNT_W{1'b1}})) ? {CNT_W{1'b1}} : avg_full[CNT_W-1:0];

    mi = a_t[0];
    ce = '1;
    for (int i = 0; i < N; i++) begin
      if (a_t[i] < mi) mi = a_t[i];
      ce_i[i] = (a_t[i] > a_c[i]) ? a_t[i] - a_c[i] : '0;
      if (ce_i[i] < ce) ce = ce_i[i];
      me_i[i] = $signed({2'b00, a_t[i]}) - $signed({2'b00, avg});
    end

    // Rank of each corrected value; ties are ordered by table number so
    // that the ranks are a permutation of 0..N-1.
    for (int i = 0; i < N; i++) begin
      rank[i] = 0;
      for (int j = 0; j < N; j++) begin
        if ((me_i[j] < me_i[i]) || ((me_i[j] == me_i[i]) && (j < i))) rank[i]++;
      end
    end
    lo_mid = '0;
    hi_mid = '0;
    for (int i = 0; i < N; i++) begin
      if (rank[i] == (N - 1) / 2) lo_mid = me_i[i];
      if (rank[i] == N / 2)       hi_mid = me_i[i];
    end
    mid_sum = (SW+1)'(lo_mid) + (SW+1)'(hi_mid);
    med_s   = SW'(mid_sum >>> 1);
    me      = (med_s < 0) ? '0 : med_s[CNT_W-1:0];

    hy_min = (mi >= a_thresh);
    dif    = hy_min ? '0 : mi - ce;
    hy     = mi - dif;

    case (a_mode)
      MODE_MIN:    sel = mi;
      MODE_MEDIAN: sel = me;
      MODE_CE:     sel = ce;
      default:     sel = hy;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= a_valid;
  end

  always_ff @(posedge clk) begin
    out_value  <= sel;
    out_min    <= mi;
    out_median <= me;
    out_ce     <= ce;
    out_hybrid <= hy;
    out_hy_min <= hy_min;
  end

endmodule
