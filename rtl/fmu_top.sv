// fmu_top: Flow Monitoring Unit (FMU) built on a two-dimensional hash table.
//
// The unit keeps approximate per-flow packet counts for a router. Instead of
// one large hash table it uses N tables of S buckets each, every table
// addressed by the same Jenkins hash with a different seed (fmu_table). An
// UPDATE(k, v) adds v to the bucket of k in every table at once; a GET(k)
// reads the bucket of k in every table and the selection mechanism
// (fmu_select) combines the N readings into one estimate using the
// technique chosen by q_mode: MIFMU (minimum), MEFMU (median corrected by
// the average bucket value), CEFMU (minimum after subtracting per-bucket
// collision counts) or HYFMU (MIFMU above a threshold, CEFMU below it).
// Collisions make every estimate an approximation; the N independent
// tables reduce their effect.
//
// The unit also keeps sum, the total of all update values, which MEFMU
// needs; it is incremented when an UPDATE leaves the tables, so a GET sees
// exactly the updates issued before it.
//
// Interface: one query per clock while ready is high (q_valid, q_op, q_key,
// q_value for UPDATE, q_mode for GET). ready is low for S cycles after reset
// while the tables are cleared; queries are ignored then. The answer to a
// GET appears on get_valid / get_value FMU_LATENCY = HASH_LAT + 3 = 9 cycles
// after the query was presented, in query order; UPDATEs produce no answer.
// The four estimates are also given separately. threshold is the HYFMU
// threshold, a configuration input. coll_event[i] pulses when table i
// counted a collision and fwd_event[i] when table i forwarded a word just
// written to the following query; total is the running sum.
//
// From the document: N tables of S entries addressed by seeded Jenkins
// hashes, the UPDATE and GET queries on the 5-tuple, the four techniques
// and a selection mechanism returning the chosen one (N = 4, S = 2K per
// table is its main configuration). This design's choices: the per-query
// mode, the handshake, widths, reset clearing and pipeline depth.
module fmu_top
  import fmu_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned S     = 2048,
  parameter int unsigned SUM_W = CNT_W + 16
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              ready,
  input  logic              q_valid,
  input  fmu_op_e           q_op,
  input  flow_key_t         q_key,
  input  logic [CNT_W-1:0]  q_value,
  input  fmu_mode_e         q_mode,
  input  logic [CNT_W-1:0]  threshold,
  output logic              get_valid,
  output logic [CNT_W-1:0]  get_value,
  output logic [CNT_W-1:0]  get_min,
  output logic [CNT_W-1:0]  get_median,
  output logic [CNT_W-1:0]  get_ce,
  output logic [CNT_W-1:0]  get_hybrid,
  output logic              get_hy_min,
  output logic [N-1:0]      coll_event,
  output logic [N-1:0]      fwd_event,
  output logic [SUM_W-1:0]  total
);

  localparam int unsigned TABLE_LAT = HASH_LAT + 1;

  logic [N-1:0]     t_ready;
  logic [N-1:0]     t_valid;
  fmu_op_e          t_op    [N];
  logic [CNT_W-1:0] t_value [N];
  logic [CNT_W-1:0] t_t     [N];
  logic [CNT_W-1:0] t_c     [N];

  assign ready = &t_ready;

  for (genvar i = 0; i < N; i++) begin : g_table
    fmu_table #(
      .S   (S),
      .SEED(FMU_SEED_BASE + 32'(i) * FMU_SEED_STEP)
    ) u_table (
      .clk      (clk),
      .rst_n    (rst_n),
      .ready    (t_ready[i]),
      .in_valid (q_valid && ready),
      .in_op    (q_op),
      .in_key   (q_key),
      .in_value (q_value),
      .out_valid(t_valid[i]),
      .out_op   (t_op[i]),
      .out_value(t_value[i]),
      .out_t    (t_t[i]),
      .out_c    (t_c[i]),
      .out_coll (coll_event[i]),
      .out_fwd  (fwd_event[i])
    );
  end

  // The mode of each query travels alongside it through the tables.
  fmu_mode_e mode_pipe [TABLE_LAT];

  always_ff @(posedge clk) begin
    mode_pipe[0] <= q_mode;
    for (int s = 1; s < TABLE_LAT; s++) mode_pipe[s] <= mode_pipe[s-1];
  end

  // Running total of all update values.
  logic [SUM_W-1:0] sum_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum_q <= '0;
    else if (t_valid[0] && t_op[0] == OP_UPDATE) sum_q <= sum_q + SUM_W'(t_value[0]);
  end

  assign total = sum_q;

  fmu_select #(.N(N), .S(S), .SUM_W(SUM_W)) u_select (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (t_valid[0] && t_op[0] == OP_GET),
    .in_mode   (mode_pipe[TABLE_LAT-1]),
    .in_thresh (threshold),
    .in_t      (t_t),
    .in_c      (t_c),
    .in_sum    (sum_q),
    .out_valid (get_valid),
    .out_value (get_value),
    .out_min   (get_min),
    .out_median(get_median),
    .out_ce    (get_ce),
    .out_hybrid(get_hybrid),
    .out_hy_min(get_hy_min)
  );

  // All tables run in lockstep: they see the same queries with the same
  // latency, so their outputs line up.
  // rst_n disables this check, so lint sees it used both asynchronously
  // (the flops above) and synchronously (here); that is intended.
  for (genvar i = 1; i < N; i++) begin : g_lockstep
    a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
      t_valid[i] == t_valid[0] && (!t_valid[0] || t_op[i] == t_op[0]))
      else $error("fmu_top: table %0d out of step with table 0", i);
  end

endmodule
