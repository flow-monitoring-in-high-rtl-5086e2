// fmu_trace_runner: drives one fmu_top of a given size with a synthetic
// packet trace and checks every GET answer against a reference model.
//
// Used by tb_fmu_workloads to run the table sizes and table counts of the
// error-rate study side by side. The trace: NFLOWS flows with a skewed size
// distribution (a few heavy flows, many small ones), one UPDATE(k, 1) per
// packet, GETs mixed in; afterwards GET for every flow in all four modes.
// The model keeps its own copy of every table and combines the readings
// with the four techniques; answers must arrive FMU_LATENCY cycles after
// the query. When finished it raises done and prints the average relative
// error of each technique against the true flow sizes.
module fmu_trace_runner #(
  parameter int unsigned N      = 4,
  parameter int unsigned S      = 2048,
  parameter int unsigned NFLOWS = 3000,
  parameter int unsigned NPKTS  = 24000
) (
  output bit done,
  output int checks,
  output int failures,
  output real err_pct [4]
);
  import fmu_pkg::*;
  import fmu_ref_pkg::*;

  localparam logic [CNT_W-1:0] THRESH = 20;

  logic clk = 1'b0, rst_n = 1'b1;
  logic ready;
  logic q_valid = 1'b0;
  fmu_op_e q_op = OP_GET;
  flow_key_t q_key = '0;
  logic [CNT_W-1:0] q_value = '0;
  fmu_mode_e q_mode = MODE_MIN;
  logic [CNT_W-1:0] threshold = THRESH;
  logic get_valid, get_hy_min;
  logic [CNT_W-1:0] get_value, get_min, get_median, get_ce, get_hybrid;
  logic [N-1:0] coll_event, fwd_event;
  logic [CNT_W+15:0] total;

  longint cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fmu_top #(.N(N), .S(S)) dut (.*);

  // ---------------------------------------------------------------- model
  longint unsigned mt [N][S];
  longint unsigned mc [N][S];
  logic [31:0] mtag [N][S];
  bit mtv [N][S];
  longint unsigned msum = 0;
  int last_idx [N];
  bit last_upd = 0, last_v = 0;
  int m_coll [N], m_fwd [N], d_coll [N], d_fwd [N];

  flow_key_t keys [NFLOWS];
  int unsigned truth [NFLOWS];
  int unsigned fidx [N][NFLOWS];
  logic [31:0] fhash [N][NFLOWS];

  typedef struct { longint unsigned mi, me, ce, hy, sel; bit hymin, clamped; longint cyc; int flow; fmu_mode_e mode; } exp_t;
  exp_t q [$];

  int n_mode [4];
  int n_hymin = 0, n_hyce = 0, n_clamp = 0, n_get = 0, n_upd = 0, n_ignored = 0;
  real err_sum [4];
  int  err_n = 0;
  bit  collect_err = 0;
  longint last_get_cyc = -10;
  int  b2b_gets = 0;

  function automatic exp_t model_get(int f, fmu_mode_e mode);
    exp_t e;
    longint v [N];
    longint tmp, avg, d;
    avg = longint'(msum / S);
    e.mi = 64'hFFFF_FFFF; e.ce = 64'hFFFF_FFFF;
    for (int i = 0; i < N; i++) begin
      int b;
      b = fidx[i][f];
      if (mt[i][b] < e.mi) e.mi = mt[i][b];
      d = longint'(mt[i][b]) - longint'(mc[i][b]);
      if (d < 0) d = 0;
      if (d < e.ce) e.ce = d;
      v[i] = longint'(mt[i][b]) - avg;
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N - 1 - i; j++)
        if (v[j] > v[j+1]) begin tmp = v[j]; v[j] = v[j+1]; v[j+1] = tmp; end
    if (N % 2 == 1) tmp = 2 * v[N/2];
    else            tmp = v[(N > 1) ? N/2-1 : 0] + v[N/2];
    e.me = (tmp >= 0) ? tmp / 2 : 0;
    e.clamped = (tmp < 0);
    e.hymin = (e.mi >= THRESH);
    e.hy = e.hymin ? e.mi : e.ce;
    case (mode)
      MODE_MIN: e.sel = e.mi;
      MODE_MEDIAN: e.sel = e.me;
      MODE_CE: e.sel = e.ce;
      default: e.sel = e.hy;
    endcase
    e.mode = mode; e.flow = f; e.cyc = cycle;
    return e;
  endfunction

  task automatic issue(fmu_op_e op, int f, fmu_mode_e mode);
    for (int i = 0; i < N; i++) begin
      int b;
      b = fidx[i][f];
      if (last_v && last_upd && last_idx[i] == b) m_fwd[i]++;
      last_idx[i] = b;
      if (op == OP_UPDATE) begin
        if (mtv[i][b] && mtag[i][b] != fhash[i][f]) begin mc[i][b]++; m_coll[i]++; end
        mt[i][b]++;
        mtag[i][b] = fhash[i][f]; mtv[i][b] = 1;
      end
    end
    if (op == OP_UPDATE) begin msum++; truth[f]++; n_upd++; end
    else begin q.push_back(model_get(f, mode)); n_get++; n_mode[mode]++; end
    last_v = 1; last_upd = (op == OP_UPDATE);
    q_valid = 1'b1; q_op = op; q_key = keys[f]; q_value = 1; q_mode = mode;
  endtask

  task automatic idle();
    q_valid = 1'b0; last_v = 0;
  endtask

  // ------------------------------------------------------------ checking
  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        if (coll_event[i]) d_coll[i]++;
        if (fwd_event[i]) d_fwd[i]++;
      end
    end
    if (rst_n && get_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL: unexpected answer at %0d", cycle); end
      else begin
        e = q.pop_front();
        if (get_value != CNT_W'(e.sel) || get_min != CNT_W'(e.mi) || get_median != CNT_W'(e.me) ||
            get_ce != CNT_W'(e.ce) || get_hybrid != CNT_W'(e.hy) || get_hy_min != e.hymin) begin
          failures++;
          $display("FAIL: flow %0d mode %0d: got %0d (mi %0d me %0d ce %0d hy %0d), expected %0d (%0d %0d %0d %0d)",
                   e.flow, e.mode, get_value, get_min, get_median, get_ce, get_hybrid,
                   e.sel, e.mi, e.me, e.ce, e.hy);
        end
        checks++;
        if (cycle - e.cyc != 64'(FMU_LATENCY)) begin
          failures++; $display("FAIL: latency %0d, expected %0d", cycle - e.cyc, FMU_LATENCY);
        end
        if (cycle == last_get_cyc + 1) b2b_gets++;
        last_get_cyc = cycle;
        if (e.hymin) n_hymin++; else n_hyce++;
        if (e.clamped) n_clamp++;
        if (collect_err) begin
          real t;
          t = real'(truth[e.flow]);
          err_sum[e.mode] += ((real'(get_value) > t) ? real'(get_value) - t : t - real'(get_value)) / t;
          if (e.mode == MODE_MIN) err_n++;
        end
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    longint t0;
    int f;
    for (int i = 0; i < N; i++) begin
      last_idx[i] = -1; m_coll[i] = 0; m_fwd[i] = 0; d_coll[i] = 0; d_fwd[i] = 0;
      for (int b = 0; b < S; b++) begin mt[i][b] = 0; mc[i][b] = 0; mtag[i][b] = 0; mtv[i][b] = 0; end
    end
    checks = 0; failures = 0; done = 0;
    for (int m = 0; m < 4; m++) begin n_mode[m] = 0; err_sum[m] = 0.0; err_pct[m] = 0.0; end
    for (int k = 0; k < NFLOWS; k++) begin
      keys[k] = rand_key();
      truth[k] = 0;
      for (int i = 0; i < N; i++) begin
        fhash[i][k] = ref_hash(keys[k], ref_seed(i));
        fidx[i][k]  = ref_index(fhash[i][k], S);
      end
    end

    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    t0 = cycle;
    // Offered while the tables are cleared: must be ignored.
    q_valid = 1'b1; q_op = OP_UPDATE; q_key = keys[0]; q_value = 1000;
    n_ignored++;
    @(negedge clk) q_valid = 1'b0;
    while (!ready) @(negedge clk);
    checks++;
    if (cycle - t0 != 64'(S)) begin failures++; $display("FAIL: clear took %0d cycles", cycle - t0); end

    // Packet trace: flow sizes skewed (a few heavy flows, many mice);
    // packets of one flow often come in bursts.
    f = 0;
    for (int p = 0; p < NPKTS; p++) begin
      @(negedge clk);
      if ($urandom_range(0, 2) != 0) begin
        case ($urandom_range(0, 9))
          0, 1, 2, 3: f = $urandom_range(0, 19);             // heavy flows
          4, 5:       f = $urandom_range(0, 299);
          default:    f = $urandom_range(0, NFLOWS - 1);     // mice
        endcase
      end
      case ($urandom_range(0, 15))
        0: idle();
        1: issue(OP_GET, $urandom_range(0, NFLOWS - 1), fmu_mode_e'($urandom_range(0, 3)));
        default: issue(OP_UPDATE, f, MODE_MIN);
      endcase
    end
    // Make sure every flow has at least one packet.
    for (int k = 0; k < NFLOWS; k++) begin
      if (truth[k] == 0) begin @(negedge clk); issue(OP_UPDATE, k, MODE_MIN); end
    end

    // Query every flow in every mode, back to back.
    @(negedge clk) idle();
    repeat (FMU_LATENCY + 2) @(posedge clk);
    collect_err = 1;
    for (int m = 0; m < 4; m++) begin
      for (int k = 0; k < NFLOWS; k++) begin
        @(negedge clk);
        issue(OP_GET, k, fmu_mode_e'(m));
      end
    end
    @(negedge clk) idle();
    repeat (FMU_LATENCY + 4) @(posedge clk);

    // End-of-run checks.
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d answers missing", q.size()); end
    checks++;
    if (total != (CNT_W+16)'(msum)) begin failures++; $display("FAIL: total %0d expected %0d", total, msum); end
    for (int i = 0; i < N; i++) begin
      checks += 2;
      if (d_coll[i] != m_coll[i]) begin failures++; $display("FAIL: table %0d collisions %0d expected %0d", i, d_coll[i], m_coll[i]); end
      if (d_fwd[i] != m_fwd[i]) begin failures++; $display("FAIL: table %0d forwards %0d expected %0d", i, d_fwd[i], m_fwd[i]); end
    end
    // Every mechanism must have happened.
    checks += 9;
    if (n_ignored == 0) failures++;
    if (m_coll[0] == 0) begin failures++; $display("FAIL: no collision"); end
    if (m_fwd[0] == 0) begin failures++; $display("FAIL: no forwarding"); end
    for (int m = 0; m < 4; m++) if (n_mode[m] == 0) begin failures++; $display("FAIL: mode %0d unused", m); end
    if (n_hymin == 0 || n_hyce == 0) begin failures++; $display("FAIL: hybrid did not take both sides"); end
    if (n_clamp == 0 && msum / S > 0) begin failures++; $display("FAIL: no median clamp"); end
    checks++;
    if (b2b_gets < 1000) begin failures++; $display("FAIL: answers not one per clock"); end

    for (int m = 0; m < 4; m++) err_pct[m] = 100.0 * err_sum[m] / err_n;
    $display("N=%0d S=%0d: %0d updates, %0d collisions (table 0), error MIFMU %0.1f%% MEFMU %0.1f%% CEFMU %0.1f%% HYFMU %0.1f%%",
             N, S, n_upd, m_coll[0], err_pct[0], err_pct[1], err_pct[2], err_pct[3]);
    done = 1;
  end

endmodule
