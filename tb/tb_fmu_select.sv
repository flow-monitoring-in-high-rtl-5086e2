// tb_fmu_select: self-checking testbench for fmu_select.
//
// Drives random table readings T_i, collision counts C_i (some larger than
// T_i), running sums and thresholds, one set per cycle in every mode, and
// compares all four estimates and the selected output with a model that
// sorts the corrected values to find the median. Also checks the two-cycle
// latency and that each of the following happened: a negative median
// clamped to zero, the hybrid choosing the min estimate, and the hybrid
// choosing the collision estimate.
module tb_fmu_select;
  import fmu_pkg::*;

  localparam int unsigned N = 4;
  localparam int unsigned S = 2048;
  localparam int unsigned SUM_W = CNT_W + 16;

  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0;
  fmu_mode_e in_mode = MODE_MIN;
  logic [CNT_W-1:0] in_thresh = '0;
  logic [CNT_W-1:0] in_t [N];
  logic [CNT_W-1:0] in_c [N];
  logic [SUM_W-1:0] in_sum = '0;
  logic out_valid, out_hy_min;
  logic [CNT_W-1:0] out_value, out_min, out_median, out_ce, out_hybrid;
  int checks = 0, failures = 0;
  int n_clamp = 0, n_hymin = 0, n_hyce = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fmu_select #(.N(N), .S(S), .SUM_W(SUM_W)) dut (.*);

  typedef struct {
    longint mi, me, ce, hy, sel; bit hymin; longint t;
  } exp_t;
  exp_t q [$];

  function automatic exp_t model(fmu_mode_e mode, logic [CNT_W-1:0] thr);
    exp_t e;
    longint v [N];
    longint tmp, avg;
    avg = longint'(in_sum) / S;
    if (avg > 64'hFFFF_FFFF) avg = 64'hFFFF_FFFF;
    e.mi = in_t[0]; e.ce = 64'hFFFF_FFFF;
    for (int i = 0; i < N; i++) begin
      longint d;
      if (in_t[i] < e.mi) e.mi = in_t[i];
      d = longint'(in_t[i]) - longint'(in_c[i]);
      if (d < 0) d = 0;
      if (d < e.ce) e.ce = d;
      v[i] = longint'(in_t[i]) - avg;
    end
    // bubble sort
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N - 1 - i; j++)
        if (v[j] > v[j+1]) begin tmp = v[j]; v[j] = v[j+1]; v[j+1] = tmp; end
    if (N % 2 == 1) e.me = v[N/2];
    else begin
      tmp = v[N/2-1] + v[N/2];
      e.me = (tmp >= 0) ? tmp / 2 : -((-tmp + 1) / 2);   // floor
    end
    if (e.me < 0) e.me = 0;
    e.hymin = (e.mi >= thr);
    e.hy = e.hymin ? e.mi : e.ce;
    case (mode)
      MODE_MIN: e.sel = e.mi;
      MODE_MEDIAN: e.sel = e.me;
      MODE_CE: e.sel = e.ce;
      default: e.sel = e.hy;
    endcase
    e.t = cycle;
    return e;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
      else begin
        e = q.pop_front();
        if (out_min != e.mi || out_median != e.me || out_ce != e.ce || out_hybrid != e.hy
            || out_value != e.sel || out_hy_min != e.hymin) begin
          failures++;
          $display("FAIL: got mi=%0d me=%0d ce=%0d hy=%0d sel=%0d, expected %0d %0d %0d %0d %0d",
                   out_min, out_median, out_ce, out_hybrid, out_value, e.mi, e.me, e.ce, e.hy, e.sel);
        end
        checks++;
        if (cycle - e.t != 2) begin failures++; $display("FAIL: latency %0d", cycle - e.t); end
      end
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    for (int i = 0; i < N; i++) begin in_t[i] = '0; in_c[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_mode  = fmu_mode_e'($urandom_range(0, 3));
      in_sum   = SUM_W'($urandom_range(0, 2000000)) * SUM_W'($urandom_range(1, 4));
      if ($urandom_range(0, 20) == 0) in_sum = {SUM_W{1'b1}};
      for (int i = 0; i < N; i++) begin
        case ($urandom_range(0, 2))
          0: in_t[i] = $urandom_range(0, 50);
          1: in_t[i] = $urandom_range(0, 5000);
          default: in_t[i] = $urandom;
        endcase
        in_c[i] = ($urandom_range(0, 1) == 1) ? $urandom_range(0, 60) : in_t[i] / 2;
      end
      if (n % 7 == 0) for (int i = 1; i < N; i++) in_t[i] = in_t[0];   // ties
      in_thresh = $urandom_range(0, 6000);
      if (in_valid) begin
        exp_t e;
        e = model(in_mode, in_thresh);
        q.push_back(e);
        if (e.me == 0) n_clamp++;
        if (e.hymin) n_hymin++; else n_hyce++;
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks += 4;
    if (q.size() != 0) begin failures++; $display("FAIL: results missing"); end
    if (n_clamp == 0) begin failures++; $display("FAIL: no median clamp"); end
    if (n_hymin == 0) begin failures++; $display("FAIL: hybrid never chose min"); end
    if (n_hyce == 0) begin failures++; $display("FAIL: hybrid never chose CE"); end
    $display("clamped medians %0d, hybrid min %0d, hybrid CE %0d", n_clamp, n_hymin, n_hyce);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
