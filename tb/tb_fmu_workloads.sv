// tb_fmu_workloads: runs the FMU at the sizes of the error-rate study.
//
// Eleven fmu_top instances, each driven by an fmu_trace_runner with the same
// kind of synthetic trace (4000 flows, 30000 packets):
//   - table-size sweep, N = 4 tables of S = 500, 1000, 2000, 4000, 8000 and
//     16000 entries;
//   - table-count sweep at a fixed total of 32K entries, N = 1, 2, 4, 8, 16
//     tables of 32768 / N entries.
// Every GET answer of every instance is checked against the reference
// model; the average error of each technique is printed per configuration
// for information (the trace is synthetic, so the numbers are not expected
// to match any published figure). A simple trend is also checked: with four
// tables, the min estimate is no worse with 16000 entries than with 500.
module tb_fmu_workloads;
  localparam int unsigned NF = 4000;
  localparam int unsigned NP = 30000;
  localparam int NCFG = 11;

  bit  done [NCFG];
  int  chk  [NCFG];
  int  fail [NCFG];
  real err  [NCFG][4];

  fmu_trace_runner #(.N(4),  .S(500),   .NFLOWS(NF), .NPKTS(NP)) r0  (done[0],  chk[0],  fail[0],  err[0]);
  fmu_trace_runner #(.N(4),  .S(1000),  .NFLOWS(NF), .NPKTS(NP)) r1  (done[1],  chk[1],  fail[1],  err[1]);
  fmu_trace_runner #(.N(4),  .S(2000),  .NFLOWS(NF), .NPKTS(NP)) r2  (done[2],  chk[2],  fail[2],  err[2]);
  fmu_trace_runner #(.N(4),  .S(4000),  .NFLOWS(NF), .NPKTS(NP)) r3  (done[3],  chk[3],  fail[3],  err[3]);
  fmu_trace_runner #(.N(4),  .S(8000),  .NFLOWS(NF), .NPKTS(NP)) r4  (done[4],  chk[4],  fail[4],  err[4]);
  fmu_trace_runner #(.N(4),  .S(16000), .NFLOWS(NF), .NPKTS(NP)) r5  (done[5],  chk[5],  fail[5],  err[5]);
  fmu_trace_runner #(.N(1),  .S(32768), .NFLOWS(NF), .NPKTS(NP)) r6  (done[6],  chk[6],  fail[6],  err[6]);
  fmu_trace_runner #(.N(2),  .S(16384), .NFLOWS(NF), .NPKTS(NP)) r7  (done[7],  chk[7],  fail[7],  err[7]);
  fmu_trace_runner #(.N(4),  .S(8192),  .NFLOWS(NF), .NPKTS(NP)) r8  (done[8],  chk[8],  fail[8],  err[8]);
  fmu_trace_runner #(.N(8),  .S(4096),  .NFLOWS(NF), .NPKTS(NP)) r9  (done[9],  chk[9],  fail[9],  err[9]);
  fmu_trace_runner #(.N(16), .S(2048),  .NFLOWS(NF), .NPKTS(NP)) r10 (done[10], chk[10], fail[10], err[10]);

  initial begin
    int checks, failures;
    bit all;
    all = 0;
    while (!all) begin
      #1000;
      all = 1;
      for (int i = 0; i < NCFG; i++) if (!done[i]) all = 0;
    end
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin checks += chk[i]; failures += fail[i]; end
    checks++;
    if (err[5][0] > err[0][0]) begin
      failures++; $display("FAIL: min error grows with table size");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
