// tb_jenkins_hash: self-checking testbench for jenkins_hash.
//
// Two hash instances with different seeds are fed random flow keys, with
// random idle cycles in between and long runs of back-to-back keys. Every
// output is compared with a loop-based software model of the lookup2 hash,
// and its arrival is checked to be exactly HASH_LAT (6) cycles after the
// key went in, with a new key accepted every cycle. The two seeds must
// give different hashes for the same key.
module tb_jenkins_hash;
  import fmu_pkg::*;
  import fmu_ref_pkg::*;

  localparam logic [31:0] SEED0 = 32'h0;
  localparam logic [31:0] SEED1 = 32'h1234_5678;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic in_valid = 1'b0;
  flow_key_t in_key = '0;
  logic v0, v1;
  logic [31:0] h0, h1;
  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  jenkins_hash #(.SEED(SEED0)) dut0 (.clk, .rst_n, .in_valid, .in_key, .out_valid(v0), .out_hash(h0));
  jenkins_hash #(.SEED(SEED1)) dut1 (.clk, .rst_n, .in_valid, .in_key, .out_valid(v1), .out_hash(h1));

  typedef struct { flow_key_t key; longint t; } exp_t;
  exp_t q [$];
  int same = 0;

  // Scoreboard.
  always @(posedge clk) begin
    if (rst_n && v0) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL: output with no key pending");
      end else begin
        e = q.pop_front();
        if (h0 !== ref_hash(e.key, SEED0) || h1 !== ref_hash(e.key, SEED1)) begin
          failures++;
          $display("FAIL: key %h hash %h/%h expected %h/%h", e.key, h0, h1,
                   ref_hash(e.key, SEED0), ref_hash(e.key, SEED1));
        end
        checks++;
        if (cycle - e.t != HASH_LAT) begin
          failures++; $display("FAIL: latency %0d, expected %0d", cycle - e.t, HASH_LAT);
        end
        if (h0 == h1) same++;
      end
    end
    if (v0 !== v1) begin
      failures++; $display("FAIL: valid mismatch between instances");
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n < 500 || $urandom_range(0, 3) != 0) begin
        in_valid = 1'b1;
        in_key   = (n == 0) ? '0 : rand_key();
        q.push_back('{key: in_key, t: cycle});
      end else begin
        in_valid = 1'b0;
        in_key   = rand_key();
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (HASH_LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d keys never hashed", q.size()); end
    checks++;
    if (same > 2) begin failures++; $display("FAIL: seeds give equal hashes %0d times", same); end
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
