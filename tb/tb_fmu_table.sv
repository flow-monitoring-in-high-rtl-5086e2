// tb_fmu_table: self-checking testbench for fmu_table.
//
// Uses a small table (S = 12 buckets, not a power of two) and a pool of 40
// flow keys, so that buckets are shared and collisions are frequent. Random
// UPDATE and GET queries, often back to back on the same key, are applied
// to a model of the T, C and tag tables in query order; each output of the
// block (new or read T and C, collision flag, forwarding flag) is checked
// against it, at exactly HASH_LAT + 1 = 7 cycles after the query. Also
// checks that ready rises S cycles after reset, that a query offered before
// then is ignored, and that collisions and forwarding both happened.
module tb_fmu_table;
  import fmu_pkg::*;
  import fmu_ref_pkg::*;

  localparam int unsigned S = 12;
  localparam logic [31:0] SEED = 32'hCAFE_0001;
  localparam int unsigned NKEYS = 40;

  logic clk = 1'b0, rst_n = 1'b1;
  logic ready;
  logic in_valid = 1'b0;
  fmu_op_e in_op = OP_GET;
  flow_key_t in_key = '0;
  logic [CNT_W-1:0] in_value = '0;
  logic out_valid, out_coll, out_fwd;
  fmu_op_e out_op;
  logic [CNT_W-1:0] out_value, out_t, out_c;
  int checks = 0, failures = 0, n_coll = 0, n_fwd = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fmu_table #(.S(S), .SEED(SEED)) dut (.*);

  // model state
  longint unsigned mt [S];
  longint unsigned mc [S];
  logic [31:0] mtag [S];
  bit mtv [S];
  int last_idx = -1;
  bit last_upd = 0;
  flow_key_t keys [NKEYS];

  typedef struct { fmu_op_e op; longint unsigned t, c, v; bit coll, fwd; longint cyc; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL: unexpected output at cycle %0d", cycle); end
      else begin
        e = q.pop_front();
        if (out_op != e.op || out_t != CNT_W'(e.t) || out_c != CNT_W'(e.c) ||
            out_coll != e.coll || out_fwd != e.fwd || out_value != CNT_W'(e.v)) begin
          failures++;
          $display("FAIL: op %0d t=%0d c=%0d coll=%0b fwd=%0b, expected t=%0d c=%0d coll=%0b fwd=%0b",
                   out_op, out_t, out_c, out_coll, out_fwd, e.t, e.c, e.coll, e.fwd);
        end
        checks++;
        if (cycle - e.cyc != 64'(HASH_LAT + 1)) begin failures++; $display("FAIL: latency %0d", cycle - e.cyc); end
      end
    end
  end

  task automatic issue(fmu_op_e op, flow_key_t key, logic [CNT_W-1:0] v);
    exp_t e;
    logic [31:0] h;
    int idx;
    h = ref_hash(key, SEED);
    idx = ref_index(h, S);
    e.op = op; e.v = v; e.cyc = cycle;
    e.fwd = (last_idx == idx) && last_upd;
    if (op == OP_UPDATE) begin
      e.coll = mtv[idx] && (mtag[idx] != h);
      mt[idx] = 64'(32'(mt[idx] + v));
      mc[idx] = mc[idx] + e.coll;
      mtag[idx] = h; mtv[idx] = 1;
    end else e.coll = 0;
    e.t = mt[idx]; e.c = mc[idx];
    if (e.coll) n_coll++;
    if (e.fwd) n_fwd++;
    q.push_back(e);
    last_idx = idx; last_upd = (op == OP_UPDATE);
    in_valid = 1'b1; in_op = op; in_key = key; in_value = v;
  endtask

  initial begin
    int k;
    longint t0;
    #1 rst_n = 1'b0;
    for (int i = 0; i < S; i++) begin mt[i] = 0; mc[i] = 0; mtag[i] = 0; mtv[i] = 0; end
    for (int i = 0; i < NKEYS; i++) keys[i] = rand_key();
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    t0 = cycle;
    // A query while the tables are being cleared must be ignored.
    in_valid = 1'b1; in_op = OP_UPDATE; in_key = keys[0]; in_value = 99;
    @(negedge clk) in_valid = 1'b0;
    while (!ready) @(negedge clk);
    checks++;
    if (cycle - t0 != S) begin failures++; $display("FAIL: clear took %0d cycles", cycle - t0); end
    k = 0;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: begin in_valid = 1'b0; last_idx = -1; end
        1: issue(OP_GET, keys[k], CNT_W'($urandom));
        default: begin
          if ($urandom_range(0, 2) != 0) k = $urandom_range(0, NKEYS - 1);
          issue(OP_UPDATE, keys[k], ($urandom_range(0, 9) == 0) ? 32'hFFFF_FFF0 : CNT_W'($urandom_range(0, 1500)));
        end
      endcase
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (HASH_LAT + 4) @(posedge clk);
    checks += 3;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    if (n_coll == 0) begin failures++; $display("FAIL: no collision"); end
    if (n_fwd == 0) begin failures++; $display("FAIL: no forwarding"); end
    $display("collisions %0d, forwards %0d", n_coll, n_fwd);
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
