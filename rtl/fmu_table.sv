// fmu_table: one dimension ("HF_i") of the FMU's two-dimensional hash table.
//
// The block hashes the flow key with its own seed, reduces the hash to a
// bucket index in 0..S-1, and keeps three words per bucket:
//   T[i]   the sum of all UPDATE values that hashed to the bucket,
//   C[i]   the collision counter of the bucket,
//   tag[i] the 32-bit hash of the key that last updated the bucket, with a
//          bit saying whether the bucket was ever updated.
// An UPDATE(k, v) adds v to T and, if the bucket was last updated by a
// different key (its stored tag differs from the hash of k), adds one to C;
// it then stores k's tag. A GET(k) only reads T and C.
//
// Pipeline, one query per clock, no stall:
//   cycles t..t+5  jenkins_hash (HASH_LAT = 6 stages)
//   cycle  t+6     index = (hash * S) >> 32, read address to the memories (R)
//   cycle  t+7     read data back; read-modify-write of T, C and tag (W)
// A query presented with in_valid in cycle t leaves on out_* in cycle
// t + HASH_LAT + 1. For an UPDATE the outputs carry the bucket's new T and C,
// for a GET the values read. Because an UPDATE writes at the end of its W
// cycle while the next query has already issued its read, that next query
// takes the freshly written words from a forwarding register instead of the
// memory (out_fwd says when this happened); queries two or more cycles
// apart read the memory directly.
//
// After reset the block writes zeros to every bucket, one per clock, and
// holds ready low for those S cycles; queries presented while ready is low
// are ignored.
//
// From the document: the per-table hash with its own seed, the T table, the
// extra C table and its increment on an access that does not match the last
// one. This design's choices: the reading of "last access" as the last
// update of the same bucket, the 32-bit hash tag used to recognise a key,
// the multiply-shift index reduction, the clearing sweep, the pipeline depth
// and the forwarding. Counters wrap at 2^32.
module fmu_table
  import fmu_pkg::*;
#(
  parameter int unsigned S    = 2048,
  parameter logic [31:0] SEED = FMU_SEED_BASE,
  localparam int unsigned AW  = (S > 1) ? $clog2(S) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              ready,
  input  logic              in_valid,
  input  fmu_op_e           in_op,
  input  flow_key_t         in_key,
  input  logic [CNT_W-1:0]  in_value,
  output logic              out_valid,
  output fmu_op_e           out_op,
  output logic [CNT_W-1:0]  out_value,
  output logic [CNT_W-1:0]  out_t,
  output logic [CNT_W-1:0]  out_c,
  output logic              out_coll,
  output logic              out_fwd
);

  localparam int unsigned TAG_W = HASH_W + 1;   // {ever written, hash}

  typedef struct packed {
    fmu_op_e          op;
    logic [CNT_W-1:0] value;
  } meta_t;

  // ---------------------------------------------------------------- clear
  logic          clr_active;
  logic [AW-1:0] clr_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_active <= 1'b1;
      clr_addr   <= '0;
    end else if (clr_active) begin
      if (clr_addr == AW'(S - 1)) clr_active <= 1'b0;
      clr_addr <= clr_addr + 1'b1;
    end
  end

  assign ready = !clr_active;

  // ----------------------------------------------------------------- hash
  logic              acc;
  logic              h_valid;
  logic [HASH_W-1:0] h_hash;
  meta_t             meta [HASH_LAT];

  assign acc = in_valid && ready;

  jenkins_hash #(.SEED(SEED)) u_hash (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (acc),
    .in_key   (in_key),
    .out_valid(h_valid),
    .out_hash (h_hash)
  );

  always_ff @(posedge clk) begin
    meta[0] <= '{op: in_op, value: in_value};
    for (int s = 1; s < HASH_LAT; s++) meta[s] <= meta[s-1];
  end

  // ------------------------------------------------------ R: index, read
  logic [HASH_W+31:0] prod;
  logic [AW-1:0]      h_idx;

  assign prod  = (HASH_W+32)'(h_hash) * (HASH_W+32)'(S);
  assign h_idx = AW'(prod >> HASH_W);

  logic              r_valid;
  meta_t             r_meta;
  logic [AW-1:0]     r_idx;
  logic [HASH_W-1:0] r_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_valid <= 1'b0;
    else        r_valid <= h_valid;
  end

  always_ff @(posedge clk) begin
    r_meta <= meta[HASH_LAT-1];
    r_idx  <= h_idx;
    r_tag  <= h_hash;
  end

  // ------------------------------------------------------------ memories
  logic             wr_en;
  logic [AW-1:0]    wr_addr;
  logic [CNT_W-1:0] wr_t, wr_c;
  logic [TAG_W-1:0] wr_tag;
  logic [CNT_W-1:0] rd_t, rd_c;
  logic [TAG_W-1:0] rd_tag;

  fmu_ram #(.WIDTH(CNT_W), .DEPTH(S)) u_t (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_t),
    .rd_addr(h_idx), .rd_data(rd_t));

  fmu_ram #(.WIDTH(CNT_W), .DEPTH(S)) u_c (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_c),
    .rd_addr(h_idx), .rd_data(rd_c));

  fmu_ram #(.WIDTH(TAG_W), .DEPTH(S)) u_tag (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_tag),
    .rd_addr(h_idx), .rd_data(rd_tag));

  // ------------------------------------------ W: forward, modify, write
  logic             fw_valid;
  logic [AW-1:0]    fw_idx;
  logic [CNT_W-1:0] fw_t, fw_c;
  logic [TAG_W-1:0] fw_tag;

  logic             use_fw;
  logic [CNT_W-1:0] cur_t, cur_c, new_t, new_c;
  logic [TAG_W-1:0] cur_tag;
  logic             coll;
  logic             upd;

  always_comb begin
    use_fw  = fw_valid && (fw_idx == r_idx);
    cur_t   = use_fw ? fw_t   : rd_t;
    cur_c   = use_fw ? fw_c   : rd_c;
    cur_tag = use_fw ? fw_tag : rd_tag;
    upd     = r_valid && (r_meta.op == OP_UPDATE);
    coll    = cur_tag[HASH_W] && (cur_tag[HASH_W-1:0] != r_tag);
    new_t   = cur_t + r_meta.value;
    new_c   = cur_c + CNT_W'(coll);
  end

  always_comb begin
    if (clr_active) begin
      wr_en   = 1'b1;
      wr_addr = clr_addr;
      wr_t    = '0;
      wr_c    = '0;
      wr_tag  = '0;
    end else begin
      wr_en   = upd;
      wr_addr = r_idx;
      wr_t    = new_t;
      wr_c    = new_c;
      wr_tag  = {1'b1, r_tag};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fw_valid <= 1'b0;
    else        fw_valid <= upd;
  end

  always_ff @(posedge clk) begin
    fw_idx <= r_idx;
    fw_t   <= new_t;
    fw_c   <= new_c;
    fw_tag <= {1'b1, r_tag};
  end

  assign out_valid = r_valid;
  assign out_op    = r_meta.op;
  assign out_value = r_meta.value;
  assign out_t     = upd ? new_t : cur_t;
  assign out_c     = upd ? new_c : cur_c;
  assign out_coll  = upd && coll;
  assign out_fwd   = r_valid && use_fw;

endmodule
