// fmu_pkg: types and constants shared by the Flow Monitoring Unit (FMU).
//
// A flow is identified by the TCP/IP 5-tuple (source IP, destination IP,
// source port, destination port, protocol), 104 bits in all. The FMU answers
// two kinds of query: UPDATE(k, v) adds v to the count kept for key k, and
// GET(k) returns the estimated count of k. The GET estimate is produced by
// one of four techniques (min, median, collision estimate, hybrid) chosen at
// run time with fmu_mode_e.
//
// The field order of the key, the byte order in which it is hashed, the
// 32-bit counter width and the mode encoding are this design's own choices.
package fmu_pkg;

  // Width of the flow key: 32 + 32 + 16 + 16 + 8 bits.
  localparam int unsigned KEY_W   = 104;
  // Number of key bytes fed to the hash.
  localparam int unsigned KEY_BYTES = KEY_W / 8;
  // Width of every counter (packet counts, collision counts, update values).
  localparam int unsigned CNT_W   = 32;
  // Width of the hash value.
  localparam int unsigned HASH_W  = 32;
  // Clock cycles from a key entering the hash to its hash value leaving it.
  localparam int unsigned HASH_LAT = 6;

  // Clock cycles from a GET entering fmu_top to its answer: the hash, the
  // table read and read-modify-write (1), the selection mechanism (2).
  localparam int unsigned FMU_LATENCY = HASH_LAT + 3;

  typedef struct packed {
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [7:0]  proto;
  } flow_key_t;

  typedef enum logic {
    OP_UPDATE = 1'b0,
    OP_GET    = 1'b1
  } fmu_op_e;

  // Technique used to turn the N table readings into one GET answer.
  typedef enum logic [1:0] {
    MODE_MIN    = 2'd0,   // MIFMU
    MODE_MEDIAN = 2'd1,   // MEFMU
    MODE_CE     = 2'd2,   // CEFMU
    MODE_HYBRID = 2'd3    // HYFMU
  } fmu_mode_e;

  // Default hash seeds, one per table (the tables differ only in their seed).
  // Table i uses FMU_SEED_BASE + i * FMU_SEED_STEP.
  localparam logic [31:0] FMU_SEED_BASE = 32'h0BAD_5EED;
  localparam logic [31:0] FMU_SEED_STEP = 32'h9E37_79B9;

endpackage
