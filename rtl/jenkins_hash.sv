// jenkins_hash: pipelined, seeded Jenkins hash of a 5-tuple flow key.
//
// The FMU addresses each of its N tables with the same hash function given a
// different seed, so that every table sees an independent-looking hash while
// all of them have the same timing. The function is Bob Jenkins' 32-bit
// "lookup2" hash: three 32-bit words a, b, c start at the golden ratio
// (a, b) and the seed (c); the first 12 key bytes are added little-endian
// into a, b and c and mixed; the key length (13) is added to c, the last key
// byte to a, and the words are mixed again; c is the hash.
//
// Each mix of nine subtract/subtract/xor-shift steps is cut into three
// pipeline stages of three steps each, so the hash takes HASH_LAT = 6 clock
// cycles and accepts a new key every cycle: a key presented with in_valid in
// cycle t gives out_valid and out_hash in cycle t + 6. There is no stall.
//
// The document names the Jenkins hash and the use of seeds; the lookup2
// variant, the key byte order (most significant byte of the packed key
// first) and the depth of the pipeline are this design's choices.
module jenkins_hash
  import fmu_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  flow_key_t          in_key,
  output logic               out_valid,
  output logic [HASH_W-1:0]  out_hash
);

  localparam logic [31:0] GOLDEN = 32'h9E37_79B9;

  typedef struct packed {
    logic [31:0] a;
    logic [31:0] b;
    logic [31:0] c;
  } abc_t;

  // One third of the mix: three subtract/subtract/xor-shift steps whose shift
  // amounts depend on which third it is.
  function automatic abc_t mix_third(abc_t x, int unsigned part);
    abc_t y;
    int unsigned sa, sb, sc;
    case (part)
      0:       begin sa = 13; sb = 8;  sc = 13; end
      1:       begin sa = 12; sb = 16; sc = 5;  end
      default: begin sa = 3;  sb = 10; sc = 15; end
    endcase
    y = x;
    y.a = y.a - y.b; y.a = y.a - y.c; y.a = y.a ^ (y.c >> sa);
    y.b = y.b - y.c; y.b = y.b - y.a; y.b = y.b ^ (y.a << sb);
    y.c = y.c - y.a; y.c = y.c - y.b; y.c = y.c ^ (y.b >> sc);
    return y;
  endfunction

  logic [KEY_W-1:0] kbits;
  logic [7:0]       kbyte [KEY_BYTES];
  abc_t             init;

  assign kbits = in_key;

  always_comb begin
    for (int i = 0; i < KEY_BYTES; i++) begin
      kbyte[i] = kbits[KEY_W-1-8*i -: 8];
    end
    init.a = GOLDEN + {kbyte[3], kbyte[2], kbyte[1],  kbyte[0]};
    init.b = GOLDEN + {kbyte[7], kbyte[6], kbyte[5],  kbyte[4]};
    init.c = SEED   + {kbyte[11], kbyte[10], kbyte[9], kbyte[8]};
  end

  abc_t       st    [HASH_LAT];
  logic [7:0] last  [HASH_LAT];   // key byte 12, carried to the second mix
  logic       vld   [HASH_LAT];
  abc_t       stage_in [HASH_LAT];

  always_comb begin
    stage_in[0] = init;
    for (int s = 1; s < HASH_LAT; s++) begin
      stage_in[s] = st[s-1];
    end
    // Tail of the 13-byte key, added between the two mixes.
    stage_in[3].c = st[2].c + 32'(KEY_BYTES);
    stage_in[3].a = st[2].a + {24'b0, last[2]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < HASH_LAT; s++) vld[s] <= 1'b0;
    end else begin
      vld[0] <= in_valid;
      for (int s = 1; s < HASH_LAT; s++) vld[s] <= vld[s-1];
    end
  end

  always_ff @(posedge clk) begin
    last[0] <= kbyte[12];
    for (int s = 1; s < HASH_LAT; s++) last[s] <= last[s-1];
    for (int s = 0; s < HASH_LAT; s++) st[s] <= mix_third(stage_in[s], s % 3);
  end

  assign out_valid = vld[HASH_LAT-1];
  assign out_hash  = st[HASH_LAT-1].c;

endmodule
