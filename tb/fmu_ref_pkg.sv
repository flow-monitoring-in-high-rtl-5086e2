// fmu_ref_pkg: reference models for the FMU testbenches.
//
// Holds a straightforward, loop-based model of Bob Jenkins' lookup2 hash
// over a byte string (written the way the original software algorithm
// runs, not the way the pipelined RTL computes it), the bucket-index
// reduction, the per-table seeds, and a random key generator.
package fmu_ref_pkg;
  import fmu_pkg::*;

  function automatic void ref_mix(ref logic [31:0] a, ref logic [31:0] b, ref logic [31:0] c);
    a = a - b; a = a - c; a = a ^ (c >> 13);
    b = b - c; b = b - a; b = b ^ (a << 8);
    c = c - a; c = c - b; c = c ^ (b >> 13);
    a = a - b; a = a - c; a = a ^ (c >> 12);
    b = b - c; b = b - a; b = b ^ (a << 16);
    c = c - a; c = c - b; c = c ^ (b >> 5);
    a = a - b; a = a - c; a = a ^ (c >> 3);
    b = b - c; b = b - a; b = b ^ (a << 10);
    c = c - a; c = c - b; c = c ^ (b >> 15);
  endfunction

  // lookup2 over the first len bytes of k.
  function automatic logic [31:0] ref_lookup2(logic [7:0] k [16], int len, logic [31:0] initval);
    logic [31:0] a, b, c;
    int p, rem;
    a = 32'h9e3779b9; b = 32'h9e3779b9; c = initval;
    p = 0; rem = len;
    while (rem >= 12) begin
      a += {k[p+3], k[p+2], k[p+1], k[p]};
      b += {k[p+7], k[p+6], k[p+5], k[p+4]};
      c += {k[p+11], k[p+10], k[p+9], k[p+8]};
      ref_mix(a, b, c);
      p += 12; rem -= 12;
    end
    c += 32'(len);
    // Tail: bytes 8..10 go to c above its low byte, 4..7 to b, 0..3 to a.
    for (int i = rem - 1; i >= 0; i--) begin
      if (i >= 8)      c += 32'(k[p+i]) << (8 * (i - 7));
      else if (i >= 4) b += 32'(k[p+i]) << (8 * (i - 4));
      else             a += 32'(k[p+i]) << (8 * i);
    end
    ref_mix(a, b, c);
    return c;
  endfunction

  // Hash of a flow key: its bytes in order src_ip (MSB first) .. proto.
  function automatic logic [31:0] ref_hash(flow_key_t key, logic [31:0] seed);
    logic [7:0] k [16];
    logic [KEY_W-1:0] bits;
    bits = key;
    for (int i = 0; i < 16; i++) k[i] = 8'h00;
    for (int i = 0; i < KEY_BYTES; i++) k[i] = bits[KEY_W-1-8*i -: 8];
    return ref_lookup2(k, KEY_BYTES, seed);
  endfunction

  // Bucket of a hash in a table of s buckets: floor(h * s / 2^32).
  function automatic int unsigned ref_index(logic [31:0] h, int unsigned s);
    longint unsigned prod;
    prod = longint'(h) * longint'(s);
    return int'(prod >> 32);
  endfunction

  function automatic logic [31:0] ref_seed(int i);
    return FMU_SEED_BASE + 32'(i) * FMU_SEED_STEP;
  endfunction

  function automatic flow_key_t rand_key();
    flow_key_t k;
    k.src_ip   = $urandom;
    k.dst_ip   = $urandom;
    k.src_port = 16'($urandom);
    k.dst_port = 16'($urandom);
    k.proto    = ($urandom_range(0, 3) == 0) ? 8'd17 : 8'd6;
    return k;
  endfunction

endpackage
