// mm3_ref_pkg: reference model used by the testbenches.
//
// mm3_ref computes Murmur3_x86_32 of an 8-byte key the way the software
// reference does: a loop over 4-byte little-endian blocks followed by the
// finalisation mix. It is written independently of the pipelined RTL.
package mm3_ref_pkg;
  function automatic logic [31:0] rl(input logic [31:0] x, input int r);
    return (x << r) | (x >> (32 - r));
  endfunction

  function automatic logic [31:0] mm3_ref(input logic [63:0] key, input logic [31:0] seed);
    logic [31:0] h, k;
    h = seed;
    for (int blk = 0; blk < 2; blk++) begin
      k = key[blk*32 +: 32];
      k = k * 32'hcc9e2d51;
      k = rl(k, 15);
      k = k * 32'h1b873593;
      h = h ^ k;
      h = rl(h, 13);
      h = h * 5 + 32'he6546b64;
    end
    h = h ^ 32'd8;
    h = h ^ (h >> 16);
    h = h * 32'h85ebca6b;
    h = h ^ (h >> 13);
    h = h * 32'hc2b2ae35;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Deterministic genome-like K-mer for test data: eight ASCII bases.
  function automatic logic [63:0] kmer_at(input int unsigned i, input int unsigned salt);
    logic [63:0] v;
    logic [31:0] x;
    x = (i * 32'h9e3779b1) ^ (salt * 32'h85ebca77) ^ 32'h2545f491;
    for (int b = 0; b < 8; b++) begin
      x = x ^ (x << 13); x = x ^ (x >> 17); x = x ^ (x << 5);
      case (x[1:0])
        2'd0: v[b*8 +: 8] = "A";
        2'd1: v[b*8 +: 8] = "C";
        2'd2: v[b*8 +: 8] = "G";
        default: v[b*8 +: 8] = "T";
      endcase
    end
    return v;
  endfunction
endpackage
