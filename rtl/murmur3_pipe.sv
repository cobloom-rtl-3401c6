// murmur3_pipe: fully pipelined 32-bit Murmur3 of one 8-byte key.
//
// One key and its seed enter per cycle; the hash leaves LATENCY = 7 cycles
// later. The work is the Murmur3_x86_32 algorithm for an 8-byte key (two
// 4-byte blocks, no tail), cut into stages of at most one 32-bit multiply
// each, as a chain of multiply, rotate-left, shift and XOR operations:
//   s1  k0*C1, k1*C1                      (both blocks in parallel)
//   s2  rotl15(.)*C2 for both blocks
//   s3  h = rotl13(seed ^ k0')*5 + N
//   s4  h = rotl13(h ^ k1')*5 + N
//   s5  h ^= 8; h ^= h>>16; h *= F1
//   s6  h ^= h>>13; h *= F2
//   s7  h ^= h>>16
// The key's low 32 bits are the first block (little-endian byte order).
// The stage split is this design's choice.
//
// Interface: `en` advances every stage at once (a stalled pipeline holds all
// stages); in_valid/key/seed are taken when en is high; out_valid/hash show
// the last stage. Valid bits reset to 0; data registers are not reset.
module murmur3_pipe
  import cobloom_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              in_valid,
  input  logic [KMER_W-1:0] key,
  input  logic [HASH_W-1:0] seed,
  output logic              out_valid,
  output logic [HASH_W-1:0] hash
);
  localparam int unsigned LATENCY = 7;

  logic [LATENCY-1:0] vld;
  logic [31:0] s1_k0, s1_k1, s1_seed;
  logic [31:0] s2_k0, s2_k1, s2_seed;
  logic [31:0] s3_h, s3_k1;
  logic [31:0] s4_h, s5_h, s6_h, s7_h;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else if (en) vld <= {vld[LATENCY-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    if (en) begin
      // s1: first multiply of both blocks
      s1_k0   <= key[31:0]  * MM3_C1;
      s1_k1   <= key[63:32] * MM3_C1;
      s1_seed <= seed;
      // s2: rotate and second multiply
      s2_k0   <= rotl32(s1_k0, 15) * MM3_C2;
      s2_k1   <= rotl32(s1_k1, 15) * MM3_C2;
      s2_seed <= s1_seed;
      // s3: mix block 0 into the state
      s3_h    <= rotl32(s2_seed ^ s2_k0, 13) * 32'd5 + MM3_N;
      s3_k1   <= s2_k1;
      // s4: mix block 1 into the state
      s4_h    <= rotl32(s3_h ^ s3_k1, 13) * 32'd5 + MM3_N;
      // s5..s7: length and finalisation mix
      s5_h    <= ((s4_h ^ MM3_KEY_BYTES) ^ ((s4_h ^ MM3_KEY_BYTES) >> 16)) * MM3_F1;
      s6_h    <= (s5_h ^ (s5_h >> 13)) * MM3_F2;
      s7_h    <= s6_h ^ (s6_h >> 16);
    end
  end

  assign out_valid = vld[LATENCY-1];
  assign hash      = s7_h;
endmodule
