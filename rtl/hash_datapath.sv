// hash_datapath: the hashing pipeline of one accelerator core.
//
// A K-mer stream enters, passes the mask stage, and is fanned out to N_HASH
// Murmur3 units that run in lock-step, unit i hashing with seed_base + i
// (one hash function per seed, as a Bloom filter needs k independent
// hashes). Their outputs are joined into one hash record per K-mer, hash i
// in bits [32*i +: 32]. Multiple parallel, fully pipelined Murmur3 units
// that take one K-mer per clock follow the document; the seed numbering and
// the record layout are this design's choices.
//
// Timing: one K-mer per cycle in, one record per cycle out, latency 8 cycles
// (1 mask + 7 hash). When out_ready is low the whole pipeline holds.
module hash_datapath
  import cobloom_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [KMER_W-1:0] mask,
  input  logic [HASH_W-1:0] seed_base,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [KMER_W-1:0] in_kmer,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [REC_W-1:0]  out_rec
);
  logic              m_valid;
  logic [KMER_W-1:0] m_kmer;
  logic              en;
  logic [N_HASH-1:0] lane_valid;

  // The hash pipeline advances unless a finished record is waiting.
  assign en = !out_valid || out_ready;

  kmer_mask u_mask (
    .clk, .rst_n, .mask,
    .in_valid, .in_ready, .in_kmer,
    .out_valid(m_valid), .out_ready(en), .out_kmer(m_kmer)
  );

  for (genvar i = 0; i < N_HASH; i++) begin : g_lane
    murmur3_pipe u_mm3 (
      .clk, .rst_n, .en,
      .in_valid (m_valid),
      .key      (m_kmer),
      .seed     (seed_base + HASH_W'(i)),
      .out_valid(lane_valid[i]),
      .hash     (out_rec[i*HASH_W +: HASH_W])
    );
  end

  assign out_valid = lane_valid[0];

`ifndef SYNTHESIS
  // All lanes are fed together, so they must agree on validity.
  property p_lanes_in_step;
    @(posedge clk) disable iff (!rst_n) (lane_valid == '0 || lane_valid == '1);
  endproperty
  assert property (p_lanes_in_step) else $error("hash lanes out of step");
`endif
endmodule
