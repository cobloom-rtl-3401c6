// kmer_mask: the mask stage in front of the hash units.
//
// Every K-mer word from the input stream is ANDed with a job-wide mask before
// it is hashed, so that bits outside the K-mer (unused bases or padding) do
// not reach the hash. The document shows this stage by name only; the AND
// with a host-supplied 64-bit mask is this design's reading of it.
//
// Interface: valid/ready stream in and out, one registered stage, full
// throughput (in_ready = !out_valid || out_ready). `mask` must be stable
// while a job runs.
module kmer_mask
  import cobloom_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [KMER_W-1:0] mask,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [KMER_W-1:0] in_kmer,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [KMER_W-1:0] out_kmer
);
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_kmer  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_kmer <= in_kmer & mask;
    end
  end
endmodule
