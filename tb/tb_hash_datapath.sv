// tb_hash_datapath: streams K-mers through mask + four Murmur3 lanes.
// Phase 1 runs with the output always ready and checks the rate: 1000
// K-mers offered back to back must all come out within 1000 + 8 cycles.
// Phase 2 adds random input gaps and output back-pressure. Every record is
// compared with four reference hashes of (K-mer AND mask) with seeds
// seed_base + 0..3.
module tb_hash_datapath;
  import mm3_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [63:0] mask = '1, in_kmer = '0;
  logic [31:0] seed_base = 32'h1234;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [127:0] out_rec;
  int checks = 0, failures = 0;
  logic [127:0] expq[$];
  int unsigned cyc = 0, n_out = 0;

  hash_datapath dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      logic [127:0] e;
      for (int i = 0; i < 4; i++) e[i*32 +: 32] = mm3_ref(in_kmer & mask, seed_base + i);
      expq.push_back(e);
    end
    if (out_valid && out_ready) begin
      checks++;
      n_out++;
      if (expq.size() == 0 || out_rec !== expq[0]) begin
        failures++; $display("record %h", out_rec);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  initial begin
    int unsigned t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: full rate
    @(negedge clk);
    t0 = cyc;
    for (int i = 0; i < 1000; i++) begin
      in_valid = 1; in_kmer = kmer_at(i, 1);
      @(negedge clk);
      while (!in_ready) @(negedge clk);
    end
    in_valid = 0;
    while (n_out < 1000 && cyc - t0 < 5000) @(negedge clk);
    checks++;
    if (cyc - t0 > 1000 + 9) begin failures++; $display("1000 K-mers took %0d cycles", cyc - t0); end
    // phase 2: gaps, back-pressure, other mask and seed
    mask = 64'h00ffffffffffffff; seed_base = 32'hcafe0000;
    for (int i = 0; i < 3000; i++) begin
      if (!in_valid || in_ready) begin
        in_valid = ($urandom % 4) != 0;
        in_kmer  = kmer_at(i, 2);
      end
      out_ready = ($urandom % 3) != 0;
      @(negedge clk);
    end
    in_valid = 0; out_ready = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d records missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
