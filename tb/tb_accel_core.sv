// tb_accel_core: one accelerator core on the DRAM model, end to end.
// Genome K-mers are placed in memory, a job is sent, and after the response
// every 128-bit record in the destination is compared with four reference
// Murmur3 hashes of the masked K-mer. The response must report the K-mer
// count and the cycle count measured by the testbench; with an ideal memory
// 1000 K-mers must finish within 1000 + 80 cycles (one K-mer per clock).
// Further jobs use memory stalls, a mask, an odd count, and zero K-mers; a
// core must refuse commands while a job runs.
module tb_accel_core;
  import cobloom_pkg::*;
  import mm3_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, resp_valid, resp_ready = 0;
  cmd_t cmd = '0;
  resp_t resp;
  logic ar_valid, ar_ready, r_valid, r_ready, aw_valid, aw_ready, w_valid, w_ready, b_valid, b_ready;
  mem_a_t ar, aw;
  mem_r_t r;
  mem_w_t w;
  mem_b_t b;
  int checks = 0, failures = 0;
  int unsigned cyc = 0, busy_waits = 0;

  accel_core #(.CORE_ID(2)) dut (.*);
  dram_model #(.WORDS(4096), .RD_LAT(20), .STALL_PCT(0)) mem (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (cmd_valid && !cmd_ready) busy_waits++;

  task automatic job(input longint unsigned src, input longint unsigned dst, input int unsigned n,
                     input logic [31:0] seed, input logic [63:0] mask, input int unsigned salt,
                     input int unsigned limit);
    int unsigned t0, t1;
    for (int unsigned i = 0; i < n; i++)
      mem.mem[(src >> 6) + i / 8][(i % 8) * 64 +: 64] = kmer_at(i, salt);
    @(negedge clk);
    cmd = '{core: 8'd2, src_addr: src, dst_addr: dst, n_kmers: n, seed: seed, mask: mask};
    cmd_valid = 1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    t0 = cyc;
    @(negedge clk) cmd_valid = 0;
    while (!resp_valid) @(negedge clk);
    t1 = cyc;
    checks++;
    if (resp.n_kmers != n || resp.core != 8'd2) begin failures++; $display("bad response"); end
    checks++;
    if (resp.cycles != t1 - t0) begin failures++; $display("cycles %0d, measured %0d", resp.cycles, t1 - t0); end
    checks++;
    if (limit != 0 && t1 - t0 > limit) begin failures++; $display("n=%0d took %0d", n, t1 - t0); end
    resp_ready = 1;
    @(negedge clk) resp_ready = 0;
    for (int unsigned j = 0; j < n; j++) begin
      logic [127:0] got, e;
      for (int h = 0; h < 4; h++) e[h*32 +: 32] = mm3_ref(kmer_at(j, salt) & mask, seed + h);
      got = mem.mem[(dst >> 6) + j / 4][(j % 4) * 128 +: 128];
      checks++;
      if (got !== e) begin failures++; if (failures < 10) $display("rec %0d: %h vs %h", j, got, e); end
    end
    $display("job n=%0d: %0d cycles", n, t1 - t0);
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) mem.mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    job(64'h0, 64'h10000, 1000, 32'd0, '1, 1, 1000 + 80);
    mem.stall_pct = 30;
    job(64'h20000, 64'h30000, 77, 32'h9747b28c, 64'h0000ffffffffffff, 2, 0);
    // while a job runs the core must not take another command
    fork
      job(64'h0, 64'h8000, 300, 32'd7, '1, 3, 0);
      begin
        repeat (40) @(negedge clk);
        checks++;
        if (cmd_ready) begin failures++; $display("core idle while busy"); end
      end
    join
    job(64'h0, 64'h8000, 0, 32'd1, '1, 4, 0);
    checks++;
    if (mem.violations != 0) begin failures++; $display("violations %0d", mem.violations); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
