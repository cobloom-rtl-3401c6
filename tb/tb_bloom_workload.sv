// tb_bloom_workload: the Bloom filter insertion workload on the full
// 24-core system, with the DRAM channel limited to 93 beats per 100 cycles
// (a 14.9 GB/s DDR4 channel seen by a 512-bit port at 250 MHz).
//
// Every core hashes a block of 2048 synthetic 8-byte K-mers, as each host
// thread offloads its own block. The host model then checks every record
// against the reference Murmur3, inserts the four hashes of each K-mer into
// a counting Bloom filter of 2^20 one-byte counters, and checks that every
// inserted K-mer is found again, and that keys never inserted are rarely
// reported present. It reports the sustained rate in K-mers
// and hashes per cycle and requires at least 2 K-mers per cycle, 80% of
// what the channel can carry at 24 bytes (8 in, 16 out) per K-mer.
module tb_bloom_workload;
  import cobloom_pkg::*;
  import mm3_ref_pkg::*;
  localparam int NC = 24;
  localparam int N_PER_CORE = 2048;
  localparam int TBL_BITS = 20;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, resp_valid, resp_ready = 1;
  cmd_t cmd = '0;
  resp_t resp;
  logic ar_valid, ar_ready, r_valid, r_ready, aw_valid, aw_ready, w_valid, w_ready, b_valid, b_ready;
  mem_a_t ar, aw;
  mem_r_t r;
  mem_w_t w;
  mem_b_t b;
  int checks = 0, failures = 0;
  int unsigned cyc = 0, resp_count = 0, t_start = 0, t_end = 0;

  cobloom_top dut (.*);
  dram_model #(.WORDS(24576), .RD_LAT(40), .STALL_PCT(0), .BEATS_PER_100(93)) mem (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && resp_valid && resp_ready) begin
    resp_count++;
    t_end = cyc;
  end

  logic [7:0] table_cnt [1 << TBL_BITS];

  initial begin
    longint unsigned kmers, rate_x100;
    int unsigned absent_hits;
    for (int i = 0; i < 24576; i++) mem.mem[i] = '0;
    for (int i = 0; i < (1 << TBL_BITS); i++) table_cnt[i] = 0;
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < N_PER_CORE; i++)
        mem.mem[(c * 32'h10000) / 64 + i / 8][(i % 8) * 64 +: 64] = kmer_at(i, 100 + c);
    repeat (3) @(posedge clk);
    rst_n = 1;
    t_start = cyc;
    for (int c = 0; c < NC; c++) begin
      @(negedge clk);
      cmd = '{core: 8'(c), src_addr: 64'(c) * 64'h10000, dst_addr: 64'(c) * 64'h10000 + 64'h4000,
              n_kmers: N_PER_CORE, seed: 32'h0, mask: '1};
      cmd_valid = 1;
      @(posedge clk);
      while (!cmd_ready) @(posedge clk);
      @(negedge clk) cmd_valid = 0;
    end
    while (resp_count < NC) @(negedge clk);
    // host side: check the hashes and update the counting Bloom filter
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < N_PER_CORE; i++) begin
        logic [127:0] got;
        got = mem.mem[(c * 32'h10000 + 32'h4000) / 64 + i / 4][(i % 4) * 128 +: 128];
        for (int h = 0; h < 4; h++) begin
          checks++;
          if (got[h*32 +: 32] !== mm3_ref(kmer_at(i, 100 + c), 32'(h))) begin
            failures++; if (failures < 10) $display("core %0d K-mer %0d hash %0d wrong", c, i, h);
          end
          if (table_cnt[got[h*32 +: TBL_BITS]] != 8'hff) table_cnt[got[h*32 +: TBL_BITS]]++;
        end
      end
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < N_PER_CORE; i++) begin
        bit present;
        present = 1;
        for (int h = 0; h < 4; h++)
          if (table_cnt[mm3_ref(kmer_at(i, 100 + c), 32'(h)) % (1 << TBL_BITS)] == 0) present = 0;
        checks++;
        if (!present) failures++;
      end
    // Keys that were never inserted (a lower-case base makes them differ
    // from every inserted K-mer): the share that looks present is the false
    // positive rate, about (1 - e^(-k*n/m))^k = 0.09% for k = 4,
    // n = 49152, m = 2^20. More than 0.5% counts as a failure.
    absent_hits = 0;
    for (int i = 0; i < 10000; i++) begin
      bit present;
      logic [63:0] key;
      key = kmer_at(i, 9999) | 64'h20;
      present = 1;
      for (int h = 0; h < 4; h++)
        if (table_cnt[mm3_ref(key, 32'(h)) % (1 << TBL_BITS)] == 0) present = 0;
      if (present) absent_hits++;
    end
    checks++;
    if (absent_hits > 50) begin failures++; $display("too many false positives"); end
    kmers = longint'(NC) * N_PER_CORE;
    rate_x100 = kmers * 100 / longint'(t_end - t_start);
    $display("%0d K-mers, %0d hashes in %0d cycles: %0d.%02d K-mers/cycle, %0d.%02d hashes/cycle",
             kmers, kmers * 4, t_end - t_start, rate_x100 / 100, rate_x100 % 100,
             (rate_x100 * 4) / 100, (rate_x100 * 4) % 100);
    $display("false positives among 10000 absent K-mers: %0d", absent_hits);
    checks++;
    if (rate_x100 < 200) begin failures++; $display("rate below 2 K-mers per cycle"); end
    checks++;
    if (mem.violations != 0) begin failures++; $display("burst violations"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
