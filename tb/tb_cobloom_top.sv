// tb_cobloom_top: the whole hashing system with four cores, end to end.
//
// A host model places a block of genome K-mers per core in the DRAM model,
// sends each core a job (different sizes, seeds and masks, three rounds, the
// second with memory stalls, the third with the host slow to take
// responses), and collects the completion responses. It then
// reads every core's hash records back, compares them with the reference
// Murmur3, and, as the host does with the copied hashes, inserts them into a
// counting Bloom filter (2^16 one-byte counters, index = low 16 hash bits)
// and checks that every inserted K-mer is then reported present.
//
// The test counts how often each mechanism of the design occurs and fails
// if one never does: several cores running at once, read-request
// contention in the interconnect, DRAM back-pressure, a stalled hash
// pipeline, a partial last write beat, a burst shortened at a page boundary,
// a command waiting for a busy core, and responses competing for the host.
module tb_cobloom_top;
  import cobloom_pkg::*;
  import mm3_ref_pkg::*;
  localparam int NC = 4;
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

  cobloom_top #(.N_CORES(NC)) dut (.*);
  dram_model #(.WORDS(16384), .RD_LAT(30), .STALL_PCT(0)) mem (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int unsigned n_parallel = 0, n_rd_contention = 0, n_mem_stall = 0, n_hash_stall = 0;
  int unsigned n_partial_beat = 0, n_page_split = 0, n_busy_wait = 0, n_resp_compete = 0;
  always @(posedge clk) if (rst_n) begin
    int busy_cores, hstall;
    busy_cores = 0; hstall = 0;
    for (int c = 0; c < NC; c++) if (!dut.c_cmd_ready[c]) busy_cores++;
    if (busy_cores > 1) n_parallel++;
    if ($countones(dut.c_ar_valid) > 1) n_rd_contention++;
    if ((ar_valid && !ar_ready) || (w_valid && !w_ready)) n_mem_stall++;
    if (dut.g_core[0].u_core.h_valid && !dut.g_core[0].u_core.h_ready) hstall++;
    if (dut.g_core[1].u_core.h_valid && !dut.g_core[1].u_core.h_ready) hstall++;
    if (hstall != 0) n_hash_stall++;
    if (w_valid && w_ready && w.strb != '1) n_partial_beat++;
    if (ar_valid && ar_ready && ar.len != 8'd7 && ((ar.addr + 64'((ar.len + 1) * 64)) % 4096) == 0)
      n_page_split++;
    if (cmd_valid && !cmd_ready) n_busy_wait++;
    if ($countones(dut.c_resp_valid) > 1) n_resp_compete++;
  end

  // ---------------- host model ----------------
  typedef struct { int unsigned n; logic [31:0] seed; logic [63:0] mask; int unsigned salt;
                   longint unsigned src, dst; } job_t;
  job_t jobs [$];
  int unsigned resp_count = 0;

  bit hold_resp = 0;
  always @(negedge clk) resp_ready = !hold_resp && (($urandom % 4) != 0);
  always @(posedge clk) if (rst_n && resp_valid && resp_ready) begin
    resp_count++;
    checks++;
    if (resp.core >= NC) begin failures++; $display("response from core %0d", resp.core); end
  end

  task automatic send(input int unsigned core, input job_t j);
    for (int unsigned i = 0; i < j.n; i++)
      mem.mem[(j.src >> 6) + i / 8][(i % 8) * 64 +: 64] = kmer_at(i, j.salt);
    @(negedge clk);
    cmd = '{core: 8'(core), src_addr: j.src, dst_addr: j.dst, n_kmers: j.n, seed: j.seed, mask: j.mask};
    cmd_valid = 1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk) cmd_valid = 0;
    jobs.push_back(j);
  endtask

  logic [7:0] table_cnt [65536];

  task automatic check_and_insert(input job_t j);
    for (int unsigned i = 0; i < j.n; i++) begin
      logic [127:0] got, e;
      for (int h = 0; h < 4; h++) e[h*32 +: 32] = mm3_ref(kmer_at(i, j.salt) & j.mask, j.seed + h);
      got = mem.mem[(j.dst >> 6) + i / 4][(i % 4) * 128 +: 128];
      checks++;
      if (got !== e) begin failures++; if (failures < 10) $display("job salt %0d rec %0d wrong", j.salt, i); end
      for (int h = 0; h < 4; h++)
        if (table_cnt[got[h*32 +: 16]] != 8'hff) table_cnt[got[h*32 +: 16]]++;
    end
  endtask

  task automatic lookup(input job_t j);
    for (int unsigned i = 0; i < j.n; i++) begin
      bit present;
      present = 1;
      for (int h = 0; h < 4; h++)
        if (table_cnt[16'(mm3_ref(kmer_at(i, j.salt) & j.mask, j.seed + h))] == 0) present = 0;
      checks++;
      if (!present) failures++;
    end
  endtask

  initial begin
    int unsigned total;
    for (int i = 0; i < 16384; i++) mem.mem[i] = '0;
    for (int i = 0; i < 65536; i++) table_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // round 1: ideal memory, every core busy at once
    for (int c = 0; c < NC; c++)
      send(c, '{n: 301 + 64 * c, seed: 32'(c * 16), mask: '1, salt: c + 1,
                src: 64'(c) * 64'h10000 + 64'hfc0, dst: 64'h80000 + 64'(c) * 64'h10000});
    // core 0 again right away: must wait until its first job is done
    send(0, '{n: 123, seed: 32'h9747b28c, mask: 64'h0000ffffffffffff, salt: 9,
              src: 64'h8000, dst: 64'hc0000});
    while (resp_count < jobs.size()) @(negedge clk);
    // round 2: memory stalls
    mem.stall_pct = 35;
    for (int c = 0; c < NC; c++)
      send(c, '{n: 150 + 33 * c, seed: 32'(1000 + c), mask: '1, salt: 20 + c,
                src: 64'(c) * 64'h10000 + 64'h4000, dst: 64'h80000 + 64'(c) * 64'h10000 + 64'h8000});
    while (resp_count < jobs.size()) @(negedge clk);
    // round 3: the host is slow to take responses, so finished cores queue up
    mem.stall_pct = 0;
    hold_resp = 1;
    for (int c = 0; c < NC; c++)
      send(c, '{n: 64, seed: 32'(77 * c), mask: '1, salt: 40 + c,
                src: 64'(c) * 64'h10000 + 64'h6000, dst: 64'hd0000 + 64'(c) * 64'h1000});
    repeat (400) @(negedge clk);
    hold_resp = 0;
    while (resp_count < jobs.size()) @(negedge clk);
    repeat (5) @(negedge clk);
    total = 0;
    foreach (jobs[k]) begin check_and_insert(jobs[k]); total += jobs[k].n; end
    foreach (jobs[k]) lookup(jobs[k]);
    checks++;
    if (mem.violations != 0) begin failures++; $display("burst violations %0d", mem.violations); end
    $display("jobs %0d, K-mers %0d", jobs.size(), total);
    $display("parallel=%0d rd_contention=%0d mem_stall=%0d hash_stall=%0d partial_beat=%0d page_split=%0d busy_wait=%0d resp_compete=%0d",
             n_parallel, n_rd_contention, n_mem_stall, n_hash_stall, n_partial_beat, n_page_split,
             n_busy_wait, n_resp_compete);
    checks += 8;
    if (n_parallel == 0)      begin failures++; $display("never several cores busy"); end
    if (n_rd_contention == 0) begin failures++; $display("never read contention"); end
    if (n_mem_stall == 0)     begin failures++; $display("never memory back-pressure"); end
    if (n_hash_stall == 0)    begin failures++; $display("never a hash stall"); end
    if (n_partial_beat == 0)  begin failures++; $display("never a partial beat"); end
    if (n_page_split == 0)    begin failures++; $display("never a page split"); end
    if (n_busy_wait == 0)     begin failures++; $display("never a busy core"); end
    if (n_resp_compete == 0)  begin failures++; $display("never competing responses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
