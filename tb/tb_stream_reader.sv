// tb_stream_reader: the reader fetches K-mer blocks from the DRAM model.
// Jobs of several lengths (a partial last beat, a page-crossing start, a
// single K-mer, zero K-mers) run with and without memory stalls and
// consumer back-pressure. Every K-mer is compared with the word placed in
// memory; the model flags page-crossing or misaligned bursts; with an ideal
// consumer and no stalls 800 K-mers must stream out within 800 + 40 cycles.
module tb_stream_reader;
  import cobloom_pkg::*;
  import mm3_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy;
  addr_t src_addr = '0;
  count_t n_kmers = '0;
  logic ar_valid, ar_ready, r_valid, r_ready, aw_ready, w_ready, b_valid;
  mem_a_t ar;
  mem_r_t r;
  mem_b_t b;
  logic out_valid, out_ready = 1;
  logic [63:0] out_kmer;
  int checks = 0, failures = 0;
  int unsigned cyc = 0, got = 0;
  logic [63:0] expq[$];
  bit backpressure = 0;

  stream_reader dut (.clk, .rst_n, .id(8'd5), .start, .src_addr, .n_kmers, .busy,
    .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r,
    .out_valid, .out_ready, .out_kmer);

  dram_model #(.WORDS(1024), .RD_LAT(12), .STALL_PCT(0)) mem_fast (
    .clk, .rst_n, .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r,
    .aw_valid(1'b0), .aw_ready, .aw('0), .w_valid(1'b0), .w_ready, .w('0),
    .b_valid, .b_ready(1'b1), .b);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    got++;
    if (expq.size() == 0 || out_kmer !== expq[0]) begin
      failures++; $display("kmer %h", out_kmer);
    end
    if (expq.size() != 0) void'(expq.pop_front());
  end
  always @(negedge clk) if (backpressure) out_ready = ($urandom % 3) != 0;
                        else out_ready = 1;

  task automatic run(input longint unsigned base, input int unsigned n, input int unsigned salt,
                     input int unsigned limit);
    int unsigned t0;
    for (int unsigned i = 0; i < n; i++) begin
      logic [63:0] v;
      v = kmer_at(i, salt);
      mem_fast.mem[(base >> 6) + i / 8][(i % 8) * 64 +: 64] = v;
      expq.push_back(v);
    end
    got = 0;
    @(negedge clk);
    src_addr = base; n_kmers = n; start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    while ((busy || got < n) && cyc - t0 < 100000) @(negedge clk);
    checks++;
    if (expq.size() != 0 || got != n) begin
      failures++; $display("job n=%0d: got %0d", n, got);
    end
    checks++;
    if (limit != 0 && cyc - t0 > limit) begin
      failures++; $display("job n=%0d took %0d cycles", n, cyc - t0);
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) mem_fast.mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(64'h0, 800, 1, 800 + 40);           // rate check
    run(64'h0fc0, 77, 2, 0);                // starts 1 beat before a page end
    run(64'h2000, 1, 3, 0);
    run(64'h2000, 0, 4, 0);
    backpressure = 1;
    run(64'h1040, 301, 5, 0);
    checks++;
    if (mem_fast.violations != 0) begin failures++; $display("burst violations %0d", mem_fast.violations); end
    $display("read bursts %0d, beats %0d", mem_fast.rd_bursts, mem_fast.rd_beats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
