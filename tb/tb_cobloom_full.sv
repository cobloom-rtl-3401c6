// tb_cobloom_full: the system at its full size (24 cores, default
// parameters) running one complete operation: every core gets a block of
// K-mers at once, as every host thread offloads its own block, and after
// all 24 responses every hash record of every core is compared with the
// reference Murmur3. The DRAM model stalls a fifth of the time.
module tb_cobloom_full;
  import cobloom_pkg::*;
  import mm3_ref_pkg::*;
  localparam int NC = 24;
  localparam int N_PER_CORE = 200;
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
  int unsigned cyc = 0, resp_count = 0, first_cmd = 0, last_resp = 0;
  bit [NC-1:0] answered = '0;

  cobloom_top dut (.*);
  dram_model #(.WORDS(32768), .RD_LAT(30), .STALL_PCT(20)) mem (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && resp_valid && resp_ready) begin
    resp_count++;
    last_resp = cyc;
    checks++;
    if (resp.core >= NC || answered[resp.core] || resp.n_kmers != N_PER_CORE) begin
      failures++; $display("bad response from core %0d", resp.core);
    end else answered[resp.core] = 1'b1;
  end

  initial begin
    for (int i = 0; i < 32768; i++) mem.mem[i] = '0;
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < N_PER_CORE; i++)
        mem.mem[(c * 32'h10000) / 64 + i / 8][(i % 8) * 64 +: 64] = kmer_at(i, c);
    repeat (3) @(posedge clk);
    rst_n = 1;
    first_cmd = cyc;
    for (int c = 0; c < NC; c++) begin
      @(negedge clk);
      cmd = '{core: 8'(c), src_addr: 64'(c) * 64'h10000, dst_addr: 64'(c) * 64'h10000 + 64'h8000,
              n_kmers: N_PER_CORE, seed: 32'(c * 4), mask: '1};
      cmd_valid = 1;
      @(posedge clk);
      while (!cmd_ready) @(posedge clk);
      @(negedge clk) cmd_valid = 0;
    end
    while (resp_count < NC) @(negedge clk);
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < N_PER_CORE; i++) begin
        logic [127:0] got, e;
        for (int h = 0; h < 4; h++) e[h*32 +: 32] = mm3_ref(kmer_at(i, c), 32'(c * 4 + h));
        got = mem.mem[(c * 32'h10000 + 32'h8000) / 64 + i / 4][(i % 4) * 128 +: 128];
        checks++;
        if (got !== e) begin failures++; if (failures < 10) $display("core %0d rec %0d wrong", c, i); end
      end
    checks++;
    if (mem.violations != 0) begin failures++; $display("burst violations"); end
    $display("%0d cores x %0d K-mers hashed in %0d cycles", NC, N_PER_CORE, last_resp - first_cmd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
