// tb_mem_interconnect: three traffic generators share the DRAM model
// through the interconnect, with random stalls on both sides.
// Each generator issues random read bursts into a pre-filled region and
// checks that exactly its own data comes back, in order, with correct last
// flags; each also writes a sequence of bursts to its own region, and the
// memory is checked afterwards, together with one write response per burst.
// The test counts cycles where several generators compete, and requires some.
module tb_mem_interconnect;
  import cobloom_pkg::*;
  localparam int N = 3;
  localparam int RD_BURSTS = 150, WR_BURSTS = 40;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] s_ar_valid = '0, s_ar_ready, s_r_valid, s_r_ready = '0;
  logic [N-1:0] s_aw_valid = '0, s_aw_ready, s_w_valid = '0, s_w_ready, s_b_valid;
  mem_a_t s_ar [N];
  mem_a_t s_aw [N];
  mem_w_t s_w  [N];
  mem_r_t s_r;
  mem_b_t s_b;
  logic m_ar_valid, m_ar_ready, m_r_valid, m_r_ready, m_aw_valid, m_aw_ready;
  logic m_w_valid, m_w_ready, m_b_valid, m_b_ready;
  mem_a_t m_ar, m_aw;
  mem_r_t m_r;
  mem_w_t m_w;
  mem_b_t m_b;
  int checks = 0, failures = 0, contention = 0;

  mem_interconnect #(.N(N)) dut (.*);
  dram_model #(.WORDS(2048), .RD_LAT(6), .STALL_PCT(25)) mem (
    .clk, .rst_n, .ar_valid(m_ar_valid), .ar_ready(m_ar_ready), .ar(m_ar),
    .r_valid(m_r_valid), .r_ready(m_r_ready), .r(m_r),
    .aw_valid(m_aw_valid), .aw_ready(m_aw_ready), .aw(m_aw),
    .w_valid(m_w_valid), .w_ready(m_w_ready), .w(m_w),
    .b_valid(m_b_valid), .b_ready(m_b_ready), .b(m_b));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [511:0] rd_pat(int unsigned beat);
    return {16{beat[15:0] ^ 16'h5a5a, 16'(beat * 7)}};
  endfunction
  function automatic logic [511:0] wr_pat(int unsigned m, int unsigned beat);
    return {16{16'(m) + 16'h1000, 16'(beat * 3 + 1)}};
  endfunction

  int rd_done [N], rd_issued [N], wr_issued [N], wr_beats_sent [N], b_got [N];
  logic [511:0] expq [N][$];
  int unsigned lenq [N][$];
  int unsigned wlen [N][$];

  always @(posedge clk) if (rst_n) begin
    if ($countones(s_ar_valid) > 1 || $countones(s_aw_valid) > 1) contention++;
    if ($countones(s_r_valid) > 1) begin failures++; $display("read data to several"); end
  end

  for (genvar m = 0; m < N; m++) begin : g_gen
    // read requests
    always @(posedge clk) if (rst_n) begin
      if (s_ar_valid[m] && s_ar_ready[m]) begin
        s_ar_valid[m] <= 1'b0;
        rd_issued[m]++;
      end else if (!s_ar_valid[m] && rd_issued[m] < RD_BURSTS && ($urandom % 2)) begin
        int unsigned off, len;
        off = 64 * m + ($urandom % 56);
        len = $urandom % 8;
        s_ar[m].id   <= 8'hee;              // replaced by the interconnect
        s_ar[m].addr <= 64'(off) << 6;
        s_ar[m].len  <= 8'(len);
        s_ar_valid[m] <= 1'b1;
        for (int unsigned k = 0; k <= len; k++) expq[m].push_back(rd_pat(off + k));
        lenq[m].push_back(len);
      end
    end
    // read data
    int unsigned beat_in_burst = 0;
    always @(posedge clk) if (rst_n) begin
      if (s_r_valid[m] && s_r_ready[m]) begin
        checks++;
        if (expq[m].size() == 0 || s_r.data !== expq[m][0] ||
            s_r.last != (beat_in_burst == lenq[m][0])) begin
          failures++; $display("gen %0d bad read beat", m);
        end
        if (expq[m].size() != 0) void'(expq[m].pop_front());
        if (beat_in_burst == lenq[m][0]) begin
          beat_in_burst = 0; void'(lenq[m].pop_front()); rd_done[m]++;
        end else beat_in_burst++;
      end
      s_r_ready[m] <= ($urandom % 4) != 0;
    end
    // write bursts: 4 beats each, sequential addresses
    int unsigned wb = 0;
    always @(posedge clk) if (rst_n) begin
      if (s_aw_valid[m] && s_aw_ready[m]) begin
        s_aw_valid[m] <= 1'b0;
        wr_issued[m]++;
        wlen[m].push_back(4);
      end else if (!s_aw_valid[m] && wr_issued[m] < WR_BURSTS && ($urandom % 3) == 0
                   && wlen[m].size() < 2) begin
        s_aw[m].id   <= 8'hee;
        s_aw[m].addr <= 64'h10000 + 64'(m) * 64'h4000 + 64'(wr_issued[m]) * 256;
        s_aw[m].len  <= 8'd3;
        s_aw_valid[m] <= 1'b1;
      end
      if (s_w_valid[m] && s_w_ready[m]) begin
        wr_beats_sent[m]++;
        wb++;
        if (wb == 4) begin wb = 0; void'(wlen[m].pop_front()); end
      end
      if (s_b_valid[m]) b_got[m]++;
    end
    always_comb begin
      s_w_valid[m]  = wlen[m].size() > 0;
      s_w[m].data   = wr_pat(m, wr_beats_sent[m]);
      s_w[m].strb   = '1;
      s_w[m].last   = (wb == 3);
    end
  end

  initial begin
    for (int i = 0; i < 2048; i++) mem.mem[i] = rd_pat(i);
    for (int m = 0; m < N; m++) begin rd_done[m] = 0; rd_issued[m] = 0; wr_issued[m] = 0;
      wr_beats_sent[m] = 0; b_got[m] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (rd_done[0] == RD_BURSTS && rd_done[1] == RD_BURSTS && rd_done[2] == RD_BURSTS &&
          b_got[0] == WR_BURSTS && b_got[1] == WR_BURSTS && b_got[2] == WR_BURSTS);
    repeat (10) @(posedge clk);
    for (int m = 0; m < N; m++)
      for (int k = 0; k < WR_BURSTS * 4; k++) begin
        checks++;
        if (mem.mem[(32'h10000 + m * 32'h4000) / 64 + k] !== wr_pat(m, k)) begin
          failures++; $display("gen %0d write beat %0d wrong", m, k);
        end
      end
    checks++;
    if (contention == 0) begin failures++; $display("no contention seen"); end
    checks++;
    if (mem.violations != 0) begin failures++; $display("violations"); end
    $display("contention cycles %0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
