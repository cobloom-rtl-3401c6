// tb_stream_writer: the writer stores hash records in the DRAM model.
// Memory is pre-filled with a marker byte; after each job every record must
// sit at dst + 16*j and the bytes after the last record of a partial beat
// must still hold the marker (byte strobes). Jobs cover a full-rate run with
// a cycle bound (800 records within 800 + 60 cycles), a page-crossing start,
// a single record, zero records, and a run with memory stalls and input gaps.
module tb_stream_writer;
  import cobloom_pkg::*;
  import mm3_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy;
  addr_t dst_addr = '0;
  count_t n_recs = '0;
  logic in_valid = 0, in_ready;
  logic [127:0] in_rec = '0;
  logic aw_valid, aw_ready, w_valid, w_ready, b_valid, b_ready, ar_ready, r_valid;
  mem_a_t aw;
  mem_w_t w;
  mem_b_t b;
  mem_r_t r;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  stream_writer dut (.clk, .rst_n, .id(8'd3), .start, .dst_addr, .n_recs, .busy,
    .in_valid, .in_ready, .in_rec, .aw_valid, .aw_ready, .aw,
    .w_valid, .w_ready, .w, .b_valid, .b_ready, .b);

  dram_model #(.WORDS(1024), .RD_LAT(4), .STALL_PCT(0)) mem (
    .clk, .rst_n, .ar_valid(1'b0), .ar_ready, .ar('0), .r_valid, .r_ready(1'b1), .r,
    .aw_valid, .aw_ready, .aw, .w_valid, .w_ready, .w, .b_valid, .b_ready, .b);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] rec_at(int unsigned j, int unsigned salt);
    return {kmer_at(j, salt + 7), kmer_at(j, salt)};
  endfunction

  task automatic run(input longint unsigned base, input int unsigned n, input int unsigned salt,
                     input bit gaps, input int unsigned limit);
    int unsigned t0, sent, beats;
    sent = 0;
    @(negedge clk);
    dst_addr = base; n_recs = n; start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    while (sent < n) begin
      in_valid = gaps ? (($urandom % 3) != 0) : 1'b1;
      in_rec   = rec_at(sent, salt);
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      @(negedge clk);
    end
    in_valid = 0;
    while (busy && cyc - t0 < 100000) @(negedge clk);
    checks++;
    if (limit != 0 && cyc - t0 > limit) begin failures++; $display("n=%0d took %0d", n, cyc - t0); end
    beats = (n + 3) / 4;
    for (int unsigned j = 0; j < beats * 4; j++) begin
      logic [127:0] got;
      got = mem.mem[(base >> 6) + j / 4][(j % 4) * 128 +: 128];
      checks++;
      if (j < n && got !== rec_at(j, salt)) begin failures++; $display("rec %0d = %h", j, got); end
      if (j >= n && got !== {16{8'ha5}}) begin failures++; $display("slot %0d overwritten", j); end
    end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) mem.mem[i] = {64{8'ha5}};
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(64'h0, 800, 1, 0, 800 + 60);
    run(64'h5f80, 45, 2, 0, 0);       // two beats before a page end
    run(64'h7000, 1, 3, 0, 0);
    run(64'h7400, 0, 4, 0, 0);
    mem.stall_pct = 40;
    run(64'h8000, 333, 5, 1, 0);
    checks++;
    if (mem.violations != 0) begin failures++; $display("burst violations %0d", mem.violations); end
    $display("write bursts %0d, beats %0d", mem.wr_bursts, mem.wr_beats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
