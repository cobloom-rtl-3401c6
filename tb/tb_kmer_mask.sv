// tb_kmer_mask: drives random K-mers and masks through the mask stage with
// random back-pressure and checks every output word equals input AND mask,
// in order, with none lost or duplicated.
module tb_kmer_mask;
  logic clk = 0, rst_n = 0;
  logic [63:0] mask = '0, in_kmer = '0, out_kmer;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  int checks = 0, failures = 0;
  logic [63:0] expq[$];

  kmer_mask dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) expq.push_back(in_kmer & mask);
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0 || out_kmer !== expq[0]) begin
        failures++; $display("got %h", out_kmer);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    mask = 64'h0000ffffffffffff;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i == 1500) mask = {$urandom, $urandom};
      if (!in_valid || in_ready) begin
        in_valid = ($urandom % 4) != 0;
        in_kmer  = {$urandom, $urandom};
      end
      out_ready = ($urandom % 3) != 0;
    end
    @(negedge clk) in_valid = 0; out_ready = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
