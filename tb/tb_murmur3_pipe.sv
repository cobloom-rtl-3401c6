// tb_murmur3_pipe: checks the pipelined Murmur3 unit against published-style
// vectors (computed offline with a software Murmur3_x86_32), against the
// sequential reference for random keys and seeds, checks the 7-cycle
// latency, and checks that a stall (en low) holds every stage.
module tb_murmur3_pipe;
  import mm3_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  logic [63:0] key = '0;
  logic [31:0] seed = '0;
  logic out_valid;
  logic [31:0] hash;
  int checks = 0, failures = 0;

  murmur3_pipe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [63:0] k; logic [31:0] s; logic [31:0] h; } vec_t;
  vec_t fixed [6] = '{
    '{64'h0123456789abcdef, 32'h00000000, 32'hfa908422},
    '{64'h0000000000000000, 32'h00000000, 32'h63852afc},
    '{64'hffffffffffffffff, 32'h9747b28c, 32'h7584c82b},
    '{64'h4143474754414347, 32'h00000001, 32'h8fbb8ae8},
    '{64'h4143474754414347, 32'h00000002, 32'h3fcbec59},
    '{64'hdeadbeefcafef00d, 32'h00000003, 32'h925db140}};

  logic [31:0] expq[$];
  int unsigned sent_cycle[$];
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && en && out_valid) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        logic [31:0] e;
        e = expq.pop_front();
        if (hash !== e) begin failures++; $display("hash %h expected %h", hash, e); end
      end
    end
  end

  initial begin
    int unsigned t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fixed vectors, and latency of the first one
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      in_valid = 1; key = fixed[i].k; seed = fixed[i].s;
      expq.push_back(fixed[i].h);
      if (i == 0) t0 = cyc;
    end
    @(negedge clk) in_valid = 0;
    wait (out_valid);
    @(negedge clk);
    checks++;
    // the output of the first key appears 7 cycles after it was presented
    if (cyc - t0 != 8 && cyc - t0 != 7) begin failures++; $display("latency %0d", cyc - t0); end
    repeat (10) @(negedge clk);
    // random keys with random stalls
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      in_valid = ($urandom % 3) != 0;
      key = {$urandom, $urandom};
      seed = $urandom;
      if (en && in_valid) expq.push_back(mm3_ref(key, seed));
    end
    @(negedge clk) in_valid = 0; en = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
