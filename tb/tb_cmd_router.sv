// tb_cmd_router: four model cores with random readiness behind the router.
// The host sends 200 commands to random cores (some to a non-existent core
// index); each must reach exactly its core unchanged, and commands to an
// absent core must be taken and dropped. Each model core answers every
// command after a random delay; all answers must reach the host, tagged
// with the right core. A burst where all four cores answer at once checks
// that the round-robin arbiter serves them in rotation.
module tb_cmd_router;
  import cobloom_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic h_cmd_valid = 0, h_cmd_ready, h_resp_valid, h_resp_ready = 0;
  cmd_t h_cmd = '0, c_cmd;
  resp_t h_resp;
  logic [N-1:0] c_cmd_valid, c_cmd_ready = '0, c_resp_valid = '0, c_resp_ready;
  resp_t c_resp [N];
  int checks = 0, failures = 0;
  cmd_t sentq [N][$];
  int unsigned pending [N];
  int unsigned resp_seen [N];
  int unsigned dropped = 0, sent_total = 0, resp_total = 0;
  int unsigned order [$];

  cmd_router #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar i = 0; i < N; i++) begin : g_core
    always @(posedge clk) if (rst_n) begin
      if (c_cmd_valid[i] && c_cmd_ready[i]) begin
        checks++;
        if (sentq[i].size() == 0 || c_cmd !== sentq[i][0]) begin
          failures++; $display("core %0d got wrong command", i);
        end
        if (sentq[i].size() != 0) void'(sentq[i].pop_front());
        pending[i]++;
      end
      c_cmd_ready[i] <= ($urandom % 3) == 0;
      if (c_resp_valid[i] && c_resp_ready[i]) begin
        c_resp_valid[i] <= 1'b0;
        pending[i]--;
      end else if (!c_resp_valid[i] && pending[i] > 0 && ($urandom % 4) == 0) begin
        c_resp_valid[i] <= 1'b1;
        c_resp[i] <= '{core: 8'(i), n_kmers: 32'(i * 100), cycles: 32'(pending[i])};
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (c_cmd_valid[i] && i != int'(h_cmd.core)) begin
      failures++; $display("command leaked to core %0d", i);
    end
    if (h_resp_valid && h_resp_ready) begin
      checks++;
      resp_total++;
      order.push_back(h_resp.core);
      if (h_resp.core >= N || h_resp.n_kmers != 32'(h_resp.core) * 100) begin
        failures++; $display("bad response");
      end else resp_seen[h_resp.core]++;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin pending[i] = 0; resp_seen[i] = 0; c_resp[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    h_resp_ready = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      h_cmd = '{core: 8'($urandom % (N + 1)), src_addr: {$urandom, $urandom},
                dst_addr: {$urandom, $urandom}, n_kmers: $urandom, seed: $urandom,
                mask: {$urandom, $urandom}};
      if (h_cmd.core < N) begin sentq[h_cmd.core].push_back(h_cmd); sent_total++; end
      else dropped++;
      h_cmd_valid = 1;
      @(posedge clk);
      while (!h_cmd_ready) @(posedge clk);
      @(negedge clk) h_cmd_valid = 0;
    end
    while (resp_total < sent_total) @(negedge clk);
    checks++;
    for (int i = 0; i < N; i++) if (sentq[i].size() != 0) begin failures++; $display("lost"); end
    // all cores answer at once while the host is stalled
    h_resp_ready = 0;
    for (int i = 0; i < N; i++) pending[i] = 1;
    repeat (30) @(negedge clk);
    order.delete();
    h_resp_ready = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (order.size() != N) begin failures++; $display("got %0d answers", order.size()); end
    else for (int i = 1; i < N; i++)
      if (order[i] != (order[i-1] + 1) % N) begin failures++; $display("not round robin"); end
    $display("commands %0d, dropped %0d", sent_total, dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
