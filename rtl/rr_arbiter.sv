// rr_arbiter: round-robin arbiter.
//
// Picks one of N requesters, searching upward from the one after the last
// winner, so every requester is served within N grants. The grant is
// combinational; `accept` (the granted transfer happened) moves the priority
// pointer past the winner. Pointer resets to 0.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N-1:0]               req,
  input  logic                       accept,
  output logic                       gnt_valid,
  output logic [$clog2(N+1)-1:0]     gnt_idx
);
  localparam int unsigned IW = $clog2(N+1);
  logic [IW-1:0] ptr;

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned c;
      c = (int'(ptr) + k) % N;
      if (!gnt_valid && req[c]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (accept && gnt_valid) ptr <= (gnt_idx == IW'(N-1)) ? '0 : gnt_idx + 1'b1;
  end
endmodule
