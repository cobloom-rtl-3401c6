// cmd_router: control interconnect between the host and the N cores.
//
// A host command carries the index of the core it is for; the router passes
// it to that core and lets that core's cmd_ready through, so a busy core
// stalls the host link until it is idle. Commands for an index with no core
// are accepted and dropped. Completion responses from the cores are merged
// onto the single response link by a round-robin arbiter. The document names
// a generated control interconnect and a per-core command interface; this
// routing scheme is this design's own.
module cmd_router
  import cobloom_pkg::*;
#(
  parameter int unsigned N = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  // host side
  input  logic         h_cmd_valid,
  output logic         h_cmd_ready,
  input  cmd_t         h_cmd,
  output logic         h_resp_valid,
  input  logic         h_resp_ready,
  output resp_t        h_resp,
  // core side
  output logic [N-1:0] c_cmd_valid,
  input  logic [N-1:0] c_cmd_ready,
  output cmd_t         c_cmd,
  input  logic [N-1:0] c_resp_valid,
  output logic [N-1:0] c_resp_ready,
  input  resp_t        c_resp [N]
);
  localparam int unsigned IW = $clog2(N+1);

  logic          in_range;
  logic          gv;
  logic [IW-1:0] gi;

  assign in_range = (32'(h_cmd.core) < N);
  assign c_cmd    = h_cmd;

  always_comb begin
    c_cmd_valid = '0;
    h_cmd_ready = 1'b1;
    if (in_range) begin
      c_cmd_valid[IW'(h_cmd.core)] = h_cmd_valid;
      h_cmd_ready             = c_cmd_ready[IW'(h_cmd.core)];
    end
  end

  // Responses are held by the cores until taken, so the grant is stable.
  rr_arbiter #(.N(N)) u_resp_arb (
    .clk, .rst_n, .req(c_resp_valid), .accept(h_resp_ready),
    .gnt_valid(gv), .gnt_idx(gi)
  );

  assign h_resp_valid = gv;
  assign h_resp       = c_resp[gi];
  always_comb begin
    c_resp_ready     = '0;
    c_resp_ready[gi] = gv && h_resp_ready;
  end
endmodule
