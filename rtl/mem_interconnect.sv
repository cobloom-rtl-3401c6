// mem_interconnect: shares the single FPGA DRAM channel among N cores.
//
// Read side: a round-robin arbiter picks one core's read request per cycle
// and tags it with the core's index as ID; read data is steered back to the
// core named by its ID. Write side: a round-robin arbiter picks one core's
// write burst; the winner keeps the write-data channel until its last beat,
// then the next burst is chosen (bursts are not interleaved, as AXI4 write
// data may not be). Write responses are steered by ID.
//
// A request that has been offered but not yet taken by the memory keeps its
// grant, so the address presented to the memory never changes while it is
// stalled. The document only says that the memory interconnect is generated
// for the many-core system; this arbitration scheme is this design's own.
module mem_interconnect
  import cobloom_pkg::*;
#(
  parameter int unsigned N = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  // core side
  input  logic [N-1:0]  s_ar_valid,
  output logic [N-1:0]  s_ar_ready,
  input  mem_a_t        s_ar [N],
  output logic [N-1:0]  s_r_valid,
  input  logic [N-1:0]  s_r_ready,
  output mem_r_t        s_r,
  input  logic [N-1:0]  s_aw_valid,
  output logic [N-1:0]  s_aw_ready,
  input  mem_a_t        s_aw [N],
  input  logic [N-1:0]  s_w_valid,
  output logic [N-1:0]  s_w_ready,
  input  mem_w_t        s_w [N],
  output logic [N-1:0]  s_b_valid,
  output mem_b_t        s_b,
  // DRAM side
  output logic          m_ar_valid,
  input  logic          m_ar_ready,
  output mem_a_t        m_ar,
  input  logic          m_r_valid,
  output logic          m_r_ready,
  input  mem_r_t        m_r,
  output logic          m_aw_valid,
  input  logic          m_aw_ready,
  output mem_a_t        m_aw,
  output logic          m_w_valid,
  input  logic          m_w_ready,
  output mem_w_t        m_w,
  input  logic          m_b_valid,
  output logic          m_b_ready,
  input  mem_b_t        m_b
);
  localparam int unsigned IW = $clog2(N+1);

  // ---------------- read address ----------------
  logic          ar_gv, ar_hold;
  logic [IW-1:0] ar_gi, ar_hold_i, ar_sel;

  rr_arbiter #(.N(N)) u_ar_arb (
    .clk, .rst_n, .req(s_ar_valid), .accept(m_ar_valid && m_ar_ready),
    .gnt_valid(ar_gv), .gnt_idx(ar_gi)
  );

  assign ar_sel     = ar_hold ? ar_hold_i : ar_gi;
  assign m_ar_valid = ar_hold || ar_gv;
  always_comb begin
    m_ar    = s_ar[ar_sel];
    m_ar.id = MEM_ID_W'(ar_sel);
    s_ar_ready = '0;
    s_ar_ready[ar_sel] = m_ar_ready && m_ar_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar_hold   <= 1'b0;
      ar_hold_i <= '0;
    end else begin
      ar_hold   <= m_ar_valid && !m_ar_ready;
      ar_hold_i <= ar_sel;
    end
  end

  // ---------------- read data ----------------
  always_comb begin
    s_r       = m_r;
    s_r_valid = '0;
    m_r_ready = 1'b0;
    if (32'(m_r.id) < N) begin
      s_r_valid[IW'(m_r.id)] = m_r_valid;
      m_r_ready         = s_r_ready[IW'(m_r.id)];
    end
  end

  // ---------------- write address + data ----------------
  logic          aw_gv, aw_hold, w_active;
  logic [IW-1:0] aw_gi, aw_hold_i, aw_sel, w_idx;

  rr_arbiter #(.N(N)) u_aw_arb (
    .clk, .rst_n, .req(s_aw_valid & {N{!w_active}}), .accept(m_aw_valid && m_aw_ready),
    .gnt_valid(aw_gv), .gnt_idx(aw_gi)
  );

  assign aw_sel     = aw_hold ? aw_hold_i : aw_gi;
  assign m_aw_valid = !w_active && (aw_hold || aw_gv);
  always_comb begin
    m_aw    = s_aw[aw_sel];
    m_aw.id = MEM_ID_W'(aw_sel);
    s_aw_ready = '0;
    s_aw_ready[aw_sel] = m_aw_ready && m_aw_valid;
  end

  assign m_w_valid = w_active && s_w_valid[w_idx];
  always_comb begin
    m_w       = s_w[w_idx];
    s_w_ready = '0;
    s_w_ready[w_idx] = w_active && m_w_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_hold   <= 1'b0;
      aw_hold_i <= '0;
      w_active  <= 1'b0;
      w_idx     <= '0;
    end else begin
      aw_hold   <= m_aw_valid && !m_aw_ready;
      aw_hold_i <= aw_sel;
      if (m_aw_valid && m_aw_ready) begin
        w_active <= 1'b1;
        w_idx    <= aw_sel;
      end else if (m_w_valid && m_w_ready && m_w.last) begin
        w_active <= 1'b0;
      end
    end
  end

  // ---------------- write response ----------------
  always_comb begin
    s_b       = m_b;
    s_b_valid = '0;
    if (32'(m_b.id) < N) s_b_valid[IW'(m_b.id)] = m_b_valid;
  end
  assign m_b_ready = 1'b1;

`ifndef SYNTHESIS
  property p_m_ar_stable;
    @(posedge clk) disable iff (!rst_n) (m_ar_valid && !m_ar_ready) |=> (m_ar_valid && $stable(m_ar));
  endproperty
  assert property (p_m_ar_stable) else $error("DRAM read address changed while stalled");
  property p_m_aw_stable;
    @(posedge clk) disable iff (!rst_n) (m_aw_valid && !m_aw_ready) |=> (m_aw_valid && $stable(m_aw));
  endproperty
  assert property (p_m_aw_stable) else $error("DRAM write address changed while stalled");
`endif
endmodule
