// cobloom_top: the FPGA side of the CoBloom hashing system.
//
// N_CORES Murmur3 accelerator cores (one per host thread) sit between a
// host command link and the board's single DRAM channel. The host writes a
// block of genome K-mers into FPGA DRAM, sends a core a job, and gets a
// response when that core has written one 128-bit record of four hashes per
// K-mer back to DRAM; it then copies the hashes to its own memory and does
// the counting Bloom filter updates itself. Cores work independently, so
// the host threads run their table updates while the FPGA hashes the next
// block.
//
// Ports: the host command/response link (valid/ready, structs of
// cobloom_pkg) and one split-channel DRAM port. The PCIe/DMA shell, the
// DRAM controller and the host are outside this module.
module cobloom_top
  import cobloom_pkg::*;
#(
  parameter int unsigned N_CORES     = 24,
  parameter int unsigned BURST_BEATS = 8,
  parameter int unsigned RD_FIFO     = 32,
  parameter int unsigned WR_FIFO     = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  // host command / response link
  input  logic   cmd_valid,
  output logic   cmd_ready,
  input  cmd_t   cmd,
  output logic   resp_valid,
  input  logic   resp_ready,
  output resp_t  resp,
  // DRAM port
  output logic   ar_valid,
  input  logic   ar_ready,
  output mem_a_t ar,
  input  logic   r_valid,
  output logic   r_ready,
  input  mem_r_t r,
  output logic   aw_valid,
  input  logic   aw_ready,
  output mem_a_t aw,
  output logic   w_valid,
  input  logic   w_ready,
  output mem_w_t w,
  input  logic   b_valid,
  output logic   b_ready,
  input  mem_b_t b
);
  logic [N_CORES-1:0] c_cmd_valid, c_cmd_ready, c_resp_valid, c_resp_ready;
  cmd_t               c_cmd;
  resp_t              c_resp [N_CORES];

  logic [N_CORES-1:0] c_ar_valid, c_ar_ready, c_r_valid, c_r_ready;
  logic [N_CORES-1:0] c_aw_valid, c_aw_ready, c_w_valid, c_w_ready, c_b_valid, c_b_ready;
  mem_a_t             c_ar [N_CORES];
  mem_a_t             c_aw [N_CORES];
  mem_w_t             c_w  [N_CORES];
  mem_r_t             c_r;
  mem_b_t             c_b;

  cmd_router #(.N(N_CORES)) u_router (
    .clk, .rst_n,
    .h_cmd_valid (cmd_valid),  .h_cmd_ready (cmd_ready),  .h_cmd (cmd),
    .h_resp_valid(resp_valid), .h_resp_ready(resp_ready), .h_resp(resp),
    .c_cmd_valid, .c_cmd_ready, .c_cmd,
    .c_resp_valid, .c_resp_ready, .c_resp
  );

  for (genvar i = 0; i < N_CORES; i++) begin : g_core
    accel_core #(
      .CORE_ID(i), .BURST_BEATS(BURST_BEATS), .RD_FIFO(RD_FIFO), .WR_FIFO(WR_FIFO)
    ) u_core (
      .clk, .rst_n,
      .cmd_valid (c_cmd_valid[i]),  .cmd_ready (c_cmd_ready[i]),  .cmd (c_cmd),
      .resp_valid(c_resp_valid[i]), .resp_ready(c_resp_ready[i]), .resp(c_resp[i]),
      .ar_valid(c_ar_valid[i]), .ar_ready(c_ar_ready[i]), .ar(c_ar[i]),
      .r_valid (c_r_valid[i]),  .r_ready (c_r_ready[i]),  .r (c_r),
      .aw_valid(c_aw_valid[i]), .aw_ready(c_aw_ready[i]), .aw(c_aw[i]),
      .w_valid (c_w_valid[i]),  .w_ready (c_w_ready[i]),  .w (c_w[i]),
      .b_valid (c_b_valid[i]),  .b_ready (c_b_ready[i]),  .b (c_b)
    );
  end

  mem_interconnect #(.N(N_CORES)) u_xbar (
    .clk, .rst_n,
    .s_ar_valid(c_ar_valid), .s_ar_ready(c_ar_ready), .s_ar(c_ar),
    .s_r_valid (c_r_valid),  .s_r_ready (c_r_ready),  .s_r (c_r),
    .s_aw_valid(c_aw_valid), .s_aw_ready(c_aw_ready), .s_aw(c_aw),
    .s_w_valid (c_w_valid),  .s_w_ready (c_w_ready),  .s_w (c_w),
    .s_b_valid (c_b_valid),  .s_b (c_b),
    .m_ar_valid(ar_valid), .m_ar_ready(ar_ready), .m_ar(ar),
    .m_r_valid (r_valid),  .m_r_ready (r_ready),  .m_r (r),
    .m_aw_valid(aw_valid), .m_aw_ready(aw_ready), .m_aw(aw),
    .m_w_valid (w_valid),  .m_w_ready (w_ready),  .m_w (w),
    .m_b_valid (b_valid),  .m_b_ready (b_ready),  .m_b (b)
  );
endmodule
