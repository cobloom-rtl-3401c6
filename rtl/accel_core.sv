// accel_core: one Murmur3 hashing accelerator core.
//
// The host hands the core a job (source and destination address in FPGA
// DRAM, K-mer count, seed, mask). The core streams the K-mers in through a
// stream_reader, hashes each one N_HASH times in the hash_datapath (one
// K-mer per clock), and streams the hash records back to DRAM through a
// stream_writer. When the last write is acknowledged the core returns a
// response with the count and the number of cycles the job took, which is
// the completion signal the host waits for before it copies the hashes to
// its own memory.
//
// That structure (command interface, reader stream, parallel pipelined
// Murmur3 units, writer stream, completion signal) follows the document;
// the command fields and the response format are this design's own.
//
// Interface: cmd_ready is high only while idle. Reader and writer run at
// the same time, so in steady state the core hashes one K-mer per cycle
// when memory keeps up; a job of n K-mers takes about n + 36 cycles with an
// ideal memory.
module accel_core
  import cobloom_pkg::*;
#(
  parameter int unsigned CORE_ID     = 0,
  parameter int unsigned BURST_BEATS = 8,
  parameter int unsigned RD_FIFO     = 32,
  parameter int unsigned WR_FIFO     = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  // host command / response
  input  logic   cmd_valid,
  output logic   cmd_ready,
  input  cmd_t   cmd,
  output logic   resp_valid,
  input  logic   resp_ready,
  output resp_t  resp,
  // DRAM read channels
  output logic   ar_valid,
  input  logic   ar_ready,
  output mem_a_t ar,
  input  logic   r_valid,
  output logic   r_ready,
  input  mem_r_t r,
  // DRAM write channels
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
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_RESP} state_e;

  state_e               state;
  logic [KMER_W-1:0]    mask_q;
  logic [HASH_W-1:0]    seed_q;
  count_t               n_q;
  count_t               cycles;
  logic                 start;
  logic                 rd_busy, wr_busy;
  logic                 k_valid, k_ready;
  logic [KMER_W-1:0]    k_data;
  logic                 h_valid, h_ready;
  logic [REC_W-1:0]     h_rec;

  assign cmd_ready = (state == S_IDLE);
  assign start     = cmd_valid && cmd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      mask_q <= '0;
      seed_q <= '0;
      n_q    <= '0;
      cycles <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_RUN;
          mask_q <= cmd.mask;
          seed_q <= cmd.seed;
          n_q    <= cmd.n_kmers;
          cycles <= 32'd1;
        end
        S_RUN: begin
          cycles <= cycles + 1'b1;
          if (!rd_busy && !wr_busy) state <= S_RESP;
        end
        S_RESP: if (resp_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign resp_valid   = (state == S_RESP);
  assign resp.core    = CORE_ID_W'(CORE_ID);
  assign resp.n_kmers = n_q;
  assign resp.cycles  = cycles;

  stream_reader #(.BURST_BEATS(BURST_BEATS), .FIFO_DEPTH(RD_FIFO)) u_reader (
    .clk, .rst_n,
    .id       (MEM_ID_W'(CORE_ID)),
    .start,
    .src_addr (cmd.src_addr),
    .n_kmers  (cmd.n_kmers),
    .busy     (rd_busy),
    .ar_valid, .ar_ready, .ar,
    .r_valid,  .r_ready,  .r,
    .out_valid(k_valid), .out_ready(k_ready), .out_kmer(k_data)
  );

  hash_datapath u_hash (
    .clk, .rst_n,
    .mask     (mask_q),
    .seed_base(seed_q),
    .in_valid (k_valid), .in_ready(k_ready), .in_kmer(k_data),
    .out_valid(h_valid), .out_ready(h_ready), .out_rec(h_rec)
  );

  stream_writer #(.BURST_BEATS(BURST_BEATS), .FIFO_DEPTH(WR_FIFO)) u_writer (
    .clk, .rst_n,
    .id       (MEM_ID_W'(CORE_ID)),
    .start,
    .dst_addr (cmd.dst_addr),
    .n_recs   (cmd.n_kmers),
    .busy     (wr_busy),
    .in_valid (h_valid), .in_ready(h_ready), .in_rec(h_rec),
    .aw_valid, .aw_ready, .aw,
    .w_valid,  .w_ready,  .w,
    .b_valid,  .b_ready,  .b
  );
endmodule
