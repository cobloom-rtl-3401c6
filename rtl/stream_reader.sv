// stream_reader: reads a block of K-mers from DRAM and streams them out one
// per cycle.
//
// On `start` it takes a 64-byte aligned source address and a K-mer count.
// It asks for the ceil(n/8) 512-bit beats in bursts of at most BURST_BEATS
// beats that never cross a 4 KB page, and unpacks each beat into eight
// 64-bit K-mers (lowest bits first). A burst is only requested when the
// FIFO has room for all of its beats, counting beats still in flight, so
// read data is always accepted (r_ready is tied high) and the memory is
// never stalled by this reader. Bits of the last beat beyond the count are
// dropped.
//
// The document describes reader streams that turn DRAM reads into a stream
// for the hash cores; the burst size, buffer depth and credit scheme are this
// design's own.
//
// Interface: start is taken when !busy; busy falls the cycle after the last
// K-mer leaves. Read data must come back in order for this reader's ID.
module stream_reader
  import cobloom_pkg::*;
#(
  parameter int unsigned BURST_BEATS = 8,
  parameter int unsigned FIFO_DEPTH  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [MEM_ID_W-1:0] id,
  // job
  input  logic              start,
  input  addr_t             src_addr,
  input  count_t            n_kmers,
  output logic              busy,
  // DRAM read channels
  output logic              ar_valid,
  input  logic              ar_ready,
  output mem_a_t            ar,
  input  logic              r_valid,
  output logic              r_ready,
  input  mem_r_t            r,
  // K-mer stream
  output logic              out_valid,
  input  logic              out_ready,
  output logic [KMER_W-1:0] out_kmer
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);
  localparam int unsigned IW = $clog2(KMERS_PER_BEAT);

  addr_t                req_addr;
  logic [31:0]          req_beats;   // beats not yet requested
  logic [CW:0]          reserved;    // beats requested and not yet popped
  count_t               words_left;  // K-mers not yet sent
  logic [IW-1:0]        word_idx;
  logic [15:0]          nb;
  logic                 fire_ar, fire_out, pop;
  logic [MEM_DATA_W-1:0] head;
  logic                 f_full, f_empty;
  logic [CW-1:0]        f_count;

  assign busy = (req_beats != 0) || (words_left != 0);

  assign nb       = burst_beats(req_addr, req_beats, 16'(BURST_BEATS));
  assign ar_valid = (req_beats != 0) && ((CW+1)'(reserved) + (CW+1)'(nb) <= (CW+1)'(FIFO_DEPTH));
  assign ar.id    = id;
  assign ar.addr  = req_addr;
  assign ar.len   = MEM_LEN_W'(nb - 16'd1);
  assign fire_ar  = ar_valid && ar_ready;

  assign r_ready  = 1'b1;

  sync_fifo #(.WIDTH(MEM_DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push (r_valid),
    .din  (r.data),
    .pop,
    .dout (head),
    .full (f_full),
    .empty(f_empty),
    .count(f_count)
  );

  assign out_valid = (words_left != 0) && !f_empty;
  assign out_kmer  = head[word_idx*KMER_W +: KMER_W];
  assign fire_out  = out_valid && out_ready;
  assign pop       = fire_out && ((word_idx == IW'(KMERS_PER_BEAT-1)) || (words_left == 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_addr   <= '0;
      req_beats  <= '0;
      reserved   <= '0;
      words_left <= '0;
      word_idx   <= '0;
    end else begin
      if (start && !busy) begin
        req_addr   <= src_addr;
        req_beats  <= 32'((33'(n_kmers) + 33'(KMERS_PER_BEAT - 1)) >> IW);
        words_left <= n_kmers;
        word_idx   <= '0;
      end else begin
        if (fire_ar) begin
          req_addr  <= req_addr + addr_t'({nb, 6'b0});
          req_beats <= req_beats - 32'(nb);
        end
        if (fire_out) begin
          words_left <= words_left - 1'b1;
          word_idx   <= pop ? '0 : word_idx + 1'b1;
        end
      end
      reserved <= reserved + (fire_ar ? (CW+1)'(nb) : '0) - (pop ? (CW+1)'(1) : '0);
    end
  end

`ifndef SYNTHESIS
  // Credits guarantee the FIFO never overflows.
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) !(r_valid && f_full);
  endproperty
  assert property (p_no_overflow) else $error("reader FIFO overflow");
  // A pending read request holds its address until taken.
  property p_ar_stable;
    @(posedge clk) disable iff (!rst_n) (ar_valid && !ar_ready) |=> (ar_valid && $stable(ar));
  endproperty
  assert property (p_ar_stable) else $error("ar changed while stalled");
`endif
endmodule
