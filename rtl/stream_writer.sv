// stream_writer: packs hash records into DRAM beats and writes them out in
// bursts.
//
// On `start` it takes a 64-byte aligned destination address and a record
// count. Incoming 128-bit records (four 32-bit hashes of one K-mer) are
// packed four to a 512-bit beat, lowest bits first; the last beat of a job
// may be partial and then carries byte strobes only for the records it
// holds. Full beats wait in a FIFO. A write burst (at most BURST_BEATS beats,
// never crossing a 4 KB page) is addressed only once all of its beats are in
// the FIFO, so its data follows the address without gaps. The writer is busy
// until every burst has been acknowledged on the write-response channel.
//
// The document describes writer streams that take the hashes back to DRAM;
// packing, burst size and buffering are this design's own.
//
// Interface: start is taken when !busy; in_ready falls while the FIFO is
// full, which stalls the hash pipeline behind it.
module stream_writer
  import cobloom_pkg::*;
#(
  parameter int unsigned BURST_BEATS = 8,
  parameter int unsigned FIFO_DEPTH  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [MEM_ID_W-1:0] id,
  // job
  input  logic              start,
  input  addr_t             dst_addr,
  input  count_t            n_recs,
  output logic              busy,
  // record stream
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [REC_W-1:0]  in_rec,
  // DRAM write channels
  output logic              aw_valid,
  input  logic              aw_ready,
  output mem_a_t            aw,
  output logic              w_valid,
  input  logic              w_ready,
  output mem_w_t            w,
  input  logic              b_valid,
  output logic              b_ready,
  input  mem_b_t            b
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);
  localparam int unsigned SW = $clog2(RECS_PER_BEAT);
  localparam int unsigned REC_BYTES = REC_W / 8;

  typedef struct packed {
    logic [MEM_DATA_W-1:0] data;
    logic [MEM_STRB_W-1:0] strb;
  } beat_t;

  count_t                recs_left;   // records not yet accepted
  logic [SW-1:0]         slot;        // next free record slot in the beat
  beat_t                 pack, pack_next, head;
  addr_t                 aw_addr;
  logic [31:0]           aw_beats;    // beats not yet addressed
  logic [15:0]           w_open;      // beats left in the addressed burst
  logic [15:0]           outstanding; // bursts awaiting a response
  logic [15:0]           nb;
  logic                  fire_in, push, fire_aw, fire_w;
  logic                  f_full, f_empty;
  logic [CW-1:0]         f_count;

  assign busy = (recs_left != 0) || (aw_beats != 0) || (w_open != 0) || (outstanding != 0);

  // Packing
  assign in_ready = (recs_left != 0) && !f_full;
  assign fire_in  = in_valid && in_ready;
  assign push     = fire_in && ((slot == SW'(RECS_PER_BEAT-1)) || (recs_left == 1));

  always_comb begin
    pack_next = pack;
    pack_next.data[slot*REC_W +: REC_W]       = in_rec;
    pack_next.strb[slot*REC_BYTES +: REC_BYTES] = '1;
  end

  sync_fifo #(.WIDTH($bits(beat_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push,
    .din  (pack_next),
    .pop  (fire_w),
    .dout (head),
    .full (f_full),
    .empty(f_empty),
    .count(f_count)
  );

  // Write address: only once the whole burst is buffered
  assign nb       = burst_beats(aw_addr, aw_beats, 16'(BURST_BEATS));
  assign aw_valid = (aw_beats != 0) && (w_open == 0) && (16'(f_count) >= nb);
  assign aw.id    = id;
  assign aw.addr  = aw_addr;
  assign aw.len   = MEM_LEN_W'(nb - 16'd1);
  assign fire_aw  = aw_valid && aw_ready;

  // Write data
  assign w_valid  = (w_open != 0) && !f_empty;
  assign w.data   = head.data;
  assign w.strb   = head.strb;
  assign w.last   = (w_open == 16'd1);
  assign fire_w   = w_valid && w_ready;

  assign b_ready  = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      recs_left   <= '0;
      slot        <= '0;
      pack        <= '0;
      aw_addr     <= '0;
      aw_beats    <= '0;
      w_open      <= '0;
      outstanding <= '0;
    end else begin
      if (start && !busy) begin
        recs_left <= n_recs;
        slot      <= '0;
        pack      <= '0;
        aw_addr   <= dst_addr;
        aw_beats  <= 32'((33'(n_recs) + 33'(RECS_PER_BEAT - 1)) >> SW);
      end else begin
        if (fire_in) begin
          recs_left <= recs_left - 1'b1;
          slot      <= push ? '0 : slot + 1'b1;
          pack      <= push ? '0 : pack_next;
        end
        if (fire_aw) begin
          aw_addr  <= aw_addr + addr_t'({nb, 6'b0});
          aw_beats <= aw_beats - 32'(nb);
        end
      end
      if (fire_aw)     w_open <= nb;
      else if (fire_w) w_open <= w_open - 1'b1;
      outstanding <= outstanding + (fire_aw ? 16'd1 : 16'd0) - (b_valid ? 16'd1 : 16'd0);
    end
  end

`ifndef SYNTHESIS
  property p_aw_stable;
    @(posedge clk) disable iff (!rst_n) (aw_valid && !aw_ready) |=> (aw_valid && $stable(aw));
  endproperty
  assert property (p_aw_stable) else $error("aw changed while stalled");
  property p_w_stable;
    @(posedge clk) disable iff (!rst_n) (w_valid && !w_ready) |=> (w_valid && $stable(w));
  endproperty
  assert property (p_w_stable) else $error("w changed while stalled");
  property p_b_expected;
    @(posedge clk) disable iff (!rst_n) b_valid |-> (outstanding != 0 && b.id == id);
  endproperty
  assert property (p_b_expected) else $error("unexpected write response");
`endif
endmodule
