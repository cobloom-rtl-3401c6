// dram_model: behavioural model of the FPGA board's DRAM channel, for
// testbenches only (not synthesizable).
//
// Holds WORDS 512-bit words, addressed by byte address bits [.. : 6]. Read
// bursts are served in order, the first beat RD_LAT cycles after the request
// is taken; write bursts are applied with byte strobes and answered with one
// write response. With stall_pct > 0 (initially STALL_PCT, the
// testbench may change it) the model randomly withholds its ready
// signals and inserts bubbles into read data, to exercise back-pressure. It
// BEATS_PER_100 > 0 caps the data beats (read and write together) that the
// channel moves per 100 cycles, to model a channel of fixed bandwidth. It
// counts bursts and beats, and counts as protocol violations any burst that
// crosses a 4 KB page, leaves the array, or whose write data has a wrong last
// flag.
module dram_model
  import cobloom_pkg::*;
#(
  parameter int unsigned WORDS     = 4096,
  parameter int unsigned RD_LAT    = 10,
  parameter int unsigned STALL_PCT = 0,
  parameter int unsigned BEATS_PER_100 = 0    // data-beat budget per 100 cycles, 0 = unlimited
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   ar_valid,
  output logic   ar_ready,
  input  mem_a_t ar,
  output logic   r_valid,
  input  logic   r_ready,
  output mem_r_t r,
  input  logic   aw_valid,
  output logic   aw_ready,
  input  mem_a_t aw,
  input  logic   w_valid,
  output logic   w_ready,
  input  mem_w_t w,
  output logic   b_valid,
  input  logic   b_ready,
  output mem_b_t b
);
  logic [MEM_DATA_W-1:0] mem [WORDS];

  typedef struct { mem_a_t a; longint unsigned due; } rreq_t;
  rreq_t  rq[$];
  mem_a_t wq[$];
  logic [MEM_ID_W-1:0] bq[$];
  longint unsigned cyc = 0;
  int unsigned rbeat = 0, wbeat = 0;

  int unsigned rd_bursts = 0, wr_bursts = 0, rd_beats = 0, wr_beats = 0;
  int unsigned violations = 0, stalls = 0, max_rd_q = 0;
  int unsigned stall_pct = STALL_PCT;   // may be changed by the testbench
  bit r_valid_next;
  int credit = 200;                       // bandwidth budget, in hundredths of a beat

  function automatic bit bad_burst(mem_a_t a);
    longint unsigned first, last;
    first = a.addr;
    last  = a.addr + (longint'(a.len) + 1) * 64 - 1;
    return (first[5:0] != 0) || (first[63:12] != last[63:12]) || ((last >> 6) >= WORDS);
  endfunction

  // Every output is a register updated with non-blocking assignments, so
  // the design under test never sees the model change within a clock edge.
  function automatic mem_r_t r_beat();
    mem_r_t v;
    v.id   = rq[0].a.id;
    v.data = mem[32'(((rq[0].a.addr >> 6) + 64'(rbeat)) % WORDS)];
    v.last = (rbeat == int'(rq[0].a.len));
    return v;
  endfunction

  initial begin
    ar_ready = 0; aw_ready = 0; w_ready = 0; r_valid = 0; r = '0; b_valid = 0; b = '0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (ar_valid && !ar_ready) stalls++;
      if (ar_valid && ar_ready) begin
        rq.push_back('{a: ar, due: cyc + RD_LAT});
        rd_bursts++;
        if (bad_burst(ar)) violations++;
        if (rq.size() > max_rd_q) max_rd_q = rq.size();
      end
      if (r_valid && r_ready) begin
        rd_beats++;
        if (r.last) begin rbeat = 0; void'(rq.pop_front()); end
        else rbeat++;
      end
      if (aw_valid && aw_ready) begin
        wq.push_back(aw);
        wr_bursts++;
        if (bad_burst(aw)) violations++;
      end
      if (w_valid && w_ready) begin
        int unsigned idx;
        idx = 32'(((wq[0].addr >> 6) + 64'(wbeat)) % WORDS);
        for (int i = 0; i < MEM_STRB_W; i++)
          if (w.strb[i]) mem[idx][i*8 +: 8] = w.data[i*8 +: 8];
        wr_beats++;
        if (w.last != (wbeat == int'(wq[0].len))) violations++;
        if (wbeat == int'(wq[0].len)) begin
          wbeat = 0;
          bq.push_back(wq[0].id);
          void'(wq.pop_front());
        end else wbeat++;
      end
      if (b_valid && b_ready) void'(bq.pop_front());
    end
    // bandwidth budget
    if (BEATS_PER_100 != 0) begin
      if (r_valid && r_ready) credit -= 100;
      if (w_valid && w_ready) credit -= 100;
      credit += int'(BEATS_PER_100);
      if (credit > 200) credit = 200;
    end
    // outputs for the next cycle
    ar_ready <= rst_n && (($urandom % 100) >= stall_pct) && rq.size() < 16;
    aw_ready <= rst_n && (($urandom % 100) >= stall_pct) && wq.size() < 4;
    r_valid_next = r_valid && !r_ready;
    if (r_valid && !r_ready) begin
      // hold the offered beat
    end else if (rst_n && rq.size() > 0 && rq[0].due <= cyc + 1 && (($urandom % 100) >= stall_pct) &&
                 (BEATS_PER_100 == 0 || credit >= 100)) begin
      r_valid <= 1'b1;
      r       <= r_beat();
      r_valid_next = 1'b1;
    end else begin
      r_valid <= 1'b0;
    end
    // a write beat may use the budget left over by the read beat offered next
    w_ready  <= rst_n && (($urandom % 100) >= stall_pct) && wq.size() > 0 &&
                (BEATS_PER_100 == 0 || credit >= ((r_valid_next) ? 200 : 100));
    b_valid <= bq.size() > 0;
    b.id    <= (bq.size() > 0) ? bq[0] : '0;
  end
endmodule
