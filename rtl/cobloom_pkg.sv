// cobloom_pkg: constants and bus types shared by the CoBloom hashing system.
//
// K-mers are 8-byte words and each K-mer is hashed four times with 32-bit
// Murmur3 (the workload the design targets). The Murmur3 constants are those
// of the public Murmur3_x86_32 reference. The DRAM port is a simplified
// AXI4-like split-channel bus (read address / read data / write address /
// write data / write response), each channel a valid/ready handshake; its
// widths (512-bit data, 64-bit address, 8-bit burst length) are this design's
// choice. Host commands and completion responses are small structs carried on
// valid/ready handshakes.
package cobloom_pkg;

  // Workload: 8-byte K-mers, four hashes per K-mer, 32-bit hashes.
  localparam int unsigned KMER_W  = 64;
  localparam int unsigned HASH_W  = 32;
  localparam int unsigned N_HASH  = 4;
  localparam int unsigned REC_W   = N_HASH * HASH_W;   // one hash record per K-mer

  // DRAM port geometry.
  localparam int unsigned MEM_DATA_W  = 512;
  localparam int unsigned MEM_STRB_W  = MEM_DATA_W / 8;
  localparam int unsigned MEM_ADDR_W  = 64;
  localparam int unsigned MEM_ID_W    = 8;
  localparam int unsigned MEM_LEN_W   = 8;                 // beats - 1, as in AXI4
  localparam int unsigned BEAT_BYTES  = MEM_DATA_W / 8;    // 64
  localparam int unsigned KMERS_PER_BEAT = MEM_DATA_W / KMER_W;  // 8
  localparam int unsigned RECS_PER_BEAT  = MEM_DATA_W / REC_W;   // 4
  localparam int unsigned PAGE_BYTES  = 4096;              // bursts never cross this

  // Command / response fields.
  localparam int unsigned CORE_ID_W = 8;
  localparam int unsigned COUNT_W   = 32;

  // Murmur3_x86_32 constants.
  localparam logic [31:0] MM3_C1 = 32'hcc9e2d51;
  localparam logic [31:0] MM3_C2 = 32'h1b873593;
  localparam logic [31:0] MM3_N  = 32'he6546b64;
  localparam logic [31:0] MM3_F1 = 32'h85ebca6b;
  localparam logic [31:0] MM3_F2 = 32'hc2b2ae35;
  localparam logic [31:0] MM3_KEY_BYTES = 32'd8;

  typedef logic [MEM_ADDR_W-1:0] addr_t;
  typedef logic [COUNT_W-1:0]    count_t;

  // DRAM channels.
  typedef struct packed {
    logic [MEM_ID_W-1:0]  id;
    addr_t                addr;
    logic [MEM_LEN_W-1:0] len;
  } mem_a_t;          // read address and write address channels

  typedef struct packed {
    logic [MEM_ID_W-1:0]   id;
    logic [MEM_DATA_W-1:0] data;
    logic                  last;
  } mem_r_t;

  typedef struct packed {
    logic [MEM_DATA_W-1:0] data;
    logic [MEM_STRB_W-1:0] strb;
    logic                  last;
  } mem_w_t;

  typedef struct packed {
    logic [MEM_ID_W-1:0] id;
  } mem_b_t;

  // Job description sent by the host to one core.
  typedef struct packed {
    logic [CORE_ID_W-1:0] core;      // destination core (used by the router)
    addr_t                src_addr;  // genome K-mers, 64-byte aligned
    addr_t                dst_addr;  // hash records, 64-byte aligned
    count_t               n_kmers;   // number of K-mers to hash
    logic [HASH_W-1:0]    seed;      // seed of hash 0; hash i uses seed + i
    logic [KMER_W-1:0]    mask;      // ANDed onto every K-mer before hashing
  } cmd_t;

  // Completion report returned to the host.
  typedef struct packed {
    logic [CORE_ID_W-1:0] core;
    count_t               n_kmers;   // K-mers hashed
    count_t               cycles;    // cycles from command accept to completion
  } resp_t;

  function automatic logic [31:0] rotl32(input logic [31:0] x, input int unsigned r);
    return (x << r) | (x >> (32 - r));
  endfunction

  // Number of beats a burst may carry from addr without crossing a page,
  // capped by max_beats and by the beats still to transfer.
  function automatic logic [15:0] burst_beats(input addr_t addr,
                                               input logic [31:0] remaining,
                                               input logic [15:0] max_beats);
    logic [15:0] to_page;
    logic [15:0] n;
    to_page = 16'(PAGE_BYTES / BEAT_BYTES) - 16'(addr[11:6]);
    n = max_beats;
    if (to_page < n) n = to_page;
    if (remaining < 32'(n)) n = remaining[15:0];
    return n;
  endfunction

endpackage
