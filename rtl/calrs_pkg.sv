// calrs_pkg: types and constants shared by the CaLRS (critical-aware LLC
// request scheduling) blocks.
//
// A memory request travels from the SM's coalescing unit, through the private
// L1 cache, to one bank of the shared L2 (the last-level cache, LLC). It
// carries a Critical Field (CF): the number of requests of the same warp that
// are still unserved. The LLC bank buffers requests in five priority
// subqueues chosen by CF class and issues the most critical first.
//
// Sizes that follow the baseline GPU: 30 SMs, 6 LLC banks (so 5 SMs per bank),
// 48 warps per SM (1536 threads / 32), 32-thread warps, 128-byte lines, a
// 6-bit CF, five subqueues of 25/25/25/25/28 entries (128 in total).
// Own choices: a 32-bit byte address and a one-bit read/write flag in the
// request; the request fields beyond CF are not specified by the scheme.
package calrs_pkg;

  localparam int unsigned ADDR_W     = 32;   // byte address width (assumed)
  localparam int unsigned LINE_BYTES = 128;  // LLC / L1 line size
  localparam int unsigned OFFS_W     = $clog2(LINE_BYTES);
  localparam int unsigned LINE_W     = ADDR_W - OFFS_W;  // line address width
  localparam int unsigned NUM_SMS    = 30;
  localparam int unsigned NUM_BANKS  = 6;
  localparam int unsigned SM_W       = $clog2(NUM_SMS);
  localparam int unsigned WARP_SIZE  = 32;
  localparam int unsigned WARPS_PER_SM = 48;
  localparam int unsigned WARP_W     = $clog2(WARPS_PER_SM);
  localparam int unsigned CF_W       = 6;    // CF in [1,32] needs 6 bits
  localparam int unsigned NUM_SUBQ   = 5;    // subqueue0 .. subqueue4
  localparam int unsigned SUBQ_W     = $clog2(NUM_SUBQ);

  typedef logic [CF_W-1:0]   cf_t;
  typedef logic [SUBQ_W-1:0] prio_t;   // a priority level or a subqueue index

  // One coalesced memory request (one cache line of one warp).
  typedef struct packed {
    logic [LINE_W-1:0] line;     // line address
    logic [SM_W-1:0]   sm_id;    // issuing SM
    logic [WARP_W-1:0] warp_id;  // issuing warp within the SM
    logic              is_write;
    cf_t               cf;       // Critical Field
  } mem_req_t;

  // Default subqueue lengths (subqueue0..subqueue4).
  localparam int unsigned SUBQ_LEN_DEFAULT [NUM_SUBQ] = '{25, 25, 25, 25, 28};

  // Next subqueue index in rotation order, modulo NUM_SUBQ.
  function automatic prio_t subq_add(prio_t base, prio_t off);
    int unsigned s;
    s = int'(base) + int'(off);
    if (s >= NUM_SUBQ) s = s - NUM_SUBQ;
    return prio_t'(s);
  endfunction

endpackage
