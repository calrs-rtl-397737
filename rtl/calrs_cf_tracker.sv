// calrs_cf_tracker: keeps the Critical Field (CF) of a warp's requests current
// while they pass the SM's private L1 cache.
//
// Rule: each time one request of a warp hits in the private cache, the CF of
// every other request of that warp drops by one; requests of one warp thus
// always share one CF value. Rather than rewrite requests in flight, the
// tracker keeps one counter per warp of the requests not yet served: it is
// loaded with N when the coalescer produces the warp's N requests, drops by
// one on each L1 hit of the warp (never below zero), and is copied into the
// CF of each L1 miss as the miss leaves for the LLC. So the CF a request
// carries to the LLC is the number of its warp's requests still unserved at
// that moment, the request itself included.
//
// Interface: alloc_i/alloc_warp_i/alloc_n_i from the coalescer. l1_valid_i,
// l1_hit_i and l1_req_i report one L1 lookup result per cycle; l1_ready_o
// accepts it (a hit is always accepted, a miss only when the LLC side is
// ready). out_valid_o/out_req_o/out_ready_i carry the miss to the LLC.
// Timing: combinational from L1 result to LLC request; the counter update
// takes effect the next cycle, and an alloc in the same cycle as a lookup of
// the same warp is seen by that lookup.
// The decrement-on-hit rule follows the scheme; the per-warp counter table
// is this design's way of applying it. Counters reset to zero.
module calrs_cf_tracker
  import calrs_pkg::*;
#(
  parameter int unsigned NWARPS = WARPS_PER_SM
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the coalescer
  input  logic              alloc_i,
  input  logic [WARP_W-1:0] alloc_warp_i,
  input  cf_t               alloc_n_i,
  // private-cache lookup result
  input  logic              l1_valid_i,
  input  logic              l1_hit_i,
  input  mem_req_t          l1_req_i,
  output logic              l1_ready_o,
  // miss toward the LLC bank
  output logic              out_valid_o,
  output mem_req_t          out_req_o,
  input  logic              out_ready_i
);

  cf_t cnt_q [NWARPS];

  logic [WARP_W-1:0] w;
  cf_t               cur;
  assign w   = l1_req_i.warp_id;
  assign cur = (alloc_i && alloc_warp_i == w) ? alloc_n_i : cnt_q[w];

  assign out_valid_o = l1_valid_i && !l1_hit_i;
  assign l1_ready_o  = l1_hit_i || out_ready_i;
  always_comb begin
    out_req_o    = l1_req_i;
    out_req_o.cf = cur;
  end

  logic hit_now;
  assign hit_now = l1_valid_i && l1_hit_i;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NWARPS; i++) cnt_q[i] <= '0;
    end else begin
      if (alloc_i) cnt_q[alloc_warp_i] <= alloc_n_i;
      if (hit_now && cur != '0) cnt_q[w] <= cur - cf_t'(1);
    end
  end

endmodule
