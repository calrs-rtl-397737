// calrs_coalescer: the SM's coalescing unit, extended with the CaLRS
// Critical Field (CF).
//
// A warp's memory instruction brings up to 32 thread addresses and an active
// mask. Threads whose addresses fall in the same 128-byte line share one
// request, so the warp produces N requests, one per distinct line
// (1 <= N <= 32 for a warp with any active thread). Every request of the warp
// leaves with CF = N.
//
// How: on acceptance the unit marks, for each active thread, whether it is
// the first active thread of its line (a triangular array of line-address
// comparators); these "leader" threads are the requests, and N is their
// count. The leaders' lines are stored, and the requests leave one per cycle
// in thread order, lowest thread first.
//
// Interface: in_valid_i/in_ready_o take a warp (sm, warp, write flag, active
// mask, addresses). alloc_o pulses in the acceptance cycle with the warp id
// and N, so the CF tracker can start counting before the first request
// reaches the private cache. out_valid_o/out_req_o/out_ready_i emit the
// requests. Timing: the first request appears the cycle after acceptance; a
// new warp is accepted in the cycle the previous warp's last request leaves,
// so back-to-back warps run at one request per cycle. A warp with no active
// thread is accepted with N = 0 and emits nothing.
// The coalescing rule and CF = N follow the scheme; the comparator array and
// the one-request-per-cycle emission order are this design's choices.
module calrs_coalescer
  import calrs_pkg::*;
#(
  parameter int unsigned NT = WARP_SIZE   // threads per warp
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // warp memory instruction
  input  logic                  in_valid_i,
  output logic                  in_ready_o,
  input  logic [SM_W-1:0]       in_sm_i,
  input  logic [WARP_W-1:0]     in_warp_i,
  input  logic                  in_write_i,
  input  logic [NT-1:0]         in_active_i,
  input  logic [ADDR_W-1:0]     in_addr_i [NT],
  // new warp: number of requests it produces
  output logic                  alloc_o,
  output logic [WARP_W-1:0]     alloc_warp_o,
  output cf_t                   alloc_n_o,
  // coalesced requests toward the private cache
  output logic                  out_valid_o,
  output mem_req_t              out_req_o,
  input  logic                  out_ready_i
);

  // ------------------------------------------------ leader detection
  logic [LINE_W-1:0] in_line [NT];
  logic [NT-1:0]     leader;
  cf_t               n_req;
  always_comb begin
    for (int t = 0; t < NT; t++) in_line[t] = in_addr_i[t][ADDR_W-1:OFFS_W];
    for (int t = 0; t < NT; t++) begin
      leader[t] = in_active_i[t];
      for (int u = 0; u < t; u++) begin
        if (in_active_i[u] && in_line[u] == in_line[t]) leader[t] = 1'b0;
      end
    end
    n_req = '0;
    for (int t = 0; t < NT; t++) n_req = n_req + cf_t'(leader[t]);
  end

  // ------------------------------------------------ stored warp
  logic [LINE_W-1:0] line_q [NT];
  logic [NT-1:0]     pend_q;
  cf_t               n_q;
  logic [SM_W-1:0]   sm_q;
  logic [WARP_W-1:0] warp_q;
  logic              write_q;

  // lowest pending thread
  logic [NT-1:0] pick;
  logic [$clog2(NT)-1:0] pick_idx;
  always_comb begin
    pick     = '0;
    pick_idx = '0;
    for (int t = NT - 1; t >= 0; t--) begin
      if (pend_q[t]) begin
        pick     = '0;
        pick[t]  = 1'b1;
        pick_idx = $clog2(NT)'(t);
      end
    end
  end

  logic pop, accept;
  assign out_valid_o = |pend_q;
  assign pop         = out_valid_o && out_ready_i;
  assign in_ready_o  = (pop ? (pend_q & ~pick) : pend_q) == '0;
  assign accept      = in_valid_i && in_ready_o;

  always_comb begin
    out_req_o          = '0;
    out_req_o.line     = line_q[pick_idx];
    out_req_o.sm_id    = sm_q;
    out_req_o.warp_id  = warp_q;
    out_req_o.is_write = write_q;
    out_req_o.cf       = n_q;
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      line_q  <= in_line;
      n_q     <= n_req;
      sm_q    <= in_sm_i;
      warp_q  <= in_warp_i;
      write_q <= in_write_i;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      pend_q <= '0;
    else if (accept) pend_q <= leader;
    else if (pop)    pend_q <= pend_q & ~pick;
  end

  assign alloc_o      = accept;
  assign alloc_warp_o = in_warp_i;
  assign alloc_n_o    = n_req;

  a_cf_range: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid_o |-> (out_req_o.cf >= cf_t'(1) && out_req_o.cf <= cf_t'(NT)));

endmodule
