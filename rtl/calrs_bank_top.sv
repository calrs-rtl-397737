// calrs_bank_top: one shared-LLC bank under CaLRS scheduling, together with
// the CF logic on the SM side of the SMs it serves.
//
// Data path, per SM port p (NP = 5: 30 SMs share 6 LLC banks):
//   warp memory instruction -> calrs_coalescer (requests tagged CF = N)
//   -> private L1 cache (outside this block: l1_req_* out, l1_rsp_* in)
//   -> calrs_cf_tracker (CF lowered by the warp's L1 hits, stamped on misses)
//   -> port p of calrs_scheduler (five priority subqueues, fall-through,
//      block, rotation) -> one request per cycle to the LLC cache pipeline.
//
// The private L1 cache, the SM-to-LLC interconnect and the LLC tag/data
// arrays are not part of the scheme and stay outside: the L1 lookup is a pair
// of ports, the interconnect is a direct wire from each SM's tracker to its
// scheduler port, and the issued request leaves on llc_*. The bank's block
// signal is brought out so the SM side can stop sending. In this design a
// refused request simply waits at its tracker (ready low), which is the same
// as the SM holding it back.
//
// Timing: coalescer output is registered; tracker and scheduler insertion are
// combinational from l1_rsp_* to the subqueue write; the earliest issue of a
// request is the cycle after it enters a subqueue.
module calrs_bank_top
  import calrs_pkg::*;
#(
  parameter int unsigned NP = NUM_SMS / NUM_BANKS,
  parameter int unsigned SUBQ_LEN [NUM_SUBQ] = SUBQ_LEN_DEFAULT,
  localparam int unsigned CNT_W = 7
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // warp memory instructions, one stream per SM
  input  logic     [NP-1:0]     warp_valid_i,
  output logic     [NP-1:0]     warp_ready_o,
  input  logic [SM_W-1:0]       warp_sm_i     [NP],
  input  logic [WARP_W-1:0]     warp_id_i     [NP],
  input  logic     [NP-1:0]     warp_write_i,
  input  logic [WARP_SIZE-1:0]  warp_active_i [NP],
  input  logic [ADDR_W-1:0]     warp_addr_i   [NP][WARP_SIZE],
  // private L1 lookup, per SM
  output logic     [NP-1:0]     l1_req_valid_o,
  output mem_req_t              l1_req_o      [NP],
  input  logic     [NP-1:0]     l1_req_ready_i,
  input  logic     [NP-1:0]     l1_rsp_valid_i,
  input  logic     [NP-1:0]     l1_rsp_hit_i,
  input  mem_req_t              l1_rsp_req_i  [NP],
  output logic     [NP-1:0]     l1_rsp_ready_o,
  // issue to the LLC cache pipeline
  output logic                  llc_valid_o,
  output mem_req_t              llc_req_o,
  output prio_t                 llc_subq_o,
  input  logic                  llc_ready_i,
  // bank status
  output logic                  block_o,
  output prio_t                 top_o,
  output logic                  rotate_o,
  output logic     [NP-1:0]     demoted_o,
  output logic     [NP-1:0]     refused_o,
  output logic [CNT_W-1:0]      occupancy_o   [NUM_SUBQ]
);

  logic     [NP-1:0] arr_valid, arr_ready;
  mem_req_t          arr_req [NP];

  for (genvar p = 0; p < NP; p++) begin : g_sm
    logic              alloc;
    logic [WARP_W-1:0] alloc_warp;
    cf_t               alloc_n;

    calrs_coalescer u_coal (
      .clk, .rst_n,
      .in_valid_i   (warp_valid_i[p]),
      .in_ready_o   (warp_ready_o[p]),
      .in_sm_i      (warp_sm_i[p]),
      .in_warp_i    (warp_id_i[p]),
      .in_write_i   (warp_write_i[p]),
      .in_active_i  (warp_active_i[p]),
      .in_addr_i    (warp_addr_i[p]),
      .alloc_o      (alloc),
      .alloc_warp_o (alloc_warp),
      .alloc_n_o    (alloc_n),
      .out_valid_o  (l1_req_valid_o[p]),
      .out_req_o    (l1_req_o[p]),
      .out_ready_i  (l1_req_ready_i[p])
    );

    calrs_cf_tracker u_trk (
      .clk, .rst_n,
      .alloc_i      (alloc),
      .alloc_warp_i (alloc_warp),
      .alloc_n_i    (alloc_n),
      .l1_valid_i   (l1_rsp_valid_i[p]),
      .l1_hit_i     (l1_rsp_hit_i[p]),
      .l1_req_i     (l1_rsp_req_i[p]),
      .l1_ready_o   (l1_rsp_ready_o[p]),
      .out_valid_o  (arr_valid[p]),
      .out_req_o    (arr_req[p]),
      .out_ready_i  (arr_ready[p])
    );
  end

  calrs_scheduler #(.NP(NP), .SUBQ_LEN(SUBQ_LEN)) u_sched (
    .clk, .rst_n,
    .in_valid_i  (arr_valid),
    .in_req_i    (arr_req),
    .in_ready_o  (arr_ready),
    .out_valid_o (llc_valid_o),
    .out_req_o   (llc_req_o),
    .out_subq_o  (llc_subq_o),
    .out_ready_i (llc_ready_i),
    .block_o,
    .top_o,
    .rotate_o,
    .demoted_o,
    .refused_o,
    .occupancy_o
  );

endmodule
