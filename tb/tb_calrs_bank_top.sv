// tb_calrs_bank_top: end-to-end test of one CaLRS LLC bank with its five SMs,
// every parameter at its default.
//
// Each SM issues warp memory instructions whose 32 threads touch K distinct
// lines, K drawn with a skew toward 1, 2, 4 and 8 lines. The testbench plays
// the private L1 cache: it takes the coalesced requests (with random stalls),
// answers each one a cycle or more later as a hit (about a third) or a miss.
// Independently of the design it predicts:
//   * the coalesced requests of every warp and their CF = K;
//   * the CF each miss must carry to the LLC: K minus the warp's L1 hits so
//     far;
//   * what the bank accepts and issues, cycle by cycle, through
//     calrs_ref_pkg::sched_model.
// A light phase is followed by a heavy one in which the LLC pipeline takes a
// request only one cycle in four, so the subqueues fill, requests fall
// through to lower priorities, the bank blocks, and priorities rotate. The
// run ends with a drain: every miss must have left the bank exactly once.
// Each of these events is counted and must occur.
`timescale 1ns/1ps
module tb_calrs_bank_top;
  import calrs_pkg::*;
  import calrs_ref_pkg::*;

  localparam int NP = NUM_SMS / NUM_BANKS;
  localparam int CW = 7;
  localparam int WARPS_PER_SM_RUN = 160;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     [NP-1:0]     warp_valid, warp_ready, warp_write;
  logic [SM_W-1:0]       warp_sm     [NP];
  logic [WARP_W-1:0]     warp_id     [NP];
  logic [WARP_SIZE-1:0]  warp_active [NP];
  logic [ADDR_W-1:0]     warp_addr   [NP][WARP_SIZE];
  logic     [NP-1:0]     l1_req_valid, l1_req_ready, l1_rsp_valid, l1_rsp_hit, l1_rsp_ready;
  mem_req_t              l1_req      [NP];
  mem_req_t              l1_rsp_req  [NP];
  logic                  llc_valid, llc_ready, block, rotate;
  mem_req_t              llc_req;
  prio_t                 llc_subq, top;
  logic     [NP-1:0]     demoted, refused;
  logic [CW-1:0]         occ [NUM_SUBQ];

  calrs_bank_top dut (
    .clk, .rst_n,
    .warp_valid_i(warp_valid), .warp_ready_o(warp_ready), .warp_sm_i(warp_sm),
    .warp_id_i(warp_id), .warp_write_i(warp_write), .warp_active_i(warp_active),
    .warp_addr_i(warp_addr),
    .l1_req_valid_o(l1_req_valid), .l1_req_o(l1_req), .l1_req_ready_i(l1_req_ready),
    .l1_rsp_valid_i(l1_rsp_valid), .l1_rsp_hit_i(l1_rsp_hit), .l1_rsp_req_i(l1_rsp_req),
    .l1_rsp_ready_o(l1_rsp_ready),
    .llc_valid_o(llc_valid), .llc_req_o(llc_req), .llc_subq_o(llc_subq), .llc_ready_i(llc_ready),
    .block_o(block), .top_o(top), .rotate_o(rotate), .demoted_o(demoted), .refused_o(refused),
    .occupancy_o(occ));

  typedef struct { mem_req_t r; bit hit; } l1_ent_t;

  sched_model m;
  mem_req_t   exp_coal [NP][$];
  l1_ent_t    l1q      [NP][$];
  int         cnt      [NP][WARPS_PER_SM];
  int         nreq     [NP][WARPS_PER_SM];
  int         warps_sent [NP];
  bit         acc_prev   [NP];
  int checks = 0, failures = 0;
  int n_div = 0, n_hit = 0, n_lowered = 0, n_miss = 0, n_issued = 0, n_rot = 0;
  int n_block = 0, n_demote = 0, n_refuse = 0, n_llc_stall = 0, n_l1_stall = 0;
  int n_class [NUM_SUBQ];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic int pick_k();
    int r = $urandom_range(0, 99);
    if (r < 40) return 1;
    if (r < 60) return 2;
    if (r < 70) return $urandom_range(3, 4);
    if (r < 85) return $urandom_range(5, 8);
    return $urandom_range(9, 32);
  endfunction

  task automatic new_warp(int p);
    int k = pick_k();
    logic [LINE_W-1:0] pool [WARP_SIZE];
    for (int i = 0; i < WARP_SIZE; i++) pool[i] = LINE_W'($urandom());
    warp_sm[p]     = SM_W'(p);
    warp_id[p]     = WARP_W'(warps_sent[p] % WARPS_PER_SM);
    warp_write[p]  = ($urandom_range(0, 9) == 0);
    warp_active[p] = ($urandom_range(0, 9) == 0) ? WARP_SIZE'($urandom()) | 1 : '1;
    for (int t = 0; t < WARP_SIZE; t++)
      warp_addr[p][t] = {pool[t % k], OFFS_W'($urandom())};
  endtask

  // distinct lines of the warp on SM p's inputs, in thread order
  function automatic int expect_warp(int p);
    logic [LINE_W-1:0] seen [$];
    mem_req_t r;
    for (int t = 0; t < WARP_SIZE; t++) if (warp_active[p][t]) begin
      bit dup = 0;
      foreach (seen[i]) if (seen[i] == warp_addr[p][t][ADDR_W-1:OFFS_W]) dup = 1;
      if (!dup) seen.push_back(warp_addr[p][t][ADDR_W-1:OFFS_W]);
    end
    foreach (seen[i]) begin
      r = '0;
      r.line = seen[i]; r.sm_id = warp_sm[p]; r.warp_id = warp_id[p];
      r.is_write = warp_write[p]; r.cf = cf_t'(seen.size());
      exp_coal[p].push_back(r);
    end
    return seen.size();
  endfunction

  task automatic cycle(int p_warp, int p_l1, int p_llc, bit more);
    bit       v [] = new[NP];
    mem_req_t r [] = new[NP];
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      if (acc_prev[p]) warp_valid[p] = 1'b0;
      acc_prev[p] = 1'b0;
      if (!warp_valid[p] && more && warps_sent[p] < WARPS_PER_SM_RUN &&
          $urandom_range(0, 99) < p_warp) begin
        new_warp(p);
        warp_valid[p] = 1'b1;
      end
      l1_req_ready[p] = ($urandom_range(0, 99) < p_l1);
      l1_rsp_valid[p] = (l1q[p].size() > 0);
      l1_rsp_hit[p]   = (l1q[p].size() > 0) ? l1q[p][0].hit : 1'b0;
      l1_rsp_req[p]   = (l1q[p].size() > 0) ? l1q[p][0].r : '0;
    end
    llc_ready = ($urandom_range(0, 99) < p_llc);
    #1;
    // warp acceptance: the tracker counts from here
    for (int p = 0; p < NP; p++) if (warp_valid[p] && warp_ready[p]) begin
      int n = expect_warp(p);
      cnt[p][warp_id[p]]  = n;
      nreq[p][warp_id[p]] = n;
      if (n > 1) n_div++;
      warps_sent[p]++;
      acc_prev[p] = 1'b1;
    end
    // coalesced requests into the L1 model
    for (int p = 0; p < NP; p++) begin
      if (l1_req_valid[p]) begin
        check(exp_coal[p].size() > 0, "unexpected coalesced request");
        if (exp_coal[p].size() > 0)
          check(l1_req[p] == exp_coal[p][0], $sformatf("sm%0d coalesced %h exp %h", p, l1_req[p], exp_coal[p][0]));
        if (l1_req_ready[p]) begin
          l1_ent_t e;
          e.r = l1_req[p];
          e.hit = ($urandom_range(0, 99) < 33);
          l1q[p].push_back(e);
          void'(exp_coal[p].pop_front());
        end else n_l1_stall++;
      end
    end
    // L1 results: predicted CF of misses
    for (int p = 0; p < NP; p++) begin
      v[p] = l1_rsp_valid[p] && !l1_rsp_hit[p];
      r[p] = l1_rsp_req[p];
      if (v[p]) begin
        int w = int'(l1_rsp_req[p].warp_id);
        r[p].cf = cf_t'(cnt[p][w]);
        if (cnt[p][w] < nreq[p][w]) n_lowered++;
      end
    end
    check(block == m.block, "block");
    check(int'(top) == m.top, "priority-0 subqueue");
    m.step(v, r, llc_ready);
    for (int p = 0; p < NP; p++) begin
      if (l1_rsp_valid[p] && l1_rsp_hit[p]) begin
        int w = int'(l1_rsp_req[p].warp_id);
        check(l1_rsp_ready[p], "hit absorbed");
        if (cnt[p][w] > 0) cnt[p][w]--;
        n_hit++;
        void'(l1q[p].pop_front());
      end else if (v[p]) begin
        check(l1_rsp_ready[p] == m.exp_ready[p], $sformatf("sm%0d accept %0d exp %0d", p, l1_rsp_ready[p], m.exp_ready[p]));
        if (m.exp_ready[p]) begin
          n_miss++;
          void'(l1q[p].pop_front());
        end
        check(demoted[p] == m.exp_demoted[p], "demotion");
        if (demoted[p]) n_demote++;
        if (refused[p]) n_refuse++;
      end
    end
    check(llc_valid == m.exp_out_valid, "llc_valid");
    if (m.exp_out_valid) begin
      check(llc_req == m.exp_out_req, $sformatf("issued %h exp %h", llc_req, m.exp_out_req));
      check(int'(llc_subq) == m.exp_out_subq, "issued subqueue");
      if (llc_ready) begin
        n_issued++;
        n_class[cf_class(llc_req.cf)]++;
      end else n_llc_stall++;
    end
    check(rotate == m.exp_rotate, "rotation");
    if (rotate) n_rot++;
    if (block) n_block++;
  endtask

  function automatic bit all_idle();
    if (m.total() != 0) return 0;
    for (int p = 0; p < NP; p++)
      if (warp_valid[p] || exp_coal[p].size() != 0 || l1q[p].size() != 0) return 0;
    return 1;
  endfunction

  initial begin
    int guard;
    m = new(SUBQ_LEN_DEFAULT[0], SUBQ_LEN_DEFAULT[1], SUBQ_LEN_DEFAULT[2],
            SUBQ_LEN_DEFAULT[3], SUBQ_LEN_DEFAULT[4], NP);
    for (int i = 0; i < NUM_SUBQ; i++) n_class[i] = 0;
    for (int p = 0; p < NP; p++) begin
      warps_sent[p] = 0; acc_prev[p] = 0;
      for (int w = 0; w < WARPS_PER_SM; w++) begin cnt[p][w] = 0; nreq[p][w] = 0; end
      warp_sm[p] = '0; warp_id[p] = '0; warp_active[p] = '0; l1_req[p] = '0;
      l1_rsp_req[p] = '0;
      for (int t = 0; t < WARP_SIZE; t++) warp_addr[p][t] = '0;
    end
    warp_valid = '0; warp_write = '0; l1_req_ready = '0; l1_rsp_valid = '0; l1_rsp_hit = '0;
    llc_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    repeat (600)  cycle(30, 90, 100, 1);   // light load
    repeat (3000) cycle(90, 95, 25, 1);    // heavy load, slow LLC pipeline
    guard = 0;
    while (!all_idle() && guard < 20000) begin   // finish the remaining warps, drain
      cycle(90, 95, 100, 1);
      guard++;
    end
    check(all_idle(), "bank drained");
    check(n_miss == n_issued, $sformatf("misses %0d issued %0d", n_miss, n_issued));

    $display("warps=%0d divergent=%0d l1_hits=%0d lowered_cf=%0d misses=%0d issued=%0d",
             warps_sent[0] + warps_sent[1] + warps_sent[2] + warps_sent[3] + warps_sent[4],
             n_div, n_hit, n_lowered, n_miss, n_issued);
    $display("rotations=%0d blocked_cycles=%0d fall_through=%0d refused=%0d llc_stalls=%0d l1_stalls=%0d",
             n_rot, n_block, n_demote, n_refuse, n_llc_stall, n_l1_stall);
    $display("issued per class: %0d %0d %0d %0d %0d", n_class[0], n_class[1], n_class[2], n_class[3], n_class[4]);
    check(n_div > 0, "divergent warp");
    check(n_lowered > 0, "CF lowered by an L1 hit");
    check(n_rot > 0, "rotation");
    check(n_block > 0, "block");
    check(n_demote > 0, "fall-through insertion");
    check(n_refuse > 0, "refusal");
    check(n_llc_stall > 0, "LLC back-pressure");
    for (int i = 0; i < NUM_SUBQ; i++) check(n_class[i] > 0, $sformatf("class %0d issued", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
