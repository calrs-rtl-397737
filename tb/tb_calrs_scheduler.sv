// tb_calrs_scheduler: self-checking test of the CaLRS bank scheduler.
//
// Two schedulers run side by side on the same arrivals: one with the default
// subqueue lengths (25/25/25/25/28) and one with tiny lengths (2/2/2/2/3) so
// that full subqueues, fall-through and block happen often. Every cycle the
// outputs of each are compared with calrs_ref_pkg::sched_model: per-port
// accept, demotion and refusal, the issued request and its subqueue, block,
// the priority-0 subqueue and the rotation pulse. Phases: light load, heavy
// load with a slow sink, a flood of CF-1 requests, then a drain during which
// one request must leave every cycle. Each mechanism must be seen at least
// once in each scheduler.
`timescale 1ns/1ps
module tb_calrs_scheduler;
  import calrs_pkg::*;
  import calrs_ref_pkg::*;

  localparam int NP   = 5;
  localparam int ND   = 2;
  localparam int CW   = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     [NP-1:0] in_valid;
  mem_req_t          in_req [NP];
  logic              out_ready;

  logic     [NP-1:0] in_ready  [ND];
  logic              out_valid [ND];
  mem_req_t          out_req   [ND];
  prio_t             out_subq  [ND];
  logic              block     [ND];
  prio_t             top       [ND];
  logic              rotate    [ND];
  logic     [NP-1:0] demoted   [ND];
  logic     [NP-1:0] refused   [ND];
  logic [CW-1:0]     occ       [ND][NUM_SUBQ];

  localparam int unsigned LEN_SMALL [NUM_SUBQ] = '{2, 2, 2, 2, 3};

  for (genvar d = 0; d < ND; d++) begin : g_dut
    if (d == 0) begin : g_def
      calrs_scheduler #(.NP(NP)) dut (
        .clk, .rst_n, .in_valid_i(in_valid), .in_req_i(in_req), .in_ready_o(in_ready[d]),
        .out_valid_o(out_valid[d]), .out_req_o(out_req[d]), .out_subq_o(out_subq[d]),
        .out_ready_i(out_ready), .block_o(block[d]), .top_o(top[d]), .rotate_o(rotate[d]),
        .demoted_o(demoted[d]), .refused_o(refused[d]), .occupancy_o(occ[d]));
    end else begin : g_small
      calrs_scheduler #(.NP(NP), .SUBQ_LEN(LEN_SMALL)) dut (
        .clk, .rst_n, .in_valid_i(in_valid), .in_req_i(in_req), .in_ready_o(in_ready[d]),
        .out_valid_o(out_valid[d]), .out_req_o(out_req[d]), .out_subq_o(out_subq[d]),
        .out_ready_i(out_ready), .block_o(block[d]), .top_o(top[d]), .rotate_o(rotate[d]),
        .demoted_o(demoted[d]), .refused_o(refused[d]), .occupancy_o(occ[d]));
    end
  end

  sched_model m [ND];
  int checks = 0, failures = 0;
  int n_rot [ND], n_block [ND], n_demote [ND], n_refuse [ND], n_issue [ND];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic cf_t rand_cf(int mode);
    int r;
    if (mode == 1) return cf_t'(1);
    r = $urandom_range(0, 99);
    if (r < 40) return cf_t'(1);
    if (r < 55) return cf_t'(2);
    if (r < 65) return cf_t'($urandom_range(3, 4));
    if (r < 85) return cf_t'($urandom_range(5, 8));
    return cf_t'($urandom_range(9, 32));
  endfunction

  // One clock cycle: drive, compare with the model, advance.
  task automatic cycle(int pv, int pr, int mode);
    bit       v [] = new[NP];
    mem_req_t r [] = new[NP];
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      in_valid[p] = ($urandom_range(0, 99) < pv);
      in_req[p]   = '0;
      in_req[p].line    = LINE_W'($urandom());
      in_req[p].sm_id   = SM_W'(p);
      in_req[p].warp_id = WARP_W'($urandom_range(0, WARPS_PER_SM - 1));
      in_req[p].is_write = 1'($urandom());
      in_req[p].cf      = rand_cf(mode);
      v[p] = in_valid[p];
      r[p] = in_req[p];
    end
    out_ready = ($urandom_range(0, 99) < pr);
    #1;
    for (int d = 0; d < ND; d++) begin
      check(block[d] == m[d].block, $sformatf("dut%0d block %0d exp %0d", d, block[d], m[d].block));
      check(int'(top[d]) == m[d].top, $sformatf("dut%0d top %0d exp %0d", d, top[d], m[d].top));
      m[d].step(v, r, out_ready);
      for (int p = 0; p < NP; p++) begin
        check(in_ready[d][p] == m[d].exp_ready[p],
              $sformatf("dut%0d port%0d ready %0d exp %0d", d, p, in_ready[d][p], m[d].exp_ready[p]));
        check(demoted[d][p] == m[d].exp_demoted[p], $sformatf("dut%0d port%0d demoted", d, p));
        if (demoted[d][p]) n_demote[d]++;
        if (refused[d][p]) n_refuse[d]++;
      end
      check(out_valid[d] == m[d].exp_out_valid, $sformatf("dut%0d out_valid", d));
      if (m[d].exp_out_valid) begin
        check(out_req[d] == m[d].exp_out_req, $sformatf("dut%0d out_req %h exp %h", d, out_req[d], m[d].exp_out_req));
        check(int'(out_subq[d]) == m[d].exp_out_subq, $sformatf("dut%0d out_subq", d));
        if (out_ready) n_issue[d]++;
      end
      check(rotate[d] == m[d].exp_rotate, $sformatf("dut%0d rotate %0d exp %0d", d, rotate[d], m[d].exp_rotate));
      if (rotate[d]) n_rot[d]++;
      if (block[d]) n_block[d]++;
    end
  endtask

  initial begin
    m[0] = new(25, 25, 25, 25, 28, NP);
    m[1] = new(2, 2, 2, 2, 3, NP);
    for (int d = 0; d < ND; d++) begin
      n_rot[d] = 0; n_block[d] = 0; n_demote[d] = 0; n_refuse[d] = 0; n_issue[d] = 0;
    end
    in_valid = '0;
    out_ready = 1'b0;
    for (int p = 0; p < NP; p++) in_req[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // directed: one CF-1 request into the empty bank issues next cycle and rotates
    @(negedge clk);
    in_valid = 5'b00001;
    in_req[0] = '0; in_req[0].line = 'h123; in_req[0].cf = 1;
    out_ready = 1'b1;
    @(negedge clk);
    in_valid = '0;
    #1;
    check(out_valid[0] && out_req[0].line == 'h123, "first request issues one cycle after arrival");
    check(rotate[0] && top[0] == 0, "emptying subqueue0 rotates");
    @(negedge clk);
    check(top[0] == 1 && !out_valid[0], "subqueue1 has priority 0 after rotation");
    // models start from this state
    m[0].top = 1; m[1].top = 1;

    repeat (500)  cycle(40, 100, 0);   // light load
    repeat (3000) cycle(80, 30, 0);    // heavy load, slow sink
    repeat (600)  cycle(90, 20, 1);    // CF-1 flood
    repeat (1500) cycle(60, 50, 0);
    // drain: the bank must issue one request every cycle while not empty
    begin
      int pending [ND];
      for (int d = 0; d < ND; d++) pending[d] = m[d].total();
      for (int k = 0; k < 140; k++) begin
        cycle(0, 100, 0);
        for (int d = 0; d < ND; d++)
          if (k < pending[d]) check(out_valid[d], $sformatf("dut%0d one issue per cycle while draining", d));
      end
      for (int d = 0; d < ND; d++) check(m[d].total() == 0, "bank drained");
    end

    for (int d = 0; d < ND; d++) begin
      $display("dut%0d: issues=%0d rotations=%0d blocked_cycles=%0d demotions=%0d refusals=%0d",
               d, n_issue[d], n_rot[d], n_block[d], n_demote[d], n_refuse[d]);
      check(n_rot[d] > 0, "rotation seen");
      check(n_block[d] > 0, "block seen");
      check(n_demote[d] > 0, "fall-through insertion seen");
      check(n_refuse[d] > 0, "refusal seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
