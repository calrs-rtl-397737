// tb_calrs_workload: runs a CaLRS bank (default sizes, 5 SM ports) under
// synthetic traffic shaped like measured GPU workloads, next to a plain
// 128-entry first-in first-out bank fed with the same arrivals, and reports
// the queue latency of each CF class in both.
//
// Two request mixes are run, each for 20000 cycles at about 0.97 arrivals per
// cycle in bursts (the bank serves one per cycle, so the queues stay long):
//   mix A, classes 0..4 in the shares 45.2/14.2/10.5/18.6/11.4 %: the
//          average over the benchmark suite;
//   mix B, CF uniform over 1..32: a strongly divergent application.
// Each port holds a request until the bank takes it. Latency is counted from
// the request's arrival at the port to its issue, so time spent refused or
// blocked is included. Checks: every request of both banks is issued exactly
// once and in a bounded time (no starvation); the CaLRS bank serves class 0
// faster and class 4 slower than the FIFO bank; the CaLRS bank's issued
// requests match calrs_ref_pkg::sched_model cycle by cycle; rotation occurs.
// Measured numbers (latency per class, rotation interval, blocked cycles)
// are printed.
`timescale 1ns/1ps
module tb_calrs_workload;
  import calrs_pkg::*;
  import calrs_ref_pkg::*;

  localparam int NP = 5;
  localparam int CYCLES = 20000;
  localparam int FIFO_LEN = 128;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     [NP-1:0] in_valid, in_ready, demoted, refused;
  mem_req_t          in_req [NP];
  logic              out_valid, out_ready, block, rotate;
  mem_req_t          out_req;
  prio_t             out_subq, top;
  logic [6:0]        occ [NUM_SUBQ];

  calrs_scheduler #(.NP(NP)) dut (
    .clk, .rst_n, .in_valid_i(in_valid), .in_req_i(in_req), .in_ready_o(in_ready),
    .out_valid_o(out_valid), .out_req_o(out_req), .out_subq_o(out_subq), .out_ready_i(out_ready),
    .block_o(block), .top_o(top), .rotate_o(rotate), .demoted_o(demoted), .refused_o(refused),
    .occupancy_o(occ));

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Requests are numbered; the line field carries the number.
  typedef struct { int id; int t_arr; cf_t cf; } pend_t;

  function automatic cf_t draw_cf(int mix);
    int r;
    if (mix == 1) return cf_t'($urandom_range(1, 32));
    r = $urandom_range(0, 999);
    if (r < 452) return cf_t'(1);
    if (r < 594) return cf_t'(2);
    if (r < 699) return cf_t'($urandom_range(3, 4));
    if (r < 885) return cf_t'($urandom_range(5, 8));
    return cf_t'($urandom_range(9, 32));
  endfunction

  task automatic run_mix(int mix);
    pend_t src_c [NP][$];   // waiting at the ports of the CaLRS bank
    pend_t src_f [NP][$];   // same arrivals, ports of the FIFO bank
    pend_t fifo [$];
    int    t_arr_of [int];
    int    cls_of [int];
    bit    done_c [int], done_f [int];
    real   lat_c [NUM_SUBQ], lat_f [NUM_SUBQ];
    int    n_c [NUM_SUBQ], n_f [NUM_SUBQ];
    int    max_c = 0, max_f = 0, n_rot = 0, n_blk = 0, last_rot = 0, rot_gap_sum = 0;
    int    next_id = 0, t = 0, burst = 0;
    sched_model m;
    m = new(25, 25, 25, 25, 28, NP);
    for (int i = 0; i < NUM_SUBQ; i++) begin lat_c[i] = 0; lat_f[i] = 0; n_c[i] = 0; n_f[i] = 0; end

    rst_n = 0;
    in_valid = '0;
    out_ready = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    while (t < CYCLES || m.total() > 0 || fifo.size() > 0 ||
           src_c[0].size() + src_c[1].size() + src_c[2].size() + src_c[3].size() + src_c[4].size() +
           src_f[0].size() + src_f[1].size() + src_f[2].size() + src_f[3].size() + src_f[4].size() > 0) begin
      bit       v [] = new[NP];
      mem_req_t r [] = new[NP];
      int       ffree;
      check(t < CYCLES + 20000, "bank drains in bounded time");
      if (t >= CYCLES + 20000) break;
      // new arrivals: bursts of 25 cycles at 1.6/cycle alternating with 1.5x25 at 0.34/cycle
      if (t < CYCLES) begin
        burst = (t / 25) % 2;
        for (int p = 0; p < NP; p++) begin
          if ($urandom_range(0, 999) < (burst ? 320 : 68)) begin
            pend_t e;
            e.id = next_id++; e.t_arr = t; e.cf = draw_cf(mix);
            t_arr_of[e.id] = t;
            cls_of[e.id] = cf_class(e.cf);
            src_c[p].push_back(e);
            src_f[p].push_back(e);
          end
        end
      end
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        in_valid[p] = (src_c[p].size() > 0);
        in_req[p] = '0;
        if (src_c[p].size() > 0) begin
          in_req[p].line = LINE_W'(src_c[p][0].id);
          in_req[p].sm_id = SM_W'(p);
          in_req[p].cf = src_c[p][0].cf;
        end
        v[p] = in_valid[p];
        r[p] = in_req[p];
      end
      #1;
      m.step(v, r, 1'b1);
      for (int p = 0; p < NP; p++) begin
        check(in_ready[p] == m.exp_ready[p], "accept matches model");
        if (in_valid[p] && in_ready[p]) void'(src_c[p].pop_front());
      end
      check(out_valid == m.exp_out_valid, "issue matches model");
      if (out_valid) begin
        int id = int'(out_req.line);
        int lat;
        check(out_req == m.exp_out_req, "issued request matches model");
        check(t_arr_of.exists(id) && !done_c.exists(id), "CaLRS issues each request once");
        if (t_arr_of.exists(id)) begin
          done_c[id] = 1;
          lat = t - t_arr_of[id];
          lat_c[cls_of[id]] += lat;
          n_c[cls_of[id]]++;
          if (lat > max_c) max_c = lat;
        end
      end
      if (rotate) begin
        n_rot++;
        rot_gap_sum += t - last_rot;
        last_rot = t;
      end
      if (block) n_blk++;
      // FIFO bank with the same arrivals: issue head, then accept in port order
      if (fifo.size() > 0) begin
        pend_t h = fifo.pop_front();
        int lat = t - h.t_arr;
        check(!done_f.exists(h.id), "FIFO issues each request once");
        done_f[h.id] = 1;
        lat_f[cls_of[h.id]] += lat;
        n_f[cls_of[h.id]]++;
        if (lat > max_f) max_f = lat;
      end
      ffree = FIFO_LEN - fifo.size() - 1;   // free at the start of the cycle
      for (int p = 0; p < NP; p++) begin
        if (src_f[p].size() > 0 && ffree > 0) begin
          fifo.push_back(src_f[p].pop_front());
          ffree--;
        end
      end
      @(posedge clk);
      t++;
    end

    check(done_c.num() == next_id && done_f.num() == next_id, "all requests served by both banks");
    check(n_rot > 0, "rotation occurred");
    $display("mix %s: %0d requests in %0d cycles, rotations=%0d (mean interval %0.1f cycles), blocked cycles=%0d",
             mix == 0 ? "A (suite average)" : "B (CF uniform 1..32)", next_id, t, n_rot,
             n_rot > 0 ? real'(rot_gap_sum) / n_rot : 0.0, n_blk);
    for (int i = 0; i < NUM_SUBQ; i++) begin
      real a, b;
      a = n_c[i] > 0 ? lat_c[i] / n_c[i] : 0.0;
      b = n_f[i] > 0 ? lat_f[i] / n_f[i] : 0.0;
      $display("  class %0d: %6d requests  CaLRS latency %7.1f  FIFO latency %7.1f  ratio %5.1f %%",
               i, n_c[i], a, b, b > 0 ? 100.0 * a / b : 0.0);
    end
    $display("  max latency: CaLRS %0d, FIFO %0d cycles", max_c, max_f);
    check(lat_c[0] / n_c[0] < lat_f[0] / n_f[0], "class 0 served faster than FIFO");
    check(lat_c[4] / n_c[4] > lat_f[4] / n_f[4], "class 4 served slower than FIFO");
  endtask

  initial begin
    in_valid = '0; out_ready = 1'b1;
    for (int p = 0; p < NP; p++) in_req[p] = '0;
    run_mix(0);
    run_mix(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
