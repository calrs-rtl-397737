// tb_calrs_coalescer: random warps through the coalescing unit at its default
// width of 32 threads.
//
// Each warp's thread addresses are drawn from a pool of K lines (K chosen per
// warp from 1..32, so N spans the whole CF range) with random byte offsets and
// a random active mask. The testbench lists the distinct lines in order of
// first appearance and checks that exactly those requests leave, in that
// order, each carrying CF = N, and that alloc reports N. The sink is first
// always ready, where requests of back-to-back warps must leave on every
// cycle, then randomly stalled.
`timescale 1ns/1ps
module tb_calrs_coalescer;
  import calrs_pkg::*;
  localparam int NT = WARP_SIZE;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              in_valid, in_ready, in_write;
  logic [SM_W-1:0]   in_sm;
  logic [WARP_W-1:0] in_warp;
  logic [NT-1:0]     in_active;
  logic [ADDR_W-1:0] in_addr [NT];
  logic              alloc;
  logic [WARP_W-1:0] alloc_warp;
  cf_t               alloc_n;
  logic              out_valid, out_ready;
  mem_req_t          out_req;

  calrs_coalescer dut (
    .clk, .rst_n, .in_valid_i(in_valid), .in_ready_o(in_ready), .in_sm_i(in_sm),
    .in_warp_i(in_warp), .in_write_i(in_write), .in_active_i(in_active), .in_addr_i(in_addr),
    .alloc_o(alloc), .alloc_warp_o(alloc_warp), .alloc_n_o(alloc_n),
    .out_valid_o(out_valid), .out_req_o(out_req), .out_ready_i(out_ready));

  mem_req_t exp_q [$];
  bit acc_prev = 0;
  int checks = 0, failures = 0, n_warps = 0, n_div = 0, n_gap = 0, n_out = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // new random warp on the inputs
  task automatic new_warp();
    logic [LINE_W-1:0] pool [NT];
    int k;
    k = $urandom_range(1, NT);
    for (int i = 0; i < NT; i++) pool[i] = LINE_W'($urandom());
    in_sm    = SM_W'($urandom_range(0, NUM_SMS - 1));
    in_warp  = WARP_W'($urandom_range(0, WARPS_PER_SM - 1));
    in_write = 1'($urandom());
    in_active = ($urandom_range(0, 3) == 0) ? NT'($urandom()) : '1;
    if (in_active == '0) in_active[0] = 1'b1;
    for (int t = 0; t < NT; t++)
      in_addr[t] = {pool[$urandom_range(0, k - 1)], OFFS_W'($urandom())};
  endtask

  // expected requests of the warp on the inputs
  task automatic expect_warp();
    logic [LINE_W-1:0] seen [$];
    mem_req_t r;
    int n;
    for (int t = 0; t < NT; t++) begin
      if (in_active[t]) begin
        bit dup = 0;
        foreach (seen[i]) if (seen[i] == in_addr[t][ADDR_W-1:OFFS_W]) dup = 1;
        if (!dup) seen.push_back(in_addr[t][ADDR_W-1:OFFS_W]);
      end
    end
    n = seen.size();
    check(alloc && alloc_n == cf_t'(n) && alloc_warp == in_warp, $sformatf("alloc N=%0d exp %0d", alloc_n, n));
    if (n > 1) n_div++;
    foreach (seen[i]) begin
      r = '0;
      r.line = seen[i]; r.sm_id = in_sm; r.warp_id = in_warp; r.is_write = in_write; r.cf = cf_t'(n);
      exp_q.push_back(r);
    end
  endtask

  // One cycle: drive at the falling edge, check once the inputs settle.
  task automatic cycle(int rp, bit more);
    @(negedge clk);
    if (acc_prev) in_valid = 1'b0;
    acc_prev = 1'b0;
    if (!in_valid && more) begin
      new_warp();
      in_valid = 1'b1;
    end
    out_ready = ($urandom_range(0, 99) < rp);
    #1;
    if (out_valid) begin
      n_out++;
      check(exp_q.size() > 0, "unexpected request");
      if (exp_q.size() > 0)
        check(out_req == exp_q[0], $sformatf("request %h exp %h", out_req, exp_q[0]));
      if (out_ready && exp_q.size() > 0) void'(exp_q.pop_front());
    end else if (rp == 100 && more && n_warps > 0) n_gap++;
    if (in_valid && in_ready) begin
      expect_warp();
      n_warps++;
      acc_prev = 1'b1;
    end
  endtask

  initial begin
    in_valid = 0; out_ready = 1; in_active = '0; in_sm = '0; in_warp = '0; in_write = 0;
    for (int t = 0; t < NT; t++) in_addr[t] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n_warps < 60) cycle(100, 1);   // back to back, sink always ready
    repeat (40) cycle(100, 0);
    while (n_warps < 260) cycle(50, 1);   // stalled sink
    repeat (400) cycle(100, 0);
    check(exp_q.size() == 0, "all requests delivered");
    check(n_div > 0, "divergent warp seen");
    check(n_gap == 0, $sformatf("back-to-back warps left %0d idle cycles", n_gap));
    $display("warps=%0d divergent=%0d requests=%0d idle=%0d", n_warps, n_div, n_out, n_gap);
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
