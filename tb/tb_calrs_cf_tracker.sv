// tb_calrs_cf_tracker: random test of the private-cache CF update at its
// default size (48 warps).
//
// The testbench keeps its own count of unserved requests per warp: set to N
// when a warp is allocated, lowered by one on each L1 hit of that warp (not
// below zero). Each cycle it drives at random an allocation and one L1 result
// (hit or miss, random warp, random LLC readiness) and checks that a miss
// leaves with CF equal to that count, that hits are absorbed and that a miss
// waits while the LLC side is not ready. Allocation and lookup of the same
// warp in one cycle are forced regularly.
`timescale 1ns/1ps
module tb_calrs_cf_tracker;
  import calrs_pkg::*;
  localparam int NW = WARPS_PER_SM;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              alloc;
  logic [WARP_W-1:0] alloc_warp;
  cf_t               alloc_n;
  logic              l1_valid, l1_hit, l1_ready;
  mem_req_t          l1_req;
  logic              out_valid, out_ready;
  mem_req_t          out_req;

  calrs_cf_tracker dut (
    .clk, .rst_n, .alloc_i(alloc), .alloc_warp_i(alloc_warp), .alloc_n_i(alloc_n),
    .l1_valid_i(l1_valid), .l1_hit_i(l1_hit), .l1_req_i(l1_req), .l1_ready_o(l1_ready),
    .out_valid_o(out_valid), .out_req_o(out_req), .out_ready_i(out_ready));

  int cnt [NW];
  int checks = 0, failures = 0, n_lowered = 0, n_same = 0, n_wait = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    for (int i = 0; i < NW; i++) cnt[i] = 0;
    alloc = 0; alloc_warp = '0; alloc_n = '0; l1_valid = 0; l1_hit = 0; l1_req = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      int w, cur;
      @(negedge clk);
      alloc      = ($urandom_range(0, 99) < 15);
      alloc_warp = WARP_W'($urandom_range(0, NW - 1));
      alloc_n    = cf_t'($urandom_range(1, 32));
      l1_valid   = ($urandom_range(0, 99) < 80);
      l1_hit     = ($urandom_range(0, 99) < 45);
      l1_req     = mem_req_t'({$urandom(), $urandom()});
      l1_req.warp_id = (c % 7 == 0) ? alloc_warp : WARP_W'($urandom_range(0, NW - 1));
      out_ready  = ($urandom_range(0, 99) < 70);
      #1;
      w = int'(l1_req.warp_id);
      if (alloc) cnt[alloc_warp] = int'(alloc_n);
      cur = cnt[w];
      if (alloc && alloc_warp == l1_req.warp_id && l1_valid) n_same++;
      check(out_valid == (l1_valid && !l1_hit), "out_valid");
      check(l1_ready == (l1_hit || out_ready), "l1_ready");
      if (l1_valid && !l1_hit) begin
        mem_req_t e;
        e = l1_req;
        e.cf = cf_t'(cur);
        check(out_req == e, $sformatf("miss CF %0d exp %0d", out_req.cf, cur));
        if (!out_ready) n_wait++;
        if (alloc_n != out_req.cf && cur != 0) n_lowered++;
      end
      if (l1_valid && l1_hit && cnt[w] > 0) cnt[w]--;
    end
    check(n_same > 0 && n_wait > 0 && n_lowered > 0, "all cases seen");
    $display("same-cycle=%0d waits=%0d", n_same, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
