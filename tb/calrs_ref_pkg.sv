// calrs_ref_pkg: cycle-level reference model of a CaLRS LLC bank queue, used
// by the testbenches to predict what the scheduler must accept and issue.
//
// The model keeps five SystemVerilog queues and applies the scheduling rules
// directly, one call of step() per clock cycle:
//   1. free space = length - occupancy at the start of the cycle;
//   2. ports in order: a request of class c tries priority c, c+1, .. 4
//      (subqueue (top + priority) mod 5); refused if all are full or if the
//      bank is blocked;
//   3. the expected issue is the head of the highest-priority non-empty
//      subqueue at the start of the cycle, popped if the sink is ready;
//   4. accepted requests are appended; if the top subqueue was non-empty and
//      is now empty the priorities rotate; block is set by any refusal and
//      cleared once the top subqueue is empty.
package calrs_ref_pkg;
  import calrs_pkg::*;

  function automatic int cf_class(cf_t cf);
    if (cf <= 1) return 0;
    if (cf == 2) return 1;
    if (cf <= 4) return 2;
    if (cf <= 8) return 3;
    return 4;
  endfunction

  class sched_model;
    int       len [NUM_SUBQ];
    mem_req_t q   [NUM_SUBQ][$];
    int       top;
    bit       block;

    // results of the last step()
    bit       exp_ready [];
    bit       exp_demoted [];
    bit       exp_out_valid;
    mem_req_t exp_out_req;
    int       exp_out_subq;
    bit       exp_rotate;

    function new(int l0, int l1, int l2, int l3, int l4, int np);
      len[0] = l0; len[1] = l1; len[2] = l2; len[3] = l3; len[4] = l4;
      top = 0;
      block = 0;
      exp_ready   = new[np];
      exp_demoted = new[np];
    endfunction

    function int total();
      int s = 0;
      for (int i = 0; i < NUM_SUBQ; i++) s += q[i].size();
      return s;
    endfunction

    function void step(bit valid [], mem_req_t req [], bit out_ready);
      int free [NUM_SUBQ];
      int dest [];
      int start_top_size;
      bit any_refused = 0;
      dest = new[valid.size()];
      for (int i = 0; i < NUM_SUBQ; i++) free[i] = len[i] - q[i].size();
      start_top_size = q[top].size();
      for (int p = 0; p < valid.size(); p++) begin
        exp_ready[p] = 0;
        exp_demoted[p] = 0;
        dest[p] = -1;
        if (valid[p] && !block) begin
          int c = cf_class(req[p].cf);
          for (int pr = c; pr < NUM_SUBQ; pr++) begin
            int sq = (top + pr) % NUM_SUBQ;
            if (dest[p] < 0 && free[sq] > 0) begin
              dest[p] = sq;
              free[sq]--;
              exp_ready[p] = 1;
              exp_demoted[p] = (pr != c);
            end
          end
          if (dest[p] < 0) any_refused = 1;
        end
      end
      exp_out_valid = 0;
      exp_out_subq  = -1;
      for (int pr = 0; pr < NUM_SUBQ; pr++) begin
        int sq = (top + pr) % NUM_SUBQ;
        if (!exp_out_valid && q[sq].size() > 0) begin
          exp_out_valid = 1;
          exp_out_subq  = sq;
          exp_out_req   = q[sq][0];
        end
      end
      if (exp_out_valid && out_ready) void'(q[exp_out_subq].pop_front());
      for (int p = 0; p < valid.size(); p++)
        if (dest[p] >= 0) q[dest[p]].push_back(req[p]);
      exp_rotate = (start_top_size > 0) && (q[top].size() == 0);
      if (block) block = (q[top].size() != 0);
      else       block = any_refused;
      if (exp_rotate) top = (top + 1) % NUM_SUBQ;
    endfunction
  endclass

endpackage
