// calrs_scheduler: the CaLRS request scheduler of one shared-LLC bank.
//
// Requests arrive with a Critical Field (CF) and are buffered in five FIFO
// subqueues. A rotating pointer `top` names the subqueue that currently has
// priority 0; subqueue (top + p) % 5 has priority p.
//
// Insertion (every cycle, ports in order 0..NP-1): a request of CF class c
// (see calrs_cf_class) goes to the subqueue of priority c. If that one is full
// it tries priority c+1, c+2, ... 4, so a request never lands above its own
// priority. If none has room the request is refused and the bank raises
// `block`, which refuses every new request until all requests of the
// priority-0 subqueue have been served (a delayed cancel that keeps the signal
// from toggling every cycle).
//
// Issue: after the cycle's insertions, at most one request per cycle leaves
// from the non-empty subqueue of highest priority.
//
// Rotation (starvation guard): when issue empties the priority-0 subqueue, all
// priorities move up by one: top <= (top + 1) % 5, and the old top subqueue
// becomes priority 4. Later CF-1 requests then go to the new top.
//
// Interface: in_valid_i[p]/in_req_i[p]/in_ready_i[p] per arrival port; a
// request is taken when valid and ready are both high. in_ready_o[p] depends
// on the request's CF and on earlier ports in the same cycle. out_valid_o /
// out_req_o / out_ready_i deliver the issued request to the cache pipeline.
// Timing: a request inserted in cycle t can issue in cycle t+1 at the
// earliest. Free space is that at the start of the cycle (an entry issued in
// the same cycle is reused from the next cycle).
//
// From the scheme: class mapping, subqueue lengths 25/25/25/25/28,
// fall-through insertion, block with cancel once the top subqueue drains,
// one issue per cycle, rotation on emptying the top subqueue.
// Reset (synchronous, active low) empties the subqueues, clears block and
// gives subqueue0 priority 0.
// Own choices: port-order insertion within a cycle; every port tries to insert
// even if an earlier port of the same cycle failed; `block` is also cancelled
// when the top subqueue is already empty (otherwise a bank blocked by a full
// low-priority subqueue with an empty top subqueue would never reopen); an
// out_ready_i back-pressure input (the scheme assumes the cache always takes
// one request per cycle).
module calrs_scheduler
  import calrs_pkg::*;
#(
  parameter int unsigned NP = 5,   // arrival ports: the SMs served by this bank
  parameter int unsigned SUBQ_LEN [NUM_SUBQ] = SUBQ_LEN_DEFAULT,
  localparam int unsigned MAXLEN = 64,
  localparam int unsigned CNT_W = $clog2(MAXLEN + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // arrivals
  input  logic     [NP-1:0]    in_valid_i,
  input  mem_req_t             in_req_i [NP],
  output logic     [NP-1:0]    in_ready_o,
  // issue to the LLC cache pipeline
  output logic                 out_valid_o,
  output mem_req_t             out_req_o,
  output prio_t                out_subq_o,   // subqueue the request came from
  input  logic                 out_ready_i,
  // status
  output logic                 block_o,      // bank full: refuse new requests
  output prio_t                top_o,        // subqueue that has priority 0
  output logic                 rotate_o,     // pulse: priorities rotate now
  output logic     [NP-1:0]    demoted_o,    // port p inserted below its class
  output logic     [NP-1:0]    refused_o,    // port p found no free entry
  output logic [CNT_W-1:0]     occupancy_o [NUM_SUBQ]
);

  // ---------------------------------------------------------------- state
  prio_t top_q;
  logic  block_q;

  logic     [NP-1:0]    q_wr_en   [NUM_SUBQ];
  mem_req_t             q_wr_data [NUM_SUBQ][NP];
  logic     [NUM_SUBQ-1:0] q_rd_en;
  mem_req_t             q_head    [NUM_SUBQ];
  logic [CNT_W-1:0]     q_count   [NUM_SUBQ];
  logic [CNT_W-1:0]     q_free    [NUM_SUBQ];

  for (genvar q = 0; q < NUM_SUBQ; q++) begin : g_subq
    localparam int unsigned QCW = $clog2(SUBQ_LEN[q] + 1);
    logic [QCW-1:0] cnt, fre;
    for (genvar p = 0; p < NP; p++) begin : g_wd
      assign q_wr_data[q][p] = in_req_i[p];
    end
    calrs_subqueue #(.DEPTH(SUBQ_LEN[q]), .NW(NP)) u_subq (
      .clk, .rst_n,
      .wr_en_i   (q_wr_en[q]),
      .wr_data_i (q_wr_data[q]),
      .rd_en_i   (q_rd_en[q]),
      .head_o    (q_head[q]),
      .count_o   (cnt),
      .free_o    (fre)
    );
    assign q_count[q] = CNT_W'(cnt);
    assign q_free[q]  = CNT_W'(fre);
  end

  // ---------------------------------------------------------------- classify
  prio_t in_class [NP];
  for (genvar p = 0; p < NP; p++) begin : g_cls
    calrs_cf_class u_cls (.cf_i(in_req_i[p].cf), .class_o(in_class[p]));
  end

  // ---------------------------------------------------------------- insert
  // Walk the ports in order, each taking a slot from the running free count.
  logic [CNT_W-1:0] free_run [NUM_SUBQ];
  logic [NP-1:0]    placed;
  always_comb begin
    prio_t sq;
    sq = '0;
    for (int q = 0; q < NUM_SUBQ; q++) begin
      free_run[q] = q_free[q];
      q_wr_en[q]  = '0;
    end
    placed    = '0;
    demoted_o = '0;
    refused_o = '0;
    for (int p = 0; p < NP; p++) begin
      if (in_valid_i[p] && !block_q) begin
        for (int pr = 0; pr < NUM_SUBQ; pr++) begin
          sq = subq_add(top_q, prio_t'(pr));
          if (!placed[p] && pr >= int'(in_class[p]) && free_run[sq] != '0) begin
            placed[p]        = 1'b1;
            q_wr_en[sq][p]   = 1'b1;
            free_run[sq]     = free_run[sq] - 1'b1;
            demoted_o[p]     = (pr != int'(in_class[p]));
          end
        end
        refused_o[p] = !placed[p];
      end
    end
  end
  assign in_ready_o = placed;

  // ---------------------------------------------------------------- issue
  prio_t sel_sq;
  logic  sel_any;
  always_comb begin
    prio_t sq;
    sel_any = 1'b0;
    sel_sq  = top_q;
    for (int pr = NUM_SUBQ - 1; pr >= 0; pr--) begin
      sq = subq_add(top_q, prio_t'(pr));
      if (q_count[sq] != '0) begin
        sel_any = 1'b1;
        sel_sq  = sq;
      end
    end
  end

  logic do_issue;
  assign out_valid_o = sel_any;
  assign out_req_o   = q_head[sel_sq];
  assign out_subq_o  = sel_sq;
  assign do_issue    = sel_any && out_ready_i;

  always_comb begin
    q_rd_en = '0;
    if (do_issue) q_rd_en[sel_sq] = 1'b1;
  end

  // ---------------------------------------------------------------- rotate / block
  // Count of the top subqueue after this cycle's inserts and issue.
  logic [CNT_W-1:0] top_wr;
  always_comb begin
    top_wr = '0;
    for (int p = 0; p < NP; p++) top_wr = top_wr + CNT_W'(q_wr_en[top_q][p]);
  end

  logic top_empty_next;
  assign top_empty_next = (q_count[top_q] + top_wr - CNT_W'(q_rd_en[top_q])) == '0;
  assign rotate_o = (q_count[top_q] != '0) && top_empty_next;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      top_q   <= '0;
      block_q <= 1'b0;
    end else begin
      if (rotate_o) top_q <= subq_add(top_q, prio_t'(1));
      if (block_q) block_q <= !top_empty_next;
      else         block_q <= |refused_o;
    end
  end

  assign block_o = block_q;
  assign top_o   = top_q;
  for (genvar q = 0; q < NUM_SUBQ; q++) begin : g_occ
    assign occupancy_o[q] = q_count[q];
  end

  // ---------------------------------------------------------------- checks
  a_one_issue: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(q_rd_en));
  a_no_accept_when_blocked: assert property (@(posedge clk) disable iff (!rst_n)
    block_q |-> (in_ready_o == '0));

endmodule
