// calrs_subqueue: one CaLRS priority subqueue, a plain FIFO of requests.
//
// Several requests may be written in the same cycle (the LLC bank accepts
// requests from several SMs at once); they are stored in port order, lowest
// port first, so a lower port counts as the older request. One request can be
// read per cycle from the head. The storage is a register array of DEPTH
// entries with wrap-around read and write pointers, so DEPTH need not be a
// power of two (the default subqueues hold 25 and 28 entries).
//
// Interface: wr_en_i[k]/wr_data_i[k] write port k; the caller must not write
// more entries than free_o reports (checked by an assertion). rd_en_i pops the
// head, which is shown combinationally on head_o whenever count_o > 0.
// Timing: a write is visible at the head from the next cycle on; free_o and
// count_o describe the state at the start of the cycle (a same-cycle pop does
// not make room for a same-cycle write). Reset is synchronous, active low,
// and empties the FIFO (the entries themselves are not cleared).
// The FIFO discipline follows the scheme; multi-write ports are this design's
// way of accepting several arrivals per cycle.
module calrs_subqueue
  import calrs_pkg::*;
#(
  parameter int unsigned DEPTH = 25,
  parameter int unsigned NW    = 5,   // write ports
  localparam int unsigned CNT_W = $clog2(DEPTH + 1),
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NW-1:0]     wr_en_i,
  input  mem_req_t          wr_data_i [NW],
  input  logic              rd_en_i,
  output mem_req_t          head_o,
  output logic [CNT_W-1:0]  count_o,
  output logic [CNT_W-1:0]  free_o
);

  mem_req_t         mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [CNT_W-1:0] count;

  function automatic logic [PTR_W-1:0] ptr_add(logic [PTR_W-1:0] p, int unsigned k);
    int unsigned s;
    s = int'(p) + k;
    if (s >= DEPTH) s = s - DEPTH;
    return PTR_W'(s);
  endfunction

  logic [CNT_W-1:0] n_wr;
  always_comb begin
    n_wr = '0;
    for (int k = 0; k < NW; k++) n_wr = n_wr + CNT_W'(wr_en_i[k]);
  end

  logic do_rd;
  assign do_rd = rd_en_i && (count != '0);

  always_ff @(posedge clk) begin
    int unsigned off;
    off = 0;
    for (int k = 0; k < NW; k++) begin
      if (wr_en_i[k]) begin
        mem[ptr_add(wr_ptr, off)] <= wr_data_i[k];
        off = off + 1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      wr_ptr <= ptr_add(wr_ptr, int'(n_wr));
      if (do_rd) rd_ptr <= ptr_add(rd_ptr, 1);
      count  <= count + n_wr - CNT_W'(do_rd);
    end
  end

  assign head_o  = mem[rd_ptr];
  assign count_o = count;
  assign free_o  = CNT_W'(DEPTH) - count;

  // The caller never writes more than the free space.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) n_wr <= free_o)
    else $error("calrs_subqueue: write of %0d entries with only %0d free", n_wr, free_o);

endmodule
