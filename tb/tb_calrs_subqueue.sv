// tb_calrs_subqueue: random test of one priority subqueue at its default size
// (25 entries, 5 write ports). Each cycle a random number of ports write (never
// more than the reported free space) and the head is popped at random; the
// head, count and free outputs are compared with a SystemVerilog queue.
// The pointers wrap many times; phases fill the FIFO to full and drain it.
`timescale 1ns/1ps
module tb_calrs_subqueue;
  import calrs_pkg::*;
  localparam int DEPTH = 25;
  localparam int NW = 5;
  localparam int CW = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NW-1:0] wr_en;
  mem_req_t      wr_data [NW];
  logic          rd_en;
  mem_req_t      head;
  logic [CW-1:0] count, free;

  calrs_subqueue #(.DEPTH(DEPTH), .NW(NW)) dut (
    .clk, .rst_n, .wr_en_i(wr_en), .wr_data_i(wr_data), .rd_en_i(rd_en),
    .head_o(head), .count_o(count), .free_o(free));

  mem_req_t ref_q [$];
  int checks = 0, failures = 0, n_full = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  task automatic cycle(int pw, int pr);
    int room;
    mem_req_t pushed [$];
    @(negedge clk);
    room = DEPTH - ref_q.size();
    for (int k = 0; k < NW; k++) begin
      wr_en[k] = 1'b0;
      wr_data[k] = mem_req_t'({$urandom(), $urandom()});
      if (room > 0 && $urandom_range(0, 99) < pw) begin
        wr_en[k] = 1'b1;
        room--;
        pushed.push_back(wr_data[k]);
      end
    end
    rd_en = ($urandom_range(0, 99) < pr);
    #1;
    check(int'(count) == ref_q.size(), $sformatf("count %0d exp %0d", count, ref_q.size()));
    check(int'(free) == DEPTH - ref_q.size(), "free");
    if (ref_q.size() > 0) check(head == ref_q[0], "head");
    if (ref_q.size() == DEPTH) n_full++;
    if (rd_en && ref_q.size() > 0) void'(ref_q.pop_front());
    foreach (pushed[i]) ref_q.push_back(pushed[i]);
  endtask

  initial begin
    wr_en = '0; rd_en = 0;
    for (int k = 0; k < NW; k++) wr_data[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) cycle(30, 60);
    repeat (200)  cycle(60, 20);   // fill
    repeat (100)  cycle(0, 100);   // drain
    repeat (2000) cycle(25, 80);
    check(n_full > 0, "FIFO reached full");
    $display("full cycles=%0d", n_full);
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
