// calrs_cf_class: maps a request's Critical Field (CF) to its CaLRS priority
// class, which is also the priority level of the subqueue it is meant for.
//
//   CF 1 -> class 0, CF 2 -> class 1, CF 3..4 -> class 2,
//   CF 5..8 -> class 3, CF 9..32 -> class 4.
//
// The five classes are the power-of-two buckets of CF, with the two largest
// buckets ([9-16] and [17-32]) merged. Purely combinational, no clock.
// Own choice: CF 0 (a request whose whole warp is otherwise served) goes to
// class 0, and the unused codes 33..63 go to class 4.
module calrs_cf_class
  import calrs_pkg::*;
(
  input  cf_t   cf_i,
  output prio_t class_o
);

  always_comb begin
    if (cf_i <= cf_t'(1))      class_o = prio_t'(0);
    else if (cf_i == cf_t'(2)) class_o = prio_t'(1);
    else if (cf_i <= cf_t'(4)) class_o = prio_t'(2);
    else if (cf_i <= cf_t'(8)) class_o = prio_t'(3);
    else                       class_o = prio_t'(4);
  end

endmodule
