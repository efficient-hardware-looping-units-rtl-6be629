// cmpeq: last-iteration detector for one loop of the structural hardware
// looping unit (HWLU).
//
// The comparator receives the incremented value of its loop index (index+1,
// fed back from the index register) and the loop bound. When the two are
// equal the loop is in its last iteration, because an index runs from 0 up
// to bound-1. The result is the per-loop flag that the priority encoder
// reads. Purely combinational.
//
// Ports: index_p1 (index+1), loop_count (bound), flag (1 = last iteration).
module cmpeq #(
  parameter int unsigned DW = 16  // index register width
) (
  input  logic [DW-1:0] index_p1,
  input  logic [DW-1:0] loop_count,
  output logic          flag
);
  always_comb flag = (index_p1 == loop_count);
endmodule
