// index_inc: one loop index register of the structural HWLU ("index
// inc_by_1").
//
// The register holds the current index of one loop. When its increment
// enable (incl) is high at a rising clock edge it takes index+1; when its
// clear (rst, coming from the reset control) is high it returns to the
// initial value 0. Clear has priority. Besides the index it also outputs
// index+1, which the loop's equality comparator uses, so a single adder
// serves both the update and the last-iteration test.
//
// Timing: one register, updated at the rising edge of clk. The clear is
// synchronous: the global reset reaches this block only through the reset
// control, which merges it with the priority encoder's per-loop clears.
module index_inc #(
  parameter int unsigned DW = 16  // index register width
) (
  input  logic          clk,
  input  logic          rst,       // synchronous clear to the initial value 0
  input  logic          incl,      // increment enable
  output logic [DW-1:0] index,
  output logic [DW-1:0] index_p1   // index + 1 (wraps modulo 2**DW)
);
  always_comb index_p1 = index + DW'(1);

  always_ff @(posedge clk) begin
    if (rst)       index <= '0;
    else if (incl) index <= index_p1;
  end
endmodule
