// ixgen_r: priority-encoded index generator (IXGEN-R) for a perfect nest of
// NLP loops.
//
// Functionally identical to ixgen_b, but laid out the way a generated
// if/elsif chain is: all NLP "index < loop_count" comparisons are made in
// parallel, and every segment's next value is chosen from three cases of
// equal logic depth:
//   advance - this loop is the innermost one still below its bound;
//   clear   - no loop from this one inwards is below its bound (this loop
//             and its inner loops have finished, an outer loop advances or
//             the whole nest ends);
//   hold    - otherwise.
// Loop NLP (the most significant segment) is the innermost, loop 1 (bits
// DW-1:0) the outermost. An index runs from 0 up to and including
// loop_count, in steps of STRIDE. When no loop is below its bound the whole
// vector clears and loops_end is raised.
//
// Timing: the vector is a register updated at the rising edge of clk
// whenever innerloop_end is high; loops_end is combinational (high in the
// cycle that completes the last iteration). Asynchronous active-high reset.
// The priority structure follows the published IXGEN-R generator; the
// combinational loops_end is this design's choice.
module ixgen_r #(
  parameter int unsigned NLP    = 8,  // number of supported loops
  parameter int unsigned DW     = 16, // index register width
  parameter int unsigned STRIDE = 1   // index increment
) (
  input  logic              clk,
  input  logic              reset,          // asynchronous, active high
  input  logic              innerloop_end,
  input  logic [NLP*DW-1:0] loop_count,     // last index value of each loop
  output logic [NLP*DW-1:0] index,
  output logic              loops_end
);
  logic [NLP-1:0] lt;       // loop i is below its bound
  logic [NLP-1:0] inner_lt; // some loop from i inwards is below its bound

  for (genvar i = 0; i < NLP; i++) begin : g_cmp
    assign lt[i] = index[i*DW +: DW] < loop_count[i*DW +: DW];
    if (i == NLP - 1) begin : g_last
      assign inner_lt[i] = lt[i];
    end else begin : g_chain
      assign inner_lt[i] = lt[i] | inner_lt[i+1];
    end
  end

  assign loops_end = innerloop_end & ~inner_lt[0];

  for (genvar i = 0; i < NLP; i++) begin : g_seg
    logic advance, clear;
    if (i == NLP - 1) begin : g_inner
      assign advance = lt[i];
    end else begin : g_outer
      assign advance = lt[i] & ~inner_lt[i+1];
    end
    assign clear = ~inner_lt[i];

    always_ff @(posedge clk or posedge reset) begin
      if (reset)                         index[i*DW +: DW] <= '0;
      else if (innerloop_end && advance) index[i*DW +: DW] <= index[i*DW +: DW] + DW'(STRIDE);
      else if (innerloop_end && clear)   index[i*DW +: DW] <= '0;
    end
  end
endmodule
