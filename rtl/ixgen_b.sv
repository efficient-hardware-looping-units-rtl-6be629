// ixgen_b: behavioural index generator (IXGEN-B) for a perfect nest of NLP
// loops.
//
// Same interface as the structural unit, but written as one behavioural
// process. When innerloop_end is high the loops are examined from loop NLP
// (innermost, most significant segment) towards loop 1 (outermost, bits
// DW-1:0). The first loop whose index is still below its loop_count is
// advanced by STRIDE, every loop inside it goes back to 0, and the search
// stops (a for loop with an early exit). If no loop can advance, the
// iteration vector has reached loop_count: all indices are cleared and
// loops_end is raised.
//
// Note the bound convention: an index runs from 0 up to and including
// loop_count (the test is "index < loop_count" before incrementing), so a
// loop makes loop_count/STRIDE+1 iterations when loop_count is a multiple
// of STRIDE.
//
// Timing: the iteration vector is a register updated at the rising edge of
// clk, one step per cycle with innerloop_end high; loops_end is
// combinational (high in the cycle that completes the last iteration).
// Asynchronous active-high reset clears the vector. The algorithm follows
// the published IXGEN-B description; the combinational loops_end and the
// single STRIDE for all loops are this design's choices.
module ixgen_b #(
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
  logic [NLP*DW-1:0] temp_index;

  always_comb begin
    logic found;
    temp_index = index;
    loops_end  = 1'b0;
    found      = 1'b0;
    if (innerloop_end) begin
      for (int i = NLP - 1; i >= 0; i--) begin
        if (!found && (index[i*DW +: DW] < loop_count[i*DW +: DW])) begin
          for (int j = i + 1; j < NLP; j++) temp_index[j*DW +: DW] = '0;
          temp_index[i*DW +: DW] = index[i*DW +: DW] + DW'(STRIDE);
          found = 1'b1;
        end
      end
      if (!found) begin
        temp_index = '0;
        loops_end  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) index <= '0;
    else       index <= temp_index;
  end
endmodule
