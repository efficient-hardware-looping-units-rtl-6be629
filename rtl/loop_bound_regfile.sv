// loop_bound_regfile: bank of NLP loop bound registers feeding a looping
// unit.
//
// Each DW-bit entry can be written on its own (we[q] with the matching
// segment of wdata) at the rising edge of clk. The bank drives all entries
// at once on the packed loop_count vector, entry q in bits
// [(q+1)*DW-1:q*DW], while the output enable oe is high; with oe low the
// vector reads as zero, which is how a controller detaches the bounds from
// the looping unit. Reads are write-through: an entry being written shows
// the new value in the same cycle. This lets a datapath compute a bound
// from the current indices (for instance k <= i + j when scanning a
// polyhedron) and have the looping unit use it in the same cycle.
//
// Reset (asynchronous, active high) clears all entries. Output enable and
// the bank itself follow the block diagrams of the looping unit's use
// cases; per-entry write enables, the zero output when disabled and the
// write-through read are this design's choices.
module loop_bound_regfile #(
  parameter int unsigned NLP = 8,   // number of entries (loops)
  parameter int unsigned DW  = 16   // entry width
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [NLP-1:0]    we,          // write enable per entry
  input  logic [NLP*DW-1:0] wdata,       // write data, entry q in segment q
  input  logic              oe,          // output enable
  output logic [NLP*DW-1:0] loop_count
);
  logic [NLP*DW-1:0] bound;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) bound <= '0;
    else begin
      for (int q = 0; q < NLP; q++)
        if (we[q]) bound[q*DW +: DW] <= wdata[q*DW +: DW];
    end
  end

  always_comb begin
    for (int q = 0; q < NLP; q++)
      loop_count[q*DW +: DW] = !oe   ? '0 :
                               we[q] ? wdata[q*DW +: DW] : bound[q*DW +: DW];
  end
endmodule
