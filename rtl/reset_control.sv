// reset_control: per-loop clear generation of the structural HWLU.
//
// Each index register is cleared either by the global reset, which brings
// the whole iteration vector back to its initial value, or by its own bit of
// the priority encoder's reset vector, which clears a loop (and the loops it
// contains) after its last iteration. This block ORs the two into the
// per-index clear reset_vct_ix. Combinational; the clears act at the next
// rising clock edge inside the index registers.
module reset_control #(
  parameter int unsigned NLP = 8  // number of supported loops
) (
  input  logic           reset,         // global reset, active high
  input  logic [NLP-1:0] reset_vct,     // per-loop clear from the priority encoder
  output logic [NLP-1:0] reset_vct_ix   // clear for each index register
);
  always_comb reset_vct_ix = reset_vct | {NLP{reset}};
endmodule
