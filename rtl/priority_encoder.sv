// priority_encoder: combinational control of the structural HWLU.
//
// Inputs are the last-iteration flags of all loops and innerloop_end, the
// signal from the datapath that the body of the innermost loop has
// finished. Loop NLP (bit NLP-1) is the innermost loop, loop 1 (bit 0) the
// outermost. Scanning from the innermost loop outwards:
//   * a loop whose flag is set and whose inner loops all terminate also
//     terminates: its bit of reset_vct is raised so it returns to 0;
//   * the first loop (from the inside) whose flag is clear is incremented
//     (its bit of incl is raised); every loop outside it holds.
// If every flag is set the whole nest has finished: loops_end is raised and
// all loops are cleared, so the unit restarts from the zero vector. Nothing
// happens while innerloop_end is low. Several nested loops can end in the
// same cycle, so the iteration vector advances every cycle with no overhead.
//
// No clock; outputs follow inputs within the cycle.
module priority_encoder #(
  parameter int unsigned NLP = 8  // number of supported loops
) (
  input  logic           innerloop_end,
  input  logic [NLP-1:0] flag,       // 1 = loop is in its last iteration
  output logic [NLP-1:0] incl,       // increment enable per loop
  output logic [NLP-1:0] reset_vct,  // clear per loop
  output logic           loops_end   // whole nest finishes this cycle
);
  always_comb begin
    logic inner_done;  // all loops inside the one being looked at terminate
    inner_done = innerloop_end;
    for (int q = NLP - 1; q >= 0; q--) begin
      incl[q]      = inner_done & ~flag[q];
      reset_vct[q] = inner_done &  flag[q];
      inner_done   = inner_done &  flag[q];
    end
    loops_end = inner_done;
  end
endmodule
