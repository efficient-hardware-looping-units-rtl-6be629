// hw_looping: structural hardware looping unit (HWLU) for a perfect nest of
// up to NLP loops.
//
// Every clock cycle in which innerloop_end is high the unit advances the
// iteration vector by one step of the nest, with no overhead cycles for
// loop exits: if the innermost loops end together they are all cleared and
// their parent is incremented in the same cycle. Loop q (1..NLP) counts
// from 0 to loop_count[q]-1; loop NLP is the innermost. A bound of 0 gives
// 2**DW iterations (the index+1 comparison wraps).
//
// Structure, one slice per loop:
//   index_inc  - index register that also outputs index+1
//   cmpeq      - flag = (index+1 == bound), the last-iteration test
// and, shared:
//   priority_encoder - from the flags and innerloop_end, decides which loop
//                      increments, which loops clear, and raises loops_end
//   reset_control    - merges the global reset into the per-loop clears
//
// Interface: loop_count and index are packed vectors, loop q in bits
// [q*DW-1:(q-1)*DW]. loops_end is combinational: it is high in the cycle in
// which innerloop_end completes the last iteration of the whole nest; at the
// following edge all indices return to 0. reset is synchronous here because
// it is merged with the per-loop clears. The slice structure follows the
// block diagram of the unit; the choice of loop NLP as innermost, the
// synchronous reset and the packed ports are this design's own.
module hw_looping #(
  parameter int unsigned NLP = 8,   // number of supported loops
  parameter int unsigned DW  = 16   // index register width
) (
  input  logic              clk,
  input  logic              reset,          // synchronous, active high
  input  logic              innerloop_end,  // innermost loop body finished
  input  logic [NLP*DW-1:0] loop_count,     // loop bounds (iterations per loop)
  output logic [NLP*DW-1:0] index,          // current iteration vector
  output logic              loops_end       // nest finishes in this cycle
);
  logic [NLP-1:0] flag, incl, reset_vct, reset_vct_ix;
  logic [NLP*DW-1:0] index_p1;

  for (genvar q = 0; q < NLP; q++) begin : g_loop
    index_inc #(.DW(DW)) u_index (
      .clk      (clk),
      .rst      (reset_vct_ix[q]),
      .incl     (incl[q]),
      .index    (index[q*DW +: DW]),
      .index_p1 (index_p1[q*DW +: DW])
    );

    cmpeq #(.DW(DW)) u_cmpeq (
      .index_p1   (index_p1[q*DW +: DW]),
      .loop_count (loop_count[q*DW +: DW]),
      .flag       (flag[q])
    );
  end

  priority_encoder #(.NLP(NLP)) u_prio (
    .innerloop_end (innerloop_end),
    .flag          (flag),
    .incl          (incl),
    .reset_vct     (reset_vct),
    .loops_end     (loops_end)
  );

  reset_control #(.NLP(NLP)) u_rstc (
    .reset        (reset),
    .reset_vct    (reset_vct),
    .reset_vct_ix (reset_vct_ix)
  );
endmodule
