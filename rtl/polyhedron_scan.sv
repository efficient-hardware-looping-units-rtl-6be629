// polyhedron_scan: looping control that visits every integer point of the
// polyhedron
//     0 <= i <= n,   0 <= j <= n,   0 <= k <= i + j
// one point per cycle, in lexicographic order of (i, j, k).
//
// The inner bound i + j is not a constant, so a plain perfect-nest counter
// is not enough. Three parts do the work:
//   * a loop bound register file with one entry per loop; the i and j
//     entries are loaded with n (load), and the k entry is rewritten every
//     cycle with the sum i + j;
//   * an adder that forms i + j from the current indices;
//   * a three-loop priority-encoded index generator (ixgen_r) that counts
//     each index from 0 up to and including its bound.
// Because the register file reads write-through, the k bound the generator
// compares against is always the sum of the indices it currently holds, so
// the scan has no bubble when i or j changes.
//
// Interface: point_done acts as innerloop_end (the datapath has finished
// the current point); loops_end is high in the cycle that finishes the last
// point (n, n, 2n), after which the indices return to (0, 0, 0). i is loop
// 1 (outermost), k loop 3 (innermost), so the generator's index vector is
// {k, j, i}. The sum is DW bits wide, so n must stay below 2**(DW-1).
// Reset is asynchronous and active high. The adder and register-file structure follow the
// published sketch; the write-through register file and the index
// ordering are this design's choices.
module polyhedron_scan #(
  parameter int unsigned DW = 16   // index and bound width
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          load,        // write n into the i and j bounds
  input  logic [DW-1:0] n,
  input  logic          point_done,  // current point processed, advance
  output logic [DW-1:0] i,
  output logic [DW-1:0] j,
  output logic [DW-1:0] k,
  output logic          loops_end
);
  localparam int unsigned NLP = 3;

  logic [NLP*DW-1:0] index, loop_count, wdata;
  logic [NLP-1:0]    we;
  logic [DW-1:0]     sum_ij;

  assign i = index[0*DW +: DW];
  assign j = index[1*DW +: DW];
  assign k = index[2*DW +: DW];

  // Bound of k, recomputed from the current outer indices.
  assign sum_ij = i + j;

  assign we    = {1'b1, load, load};
  assign wdata = {sum_ij, n, n};

  loop_bound_regfile #(.NLP(NLP), .DW(DW)) u_bounds (
    .clk        (clk),
    .reset      (reset),
    .we         (we),
    .wdata      (wdata),
    .oe         (1'b1),
    .loop_count (loop_count)
  );

  ixgen_r #(.NLP(NLP), .DW(DW), .STRIDE(1)) u_ixgen (
    .clk           (clk),
    .reset         (reset),
    .innerloop_end (point_done),
    .loop_count    (loop_count),
    .index         (index),
    .loops_end     (loops_end)
  );
endmodule
