// hwlu_top: the hardware looping units and their two applications, side by
// side.
//
// Looping units. A loop bound register bank (written by the host's control
// unit through lb_we/lb_wdata and enabled with lb_oe) feeds the same
// NLP-loop bound vector to the three implementations of the looping unit:
//   hwlu  - hw_looping, the structural unit (comparators, index
//           incrementers, priority encoder, reset control). Loop q runs
//           0..bound-1.
//   ixb   - ixgen_b, the behavioural index generator. Loop q runs 0..bound.
//   ixr   - ixgen_r, the priority-encoded index generator. Loop q runs
//           0..bound.
// Each unit has its own innerloop_end input and its own index vector and
// loops_end outputs, which go to the accelerator that executes the
// innermost loop body and to the host's control unit.
//
// Applications. poly_* is the polyhedron scanner (0<=i<=n, 0<=j<=n,
// 0<=k<=i+j); fsme_* is the full-search motion estimator with its two
// pixel-memory read ports. The host processor, its datapath, the
// accelerator and the frame memories are outside this design.
//
// All ports are plain signals; see the submodules for their timing.
// reset is the common active-high reset: the structural unit samples it
// synchronously (it is merged with its per-loop clears), all other blocks
// use it asynchronously, so the reset must be held for at least one clock
// edge.
module hwlu_top #(
  parameter int unsigned NLP    = 8,    // loops per looping unit
  parameter int unsigned DW     = 16,   // index register width
  parameter int unsigned ME_W   = 352,  // motion estimation frame width
  parameter int unsigned ME_H   = 288,  // motion estimation frame height
  parameter int unsigned ME_B   = 16,   // motion estimation block size
  parameter int unsigned ME_P   = 7,    // motion estimation search range
  localparam int unsigned ME_AW = $clog2(ME_W * ME_H),
  localparam int unsigned ME_SW = $clog2(255 * ME_B * ME_B + 1)
) (
  input  logic                   clk,
  input  logic                   reset,
  // loop bound register bank
  input  logic [NLP-1:0]         lb_we,
  input  logic [NLP*DW-1:0]      lb_wdata,
  input  logic                   lb_oe,
  output logic [NLP*DW-1:0]      lb_loop_count,
  // structural looping unit
  input  logic                   hwlu_innerloop_end,
  output logic [NLP*DW-1:0]      hwlu_index,
  output logic                   hwlu_loops_end,
  // behavioural index generator
  input  logic                   ixb_innerloop_end,
  output logic [NLP*DW-1:0]      ixb_index,
  output logic                   ixb_loops_end,
  // priority-encoded index generator
  input  logic                   ixr_innerloop_end,
  output logic [NLP*DW-1:0]      ixr_index,
  output logic                   ixr_loops_end,
  // polyhedron scanner
  input  logic                   poly_load,
  input  logic [DW-1:0]          poly_n,
  input  logic                   poly_point_done,
  output logic [DW-1:0]          poly_i,
  output logic [DW-1:0]          poly_j,
  output logic [DW-1:0]          poly_k,
  output logic                   poly_loops_end,
  // motion estimator
  input  logic                   me_start,
  output logic                   me_busy,
  output logic                   me_done,
  output logic [ME_AW-1:0]       me_cur_addr,
  input  logic [7:0]             me_cur_data,
  output logic [ME_AW-1:0]       me_ref_addr,
  input  logic [7:0]             me_ref_data,
  output logic                   me_mv_valid,
  output logic [DW-1:0]          me_mv_x,
  output logic [DW-1:0]          me_mv_y,
  output logic signed [DW-1:0]   me_mv_i,
  output logic signed [DW-1:0]   me_mv_j,
  output logic [ME_SW-1:0]       me_mv_sad
);
  loop_bound_regfile #(.NLP(NLP), .DW(DW)) u_bounds (
    .clk (clk), .reset (reset),
    .we (lb_we), .wdata (lb_wdata), .oe (lb_oe),
    .loop_count (lb_loop_count)
  );

  hw_looping #(.NLP(NLP), .DW(DW)) u_hwlu (
    .clk (clk), .reset (reset),
    .innerloop_end (hwlu_innerloop_end),
    .loop_count (lb_loop_count),
    .index (hwlu_index), .loops_end (hwlu_loops_end)
  );

  ixgen_b #(.NLP(NLP), .DW(DW), .STRIDE(1)) u_ixb (
    .clk (clk), .reset (reset),
    .innerloop_end (ixb_innerloop_end),
    .loop_count (lb_loop_count),
    .index (ixb_index), .loops_end (ixb_loops_end)
  );

  ixgen_r #(.NLP(NLP), .DW(DW), .STRIDE(1)) u_ixr (
    .clk (clk), .reset (reset),
    .innerloop_end (ixr_innerloop_end),
    .loop_count (lb_loop_count),
    .index (ixr_index), .loops_end (ixr_loops_end)
  );

  polyhedron_scan #(.DW(DW)) u_poly (
    .clk (clk), .reset (reset),
    .load (poly_load), .n (poly_n), .point_done (poly_point_done),
    .i (poly_i), .j (poly_j), .k (poly_k), .loops_end (poly_loops_end)
  );

  fsme_engine #(.W(ME_W), .H(ME_H), .B(ME_B), .P(ME_P), .DW(DW)) u_me (
    .clk (clk), .reset (reset),
    .start (me_start), .busy (me_busy), .done (me_done),
    .cur_addr (me_cur_addr), .cur_data (me_cur_data),
    .ref_addr (me_ref_addr), .ref_data (me_ref_data),
    .mv_valid (me_mv_valid),
    .mv_x (me_mv_x), .mv_y (me_mv_y),
    .mv_i (me_mv_i), .mv_j (me_mv_j),
    .mv_sad (me_mv_sad)
  );
endmodule
