// fsme_engine: full-search block motion estimator controlled by three
// hardware looping units, one per double loop of the algorithm.
//
// For every BxB block of the current frame (top-left pixel (x, y), x along
// the H rows, y along the W columns) the engine tries every displacement
// (i, j) in [-P, P] x [-P, P] and computes the sum of absolute differences
// (SAD) between the block and the displaced block of the reference frame.
// Reference pixels outside the picture count as 0. The displacement with
// the smallest SAD (the first one found on ties) is the block's motion
// vector.
//
// Loop control. The iteration vector (x, y, i, j, k, l) is held in three
// two-loop index generators (ixgen_r):
//   u_xy - block position, x and y step by B (stride B);
//   u_ij - search position, counted 0..2P and offset by -P;
//   u_kl - pixel inside the block, 0..B-1.
// The pixel loop advances every running cycle; its loops_end (last pixel
// of a search position) advances the search loop, whose loops_end (last
// position of a block) advances the block loop, whose loops_end ends the
// frame. All three can step in the same cycle, so there is no overhead
// between loops: a frame takes exactly (H/B)*(W/B)*(2P+1)^2*B^2 cycles.
//
// Tasks of the algorithm, all done in the cycle of the pixel that closes
// their loop:
//   T1 - min <= 255*B*B, when a block is finished;
//   T2 - dist <= 0, when a search position is finished;
//   T3 - dist <= dist + |cur - ref|, every cycle (one pixel per cycle);
//   T4 - if dist < min, keep dist and (i, j), when a position is finished.
//
// Interface. start (while idle) begins one frame; busy is high while it
// runs and done pulses in its last cycle. The pixel memories are read
// combinationally: cur_addr/ref_addr (row*W + col) are valid during the
// cycle and cur_data/ref_data must answer in the same cycle. ref_addr is 0
// when the displaced pixel is outside the picture (its data are then
// ignored). mv_valid pulses for one cycle, one cycle after a block's last
// pixel, with the block position (mv_x, mv_y), the vector (mv_i, mv_j) and
// its SAD. Reset is asynchronous, active high.
//
// The algorithm, its tasks T1..T4 and the use of one looping unit per
// double loop follow the published kernel and sketch. The frame size
// defaults to CIF (352x288). The block size B, the search range P, the
// one-pixel-per-cycle datapath with combinational memory reads, and the
// update of min in T4 are this design's choices.
//
// Lint (Verilator) reports SYNCASYNCNET on reset: the registers use it
// asynchronously and the two assertions at the end use it in "disable iff".
// Both uses are intended.
module fsme_engine #(
  parameter int unsigned W  = 352,  // frame width (columns)
  parameter int unsigned H  = 288,  // frame height (rows)
  parameter int unsigned B  = 16,   // block size
  parameter int unsigned P  = 7,    // search range, displacements -P..P
  parameter int unsigned DW = 16,   // index register width
  localparam int unsigned AW = $clog2(W * H),         // pixel address width
  localparam int unsigned SW = $clog2(255 * B * B + 1) // SAD width
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic [AW-1:0]        cur_addr,
  input  logic [7:0]           cur_data,
  output logic [AW-1:0]        ref_addr,
  input  logic [7:0]           ref_data,
  output logic                 mv_valid,
  output logic [DW-1:0]        mv_x,
  output logic [DW-1:0]        mv_y,
  output logic signed [DW-1:0] mv_i,
  output logic signed [DW-1:0] mv_j,
  output logic [SW-1:0]        mv_sad
);
  localparam logic [SW-1:0] MIN_INIT = SW'(255 * B * B);

  logic [2*DW-1:0] xy_index, ij_index, kl_index;
  logic            kl_end, ij_end, xy_end;
  logic [DW-1:0]   x, y, ii, jj, k, l;

  assign x  = xy_index[0*DW +: DW];
  assign y  = xy_index[1*DW +: DW];
  assign ii = ij_index[0*DW +: DW];
  assign jj = ij_index[1*DW +: DW];
  assign k  = kl_index[0*DW +: DW];
  assign l  = kl_index[1*DW +: DW];

  ixgen_r #(.NLP(2), .DW(DW), .STRIDE(B)) u_xy (
    .clk (clk), .reset (reset),
    .innerloop_end (ij_end),
    .loop_count    ({DW'(W - B), DW'(H - B)}),
    .index (xy_index), .loops_end (xy_end)
  );

  ixgen_r #(.NLP(2), .DW(DW), .STRIDE(1)) u_ij (
    .clk (clk), .reset (reset),
    .innerloop_end (kl_end),
    .loop_count    ({DW'(2 * P), DW'(2 * P)}),
    .index (ij_index), .loops_end (ij_end)
  );

  ixgen_r #(.NLP(2), .DW(DW), .STRIDE(1)) u_kl (
    .clk (clk), .reset (reset),
    .innerloop_end (busy),
    .loop_count    ({DW'(B - 1), DW'(B - 1)}),
    .index (kl_index), .loops_end (kl_end)
  );

  assign done = xy_end;

  always_ff @(posedge clk or posedge reset) begin
    if (reset)                busy <= 1'b0;
    else if (!busy && start)  busy <= 1'b1;
    else if (xy_end)          busy <= 1'b0;
  end

  // Pixel addressing and out-of-picture test (T3_1, T3_2).
  logic signed [DW+2:0] cur_row, cur_col, ref_row, ref_col;
  logic                 in_pic;

  always_comb begin
    cur_row = $signed({3'b000, x}) + $signed({3'b000, k});
    cur_col = $signed({3'b000, y}) + $signed({3'b000, l});
    ref_row = cur_row + $signed({3'b000, ii}) - (DW+3)'(P);
    ref_col = cur_col + $signed({3'b000, jj}) - (DW+3)'(P);
    in_pic  = (ref_row >= 0) && (ref_row < (DW+3)'(H)) &&
              (ref_col >= 0) && (ref_col < (DW+3)'(W));
    cur_addr = AW'(cur_row) * AW'(W) + AW'(cur_col);
    ref_addr = in_pic ? AW'(ref_row) * AW'(W) + AW'(ref_col) : '0;
  end

  // Sum of absolute differences (T3_3).
  logic [7:0]    p2, absdiff;
  logic [SW-1:0] sad_acc, sad_next, min_sad;
  logic [DW-1:0] best_i, best_j;
  logic          better;

  always_comb begin
    p2        = in_pic ? ref_data : 8'd0;
    absdiff   = (cur_data > p2) ? cur_data - p2 : p2 - cur_data;
    sad_next = sad_acc + SW'(absdiff);
    better    = sad_next < min_sad;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      sad_acc     <= '0;
      min_sad  <= MIN_INIT;
      best_i   <= '0;
      best_j   <= '0;
      mv_valid <= 1'b0;
      mv_x     <= '0;
      mv_y     <= '0;
      mv_i     <= '0;
      mv_j     <= '0;
      mv_sad   <= '0;
    end else begin
      mv_valid <= 1'b0;
      if (busy) begin
        if (kl_end) begin
          sad_acc <= '0;                                   // T2
          if (ij_end) begin
            mv_valid <= 1'b1;
            mv_x     <= x;
            mv_y     <= y;
            mv_i     <= $signed(better ? ii : best_i) - $signed(DW'(P));
            mv_j     <= $signed(better ? jj : best_j) - $signed(DW'(P));
            mv_sad   <= better ? sad_next : min_sad;
            min_sad  <= MIN_INIT;                       // T1
            best_i   <= '0;
            best_j   <= '0;
          end else if (better) begin                    // T4
            min_sad  <= sad_next;
            best_i   <= ii;
            best_j   <= jj;
          end
        end else begin
          sad_acc <= sad_next;                            // T3
        end
      end
    end
  end

  // The pixel loop steps only while running.
  assert property (@(posedge clk) disable iff (reset) kl_end |-> busy);
  assert property (@(posedge clk) disable iff (reset) done |-> ij_end && kl_end);
endmodule
