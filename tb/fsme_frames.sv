// fsme_frames: frame memories, stimulus and checker for the motion
// estimator, shared by its own testbench and the top-level testbench.
//
// The reference frame is pseudo-random; the current frame is built block by
// block as a displaced copy of the reference (a pseudo-random displacement
// in [-P, P] per block, random pixels where the displaced block leaves the
// picture, plus sparse noise). Pixels are computed from their coordinates
// by an integer hash, so no frame is stored. At time 0 it computes
// the expected motion vector and SAD of every block with a plain software
// full search (strict "<", scanning i then j from -P). The memories answer
// the engine's read addresses combinationally. On each mv_valid it checks
// the block position, vector and SAD, in block order (x outer, y inner);
// after done it checks the number of vectors and that the frame took
// exactly (H/B)*(W/B)*(2P+1)^2*B^2 busy cycles. Nothing is checked during
// reset.
module fsme_frames #(
  parameter int unsigned W  = 48,
  parameter int unsigned H  = 32,
  parameter int unsigned B  = 8,
  parameter int unsigned P  = 3,
  parameter int unsigned DW = 16,
  localparam int unsigned AW = $clog2(W * H),
  localparam int unsigned SW = $clog2(255 * B * B + 1)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic [AW-1:0]        cur_addr,
  output logic [7:0]           cur_data,
  input  logic [AW-1:0]        ref_addr,
  output logic [7:0]           ref_data,
  input  logic                 busy,
  input  logic                 done,
  input  logic                 mv_valid,
  input  logic [DW-1:0]        mv_x,
  input  logic [DW-1:0]        mv_y,
  input  logic signed [DW-1:0] mv_i,
  input  logic signed [DW-1:0] mv_j,
  input  logic [SW-1:0]        mv_sad,
  output int                   checks,
  output int                   failures,
  output int                   frames_done,
  output int                   edge_blocks   // blocks whose best vector reads outside the picture
);
  localparam int NBX = H / B;
  localparam int NBY = W / B;
  localparam int NBLK = NBX * NBY;
  localparam longint CYCLES = longint'(NBLK) * (2 * P + 1) * (2 * P + 1) * B * B;

  int exp_i [NBLK];
  int exp_j [NBLK];
  int exp_sad [NBLK];
  int mv_count;
  longint busy_cycles;

  // Pixels are computed from their coordinates, so no frame is stored.
  function automatic int unsigned mix(int unsigned a);
    a = a ^ (a >> 16);
    a = a * 32'h7feb352d;
    a = a ^ (a >> 15);
    a = a * 32'h846ca68b;
    return a ^ (a >> 16);
  endfunction

  // Reference frame: pseudo-random pixels.
  function automatic int ref_pix(int r, int c);
    return int'(mix(32'(r * 1031 + c) ^ 32'h5a5a1234) & 255);
  endfunction

  // Displacement of block (bx, by) of the current frame, in [-P, P].
  function automatic int blk_d(int bx, int by, int axis);
    return int'(mix(32'(bx * 977 + by * 31 + axis) ^ 32'h00c0ffee) % (2 * P + 1)) - int'(P);
  endfunction

  // Current frame: displaced reference, random where the displaced pixel
  // is outside the picture, and 1 pixel in 16 replaced by noise.
  function automatic int cur_pix(int r, int c);
    int di, dj;
    int unsigned h;
    di = blk_d(r / int'(B), c / int'(B), 0);
    dj = blk_d(r / int'(B), c / int'(B), 1);
    h = mix(32'(r * 1031 + c) ^ 32'h13572468);
    if (r + di < 0 || r + di >= int'(H) || c + dj < 0 || c + dj >= int'(W) || (h >> 28) == 0)
      return int'(h & 255);
    return ref_pix(r + di, c + dj);
  endfunction

  always_comb cur_data = 8'(cur_pix(int'(cur_addr) / int'(W), int'(cur_addr) % int'(W)));
  always_comb ref_data = 8'(ref_pix(int'(ref_addr) / int'(W), int'(ref_addr) % int'(W)));

  function automatic int ref_px(int r, int c);
    if (r < 0 || r >= int'(H) || c < 0 || c >= int'(W)) return 0;
    return ref_pix(r, c);
  endfunction

  localparam int NPOS = 2 * P + 1;

  function automatic int blk_sad(int bx, int by, int i, int j);
    int d, a, k, l;
    d = 0;
    for (int t = 0; t < int'(B * B); t++) begin
      k = t / int'(B);
      l = t % int'(B);
      a = cur_pix(bx * int'(B) + k, by * int'(B) + l) -
          ref_px(bx * int'(B) + i + k, by * int'(B) + j + l);
      d += (a < 0) ? -a : a;
    end
    return d;
  endfunction

  initial begin
    int best, d;
    checks = 0;
    failures = 0;
    frames_done = 0;
    edge_blocks = 0;
    mv_count = 0;
    busy_cycles = 0;
    // Software full search, written as flat loops over positions and
    // pixels.
    for (int blk = 0; blk < NBLK; blk++) begin
        int bx, by;
        bx = blk / NBY;
        by = blk % NBY;
        best = 255 * B * B;
        exp_i[bx * NBY + by] = -int'(P);
        exp_j[bx * NBY + by] = -int'(P);
        for (int s = 0; s < NPOS * NPOS; s++) begin
          d = blk_sad(bx, by, s / NPOS - int'(P), s % NPOS - int'(P));
          if (d < best) begin
            best = d;
            exp_i[bx * NBY + by] = s / NPOS - int'(P);
            exp_j[bx * NBY + by] = s % NPOS - int'(P);
          end
        end
        exp_sad[bx * NBY + by] = best;
        if (bx * int'(B) + exp_i[bx * NBY + by] < 0 || by * int'(B) + exp_j[bx * NBY + by] < 0 ||
            (bx + 1) * int'(B) + exp_i[bx * NBY + by] > int'(H) ||
            (by + 1) * int'(B) + exp_j[bx * NBY + by] > int'(W))
          edge_blocks++;
      end
  end

  always @(posedge clk) if (!reset) begin
    if (busy) busy_cycles++;
    if (mv_valid) begin
      int b;
      b = mv_count % NBLK;
      checks++;
      if (mv_x != DW'((b / NBY) * B) || mv_y != DW'((b % NBY) * B) ||
          int'(mv_i) != exp_i[b] || int'(mv_j) != exp_j[b] || int'(mv_sad) != exp_sad[b]) begin
        failures++;
        if (failures < 10)
          $display("block %0d: got (%0d,%0d) mv (%0d,%0d) sad %0d; expected (%0d,%0d) mv (%0d,%0d) sad %0d",
                   b, mv_x, mv_y, mv_i, mv_j, mv_sad, (b / NBY) * B, (b % NBY) * B,
                   exp_i[b], exp_j[b], exp_sad[b]);
      end
      mv_count++;
    end
    if (done) begin
      frames_done++;
      checks++;
      // done is high in the last busy cycle, counted above.
      if (busy_cycles != CYCLES * frames_done) begin
        failures++;
        $display("frame took %0d busy cycles, expected %0d", busy_cycles, CYCLES * frames_done);
      end
    end
  end

  // Vector count is checked one cycle after done, when the last vector is out.
  always @(posedge clk) begin
    if (done && !reset) begin
      @(posedge clk);
      #1;
      checks++;
      if (mv_count != NBLK * frames_done) begin
        failures++;
        $display("%0d vectors, expected %0d", mv_count, NBLK * frames_done);
      end
    end
  end
endmodule
