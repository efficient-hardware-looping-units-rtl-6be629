// tb_fsme_engine: self-checking testbench of the motion estimator at a
// reduced size (48x32 frame, 8x8 blocks, search range +-3), two frames in a
// row. Frame memories, stimulus and the software full search are in
// fsme_frames. Besides the vectors it checks the zero-overhead frame time,
// that start is ignored while busy, and that some best vectors lie at the
// picture border (out-of-picture pixels read as 0).
module tb_fsme_engine;
  localparam int unsigned W = 48, H = 32, B = 8, P = 3, DW = 16;
  localparam int unsigned AW = $clog2(W * H);
  localparam int unsigned SW = $clog2(255 * B * B + 1);

  logic clk = 1'b0;
  logic reset, start, busy, done, mv_valid;
  logic [AW-1:0] cur_addr, ref_addr;
  logic [7:0] cur_data, ref_data;
  logic [DW-1:0] mv_x, mv_y;
  logic signed [DW-1:0] mv_i, mv_j;
  logic [SW-1:0] mv_sad;
  int checks, failures, frames_done, edge_blocks;

  always #5 clk = ~clk;

  fsme_engine #(.W(W), .H(H), .B(B), .P(P), .DW(DW)) dut (.*);

  fsme_frames #(.W(W), .H(H), .B(B), .P(P), .DW(DW)) frames (.*);

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int extra;
    extra = 0;
    reset = 1'b1;
    start = 1'b0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    for (int f = 0; f < 2; f++) begin
      @(posedge clk); #1;
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      // A second start while busy must be ignored.
      repeat (100) @(posedge clk);
      #1 start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      wait (done);
      @(posedge clk); #1;
      extra++;
      if (busy) failures++;
    end
    repeat (3) @(posedge clk);
    extra++;
    if (frames_done != 2 || edge_blocks == 0) begin
      failures++;
      $display("frames_done=%0d edge_blocks=%0d", frames_done, edge_blocks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra, failures);
    $finish;
  end
endmodule
