// tb_hwlu_top: end-to-end testbench of the whole design at its default
// parameters (8 loops of 16 bits, CIF 352x288 motion estimation with 16x16
// blocks and a +-7 search range).
//
// 1. Loop bounds are written into the bound register bank and the three
//    looping units (structural, behavioural, priority-encoded) each run
//    two complete nests with independent random innerloop_end stalls; every
//    cycle their index vectors and loops_end are compared with reference
//    counters. The bank's output enable is then dropped (the units see
//    zero bounds) and checked.
// 2. The polyhedron scanner scans 0<=i,j<=5, 0<=k<=i+j completely.
// 3. The motion estimator processes one full CIF frame; every motion
//    vector, the vector count and the zero-overhead frame time are checked
//    (see fsme_frames).
// Each mechanism - stall, several loops ending in one cycle, end of nest,
// output-enable pause, write-through bound update, out-of-picture search -
// is counted and must occur at least once.
module tb_hwlu_top;
  localparam int unsigned NLP = 8, DW = 16;
  localparam int unsigned ME_W = 352, ME_H = 288, ME_B = 16, ME_P = 7;
  localparam int unsigned ME_AW = $clog2(ME_W * ME_H);
  localparam int unsigned ME_SW = $clog2(255 * ME_B * ME_B + 1);

  logic clk = 1'b0;
  logic reset;
  logic [NLP-1:0] lb_we;
  logic [NLP*DW-1:0] lb_wdata, lb_loop_count;
  logic lb_oe;
  logic hwlu_innerloop_end, ixb_innerloop_end, ixr_innerloop_end;
  logic [NLP*DW-1:0] hwlu_index, ixb_index, ixr_index;
  logic hwlu_loops_end, ixb_loops_end, ixr_loops_end;
  logic poly_load, poly_point_done, poly_loops_end;
  logic [DW-1:0] poly_n, poly_i, poly_j, poly_k;
  logic me_start, me_busy, me_done, me_mv_valid;
  logic [ME_AW-1:0] me_cur_addr, me_ref_addr;
  logic [7:0] me_cur_data, me_ref_data;
  logic [DW-1:0] me_mv_x, me_mv_y;
  logic signed [DW-1:0] me_mv_i, me_mv_j;
  logic [ME_SW-1:0] me_mv_sad;

  int checks = 0, failures = 0;
  int me_checks, me_failures, me_frames, me_edge_blocks;
  int n_stall = 0, n_multi = 0, n_nest_end = 0, n_pause = 0, n_bound_update = 0;

  always #5 clk = ~clk;

  hwlu_top dut (.*);

  fsme_frames #(.W(ME_W), .H(ME_H), .B(ME_B), .P(ME_P), .DW(DW)) frames (
    .clk (clk), .reset (reset),
    .cur_addr (me_cur_addr), .cur_data (me_cur_data),
    .ref_addr (me_ref_addr), .ref_data (me_ref_data),
    .busy (me_busy), .done (me_done), .mv_valid (me_mv_valid),
    .mv_x (me_mv_x), .mv_y (me_mv_y), .mv_i (me_mv_i), .mv_j (me_mv_j),
    .mv_sad (me_mv_sad),
    .checks (me_checks), .failures (me_failures),
    .frames_done (me_frames), .edge_blocks (me_edge_blocks)
  );

  initial begin
    repeat (30000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + me_checks, failures + me_failures + 1);
    $finish;
  end

  // ---- reference counters for the three looping units ----
  logic [DW-1:0] m_hw [NLP];
  logic [DW-1:0] m_b  [NLP];
  logic [DW-1:0] m_r  [NLP];

  function automatic logic bnd_last_hw();
    for (int q = 0; q < NLP; q++)
      if (m_hw[q] + DW'(1) != lb_loop_count[q*DW +: DW]) return 1'b0;
    return 1'b1;
  endfunction

  // Structural unit: loop q runs 0..bound-1.
  function automatic logic step_hw();
    int q = NLP - 1;
    while (q >= 0 && m_hw[q] + DW'(1) == lb_loop_count[q*DW +: DW]) begin
      m_hw[q] = '0;
      q--;
    end
    if (q < NLP - 2) n_multi++;
    if (q >= 0) begin
      m_hw[q]++;
      return 1'b0;
    end
    return 1'b1;
  endfunction

  // Index generators: loop q runs 0..bound.
  function automatic logic gen_last(ref logic [DW-1:0] m [NLP]);
    for (int q = 0; q < NLP; q++)
      if (m[q] < lb_loop_count[q*DW +: DW]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic gen_step(ref logic [DW-1:0] m [NLP]);
    for (int q = NLP - 1; q >= 0; q--) begin
      if (m[q] < lb_loop_count[q*DW +: DW]) begin
        if (q < NLP - 2) n_multi++;
        m[q]++;
        return 1'b0;
      end
      m[q] = '0;
    end
    return 1'b1;
  endfunction

  task automatic cmp_vec(input string who, input logic [NLP*DW-1:0] got,
                         ref logic [DW-1:0] m [NLP], input logic got_end, input logic exp_end);
    checks++;
    for (int q = 0; q < NLP; q++)
      if (got[q*DW +: DW] !== m[q]) begin
        failures++;
        if (failures < 10) $display("%s loop %0d: got %0d exp %0d", who, q, got[q*DW +: DW], m[q]);
      end
    if (got_end !== exp_end) begin
      failures++;
      if (failures < 10) $display("%s loops_end got %0b exp %0b", who, got_end, exp_end);
    end
  endtask

  task automatic run_loop_units();
    int ends_hw, ends_b, ends_r;
    logic e_hw, e_b, e_r;
    ends_hw = 0;
    ends_b = 0;
    ends_r = 0;
    for (int q = 0; q < NLP; q++) begin
      m_hw[q] = '0;
      m_b[q] = '0;
      m_r[q] = '0;
    end
    while (ends_hw < 2 || ends_b < 2 || ends_r < 2) begin
      hwlu_innerloop_end = (ends_hw < 2) && ($urandom_range(0, 4) != 0);
      ixb_innerloop_end  = (ends_b < 2) && ($urandom_range(0, 4) != 0);
      ixr_innerloop_end  = (ends_r < 2) && ($urandom_range(0, 4) != 0);
      #1;
      if (!hwlu_innerloop_end || !ixb_innerloop_end || !ixr_innerloop_end) n_stall++;
      cmp_vec("hwlu", hwlu_index, m_hw, hwlu_loops_end, hwlu_innerloop_end && bnd_last_hw());
      cmp_vec("ixgen_b", ixb_index, m_b, ixb_loops_end, ixb_innerloop_end && gen_last(m_b));
      cmp_vec("ixgen_r", ixr_index, m_r, ixr_loops_end, ixr_innerloop_end && gen_last(m_r));
      @(posedge clk);
      if (hwlu_innerloop_end) begin
        e_hw = step_hw();
        if (e_hw) ends_hw++;
      end
      if (ixb_innerloop_end) begin
        e_b = gen_step(m_b);
        if (e_b) ends_b++;
      end
      if (ixr_innerloop_end) begin
        e_r = gen_step(m_r);
        if (e_r) ends_r++;
      end
      #1;
    end
    n_nest_end += ends_hw + ends_b + ends_r;
    hwlu_innerloop_end = 1'b0;
    ixb_innerloop_end = 1'b0;
    ixr_innerloop_end = 1'b0;
  endtask

  task automatic run_poly(input int nv);
    poly_n = DW'(nv);
    poly_load = 1'b1;
    @(posedge clk); #1;
    poly_load = 1'b0;
    for (int a = 0; a <= nv; a++)
      for (int b = 0; b <= nv; b++) begin
        if (a + b > 0) n_bound_update++;
        for (int c = 0; c <= a + b; c++) begin
          poly_point_done = 1'b1;
          #1;
          checks++;
          if (poly_i !== DW'(a) || poly_j !== DW'(b) || poly_k !== DW'(c) ||
              poly_loops_end !== (a == nv && b == nv && c == 2 * nv)) begin
            failures++;
            if (failures < 10) $display("poly got (%0d,%0d,%0d) exp (%0d,%0d,%0d)",
                                        poly_i, poly_j, poly_k, a, b, c);
          end
          @(posedge clk); #1;
        end
      end
    poly_point_done = 1'b0;
  endtask

  initial begin
    reset = 1'b1;
    lb_we = '0;
    lb_wdata = '0;
    lb_oe = 1'b0;
    hwlu_innerloop_end = 1'b0;
    ixb_innerloop_end = 1'b0;
    ixr_innerloop_end = 1'b0;
    poly_load = 1'b0;
    poly_n = '0;
    poly_point_done = 1'b0;
    me_start = 1'b0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;

    // Start the motion estimator; it runs in parallel with the rest.
    me_start = 1'b1;
    @(posedge clk); #1;
    me_start = 1'b0;

    // 1. Loop bounds 1..3 through the bank, then the three looping units.
    for (int q = 0; q < NLP; q++) lb_wdata[q*DW +: DW] = DW'($urandom_range(1, 3));
    lb_we = '1;
    lb_oe = 1'b1;
    #1;
    checks++;
    if (lb_loop_count !== lb_wdata) failures++;   // write-through
    @(posedge clk); #1;
    lb_we = '0;
    run_loop_units();

    // Output enable low: the bank presents zero bounds.
    lb_oe = 1'b0;
    #1;
    checks++;
    n_pause++;
    if (lb_loop_count !== '0) failures++;
    @(posedge clk); #1;
    lb_oe = 1'b1;
    #1;
    checks++;
    if (lb_loop_count !== lb_wdata) failures++;

    // 2. Polyhedron scan.
    run_poly(5);

    // 3. Wait for the motion estimator to finish its frame.
    wait (me_frames == 1);
    repeat (3) @(posedge clk);
    #1;

    checks++;
    if (n_stall == 0 || n_multi == 0 || n_nest_end == 0 || n_pause == 0 ||
        n_bound_update == 0 || me_edge_blocks == 0 || me_frames != 1) begin
      failures++;
      $display("mechanism never seen");
    end
    $display("stalls=%0d multi_end=%0d nest_ends=%0d pauses=%0d bound_updates=%0d me_edge_blocks=%0d",
             n_stall, n_multi, n_nest_end, n_pause, n_bound_update, me_edge_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks + me_checks, failures + me_failures);
    $finish;
  end
endmodule
