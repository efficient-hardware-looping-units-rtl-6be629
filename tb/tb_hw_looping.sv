// tb_hw_looping: self-checking testbench of the structural looping unit at
// its default size (8 loops, 16-bit indices).
//
// For a series of random loop bounds (small, so that a whole nest finishes
// quickly) it drives innerloop_end randomly and compares, every cycle, the
// index vector and loops_end with a reference counter kept in the
// testbench. It checks that a whole nest takes exactly the product of the
// bounds in innerloop_end cycles (zero overhead), that several loops can
// end in one cycle, that holding innerloop_end low freezes the unit, and
// that reset returns it to zero in the middle of a nest.
module tb_hw_looping;
  localparam int unsigned NLP = 8;
  localparam int unsigned DW  = 16;

  logic              clk = 1'b0;
  logic              reset;
  logic              innerloop_end;
  logic [NLP*DW-1:0] loop_count;
  logic [NLP*DW-1:0] index;
  logic              loops_end;

  int checks = 0, failures = 0;
  int multi_end = 0;  // cycles in which two or more loops ended together
  int stalls = 0;

  hw_looping dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] model [NLP];

  task automatic check_state(input logic exp_end);
    checks++;
    for (int q = 0; q < NLP; q++)
      if (index[q*DW +: DW] !== model[q]) begin
        failures++;
        if (failures < 10) $display("index %0d: got %0d exp %0d", q, index[q*DW +: DW], model[q]);
      end
    if (loops_end !== exp_end) begin
      failures++;
      if (failures < 10) $display("loops_end got %0b exp %0b", loops_end, exp_end);
    end
  endtask

  // Advances the model; returns 1 if the whole nest ended.
  function automatic logic model_step();
    int q = NLP - 1;
    int ended = 0;
    while (q >= 0 && model[q] + DW'(1) == loop_count[q*DW +: DW]) begin
      model[q] = '0;
      q--;
      ended++;
    end
    if (ended >= 2) multi_end++;
    if (q >= 0) begin
      model[q] = model[q] + DW'(1);
      return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic logic model_last();
    for (int q = 0; q < NLP; q++)
      if (model[q] + DW'(1) != loop_count[q*DW +: DW]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int total, steps, b;
    logic ended;
    reset = 1'b1;
    innerloop_end = 1'b0;
    loop_count = '0;
    for (int q = 0; q < NLP; q++) model[q] = '0;
    @(posedge clk); #1;
    reset = 1'b0;

    for (int t = 0; t < 12; t++) begin
      total = 1;
      for (int q = 0; q < NLP; q++) begin
        b = (t == 0) ? 1 : 1 + int'($urandom_range(0, 3));
        loop_count[q*DW +: DW] = DW'(b);
        total *= b;
      end
      steps = 0;
      ended = 1'b0;
      while (!ended) begin
        innerloop_end = ($urandom_range(0, 3) != 0);
        #1;
        check_state(innerloop_end && model_last());
        if (!innerloop_end) stalls++;
        @(posedge clk);
        if (innerloop_end) begin
          steps++;
          ended = model_step();
        end
        #1;
      end
      checks++;
      if (steps != total) begin
        failures++;
        $display("nest %0d: %0d steps, expected %0d", t, steps, total);
      end
      innerloop_end = 1'b0;
      #1 check_state(1'b0);  // back at the zero vector
    end

    // Reset in the middle of a nest.
    for (int q = 0; q < NLP; q++) loop_count[q*DW +: DW] = DW'(5);
    innerloop_end = 1'b1;
    repeat (37) begin
      @(posedge clk); #1;
      void'(model_step());
    end
    check_state(1'b0);
    reset = 1'b1;
    @(posedge clk); #1;
    reset = 1'b0;
    innerloop_end = 1'b0;
    for (int q = 0; q < NLP; q++) model[q] = '0;
    check_state(1'b0);

    checks++;
    if (multi_end == 0 || stalls == 0) begin
      failures++;
      $display("coverage: multi_end=%0d stalls=%0d", multi_end, stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
