// ixgen_harness: checking harness shared by the testbenches of the two
// index generators (ixgen_b when USE_R is 0, ixgen_r when it is 1).
//
// It applies a series of random loop bounds, drives innerloop_end randomly
// and compares every cycle the index vector and loops_end with a reference
// counter: the innermost loop (highest segment) that is still below its
// bound advances by STRIDE and the loops inside it return to 0; when none
// is below its bound the vector clears and loops_end is high. It also
// checks that a nest takes exactly prod(ceil(bound/STRIDE)+1) steps, that
// a stalled unit holds its value, and that reset clears it mid-nest. The
// results are counted in checks/failures; finished rises at the end.
module ixgen_harness #(
  parameter int unsigned NLP    = 8,
  parameter int unsigned DW     = 16,
  parameter int unsigned STRIDE = 1,
  parameter int unsigned MAXB   = 3,   // largest random bound
  parameter bit          USE_R  = 1'b1
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   multi_end,
  output logic finished
);
  logic              reset;
  logic              innerloop_end;
  logic [NLP*DW-1:0] loop_count;
  logic [NLP*DW-1:0] index;
  logic              loops_end;

  if (USE_R) begin : g_r
    ixgen_r #(.NLP(NLP), .DW(DW), .STRIDE(STRIDE)) dut (.*);
  end else begin : g_b
    ixgen_b #(.NLP(NLP), .DW(DW), .STRIDE(STRIDE)) dut (.*);
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

  function automatic logic model_last();
    for (int q = 0; q < NLP; q++)
      if (model[q] < loop_count[q*DW +: DW]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic model_step();
    int ended = 0;
    for (int q = NLP - 1; q >= 0; q--) begin
      if (model[q] < loop_count[q*DW +: DW]) begin
        model[q] = model[q] + DW'(STRIDE);
        if (ended >= 2) multi_end++;
        return 1'b0;
      end
      model[q] = '0;
      ended++;
    end
    multi_end++;
    return 1'b1;
  endfunction

  initial begin
    int total, steps, b;
    logic ended;
    checks = 0;
    failures = 0;
    multi_end = 0;
    finished = 1'b0;
    reset = 1'b1;
    innerloop_end = 1'b0;
    loop_count = '0;
    for (int q = 0; q < NLP; q++) model[q] = '0;
    @(posedge clk); #1;
    reset = 1'b0;

    for (int t = 0; t < 12; t++) begin
      total = 1;
      for (int q = 0; q < NLP; q++) begin
        b = (t == 0) ? 0 : int'($urandom_range(0, MAXB));
        loop_count[q*DW +: DW] = DW'(b);
        total *= (b + STRIDE - 1) / STRIDE + 1;
      end
      steps = 0;
      ended = 1'b0;
      while (!ended) begin
        innerloop_end = ($urandom_range(0, 3) != 0);
        #1;
        check_state(innerloop_end && model_last());
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
      #1 check_state(1'b0);
    end

    // Asynchronous reset in the middle of a nest.
    for (int q = 0; q < NLP; q++) loop_count[q*DW +: DW] = DW'(MAXB);
    innerloop_end = 1'b1;
    repeat (23) begin
      @(posedge clk); #1;
      void'(model_step());
    end
    innerloop_end = 1'b0;
    #1 check_state(1'b0);
    reset = 1'b1;
    #1;
    for (int q = 0; q < NLP; q++) model[q] = '0;
    check_state(1'b0);
    @(posedge clk); #1;
    reset = 1'b0;
    finished = 1'b1;
  end
endmodule
