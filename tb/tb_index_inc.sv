// tb_index_inc: self-checking testbench of one HWLU index register
// (16 bits). Random increment and clear enables are applied for many
// cycles, including a run to the 16-bit wrap; index and index+1 are
// compared with a model every cycle.
module tb_index_inc;
  localparam int unsigned DW = 16;
  logic          clk = 1'b0;
  logic          rst, incl;
  logic [DW-1:0] index, index_p1;
  logic [DW-1:0] model;
  int checks = 0, failures = 0, wraps = 0;

  index_inc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic step(input logic r, input logic i);
    rst = r;
    incl = i;
    @(posedge clk);
    if (r) model = '0;
    else if (i) begin
      if (model == '1) wraps++;
      model = model + 1'b1;
    end
    #1;
    checks++;
    if (index !== model || index_p1 !== DW'(model + 1'b1)) begin
      failures++;
      if (failures < 10) $display("index=%0d p1=%0d model=%0d", index, index_p1, model);
    end
  endtask

  initial begin
    model = '0;
    step(1'b1, 1'b0);
    for (int t = 0; t < 5000; t++) step($urandom_range(0, 40) == 0, $urandom_range(0, 2) != 0);
    step(1'b1, 1'b1);                        // clear wins over increment
    repeat (70000) step(1'b0, 1'b1);         // through the wrap
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
