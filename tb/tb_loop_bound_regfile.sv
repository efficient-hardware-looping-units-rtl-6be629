// tb_loop_bound_regfile: self-checking testbench of the loop bound register
// bank (8 entries of 16 bits). Random per-entry writes and output-enable
// values are applied; each cycle the output is compared with a model,
// including the write-through of an entry written in the same cycle and
// the zero output while the bank is disabled.
module tb_loop_bound_regfile;
  localparam int unsigned NLP = 8;
  localparam int unsigned DW  = 16;
  logic              clk = 1'b0;
  logic              reset;
  logic [NLP-1:0]    we;
  logic [NLP*DW-1:0] wdata;
  logic              oe;
  logic [NLP*DW-1:0] loop_count;
  logic [NLP*DW-1:0] model, expv;
  int checks = 0, failures = 0;

  loop_bound_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    reset = 1'b1;
    we = '0;
    wdata = '0;
    oe = 1'b1;
    model = '0;
    #1;
    @(posedge clk); #1;
    reset = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      we = NLP'($urandom) & NLP'($urandom);
      for (int q = 0; q < NLP; q++) wdata[q*DW +: DW] = DW'($urandom);
      oe = ($urandom_range(0, 4) != 0);
      #1;
      for (int q = 0; q < NLP; q++)
        expv[q*DW +: DW] = !oe ? '0 : we[q] ? wdata[q*DW +: DW] : model[q*DW +: DW];
      checks++;
      if (loop_count !== expv) begin
        failures++;
        if (failures < 10) $display("t=%0d got %h exp %h", t, loop_count, expv);
      end
      @(posedge clk);
      for (int q = 0; q < NLP; q++)
        if (we[q]) model[q*DW +: DW] = wdata[q*DW +: DW];
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
