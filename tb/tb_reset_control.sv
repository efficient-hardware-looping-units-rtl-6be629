// tb_reset_control: exhaustive self-checking testbench of the HWLU's reset
// control (8 loops): every per-loop clear pattern with the global reset low
// and high.
module tb_reset_control;
  localparam int unsigned NLP = 8;
  logic           reset;
  logic [NLP-1:0] reset_vct, reset_vct_ix;
  int checks = 0, failures = 0;

  reset_control dut (.*);

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [NLP-1:0] exp_ix;
    for (int r = 0; r < 2; r++)
      for (int v = 0; v < (1 << NLP); v++) begin
        reset = r[0];
        reset_vct = NLP'(v);
        exp_ix = (r == 1) ? '1 : NLP'(v);
        #1;
        checks++;
        if (reset_vct_ix !== exp_ix) begin
          failures++;
          if (failures < 10) $display("reset=%0d vct=%b: got %b", r, reset_vct, reset_vct_ix);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
