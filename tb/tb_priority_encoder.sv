// tb_priority_encoder: exhaustive self-checking testbench of the HWLU's
// priority encoder at its default size (8 loops).
// For every flag pattern and both values of innerloop_end it checks that
// exactly the innermost loop with a clear flag, among those whose inner
// loops are all in their last iteration, increments; that those inner
// loops clear; and that loops_end is raised only when all flags are set.
module tb_priority_encoder;
  localparam int unsigned NLP = 8;
  logic           innerloop_end;
  logic [NLP-1:0] flag, incl, reset_vct;
  logic           loops_end;
  int checks = 0, failures = 0;

  priority_encoder dut (.*);

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [NLP-1:0] e_incl, e_rst;
    logic e_end;
    int p;
    for (int e = 0; e < 2; e++) begin
      for (int f = 0; f < (1 << NLP); f++) begin
        innerloop_end = e[0];
        flag = NLP'(f);
        // Reference: count trailing ones from the top (innermost) bit.
        e_incl = '0;
        e_rst  = '0;
        e_end  = 1'b0;
        if (e == 1) begin
          p = NLP - 1;
          while (p >= 0 && flag[p]) begin
            e_rst[p] = 1'b1;
            p--;
          end
          if (p >= 0) e_incl[p] = 1'b1;
          else        e_end = 1'b1;
        end
        #1;
        checks++;
        if (incl !== e_incl || reset_vct !== e_rst || loops_end !== e_end) begin
          failures++;
          if (failures < 10)
            $display("ile=%0d flag=%b: incl=%b/%b rst=%b/%b end=%b/%b", e, flag,
                     incl, e_incl, reset_vct, e_rst, loops_end, e_end);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
