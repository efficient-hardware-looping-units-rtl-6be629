// tb_ixgen_r: self-checking testbench of the index generator ixgen_r.
//
// Two harnesses run in parallel: one at the default size (8 loops, 16-bit
// indices, unit stride) with bounds 0..3, and one with 3 loops, 8-bit
// indices and a stride of 3, where bounds that are not multiples of the
// stride make the last index step past the bound. Each harness compares
// every cycle with a reference counter (see ixgen_harness).
module tb_ixgen_r;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c0, f0, m0, c1, f1, m1;
  logic fin0, fin1;
  int checks, failures;

  ixgen_harness #(.NLP(8), .DW(16), .STRIDE(1), .MAXB(3), .USE_R(1'b1)) h0 (
    .clk (clk), .checks (c0), .failures (f0), .multi_end (m0), .finished (fin0));
  ixgen_harness #(.NLP(3), .DW(8), .STRIDE(3), .MAXB(10), .USE_R(1'b1)) h1 (
    .clk (clk), .checks (c1), .failures (f1), .multi_end (m1), .finished (fin1));

  initial begin
    fork
      begin
        repeat (2000000) @(posedge clk);
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
        $finish;
      end
    join_none
    wait (fin0 && fin1);
    checks = c0 + c1 + 1;
    failures = f0 + f1;
    if (m0 == 0 || m1 == 0) begin
      failures++;
      $display("no cycle ended several loops at once");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
