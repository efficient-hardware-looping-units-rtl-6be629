// tb_polyhedron_scan: self-checking testbench of the polyhedron scanner
// (16-bit indices). For several values of n it loads the bound, then
// acknowledges points at random and checks that the scanner visits every
// integer point of 0<=i<=n, 0<=j<=n, 0<=k<=i+j exactly once, in
// lexicographic order, one point per acknowledged cycle, and raises
// loops_end on the last point (n, n, 2n) only.
module tb_polyhedron_scan;
  localparam int unsigned DW = 16;
  logic          clk = 1'b0;
  logic          reset, load, point_done, loops_end;
  logic [DW-1:0] n, i, j, k;
  int checks = 0, failures = 0;
  int bound_changes = 0;  // points where the k bound changed (i or j stepped)

  polyhedron_scan dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic visit(input int ei, input int ej, input int ek, input logic last);
    // Wait for a cycle in which the point is acknowledged.
    point_done = ($urandom_range(0, 3) != 0);
    #1;
    while (!point_done) begin
      checks++;
      if (i !== DW'(ei) || j !== DW'(ej) || k !== DW'(ek) || loops_end !== 1'b0) failures++;
      @(posedge clk); #1;
      point_done = ($urandom_range(0, 3) != 0);
      #1;
    end
    checks++;
    if (i !== DW'(ei) || j !== DW'(ej) || k !== DW'(ek) || loops_end !== last) begin
      failures++;
      if (failures < 10)
        $display("got (%0d,%0d,%0d) end=%0b, expected (%0d,%0d,%0d) end=%0b",
                 i, j, k, loops_end, ei, ej, ek, last);
    end
    @(posedge clk); #1;
  endtask

  initial begin
    int nv, points;
    reset = 1'b1;
    load = 1'b0;
    point_done = 1'b0;
    n = '0;
    @(posedge clk); #1;
    reset = 1'b0;
    for (int t = 0; t < 5; t++) begin
      nv = (t == 0) ? 0 : (t == 4) ? 6 : t;
      n = DW'(nv);
      load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      points = 0;
      for (int a = 0; a <= nv; a++)
        for (int b = 0; b <= nv; b++) begin
          if (a + b > 0) bound_changes++;
          for (int c = 0; c <= a + b; c++) begin
            visit(a, b, c, (a == nv && b == nv && c == 2 * nv));
            points++;
          end
        end
      point_done = 1'b0;
      #1;
      checks++;
      if (i !== '0 || j !== '0 || k !== '0) begin
        failures++;
        $display("not back at the origin after the scan");
      end
    end
    checks++;
    if (bound_changes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
