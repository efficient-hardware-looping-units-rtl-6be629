// tb_cmpeq: self-checking testbench of the last-iteration comparator.
// Applies random and equal operand pairs (16-bit) and checks the flag
// against a direct comparison.
module tb_cmpeq;
  localparam int unsigned DW = 16;
  logic [DW-1:0] index_p1, loop_count;
  logic          flag;
  int checks = 0, failures = 0, eq_seen = 0;

  cmpeq dut (.*);

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      index_p1   = DW'($urandom);
      loop_count = (t % 3 == 0) ? index_p1 : DW'($urandom);
      if (t % 7 == 1) loop_count = index_p1 ^ (DW'(1) << (t % DW));  // one bit off
      #1;
      checks++;
      if (flag !== (index_p1 == loop_count)) begin
        failures++;
        $display("a=%h b=%h flag=%b", index_p1, loop_count, flag);
      end
      if (flag) eq_seen++;
    end
    checks++;
    if (eq_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
