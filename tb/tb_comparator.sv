// tb_comparator: exhaustive check of the magnitude compare-select at W = 3.
module tb_comparator;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] a, b, lo, hi;
  logic       b_lt_a;

  comparator #(.W(3)) dut (.a(a), .b(b), .lo(lo), .hi(hi), .b_lt_a(b_lt_a));

  initial begin
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) begin
        a = 3'(i); b = 3'(j);
        #1;
        checks++;
        if (int'(lo) != ((i < j) ? i : j) || int'(hi) != ((i < j) ? j : i) || b_lt_a != (j < i)) begin
          failures++;
          $display("FAIL a=%0d b=%0d lo=%0d hi=%0d lt=%0b", i, j, lo, hi, b_lt_a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
