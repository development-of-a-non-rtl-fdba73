// tb_qsub: exhaustive check of the saturating subtractor at W = 4 and a random
// check at W = 7, against integer arithmetic clamped to +-(2^(W-1)-1).
module tb_qsub;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [3:0] a4, b4, s4;
  logic              sat4;
  logic signed [6:0] a7, b7, s7;
  logic              sat7;

  qsub #(.W(4)) dut4 (.a(a4), .b(b4), .diff(s4), .sat(sat4));
  qsub #(.W(7)) dut7 (.a(a7), .b(b7), .diff(s7), .sat(sat7));

  function automatic int clamp(int v, int w);
    int lim = (1 << (w - 1)) - 1;
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  initial begin
    for (int i = -8; i < 8; i++) begin
      for (int j = -8; j < 8; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (int'(s4) != clamp(i - j, 4) || sat4 != (clamp(i - j, 4) != i - j)) begin
          failures++;
          $display("FAIL W=4 %0d - %0d -> %0d sat=%0b", i, j, s4, sat4);
        end
      end
    end
    for (int n = 0; n < 2000; n++) begin
      int i, j;
      i = int'($urandom_range(127)) - 64; j = int'($urandom_range(127)) - 64;
      a7 = 7'(i); b7 = 7'(j);
      #1;
      checks++;
      if (int'(s7) != clamp(i - j, 7) || sat7 != (clamp(i - j, 7) != i - j)) begin
        failures++;
        $display("FAIL W=7 %0d - %0d -> %0d", i, j, s7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
