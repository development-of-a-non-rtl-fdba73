// tb_check_node: checks the min-sum check node at degree 6 and 7 against a
// brute-force reference (for each edge: product of the other signs times the
// minimum of the other magnitudes), including the clear and hold behaviour
// and the one-cycle register timing.
module tb_check_node;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int PREC = 4;
  logic clr, en;
  logic signed [PREC-1:0] q6 [6], r6 [6];
  logic signed [PREC-1:0] q7 [7], r7 [7];

  check_node #(.DEG(6), .PREC(PREC)) dut6 (.clk(clk), .clr(clr), .en(en), .q(q6), .r(r6));
  check_node #(.DEG(7), .PREC(PREC)) dut7 (.clk(clk), .clr(clr), .en(en), .q(q7), .r(r7));

  function automatic int ref_msg(int v [], int k);
    int m = 1000, s = 0;
    for (int j = 0; j < v.size(); j++) begin
      if (j == k) continue;
      begin
        int a = (v[j] < 0) ? -v[j] : v[j];
        if (a > 7) a = 7;
        if (a < m) m = a;
        if (v[j] < 0) s ^= 1;
      end
    end
    return s ? -m : m;
  endfunction

  int v6 [], v7 [];

  task automatic drive_random(int allow_min);
    for (int k = 0; k < 6; k++) begin
      v6[k] = int'($urandom_range(allow_min ? 15 : 14)) - (allow_min ? 8 : 7);
      q6[k] = PREC'(v6[k]);
    end
    for (int k = 0; k < 7; k++) begin
      v7[k] = int'($urandom_range(allow_min ? 15 : 14)) - (allow_min ? 8 : 7);
      q7[k] = PREC'(v7[k]);
    end
  endtask

  initial begin
    v6 = new[6]; v7 = new[7];
    clr = 1'b1; en = 1'b0;
    drive_random(0);
    @(posedge clk); #1;
    for (int k = 0; k < 6; k++) begin checks++; if (r6[k] != 0) failures++; end
    for (int k = 0; k < 7; k++) begin checks++; if (r7[k] != 0) failures++; end
    clr = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      drive_random(n % 5 == 0);
      // Force ties between magnitudes now and then.
      if (n % 7 == 0 && v7[2] != -8) begin q6[1] = q6[0]; v6[1] = v6[0]; q7[3] = -q7[2]; v7[3] = -v7[2]; end
      en = 1'b1;
      @(posedge clk); #1;
      for (int k = 0; k < 6; k++) begin
        checks++;
        if (int'(r6[k]) != ref_msg(v6, k)) begin
          failures++;
          if (failures < 10) $display("FAIL deg6 n=%0d k=%0d got %0d exp %0d", n, k, r6[k], ref_msg(v6, k));
        end
      end
      for (int k = 0; k < 7; k++) begin
        checks++;
        if (int'(r7[k]) != ref_msg(v7, k)) begin
          failures++;
          if (failures < 10) $display("FAIL deg7 n=%0d k=%0d got %0d exp %0d", n, k, r7[k], ref_msg(v7, k));
        end
      end
      // Hold: with en low, new inputs must not reach the outputs.
      if (n % 50 == 0) begin
        int keep6 [6];
        for (int k = 0; k < 6; k++) keep6[k] = int'(r6[k]);
        en = 1'b0;
        drive_random(0);
        @(posedge clk); #1;
        for (int k = 0; k < 6; k++) begin
          checks++;
          if (int'(r6[k]) != keep6[k]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
