// tb_var_node: checks the variable node at degrees 2, 3 and 6 against an
// integer reference: total = llr + sum(r), q[k] = clamp(total - r[k]),
// post = clamp(total), x = (total < 0), registered on en.
module tb_var_node;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int PREC = 4;
  logic en;
  logic signed [PREC-1:0] llr;
  logic signed [PREC-1:0] r2 [2], q2 [2], r3 [3], q3 [3], r6 [6], q6 [6];
  logic signed [PREC-1:0] p2, p3, p6;
  logic x2, x3, x6;

  var_node #(.DEG(2), .PREC(PREC)) dut2 (.clk(clk), .en(en), .llr(llr), .r(r2), .q(q2), .post(p2), .x(x2));
  var_node #(.DEG(3), .PREC(PREC)) dut3 (.clk(clk), .en(en), .llr(llr), .r(r3), .q(q3), .post(p3), .x(x3));
  var_node #(.DEG(6), .PREC(PREC)) dut6 (.clk(clk), .en(en), .llr(llr), .r(r6), .q(q6), .post(p6), .x(x6));

  function automatic int clamp(int v);
    return (v > 7) ? 7 : (v < -7) ? -7 : v;
  endfunction

  task automatic check_one(string tag, int l, int rv [], logic signed [PREC-1:0] q [], int post, logic x);
    int total = l;
    foreach (rv[k]) total += rv[k];
    foreach (rv[k]) begin
      checks++;
      if (int'(q[k]) != clamp(total - rv[k])) begin
        failures++;
        if (failures < 10) $display("FAIL %s q[%0d]=%0d exp %0d", tag, k, q[k], clamp(total - rv[k]));
      end
    end
    checks++;
    if (post != clamp(total)) begin failures++; $display("FAIL %s post %0d exp %0d", tag, post, clamp(total)); end
    checks++;
    if (x != (total < 0)) begin failures++; $display("FAIL %s x %0b total %0d", tag, x, total); end
  endtask

  int l, v2 [], v3 [], v6 [];
  logic signed [PREC-1:0] c2 [], c3 [], c6 [];

  initial begin
    v2 = new[2]; v3 = new[3]; v6 = new[6]; c2 = new[2]; c3 = new[3]; c6 = new[6];
    en = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      l = int'($urandom_range(14)) - 7;
      llr = PREC'(l);
      foreach (v2[k]) begin v2[k] = int'($urandom_range(14)) - 7; r2[k] = PREC'(v2[k]); end
      foreach (v3[k]) begin v3[k] = int'($urandom_range(14)) - 7; r3[k] = PREC'(v3[k]); end
      foreach (v6[k]) begin v6[k] = int'($urandom_range(14)) - 7; r6[k] = PREC'(v6[k]); end
      en = 1'b1;
      @(posedge clk); #1;
      foreach (c2[k]) c2[k] = q2[k];
      foreach (c3[k]) c3[k] = q3[k];
      foreach (c6[k]) c6[k] = q6[k];
      check_one("deg2", l, v2, c2, int'(p2), x2);
      check_one("deg3", l, v3, c3, int'(p3), x3);
      check_one("deg6", l, v6, c6, int'(p6), x6);
      // Hold with en low.
      if (n % 100 == 0) begin
        en = 1'b0;
        llr = -llr;
        foreach (r3[k]) r3[k] = -r3[k];
        @(posedge clk); #1;
        checks++;
        if (x3 != ((l + v3[0] + v3[1] + v3[2]) < 0)) failures++;
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
