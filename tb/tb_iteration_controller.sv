// tb_iteration_controller: runs decodes that reach a zero syndrome after a
// chosen number k of check-node updates (0..6) and decodes that never do.
// Checks done rises exactly 2 + 2k cycles after start, the iteration count,
// success, the VN/CN enable alternation and that start is ignored while busy.
module tb_iteration_controller;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int IMAX = 6;
  logic rst, start, syn_zero;
  logic load, vn_en, cn_en, busy, done, success;
  logic [2:0] iterations;

  iteration_controller #(.IMAX(IMAX)) dut (
    .clk(clk), .rst(rst), .start(start), .syn_zero(syn_zero),
    .load(load), .vn_en(vn_en), .cn_en(cn_en), .busy(busy), .done(done),
    .success(success), .iterations(iterations)
  );

  int cn_seen, vn_seen;

  // Decode where the syndrome becomes zero after 'goal' CN updates
  // (goal > IMAX: never).
  task automatic run(int goal);
    int cycles = 0;
    cn_seen = 0; vn_seen = 0;
    syn_zero = (goal == 0);
    start = 1'b1;
    #1; checks++; if (!load) failures++;
    @(posedge clk); #1;
    start = 1'b0;
    while (!done && cycles < 40) begin
      // syn_zero follows the count of check-node updates already made.
      syn_zero = (cn_seen >= goal);
      #1;
      checks++;
      if (vn_en && cn_en) failures++;
      if (cycles == 0 && !vn_en) begin failures++; $display("FAIL no VN update after start"); end
      if (cycles == 3) begin start = 1'b1; #1; checks++; if (load) failures++; start = 1'b0; end
      if (vn_en) vn_seen++;
      if (cn_en) cn_seen++;
      @(posedge clk); #1;
      cycles++;
    end
    begin
      int k = (goal > IMAX) ? IMAX : goal;
      checks++;
      if (cycles != 2 + 2 * k) begin failures++; $display("FAIL goal %0d: done after %0d cycles, exp %0d", goal, cycles, 2 + 2 * k); end
      checks++;
      if (int'(iterations) != k) begin failures++; $display("FAIL goal %0d: iterations %0d", goal, iterations); end
      checks++;
      if (success != (goal <= IMAX)) begin failures++; $display("FAIL goal %0d: success %0b", goal, success); end
      checks++;
      if (cn_seen != k || vn_seen != k + 1) begin failures++; $display("FAIL goal %0d: vn %0d cn %0d", goal, vn_seen, cn_seen); end
      checks++;
      if (busy) failures++;
    end
    @(posedge clk); #1;
    checks++;
    if (!done) failures++;   // done holds until the next start
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; syn_zero = 1'b0;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    checks++; if (done || busy) failures++;
    for (int g = 0; g <= IMAX + 2; g++) run(g);
    for (int t = 0; t < 20; t++) run(int'($urandom_range(IMAX + 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
