// tb_llr_buffer: loads random LLRs into all 576 registers, checks they are
// captured on load and held while load is low and the input changes.
module tb_llr_buffer;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 576, PREC = 4;
  logic load;
  logic signed [PREC-1:0] llr_in [N], llr [N], expv [N];

  llr_buffer #(.N(N), .PREC(PREC)) dut (.clk(clk), .load(load), .llr_in(llr_in), .llr(llr));

  initial begin
    for (int t = 0; t < 20; t++) begin
      foreach (llr_in[i]) llr_in[i] = PREC'($urandom);
      load = 1'b1;
      @(posedge clk); #1;
      expv = llr_in;
      foreach (llr[i]) begin checks++; if (llr[i] != expv[i]) failures++; end
      load = 1'b0;
      foreach (llr_in[i]) llr_in[i] = PREC'($urandom);
      @(posedge clk); #1;
      @(posedge clk); #1;
      foreach (llr[i]) begin checks++; if (llr[i] != expv[i]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
