// tb_syndrome_check: compares the syndrome with a reference built from the
// per-edge node functions of ldpc_pkg for random words, checks zero, and
// checks the check equations printed for rows 261-287 of the decoder: with a
// single one at position p, exactly the printed checks that contain p fire.
module tb_syndrome_check;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] x;
  logic [M-1:0] syndrome;
  logic         zero;

  syndrome_check dut (.x(x), .syndrome(syndrome), .zero(zero));

  // Rows 261..287 as printed (variables of each check equation).
  localparam int PR0 = 261;
  localparam int PRINTED [27][6] = '{
    '{70, 85, 198, 225, 549, 573}, '{71, 86, 199, 226, 550, 574}, '{48, 87, 200, 227, 551, 575},
    '{10, 136, 178, 270, 289, 552}, '{11, 137, 179, 271, 290, 553}, '{12, 138, 180, 272, 291, 554},
    '{13, 139, 181, 273, 292, 555}, '{14, 140, 182, 274, 293, 556}, '{15, 141, 183, 275, 294, 557},
    '{16, 142, 184, 276, 295, 558}, '{17, 143, 185, 277, 296, 559}, '{18, 120, 186, 278, 297, 560},
    '{19, 121, 187, 279, 298, 561}, '{20, 122, 188, 280, 299, 562}, '{21, 123, 189, 281, 300, 563},
    '{22, 124, 190, 282, 301, 564}, '{23, 125, 191, 283, 302, 565}, '{0, 126, 168, 284, 303, 566},
    '{1, 127, 169, 285, 304, 567}, '{2, 128, 170, 286, 305, 568}, '{3, 129, 171, 287, 306, 569},
    '{4, 130, 172, 264, 307, 570}, '{5, 131, 173, 265, 308, 571}, '{6, 132, 174, 266, 309, 572},
    '{7, 133, 175, 267, 310, 573}, '{8, 134, 176, 268, 311, 574}, '{9, 135, 177, 269, 288, 575}
  };

  function automatic logic [M-1:0] ref_syn(logic [N-1:0] w);
    logic [M-1:0] s = '0;
    for (int c = 0; c < M; c++)
      for (int k = 0; k < cn_deg(c); k++) s[c] ^= w[cn_var(c, k)];
    return s;
  endfunction

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) x[i] = $urandom_range(1);
      if (t == 0) x = '0;
      #1;
      checks++;
      if (syndrome != ref_syn(x)) begin failures++; $display("FAIL random word %0d", t); end
      checks++;
      if (zero != (ref_syn(x) == '0)) failures++;
    end
    // Printed equations.
    for (int r = 0; r < 27; r++) begin
      for (int e = 0; e < 6; e++) begin
        x = '0;
        x[PRINTED[r][e]] = 1'b1;
        #1;
        checks++;
        if (syndrome[PR0 + r] != 1'b1) begin
          failures++;
          $display("FAIL check %0d does not contain x[%0d]", PR0 + r, PRINTED[r][e]);
        end
      end
    end
    // Each printed row has exactly its six variables.
    for (int r = 0; r < 27; r++) begin
      checks++;
      if (cn_deg(PR0 + r) != 6) failures++;
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
