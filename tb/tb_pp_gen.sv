// tb_pp_gen: exhaustive self-check of the 4x4 partial-product generator.
// For every (a, b) each pp[j][k] must equal bit k of a AND bit j of b.
module tb_pp_gen;
  localparam int unsigned W = 4;
  int unsigned checks = 0;
  int unsigned failures = 0;
  logic [W-1:0]        a, b;
  logic [W-1:0][W-1:0] pp;

  pp_gen #(.WIDTH(W)) dut (.a(a), .b(b), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < (1 << W); va++) begin
      for (int vb = 0; vb < (1 << W); vb++) begin
        a = W'(va);
        b = W'(vb);
        #1;
        for (int j = 0; j < W; j++) begin
          for (int k = 0; k < W; k++) begin
            checks++;
            if (pp[j][k] !== (((va >> k) & (vb >> j) & 1) == 1)) begin
              failures++;
              $display("FAIL a=%h b=%h pp[%0d][%0d]=%b", a, b, j, k, pp[j][k]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
