// tb_bypass_array: exhaustive self-check of the 4x4 bypassing carry-save
// array on its own. The partial products are formed in the testbench; the
// array's product bits p_1..p_3, the two vectors it hands to the final row
// and its bypass flags are compared with a cell-by-cell Braun model.
// The final-row vectors must also add up, with p_0..p_3, to a*b.
module tb_bypass_array;
  import braun_ref_pkg::*;

  localparam int unsigned W = 4;

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned n_bypass = 0;

  logic [W-1:0][W-1:0] pp;
  logic [W-1:1]        p_mid;
  logic [W-2:0]        last_y, last_c;
  logic [W-1:1][W-2:0] bypassed;

  bypass_array #(.WIDTH(W)) dut (
    .pp(pp), .p_mid(p_mid), .last_y(last_y), .last_c(last_c), .bypassed(bypassed)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_map_t pp_m, cin_m, s_m, c_m;
    for (int va = 0; va < (1 << W); va++) begin
      for (int vb = 0; vb < (1 << W); vb++) begin
        for (int j = 0; j < W; j++)
          for (int k = 0; k < W; k++)
            pp[j][k] = bit_of(longint'(va), k) & bit_of(longint'(vb), j);
        #1;
        braun_cells(W, longint'(va), longint'(vb), pp_m, cin_m, s_m, c_m);
        for (int j = 1; j < W; j++) begin
          checks++;
          if (p_mid[j] !== s_m[j][0]) begin
            failures++;
            $display("FAIL a=%0d b=%0d p_%0d=%b", va, vb, j, p_mid[j]);
          end
          for (int k = 0; k < W - 1; k++) begin
            checks++;
            if (bypassed[j][k] !== (!pp_m[j][k] && !cin_m[j][k])) begin
              failures++;
              $display("FAIL a=%0d b=%0d bypass flag cell(k=%0d,j=%0d)", va, vb, k, j);
            end
            if (bypassed[j][k]) n_bypass++;
          end
        end
        for (int k = 0; k < W - 1; k++) begin
          checks++;
          if (last_c[k] !== c_m[W-1][k]) begin
            failures++;
            $display("FAIL a=%0d b=%0d last_c[%0d]", va, vb, k);
          end
          checks++;
          if (last_y[k] !== ((k == W - 2) ? (bit_of(longint'(va), W-1) & bit_of(longint'(vb), W-1))
                                          : s_m[W-1][k+1])) begin
            failures++;
            $display("FAIL a=%0d b=%0d last_y[%0d]", va, vb, k);
          end
        end
        checks++;
        if ((((int'(last_c) + int'(last_y)) << W) | int'({p_mid, pp[0][0]})) != va * vb) begin
          failures++;
          $display("FAIL a=%0d b=%0d vectors do not add up to the product", va, vb);
        end
      end
    end
    checks++;
    if (n_bypass == 0) begin
      failures++;
      $display("FAIL no cell was ever bypassed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
