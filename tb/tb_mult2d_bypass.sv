// tb_mult2d_bypass: end-to-end self-check of the multiplier at its default
// size (4x4, no parameter override).
//
// Every one of the 256 operand pairs is applied. For each, the product must
// equal a*b, and every array cell must report itself bypassed exactly when
// its partial product and its carry-in (taken from an independent
// cell-by-cell Braun model) are both 0. The run counts how often each
// mechanism occurs: a cell bypassed because its multiplicand bit is 0
// (column bypass), one bypassed because only its multiplier bit is 0 (row
// bypass), a cell with a zero partial product that must still add because
// a carry arrives (bypass blocked by the carry), and a normal addition.
// A mechanism that never occurs counts as a failure.
module tb_mult2d_bypass;
  import braun_ref_pkg::*;

  localparam int unsigned W = 4;

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned n_col_bypass = 0;
  int unsigned n_row_bypass = 0;
  int unsigned n_blocked = 0;
  int unsigned n_add = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]            a, b;
  logic [2*W-1:0]          p;
  logic [W-1:1][W-2:0]     cell_bypassed;

  mult2d_bypass dut (.a(a), .b(b), .p(p), .cell_bypassed(cell_bypassed));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cell_map_t pp_m, cin_m, s_m, c_m;
    for (int va = 0; va < (1 << W); va++) begin
      for (int vb = 0; vb < (1 << W); vb++) begin
        a = W'(va);
        b = W'(vb);
        @(posedge clk);   // one operand pair per cycle; p is combinational
        checks++;
        if (p !== (2*W)'(va * vb)) begin
          failures++;
          $display("FAIL %0d * %0d = %0d, got %0d", va, vb, va * vb, p);
        end
        braun_cells(W, longint'(va), longint'(vb), pp_m, cin_m, s_m, c_m);
        for (int j = 1; j < W; j++) begin
          for (int k = 0; k < W - 1; k++) begin
            logic expect_byp;
            expect_byp = !pp_m[j][k] && !cin_m[j][k];
            checks++;
            if (cell_bypassed[j][k] !== expect_byp) begin
              failures++;
              $display("FAIL a=%h b=%h cell(k=%0d,j=%0d) bypassed=%b expected %b",
                       a, b, k, j, cell_bypassed[j][k], expect_byp);
            end
            if (expect_byp && !a[k])              n_col_bypass++;
            else if (expect_byp)                  n_row_bypass++;
            else if (!pp_m[j][k])                 n_blocked++;
            else                                  n_add++;
          end
        end
      end
    end
    $display("column bypasses %0d, row bypasses %0d, carry-blocked bypasses %0d, additions %0d",
             n_col_bypass, n_row_bypass, n_blocked, n_add);
    checks++;
    if (n_col_bypass == 0 || n_row_bypass == 0 || n_blocked == 0 || n_add == 0) begin
      failures++;
      $display("FAIL a bypass mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
