// tb_bypass_adder_cell: exhaustive self-check of both adder-cell variants.
// The full-adder cell gets all eight (pp, s_in, c_in) triples, the
// half-adder cell the four with c_in = 0. The outputs must be the binary
// sum of the inputs, and the cell must report itself bypassed exactly when
// pp and c_in are both 0. Each case (bypassed / adding) must occur.
module tb_bypass_adder_cell;
  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned n_bypass = 0;
  int unsigned n_add = 0;

  logic pp, s_in, c_in;
  logic fa_s, fa_c, fa_byp;
  logic ha_s, ha_c, ha_byp;

  bypass_adder_cell #(.HAS_CIN(1'b1)) dut_fa (
    .pp(pp), .s_in(s_in), .c_in(c_in), .s_out(fa_s), .c_out(fa_c), .bypassed(fa_byp)
  );
  bypass_adder_cell #(.HAS_CIN(1'b0)) dut_ha (
    .pp(pp), .s_in(s_in), .c_in(1'b0), .s_out(ha_s), .c_out(ha_c), .bypassed(ha_byp)
  );

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {pp, s_in, c_in} = 3'(v);
      #1;
      checks++;
      if ({fa_c, fa_s} !== 2'(pp + s_in + c_in)) begin
        failures++;
        $display("FAIL FA cell pp=%b s_in=%b c_in=%b -> c=%b s=%b", pp, s_in, c_in, fa_c, fa_s);
      end
      checks++;
      if (fa_byp !== (!pp && !c_in)) begin
        failures++;
        $display("FAIL FA cell bypass flag pp=%b c_in=%b -> %b", pp, c_in, fa_byp);
      end
      if (fa_byp) n_bypass++; else n_add++;
      if (!c_in) begin
        checks++;
        if ({ha_c, ha_s} !== 2'(pp + s_in)) begin
          failures++;
          $display("FAIL HA cell pp=%b s_in=%b -> c=%b s=%b", pp, s_in, ha_c, ha_s);
        end
        checks++;
        if (ha_byp !== !pp) begin
          failures++;
          $display("FAIL HA cell bypass flag pp=%b -> %b", pp, ha_byp);
        end
      end
    end
    checks++;
    if (n_bypass == 0 || n_add == 0) begin
      failures++;
      $display("FAIL bypass seen %0d times, add seen %0d times", n_bypass, n_add);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
