// tb_half_adder: exhaustive self-check of the half adder.
// All four input pairs are applied; {c,s} must equal x + y.
module tb_half_adder;
  int unsigned checks = 0;
  int unsigned failures = 0;
  logic x, y, s, c;

  half_adder dut (.x(x), .y(y), .s(s), .c(c));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      checks++;
      if ({c, s} !== 2'(x + y)) begin
        failures++;
        $display("FAIL x=%b y=%b -> c=%b s=%b", x, y, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
