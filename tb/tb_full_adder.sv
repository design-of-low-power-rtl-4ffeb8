// tb_full_adder: exhaustive self-check of the full adder.
// All eight input triples are applied; {cout,s} must equal x + y + cin.
module tb_full_adder;
  int unsigned checks = 0;
  int unsigned failures = 0;
  logic x, y, cin, s, cout;

  full_adder dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, s} !== 2'(x + y + cin)) begin
        failures++;
        $display("FAIL x=%b y=%b cin=%b -> cout=%b s=%b", x, y, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
