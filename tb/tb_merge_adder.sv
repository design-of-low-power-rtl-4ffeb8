// tb_merge_adder: exhaustive self-check of the 3-bit final ripple row
// (the 4x4 multiplier's size). {cout,sum} must equal x + y for all inputs.
module tb_merge_adder;
  localparam int unsigned B = 3;
  int unsigned checks = 0;
  int unsigned failures = 0;
  logic [B-1:0] x, y, sum;
  logic         cout;

  merge_adder #(.BITS(B)) dut (.x(x), .y(y), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int vx = 0; vx < (1 << B); vx++) begin
      for (int vy = 0; vy < (1 << B); vy++) begin
        x = B'(vx);
        y = B'(vy);
        #1;
        checks++;
        if ({cout, sum} !== (B+1)'(vx + vy)) begin
          failures++;
          $display("FAIL x=%0d y=%0d -> %0d", vx, vy, {cout, sum});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
