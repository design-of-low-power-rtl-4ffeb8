// tb_mult2d_bypass_sizes: the multiplier at the other sizes it is meant for.
// Runs mult2d_size_check at 8x8 and 16x16 (the larger evaluation sizes)
// and at 2x2, 3x3 and 5x5 (edge cases of the generator), checking products
// and bypass flags; the 4x4 default is covered exhaustively by
// tb_mult2d_bypass. Each width must see bypassed cells, and the wide ones
// must also see bypasses blocked by an incoming carry.
module tb_mult2d_bypass_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NW = 5;
  localparam int unsigned WIDTHS [NW] = '{2, 3, 5, 8, 16};

  logic        done [NW];
  int unsigned c [NW];
  int unsigned f [NW];
  int unsigned nb [NW];
  int unsigned nk [NW];

  for (genvar i = 0; i < NW; i++) begin : g_w
    mult2d_size_check #(.W(WIDTHS[i]), .N_RAND(2000)) u_chk (
      .clk(clk), .done(done[i]), .checks(c[i]), .failures(f[i]),
      .n_bypass(nb[i]), .n_blocked(nk[i])
    );
  end

  int unsigned checks = 0;
  int unsigned failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int i = 0; i < NW; i++) begin
      $display("width %0d: %0d checks, %0d failures, %0d bypassed cells, %0d carry-blocked",
               WIDTHS[i], c[i], f[i], nb[i], nk[i]);
      checks   += c[i];
      failures += f[i];
      checks++;
      if (nb[i] == 0 || (WIDTHS[i] >= 3 && nk[i] == 0)) begin
        failures++;
        $display("FAIL width %0d: a bypass mechanism never occurred", WIDTHS[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
