// mult2d_size_check: checker used by tb_mult2d_bypass_sizes for one
// multiplier width W (at most braun_ref_pkg::MAXW = 16).
//
// It instantiates mult2d_bypass at width W and, one operand pair per clock,
// applies corner cases (zero, all ones, alternating bits, single set bits)
// followed by N_RAND random pairs. Each product is compared with a*b and
// each cell's bypass flag with the Braun model's prediction (bypassed when
// partial product and carry-in are both 0). done rises when all pairs
// have been applied; the counts are valid from then on.
module mult2d_size_check #(
  parameter int unsigned W      = 8,
  parameter int unsigned N_RAND = 1000
) (
  input  logic        clk,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned n_bypass,
  output int unsigned n_blocked
);
  import braun_ref_pkg::*;

  logic [W-1:0]        a, b;
  logic [2*W-1:0]      p;
  logic [W-1:1][W-2:0] cell_bypassed;

  mult2d_bypass #(.WIDTH(W)) dut (.a(a), .b(b), .p(p), .cell_bypassed(cell_bypassed));

  localparam longint unsigned ALL1 = (longint'(1) << W) - 1;
  localparam longint unsigned ALT  = 64'h5555_5555_5555_5555 & ALL1;

  task automatic check_pair(input longint unsigned va, input longint unsigned vb);
    cell_map_t pp_m, cin_m, s_m, c_m;
    a = W'(va);
    b = W'(vb);
    @(posedge clk);
    checks++;
    if (longint'(p) != va * vb) begin
      failures++;
      $display("FAIL W=%0d: %0d * %0d = %0d, got %0d", W, va, vb, va * vb, p);
    end
    braun_cells(W, va, vb, pp_m, cin_m, s_m, c_m);
    for (int j = 1; j < W; j++) begin
      for (int k = 0; k < W - 1; k++) begin
        checks++;
        if (cell_bypassed[j][k] !== (!pp_m[j][k] && !cin_m[j][k])) begin
          failures++;
          $display("FAIL W=%0d a=%h b=%h bypass flag of cell(k=%0d,j=%0d)", W, va, vb, k, j);
        end
        if (cell_bypassed[j][k])              n_bypass++;
        if (!pp_m[j][k] && cin_m[j][k])       n_blocked++;
      end
    end
  endtask

  initial begin
    longint unsigned corner[6];
    done      = 1'b0;
    checks    = 0;
    failures  = 0;
    n_bypass  = 0;
    n_blocked = 0;
    corner    = '{0, 1, ALL1, ALT, ALL1 ^ ALT, longint'(1) << (W - 1)};
    foreach (corner[i])
      foreach (corner[m])
        check_pair(corner[i], corner[m]);
    for (int unsigned i = 0; i < W; i++)
      check_pair(longint'(1) << i, ALL1);
    for (int unsigned n = 0; n < N_RAND; n++)
      check_pair(longint'($urandom) & ALL1, longint'($urandom) & ALL1);
    done = 1'b1;
  end
endmodule
