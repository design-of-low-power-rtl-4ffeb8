// braun_ref_pkg: reference model for the multiplier testbenches.
//
// braun_cells() evaluates an n x n Braun carry-save array cell by cell with
// plain integer addition and no bypassing: cell (k,j), j = 1 .. n-1,
// k = 0 .. n-2, adds x = a_k*b_j, y = the sum of cell (k+1,j-1) (a_{k+1}*b_0
// in row 1, a_{n-1}*b_{j-1} at the left edge) and the carry of cell (k,j-1).
// It returns each cell's partial product, carry-in, sum and carry, from
// which a testbench predicts which cells may be bypassed (partial product
// and carry-in both 0) and what every array output must be.
package braun_ref_pkg;
  localparam int unsigned MAXW = 16;

  typedef bit cell_map_t [MAXW][MAXW];   // [j][k]

  function automatic bit bit_of(longint unsigned v, int unsigned i);
    return bit'((v >> i) & 1);
  endfunction

  function automatic void braun_cells(
    input  int unsigned     n,
    input  longint unsigned a,
    input  longint unsigned b,
    output cell_map_t       pp_o,
    output cell_map_t       cin_o,
    output cell_map_t       s_o,
    output cell_map_t       c_o
  );
    for (int j = 0; j < MAXW; j++)
      for (int k = 0; k < MAXW; k++) begin
        pp_o[j][k]  = 1'b0;
        cin_o[j][k] = 1'b0;
        s_o[j][k]   = 1'b0;
        c_o[j][k]   = 1'b0;
      end
    for (int unsigned j = 1; j < n; j++) begin
      for (int unsigned k = 0; k + 1 < n; k++) begin
        bit y;
        int unsigned total;
        pp_o[j][k] = bit_of(a, k) & bit_of(b, j);
        if (j == 1) begin
          y          = bit_of(a, k + 1) & bit_of(b, 0);
          cin_o[j][k] = 1'b0;
        end else begin
          y          = (k == n - 2) ? (bit_of(a, n - 1) & bit_of(b, j - 1)) : s_o[j-1][k+1];
          cin_o[j][k] = c_o[j-1][k];
        end
        total      = int'(pp_o[j][k]) + int'(y) + int'(cin_o[j][k]);
        s_o[j][k]  = bit'(total & 1);
        c_o[j][k]  = bit'(total >> 1);
      end
    end
  endfunction
endpackage
