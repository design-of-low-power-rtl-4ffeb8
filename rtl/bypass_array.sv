// bypass_array: carry-save Braun array built from 2-D bypassing adder cells.
//
// For a WIDTH x WIDTH unsigned multiply the array has WIDTH-1 rows
// (j = 1 .. WIDTH-1) of WIDTH-1 cells (k = 0 .. WIDTH-2). Cell (k,j) adds
// partial product a_k*b_j. Its sum input is the sum of cell (k+1,j-1),
// i.e. the cell one row up and one column to the left in weight order; the
// left-most cell of a row takes a_{WIDTH-1}*b_{j-1} instead. Its carry input
// is the carry of cell (k,j-1), directly above. Row 1 has no carries coming
// in and is made of half-adder cells whose sum input is a_{k+1}*b_0. The
// sum of cell (0,j) is product bit p_j. The last row leaves two vectors for
// the final carry-propagate row: last_c[k], the carry of last-row cell k,
// and last_y[k], the sum of last-row cell k+1 (a_{WIDTH-1}*b_{WIDTH-1} for
// the top bit); both have weight 2^(WIDTH+k).
//
// Every cell is a bypass_adder_cell, so any cell whose partial product and
// incoming carry are both 0 is skipped. Because a column k with a_k = 0
// never produces a carry, a zero multiplicand bit bypasses its whole
// column; a zero multiplier bit b_j bypasses each cell of row j whose
// carry-in is 0. The topology is the Braun array of the 4x4 schematics,
// widened to WIDTH; the flag output reports which cells were bypassed.
// Combinational.
module bypass_array #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0][WIDTH-1:0] pp,        // pp[j][k] = a_k * b_j
  output logic [WIDTH-1:1]            p_mid,     // product bits p_1 .. p_{WIDTH-1}
  output logic [WIDTH-2:0]            last_y,    // sum-side operand of the final row
  output logic [WIDTH-2:0]            last_c,    // carries of the last row
  output logic [WIDTH-1:1][WIDTH-2:0] bypassed   // bypassed[j][k]: cell (k,j) skipped
);
  if (WIDTH < 2) begin : g_bad_width
    $error("bypass_array: WIDTH must be at least 2");
  end

  logic [WIDTH-1:1][WIDTH-2:0] s;   // s[j][k]: sum out of cell (k,j)
  logic [WIDTH-1:1][WIDTH-2:0] c;   // c[j][k]: carry out of cell (k,j)

  for (genvar j = 1; j < WIDTH; j++) begin : g_row
    for (genvar k = 0; k < WIDTH - 1; k++) begin : g_col
      logic s_in;
      logic c_in;
      if (j == 1) begin : g_first
        assign s_in = pp[0][k+1];
        assign c_in = 1'b0;
      end else begin : g_next
        if (k == WIDTH - 2) begin : g_edge
          assign s_in = pp[j-1][WIDTH-1];
        end else begin : g_inner
          assign s_in = s[j-1][k+1];
        end
        assign c_in = c[j-1][k];
      end

      bypass_adder_cell #(.HAS_CIN(j != 1)) u_ac (
        .pp      (pp[j][k]),
        .s_in    (s_in),
        .c_in    (c_in),
        .s_out   (s[j][k]),
        .c_out   (c[j][k]),
        .bypassed(bypassed[j][k])
      );
    end
    assign p_mid[j] = s[j][0];
  end

  for (genvar k = 0; k < WIDTH - 1; k++) begin : g_last
    if (k == WIDTH - 2) begin : g_edge
      assign last_y[k] = pp[WIDTH-1][WIDTH-1];
    end else begin : g_inner
      assign last_y[k] = s[WIDTH-1][k+1];
    end
  end
  assign last_c = c[WIDTH-1];
endmodule
