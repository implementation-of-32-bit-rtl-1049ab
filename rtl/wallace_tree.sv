// wallace_tree: Wallace carry-save reduction of ROWS addends of W bits to two.
//
// At every level the rows are taken in groups of three; each group passes
// through a row of full adders (3:2 compressors) giving a sum row a^b^c and a
// carry row maj(a,b,c) shifted one place left. Rows left over when fewer than
// three remain pass to the next level unchanged. Levels repeat until two rows
// are left (17 rows -> 12 -> 8 -> 6 -> 4 -> 3 -> 2, six full-adder delays).
// sum_row + carry_row equals the sum of all inputs modulo 2^W.
//
// Purely combinational. The Wallace tree follows the source description; the
// grouping (classic Wallace, rows grouped from the top) is this design's.
module wallace_tree #(
  parameter int ROWS = 17,
  parameter int W    = 64
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum_row,
  output logic [W-1:0]           carry_row
);

  // Number of rows left after each level; level 0 is the input.
  function automatic int rows_after(input int level);
    int r;
    r = ROWS;
    for (int l = 0; l < level; l++) if (r > 2) r = (r / 3) * 2 + (r % 3);
    return r;
  endfunction

  function automatic int num_levels();
    int l;
    l = 0;
    while (rows_after(l) > 2) l++;
    return l;
  endfunction

  localparam int LEVELS = num_levels();

  logic [ROWS-1:0][W-1:0] lvl [0:LEVELS];

  assign lvl[0] = rows;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int RIN  = rows_after(l);
    localparam int GRP  = RIN / 3;
    localparam int REST = RIN % 3;
    for (genvar g = 0; g < GRP; g++) begin : g_fa
      logic [W-1:0] ra, rb, rc;
      assign ra = lvl[l][3*g];
      assign rb = lvl[l][3*g+1];
      assign rc = lvl[l][3*g+2];
      assign lvl[l+1][2*g]   = ra ^ rb ^ rc;
      assign lvl[l+1][2*g+1] = ((ra & rb) | (ra & rc) | (rb & rc)) << 1;
    end
    for (genvar r = 0; r < REST; r++) begin : g_pass
      assign lvl[l+1][2*GRP+r] = lvl[l][3*GRP+r];
    end
    for (genvar r = 2 * GRP + REST; r < ROWS; r++) begin : g_unused
      assign lvl[l+1][r] = '0;
    end
  end

  if (ROWS >= 2) begin : g_two
    assign sum_row   = lvl[LEVELS][0];
    assign carry_row = lvl[LEVELS][1];
  end else begin : g_one
    assign sum_row   = lvl[LEVELS][0];
    assign carry_row = '0;
  end

endmodule
