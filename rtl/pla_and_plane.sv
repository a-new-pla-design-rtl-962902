// pla_and_plane -- NOR-type AND array with column selection.
//
// Product line j is high when no AND-array row that carries a device on
// column j is high (NOR of the selected rows, i.e. the AND of the literals),
// and it is further gated by the complement of its shift-register bit:
//   P(j) = p(j) & ~S(j)
// so a column is enabled when its S bit is 0.  The personality PERS[j][r] is
// 1 where column j has a device on row r.  Extra test columns of the
// augmented PLA are just additional columns with their own personality.
// Combinational.  The default personality is a fixed pseudo-random one
// (this design's choice; see pla_pkg).
module pla_and_plane #(
  parameter int unsigned N = pla_pkg::DEF_N,   // inputs (2N rows)
  parameter int unsigned K = pla_pkg::DEF_M,   // columns (product lines)
  parameter logic [K-1:0][2*N-1:0] PERS = gen_default()
) (
  input  logic [2*N-1:0] q,   // rows
  input  logic [K-1:0]   s,   // column-select shift register, 0 = enabled
  output logic [K-1:0]   p    // product lines
);
  function automatic logic [K-1:0][2*N-1:0] gen_default();
    logic [K-1:0][2*N-1:0] v;
    for (int j = 0; j < K; j++)
      for (int i = 0; i < N; i++)
        {v[j][2*i+1], v[j][2*i]} = pla_pkg::def_and_lit(j, i);
    return v;
  endfunction

  for (genvar j = 0; j < K; j++) begin : g_col
    assign p[j] = ~|(q & PERS[j]) & ~s[j];
  end
endmodule
