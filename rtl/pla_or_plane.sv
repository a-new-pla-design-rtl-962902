// pla_or_plane -- OR array of the PLA.
//
// Output row g is the OR of the product lines that carry a device on it:
//   F(g) = OR over j of (PERS[g][j] & P(j))
// In the NOR-NOR implementation this is a NOR row followed by an output
// inverter; logically it is an OR.  Extra test rows (Z, Z1, Z2) of the
// augmented PLA are additional rows with their own personality.
// Combinational.  The default personality is a fixed pseudo-random one.
module pla_or_plane #(
  parameter int unsigned K = pla_pkg::DEF_M,   // product lines
  parameter int unsigned L = pla_pkg::DEF_L,   // output rows
  parameter logic [L-1:0][K-1:0] PERS = gen_default()
) (
  input  logic [K-1:0] p,   // product lines
  output logic [L-1:0] f    // outputs
);
  function automatic logic [L-1:0][K-1:0] gen_default();
    logic [L-1:0][K-1:0] v;
    for (int g = 0; g < L; g++)
      for (int j = 0; j < K; j++)
        v[g][j] = pla_pkg::def_or_bit(g, j);
    return v;
  endfunction

  for (genvar g = 0; g < L; g++) begin : g_row
    assign f[g] = |(p & PERS[g]);
  end
endmodule
