// pla_decoder -- one-input decoders and control array of the augmented PLA.
//
// Each input x[i] drives two AND-array rows.  Two extra control lines C1 and
// C2 can force all complement rows or all true rows low:
//   Q(2i-1) = ~X(i) & ~C1      (here q[2*i])
//   Q(2i)   =  X(i) & ~C2      (here q[2*i+1])
// With C1 = C2 = 0 the decoder is an ordinary one-input decoder (normal use).
// In test mode the control lines, together with one-hot or one-cold input
// patterns, make exactly one row high (or none), which selects that row.
// These equations are taken from the source; the module is purely
// combinational.
module pla_decoder #(
  parameter int unsigned N = pla_pkg::DEF_N
) (
  input  logic [N-1:0]   x,    // PLA inputs X(1..n)
  input  logic           c1,   // control line C1: disables complement rows
  input  logic           c2,   // control line C2: disables true rows
  output logic [2*N-1:0] q     // AND-array rows Q(1..2n)
);
  for (genvar i = 0; i < N; i++) begin : g_in
    assign q[2*i]   = ~x[i] & ~c1;
    assign q[2*i+1] =  x[i] & ~c2;
  end
endmodule
