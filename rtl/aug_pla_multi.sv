// aug_pla_multi -- PLA augmented for universal testing under multiple faults.
//
// An n-input, m-product, l-output NOR-NOR PLA with one-input decoders,
// augmented by:
//   * two control lines C1/C2 in front of the AND array (pla_decoder),
//   * a shift register S(1..m+1) that gates every product line
//     (col_select_sr; P(j) = p(j) & ~S(j)),
//   * an extra product line P(m+1) with a device on every AND-array row,
//     P(m+1) = ~Q(1) & ... & ~Q(2n) & ~S(m+1),
//   * an extra output Z with a device on every product line,
//     Z = P(1) + ... + P(m+1).
// P(m+1) has no devices on the original outputs F.  In normal operation
// (C1 = C2 = 0, S all zero) every input drives exactly one of its two rows
// high, so P(m+1) = 0 and F is the original PLA function.
// The universal test sequence (see tpg) selects one row and one column at a
// time; the responses on F and Z follow from the personality and are compared
// by an external tester.
// Structure and equations follow the source.  The default personality is
// this design's own pseudo-random choice.
// Timing: combinational from x/c1/c2 and the S register to f/z; the S
// register updates on the rising edge of clk according to sr_op.
module aug_pla_multi #(
  parameter int unsigned N = pla_pkg::DEF_N,
  parameter int unsigned M = pla_pkg::DEF_M,
  parameter int unsigned L = pla_pkg::DEF_L,
  parameter logic [M-1:0][2*N-1:0] AND_PERS = gen_and(),
  parameter logic [L-1:0][M-1:0]   OR_PERS  = gen_or()
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    x,       // inputs X(1..n)
  input  logic            c1,      // control line C1
  input  logic            c2,      // control line C2
  input  pla_pkg::sr_op_e sr_op,   // shift register operation
  input  logic            sr_in,   // shift register serial input
  output logic [L-1:0]    f,       // outputs F(1..l)
  output logic            z        // extra test output Z
);
  localparam int unsigned K = M + 1;

  function automatic logic [M-1:0][2*N-1:0] gen_and();
    logic [M-1:0][2*N-1:0] v;
    for (int j = 0; j < M; j++)
      for (int i = 0; i < N; i++)
        {v[j][2*i+1], v[j][2*i]} = pla_pkg::def_and_lit(j, i);
    return v;
  endfunction

  function automatic logic [L-1:0][M-1:0] gen_or();
    logic [L-1:0][M-1:0] v;
    for (int g = 0; g < L; g++)
      for (int j = 0; j < M; j++)
        v[g][j] = pla_pkg::def_or_bit(g, j);
    return v;
  endfunction

  // Augmented AND personality: original columns plus the all-device column.
  function automatic logic [K-1:0][2*N-1:0] aug_and();
    logic [K-1:0][2*N-1:0] v;
    for (int j = 0; j < M; j++) v[j] = AND_PERS[j];
    v[M] = '1;
    return v;
  endfunction

  // Augmented OR personality: original rows (no device on P(m+1)) plus Z.
  function automatic logic [L:0][K-1:0] aug_or();
    logic [L:0][K-1:0] v;
    for (int g = 0; g < L; g++) v[g] = {1'b0, OR_PERS[g]};
    v[L] = '1;
    return v;
  endfunction

  logic [2*N-1:0] q;
  logic [K-1:0]   s;
  logic [K-1:0]   p;
  logic [L:0]     fz;

  pla_decoder #(.N(N)) u_dec (.x(x), .c1(c1), .c2(c2), .q(q));

  col_select_sr #(.K(K)) u_sr (.clk(clk), .rst_n(rst_n), .op(sr_op), .sin(sr_in), .s(s));

  pla_and_plane #(.N(N), .K(K), .PERS(aug_and())) u_and (.q(q), .s(s), .p(p));

  pla_or_plane #(.K(K), .L(L + 1), .PERS(aug_or())) u_or (.p(p), .f(fz));

  assign f = fz[L-1:0];
  assign z = fz[L];
endmodule
