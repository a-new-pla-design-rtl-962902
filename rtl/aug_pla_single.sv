// aug_pla_single -- PLA augmented for single faults with function-independent
// test responses, suited to built-in test with parity compression.
//
// Same decoder, control lines and column-select shift register as
// aug_pla_multi, but with two extra product lines and two extra outputs:
//   P(m+2): device on every AND-array row; devices on alternate OR rows
//           (F(1), F(3), ...).
//   P(m+1): devices on rows Q(1) and Q(2), so it is 0 in normal operation.
//           Its device on Q(3) is chosen so that the number of missing
//           devices at (P(j), Q(2i-1)), j = 1..m+1, i = 1..n, is odd; its
//           device on Q(4) likewise for the rows Q(2i).  It has no device on
//           Q(5..2n).  On each output F(g) it has a device exactly when the
//           original products feeding F(g) are even in number, so every F row
//           carries an odd number of devices among P(1..m+1).
//   Z1: devices on alternate product lines P(1), P(3), ...
//   Z2: devices on all product lines P(1..m+2).
// These rules follow the source.  The extra-column personality is exposed as
// the parameters XAND / XOR, computed by default from the original
// personality; overriding the original personality while keeping XAND / XOR
// models crosspoint faults.  The rule for Q(5..2n) and the choice of odd F
// rows for P(m+2) are this design's reading.  Requires N >= 2.
// Timing: combinational to f/z1/z2; S register on the rising clock edge.
module aug_pla_single #(
  parameter int unsigned N = pla_pkg::DEF_N,
  parameter int unsigned M = pla_pkg::DEF_M,
  parameter int unsigned L = pla_pkg::DEF_L,
  parameter logic [M-1:0][2*N-1:0] AND_PERS = gen_and(),
  parameter logic [L-1:0][M-1:0]   OR_PERS  = gen_or(),
  // Personality of the extra column P(m+1) (AND rows, OR rows).
  parameter logic [2*N-1:0] XAND = gen_xand(AND_PERS),
  parameter logic [L-1:0]   XOR  = gen_xor(OR_PERS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    x,
  input  logic            c1,
  input  logic            c2,
  input  pla_pkg::sr_op_e sr_op,
  input  logic            sr_in,
  output logic [L-1:0]    f,
  output logic            z1,
  output logic            z2
);
  localparam int unsigned K = M + 2;

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

  // P(m+1) AND personality from conditions 2-4.
  function automatic logic [2*N-1:0] gen_xand(input logic [M-1:0][2*N-1:0] a);
    logic [2*N-1:0] v;
    int unsigned miss_odd, miss_even;
    miss_odd  = N - 2;   // P(m+1) has no device on Q(5), Q(7), ...
    miss_even = N - 2;   // nor on Q(6), Q(8), ...
    for (int j = 0; j < M; j++)
      for (int i = 0; i < N; i++) begin
        if (!a[j][2*i])   miss_odd++;
        if (!a[j][2*i+1]) miss_even++;
      end
    v = '0;
    v[0] = 1'b1;                 // Q(1)
    v[1] = 1'b1;                 // Q(2)
    v[2] = pla_pkg::par(miss_odd);   // Q(3): add a device when already odd
    v[3] = pla_pkg::par(miss_even);  // Q(4)
    return v;
  endfunction

  // P(m+1) OR personality from condition 8.
  function automatic logic [L-1:0] gen_xor(input logic [L-1:0][M-1:0] o);
    logic [L-1:0] v;
    for (int g = 0; g < L; g++) v[g] = ~(^o[g]);
    return v;
  endfunction

  function automatic logic [K-1:0][2*N-1:0] aug_and();
    logic [K-1:0][2*N-1:0] v;
    for (int j = 0; j < M; j++) v[j] = AND_PERS[j];
    v[M]   = XAND;
    v[M+1] = '1;
    return v;
  endfunction

  // Rows: F(1..l), then Z1, then Z2.
  function automatic logic [L+1:0][K-1:0] aug_or();
    logic [L+1:0][K-1:0] v;
    for (int g = 0; g < L; g++) v[g] = {(g % 2 == 0), XOR[g], OR_PERS[g]};
    for (int j = 0; j < K; j++) v[L][j] = (j % 2 == 0);
    v[L+1] = '1;
    return v;
  endfunction

  logic [2*N-1:0] q;
  logic [K-1:0]   s;
  logic [K-1:0]   p;
  logic [L+1:0]   fz;

  pla_decoder #(.N(N)) u_dec (.x(x), .c1(c1), .c2(c2), .q(q));

  col_select_sr #(.K(K)) u_sr (.clk(clk), .rst_n(rst_n), .op(sr_op), .sin(sr_in), .s(s));

  pla_and_plane #(.N(N), .K(K), .PERS(aug_and())) u_and (.q(q), .s(s), .p(p));

  pla_or_plane #(.K(K), .L(L + 2), .PERS(aug_or())) u_or (.p(p), .f(fz));

  assign f  = fz[L-1:0];
  assign z1 = fz[L];
  assign z2 = fz[L+1];
endmodule
