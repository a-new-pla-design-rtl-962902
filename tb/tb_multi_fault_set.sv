// tb_multi_fault_set -- testbench helper: one personality of the
// multiple-fault augmented PLA against its conventional test.
// A fault-free copy and many faulty copies (tb_faulty_pla) receive the
// universal sequence from one tpg (K = m+1).  As a tester with stored
// responses would, the helper compares every response of every faulty copy
// with the fault-free one; a copy is detected when any response differs.
// Fault sets: every single line fault (stuck-at on X, C, Q, P, F, Z, S and
// wired-AND bridges of adjacent lines), every single crosspoint fault, and
// pseudo-randomly chosen pairs of line faults, pairs of crosspoint faults
// and line-plus-crosspoint pairs.  The fault-free copy is also checked
// against responses derived from the personality.
module tb_multi_fault_set #(
  parameter int unsigned N = 3,
  parameter int unsigned M = 4,
  parameter int unsigned L = 3,
  parameter logic [M-1:0][2*N-1:0] AP = '0,
  parameter logic [L-1:0][M-1:0]   OP = '0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output int   checks,
  output int   failures,
  output int   ncopies,
  output logic finished
);
  import pla_pkg::*;
  localparam int unsigned K = M + 1, R = L + 1;
  localparam int NLF = 2*N + 4 + 2*(2*N) + 2*K + 2*R + 2*K + 1 + (2*N-1) + (K-1) + (R-1);
  localparam int NXP = K*2*N + R*K;               // crosspoints of the augmented arrays
  localparam int NPAIR = 120;                     // of each pair kind
  localparam int NC = NLF + NXP + 3*NPAIR;        // faulty copies

  function automatic int fault_code(int f, bit want_index);
    int base, code, idx;
    base = 0; code = 0; idx = 0;
    for (int c = 1; c <= 16; c++) begin
      int cnt;
      case (c)
        1, 2: cnt = N;  3, 4: cnt = 2;  5, 6: cnt = 2*N;  7, 8: cnt = K;
        9, 10: cnt = R; 11, 12: cnt = K; 13: cnt = 1; 14: cnt = 2*N-1;
        15: cnt = K-1;  default: cnt = R-1;
      endcase
      if (f >= base && f < base + cnt) begin code = c; idx = f - base; end
      base += cnt;
    end
    return want_index ? idx : code;
  endfunction

  function automatic logic [K-1:0][2*N-1:0] aug_and();
    logic [K-1:0][2*N-1:0] v;
    for (int j = 0; j < M; j++) v[j] = AP[j];
    v[M] = '1;
    return v;
  endfunction

  function automatic logic [R-1:0][K-1:0] aug_or();
    logic [R-1:0][K-1:0] v;
    for (int g = 0; g < L; g++) v[g] = {1'b0, OP[g]};
    v[L] = '1;
    return v;
  endfunction

  localparam logic [K-1:0][2*N-1:0] AA = aug_and();
  localparam logic [R-1:0][K-1:0]   AO = aug_or();

  // Copy c > 0: line faults LF0/LF1 (-1 none) and crosspoint flips XP0/XP1.
  function automatic int sel(int c, int what);
    int f, lf0, lf1, xp0, xp1;
    lf0 = -1; lf1 = -1; xp0 = -1; xp1 = -1;
    f = c - 1;
    if (f < NLF) lf0 = f;
    else if (f < NLF + NXP) xp0 = f - NLF;
    else begin
      int p, kind;
      p = f - NLF - NXP;
      kind = p / NPAIR;
      p = p % NPAIR;
      if (kind == 0) begin
        lf0 = (p * 7 + 3) % NLF; lf1 = (p * 13 + 11) % NLF;
        if (lf1 == lf0) lf1 = (lf1 + 1) % NLF;
      end else if (kind == 1) begin
        xp0 = (p * 11 + 1) % NXP; xp1 = (p * 17 + 9) % NXP;
        if (xp1 == xp0) xp1 = (xp1 + 1) % NXP;
      end else begin
        lf0 = (p * 5 + 2) % NLF; xp0 = (p * 19 + 4) % NXP;
      end
    end
    case (what)
      0: return lf0; 1: return lf1; 2: return xp0; default: return xp1;
    endcase
  endfunction

  function automatic logic [K-1:0][2*N-1:0] flip_and(int a, int b);
    logic [K-1:0][2*N-1:0] v;
    v = AA;
    if (a >= 0 && a < int'(K*2*N)) v = v ^ ((K*2*N)'(1) << a);
    if (b >= 0 && b < int'(K*2*N)) v = v ^ ((K*2*N)'(1) << b);
    return v;
  endfunction

  function automatic logic [R-1:0][K-1:0] flip_or(int a, int b);
    logic [R-1:0][K-1:0] v;
    v = AO;
    if (a >= int'(K*2*N)) v = v ^ ((R*K)'(1) << (a - K*2*N));
    if (b >= int'(K*2*N)) v = v ^ ((R*K)'(1) << (b - K*2*N));
    return v;
  endfunction

  logic [N-1:0] x;
  logic c1, c2, sr_in, valid, busy, done;
  sr_op_e sr_op;
  phase_e phase;
  logic [R-1:0] o [NC+1];
  bit detected [NC+1];

  tpg #(.N(N), .K(K)) u_tpg (
    .clk(clk), .rst_n(rst_n), .start(start), .x(x), .c1(c1), .c2(c2),
    .sr_op(sr_op), .sr_in(sr_in), .valid(valid), .win_end(), .win(),
    .phase(phase), .busy(busy), .done(done));

  for (genvar c = 0; c <= NC; c++) begin : g_copy
    localparam int LF0 = (c == 0) ? -1 : sel(c, 0);
    localparam int LF1 = (c == 0) ? -1 : sel(c, 1);
    localparam int XP0 = (c == 0) ? -1 : sel(c, 2);
    localparam int XP1 = (c == 0) ? -1 : sel(c, 3);
    localparam int FT0 = (LF0 < 0) ? 0 : fault_code(LF0, 0);
    localparam int FI0 = (LF0 < 0) ? 0 : fault_code(LF0, 1);
    localparam int FT1 = (LF1 < 0) ? 0 : fault_code(LF1, 0);
    localparam int FI1 = (LF1 < 0) ? 0 : fault_code(LF1, 1);
    tb_faulty_pla #(.N(N), .K(K), .R(R), .AAND(flip_and(XP0, XP1)), .AOR(flip_or(XP0, XP1)),
                    .FT0(FT0), .FI0(FI0), .FT1(FT1), .FI1(FI1)) u_pla (
      .clk(clk), .rst_n(rst_n), .x(x), .c1(c1), .c2(c2), .sr_op(sr_op), .sr_in(sr_in), .out(o[c]));
  end

  // Fault-free response from the personality for the pattern on the wires.
  function automatic logic [R-1:0] expect_resp(int jsel);
    logic [R-1:0] e;
    logic pj;
    e = '0;
    if (jsel < 0) return e;
    pj = 1;
    for (int i = 0; i < N; i++) begin
      if (!x[i] && !c1 && AA[jsel][2*i]) pj = 0;
      if ( x[i] && !c2 && AA[jsel][2*i+1]) pj = 0;
    end
    for (int g = 0; g < R; g++) e[g] = AO[g][jsel] & pj;
    return e;
  endfunction

  initial begin
    int missed, jsel, n, ncol;
    missed = 0; checks = 0; failures = 0; ncopies = NC; finished = 0;
    foreach (detected[c]) detected[c] = 0;
    @(posedge start);
    @(negedge clk);
    n = 0; ncol = 0; jsel = -1;
    while (valid) begin
      // Column selected: none for I1, then stepping as the sequence defines.
      if (phase == PH_I1) jsel = -1;
      else if (phase == PH_I2) jsel = ncol;
      else if (phase == PH_I3) jsel = K - 1;
      else jsel = ((n - (K + 2)) / N) % K;
      if (phase == PH_I2) ncol++;
      checks++;
      if (o[0] !== expect_resp(jsel)) begin
        failures++; $display("[%0d/%0d/%0d] fault-free response %b at pattern %0d", N, M, L, o[0], n);
      end
      for (int c = 1; c <= NC; c++) if (o[c] !== o[0]) detected[c] = 1;
      n++;
      @(negedge clk);
    end
    for (int c = 1; c <= NC; c++) begin
      checks++;
      if (!detected[c]) begin
        failures++; missed++;
        $display("[%0d/%0d/%0d] copy %0d (line %0d/%0d, crosspoint %0d/%0d) not detected",
                 N, M, L, c, sel(c, 0), sel(c, 1), sel(c, 2), sel(c, 3));
      end
    end
    $display("[%0d/%0d/%0d] %0d faulty copies (%0d single line, %0d single crosspoint, %0d pairs), %0d missed",
             N, M, L, NC, NLF, NXP, 3*NPAIR, missed);
    finished = 1;
  end
endmodule
