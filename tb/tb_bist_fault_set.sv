// tb_bist_fault_set -- testbench helper: one personality of the single-fault
// augmented PLA against the parity self test under every single fault.
// A fault-free copy and one copy per fault (tb_faulty_pla) share one tpg;
// each copy has its own parity_bist.  Faults: every crosspoint of the
// augmented AND and OR arrays flipped (extra columns and rows included),
// every line stuck at 0 and at 1 (X, C1, C2, Q, P, F, Z1, Z2, S) and
// wired-AND bridges of C1-C2 and of adjacent rows, product lines and output
// lines.  The augmented personality is rebuilt here from the augmentation
// rules.  Results are counted on the outputs: the fault-free copy must
// pass, every faulty copy must fail.
module tb_bist_fault_set #(
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
  output int   nfaults,
  output logic finished
);
  import pla_pkg::*;
  localparam int unsigned K = M + 2, R = L + 2;
  localparam int NLF = 2*N + 4 + 2*(2*N) + 2*K + 2*R + 2*K + 1 + (2*N-1) + (K-1) + (R-1);
  localparam int NXP = K*2*N + R*K;
  localparam int NF  = NLF + NXP;

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
    int mo, me;
    for (int j = 0; j < M; j++) v[j] = AP[j];
    v[M] = '0; v[M][0] = 1; v[M][1] = 1;
    v[M+1] = '1;
    mo = 0; me = 0;
    for (int j = 0; j <= M; j++)
      for (int i = 0; i < N; i++) begin
        if (!v[j][2*i]) mo++;
        if (!v[j][2*i+1]) me++;
      end
    // A device on Q(3) / Q(4) removes one missing device.
    if (mo % 2 == 0) v[M][2] = 1;
    if (me % 2 == 0) v[M][3] = 1;
    return v;
  endfunction

  function automatic logic [R-1:0][K-1:0] aug_or();
    logic [R-1:0][K-1:0] v;
    for (int g = 0; g < L; g++) begin
      v[g] = '0;
      for (int j = 0; j < M; j++) v[g][j] = OP[g][j];
      v[g][M] = ~(^OP[g]);
      v[g][M+1] = (g % 2 == 0);
    end
    for (int j = 0; j < K; j++) begin v[L][j] = (j % 2 == 0); v[L+1][j] = 1; end
    return v;
  endfunction

  localparam logic [K-1:0][2*N-1:0] AA = aug_and();
  localparam logic [R-1:0][K-1:0]   AO = aug_or();

  function automatic logic [K-1:0][2*N-1:0] flip_and(int a);
    if (a >= 0 && a < int'(K*2*N)) return AA ^ ((K*2*N)'(1) << a);
    return AA;
  endfunction

  function automatic logic [R-1:0][K-1:0] flip_or(int a);
    if (a >= int'(K*2*N)) return AO ^ ((R*K)'(1) << (a - K*2*N));
    return AO;
  endfunction

  logic [N-1:0] x;
  logic c1, c2, sr_in, valid, win_end, busy, done;
  logic [2:0] win;
  sr_op_e sr_op;
  logic [NF:0] pass, fail;

  tpg #(.N(N), .K(K)) u_tpg (
    .clk(clk), .rst_n(rst_n), .start(start), .x(x), .c1(c1), .c2(c2),
    .sr_op(sr_op), .sr_in(sr_in), .valid(valid), .win_end(win_end), .win(win),
    .phase(), .busy(busy), .done(done));

  for (genvar k = 0; k <= NF; k++) begin : g_copy
    localparam int F  = k - 1;
    localparam int LF = (F >= 0 && F < NLF) ? F : -1;
    localparam int XP = (F >= NLF) ? F - NLF : -1;
    localparam int FT = (LF < 0) ? 0 : fault_code(LF, 0);
    localparam int FI = (LF < 0) ? 0 : fault_code(LF, 1);
    logic [R-1:0] o;
    logic [NUM_WIN-1:0] ew;
    logic [3:0] nchk;
    logic bdone;
    tb_faulty_pla #(.N(N), .K(K), .R(R), .AAND(flip_and(XP)), .AOR(flip_or(XP)),
                    .FT0(FT), .FI0(FI)) u_pla (
      .clk(clk), .rst_n(rst_n), .x(x), .c1(c1), .c2(c2), .sr_op(sr_op), .sr_in(sr_in), .out(o));
    parity_bist #(.M(M), .L(L)) u_bist (
      .clk(clk), .rst_n(rst_n), .start(start), .valid(valid), .win_end(win_end), .win(win),
      .seq_done(done), .resp(o), .fail(fail[k]), .err_win(ew), .checks(nchk),
      .done(bdone), .pass(pass[k]));
  end

  initial begin
    checks = 0; failures = 0; nfaults = NF; finished = 0;
    @(posedge start);
    wait (done);
    @(posedge clk);     // the checkers report one cycle after the sequence ends
    @(negedge clk);
    checks++;
    if (!pass[0] || fail[0]) begin failures++; $display("[%0d/%0d/%0d] fault-free PLA failed", N, M, L); end
    for (int k = 1; k <= NF; k++) begin
      checks++;
      if (pass[k] || !fail[k]) begin
        failures++;
        if (k - 1 < NLF)
          $display("[%0d/%0d/%0d] line fault code %0d index %0d not detected", N, M, L,
                   fault_code(k - 1, 0), fault_code(k - 1, 1));
        else
          $display("[%0d/%0d/%0d] crosspoint %0d not detected", N, M, L, k - 1 - NLF);
      end
    end
    finished = 1;
  end
endmodule
