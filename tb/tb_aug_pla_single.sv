// tb_aug_pla_single -- checks the single-fault augmented PLA.
// 1) Normal operation: F is the original function; the extra columns stay
//    low, so Z2 is the OR of the original products and Z1 of the odd ones.
// 2) The universal test sequence is applied and every response is compared
//    with one worked out here.  The extra column P(m+1) is rebuilt in this
//    testbench from the augmentation rules by brute force: each of its free
//    devices (on Q(3), Q(4) and on every F row) is tried both ways and the
//    value that makes the required count odd is kept.
// 3) The function-independent properties are checked on the responses:
//    every F row and Z2 see an odd number of ones over I2(1..m+1), and Z2 is
//    odd over the I4 and over the I5 patterns of columns 1..m+1.
module tb_aug_pla_single;
  import pla_pkg::*;
  localparam int unsigned N = 4, M = 6, L = 3, K = M + 2;
  localparam logic [M-1:0][2*N-1:0] AP = {
    8'b00_00_10_01, 8'b01_01_00_00, 8'b10_00_00_10, 8'b00_01_10_00, 8'b00_00_00_00, 8'b10_10_01_01};
  localparam logic [L-1:0][M-1:0] OP = {6'b110001, 6'b001110, 6'b100100};

  logic clk = 0, rst_n = 1, c1 = 0, c2 = 0, sr_in = 0;
  logic [N-1:0] x = '0;
  sr_op_e sr_op = SR_HOLD;
  logic [L-1:0] f;
  logic z1, z2;
  logic [K-1:0][2*N-1:0] aand;   // augmented AND personality (reference)
  logic [L+1:0][K-1:0]   aor;    // augmented OR personality, rows F, Z1, Z2
  int checks = 0, failures = 0;

  aug_pla_single #(.N(N), .M(M), .L(L), .AND_PERS(AP), .OR_PERS(OP)) dut (
    .clk(clk), .rst_n(rst_n), .x(x), .c1(c1), .c2(c2), .sr_op(sr_op), .sr_in(sr_in),
    .f(f), .z1(z1), .z2(z2));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int missing(logic [K-1:0][2*N-1:0] a, int odd_rows);
    int c;
    c = 0;
    for (int j = 0; j <= M; j++)
      for (int i = 0; i < N; i++)
        if (!a[j][2*i + (odd_rows ? 0 : 1)]) c++;
    return c;
  endfunction

  task automatic build_ref();
    for (int j = 0; j < M; j++) aand[j] = AP[j];
    aand[M] = '0; aand[M][0] = 1; aand[M][1] = 1;
    aand[M+1] = '1;
    if (missing(aand, 1) % 2 == 0) aand[M][2] = 1;   // try with a device
    if (missing(aand, 1) % 2 == 0) begin failures++; $display("rule 3 unsatisfiable"); end
    if (missing(aand, 0) % 2 == 0) aand[M][3] = 1;
    for (int g = 0; g < L; g++) begin
      int c;
      aor[g] = '0;
      c = 0;
      for (int j = 0; j < M; j++) begin aor[g][j] = OP[g][j]; c += OP[g][j]; end
      aor[g][M] = (c % 2 == 0);
      aor[g][M+1] = (g % 2 == 0);
    end
    for (int j = 0; j < K; j++) begin aor[L][j] = (j % 2 == 0); aor[L+1][j] = 1; end
  endtask

  task automatic sr(sr_op_e op, logic b);
    @(negedge clk); sr_op = op; sr_in = b;
    @(negedge clk); sr_op = SR_HOLD;
  endtask

  task automatic select(int sel);
    sr(SR_SET, 1);
    if (sel >= 0) begin
      sr(SR_SHIFT, 0);
      for (int k = 0; k < sel; k++) sr(SR_SHIFT, 1);
    end
  endtask

  function automatic logic col_high(int j, logic [N-1:0] xv, logic c1v, logic c2v);
    for (int i = 0; i < N; i++) begin
      if ((xv[i] == 0) && !c1v && aand[j][2*i]) return 1'b0;
      if ((xv[i] == 1) && !c2v && aand[j][2*i+1]) return 1'b0;
    end
    return 1'b1;
  endfunction

  // Applies one selected-column pattern, checks it and returns {Z2, Z1, F}.
  task automatic check_sel(int sel, output logic [L+1:0] got);
    logic [L+1:0] e;
    logic pj;
    #1;
    pj = (sel >= 0) ? col_high(sel, x, c1, c2) : 1'b0;
    for (int g = 0; g < L + 2; g++) e[g] = (sel >= 0) ? (aor[g][sel] & pj) : 1'b0;
    got = {z2, z1, f};
    checks++;
    if (got !== e) begin
      failures++;
      $display("sel %0d x=%b c=%b%b: got %b exp %b", sel, x, c1, c2, got, e);
    end
  endtask

  initial begin
    logic [L+1:0] r, acc;
    build_ref();
    #1 rst_n = 0;
    #10 rst_n = 1;
    for (int v = 0; v < (1 << N); v++) begin
      logic [L-1:0] ef;
      logic ez1, ez2;
      x = N'(v); c1 = 0; c2 = 0;
      #1;
      ef = '0; ez1 = 0; ez2 = 0;
      for (int j = 0; j < M; j++)
        if (col_high(j, x, 0, 0)) begin
          ez2 = 1;
          if (j % 2 == 0) ez1 = 1;
          for (int g = 0; g < L; g++) if (OP[g][j]) ef[g] = 1;
        end
      checks++;
      if (col_high(M, x, 0, 0) || col_high(M+1, x, 0, 0)) begin
        failures++; $display("extra column high in normal use");
      end
      checks++;
      if (f !== ef || z1 !== ez1 || z2 !== ez2) begin
        failures++; $display("normal x=%b f=%b exp %b z=%b%b", x, f, ef, z1, z2);
      end
    end
    // I1 and I2(1..m+1): parity of every F and of Z2 (m+1 ones).
    acc = '0;
    select(-1); x = '0; c1 = 1; c2 = 0; check_sel(-1, r); acc ^= r;
    for (int j = 0; j <= M; j++) begin select(j); x = '0; c1 = 1; c2 = 0; check_sel(j, r); acc ^= r; end
    checks++;
    if (acc[L-1:0] !== '1 || acc[L+1] !== 1'(M + 1)) begin failures++; $display("I2 parity %b", acc); end
    select(M+1); x = '0; c1 = 1; c2 = 0; check_sel(M+1, r);
    select(M+1); x = '1; c1 = 0; c2 = 1; check_sel(M+1, r);
    // I4 and I5: Z2 odd over columns 1..m+1, all zero on column m+2.
    for (int ph = 4; ph <= 5; ph++) begin
      acc = '0;
      for (int j = 0; j < K; j++) begin
        select(j);
        for (int i = 0; i < N; i++) begin
          if (ph == 4) begin x = ~(N'(1) << i); c1 = 0; c2 = 1; end
          else         begin x =  (N'(1) << i); c1 = 1; c2 = 0; end
          check_sel(j, r);
          if (j <= M) acc ^= r;
          else begin checks++; if (r !== '0) failures++; end
        end
      end
      checks++;
      if (acc[L+1] !== 1'b1) begin failures++; $display("I%0d Z2 parity even", ph); end
    end
    for (int t = 0; t < 200; t++) begin
      int j;
      j = $urandom % K;
      select(j);
      x = N'($urandom); {c1, c2} = 2'($urandom);
      check_sel(j, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
