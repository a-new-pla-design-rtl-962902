// tb_upla_top -- end-to-end test of the whole design at its default size
// (60 inputs, 200 products, 60 outputs).
// 1) Normal operation: random inputs on both PLAs; F must equal the sum of
//    products evaluated here from the personality, Z / Z2 the OR of all
//    products, Z1 the OR of the odd-numbered ones.
// 2) Multiple-fault PLA, conventional test: the on-chip generator applies
//    the universal sequence; this testbench enumerates the same sequence on
//    its own and compares every response F, Z with the one derived from the
//    personality, as an external tester with stored responses would.  The
//    sequence length must be 2nm + 2n + m + 3 cycles.
// 3) Single-fault PLA, built-in self test: the test must end after
//    2n(m+2) + m + 4 patterns with all seven parity checks passed.
// 4) Both tests again at the same time, then normal operation once more.
// Every mechanism (normal use, each pattern class I1..I5, each BIST window,
// return to normal use) is counted; one that never happened is a failure.
module tb_upla_top;
  import pla_pkg::*;
  localparam int unsigned N = DEF_N, M = DEF_M, L = DEF_L;
  localparam int unsigned LEN_M = 2*N*M + 2*N + M + 3;
  localparam int unsigned LEN_S = 2*N*(M + 2) + (M + 2) + 2;

  logic clk = 0, rst_n = 1;
  logic [N-1:0] m_x = '0, s_x = '0;
  logic [L-1:0] m_f, s_f;
  logic m_z, s_z1, s_z2;
  logic m_test_start = 0, m_test_busy, m_test_valid, m_test_done;
  phase_e m_test_phase;
  logic bist_start = 0, bist_busy, bist_done, bist_pass, bist_fail;
  logic [NUM_WIN-1:0] bist_err_win;
  logic [3:0] bist_checks;
  int checks = 0, failures = 0;
  int n_normal = 0, n_ph[7], n_bist_pass = 0, n_bist_win = 0, n_back = 0;

  upla_top dut (
    .clk(clk), .rst_n(rst_n),
    .m_x(m_x), .m_f(m_f), .m_z(m_z), .m_test_start(m_test_start), .m_test_busy(m_test_busy),
    .m_test_valid(m_test_valid), .m_test_done(m_test_done), .m_test_phase(m_test_phase),
    .s_x(s_x), .s_f(s_f), .s_z1(s_z1), .s_z2(s_z2), .bist_start(bist_start),
    .bist_busy(bist_busy), .bist_done(bist_done), .bist_pass(bist_pass), .bist_fail(bist_fail),
    .bist_err_win(bist_err_win), .bist_checks(bist_checks));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Product j of the original PLA for input word xv (literal by literal).
  function automatic logic prod(int j, logic [N-1:0] xv);
    for (int i = 0; i < N; i++) begin
      logic [1:0] lit;
      lit = def_and_lit(j, i);          // {needs x=0, needs x=1}
      if (lit[0] && !xv[i]) return 1'b0;
      if (lit[1] &&  xv[i]) return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic check_normal();
    for (int t = 0; t < 100; t++) begin
      logic [L-1:0] ef;
      logic any, anyodd;
      logic [N-1:0] v;
      for (int w = 0; w < N; w += 32) v[w +: 32] = $urandom;
      @(negedge clk);
      m_x = v; s_x = v;
      #1;
      ef = '0; any = 0; anyodd = 0;
      for (int j = 0; j < M; j++)
        if (prod(j, v)) begin
          any = 1;
          if (j % 2 == 0) anyodd = 1;
          for (int g = 0; g < L; g++) if (def_or_bit(g, j)) ef[g] = 1;
        end
      checks++;
      if (m_f !== ef || s_f !== ef || m_z !== any || s_z2 !== any || s_z1 !== anyodd) begin
        failures++;
        $display("normal mismatch: x=%h", v);
      end else n_normal++;
    end
  endtask

  // Expected multiple-fault PLA response {Z, F} for pattern k of the sequence.
  function automatic logic [L:0] m_expect(int k);
    int j;
    logic [N-1:0] xv;
    logic c1v, c2v, pj;
    logic [L:0] e;
    if (k == 0) return '0;                                  // I1
    if (k <= M + 1) begin j = k - 1; xv = '0; c1v = 1; c2v = 0; end
    else if (k == M + 2) begin j = M; xv = '1; c1v = 0; c2v = 1; end
    else begin
      int r, i;
      r = k - (M + 3);
      if (r < N*(M+1)) begin j = r / N; i = r % N; xv = ~(N'(1) << i); c1v = 0; c2v = 1; end
      else begin r -= N*(M+1); j = r / N; i = r % N; xv = N'(1) << i; c1v = 1; c2v = 0; end
    end
    // Column j conducts if no row carrying one of its devices is high.
    pj = 1;
    for (int i = 0; i < N; i++) begin
      logic [1:0] lit;
      logic comp_hi, true_hi;
      lit = (j == M) ? 2'b11 : def_and_lit(j, i);
      comp_hi = !xv[i] && !c1v;
      true_hi =  xv[i] && !c2v;
      if ((lit[0] && comp_hi) || (lit[1] && true_hi)) pj = 0;
    end
    e = '0;
    e[L] = pj;
    if (j < M) for (int g = 0; g < L; g++) e[g] = pj & def_or_bit(g, j);
    return e;
  endfunction

  task automatic run_mtest();
    int k;
    @(negedge clk); m_test_start = 1;
    @(negedge clk); m_test_start = 0;
    k = 0;
    while (m_test_valid) begin
      logic [L:0] e;
      e = m_expect(k);
      n_ph[m_test_phase]++;
      checks++;
      if ({m_z, m_f} !== e) begin
        failures++;
        if (failures < 10) $display("multi pattern %0d: got %b exp %b", k, {m_z, m_f}, e);
      end
      k++;
      @(negedge clk);
    end
    checks++;
    if (k != LEN_M) begin failures++; $display("multi sequence length %0d, expected %0d", k, LEN_M); end
  endtask

  task automatic run_bist();
    int cyc;
    @(negedge clk); bist_start = 1;
    @(negedge clk); bist_start = 0;
    cyc = 0;
    while (!bist_done && cyc < LEN_S + 10) begin @(negedge clk); cyc++; end
    // Done is reported two cycles after the last pattern.
    checks++;
    if (cyc != LEN_S + 1) begin failures++; $display("BIST took %0d cycles, expected %0d", cyc, LEN_S + 1); end
    checks++;
    if (!bist_pass || bist_fail || bist_err_win != 0) begin
      failures++; $display("BIST failed: err_win=%b checks=%0d", bist_err_win, bist_checks);
    end else n_bist_pass++;
    n_bist_win += bist_checks;
  endtask

  initial begin
    foreach (n_ph[p]) n_ph[p] = 0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    check_normal();
    run_mtest();
    check_normal(); n_back++;
    run_bist();
    check_normal(); n_back++;
    fork
      run_mtest();
      run_bist();
    join
    check_normal(); n_back++;
    // Mechanism coverage.
    checks++; if (n_normal < 400) begin failures++; $display("normal use not exercised"); end
    for (int p = int'(PH_I1); p <= int'(PH_I5); p++) begin
      checks++;
      if (n_ph[p] == 0) begin failures++; $display("pattern class %0d never applied", p); end
    end
    checks++; if (n_ph[PH_I4] != 2*N*(M+1) || n_ph[PH_I2] != 2*(M+1)) begin
      failures++; $display("pattern class counts I2=%0d I4=%0d", n_ph[PH_I2], n_ph[PH_I4]);
    end
    checks++; if (n_bist_pass != 2 || n_bist_win != 2*NUM_WIN) begin
      failures++; $display("BIST runs passed %0d, window checks %0d", n_bist_pass, n_bist_win);
    end
    checks++; if (n_back != 3) failures++;
    $display("normal vectors %0d, patterns I1..I5 %0d/%0d/%0d/%0d/%0d, BIST passes %0d, window checks %0d",
             n_normal, n_ph[1], n_ph[2], n_ph[3], n_ph[4], n_ph[5], n_bist_pass, n_bist_win);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
