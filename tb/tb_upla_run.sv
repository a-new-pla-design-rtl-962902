// tb_upla_run -- testbench helper: runs upla_top at one size (N, M, L) with
// its default pseudo-random personality.  It checks normal operation against
// a sum-of-products model, the length of both test sequences, every
// response of the multiple-fault PLA against the personality, and the
// verdict of the built-in self test.  Results are counted on its outputs;
// 'finished' rises when it is done.
module tb_upla_run #(
  parameter int unsigned N = 8,
  parameter int unsigned M = 10,
  parameter int unsigned L = 6
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  import pla_pkg::*;
  localparam int unsigned LEN_M = 2*N*M + 2*N + M + 3;
  localparam int unsigned LEN_S = 2*N*(M + 2) + (M + 2) + 2;

  logic [N-1:0] m_x = '0, s_x = '0;
  logic [L-1:0] m_f, s_f;
  logic m_z, s_z1, s_z2;
  logic m_test_start = 0, m_test_busy, m_test_valid, m_test_done;
  phase_e m_test_phase;
  logic bist_start = 0, bist_busy, bist_done, bist_pass, bist_fail;
  logic [NUM_WIN-1:0] bist_err_win;
  logic [3:0] bist_checks;

  upla_top #(.N(N), .M(M), .L(L)) dut (
    .clk(clk), .rst_n(rst_n),
    .m_x(m_x), .m_f(m_f), .m_z(m_z), .m_test_start(m_test_start), .m_test_busy(m_test_busy),
    .m_test_valid(m_test_valid), .m_test_done(m_test_done), .m_test_phase(m_test_phase),
    .s_x(s_x), .s_f(s_f), .s_z1(s_z1), .s_z2(s_z2), .bist_start(bist_start),
    .bist_busy(bist_busy), .bist_done(bist_done), .bist_pass(bist_pass), .bist_fail(bist_fail),
    .bist_err_win(bist_err_win), .bist_checks(bist_checks));

  function automatic logic prod(int j, logic [N-1:0] xv, logic c1v, logic c2v, bit all_dev);
    for (int i = 0; i < N; i++) begin
      logic [1:0] lit;
      lit = all_dev ? 2'b11 : def_and_lit(j, i);
      if (lit[0] && !xv[i] && !c1v) return 1'b0;
      if (lit[1] &&  xv[i] && !c2v) return 1'b0;
    end
    return 1'b1;
  endfunction

  initial begin
    int k, cyc, jsel, ncol;
    checks = 0; failures = 0; finished = 0;
    @(posedge rst_n);
    // Normal operation.
    for (int t = 0; t < 50; t++) begin
      logic [L-1:0] ef;
      logic [N-1:0] v;
      for (int w = 0; w < N; w += 32) v[w +: 32] = $urandom;
      @(negedge clk); m_x = v; s_x = v;
      #1;
      ef = '0;
      for (int j = 0; j < M; j++)
        if (prod(j, v, 0, 0, 0))
          for (int g = 0; g < L; g++) if (def_or_bit(g, j)) ef[g] = 1;
      checks++;
      if (m_f !== ef || s_f !== ef) begin failures++; $display("[%0d/%0d/%0d] normal mismatch x=%h m_f=%h s_f=%h exp=%h", N, L, M, v, m_f, s_f, ef); end
    end
    // Multiple-fault PLA with stored responses.
    @(negedge clk); m_test_start = 1;
    @(negedge clk); m_test_start = 0;
    k = 0; ncol = 0;
    while (m_test_valid) begin
      logic pj, c1v, c2v;
      logic [N-1:0] xv;
      logic [L:0] e;
      case (m_test_phase)
        PH_I1: jsel = -1;
        PH_I2: begin jsel = ncol; ncol++; end
        PH_I3: jsel = M;
        default: jsel = ((k - (M + 3)) / N) % (M + 1);
      endcase
      // Pattern applied: derived from its position in the sequence.
      if (m_test_phase inside {PH_I1, PH_I2}) begin xv = '0; c1v = 1; c2v = 0; end
      else if (m_test_phase == PH_I3) begin xv = '1; c1v = 0; c2v = 1; end
      else if (m_test_phase == PH_I4) begin xv = ~(N'(1) << ((k - (M + 3)) % N)); c1v = 0; c2v = 1; end
      else begin xv = N'(1) << ((k - (M + 3)) % N); c1v = 1; c2v = 0; end
      e = '0;
      if (jsel >= 0) begin
        pj = prod(jsel, xv, c1v, c2v, jsel == M);
        e[L] = pj;
        if (jsel < M) for (int g = 0; g < L; g++) e[g] = pj & def_or_bit(g, jsel);
      end
      checks++;
      if ({m_z, m_f} !== e) begin failures++; $display("[%0d/%0d/%0d] pattern %0d", N, L, M, k); end
      k++;
      @(negedge clk);
    end
    checks++;
    if (k != LEN_M) begin failures++; $display("[%0d/%0d/%0d] sequence %0d", N, L, M, k); end
    // Built-in self test of the single-fault PLA.
    @(negedge clk); bist_start = 1;
    @(negedge clk); bist_start = 0;
    cyc = 0;
    while (!bist_done && cyc < LEN_S + 10) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != LEN_S + 1 || !bist_pass || bist_checks != NUM_WIN) begin
      failures++; $display("[%0d/%0d/%0d] BIST cyc=%0d pass=%b err=%b", N, L, M, cyc, bist_pass, bist_err_win);
    end
    finished = 1;
  end
endmodule
