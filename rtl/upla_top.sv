// upla_top -- universally testable PLA, both augmentations side by side.
//
// The same n-input, m-product, l-output PLA personality is built in the two
// augmented forms:
//
//  * Multiple-fault form (aug_pla_multi) with its own test pattern generator
//    (tpg, K = m+1).  Tested in the conventional way: while m_test_busy, the
//    generator applies the 2nm+2n+m+3 universal patterns and a tester
//    compares m_f / m_z with the responses derived from the personality
//    whenever m_test_valid is high.
//  * Single-fault form (aug_pla_single) with a built-in self test: a tpg
//    (K = m+2) applies the universal sequence and parity_bist compresses the
//    responses F, Z1, Z2 with parity counters and checks them at the window
//    ends against function-independent references.
//
// Outside test, each PLA is in normal operation: C1 = C2 = 0, the S
// register all zero, and the functional inputs m_x / s_x reach the decoder,
// so m_f / s_f are the PLA function (combinational).  A one-cycle start
// pulse begins a test; the PLA inputs are taken from the generator while it
// is busy.  The way the two forms are wired to pattern generators, the
// input multiplexers and the start/done handshake are this design's choices.
module upla_top #(
  parameter int unsigned N = pla_pkg::DEF_N,
  parameter int unsigned M = pla_pkg::DEF_M,
  parameter int unsigned L = pla_pkg::DEF_L,
  parameter logic [M-1:0][2*N-1:0] AND_PERS = gen_and(),
  parameter logic [L-1:0][M-1:0]   OR_PERS  = gen_or()
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // multiple-fault PLA
  input  logic [N-1:0]                m_x,
  output logic [L-1:0]                m_f,
  output logic                        m_z,
  input  logic                        m_test_start,
  output logic                        m_test_busy,
  output logic                        m_test_valid,
  output logic                        m_test_done,
  output pla_pkg::phase_e             m_test_phase,   // pattern class now applied
  // single-fault PLA with built-in self test
  input  logic [N-1:0]                s_x,
  output logic [L-1:0]                s_f,
  output logic                        s_z1,
  output logic                        s_z2,
  input  logic                        bist_start,
  output logic                        bist_busy,
  output logic                        bist_done,
  output logic                        bist_pass,
  output logic                        bist_fail,
  output logic [pla_pkg::NUM_WIN-1:0] bist_err_win,   // windows that mismatched
  output logic [3:0]                  bist_checks     // window checks made
);
  import pla_pkg::*;

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

  // ---------------- multiple-fault PLA, externally checked ----------------
  logic [N-1:0] mg_x;
  logic         mg_c1, mg_c2, mg_sr_in, mg_done;
  sr_op_e       mg_sr_op;

  tpg #(.N(N), .K(M + 1)) u_mtpg (
    .clk(clk), .rst_n(rst_n), .start(m_test_start),
    .x(mg_x), .c1(mg_c1), .c2(mg_c2), .sr_op(mg_sr_op), .sr_in(mg_sr_in),
    .valid(m_test_valid), .win_end(), .win(), .phase(m_test_phase),
    .busy(m_test_busy), .done(mg_done)
  );
  assign m_test_done = mg_done;

  aug_pla_multi #(.N(N), .M(M), .L(L), .AND_PERS(AND_PERS), .OR_PERS(OR_PERS)) u_mpla (
    .clk(clk), .rst_n(rst_n),
    .x(m_test_busy ? mg_x : m_x), .c1(mg_c1), .c2(mg_c2),
    .sr_op(mg_sr_op), .sr_in(mg_sr_in),
    .f(m_f), .z(m_z)
  );

  // ---------------- single-fault PLA with parity BIST ---------------------
  logic [N-1:0] sg_x;
  logic         sg_c1, sg_c2, sg_sr_in, sg_valid, sg_win_end, sg_done;
  logic [2:0]   sg_win;
  sr_op_e       sg_sr_op;

  tpg #(.N(N), .K(M + 2)) u_stpg (
    .clk(clk), .rst_n(rst_n), .start(bist_start),
    .x(sg_x), .c1(sg_c1), .c2(sg_c2), .sr_op(sg_sr_op), .sr_in(sg_sr_in),
    .valid(sg_valid), .win_end(sg_win_end), .win(sg_win), .phase(),
    .busy(bist_busy), .done(sg_done)
  );

  aug_pla_single #(.N(N), .M(M), .L(L), .AND_PERS(AND_PERS), .OR_PERS(OR_PERS)) u_spla (
    .clk(clk), .rst_n(rst_n),
    .x(bist_busy ? sg_x : s_x), .c1(sg_c1), .c2(sg_c2),
    .sr_op(sg_sr_op), .sr_in(sg_sr_in),
    .f(s_f), .z1(s_z1), .z2(s_z2)
  );

  parity_bist #(.M(M), .L(L)) u_bist (
    .clk(clk), .rst_n(rst_n), .start(bist_start),
    .valid(sg_valid), .win_end(sg_win_end), .win(sg_win), .seq_done(sg_done),
    .resp({s_z2, s_z1, s_f}),
    .fail(bist_fail), .err_win(bist_err_win), .checks(bist_checks),
    .done(bist_done), .pass(bist_pass)
  );
endmodule
