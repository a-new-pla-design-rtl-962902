// tb_bist_faults -- single crosspoint faults against the built-in test.
// One fault-free and many faulty copies of a small single-fault augmented
// PLA run the same universal sequence from one pattern generator, each with
// its own parity checker.  A faulty copy has one crosspoint of the AND or OR
// array flipped (a missing or an extra device), in the original part or in
// the extra column P(m+1); its extra-column personality is that of the
// fault-free PLA.  The fault-free copy must pass and every faulty copy must
// fail.  The extra-column personality is rebuilt here by brute force from
// the augmentation rules.
module tb_bist_faults;
  import pla_pkg::*;
  localparam int unsigned N = 3, M = 4, L = 3, K = M + 2;
  localparam logic [M-1:0][2*N-1:0] AP = {6'b00_10_01, 6'b01_00_10, 6'b10_01_00, 6'b00_00_01};
  localparam logic [L-1:0][M-1:0]   OP = {4'b1001, 4'b0110, 4'b1100};
  localparam int unsigned NAND = M * 2 * N;   // original AND crosspoints
  localparam int unsigned NOR  = L * M;       // original OR crosspoints
  localparam int unsigned NXA  = 2 * N;       // P(m+1) AND crosspoints
  localparam int unsigned NXO  = L;           // P(m+1) OR crosspoints
  localparam int unsigned NF   = NAND + NOR + NXA + NXO;

  function automatic int miss(logic [M-1:0][2*N-1:0] a, logic [2*N-1:0] xa, int off);
    int c;
    c = 0;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < M; j++) if (!a[j][2*i + off]) c++;
      if (!xa[2*i + off]) c++;
    end
    return c;
  endfunction

  function automatic logic [2*N-1:0] ref_xand();
    logic [2*N-1:0] v;
    v = '0; v[0] = 1; v[1] = 1;
    if (miss(AP, v, 0) % 2 == 0) v[2] = 1;
    if (miss(AP, v, 1) % 2 == 0) v[3] = 1;
    return v;
  endfunction

  function automatic logic [L-1:0] ref_xor();
    logic [L-1:0] v;
    for (int g = 0; g < L; g++) begin
      int c;
      c = 0;
      for (int j = 0; j < M; j++) c += OP[g][j];
      v[g] = (c % 2 == 0);
    end
    return v;
  endfunction

  localparam logic [2*N-1:0] XA = ref_xand();
  localparam logic [L-1:0]   XO = ref_xor();

  logic clk = 0, rst_n = 1, start = 0;
  logic [N-1:0] x;
  logic c1, c2, sr_in, valid, win_end, busy, done;
  logic [2:0] win;
  sr_op_e sr_op;
  logic [NF:0] pass, fail;
  int checks = 0, failures = 0;

  tpg #(.N(N), .K(K)) u_tpg (
    .clk(clk), .rst_n(rst_n), .start(start), .x(x), .c1(c1), .c2(c2),
    .sr_op(sr_op), .sr_in(sr_in), .valid(valid), .win_end(win_end), .win(win),
    .phase(), .busy(busy), .done(done));

  // Copy 0 is fault-free; copy k > 0 carries fault k-1.
  for (genvar k = 0; k <= NF; k++) begin : g_copy
    localparam int F = k - 1;
    localparam logic [M-1:0][2*N-1:0] A =
      (F >= 0 && F < NAND) ? (AP ^ ((M*2*N)'(1) << F)) : AP;
    localparam logic [L-1:0][M-1:0] O =
      (F >= int'(NAND) && F < int'(NAND + NOR)) ? (OP ^ ((L*M)'(1) << (F - NAND))) : OP;
    localparam logic [2*N-1:0] XAF =
      (F >= int'(NAND + NOR) && F < int'(NAND + NOR + NXA)) ? (XA ^ ((2*N)'(1) << (F - NAND - NOR))) : XA;
    localparam logic [L-1:0] XOF =
      (F >= int'(NAND + NOR + NXA)) ? (XO ^ (L'(1) << (F - NAND - NOR - NXA))) : XO;
    logic [L-1:0] f;
    logic z1, z2;
    logic [NUM_WIN-1:0] ew;
    logic [3:0] nchk;
    logic bdone;

    aug_pla_single #(.N(N), .M(M), .L(L), .AND_PERS(A), .OR_PERS(O), .XAND(XAF), .XOR(XOF)) u_pla (
      .clk(clk), .rst_n(rst_n), .x(x), .c1(c1), .c2(c2), .sr_op(sr_op), .sr_in(sr_in),
      .f(f), .z1(z1), .z2(z2));
    parity_bist #(.M(M), .L(L)) u_bist (
      .clk(clk), .rst_n(rst_n), .start(start), .valid(valid), .win_end(win_end), .win(win),
      .seq_done(done), .resp({z2, z1, f}), .fail(fail[k]), .err_win(ew), .checks(nchk),
      .done(bdone), .pass(pass[k]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(posedge clk);     // the checkers report one cycle after the sequence ends
    @(negedge clk);
    checks++;
    if (!pass[0] || fail[0]) begin failures++; $display("fault-free PLA failed its self test"); end
    for (int k = 1; k <= NF; k++) begin
      checks++;
      if (pass[k] || !fail[k]) begin failures++; $display("crosspoint fault %0d not detected", k - 1); end
    end
    $display("%0d single crosspoint faults injected", NF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
