// tb_aug_pla_multi -- checks the multiple-fault augmented PLA.
// 1) Normal operation (S cleared, C1 = C2 = 0): F equals the sum of products
//    evaluated literal by literal from the personality, and Z is the OR of
//    the original products (the extra column P(m+1) stays low).
// 2) Test operation: every pattern of the universal test set, plus random
//    input/control words with a single selected column, is applied by
//    driving the shift register serially; F and Z are compared with the
//    response worked out from the personality (the extra column P(m+1)
//    conducts only when no row is high; Z is the OR of all product lines).
module tb_aug_pla_multi;
  import pla_pkg::*;
  localparam int unsigned N = 4, M = 6, L = 3, K = M + 1;
  // Column j, rows {x3,~x3,x2,~x2,x1,~x1,x0,~x0}.
  localparam logic [M-1:0][2*N-1:0] AP = {
    8'b00_00_10_01, 8'b01_01_00_00, 8'b10_00_00_10, 8'b00_01_10_00, 8'b00_00_00_00, 8'b10_10_01_01};
  localparam logic [L-1:0][M-1:0] OP = {6'b110001, 6'b001110, 6'b100100};

  logic clk = 0, rst_n = 1, c1 = 0, c2 = 0, sr_in = 0;
  logic [N-1:0] x = '0;
  sr_op_e sr_op = SR_HOLD;
  logic [L-1:0] f;
  logic z;
  int checks = 0, failures = 0;

  aug_pla_multi #(.N(N), .M(M), .L(L), .AND_PERS(AP), .OR_PERS(OP)) dut (
    .clk(clk), .rst_n(rst_n), .x(x), .c1(c1), .c2(c2), .sr_op(sr_op), .sr_in(sr_in), .f(f), .z(z));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sr(sr_op_e op, logic b);
    @(negedge clk); sr_op = op; sr_in = b;
    @(negedge clk); sr_op = SR_HOLD;
  endtask

  // sel < 0: no column selected; otherwise column sel (0-based).
  task automatic select(int sel);
    sr(SR_SET, 1);
    if (sel >= 0) begin
      sr(SR_SHIFT, 0);
      for (int k = 0; k < sel; k++) sr(SR_SHIFT, 1);
    end
  endtask

  // Does column j conduct (product line high) for the given input/control?
  function automatic logic col_high(int j, logic [N-1:0] xv, logic c1v, logic c2v);
    for (int i = 0; i < N; i++) begin
      logic comp_hi, true_hi, dev_c, dev_t;
      comp_hi = (xv[i] == 0) && !c1v;
      true_hi = (xv[i] == 1) && !c2v;
      dev_c = (j == M) ? 1'b1 : AP[j][2*i];
      dev_t = (j == M) ? 1'b1 : AP[j][2*i+1];
      if ((comp_hi && dev_c) || (true_hi && dev_t)) return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic check_sel(int sel);
    logic [L-1:0] ef;
    logic ez, pj;
    #1;
    pj = (sel >= 0) ? col_high(sel, x, c1, c2) : 1'b0;
    ef = '0;
    for (int g = 0; g < L; g++) ef[g] = (sel >= 0 && sel < M) ? (OP[g][sel] & pj) : 1'b0;
    ez = pj;
    checks++;
    if (f !== ef || z !== ez) begin
      failures++;
      $display("sel %0d x=%b c=%b%b: f=%b z=%b exp f=%b z=%b", sel, x, c1, c2, f, z, ef, ez);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #10 rst_n = 1;
    // Normal operation.
    for (int v = 0; v < (1 << N); v++) begin
      logic [L-1:0] ef;
      logic ez;
      x = N'(v); c1 = 0; c2 = 0;
      #1;
      ef = '0; ez = 0;
      for (int j = 0; j < M; j++)
        if (col_high(j, x, 0, 0)) begin
          ez = 1;
          for (int g = 0; g < L; g++) if (OP[g][j]) ef[g] = 1;
        end
      checks++;
      if (col_high(M, x, 0, 0)) begin failures++; $display("P(m+1) high in normal use"); end
      checks++;
      if (f !== ef || z !== ez) begin
        failures++; $display("normal x=%b f=%b exp %b z=%b", x, f, ef, z);
      end
    end
    // Universal test set: I1, I2(j), I3, I4(i,j), I5(i,j).
    select(-1); x = '0; c1 = 1; c2 = 0; check_sel(-1);
    for (int j = 0; j < K; j++) begin select(j); x = '0; c1 = 1; c2 = 0; check_sel(j); end
    select(K-1); x = '1; c1 = 0; c2 = 1; check_sel(K-1);
    for (int j = 0; j < K; j++) begin
      select(j);
      for (int i = 0; i < N; i++) begin x = ~(N'(1) << i); c1 = 0; c2 = 1; check_sel(j); end
      for (int i = 0; i < N; i++) begin x =  (N'(1) << i); c1 = 1; c2 = 0; check_sel(j); end
    end
    // Random words.
    for (int t = 0; t < 200; t++) begin
      int j;
      j = $urandom % K;
      select(j);
      x = N'($urandom); {c1, c2} = 2'($urandom);
      check_sel(j);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
