// tb_bist_line_faults -- every single fault against the parity self test,
// for two personalities of the single-fault augmented PLA: a small hand-made
// one (3 inputs, 4 products, 3 outputs) and a pseudo-random one (4 inputs,
// 8 products, 5 outputs) from the default personality generator.  Each
// fault set (tb_bist_fault_set) covers every crosspoint of the augmented
// arrays, every line stuck at 0 and at 1, and every adjacent-line bridge.
module tb_bist_line_faults;
  import pla_pkg::*;

  function automatic logic [7:0][7:0] rnd_and();
    logic [7:0][7:0] v;
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 4; i++) {v[j][2*i+1], v[j][2*i]} = def_and_lit(j, i);
    return v;
  endfunction

  function automatic logic [4:0][7:0] rnd_or();
    logic [4:0][7:0] v;
    for (int g = 0; g < 5; g++)
      for (int j = 0; j < 8; j++) v[g][j] = def_or_bit(g, j);
    return v;
  endfunction

  logic clk = 0, rst_n = 1, start = 0;
  int ck0, fl0, nf0, ck1, fl1, nf1;
  logic fin0, fin1;
  int checks = 0, failures = 0;

  tb_bist_fault_set #(.N(3), .M(4), .L(3),
    .AP({6'b00_10_01, 6'b01_00_10, 6'b10_01_00, 6'b00_00_01}),
    .OP({4'b1001, 4'b0110, 4'b1100})) u_set0 (
    .clk(clk), .rst_n(rst_n), .start(start), .checks(ck0), .failures(fl0),
    .nfaults(nf0), .finished(fin0));

  tb_bist_fault_set #(.N(4), .M(8), .L(5), .AP(rnd_and()), .OP(rnd_or())) u_set1 (
    .clk(clk), .rst_n(rst_n), .start(start), .checks(ck1), .failures(fl1),
    .nfaults(nf1), .finished(fin1));

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
    wait (fin0 && fin1);
    #1;
    $display("fault set 0: %0d single faults, %0d checks, %0d failures", nf0, ck0, fl0);
    $display("fault set 1: %0d single faults, %0d checks, %0d failures", nf1, ck1, fl1);
    checks = ck0 + ck1;
    failures += fl0 + fl1;
    if (ck0 != nf0 + 1 || ck1 != nf1 + 1) begin
      failures++;
      $display("a fault set did not check every copy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
