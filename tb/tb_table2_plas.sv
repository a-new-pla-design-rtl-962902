// tb_table2_plas -- runs the whole design at the sizes of the eight PLAs of
// the BELLMAC-32A microprocessor used for the overhead figures, each with a
// pseudo-random personality of that size (the real functions are not
// published).  Sizes are inputs/outputs/products; the sixth PLA is run with
// 24 inputs, 13 outputs and 44 products.  Each size runs normal operation,
// the complete conventional test with every response compared, and the
// built-in self test (see tb_upla_run).
module tb_table2_plas;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  localparam int NP = 8;
  // Size k (0 inputs, 1 outputs, 2 products) of PLA p.
  function automatic int sz(int p, int k);
    int t [3];
    case (p)
      0: t = '{50, 67, 190};  1: t = '{30, 27, 120};  2: t = '{27, 54, 181};  3: t = '{54, 61, 134};
      4: t = '{30, 37, 153};  5: t = '{24, 13, 44};   6: t = '{12, 21, 58};   default: t = '{25, 12, 42};
    endcase
    return t[k];
  endfunction
  int ck [NP], fl [NP];
  logic [NP-1:0] fin;

  for (genvar p = 0; p < NP; p++) begin : g_pla
    tb_upla_run #(.N(sz(p, 0)), .L(sz(p, 1)), .M(sz(p, 2))) u_run (
      .clk(clk), .rst_n(rst_n), .checks(ck[p]), .failures(fl[p]), .finished(fin[p]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    wait (&fin);
    for (int p = 0; p < NP; p++) begin
      $display("PLA %0d (%0d in, %0d out, %0d products): %0d checks, %0d failures",
               p + 1, sz(p, 0), sz(p, 1), sz(p, 2), ck[p], fl[p]);
      checks += ck[p]; failures += fl[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
