// tb_pla_or_plane -- random check of the OR array against a sum over the
// connected product lines.
module tb_pla_or_plane;
  localparam int unsigned K = 6;
  localparam int unsigned L = 4;
  localparam logic [L-1:0][K-1:0] PERS = {6'b111111, 6'b000000, 6'b101010, 6'b010011};
  logic [K-1:0] p;
  logic [L-1:0] f;
  int checks = 0, failures = 0;

  pla_or_plane #(.K(K), .L(L), .PERS(PERS)) dut (.p(p), .f(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << K); v++) begin
      p = K'(v);
      #1;
      for (int g = 0; g < L; g++) begin
        int cnt;
        cnt = 0;
        for (int j = 0; j < K; j++) if (PERS[g][j] && p[j]) cnt++;
        checks++;
        if (f[g] !== (cnt > 0)) begin
          failures++;
          $display("mismatch p=%b out %0d got %b", p, g, f[g]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
