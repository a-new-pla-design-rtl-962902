// tb_pla_and_plane -- random check of the NOR AND array with column gating.
// The reference evaluates each product from its literals: a product is 1
// when its S bit is 0 and every row that carries a device on it is low.
module tb_pla_and_plane;
  localparam int unsigned N = 4;
  localparam int unsigned K = 6;
  localparam logic [K-1:0][2*N-1:0] PERS = {
    8'b1111_1111, 8'b0000_0000, 8'b1001_0110, 8'b0100_0001, 8'b0010_1000, 8'b0001_0010};
  logic [2*N-1:0] q;
  logic [K-1:0]   s, p;
  int checks = 0, failures = 0;

  pla_and_plane #(.N(N), .K(K), .PERS(PERS)) dut (.q(q), .s(s), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 600; t++) begin
      q = (2*N)'($urandom);
      s = (t < 300) ? '0 : K'($urandom);
      #1;
      for (int j = 0; j < K; j++) begin
        logic e;
        e = ~s[j];
        for (int r = 0; r < 2*N; r++)
          if (PERS[j][r] && q[r]) e = 1'b0;
        checks++;
        if (p[j] !== e) begin
          failures++;
          $display("mismatch q=%b s=%b col %0d got %b exp %b", q, s, j, p[j], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
