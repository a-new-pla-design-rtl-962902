// tb_pla_decoder -- exhaustive check of the decoder and control array.
// For every input word and every C1/C2 combination, each row is compared
// with the literal it should carry: complement rows are high only when the
// input is 0 and C1 is low, true rows only when the input is 1 and C2 is low.
module tb_pla_decoder;
  localparam int unsigned N = 4;
  logic [N-1:0]   x;
  logic           c1, c2;
  logic [2*N-1:0] q;
  int checks = 0, failures = 0;

  pla_decoder #(.N(N)) dut (.x(x), .c1(c1), .c2(c2), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++)
      for (int c = 0; c < 4; c++) begin
        x = N'(v); {c1, c2} = 2'(c);
        #1;
        for (int i = 0; i < N; i++) begin
          logic e_comp, e_true;
          e_comp = (c1 == 1'b0) && (x[i] == 1'b0);
          e_true = (c2 == 1'b0) && (x[i] == 1'b1);
          checks++;
          if (q[2*i] !== e_comp || q[2*i+1] !== e_true) begin
            failures++;
            $display("mismatch x=%b c1=%b c2=%b row pair %0d: %b%b", x, c1, c2, i, q[2*i+1], q[2*i]);
          end
        end
      end
    // Row selection rule: exactly one row high for the test patterns.
    for (int i = 0; i < N; i++) begin
      x = ~(N'(1) << i); c1 = 0; c2 = 1; #1;
      checks++; if (q != (2*N)'(1) << (2*i)) failures++;
      x = N'(1) << i; c1 = 1; c2 = 0; #1;
      checks++; if (q != (2*N)'(1) << (2*i+1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
