// tb_parity_counter -- compares the parity bank with running ones counts.
module tb_parity_counter;
  localparam int unsigned W = 5;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [W-1:0] d = '0, q, q_next;
  int cnt [W];
  int checks = 0, failures = 0;

  parity_counter #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .d(d), .q(q), .q_next(q_next));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (cnt[b]) cnt[b] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      en  = ($urandom % 4) != 0;
      clr = ($urandom % 50) == 0;
      d   = W'($urandom);
      #1;
      for (int b = 0; b < W; b++) begin
        checks++;
        if (q_next[b] !== ((cnt[b] + (en ? int'(d[b]) : 0)) % 2 == 1)) failures++;
      end
      @(posedge clk); #1;
      for (int b = 0; b < W; b++) begin
        if (clr) cnt[b] = 0;
        else if (en && d[b]) cnt[b]++;
        checks++;
        if (q[b] !== (cnt[b] % 2 == 1)) begin
          failures++;
          $display("bit %0d got %b count %0d", b, q[b], cnt[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
