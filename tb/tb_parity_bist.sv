// tb_parity_bist -- drives the parity checker with synthetic response
// streams laid out like the seven windows of the test sequence.  A stream
// built to meet every reference must pass; streams with one response bit
// flipped in a checked position must fail in exactly that window, and a
// flip in an unchecked position must not fail.
module tb_parity_bist;
  import pla_pkg::*;
  localparam int unsigned M = 5;
  localparam int unsigned L = 4;
  localparam int unsigned W = L + 2;

  logic clk = 0, rst_n = 0, start = 0, valid = 0, win_end = 0, seq_done = 0;
  logic [2:0] win = 0;
  logic [W-1:0] resp = '0;
  logic fail, done, pass;
  logic [NUM_WIN-1:0] err_win;
  logic [3:0] nchk;
  int checks = 0, failures = 0;

  parity_bist #(.M(M), .L(L)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .valid(valid), .win_end(win_end), .win(win),
    .seq_done(seq_done), .resp(resp), .fail(fail), .err_win(err_win), .checks(nchk),
    .done(done), .pass(pass));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Target parity per window, bit order {Z2, Z1, F(L..1)}, worked out by hand
  // for M = 5, L = 4: w0 F=1111, Z1=Pi(3)=1, Z2=Pi(6)=0; w1/w2 F=0101,
  // Z1=Pi(7)=1, Z2=1; w3/w5 Z2=1; w4/w6 zero.
  localparam logic [W-1:0] TGT  [NUM_WIN] = '{6'b011111, 6'b110101, 6'b110101, 6'b100000,
                                             6'b000000, 6'b100000, 6'b000000};
  localparam logic [W-1:0] MASK [NUM_WIN] = '{6'b111111, 6'b111111, 6'b111111, 6'b100000,
                                             6'b111111, 6'b100000, 6'b111111};

  // Plays the seven windows; each has 'len' random responses whose last one
  // is fixed up to reach the target parity.  flip_w / flip_b inject an error.
  task automatic play(int flip_w, int flip_b);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int w = 0; w < NUM_WIN; w++) begin
      logic [W-1:0] acc;
      int len;
      len = 1 + ($urandom % 6);
      acc = '0;
      for (int k = 0; k < len; k++) begin
        logic [W-1:0] r;
        r = W'($urandom);
        if (k == len - 1) begin
          r = acc ^ TGT[w] ^ (r & ~MASK[w]);
          if (w == flip_w) r[flip_b] = ~r[flip_b];
        end
        acc ^= r;
        valid = 1; resp = r; win_end = (k == len - 1); win = 3'(w);
        @(negedge clk);
      end
    end
    valid = 0; win_end = 0; seq_done = 1;
    @(negedge clk); seq_done = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 5; rep++) begin
      play(-1, 0);
      checks++;
      if (!pass || fail || err_win != 0 || nchk != NUM_WIN) begin
        failures++; $display("good stream rejected: err_win=%b checks=%0d", err_win, nchk);
      end
    end
    for (int w = 0; w < NUM_WIN; w++)
      for (int b = 0; b < W; b++) begin
        play(w, b);
        checks++;
        if (MASK[w][b]) begin
          if (pass || !fail || err_win != NUM_WIN'(1) << w) begin
            failures++; $display("flip w%0d b%0d not caught: err_win=%b", w, b, err_win);
          end
        end else if (!pass || fail) begin
          failures++; $display("flip w%0d b%0d in unchecked bit caused a fail", w, b);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
