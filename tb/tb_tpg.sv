// tb_tpg -- checks the universal test sequence produced by tpg.
// The generator drives a column-select register as it would inside the PLA;
// every applied pattern (X, C1, C2, S) and every window marker is compared
// with a list built here directly from the pattern definitions.  The
// sequence must be exactly 2NK + K + 2 patterns long, applied on consecutive
// cycles starting the cycle after 'start', and leave S all zero.  The test
// runs the sequence twice to check restart.
module tb_tpg;
  import pla_pkg::*;
  localparam int unsigned N = 3;
  localparam int unsigned K = 5;
  localparam int unsigned LEN = 2*N*K + K + 2;

  typedef struct packed {
    logic [N-1:0] x;
    logic         c1, c2;
    logic [K-1:0] s;
    logic         we;
    logic [2:0]   w;
  } pat_t;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] x;
  logic c1, c2, sr_in, valid, win_end, busy, done;
  logic [2:0] win;
  sr_op_e sr_op;
  phase_e phase;
  logic [K-1:0] s;
  pat_t exp_q[$];
  int checks = 0, failures = 0;

  tpg #(.N(N), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .x(x), .c1(c1), .c2(c2),
    .sr_op(sr_op), .sr_in(sr_in), .valid(valid), .win_end(win_end), .win(win),
    .phase(phase), .busy(busy), .done(done));
  col_select_sr #(.K(K)) u_sr (.clk(clk), .rst_n(rst_n), .op(sr_op), .sin(sr_in), .s(s));

  always #5 clk = ~clk;

  initial begin
    repeat (20 * LEN) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [K-1:0] sel(int j);
    return ~(K'(1) << j);
  endfunction

  task automatic build();
    exp_q.delete();
    exp_q.push_back('{x: '0, c1: 1, c2: 0, s: '1, we: 0, w: 0});
    for (int j = 0; j < K; j++)
      exp_q.push_back('{x: '0, c1: 1, c2: 0, s: sel(j), we: (j >= K-2), w: (j == K-1) ? 3'd1 : 3'd0});
    exp_q.push_back('{x: '1, c1: 0, c2: 1, s: sel(K-1), we: 1, w: 2});
    for (int j = 0; j < K; j++)
      for (int i = 0; i < N; i++)
        exp_q.push_back('{x: ~(N'(1) << i), c1: 0, c2: 1, s: sel(j),
                          we: (i == N-1) && (j >= K-2), w: (j == K-1) ? 3'd4 : 3'd3});
    for (int j = 0; j < K; j++)
      for (int i = 0; i < N; i++)
        exp_q.push_back('{x: N'(1) << i, c1: 1, c2: 0, s: sel(j),
                          we: (i == N-1) && (j >= K-2), w: (j == K-1) ? 3'd6 : 3'd5});
  endtask

  task automatic run_once();
    int n, wins;
    build();
    checks++;
    if (exp_q.size() != LEN) failures++;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    n = 0; wins = 0;
    while (valid) begin
      pat_t e;
      e = exp_q[n];
      checks++;
      if (x !== e.x || c1 !== e.c1 || c2 !== e.c2 || s !== e.s || win_end !== e.we ||
          (e.we && win !== e.w)) begin
        failures++;
        $display("pattern %0d: got x=%b c=%b%b s=%b we=%b w=%0d, exp x=%b c=%b%b s=%b we=%b w=%0d",
                 n, x, c1, c2, s, win_end, win, e.x, e.c1, e.c2, e.s, e.we, e.w);
      end
      if (win_end) wins++;
      n++;
      @(negedge clk);
    end
    checks++;
    if (n != LEN) begin failures++; $display("length %0d, expected %0d", n, LEN); end
    checks++;
    if (wins != NUM_WIN) begin failures++; $display("%0d windows", wins); end
    checks++;
    if (!done) begin failures++; $display("no done pulse after the last pattern"); end
    @(negedge clk);
    checks++;
    if (s !== '0 || busy || x !== '0 || c1 || c2) begin
      failures++; $display("not back in normal operation: s=%b", s);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_once();
    repeat (3) @(negedge clk);
    run_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
