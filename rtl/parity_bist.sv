// parity_bist -- parity-compression response checker for the single-fault
// augmented PLA.
//
// The responses F(1..l), Z1, Z2 are compressed by parity counters over seven
// windows of the test sequence; at the end of each window the parity
// (including the window's last response) is compared with a reference that
// depends only on m and l, never on the PLA function, and the counters are
// cleared for the next window.  References (bit set = odd number of ones):
//   w0  I1, I2(1..m+1): F all 1; Z1 = Pi(ceil((m+1)/2)); Z2 = Pi(m+1)
//   w1  I2(m+2):        F(g) = 1 for odd g; Z1 = Pi(m+2); Z2 = 1
//   w2  I3:             as w1
//   w3  I4(.,1..m+1):   Z2 = 1; F, Z1 not checked
//   w4  I4(.,m+2):      all 0
//   w5  I5(.,1..m+1):   Z2 = 1; F, Z1 not checked
//   w6  I5(.,m+2):      all 0
// The parity compression, the checks at fixed times and the F / Z1 / Z2
// references for the first windows follow the source; the exact window
// boundaries and the later references are derived here from the augmentation
// rules, since this design counts the parity afresh in each window.
// Interface: 'start' clears the result; 'valid', 'win_end', 'win' come from
// tpg.  'fail' is sticky, 'err_win' marks the windows that mismatched, 'done'
// pulses with the final verdict on 'pass'.  'checks' counts window checks.
module parity_bist #(
  parameter int unsigned M = pla_pkg::DEF_M,
  parameter int unsigned L = pla_pkg::DEF_L
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic                         valid,
  input  logic                         win_end,
  input  logic [2:0]                   win,
  input  logic                         seq_done,
  input  logic [L+1:0]                 resp,      // {Z2, Z1, F(l..1)}
  output logic                         fail,
  output logic [pla_pkg::NUM_WIN-1:0]  err_win,
  output logic [3:0]                   checks,
  output logic                         done,
  output logic                         pass
);
  import pla_pkg::*;

  typedef struct packed {
    logic [L+1:0] exp;
    logic [L+1:0] mask;
  } ref_t;

  function automatic logic [L-1:0] odd_rows();
    logic [L-1:0] v;
    for (int g = 0; g < L; g++) v[g] = (g % 2 == 0);   // F(1), F(3), ...
    return v;
  endfunction

  function automatic ref_t ref_of(input logic [2:0] w);
    ref_t r;
    r.exp = '0; r.mask = '0;
    case (w)
      3'd0: begin
        r.exp  = {par(M + 1), par(ceil_half(M + 1)), {L{1'b1}}};
        r.mask = '1;
      end
      3'd1, 3'd2: begin
        r.exp  = {1'b1, par(M + 2), odd_rows()};
        r.mask = '1;
      end
      3'd3, 3'd5: begin
        r.exp  = {1'b1, 1'b0, {L{1'b0}}};
        r.mask = {1'b1, 1'b0, {L{1'b0}}};
      end
      3'd4, 3'd6: begin
        r.exp  = '0;
        r.mask = '1;
      end
      default: ;
    endcase
    return r;
  endfunction

  logic [L+1:0] pq, pq_next;
  ref_t         r;
  logic         mismatch;

  parity_counter #(.W(L + 2)) u_par (
    .clk(clk), .rst_n(rst_n),
    .clr(start || (valid && win_end)),
    .en(valid), .d(resp), .q(pq), .q_next(pq_next)
  );

  assign r        = ref_of(win);
  assign mismatch = valid && win_end && (((pq_next ^ r.exp) & r.mask) != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail <= 1'b0; err_win <= '0; checks <= '0; done <= 1'b0;
    end else begin
      done <= seq_done;
      if (start) begin
        fail <= 1'b0; err_win <= '0; checks <= '0;
      end else if (valid && win_end) begin
        checks <= checks + 1'b1;
        if (mismatch) begin
          fail <= 1'b1;
          err_win[win] <= 1'b1;
        end
      end
    end
  end

  assign pass = done && !fail && (checks == 4'(NUM_WIN));
endmodule
