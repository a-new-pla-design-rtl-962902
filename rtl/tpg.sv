// tpg -- generator of the universal (function-independent) test sequence.
//
// For a PLA with N inputs and K test-selectable columns (K = m+1 for the
// multiple-fault PLA, K = m+2 for the single-fault PLA) it applies, one
// pattern per clock cycle,
//   I1, I2(1) .. I2(K), I3, I4(1,1) I4(2,1) .. I4(N,K), I5(1,1) .. I5(N,K)
// i.e. 2NK + K + 2 patterns (2nm + 2n + m + 3 for K = m+1).  The patterns
// (X, C1, C2, S) are:
//   I1      X = 0..0, C1=1, C2=0, S all ones      (nothing selected)
//   I2(j)   X = 0..0, C1=1, C2=0, S(j)=0          (column j, all rows low)
//   I3      X = 1..1, C1=0, C2=1, S(K)=0          (column K, all rows low)
//   I4(i,j) X(i)=0, others 1, C1=0, C2=1, S(j)=0  (row Q(2i-1) high)
//   I5(i,j) X(i)=1, others 0, C1=1, C2=0, S(j)=0  (row Q(2i) high)
// The sequence order, its length and the I1, I2, I4, I5 patterns follow the
// source; the I3 pattern is this design's reading of a damaged table row.
// The patterns come from two shift registers, as the source suggests: a
// one-hot ring register walks the selected input, and the PLA's own
// column-select register walks a single 0 (this module drives its shift
// controls sr_op / sr_in so that S is correct in the cycle a pattern is
// applied).
//
// Interface and timing: a one-cycle 'start' pulse while idle presets the S
// register; the first pattern I1 is applied in the next cycle.  'valid' is
// high while a pattern is applied.  'win_end' marks the last pattern of each
// of the seven parity-check windows and 'win' numbers the window (see
// parity_bist).  After the last pattern the S register is cleared (normal
// operation) and 'done' pulses for one cycle.  x/c1/c2 are 0 when idle;
// the enclosing design muxes in the functional inputs then.
module tpg #(
  parameter int unsigned N = pla_pkg::DEF_N,
  parameter int unsigned K = pla_pkg::DEF_M + 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [N-1:0]     x,
  output logic             c1,
  output logic             c2,
  output pla_pkg::sr_op_e  sr_op,
  output logic             sr_in,
  output logic             valid,
  output logic             win_end,
  output logic [2:0]       win,
  output pla_pkg::phase_e  phase,
  output logic             busy,
  output logic             done
);
  import pla_pkg::*;

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned JW = (K > 1) ? $clog2(K) : 1;

  phase_e        ph, ph_n;
  logic [IW-1:0] i, i_n;
  logic [JW-1:0] j, j_n;
  logic [N-1:0]  xsel, xsel_n;   // one-hot input selector ring

  wire last_i = (i == IW'(N - 1));
  wire last_j = (j == JW'(K - 1));
  wire prev_j = (j == JW'(K - 2));

  // Pattern outputs for the current state.
  always_comb begin
    x = '0; c1 = 1'b0; c2 = 1'b0;
    unique case (ph)
      PH_I1, PH_I2: begin x = '0;    c1 = 1'b1; c2 = 1'b0; end
      PH_I3:        begin x = '1;    c1 = 1'b0; c2 = 1'b1; end
      PH_I4:        begin x = ~xsel; c1 = 1'b0; c2 = 1'b1; end
      PH_I5:        begin x =  xsel; c1 = 1'b1; c2 = 1'b0; end
      default: ;
    endcase
  end

  assign valid = (ph inside {PH_I1, PH_I2, PH_I3, PH_I4, PH_I5});
  assign busy  = (ph != PH_IDLE);
  assign done  = (ph == PH_DONE);
  assign phase = ph;

  // Window boundaries of the parity check.
  always_comb begin
    win_end = 1'b0; win = 3'd0;
    unique case (ph)
      PH_I2: begin win_end = prev_j || last_j; win = last_j ? 3'd1 : 3'd0; end
      PH_I3: begin win_end = 1'b1; win = 3'd2; end
      PH_I4: begin win_end = last_i && (prev_j || last_j); win = last_j ? 3'd4 : 3'd3; end
      PH_I5: begin win_end = last_i && (prev_j || last_j); win = last_j ? 3'd6 : 3'd5; end
      default: ;
    endcase
  end

  // Next state and shift-register control for the next pattern.
  always_comb begin
    ph_n = ph; i_n = i; j_n = j; xsel_n = xsel;
    sr_op = SR_HOLD; sr_in = 1'b1;
    unique case (ph)
      PH_IDLE: if (start) begin ph_n = PH_I1; sr_op = SR_SET; end
      PH_I1: begin ph_n = PH_I2; j_n = '0; sr_op = SR_SHIFT; sr_in = 1'b0; end
      PH_I2: begin
        if (last_j) ph_n = PH_I3;            // keep the 0 on S(K)
        else begin j_n = j + 1'b1; sr_op = SR_SHIFT; end
      end
      PH_I3: begin
        ph_n = PH_I4; i_n = '0; j_n = '0; xsel_n = N'(1);
        sr_op = SR_SHIFT; sr_in = 1'b0;      // old 0 falls off, new 0 at S(1)
      end
      PH_I4, PH_I5: begin
        if (!last_i) begin
          i_n = i + 1'b1; xsel_n = {xsel[N-2:0], xsel[N-1]};
        end else begin
          i_n = '0; xsel_n = N'(1);
          if (!last_j) begin
            j_n = j + 1'b1; sr_op = SR_SHIFT;
          end else if (ph == PH_I4) begin
            ph_n = PH_I5; j_n = '0; sr_op = SR_SHIFT; sr_in = 1'b0;
          end else begin
            ph_n = PH_DONE; sr_op = SR_CLR;
          end
        end
      end
      PH_DONE: ph_n = PH_IDLE;
      default: ph_n = PH_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= PH_IDLE; i <= '0; j <= '0; xsel <= N'(1);
    end else begin
      ph <= ph_n; i <= i_n; j <= j_n; xsel <= xsel_n;
    end
  end
endmodule
