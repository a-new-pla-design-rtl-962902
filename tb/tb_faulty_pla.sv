// tb_faulty_pla -- testbench helper: an augmented PLA assembled from the
// design's decoder, shift register, AND plane and OR plane, with up to two
// line faults inserted between them.  The augmented personalities (all
// columns, all output rows) are given by the instantiating testbench.
// Fault codes (FT*, index FI*):
//   1/2 input X(FI) stuck-at-0/1        3/4 C1 / C2 stuck at FI (0 or 1)
//   5/6 row Q(FI) stuck-at-0/1          7/8 product line P(FI) stuck-at-0/1
//   9/10 output row FI stuck-at-0/1     11/12 S(FI) stuck-at-0/1
//   13 C1-C2 bridge   14 Q(FI)-Q(FI+1) bridge   15 P(FI)-P(FI+1) bridge
//   16 output rows FI, FI+1 bridge
// Bridges are wired-AND (a low line wins, as in NMOS).  Code 0 = no fault.
module tb_faulty_pla #(
  parameter int unsigned N = 3,
  parameter int unsigned K = 6,
  parameter int unsigned R = 5,
  parameter logic [K-1:0][2*N-1:0] AAND = '0,
  parameter logic [R-1:0][K-1:0]   AOR  = '0,
  parameter int FT0 = 0, parameter int FI0 = 0,
  parameter int FT1 = 0, parameter int FI1 = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N-1:0]             x,
  input  logic                     c1,
  input  logic                     c2,
  input  pla_pkg::sr_op_e          sr_op,
  input  logic                     sr_in,
  output logic [R-1:0]             out
);
  logic [N-1:0]   xf;
  logic           c1f, c2f;
  logic [2*N-1:0] q, qf;
  logic [K-1:0]   s, sf, p, pf;
  logic [R-1:0]   o;

  function automatic logic [63:0] apply(logic [63:0] v, int w, int lo, int hi);
    // lo: stuck-at code base, hi: bridge code for this line group
    for (int k = 0; k < 2; k++) begin
      int ft, fi;
      ft = (k == 0) ? FT0 : FT1;
      fi = (k == 0) ? FI0 : FI1;
      if (ft == lo)     v[fi] = 1'b0;
      if (ft == lo + 1) v[fi] = 1'b1;
      if (ft == hi && fi + 1 < w) begin
        logic b;
        b = v[fi] & v[fi+1];
        v[fi] = b; v[fi+1] = b;
      end
    end
    return v;
  endfunction

  always_comb begin
    logic [63:0] t;
    t = apply(64'(x), N, 1, -1);  xf = t[N-1:0];
    c1f = c1; c2f = c2;
    for (int k = 0; k < 2; k++) begin
      int ft, fi;
      ft = (k == 0) ? FT0 : FT1;
      fi = (k == 0) ? FI0 : FI1;
      if (ft == 3) c1f = 1'(fi);
      if (ft == 4) c2f = 1'(fi);
      if (ft == 13) begin c1f = c1f & c2f; c2f = c1f; end
    end
  end

  pla_decoder #(.N(N)) u_dec (.x(xf), .c1(c1f), .c2(c2f), .q(q));
  col_select_sr #(.K(K)) u_sr (.clk(clk), .rst_n(rst_n), .op(sr_op), .sin(sr_in), .s(s));

  always_comb begin
    logic [63:0] t;
    t = apply(64'(q), 2*N, 5, 14); qf = t[2*N-1:0];
    t = apply(64'(s), K, 11, -1);  sf = t[K-1:0];
  end

  pla_and_plane #(.N(N), .K(K), .PERS(AAND)) u_and (.q(qf), .s(sf), .p(p));

  always_comb begin
    logic [63:0] t;
    t = apply(64'(p), K, 7, 15); pf = t[K-1:0];
  end

  pla_or_plane #(.K(K), .L(R), .PERS(AOR)) u_or (.p(pf), .f(o));

  always_comb begin
    logic [63:0] t;
    t = apply(64'(o), R, 9, 16); out = t[R-1:0];
  end
endmodule
