// pla_pkg -- shared definitions for the universally testable PLA.
//
// Holds the default array sizes, the operation codes of the column-select
// shift register, the phases of the universal test sequence, and constant
// functions used to build a default PLA personality and the reference parity
// values of the built-in test.
//
// Index conventions used throughout (all zero-based in the RTL):
//   AND-array row q[2*i]   is the complemented literal of input x[i]  (~x[i])
//   AND-array row q[2*i+1] is the true literal of input x[i]          ( x[i])
//   product line p[j] is column j of the AND array, output f[g] row g of the
//   OR array.  A '1' in an AND personality bit means a device (transistor) at
//   that crosspoint, which pulls the product line low when the row is high
//   (NOR logic).  A '1' in an OR personality bit means the product feeds the
//   output.
//
// The default sizes (60 inputs, 60 outputs, 200 product terms) are the example
// PLA whose augmentation overhead is quoted as under 5 percent.  The default
// personality is this design's own choice: the source gives no PLA function,
// so a fixed pseudo-random one is produced by hash functions below.
package pla_pkg;

  localparam int unsigned DEF_N = 60;   // inputs
  localparam int unsigned DEF_M = 200;  // product terms of the original PLA
  localparam int unsigned DEF_L = 60;   // outputs of the original PLA

  // Number of parity check windows of the built-in test (see parity_bist).
  localparam int unsigned NUM_WIN = 7;

  // Operations on the column-select shift register.
  typedef enum logic [1:0] {
    SR_HOLD  = 2'd0,  // keep contents
    SR_SHIFT = 2'd1,  // S[0] <= serial in, S[k] <= S[k-1]
    SR_SET   = 2'd2,  // all ones: no product line selected
    SR_CLR   = 2'd3   // all zeros: every product line enabled (normal use)
  } sr_op_e;

  // Test pattern classes of the universal test set (Table I naming).
  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,
    PH_I1   = 3'd1,   // no column selected, all rows low
    PH_I2   = 3'd2,   // column j selected, all rows low
    PH_I3   = 3'd3,   // last column selected, all rows low through C2
    PH_I4   = 3'd4,   // column j selected, row Q(2i-1) (complement literal) high
    PH_I5   = 3'd5,   // column j selected, row Q(2i) (true literal) high
    PH_DONE = 3'd6
  } phase_e;

  // 32-bit integer hash used for the default personality.
  function automatic logic [31:0] mix32(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] h;
    h = (a * 32'h9E37_79B1) ^ (b * 32'h85EB_CA77) ^ 32'h2545_F491;
    h = h ^ (h >> 15);
    h = h * 32'hC2B2_AE3D;
    h = h ^ (h >> 13);
    return h;
  endfunction

  // Default AND personality for product j and input i: two bits
  // {device on true row q[2i+1], device on complement row q[2i]}.  Half of the inputs are
  // "don't care" (no device), a quarter appear complemented, a quarter true.
  function automatic logic [1:0] def_and_lit(input int unsigned j, input int unsigned i);
    logic [31:0] h;
    h = mix32(32'(j), 32'(i) + 32'd7919);
    case (h[9:8])
      2'd0:    return 2'b01;  // device on ~x[i] row: product contains literal x[i]
      2'd1:    return 2'b10;  // device on x[i] row: product contains literal ~x[i]
      default: return 2'b00;
    endcase
  endfunction

  // Default OR personality: product j feeds output g with probability 1/4.
  function automatic logic def_or_bit(input int unsigned g, input int unsigned j);
    logic [31:0] h;
    h = mix32(32'(g) + 32'd104729, 32'(j));
    return h[11:10] == 2'd0;
  endfunction

  // Parity Pi(a): 1 when a is odd.
  function automatic logic par(input int unsigned a);
    return a[0];
  endfunction

  // Smallest integer not below a/2.
  function automatic int unsigned ceil_half(input int unsigned a);
    return (a + 1) / 2;
  endfunction

endpackage
