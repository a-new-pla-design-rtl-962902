// parity_counter -- bank of one-bit parity counters (toggle flip-flops).
//
// Each bit counts, modulo 2, the ones seen on its response line: when 'en'
// is high at a rising clock edge the bit toggles if its input is 1.  'clr'
// (synchronous, dominant) zeroes the bank; asynchronous reset does too.
// 'q_next' is the parity including the current input, so a check can be
// made in the same cycle as the last response of a window.  Follows the
// parity counter of the parity-compression test scheme; the clear input is
// this design's choice.
module parity_counter #(
  parameter int unsigned W = pla_pkg::DEF_L + 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [W-1:0] q_next
);
  assign q_next = en ? (q ^ d) : q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else          q <= q_next;
  end
endmodule
