// col_select_sr -- shift register that selects product lines of the PLA.
//
// Bit S(j) gates product line j (see pla_and_plane): S(j) = 0 enables the
// column.  In normal operation the register holds all zeros so every product
// term is active.  For test, the register is preset to all ones (no column
// selected) and a single 0 is shifted in at S(1) and walked along the
// columns, so exactly one product line is selected at a time.
// Operations (pla_pkg::sr_op_e), applied at the rising clock edge:
//   SR_HOLD keep, SR_SHIFT S(1) <= sin and S(j+1) <= S(j), SR_SET all ones,
//   SR_CLR all zeros.  Asynchronous active-low reset clears the register
//   (normal operation).  The shift register and its role follow the source;
//   the preset/clear controls and reset value are this design's choice.
module col_select_sr #(
  parameter int unsigned K = pla_pkg::DEF_M + 1   // cells, one per column
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pla_pkg::sr_op_e  op,
  input  logic             sin,   // serial input into S(1)
  output logic [K-1:0]     s      // s[j] = S(j+1)
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= '0;
    else begin
      case (op)
        pla_pkg::SR_SHIFT: begin
          s[0] <= sin;
          for (int j = 1; j < K; j++) s[j] <= s[j-1];
        end
        pla_pkg::SR_SET: s <= '1;
        pla_pkg::SR_CLR: s <= '0;
        default: ;
      endcase
    end
  end
endmodule
