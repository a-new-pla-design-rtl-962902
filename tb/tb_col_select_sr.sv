// tb_col_select_sr -- checks reset, preset, clear, hold and serial shift of
// the column-select register against a queue model.
module tb_col_select_sr;
  import pla_pkg::*;
  localparam int unsigned K = 7;
  logic clk = 0, rst_n = 1, sin = 0;
  sr_op_e op = SR_HOLD;
  logic [K-1:0] s;
  logic [K-1:0] model;
  int checks = 0, failures = 0;

  col_select_sr #(.K(K)) dut (.clk(clk), .rst_n(rst_n), .op(op), .sin(sin), .s(s));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1;
    checks++; if (s !== '0) begin failures++; $display("reset value %b", s); end
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      case ($urandom % 8)
        0: op = SR_SET;
        1: op = SR_CLR;
        2, 3: op = SR_HOLD;
        default: op = SR_SHIFT;
      endcase
      sin = 1'($urandom);
      @(posedge clk); #1;
      case (op)
        SR_SET:   model = '1;
        SR_CLR:   model = '0;
        SR_SHIFT: model = {model[K-2:0], sin};
        default: ;
      endcase
      checks++;
      if (s !== model) begin
        failures++;
        $display("op %s sin %b got %b exp %b", op.name(), sin, s, model);
      end
    end
    // A walking zero selects exactly one column at a time.
    @(negedge clk); op = SR_SET;
    @(negedge clk); op = SR_SHIFT; sin = 0;
    for (int j = 0; j < K; j++) begin
      @(negedge clk); sin = 1;
      checks++;
      if (s !== ~(K'(1) << j)) begin failures++; $display("walk %0d got %b", j, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
