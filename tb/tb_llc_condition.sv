// tb_llc_condition: self-checking test of llc_condition.
//
// Builds one 4-bit condition per comparison operator, all against the
// constant 5, plus the 1-bit conditions the LocalLink checker uses (== 0,
// == 1, <> 0), sweeps every input value and compares each result with the
// comparison worked out here on plain integers. A watchdog ends the run with
// a failure if it does not finish in time.
module tb_llc_condition;
  import llc_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [3:0] sig4;
  logic       sig1;
  logic [5:0] hit4;
  logic [2:0] hit1;

  llc_condition #(.WIDTH(4), .OP(OP_EQ), .VALUE(4'd5)) u_eq (.sig(sig4), .hit(hit4[0]));
  llc_condition #(.WIDTH(4), .OP(OP_NE), .VALUE(4'd5)) u_ne (.sig(sig4), .hit(hit4[1]));
  llc_condition #(.WIDTH(4), .OP(OP_GT), .VALUE(4'd5)) u_gt (.sig(sig4), .hit(hit4[2]));
  llc_condition #(.WIDTH(4), .OP(OP_GE), .VALUE(4'd5)) u_ge (.sig(sig4), .hit(hit4[3]));
  llc_condition #(.WIDTH(4), .OP(OP_LT), .VALUE(4'd5)) u_lt (.sig(sig4), .hit(hit4[4]));
  llc_condition #(.WIDTH(4), .OP(OP_LE), .VALUE(4'd5)) u_le (.sig(sig4), .hit(hit4[5]));

  llc_condition                                        u_d0 (.sig(sig1), .hit(hit1[0]));
  llc_condition #(.WIDTH(1), .OP(OP_EQ), .VALUE(1'b1)) u_d1 (.sig(sig1), .hit(hit1[1]));
  llc_condition #(.WIDTH(1), .OP(OP_NE), .VALUE(1'b0)) u_n0 (.sig(sig1), .hit(hit1[2]));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sig1 = 1'b0;
    for (int v = 0; v < 16; v++) begin
      sig4 = 4'(v);
      #1;
      check($sformatf("%0d == 5", v), hit4[0], v == 5);
      check($sformatf("%0d <> 5", v), hit4[1], v != 5);
      check($sformatf("%0d > 5",  v), hit4[2], v > 5);
      check($sformatf("%0d >= 5", v), hit4[3], v >= 5);
      check($sformatf("%0d < 5",  v), hit4[4], v < 5);
      check($sformatf("%0d <= 5", v), hit4[5], v <= 5);
    end
    for (int v = 0; v < 2; v++) begin
      sig1 = 1'(v);
      #1;
      check($sformatf("%0d == 0", v), hit1[0], v == 0);
      check($sformatf("%0d == 1", v), hit1[1], v == 1);
      check($sformatf("%0d <> 0", v), hit1[2], v != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
