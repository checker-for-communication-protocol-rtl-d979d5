// llc_condition: one condition of the checker description language.
//
// A condition compares one watched control signal with a numeric constant,
// "Sig Oper Int", with Oper one of ==, <>, >, >=, <, <=. The input symbols of
// a checker are built by combining such conditions with AND / OR, so this is
// the smallest unit of the generated combinational logic.
//
// Interface: sig (WIDTH bits, compared as an unsigned number) and the
// single-bit result hit. Parameters: WIDTH, OP (llc_pkg::cmp_op_e) and VALUE.
// Timing: purely combinational.
//
// The operator set and the signal/constant form follow the description
// language. Treating the signal as unsigned and giving it a width parameter
// (1 for the LocalLink control lines) are this design's choices.
module llc_condition
  import llc_pkg::*;
#(
  parameter int unsigned   WIDTH = 1,
  parameter cmp_op_e       OP    = OP_EQ,
  parameter logic [WIDTH-1:0] VALUE = '0
) (
  input  logic [WIDTH-1:0] sig,
  output logic             hit
);

  // Only the selected comparator is built.
  if (OP == OP_EQ) begin : g_eq
    assign hit = (sig == VALUE);
  end else if (OP == OP_NE) begin : g_ne
    assign hit = (sig != VALUE);
  end else if (OP == OP_GT) begin : g_gt
    assign hit = (sig > VALUE);
  end else if (OP == OP_GE) begin : g_ge
    assign hit = (sig >= VALUE);
  end else if (OP == OP_LT) begin : g_lt
    assign hit = (sig < VALUE);
  end else begin : g_le
    assign hit = (sig <= VALUE);
  end

endmodule
