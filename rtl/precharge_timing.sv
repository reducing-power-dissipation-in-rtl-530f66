// precharge_timing -- original (functional-mode) pre-charge commands.
//
// A memory cycle has two halves. In the operation half the selected column's
// pre-charge is off so its cell can drive (read) or be driven (write) through
// the bit lines, while every other column stays pre-charged. In the
// restoration half every column, the selected one included, is pre-charged so
// that all bit lines are back at VDD for the next, unpredictable, access.
//
// The two halves are given as two vectors: pr_n_op applies during the
// operation half and pr_n_rest during the restoration half. Active low
// (0 = pre-charge on). Purely combinational.
module precharge_timing #(
  parameter int unsigned COLS = 512
) (
  input  logic [COLS-1:0] cs_n,       // column selects, active low
  output logic [COLS-1:0] pr_n_op,    // pre-charge command, operation half
  output logic [COLS-1:0] pr_n_rest   // pre-charge command, restoration half
);

  always_comb begin
    pr_n_op   = ~cs_n;  // off (1) exactly on the selected columns
    pr_n_rest = '0;     // every column restored
  end

endmodule
