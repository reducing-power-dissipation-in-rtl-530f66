// precharge_ctrl_elem -- modified pre-charge control for one bit-line column.
//
// One element sits between a column's original pre-charge signal and its
// pre-charge circuit. It is a 2:1 multiplexer (two transmission gates and an
// inverter in the transistor-level original) whose select comes from a NAND of
// the mode signal lptest and the column's active-low select cs_n:
//
//   sel    = ~(lptest & cs_n)
//   npr_n  = sel ? pr_n : cs_n_prev
//
// * lptest = 0 (functional mode): npr_n follows the original pre-charge pr_n.
// * lptest = 1, column selected (cs_n = 0): the NAND forces functional
//   behaviour, so the selected column keeps its normal pre-charge timing.
// * lptest = 1, column not selected: the pre-charge is driven by the previous
//   column's select, so it is on (npr_n = 0) only when column j-1 is the one
//   being accessed, i.e. when this column is the next to be accessed.
//
// All pre-charge and select signals are active low. The gate structure is the
// one the low-power pre-charge scheme specifies; the element is purely
// combinational and has no timing of its own.
module precharge_ctrl_elem (
  input  logic lptest,     // 1 = low-power test mode
  input  logic pr_n,       // original pre-charge command of this column (0 = on)
  input  logic cs_n,       // this column's select, active low
  input  logic cs_n_prev,  // previous column's select, active low
  output logic npr_n       // modified pre-charge command (0 = on)
);

  logic sel_functional;

  always_comb begin
    sel_functional = ~(lptest & cs_n);
    npr_n          = sel_functional ? pr_n : cs_n_prev;
  end

endmodule
