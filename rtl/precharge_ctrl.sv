// precharge_ctrl -- modified pre-charge control circuitry for a whole array row.
//
// One precharge_ctrl_elem per column. Column j's multiplexer receives the
// select of column j-1, so in low-power test mode the column that follows the
// one being accessed is pre-charged and every other unselected column has its
// pre-charge switched off. The select of the last column is not wrapped round
// to column 0: column 0's "previous select" input is tied inactive (1), which
// keeps column 0's pre-charge off in low-power mode unless it is selected.
// That is sufficient because the controller returns the array to functional
// mode for the last operation of each row, which restores every bit line.
//
// Purely combinational. COLS is the number of bit-line columns.
module precharge_ctrl #(
  parameter int unsigned COLS = 512
) (
  input  logic            lptest,
  input  logic [COLS-1:0] pr_n,   // original pre-charge commands, 0 = on
  input  logic [COLS-1:0] cs_n,   // column selects, active low
  output logic [COLS-1:0] npr_n   // modified pre-charge commands, 0 = on
);

  logic [COLS-1:0] cs_n_prev;

  assign cs_n_prev = {cs_n[COLS-2:0], 1'b1};

  for (genvar j = 0; j < COLS; j++) begin : g_col
    precharge_ctrl_elem u_elem (
      .lptest    (lptest),
      .pr_n      (pr_n[j]),
      .cs_n      (cs_n[j]),
      .cs_n_prev (cs_n_prev[j]),
      .npr_n     (npr_n[j])
    );
  end

endmodule
