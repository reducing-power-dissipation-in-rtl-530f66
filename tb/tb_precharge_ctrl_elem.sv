// tb_precharge_ctrl_elem -- exhaustive check of one pre-charge control element.
//
// Applies all 16 input combinations and compares npr_n with a truth table
// written out from the intended behaviour: functional mode passes the
// original pre-charge, a selected column in low-power mode keeps functional
// behaviour, an unselected column in low-power mode follows the previous
// column's select.
module tb_precharge_ctrl_elem;
  logic lptest, pr_n, cs_n, cs_n_prev, npr_n;
  int checks = 0, failures = 0;

  precharge_ctrl_elem dut (.lptest, .pr_n, .cs_n, .cs_n_prev, .npr_n);

  // expected npr_n indexed by {lptest, cs_n, cs_n_prev, pr_n}
  localparam logic [15:0] TRUTH = {
    // lptest=1, cs_n=1 (unselected): follows cs_n_prev
    1'b1, 1'b1, 1'b0, 1'b0,
    // lptest=1, cs_n=0 (selected): follows pr_n
    1'b1, 1'b0, 1'b1, 1'b0,
    // lptest=0: follows pr_n
    1'b1, 1'b0, 1'b1, 1'b0,
    1'b1, 1'b0, 1'b1, 1'b0
  };

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {lptest, cs_n, cs_n_prev, pr_n} = 4'(i);
      #1;
      checks++;
      if (npr_n !== TRUTH[i]) begin
        failures++;
        $display("FAIL lptest=%b cs_n=%b cs_n_prev=%b pr_n=%b: npr_n=%b expected %b",
                 lptest, cs_n, cs_n_prev, pr_n, npr_n, TRUTH[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
