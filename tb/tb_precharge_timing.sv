// tb_precharge_timing -- checks the functional pre-charge commands.
//
// In the operation half only the selected columns have their pre-charge off;
// in the restoration half all columns are pre-charged.
module tb_precharge_timing;
  localparam int COLS = 32;
  logic [COLS-1:0] cs_n, pr_n_op, pr_n_rest;
  int checks = 0, failures = 0;

  precharge_timing #(.COLS(COLS)) dut (.cs_n, .pr_n_op, .pr_n_rest);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      logic [COLS-1:0] sel;
      sel  = (t < COLS) ? (COLS'(1) << t) : COLS'($urandom);
      cs_n = ~sel;
      #1;
      for (int j = 0; j < COLS; j++) begin
        checks += 2;
        // off (1) in the operation half exactly when selected
        if (pr_n_op[j] !== sel[j]) begin
          failures++;
          $display("FAIL op half col %0d sel=%b pr_n=%b", j, sel[j], pr_n_op[j]);
        end
        if (pr_n_rest[j] !== 1'b0) begin
          failures++;
          $display("FAIL restore half col %0d not pre-charged", j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
