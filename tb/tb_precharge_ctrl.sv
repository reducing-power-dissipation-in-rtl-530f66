// tb_precharge_ctrl -- checks the chained pre-charge control of a 16-column row.
//
// For every single selected column (and for no selection) in both modes, with
// the original pre-charge of the operation half (off only on the selected
// column) and of the restoration half (all on), it checks exactly which
// columns end up pre-charged: in low-power mode the selected column follows
// its original pre-charge and only the column right after it is also on;
// column 0 is never pre-charged through the chain. Random vectors check the
// per-column rule as well.
module tb_precharge_ctrl;
  localparam int COLS = 16;
  logic            lptest;
  logic [COLS-1:0] pr_n, cs_n, npr_n;
  int checks = 0, failures = 0;

  precharge_ctrl #(.COLS(COLS)) dut (.lptest, .pr_n, .cs_n, .npr_n);

  task automatic expect_on(input logic [COLS-1:0] exp_on, input string what);
    #1;
    checks++;
    if (~npr_n !== exp_on) begin
      failures++;
      $display("FAIL %s: pre-charged %h expected %h", what, ~npr_n, exp_on);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < COLS; s++) begin
      logic [COLS-1:0] sel, nxt;
      sel  = COLS'(1) << s;
      nxt  = (s < COLS - 1) ? (COLS'(1) << (s + 1)) : '0;
      cs_n = ~sel;
      // functional mode
      lptest = 0; pr_n = sel;  expect_on(~sel, "functional op half");
      lptest = 0; pr_n = '0;   expect_on('1, "functional restore half");
      // low-power mode
      lptest = 1; pr_n = sel;  expect_on(nxt, "low-power op half");
      lptest = 1; pr_n = '0;   expect_on(sel | nxt, "low-power restore half");
    end
    // no access: low-power mode leaves everything off, functional all on
    cs_n = '1; pr_n = '0;
    lptest = 1; expect_on('0, "low-power idle");
    lptest = 0; expect_on('1, "functional idle");
    // random vectors against the per-column rule
    for (int t = 0; t < 200; t++) begin
      logic [COLS-1:0] exp_on;
      lptest = 1'($urandom);
      pr_n   = COLS'($urandom);
      cs_n   = COLS'($urandom);
      for (int j = 0; j < COLS; j++) begin
        logic prev;
        prev = (j == 0) ? 1'b1 : cs_n[j-1];
        if (lptest && cs_n[j]) exp_on[j] = ~prev;
        else                   exp_on[j] = ~pr_n[j];
      end
      expect_on(exp_on, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
