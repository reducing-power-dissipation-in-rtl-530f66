// tb_lp_sram_full -- the 512 x 512 bit-oriented memory at its default size.
//
// Writes a few cells through the user port, then runs March C- over the
// whole array in low-power mode (10 operations x 262144 cells = 2,621,440
// cycles). The run must pass, take exactly that many cycles, cause no faulty
// swap and no access to an unprepared column, and use the number of
// pre-charge half-cycles worked out from March C-'s element list (see
// tb_lp_sram_harness for the cost of each kind of cycle). Finally the user
// port reads back the all-zero background March C- leaves.
module tb_lp_sram_full;
  import lp_sram_pkg::*;
  localparam int ROWS = 512, COLS = 512, CELLS = ROWS * COLS;
  logic clk = 0, rst_n = 0, test_mode = 0, f_acc = 0, f_we = 0, bist_start = 0, bist_lp_en = 1;
  logic [8:0] f_row = 0, f_word = 0;
  logic [0:0] f_wdata = 0, rdata;
  march_alg_e bist_alg = ALG_MARCH_CM;
  logic bist_busy, bist_done, bist_fail, lptest;
  logic [15:0] bist_err_count;
  logic [31:0] swap_count, unprep_count;
  logic [47:0] pre_on_count;
  int checks = 0, failures = 0;

  lp_sram_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic user_access(input bit w, input int r, input int c, input bit d);
    f_acc = 1; f_we = w; f_row = 9'(r); f_word = 9'(c); f_wdata = d;
    @(negedge clk);
    f_acc = 0; f_we = 0;
  endtask

  initial begin
    longint exp_pre, lp_cyc;
    logic [47:0] pc0;
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    user_access(1, 3, 7, 1);
    user_access(1, 511, 511, 0);
    user_access(0, 3, 7, 0);
    check(rdata == 1'b1, "user read (3,7)");
    user_access(0, 511, 511, 0);
    check(rdata == 1'b0, "user read (511,511)");
    // March C-: ascending elements have 1+2+2+1 = 6 operations, descending 4.
    // Low-power cycles: 6 * CELLS minus one restoring cycle per row per
    // ascending element (4 * ROWS). Each costs 1 + 2*1 half-cycles, except at
    // the last column, which has no right-hand neighbour: there only the
    // first operation of the two 2-operation elements is low-power (ROWS * 2
    // cycles) and costs 1. Other cycles cost (COLS-1) + COLS; the idle cycle
    // that takes start costs 2 * COLS.
    lp_cyc  = 6 * longint'(CELLS) - 4 * ROWS;
    exp_pre = 2 * COLS + lp_cyc * 3 - 2 * (2 * ROWS)
              + (10 * longint'(CELLS) - lp_cyc) * (2 * COLS - 1);
    test_mode = 1;
    @(negedge clk);
    pc0 = pre_on_count;
    bist_start = 1;
    @(negedge clk);
    bist_start = 0;
    cyc = 0;
    while (!bist_done && cyc < 11 * CELLS) begin
      if (bist_busy) cyc++;
      @(negedge clk);
    end
    check(bist_done && !bist_fail && bist_err_count == 0, "March C- failed");
    check(cyc == 10 * CELLS, $sformatf("March C- took %0d cycles", cyc));
    check(swap_count == 0 && unprep_count == 0,
          $sformatf("disturbs: swaps %0d unprepared %0d", swap_count, unprep_count));
    check(pre_on_count - pc0 == 48'(exp_pre),
          $sformatf("pre-charge half-cycles %0d expected %0d", pre_on_count - pc0, exp_pre));
    $display("March C- low-power: %0d pre-charge half-cycles, functional would be %0d",
             pre_on_count - pc0, 2 * COLS + 10 * longint'(CELLS) * (2 * COLS - 1));
    test_mode = 0;
    @(negedge clk);
    for (int k = 0; k < 50; k++) begin
      user_access(0, $urandom_range(0, ROWS - 1), $urandom_range(0, COLS - 1), 0);
      check(rdata == 1'b0, "background after March C-");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
