// tb_march_bist -- checks the March controller against a simple memory.
//
// A 4-row, 4-column, 2-bit-word memory is modelled directly in the
// testbench (read data registered, one cycle latency). Each of the five
// algorithms is run in low-power mode and the testbench checks, against
// numbers worked out by hand from the algorithms' definitions:
//   * run length = operations x cells cycles, read and write counts;
//   * cycles with lptest high (ascending elements minus one restoring cycle
//     per row) and the number of restoring cycles (one per row per
//     ascending element);
//   * that after a cycle with lptest high the next different address is the
//     next column of the same row (the column pre-charged in advance),
//     unless a functional cycle intervenes;
//   * no failure on a good memory.
// Then March C- runs in functional mode (lptest never high) and against a
// memory with one stuck-at-1 cell, which must be reported.
module tb_march_bist;
  import lp_sram_pkg::*;
  localparam int ROWS = 4, CPB = 4, W = 2, CELLS = ROWS * CPB;
  logic clk = 0, rst_n = 0, start = 0, lp_en = 1;
  march_alg_e alg = ALG_MARCH_CM;
  logic busy, done, fail, acc, we, lptest;
  logic [15:0] err_count;
  logic [W-1:0] wdata, rdata;
  logic [1:0] row, col;
  logic [W-1:0] mem [ROWS][CPB];
  bit stuck = 0;
  int checks = 0, failures = 0;

  march_bist #(.ROWS(ROWS), .WPR(CPB), .WIDTH(W)) dut (
    .clk, .rst_n, .start, .alg, .lp_en, .busy, .done, .fail, .err_count,
    .acc, .we, .wdata, .row, .col, .lptest, .rdata);

  always #5 clk = ~clk;

  // memory; with stuck set, bit 0 of cell (2,1) always reads 1
  always_ff @(posedge clk) begin
    if (acc && we) mem[row][col] <= wdata;
    if (acc && !we) rdata <= mem[row][col] | ((stuck && row == 2 && col == 1) ? 2'b01 : 2'b00);
  end

  initial begin
    #2000000;
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

  // expected per algorithm: ops, reads, writes, lptest cycles, restoring cycles
  int exp_ops[5]  = '{10, 22, 5, 14, 23};
  int exp_rd[5]   = '{5, 13, 2, 8, 10};
  int exp_wr[5]   = '{5, 9, 3, 6, 13};
  int exp_lp[5]   = '{80, 176, 40, 100, 236};
  int exp_rst[5]  = '{16, 16, 8, 12, 20};

  task automatic run(input march_alg_e a, input bit lp, output int cyc, output int nrd,
                     output int nwr, output int nlp, output int nrst, output int order_err);
    logic prev_lp;
    logic [1:0] prow, pcol;
    bit pending;
    alg = a; lp_en = lp;
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0; nrd = 0; nwr = 0; nlp = 0; nrst = 0; order_err = 0;
    prev_lp = 0; pending = 0; prow = 0; pcol = 0;
    while (!done) begin
      if (acc) begin
        cyc++;
        if (we) nwr++; else nrd++;
        if (lptest) nlp++;
        if (prev_lp && !lptest) nrst++;
        if (pending && (row != prow || col != pcol)) begin
          if (!(row == prow && col == pcol + 2'd1)) order_err++;
          pending = 0;
        end
        if (lptest) begin
          pending = 1; prow = row; pcol = col;
        end else begin
          pending = 0;  // a functional cycle pre-charges every column
        end
        prev_lp = lptest;
      end
      @(negedge clk);
      if (cyc > 1000) break;
    end
    @(negedge clk);
  endtask

  initial begin
    int cyc, nrd, nwr, nlp, nrst, oerr;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int a = 0; a < 5; a++) begin
      run(march_alg_e'(a), 1, cyc, nrd, nwr, nlp, nrst, oerr);
      check(cyc == exp_ops[a] * CELLS, $sformatf("alg %0d cycles %0d", a, cyc));
      check(nrd == exp_rd[a] * CELLS && nwr == exp_wr[a] * CELLS,
            $sformatf("alg %0d reads %0d writes %0d", a, nrd, nwr));
      check(nlp == exp_lp[a], $sformatf("alg %0d lptest cycles %0d expected %0d", a, nlp, exp_lp[a]));
      check(nrst == exp_rst[a], $sformatf("alg %0d restoring cycles %0d expected %0d", a, nrst, exp_rst[a]));
      check(oerr == 0, $sformatf("alg %0d address order errors %0d", a, oerr));
      check(!fail && err_count == 0, $sformatf("alg %0d false failure", a));
    end
    run(ALG_MARCH_CM, 0, cyc, nrd, nwr, nlp, nrst, oerr);
    check(cyc == 10 * CELLS && nlp == 0 && !fail, "functional-mode March C-");
    stuck = 1;
    run(ALG_MARCH_CM, 1, cyc, nrd, nwr, nlp, nrst, oerr);
    // March C- reads cell (2,1) expecting 0 three times: elements 2, 4, 6
    check(fail && err_count == 3, $sformatf("stuck-at-1 fail=%b errors=%0d", fail, err_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
