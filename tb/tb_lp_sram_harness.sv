// tb_lp_sram_harness -- end-to-end test sequence for one lp_sram_top instance.
//
// Used by tb_lp_sram_top for several array organisations. Sequence:
//   1. functional mode: random user writes and reads against a reference;
//   2. test mode: each of the five March algorithms in low-power mode and in
//      functional mode. Each run must pass, take operations x cells cycles,
//      and cause no faulty swap and no access to an unprepared column. The
//      pre-charge half-cycles of each run are compared with a count worked
//      out here from the algorithm's element list: a functional cycle costs
//      (COLS - BLOCKS) + COLS, a low-power cycle at column position c costs
//      BLOCKS + 2 * next(c), next(c) being the number of selected columns that
//      have a right-hand neighbour;
//   3. back to functional mode: the background left by MATS+ (all zeros) is
//      read back, then random traffic again;
//   4. a cell is flipped behind the BIST's back during a March C- run, which
//      must then report a failure.
// It counts how often each mechanism occurred (low-power cycles, restoring
// cycles at row ends, functional cycles inside a low-power run, user
// accesses, mode switches, detected failures) and reports them.
module tb_lp_sram_harness #(
  parameter int ROWS   = 8,
  parameter int COLS   = 16,
  parameter int BLOCKS = 1,
  parameter int WORD_BITS = BLOCKS
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   mech [6]
);
  import lp_sram_pkg::*;
  localparam int CPB = COLS / BLOCKS, SUBW = BLOCKS / WORD_BITS, WPR = CPB * SUBW;
  localparam int RAW = clog2_min1(ROWS), WAW = clog2_min1(WPR);

  logic rst_n = 0, test_mode = 0, f_acc = 0, f_we = 0, bist_start = 0, bist_lp_en = 0;
  logic [RAW-1:0] f_row = 0;
  logic [WAW-1:0] f_word = 0;
  logic [WORD_BITS-1:0] f_wdata = 0, rdata;
  march_alg_e bist_alg = ALG_MARCH_CM;
  logic bist_busy, bist_done, bist_fail, lptest;
  logic [15:0] bist_err_count;
  logic [31:0] swap_count, unprep_count;
  logic [47:0] pre_on_count;
  logic [WORD_BITS-1:0] refm [ROWS][WPR];

  lp_sram_top #(.ROWS(ROWS), .COLS(COLS), .BLOCKS(BLOCKS), .WORD_BITS(WORD_BITS)) dut (.*);

  // mechanism counters: 0 low-power cycles, 1 restoring cycles, 2 functional
  // cycles during a low-power run, 3 user accesses, 4 mode switches,
  // 5 failures detected
  logic prev_lp = 0, prev_tm = 0, prev_fail = 0;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (lptest) mech[0] <= mech[0] + 1;
      if (prev_lp && !lptest) mech[1] <= mech[1] + 1;
      if (bist_busy && bist_lp_en && !lptest) mech[2] <= mech[2] + 1;
      if (!test_mode && f_acc) mech[3] <= mech[3] + 1;
      if (prev_tm != test_mode) mech[4] <= mech[4] + 1;
      if (bist_fail && !prev_fail) mech[5] <= mech[5] + 1;
    end
    prev_lp   <= lptest;
    prev_tm   <= test_mode;
    prev_fail <= bist_fail;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [%0dx%0d, %0d blocks, %0d-bit words] %s", ROWS, COLS, BLOCKS, WORD_BITS, msg);
    end
  endtask

  // element lists: operations per element and ascending (1) or descending (0)
  int n_el[5]     = '{6, 6, 3, 6, 7};
  int n_ops[5][7] = '{'{1,2,2,2,2,1,0}, '{1,5,5,5,5,1,0}, '{1,2,2,0,0,0,0},
                      '{1,4,2,1,4,2,0}, '{1,6,3,4,3,3,3}};
  int el_up[5][7] = '{'{1,1,1,0,0,1,0}, '{1,1,1,0,0,1,0}, '{1,1,0,0,0,0,0},
                      '{0,1,1,1,0,0,0}, '{1,1,1,0,0,1,1}};

  localparam longint BLK = 64'(BLOCKS), CLS = 64'(COLS);
  function automatic longint exp_cost(int a, bit lp);
    longint sum = 2 * COLS;  // the idle cycle in which start is taken
    for (int e = 0; e < n_el[a]; e++)
      for (int r = 0; r < ROWS; r++)
        for (int w = 0; w < WPR; w++)
          for (int o = 0; o < n_ops[a][e]; o++) begin
            longint nxt;
            int c;
            c   = w / SUBW;
            nxt = (c < CPB - 1) ? BLK : BLK - 1;
            if (lp && el_up[a][e] == 1 && !(o == n_ops[a][e] - 1 && w == WPR - 1))
              sum += BLK + 2 * nxt;
            else
              sum += (CLS - BLK) + CLS;
          end
    return sum;
  endfunction

  task automatic user_access(input bit w, input int r, input int c, input logic [WORD_BITS-1:0] d);
    f_acc = 1; f_we = w; f_row = RAW'(r); f_word = WAW'(c); f_wdata = d;
    if (w) refm[r][c] = d;
    @(negedge clk);
    f_acc = 0; f_we = 0;
  endtask

  task automatic user_traffic(input int n);
    for (int k = 0; k < n; k++) begin
      int r, c;
      r = $urandom_range(0, ROWS - 1);
      c = $urandom_range(0, WPR - 1);
      if ($urandom_range(0, 1) == 1) begin
        user_access(1, r, c, WORD_BITS'($urandom));
      end else begin
        user_access(0, r, c, '0);
        check(rdata === refm[r][c], $sformatf("user read r%0d c%0d got %h expected %h",
                                              r, c, rdata, refm[r][c]));
      end
    end
  endtask

  task automatic run_bist(input int a, input bit lp, input bit inject);
    logic [47:0] pc0;
    logic [31:0] sw0, up0;
    int cyc;
    pc0 = pre_on_count; sw0 = swap_count; up0 = unprep_count;
    bist_alg = march_alg_e'(a); bist_lp_en = lp; bist_start = 1;
    @(negedge clk);
    bist_start = 0;
    cyc = 0;
    while (!bist_done && cyc < 30 * ROWS * WPR) begin
      if (bist_busy) cyc++;
      if (inject && cyc == ROWS * WPR + 3) dut.u_array.mem[ROWS / 2][COLS / 2] ^= 1'b1;
      @(negedge clk);
    end
    if (inject) begin
      check(bist_fail && bist_err_count > 0, "injected upset not detected");
    end else begin
      check(!bist_fail, $sformatf("alg %0d lp %0d failed, %0d errors", a, lp, bist_err_count));
      check(cyc == (n_ops[a][0] + n_ops[a][1] + n_ops[a][2] + n_ops[a][3] + n_ops[a][4]
                    + n_ops[a][5] + n_ops[a][6]) * ROWS * WPR,
            $sformatf("alg %0d lp %0d took %0d cycles", a, lp, cyc));
      check(swap_count == sw0 && unprep_count == up0,
            $sformatf("alg %0d lp %0d disturbs: swaps %0d unprepared %0d", a, lp,
                      swap_count - sw0, unprep_count - up0));
      check(pre_on_count - pc0 == 48'(exp_cost(a, lp)),
            $sformatf("alg %0d lp %0d pre-charge half-cycles %0d expected %0d", a, lp,
                      pre_on_count - pc0, exp_cost(a, lp)));
    end
  endtask

  initial begin
    longint lp_cost, f_cost;
    finished = 0; checks = 0; failures = 0;
    foreach (mech[i]) mech[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. functional mode
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < WPR; c++) user_access(1, r, c, WORD_BITS'($urandom));
    user_traffic(200);
    // 2. March runs
    test_mode = 1;
    @(negedge clk);
    for (int a = 0; a < 5; a++) begin
      logic [47:0] p0, d;
      p0 = pre_on_count; run_bist(a, 1, 0); d = pre_on_count - p0; lp_cost = longint'(d);
      p0 = pre_on_count; run_bist(a, 0, 0); d = pre_on_count - p0; f_cost  = longint'(d);
      check(lp_cost < f_cost, "low-power run not cheaper");
      $display("[%0dx%0d, %0d blocks, %0d-bit words] alg %0d: pre-charge half-cycles low-power %0d functional %0d (%0d%% fewer)",
               ROWS, COLS, BLOCKS, WORD_BITS, a, lp_cost, f_cost, 100 - (100 * lp_cost) / f_cost);
    end
    run_bist(int'(ALG_MATS_P), 1, 0);
    // 3. functional mode again: MATS+ leaves zeros
    test_mode = 0;
    @(negedge clk);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < WPR; c++) refm[r][c] = '0;
    for (int k = 0; k < 20; k++) begin
      int r, c;
      r = $urandom_range(0, ROWS - 1);
      c = $urandom_range(0, WPR - 1);
      user_access(0, r, c, '0);
      check(rdata === '0, "background after MATS+");
    end
    user_traffic(100);
    // 4. upset during a run
    test_mode = 1;
    @(negedge clk);
    run_bist(int'(ALG_MARCH_CM), 1, 1);
    test_mode = 0;
    @(negedge clk);
    finished = 1;
  end
endmodule
