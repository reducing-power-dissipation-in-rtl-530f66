// tb_sram_array_model -- checks the behavioural array and bit-line model.
//
// A 4-row, 8-column array in two blocks of four columns (2-bit words). The
// testbench computes the pre-charge commands itself: functional mode (all
// columns pre-charged except the selected ones in the operation half) and
// low-power mode (only the selected columns and the column after each of
// them). It checks:
//   1. functional writes and random-order reads against a reference array;
//   2. pre-charge half-cycles counted for functional and low-power cycles;
//   3. a low-power pass over rows of alternating data with a functional
//      cycle at the end of each row: correct data, no disturb events;
//   4. a row change without that restoring cycle: exactly the four floating
//      columns holding the other row's value flip their cells;
//   5. an access to a column whose bit lines were left floating is counted
//      and, when they hold the opposite value, returns the wrong data.
module tb_sram_array_model;
  localparam int ROWS = 4, COLS = 8, BLOCKS = 2, CPB = 4;
  logic clk = 0, rst_n = 0, acc = 0;
  logic [BLOCKS-1:0] we = '0;
  logic [1:0] row = 0, col = 0;
  logic [BLOCKS-1:0] wdata = 0, rdata;
  logic [COLS-1:0] npr_n_op = '0, npr_n_rest = '0;
  logic [31:0] swap_count, unprep_count;
  logic [47:0] pre_on_count;
  logic [BLOCKS-1:0] refm [ROWS][CPB];
  int checks = 0, failures = 0;

  sram_array_model #(.ROWS(ROWS), .COLS(COLS), .BLOCKS(BLOCKS)) dut (
    .clk, .rst_n, .acc, .we, .row, .col_addr(col), .wdata, .npr_n_op, .npr_n_rest,
    .rdata, .swap_count, .unprep_count, .pre_on_count);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [COLS-1:0] sel_mask(input int c);
    logic [COLS-1:0] m = '0;
    for (int b = 0; b < BLOCKS; b++) m[b*CPB + c] = 1'b1;
    return m;
  endfunction

  // one access; lp = low-power pre-charge, otherwise functional
  task automatic access(input bit lp, input bit w, input int r, input int c,
                        input logic [BLOCKS-1:0] d);
    logic [COLS-1:0] s, n;
    s = sel_mask(c);
    n = (s << 1) & ~s;
    acc = 1; we = {BLOCKS{w}}; row = 2'(r); col = 2'(c); wdata = d;
    if (lp) begin
      npr_n_op   = ~n;
      npr_n_rest = ~(s | n);
    end else begin
      npr_n_op   = s;
      npr_n_rest = '0;
    end
    if (w) refm[r][c] = d;
    @(negedge clk);
  endtask

  task automatic idle();
    acc = 0; we = '0; npr_n_op = '0; npr_n_rest = '0;
    @(negedge clk);
  endtask

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic read_check(input bit lp, input int r, input int c, input logic [BLOCKS-1:0] exp);
    access(lp, 0, r, c, '0);
    check(rdata === exp, $sformatf("read r%0d c%0d got %b expected %b", r, c, rdata, exp));
  endtask

  initial begin
    logic [31:0] sw0, up0;
    logic [47:0] pc0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. functional writes and reads
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < CPB; c++) access(0, 1, r, c, BLOCKS'($urandom));
    for (int k = 0; k < 40; k++) begin
      int r, c;
      r = $urandom_range(0, ROWS - 1);
      c = $urandom_range(0, CPB - 1);
      read_check(0, r, c, refm[r][c]);
    end
    check(swap_count == 0 && unprep_count == 0, "functional mode disturbs");
    // 2. pre-charge half-cycles: functional access 6+8, low-power at column
    //    0: 2+4, low-power at column 3: 1+3, idle: 8+8
    pc0 = pre_on_count; access(0, 0, 0, 0, '0);
    check(pre_on_count - pc0 == 14, $sformatf("functional cost %0d", pre_on_count - pc0));
    pc0 = pre_on_count; access(1, 0, 0, 0, '0);
    check(pre_on_count - pc0 == 6, $sformatf("low-power cost col0 %0d", pre_on_count - pc0));
    pc0 = pre_on_count; access(1, 0, 0, 3, '0);
    check(pre_on_count - pc0 == 4, $sformatf("low-power cost col3 %0d", pre_on_count - pc0));
    pc0 = pre_on_count; idle();
    check(pre_on_count - pc0 == 16, $sformatf("idle cost %0d", pre_on_count - pc0));
    // 3. low-power pass with restoring cycle at each row end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < CPB; c++) access(0, 1, r, c, (r % 2 != 0) ? 2'b11 : 2'b00);
    sw0 = swap_count; up0 = unprep_count;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < CPB; c++) read_check(c != CPB - 1, r, c, (r % 2 != 0) ? 2'b11 : 2'b00);
    check(swap_count == sw0, "swaps in restored low-power pass");
    check(unprep_count == up0, "unprepared accesses in restored low-power pass");
    // 4. row change with no restoring cycle
    sw0 = swap_count;
    read_check(1, 0, 0, 2'b00);
    read_check(1, 1, 0, 2'b11);
    check(swap_count - sw0 == 4, $sformatf("swaps %0d expected 4", swap_count - sw0));
    idle();
    read_check(0, 1, 1, 2'b11);
    read_check(0, 1, 2, 2'b00);
    read_check(0, 1, 3, 2'b00);
    // repair row 1
    for (int c = 0; c < CPB; c++) access(0, 1, 1, c, 2'b11);
    idle();
    // 5. unprepared access
    up0 = unprep_count;
    read_check(1, 2, 0, 2'b00);      // row 2 is zeros; columns 2,3,6,7 float to 0
    read_check(1, 3, 2, 2'b00);      // row 3 is ones, but the lines still hold 0
    check(unprep_count - up0 == 2, $sformatf("unprepared %0d expected 2", unprep_count - up0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
