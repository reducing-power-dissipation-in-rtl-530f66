// tb_march_addr_gen -- checks the word-line-after-word-line address order.
//
// A 4-row, 8-column generator is loaded ascending and stepped through all 32
// addresses: row must hold while the column runs 0..7, then advance; col_tc
// and last must be high exactly at the row ends and the final address. Then
// the same for the descending order (exact reverse), and the wrap after the
// last address. Holding step low must freeze the counters.
module tb_march_addr_gen;
  localparam int ROWS = 4, CPB = 8;
  logic clk = 0, rst_n = 0, load = 0, down = 0, step = 0;
  logic [1:0] row;
  logic [2:0] col;
  logic col_tc, last;
  int checks = 0, failures = 0;

  march_addr_gen #(.ROWS(ROWS), .CPB(CPB)) dut (.clk, .rst_n, .load, .down, .step,
                                               .row, .col, .col_tc, .last);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_addr(input int er, input int ec, input logic etc, input logic elast);
    checks++;
    if (row !== 2'(er) || col !== 3'(ec) || col_tc !== etc || last !== elast) begin
      failures++;
      $display("FAIL row=%0d col=%0d tc=%b last=%b expected %0d %0d %b %b",
               row, col, col_tc, last, er, ec, etc, elast);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int d = 0; d < 2; d++) begin
      @(negedge clk); load = 1; down = 1'(d);
      @(negedge clk); load = 0; step = 1;
      for (int k = 0; k < ROWS * CPB; k++) begin
        int er, ec;
        er = (d == 0) ? k / CPB : ROWS - 1 - k / CPB;
        ec = (d == 0) ? k % CPB : CPB - 1 - k % CPB;
        check_addr(er, ec, (k % CPB) == CPB - 1, k == ROWS * CPB - 1);
        @(negedge clk);
      end
      // wrapped to the first address
      check_addr(d == 0 ? 0 : ROWS - 1, d == 0 ? 0 : CPB - 1, 1'b0, 1'b0);
      // freeze
      step = 0;
      @(negedge clk);
      @(negedge clk);
      check_addr(d == 0 ? 0 : ROWS - 1, d == 0 ? 0 : CPB - 1, 1'b0, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
