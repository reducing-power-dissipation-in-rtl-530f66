// tb_lp_sram_workloads -- the five March algorithms on the evaluated organisations.
//
// Runs the harness sequence (all five algorithms, low-power and functional
// mode, exact cycle and pre-charge accounting) on 512-column arrays:
//   * bit-oriented, 512 columns;
//   * word-oriented, 128 blocks of 4 columns, 16-bit words;
//   * word-oriented, 64 blocks of 8 columns, 16-bit words;
//   * word-oriented, 128 blocks, 8-bit words;
//   * word-oriented, 64 blocks, 8-bit words.
// The number of rows is cut to 16 (bit-oriented) and 8 to keep the run
// short; the column organisation, which decides how many pre-charge circuits
// can be switched off, is the full one. The reduction in pre-charge
// half-cycles is printed per algorithm.
module tb_lp_sram_workloads;
  localparam int N = 5;
  logic clk = 0;
  logic fin [N];
  int chk [N], fl [N];
  int mech [N][6];
  int checks, failures;

  always #5 clk = ~clk;

  tb_lp_sram_harness #(.ROWS(16), .COLS(512), .BLOCKS(1)) h_bo (
    .clk, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]), .mech(mech[0]));
  tb_lp_sram_harness #(.ROWS(8), .COLS(512), .BLOCKS(128), .WORD_BITS(16)) h_b128_w16 (
    .clk, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]), .mech(mech[1]));
  tb_lp_sram_harness #(.ROWS(8), .COLS(512), .BLOCKS(64), .WORD_BITS(16)) h_b64_w16 (
    .clk, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]), .mech(mech[2]));
  tb_lp_sram_harness #(.ROWS(8), .COLS(512), .BLOCKS(128), .WORD_BITS(8)) h_b128_w8 (
    .clk, .finished(fin[3]), .checks(chk[3]), .failures(fl[3]), .mech(mech[3]));
  tb_lp_sram_harness #(.ROWS(8), .COLS(512), .BLOCKS(64), .WORD_BITS(8)) h_b64_w8 (
    .clk, .finished(fin[4]), .checks(chk[4]), .failures(fl[4]), .mech(mech[4]));

  initial begin
    #400000000;
    checks = 0;
    failures = 1;
    for (int i = 0; i < N; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    checks = 0;
    failures = 0;
    for (int i = 0; i < N; i++) begin
      checks += chk[i];
      failures += fl[i];
      for (int k = 0; k < 6; k++) begin
        checks++;
        if (mech[i][k] == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
