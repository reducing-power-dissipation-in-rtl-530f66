// tb_lp_sram_top -- end-to-end test of the low-power-test SRAM.
//
// Runs the harness sequence on three organisations: a bit-oriented 8 x 16
// array; a word-oriented 4 x 16 array of four blocks with four columns each
// and 4-bit words; and the same array configured for 2-bit words, where each
// access's four blocks form two word groups. Every mechanism counted by the
// harness must have occurred at least once in each.
module tb_lp_sram_top;
  logic clk = 0;
  logic fin_b, fin_w, fin_h;
  int chk_b, chk_w, chk_h, fl_b, fl_w, fl_h;
  int mech_b [6], mech_w [6], mech_h [6];
  int checks, failures;
  string names [6] = '{"low-power cycles", "restoring cycles", "functional cycles in low-power runs",
                       "user accesses", "mode switches", "failures detected"};

  always #5 clk = ~clk;

  tb_lp_sram_harness #(.ROWS(8), .COLS(16), .BLOCKS(1)) h_bit (
    .clk, .finished(fin_b), .checks(chk_b), .failures(fl_b), .mech(mech_b));
  tb_lp_sram_harness #(.ROWS(4), .COLS(16), .BLOCKS(4)) h_word (
    .clk, .finished(fin_w), .checks(chk_w), .failures(fl_w), .mech(mech_w));
  tb_lp_sram_harness #(.ROWS(4), .COLS(16), .BLOCKS(4), .WORD_BITS(2)) h_half (
    .clk, .finished(fin_h), .checks(chk_h), .failures(fl_h), .mech(mech_h));

  initial begin
    #20000000;
    $display("TB_RESULT checks=%0d failures=%0d", chk_b + chk_w + chk_h, fl_b + fl_w + fl_h + 1);
    $finish;
  end

  initial begin
    #1;
    wait (fin_b && fin_w && fin_h);
    checks = chk_b + chk_w + chk_h;
    failures = fl_b + fl_w + fl_h;
    for (int i = 0; i < 6; i++) begin
      $display("%-40s bit-oriented %0d  4-bit words %0d  2-bit words %0d", names[i],
               mech_b[i], mech_w[i], mech_h[i]);
      checks += 3;
      if (mech_b[i] == 0) failures++;
      if (mech_w[i] == 0) failures++;
      if (mech_h[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
