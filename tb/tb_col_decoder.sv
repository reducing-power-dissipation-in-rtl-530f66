// tb_col_decoder -- checks the column select decoder.
//
// A 16-column, 4-block decoder (four columns per block) must select column
// position a in every block, i.e. columns a, 4+a, 8+a, 12+a, and nothing when
// disabled. A bit-oriented 512-column decoder must select exactly column a.
module tb_col_decoder;
  logic        en4, en1;
  logic [1:0]  a4;
  logic [8:0]  a1;
  logic [15:0] cs4_n;
  logic [511:0] cs1_n;
  int checks = 0, failures = 0;

  col_decoder #(.COLS(16), .BLOCKS(4)) dut4 (.en(en4), .col_addr(a4), .cs_n(cs4_n));
  col_decoder dut1 (.en(en1), .col_addr(a1), .cs_n(cs1_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++) begin
      logic [15:0] exp_sel;
      exp_sel = 16'h1111 << a;
      en4 = 1; a4 = 2'(a); #1;
      checks++;
      if (~cs4_n !== exp_sel) begin
        failures++;
        $display("FAIL 4-block a=%0d sel=%h expected %h", a, ~cs4_n, exp_sel);
      end
      en4 = 0; #1;
      checks++;
      if (cs4_n !== 16'hffff) begin
        failures++;
        $display("FAIL 4-block disabled sel=%h", ~cs4_n);
      end
    end
    for (int t = 0; t < 100; t++) begin
      int a;
      a = (t < 2) ? t * 511 : int'($urandom_range(0, 511));
      en1 = 1; a1 = 9'(a); #1;
      checks++;
      if ((~cs1_n !== (512'(1) << a))) begin
        failures++;
        $display("FAIL bit-oriented a=%0d", a);
      end
    end
    en1 = 0; #1;
    checks++;
    if (cs1_n !== '1) begin
      failures++;
      $display("FAIL bit-oriented disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
