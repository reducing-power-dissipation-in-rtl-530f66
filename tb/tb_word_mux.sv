// tb_word_mux -- checks the word-length multiplexer.
//
// An 8-block memory with 2-bit words (four word groups) and the 128-block,
// 16-bit default. For random accesses it checks that only the addressed
// group's write drivers are enabled (and none on reads or idle cycles), that
// each block receives its bit of the word, and that the read data of the
// following cycle is the addressed group's slice of the sense-amplifier
// outputs, also after idle cycles in between.
module tb_word_mux;
  logic clk = 0, rst_n = 0;
  // small instance
  logic acc = 0, we = 0;
  logic [1:0] sub = 0;
  logic [1:0] wdata = 0, rdata;
  logic [7:0] blk_we, blk_wdata, blk_rdata = 0;
  // default instance
  logic acc_d = 0, we_d = 0;
  logic [2:0] sub_d = 0;
  logic [15:0] wdata_d = 0, rdata_d;
  logic [127:0] blk_we_d, blk_wdata_d, blk_rdata_d = 0;
  int checks = 0, failures = 0;

  word_mux #(.BLOCKS(8), .WORD_BITS(2)) dut (.clk, .rst_n, .acc, .we, .sub, .wdata,
                                             .blk_we, .blk_wdata, .blk_rdata, .rdata);
  word_mux dut_d (.clk, .rst_n, .acc(acc_d), .we(we_d), .sub(sub_d), .wdata(wdata_d),
                  .blk_we(blk_we_d), .blk_wdata(blk_wdata_d), .blk_rdata(blk_rdata_d),
                  .rdata(rdata_d));

  always #5 clk = ~clk;

  initial begin
    #1000000;
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

  initial begin
    logic [1:0] last_sub;
    logic [2:0] last_sub_d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    last_sub = 0; last_sub_d = 0;
    for (int t = 0; t < 300; t++) begin
      logic [7:0] exp_we;
      logic [127:0] exp_we_d;
      acc = 1'($urandom); we = 1'($urandom); sub = 2'($urandom); wdata = 2'($urandom);
      acc_d = acc; we_d = we; sub_d = 3'($urandom); wdata_d = 16'($urandom);
      #1;
      exp_we   = (acc && we) ? (8'b11 << (2 * sub)) : '0;
      exp_we_d = (acc_d && we_d) ? (128'hffff << (16 * sub_d)) : '0;
      check(blk_we == exp_we, $sformatf("small blk_we %b expected %b", blk_we, exp_we));
      check(blk_wdata == {4{wdata}}, "small blk_wdata");
      check(blk_we_d == exp_we_d, "default blk_we");
      check(blk_wdata_d == {8{wdata_d}}, "default blk_wdata");
      if (acc) last_sub = sub;
      if (acc_d) last_sub_d = sub_d;
      @(negedge clk);
      // sense amplifiers present new data; read mux uses the last access's group
      blk_rdata = 8'($urandom);
      blk_rdata_d = {$urandom, $urandom, $urandom, $urandom};
      acc = 0; acc_d = 0;
      #1;
      check(rdata == blk_rdata[2 * last_sub +: 2],
            $sformatf("small rdata %b group %0d of %b", rdata, last_sub, blk_rdata));
      check(rdata_d == blk_rdata_d[16 * last_sub_d +: 16], "default rdata");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
