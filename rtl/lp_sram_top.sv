// lp_sram_top -- SRAM with low-power pre-charge test mode and March BIST.
//
// The memory has two modes. In functional mode (test_mode = 0) the user port
// drives the array, every column is pre-charged except the accessed one during
// its operation half, and any address order works. In test mode the March
// BIST drives the array in "word line after word line" order; with
// bist_lp_en set it raises lptest, and the modified pre-charge control then
// pre-charges only the accessed column(s) and the next one in each block,
// leaving all others floating. For the last operation of every row lptest is
// dropped so that all bit lines are restored before the next word line opens.
//
// Structure: march_bist -> (port mux) -> col_decoder -> precharge_timing ->
// precharge_ctrl (the per-column modification) -> sram_array_model, with
// word_mux between the data ports and the blocks' sense amplifiers and write
// drivers. The array
// is a behavioural model of the analog cell array; everything else is
// synthesizable. The pre-charge path is evaluated once per half cycle, which
// is why precharge_ctrl appears twice: in silicon it is one circuit whose
// pr_n input changes at mid-cycle.
//
// Defaults give the bit-oriented 512 x 512 array. BLOCKS > 1 gives a
// word-oriented array of BLOCKS blocks with one column selected per block;
// WORD_BITS (dividing BLOCKS) is the configured word length, chosen by the
// extra multiplexer level in word_mux. A row then holds
// WPR = (COLS/BLOCKS) * (BLOCKS/WORD_BITS) words. The word address within a
// row (f_word) is split into the column position inside each block (upper
// part) and the word group (lower part), so consecutive words of a row share
// a column position until all groups have been visited.
//
// Timing: one access per clock cycle. User reads return on rdata one cycle
// after the access. bist_* follow march_bist. The three event counters come
// from the array model and are for observation in simulation only.
module lp_sram_top
  import lp_sram_pkg::*;
#(
  parameter int unsigned ROWS   = 512,
  parameter int unsigned COLS   = 512,
  parameter int unsigned BLOCKS    = 1,
  parameter int unsigned WORD_BITS = BLOCKS,
  parameter int unsigned RAW       = clog2_min1(ROWS),
  parameter int unsigned WAW       = clog2_min1(COLS / WORD_BITS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // functional port
  input  logic              test_mode,     // 1 = BIST owns the array
  input  logic              f_acc,
  input  logic              f_we,
  input  logic [RAW-1:0]    f_row,
  input  logic [WAW-1:0]    f_word,        // word address within the row
  input  logic [WORD_BITS-1:0] f_wdata,
  output logic [WORD_BITS-1:0] rdata,
  // BIST
  input  logic              bist_start,
  input  march_alg_e        bist_alg,
  input  logic              bist_lp_en,
  output logic              bist_busy,
  output logic              bist_done,
  output logic              bist_fail,
  output logic [15:0]       bist_err_count,
  // observation
  output logic              lptest,
  output logic [31:0]       swap_count,
  output logic [31:0]       unprep_count,
  output logic [47:0]       pre_on_count
);

  localparam int unsigned CPB  = COLS / BLOCKS;        // columns per block
  localparam int unsigned SUBW = BLOCKS / WORD_BITS;   // word groups per access
  localparam int unsigned WPR  = CPB * SUBW;           // words per row
  localparam int unsigned CAW  = clog2_min1(CPB);
  localparam int unsigned SWAW = clog2_min1(SUBW);

  logic                 b_acc, b_we, b_lptest;
  logic [WORD_BITS-1:0] b_wdata;
  logic [RAW-1:0]       b_row;
  logic [WAW-1:0]       b_word;

  march_bist #(.ROWS(ROWS), .WPR(WPR), .WIDTH(WORD_BITS), .RAW(RAW), .CAW(WAW)) u_bist (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (bist_start & test_mode),
    .alg       (bist_alg),
    .lp_en     (bist_lp_en),
    .busy      (bist_busy),
    .done      (bist_done),
    .fail      (bist_fail),
    .err_count (bist_err_count),
    .acc       (b_acc),
    .we        (b_we),
    .wdata     (b_wdata),
    .row       (b_row),
    .col       (b_word),
    .lptest    (b_lptest),
    .rdata     (rdata)
  );

  // Port multiplexer
  logic                 m_acc, m_we;
  logic [WORD_BITS-1:0] m_wdata;
  logic [RAW-1:0]       m_row;
  logic [WAW-1:0]       m_word;

  always_comb begin
    if (test_mode) begin
      m_acc   = b_acc;
      m_we    = b_we;
      m_wdata = b_wdata;
      m_row   = b_row;
      m_word  = b_word;
      lptest  = b_lptest;
    end else begin
      m_acc   = f_acc;
      m_we    = f_we;
      m_wdata = f_wdata;
      m_row   = f_row;
      m_word  = f_word;
      lptest  = 1'b0;
    end
  end

  // Word address: column position inside each block, word group
  logic [CAW-1:0]  m_col;
  logic [SWAW-1:0] m_sub;

  always_comb begin
    m_col = CAW'(m_word / WAW'(SUBW));
    m_sub = SWAW'(m_word % WAW'(SUBW));
  end

  // Word-length multiplexer
  logic [BLOCKS-1:0] blk_we, blk_wdata, blk_rdata;

  word_mux #(.BLOCKS(BLOCKS), .WORD_BITS(WORD_BITS), .SWAW(SWAW)) u_wmux (
    .clk       (clk),
    .rst_n     (rst_n),
    .acc       (m_acc),
    .we        (m_we),
    .sub       (m_sub),
    .wdata     (m_wdata),
    .blk_we    (blk_we),
    .blk_wdata (blk_wdata),
    .blk_rdata (blk_rdata),
    .rdata     (rdata)
  );

  // Column selection and pre-charge commands
  logic [COLS-1:0] cs_n, pr_n_op, pr_n_rest, npr_n_op, npr_n_rest;

  col_decoder #(.COLS(COLS), .BLOCKS(BLOCKS), .CAW(CAW)) u_coldec (
    .en       (m_acc),
    .col_addr (m_col),
    .cs_n     (cs_n)
  );

  precharge_timing #(.COLS(COLS)) u_prtime (
    .cs_n      (cs_n),
    .pr_n_op   (pr_n_op),
    .pr_n_rest (pr_n_rest)
  );

  precharge_ctrl #(.COLS(COLS)) u_prctl_op (
    .lptest (lptest),
    .pr_n   (pr_n_op),
    .cs_n   (cs_n),
    .npr_n  (npr_n_op)
  );

  precharge_ctrl #(.COLS(COLS)) u_prctl_rest (
    .lptest (lptest),
    .pr_n   (pr_n_rest),
    .cs_n   (cs_n),
    .npr_n  (npr_n_rest)
  );

  sram_array_model #(.ROWS(ROWS), .COLS(COLS), .BLOCKS(BLOCKS), .RAW(RAW), .CAW(CAW)) u_array (
    .clk          (clk),
    .rst_n        (rst_n),
    .acc          (m_acc),
    .we           (blk_we),
    .row          (m_row),
    .col_addr     (m_col),
    .wdata        (blk_wdata),
    .npr_n_op     (npr_n_op),
    .npr_n_rest   (npr_n_rest),
    .rdata        (blk_rdata),
    .swap_count   (swap_count),
    .unprep_count (unprep_count),
    .pre_on_count (pre_on_count)
  );

endmodule
