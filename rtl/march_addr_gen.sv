// march_addr_gen -- "word line after word line" address generator for March tests.
//
// Two counters. Counter A gives the column part of the address and advances on
// every step (one step = all operations of a March element applied to one
// cell). Its terminal count enables counter B, the row part of the address,
// so counter B holds a row while counter A sweeps all of that row's columns,
// then moves on to the next row. The resulting order visits the cells of row
// 0 from column 0 to column CPB-1, then row 1, and so on.
//
// For a descending March element (down = 1) both counters count down from
// their maximum, which gives exactly the reverse of the ascending sequence.
// Counter B uses a synchronous enable from counter A's terminal count rather
// than taking it as a clock, so the design has a single clock.
//
// Interface: load (re)starts the sequence at its first address in the
// direction given by down, which is stored until the next load; step
// advances it. col_tc is high while counter A is
// at its terminal count (last column of the row), last while both counters
// are (last address of the sequence). After the last address the counters
// wrap to the first one. All outputs are registered or decoded from registers.
module march_addr_gen #(
  parameter int unsigned ROWS = 512,
  parameter int unsigned CPB  = 512,   // columns swept per row (columns per block)
  parameter int unsigned RAW  = lp_sram_pkg::clog2_min1(ROWS),
  parameter int unsigned CAW  = lp_sram_pkg::clog2_min1(CPB)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,     // go to the first address of the sequence
  input  logic           down,     // direction, taken on load
  input  logic           step,     // advance to the next address
  output logic [RAW-1:0] row,      // counter B
  output logic [CAW-1:0] col,      // counter A
  output logic           col_tc,   // counter A at terminal count
  output logic           last      // last address of the sequence
);

  localparam logic [RAW-1:0] ROW_MAX = RAW'(ROWS - 1);
  localparam logic [CAW-1:0] COL_MAX = CAW'(CPB - 1);

  logic row_tc;
  logic dn;   // direction of the running sequence

  always_comb begin
    col_tc = dn ? (col == '0) : (col == COL_MAX);
    row_tc = dn ? (row == '0) : (row == ROW_MAX);
    last   = col_tc & row_tc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    dn <= 1'b0;
    else if (load) dn <= down;
  end

  // Counter A
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0;
    end else if (load) begin
      col <= down ? COL_MAX : '0;
    end else if (step) begin
      if (col_tc) col <= dn ? COL_MAX : '0;
      else        col <= dn ? col - 1'b1 : col + 1'b1;
    end
  end

  // Counter B, enabled by counter A's terminal count
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0;
    end else if (load) begin
      row <= down ? ROW_MAX : '0;
    end else if (step && col_tc) begin
      if (row_tc) row <= dn ? ROW_MAX : '0;
      else        row <= dn ? row - 1'b1 : row + 1'b1;
    end
  end

endmodule
