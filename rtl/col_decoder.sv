// col_decoder -- column select decoder for a block-organised SRAM array.
//
// The array's COLS columns are split into BLOCKS contiguous blocks of
// COLS/BLOCKS columns; each block has its own column multiplexer and sense
// amplifier / write driver. An access selects the same column position
// (col_addr) in every block, so BLOCKS columns are selected at once. With
// BLOCKS = 1 this is a plain bit-oriented one-of-COLS decoder.
//
// Output cs_n is active low, one bit per column, all ones when en is low.
// Purely combinational.
module col_decoder #(
  parameter int unsigned COLS   = 512,
  parameter int unsigned BLOCKS = 1,
  parameter int unsigned CAW    = lp_sram_pkg::clog2_min1(COLS / BLOCKS)
) (
  input  logic            en,        // an access takes place this cycle
  input  logic [CAW-1:0]  col_addr,  // column position within each block
  output logic [COLS-1:0] cs_n       // column selects, active low
);

  localparam int unsigned CPB = COLS / BLOCKS;

  always_comb begin
    cs_n = '1;
    for (int unsigned b = 0; b < BLOCKS; b++) begin
      for (int unsigned c = 0; c < CPB; c++) begin
        if (en && (CAW'(c) == col_addr)) cs_n[b*CPB + c] = 1'b0;
      end
    end
  end

endmodule
