// word_mux -- word-length selection between the blocks and the data port.
//
// An access always senses (or drives) one column in every one of the BLOCKS
// blocks. When the memory is configured for words of WORD_BITS < BLOCKS bits,
// one more level of multiplexing picks which group of WORD_BITS blocks forms
// the word: group g is blocks g*WORD_BITS .. g*WORD_BITS + WORD_BITS - 1, and
// the group index (sub) is the least significant part of the word address.
// On a write only that group's write drivers are enabled, each driving its bit
// of wdata; the other blocks' selected cells are sensed as in a read. On a
// read the group's sense-amplifier outputs are returned. With WORD_BITS =
// BLOCKS there is a single group and the block is a straight connection of
// the data bits plus the write enables.
//
// Timing: the write side is combinational. The array returns read data one
// cycle after the access, so the group index of each access is registered
// here and steers the read multiplexer in the following cycle.
module word_mux #(
  parameter int unsigned BLOCKS    = 128,
  parameter int unsigned WORD_BITS = 16,
  parameter int unsigned SWAW      = lp_sram_pkg::clog2_min1(BLOCKS / WORD_BITS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 acc,
  input  logic                 we,          // write access
  input  logic [SWAW-1:0]      sub,         // word group within the access
  input  logic [WORD_BITS-1:0] wdata,
  output logic [BLOCKS-1:0]    blk_we,      // per-block write-driver enable
  output logic [BLOCKS-1:0]    blk_wdata,
  input  logic [BLOCKS-1:0]    blk_rdata,   // sense amplifiers, registered
  output logic [WORD_BITS-1:0] rdata
);

  localparam int unsigned GROUPS = BLOCKS / WORD_BITS;

  logic [SWAW-1:0] sub_q;

  always_comb begin
    for (int unsigned b = 0; b < BLOCKS; b++) begin
      blk_we[b]    = acc && we && (SWAW'(b / WORD_BITS) == sub);
      blk_wdata[b] = wdata[b % WORD_BITS];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sub_q <= '0;
    else if (acc) sub_q <= sub;
  end

  always_comb begin
    rdata = '0;
    for (int unsigned g = 0; g < GROUPS; g++) begin
      if (SWAW'(g) == sub_q) rdata = blk_rdata[g*WORD_BITS +: WORD_BITS];
    end
  end

endmodule
