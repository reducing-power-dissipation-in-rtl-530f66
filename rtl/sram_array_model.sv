// sram_array_model -- behavioural model of the SRAM cell array and its bit lines.
//
// Behavioural model, not synthesizable hardware: it stands for the analog part
// of the memory (6T cells, bit-line pairs, pre-charge circuits, column
// multiplexers, sense amplifiers / write drivers and the output buffer) at the
// level of detail needed to check the low-power pre-charge scheme. It is
// written in plain clocked SystemVerilog so that it simulates fast.
//
// Organisation: ROWS word lines by COLS columns, split into BLOCKS blocks of
// CPB = COLS/BLOCKS contiguous columns. One access opens word line `row` and
// selects column position `col_addr` in every block, giving a BLOCKS-bit word
// (BLOCKS = 1 is a bit-oriented memory). Each block has its own write
// enable; a block whose write driver is off senses its cell as in a read.
//
// Bit-line model. Each column's bit-line pair is either pre-charged (both
// lines at VDD) or held at a data value v (BL = v, BLB = ~v) by whatever last
// drove it. One clock cycle is one access with two halves; npr_n_op and
// npr_n_rest are the columns' pre-charge commands (0 = on) in the operation
// and restoration half. In the operation half, with the word line open:
//   * selected column: the cell is read or written through the bit lines,
//     which end up holding the cell's value. If its lines were not
//     pre-charged (an "unprepared access") and hold the opposite value, a read
//     flips the cell and returns the wrong value.
//   * unselected column, pre-charge on: read-equivalent stress, lines stay at
//     VDD, cell unchanged.
//   * unselected column, pre-charge off (floating lines): if the lines were
//     pre-charged the cell pulls one of them down, so they take the cell's
//     value (in silicon this takes several cycles; the model does it at once,
//     which is when a later upset could first occur). If they hold the
//     opposite value, left by a cell of another row, their much larger
//     capacitance overwrites the cell: a faulty swap.
// In the restoration half every column whose pre-charge is on returns to VDD.
// Without an access no word line is open and only pre-charge acts.
//
// Outputs: rdata is registered at the end of the access cycle (valid the
// cycle after a read, held otherwise). swap_count and unprep_count count the
// disturb events above; pre_on_count counts pre-charge circuit half-cycles
// spent on (a proxy for pre-charge energy); all three reset with rst_n.
// Cell contents are not reset.
module sram_array_model #(
  parameter int unsigned ROWS   = 512,
  parameter int unsigned COLS   = 512,
  parameter int unsigned BLOCKS = 1,
  parameter int unsigned RAW    = lp_sram_pkg::clog2_min1(ROWS),
  parameter int unsigned CAW    = lp_sram_pkg::clog2_min1(COLS / BLOCKS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              acc,         // access this cycle (word line open)
  input  logic [BLOCKS-1:0] we,          // per-block write enable, 0 = read
  input  logic [RAW-1:0]    row,
  input  logic [CAW-1:0]    col_addr,
  input  logic [BLOCKS-1:0] wdata,
  input  logic [COLS-1:0]   npr_n_op,    // pre-charge commands, operation half (0 = on)
  input  logic [COLS-1:0]   npr_n_rest,  // pre-charge commands, restoration half (0 = on)
  output logic [BLOCKS-1:0] rdata,
  output logic [31:0]       swap_count,
  output logic [31:0]       unprep_count,
  output logic [47:0]       pre_on_count
);

  localparam int unsigned CPB = COLS / BLOCKS;

  logic [COLS-1:0] mem [ROWS];
  logic [COLS-1:0] bl_pre;   // 1 = bit-line pair pre-charged to VDD
  logic [COLS-1:0] bl_val;   // value held on the pair when not pre-charged

  // Next state of the cells of the open row, the bit lines and the outputs
  logic [COLS-1:0]   cells, cells_n, pre_n, val_n;
  logic [BLOCKS-1:0] rd;
  logic [31:0]       swaps, unprep, on_cnt;

  always_comb begin
    cells   = mem[row];
    cells_n = cells;
    pre_n   = bl_pre;
    val_n   = bl_val;
    rd      = rdata;
    swaps   = '0;
    unprep  = '0;
    on_cnt  = '0;
    for (int unsigned j = 0; j < COLS; j++) begin
      logic on_op, on_rest, sel, v;
      on_op   = ~npr_n_op[j];
      on_rest = ~npr_n_rest[j];
      sel     = acc && (CAW'(j % CPB) == col_addr);
      v       = cells[j];
      on_cnt  = on_cnt + 32'(on_op) + 32'(on_rest);
      // operation half
      if (sel) begin
        if (!bl_pre[j]) begin
          unprep = unprep + 32'd1;
          if (!we[j / CPB] && (bl_val[j] != cells[j])) v = bl_val[j];
        end
        if (we[j / CPB]) v = wdata[j / CPB];
        else             rd[j / CPB] = v;
        cells_n[j] = v;
        pre_n[j]   = on_op;
        val_n[j]   = v;
      end else if (on_op) begin
        pre_n[j] = 1'b1;
      end else if (acc) begin
        if (bl_pre[j]) begin
          pre_n[j] = 1'b0;
          val_n[j] = cells[j];
        end else if (bl_val[j] != cells[j]) begin
          cells_n[j] = bl_val[j];
          swaps      = swaps + 32'd1;
        end
      end
      // restoration half
      if (on_rest) pre_n[j] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (acc) mem[row] <= cells_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bl_pre       <= '1;
      bl_val       <= '0;
      rdata        <= '0;
      swap_count   <= '0;
      unprep_count <= '0;
      pre_on_count <= '0;
    end else begin
      bl_pre       <= pre_n;
      bl_val       <= val_n;
      rdata        <= rd;
      swap_count   <= swap_count + swaps;
      unprep_count <= unprep_count + unprep;
      pre_on_count <= pre_on_count + 48'(on_cnt);
    end
  end

endmodule
