// march_bist -- March test controller with low-power pre-charge mode.
//
// Runs one of the March algorithms of lp_sram_pkg over the whole array, one
// memory operation per clock cycle, using the "word line after word line"
// address order of march_addr_gen: all WPR words of row 0, then row 1, and so
// on. The word address within a row (col) is passed to the memory, which
// splits it into column position (upper part) and word group (lower part). Reads are checked against the value the
// algorithm expects on every data bit (solid data background).
//
// Low-power test mode. When lp_en is set, the controller raises lptest for
// the operations of ascending elements, which lets the modified pre-charge
// control switch off the pre-charge of every column except the selected one
// and the one after it. For the last operation on the last cell of each row
// lptest is dropped for that single cycle, so the whole array is pre-charged
// once and every bit line is back at VDD before the next row's word line
// opens (otherwise bit lines left at the previous row's values could flip the
// next row's cells). Descending elements visit columns from high to low, the
// opposite of the direction in which one column's select pre-charges its
// neighbour, so this design runs them with lptest low (functional
// pre-charge); elements whose direction is free are run ascending.
//
// Timing: start is sampled in IDLE; the first operation is issued the next
// cycle. acc/we/wdata/row/col/lptest describe the operation of the current
// cycle and come from registers. Read data is expected on rdata one cycle
// after the read (the array registers it at the end of the access cycle). A
// full run takes sum over elements of (ops * ROWS * WPR) cycles, after which
// done is held until the next start. fail is sticky over a run; err_count
// counts mismatching read operations, saturating.
module march_bist
  import lp_sram_pkg::*;
#(
  parameter int unsigned ROWS  = 512,
  parameter int unsigned WPR   = 512,   // word addresses per row
  parameter int unsigned WIDTH = 1,     // bits per word
  parameter int unsigned RAW   = clog2_min1(ROWS),
  parameter int unsigned CAW   = clog2_min1(WPR)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  march_alg_e       alg,
  input  logic             lp_en,      // use low-power test mode
  output logic             busy,
  output logic             done,
  output logic             fail,
  output logic [15:0]      err_count,
  // memory side
  output logic             acc,
  output logic             we,
  output logic [WIDTH-1:0] wdata,
  output logic [RAW-1:0]   row,
  output logic [CAW-1:0]   col,
  output logic             lptest,
  input  logic [WIDTH-1:0] rdata
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  state_e      state;
  march_alg_t  alg_q;
  logic [2:0]  elem_idx;
  logic [2:0]  op_idx;

  march_elem_t cur_elem;
  march_op_t   cur_op;
  logic        cur_down, next_down, first_down, last_op, last_elem;
  logic        ag_load, ag_step, ag_down, col_tc, addr_last;

  always_comb begin
    cur_elem  = alg_q.elems[elem_idx];

    cur_op    = cur_elem.ops[op_idx];
    cur_down  = (cur_elem.dir == DIR_DOWN);
    next_down = (alg_q.elems[elem_idx + 3'd1].dir == DIR_DOWN);
    first_down = (get_alg(alg).elems[0].dir == DIR_DOWN);
    last_op   = (op_idx == cur_elem.n_ops - 3'd1);
    last_elem = (elem_idx == alg_q.n_elems - 3'd1);
  end

  // Address generator control
  always_comb begin
    ag_load = 1'b0;
    ag_step = 1'b0;
    ag_down = (state == S_RUN) ? next_down : first_down;
    if (state != S_RUN && start) begin
      ag_load = 1'b1;
    end else if (state == S_RUN && last_op) begin
      if (addr_last) begin
        ag_load = 1'b1;
      end else begin
        ag_step = 1'b1;
      end
    end
  end

  march_addr_gen #(.ROWS(ROWS), .CPB(WPR), .RAW(RAW), .CAW(CAW)) u_addr (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (ag_load),
    .down   (ag_down),
    .step   (ag_step),
    .row    (row),
    .col    (col),
    .col_tc (col_tc),
    .last   (addr_last)
  );

  // Sequencing of elements and operations
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      alg_q    <= '0;
      elem_idx <= '0;
      op_idx   <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state    <= S_RUN;
            alg_q    <= get_alg(alg);
            elem_idx <= '0;
            op_idx   <= '0;
          end
        end
        S_RUN: begin
          if (!last_op) begin
            op_idx <= op_idx + 3'd1;
          end else begin
            op_idx <= '0;
            if (addr_last) begin
              if (last_elem) state <= S_DONE;
              else           elem_idx <= elem_idx + 3'd1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Operation of the current cycle
  always_comb begin
    acc    = (state == S_RUN);
    we     = acc & cur_op.is_write;
    wdata  = {WIDTH{cur_op.value}};
    lptest = acc & lp_en & ~cur_down & ~(last_op & col_tc);
    busy   = (state == S_RUN);
    done   = (state == S_DONE);
  end

  // Read check, one cycle after the read
  logic chk_v, chk_exp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chk_v     <= 1'b0;
      chk_exp   <= 1'b0;
      fail      <= 1'b0;
      err_count <= '0;
    end else begin
      chk_v   <= acc & ~cur_op.is_write;
      chk_exp <= cur_op.value;
      if ((state != S_RUN) && start) begin
        fail      <= 1'b0;
        err_count <= '0;
      end else if (chk_v && (rdata != {WIDTH{chk_exp}})) begin
        fail <= 1'b1;
        if (err_count != '1) err_count <= err_count + 16'd1;
      end
    end
  end

endmodule
