// lp_sram_pkg -- shared types and March algorithm tables for the low-power-test SRAM.
//
// A March test is a list of elements; each element walks every address in one
// direction (up, down or either) and applies the same short list of read/write
// operations to every cell. The tables below hold five classic algorithms
// (March C-, March SS, MATS+, March SR, March G). Their element and operation
// counts match the ones this design is evaluated with (e.g. March C- has 6
// elements and 10 operations, March G 7 elements and 23 operations); the
// operation lists themselves are the standard published forms of these
// algorithms. March G's two delay (data-retention pause) steps are left out.
// Elements whose direction is "either" are run in the up direction.
package lp_sram_pkg;

  // Longest element (March G) has 6 operations; longest algorithm has 7 elements.
  localparam int unsigned MAX_OPS   = 6;
  localparam int unsigned MAX_ELEMS = 7;

  typedef enum logic [2:0] {
    ALG_MARCH_CM = 3'd0,   // March C-
    ALG_MARCH_SS = 3'd1,
    ALG_MATS_P   = 3'd2,   // MATS+
    ALG_MARCH_SR = 3'd3,
    ALG_MARCH_G  = 3'd4
  } march_alg_e;

  typedef enum logic [1:0] {
    DIR_UP   = 2'd0,
    DIR_DOWN = 2'd1,
    DIR_ANY  = 2'd2
  } march_dir_e;

  typedef struct packed {
    logic is_write;   // 1 = write, 0 = read
    logic value;      // value written, or value expected on read
  } march_op_t;

  typedef struct packed {
    march_dir_e               dir;
    logic [2:0]               n_ops;   // 1..MAX_OPS
    march_op_t [MAX_OPS-1:0]  ops;     // ops[0] is applied first
  } march_elem_t;

  typedef struct packed {
    logic [2:0]                    n_elems;  // 1..MAX_ELEMS
    march_elem_t [MAX_ELEMS-1:0]   elems;    // elems[0] runs first
  } march_alg_t;

  localparam march_op_t R0 = '{is_write: 1'b0, value: 1'b0};
  localparam march_op_t R1 = '{is_write: 1'b0, value: 1'b1};
  localparam march_op_t W0 = '{is_write: 1'b1, value: 1'b0};
  localparam march_op_t W1 = '{is_write: 1'b1, value: 1'b1};
  localparam march_op_t NOP = '{is_write: 1'b0, value: 1'b0};

  // Build one element from up to six operations, listed in execution order.
  function automatic march_elem_t mk_elem(march_dir_e dir, logic [2:0] n,
                                          march_op_t o0, march_op_t o1 = NOP,
                                          march_op_t o2 = NOP, march_op_t o3 = NOP,
                                          march_op_t o4 = NOP, march_op_t o5 = NOP);
    march_elem_t e;
    e.dir    = dir;
    e.n_ops  = n;
    e.ops[0] = o0;
    e.ops[1] = o1;
    e.ops[2] = o2;
    e.ops[3] = o3;
    e.ops[4] = o4;
    e.ops[5] = o5;
    return e;
  endfunction


  // Algorithm table.
  function automatic march_alg_t get_alg(march_alg_e sel);
    march_alg_t a;
    a = '0;
    case (sel)
      // {any(w0); up(r0,w1); up(r1,w0); down(r0,w1); down(r1,w0); any(r0)}
      ALG_MARCH_CM: begin
        a.n_elems  = 3'd6;
        a.elems[0] = mk_elem(DIR_ANY, 3'd1, W0);
        a.elems[1] = mk_elem(DIR_UP, 3'd2, R0, W1);
        a.elems[2] = mk_elem(DIR_UP, 3'd2, R1, W0);
        a.elems[3] = mk_elem(DIR_DOWN, 3'd2, R0, W1);
        a.elems[4] = mk_elem(DIR_DOWN, 3'd2, R1, W0);
        a.elems[5] = mk_elem(DIR_ANY, 3'd1, R0);
      end
      // {any(w0); up(r0,r0,w0,r0,w1); up(r1,r1,w1,r1,w0);
      //  down(r0,r0,w0,r0,w1); down(r1,r1,w1,r1,w0); any(r0)}
      ALG_MARCH_SS: begin
        a.n_elems  = 3'd6;
        a.elems[0] = mk_elem(DIR_ANY, 3'd1, W0);
        a.elems[1] = mk_elem(DIR_UP, 3'd5, R0, R0, W0, R0, W1);
        a.elems[2] = mk_elem(DIR_UP, 3'd5, R1, R1, W1, R1, W0);
        a.elems[3] = mk_elem(DIR_DOWN, 3'd5, R0, R0, W0, R0, W1);
        a.elems[4] = mk_elem(DIR_DOWN, 3'd5, R1, R1, W1, R1, W0);
        a.elems[5] = mk_elem(DIR_ANY, 3'd1, R0);
      end
      // {any(w0); up(r0,w1); down(r1,w0)}
      ALG_MATS_P: begin
        a.n_elems  = 3'd3;
        a.elems[0] = mk_elem(DIR_ANY, 3'd1, W0);
        a.elems[1] = mk_elem(DIR_UP, 3'd2, R0, W1);
        a.elems[2] = mk_elem(DIR_DOWN, 3'd2, R1, W0);
      end
      // {down(w0); up(r0,w1,r1,w0); up(r0,r0); up(w1); down(r1,w0,r0,w1); down(r1,r1)}
      ALG_MARCH_SR: begin
        a.n_elems  = 3'd6;
        a.elems[0] = mk_elem(DIR_DOWN, 3'd1, W0);
        a.elems[1] = mk_elem(DIR_UP, 3'd4, R0, W1, R1, W0);
        a.elems[2] = mk_elem(DIR_UP, 3'd2, R0, R0);
        a.elems[3] = mk_elem(DIR_UP, 3'd1, W1);
        a.elems[4] = mk_elem(DIR_DOWN, 3'd4, R1, W0, R0, W1);
        a.elems[5] = mk_elem(DIR_DOWN, 3'd2, R1, R1);
      end
      // {any(w0); up(r0,w1,r1,w0,r0,w1); up(r1,w0,w1); down(r1,w0,w1,w0);
      //  down(r0,w1,w0); any(r0,w1,r1); any(r1,w0,r0)}  (delays omitted)
      ALG_MARCH_G: begin
        a.n_elems  = 3'd7;
        a.elems[0] = mk_elem(DIR_ANY, 3'd1, W0);
        a.elems[1] = mk_elem(DIR_UP, 3'd6, R0, W1, R1, W0, R0, W1);
        a.elems[2] = mk_elem(DIR_UP, 3'd3, R1, W0, W1);
        a.elems[3] = mk_elem(DIR_DOWN, 3'd4, R1, W0, W1, W0);
        a.elems[4] = mk_elem(DIR_DOWN, 3'd3, R0, W1, W0);
        a.elems[5] = mk_elem(DIR_ANY, 3'd3, R0, W1, R1);
        a.elems[6] = mk_elem(DIR_ANY, 3'd3, R1, W0, R0);
      end
      default: a = '0;
    endcase
    return a;
  endfunction

  // Ceiling log2 with a minimum of 1 bit, for address widths.
  function automatic int unsigned clog2_min1(int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
