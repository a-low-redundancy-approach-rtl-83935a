// scsc_pkg: types, constants and tables shared by the semi-concurrently
// self-checking AR filter.
//
// The filter is a data flow graph (DFG) of 28 single-step operations:
// 16 multiplications and 12 additions. The nominal schedule takes K_N = 8
// control steps on four multipliers (m1..m4) and two adders (a1, a2). A
// second copy of the DFG, the checking DFG, is scheduled onto the same units
// plus one extra adder (a3) over two nominal iterations (16 control steps),
// so that the outputs of every second iteration are recomputed on a
// different unit for every operation and compared by one checker.
//
// What follows the published example: the unit counts, K_N, the binding of
// the nominal operations to units and the complete 16-step table of nominal
// and checking operations (schedule_row), including which step checks which
// output. The operation numbering and the step in which each operation runs
// come from that table. The exact edges of the AR filter graph are this
// design's own reconstruction (dfg_src_a / dfg_src_b): every operation
// reads only values produced in an earlier step of both the nominal and the
// checking schedule, and the critical path is 8 operations long, as the
// nominal schedule requires. Coefficients are one per multiplication and
// come from an input port.
package scsc_pkg;

  localparam int unsigned K_N       = 8;   // control steps of the nominal schedule
  localparam int unsigned NUM_OPS   = 28;  // operations in the DFG
  localparam int unsigned NUM_X     = 8;   // input words per input set
  localparam int unsigned NUM_C     = 16;  // coefficients, one per multiplication
  localparam int unsigned NUM_MUL   = 4;   // m1..m4
  localparam int unsigned NUM_ADD   = 3;   // a1, a2 and the added a3
  localparam int unsigned NUM_FU    = NUM_MUL + NUM_ADD;  // unit index: 0..3 = m1..m4, 4..6 = a1..a3


  typedef logic [4:0] op_id_t;   // 1..28, 0 = no operation

  typedef enum logic [1:0] {
    SRC_X = 2'd0,   // word of the input set
    SRC_V = 2'd1,   // result of an earlier operation
    SRC_C = 2'd2    // coefficient
  } src_kind_e;

  typedef struct packed {
    src_kind_e  kind;
    logic [4:0] idx;
  } src_t;

  // Command to one functional unit in one control step
  typedef struct packed {
    logic   en;    // unit performs an operation this step
    logic   chk;   // operation belongs to the checking DFG
    op_id_t op;    // which DFG operation
  } fu_cmd_t;

  typedef enum logic [1:0] {
    CHK_NONE  = 2'd0,
    CHK_OUT27 = 2'd1,   // compare primary output 27 with its checking copy
    CHK_OUT28 = 2'd2    // compare primary output 28 with its checking copy
  } chk_sel_e;

  // Control word of one control step
  typedef struct packed {
    fu_cmd_t [NUM_FU-1:0] fu;
    logic                 save_out;  // copy checked outputs 27, 28 to the save registers
    chk_sel_e             chk;
  } ctrl_word_t;

  function automatic logic op_is_mul(op_id_t op);
    return (op >= 5'd1 && op <= 5'd4) || (op >= 5'd9 && op <= 5'd12) ||
           (op >= 5'd15 && op <= 5'd22);
  endfunction

  function automatic src_t mk_src(src_kind_e k, logic [4:0] i);
    src_t s;
    s.kind = k;
    s.idx  = i;
    return s;
  endfunction

  // First operand of each operation
  function automatic src_t dfg_src_a(op_id_t op);
    case (op)
      5'd1:  return mk_src(SRC_X, 0);
      5'd2:  return mk_src(SRC_X, 1);
      5'd3:  return mk_src(SRC_X, 2);
      5'd4:  return mk_src(SRC_X, 3);
      5'd5:  return mk_src(SRC_V, 1);
      5'd6:  return mk_src(SRC_V, 3);
      5'd7:  return mk_src(SRC_V, 5);
      5'd8:  return mk_src(SRC_V, 6);
      5'd9:  return mk_src(SRC_V, 7);
      5'd10: return mk_src(SRC_V, 7);
      5'd11: return mk_src(SRC_V, 8);
      5'd12: return mk_src(SRC_V, 8);
      5'd13: return mk_src(SRC_V, 9);
      5'd14: return mk_src(SRC_V, 10);
      5'd15: return mk_src(SRC_X, 6);
      5'd16: return mk_src(SRC_X, 7);
      5'd17: return mk_src(SRC_X, 6);
      5'd18: return mk_src(SRC_X, 7);
      5'd19: return mk_src(SRC_V, 13);
      5'd20: return mk_src(SRC_V, 13);
      5'd21: return mk_src(SRC_V, 14);
      5'd22: return mk_src(SRC_V, 14);
      5'd23: return mk_src(SRC_V, 15);
      5'd24: return mk_src(SRC_V, 17);
      5'd25: return mk_src(SRC_V, 19);
      5'd26: return mk_src(SRC_V, 20);
      5'd27: return mk_src(SRC_V, 25);
      5'd28: return mk_src(SRC_V, 26);
      default: return mk_src(SRC_X, 0);
    endcase
  endfunction

  // Second operand: the coefficient of a multiplication, else a value or input
  function automatic src_t dfg_src_b(op_id_t op);
    case (op)
      5'd1:  return mk_src(SRC_C, 0);
      5'd2:  return mk_src(SRC_C, 1);
      5'd3:  return mk_src(SRC_C, 2);
      5'd4:  return mk_src(SRC_C, 3);
      5'd5:  return mk_src(SRC_V, 2);
      5'd6:  return mk_src(SRC_V, 4);
      5'd7:  return mk_src(SRC_X, 4);
      5'd8:  return mk_src(SRC_X, 5);
      5'd9:  return mk_src(SRC_C, 4);
      5'd10: return mk_src(SRC_C, 5);
      5'd11: return mk_src(SRC_C, 6);
      5'd12: return mk_src(SRC_C, 7);
      5'd13: return mk_src(SRC_V, 12);
      5'd14: return mk_src(SRC_V, 11);
      5'd15: return mk_src(SRC_C, 8);
      5'd16: return mk_src(SRC_C, 9);
      5'd17: return mk_src(SRC_C, 10);
      5'd18: return mk_src(SRC_C, 11);
      5'd19: return mk_src(SRC_C, 12);
      5'd20: return mk_src(SRC_C, 13);
      5'd21: return mk_src(SRC_C, 14);
      5'd22: return mk_src(SRC_C, 15);
      5'd23: return mk_src(SRC_V, 16);
      5'd24: return mk_src(SRC_V, 18);
      5'd25: return mk_src(SRC_V, 22);
      5'd26: return mk_src(SRC_V, 21);
      5'd27: return mk_src(SRC_V, 23);
      5'd28: return mk_src(SRC_V, 24);
      default: return mk_src(SRC_X, 0);
    endcase
  endfunction

  // Unit that executes an operation in the nominal data path (binding table)
  function automatic int unsigned nominal_fu(op_id_t op);
    case (op)
      5'd1, 5'd9,  5'd15, 5'd19:               return 0;
      5'd2, 5'd10, 5'd16, 5'd20:               return 1;
      5'd3, 5'd11, 5'd17, 5'd21:               return 2;
      5'd4, 5'd12, 5'd18, 5'd22:               return 3;
      5'd5, 5'd7,  5'd13, 5'd23, 5'd25, 5'd27: return 4;
      default:                                 return 5;
    endcase
  endfunction

  function automatic fu_cmd_t nom(op_id_t op);
    fu_cmd_t c;
    c.en  = 1'b1;
    c.chk = 1'b0;
    c.op  = op;
    return c;
  endfunction

  function automatic fu_cmd_t chk(op_id_t op);
    fu_cmd_t c;
    c.en  = 1'b1;
    c.chk = 1'b1;
    c.op  = op;
    return c;
  endfunction

  // Nominal operations on m1..m4 in the steps where all four multipliers work
  function automatic ctrl_word_t put_muls(ctrl_word_t w, int unsigned first);
    ctrl_word_t r;
    r = w;
    for (int unsigned f = 0; f < NUM_MUL; f++) r.fu[f] = nom(op_id_t'(first + f));
    return r;
  endfunction

  // One row of the shared schedule, step 1..16. With nominal_only set the
  // checking operations, the output save and the check are left out: that is
  // the row used by the extra nominal iterations when a checking cycle is
  // longer than two iterations.
  function automatic ctrl_word_t schedule_row(int unsigned step, logic nominal_only);
    ctrl_word_t w;
    w = '0;
    case (step)
      1:  w = put_muls(w, 1);
      2:  begin w = put_muls(w, 15); w.fu[4] = nom(5);  w.fu[5] = nom(6);  end
      3:  begin
            w.fu[0] = chk(2);  w.fu[1] = chk(1);  w.fu[2] = chk(4);  w.fu[3] = chk(3);
            w.fu[4] = nom(7);  w.fu[5] = nom(8);
          end
      4:  begin w = put_muls(w, 9);  w.fu[4] = nom(23); w.fu[5] = nom(24); w.fu[6] = chk(5); end
      5:  begin
            w.fu[0] = chk(16); w.fu[1] = chk(15); w.fu[2] = chk(18); w.fu[3] = chk(17);
            w.fu[4] = nom(13); w.fu[5] = nom(14); w.fu[6] = chk(6);
          end
      6:  begin w = put_muls(w, 19); w.fu[4] = chk(8);  w.fu[5] = chk(7);  w.fu[6] = chk(23); end
      7:  begin
            w.fu[0] = chk(10); w.fu[1] = chk(9);  w.fu[2] = chk(12); w.fu[3] = chk(11);
            w.fu[4] = nom(25); w.fu[5] = nom(26); w.fu[6] = chk(24);
          end
      8:  begin w.fu[4] = nom(27); w.fu[5] = nom(28); w.fu[6] = chk(13); end
      9:  begin w = put_muls(w, 1);  w.fu[6] = chk(14); w.save_out = 1'b1; end
      10: begin w = put_muls(w, 15); w.fu[4] = nom(5);  w.fu[5] = nom(6);  end
      11: begin
            w.fu[0] = chk(20); w.fu[1] = chk(19); w.fu[2] = chk(22); w.fu[3] = chk(21);
            w.fu[4] = nom(7);  w.fu[5] = nom(8);
          end
      12: begin w = put_muls(w, 9);  w.fu[4] = nom(23); w.fu[5] = nom(24); w.fu[6] = chk(25); end
      13: begin w.fu[4] = nom(13); w.fu[5] = nom(14); w.fu[6] = chk(26); end
      14: begin w = put_muls(w, 19); w.fu[5] = chk(27); w.fu[6] = chk(28); end
      15: begin w.fu[4] = nom(25); w.fu[5] = nom(26); w.chk = CHK_OUT27; end
      16: begin w.fu[4] = nom(27); w.fu[5] = nom(28); w.chk = CHK_OUT28; end
      default: ;
    endcase
    if (nominal_only) begin
      for (int unsigned f = 0; f < NUM_FU; f++)
        if (w.fu[f].chk) w.fu[f] = '0;
      w.save_out = 1'b0;
      w.chk      = CHK_NONE;
    end
    return w;
  endfunction

endpackage
