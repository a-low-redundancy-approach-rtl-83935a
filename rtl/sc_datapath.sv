// sc_datapath: shared data path of the self-checking AR filter.
//
// Four multipliers (m1..m4) and three adders (a1..a3) serve both the nominal
// DFG and the checking DFG. Each computation has its own register set
// (dfg_regs): the nominal set takes every new input set, the checking set
// only the checked one. In every control step the control word tells each
// unit which DFG operation to perform and for which computation; the
// operand multiplexers in front of the unit then pick the operation's two
// sources (input word, earlier result or coefficient) from that
// computation's registers, and the result is written into the operation's
// register of the same set. Coefficients are common to both computations.
//
// When the control word says save_out, the nominal results 27 and 28 of the
// checked iteration are copied into two save registers, where they wait for
// their checking copies. In a check step the self-checking checker compares
// one save register with the matching checking result; its two-rail output
// is registered at the end of the step (chk_valid, chk_pair, chk_err).
//
// Timing: one control step per clock while cw_valid is high; y27/y28 are the
// nominal register contents. Multiplexers only at unit and register inputs
// follow the described architecture; one register per operation and the
// operand coding are this design's choices.
module sc_datapath
  import scsc_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ctrl_word_t       cw,
  input  logic             cw_valid,
  input  logic             x_load,     // load x_in into the nominal registers
  input  logic             chk_load,   // load x_in into the checking registers
  input  logic [WIDTH-1:0] x_in [NUM_X],
  input  logic [WIDTH-1:0] coef [NUM_C],
  output logic [WIDTH-1:0] y27,
  output logic [WIDTH-1:0] y28,
  output logic             chk_valid,  // a check was made in the previous step
  output logic [1:0]       chk_pair,   // registered two-rail checker output
  output logic             chk_err     // chk_pair is not a code word
);
  logic [WIDTH-1:0] nx [NUM_X];
  logic [WIDTH-1:0] nv [NUM_OPS+1];
  logic [WIDTH-1:0] cx [NUM_X];
  logic [WIDTH-1:0] cv [NUM_OPS+1];

  logic [WIDTH-1:0] opa [NUM_FU];
  logic [WIDTH-1:0] opb [NUM_FU];
  logic [WIDTH-1:0] res [NUM_FU];
  op_id_t           wop [NUM_FU];
  logic [NUM_FU-1:0] nwe, cwe;

  logic [WIDTH-1:0] save27, save28;
  logic [WIDTH-1:0] cmp_a, cmp_b;
  logic [1:0]       z;

  // Value of one operand source in the nominal (chk = 0) or checking set
  function automatic logic [WIDTH-1:0] fetch(src_t s, logic c,
                                             logic [WIDTH-1:0] xn [NUM_X],
                                             logic [WIDTH-1:0] vn [NUM_OPS+1],
                                             logic [WIDTH-1:0] xc [NUM_X],
                                             logic [WIDTH-1:0] vc [NUM_OPS+1],
                                             logic [WIDTH-1:0] cf [NUM_C]);
    case (s.kind)
      SRC_X:   return c ? xc[s.idx[2:0]] : xn[s.idx[2:0]];
      SRC_V:   return c ? vc[s.idx] : vn[s.idx];
      default: return cf[s.idx[3:0]];
    endcase
  endfunction

  // Operand multiplexers and register write enables
  always_comb begin
    for (int unsigned f = 0; f < NUM_FU; f++) begin
      opa[f] = fetch(dfg_src_a(cw.fu[f].op), cw.fu[f].chk, nx, nv, cx, cv, coef);
      opb[f] = fetch(dfg_src_b(cw.fu[f].op), cw.fu[f].chk, nx, nv, cx, cv, coef);
      wop[f] = cw.fu[f].op;
      nwe[f] = cw_valid && cw.fu[f].en && !cw.fu[f].chk;
      cwe[f] = cw_valid && cw.fu[f].en &&  cw.fu[f].chk;
    end
  end

  // Functional units
  mult_fu #(.WIDTH(WIDTH)) u_m1 (.a(opa[0]), .b(opb[0]), .y(res[0]));
  mult_fu #(.WIDTH(WIDTH)) u_m2 (.a(opa[1]), .b(opb[1]), .y(res[1]));
  mult_fu #(.WIDTH(WIDTH)) u_m3 (.a(opa[2]), .b(opb[2]), .y(res[2]));
  mult_fu #(.WIDTH(WIDTH)) u_m4 (.a(opa[3]), .b(opb[3]), .y(res[3]));
  add_fu  #(.WIDTH(WIDTH)) u_a1 (.a(opa[4]), .b(opb[4]), .y(res[4]));
  add_fu  #(.WIDTH(WIDTH)) u_a2 (.a(opa[5]), .b(opb[5]), .y(res[5]));
  add_fu  #(.WIDTH(WIDTH)) u_a3 (.a(opa[6]), .b(opb[6]), .y(res[6]));

  // Register sets of the two computations
  dfg_regs #(.WIDTH(WIDTH)) u_nom_regs (
    .clk, .rst_n, .x_load(x_load), .x_in(x_in),
    .wr_en(nwe), .wr_op(wop), .wr_data(res), .x_q(nx), .v_q(nv)
  );
  dfg_regs #(.WIDTH(WIDTH)) u_chk_regs (
    .clk, .rst_n, .x_load(chk_load), .x_in(x_in),
    .wr_en(cwe), .wr_op(wop), .wr_data(res), .x_q(cx), .v_q(cv)
  );

  assign y27 = nv[27];
  assign y28 = nv[28];

  // Save registers for the checked primary outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      save27 <= '0;
      save28 <= '0;
    end else if (cw_valid && cw.save_out) begin
      save27 <= nv[27];
      save28 <= nv[28];
    end
  end

  // Checker and its result register
  always_comb begin
    cmp_a = (cw.chk == CHK_OUT28) ? save28 : save27;
    cmp_b = (cw.chk == CHK_OUT28) ? cv[28] : cv[27];
  end

  sc_checker #(.WIDTH(WIDTH)) u_checker (.a(cmp_a), .b(cmp_b), .z(z));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chk_valid <= 1'b0;
      chk_pair  <= 2'b01;
    end else begin
      chk_valid <= cw_valid && (cw.chk != CHK_NONE);
      if (cw_valid && cw.chk != CHK_NONE) chk_pair <= z;
    end
  end

  assign chk_err = chk_valid && (chk_pair[0] == chk_pair[1]);
endmodule
