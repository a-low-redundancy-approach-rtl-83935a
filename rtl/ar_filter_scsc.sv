// ar_filter_scsc: AR filter data path with semi-concurrent self-checking.
//
// A stream of input sets (8 words each) is filtered into two outputs per set
// (DFG results 27 and 28), one set every 8 clock cycles when the stream does
// not pause. For every second input set (every CHECK_ITERS-th with a longer
// checking period) the whole DFG is computed a second time on the same four
// multipliers and two adders plus one extra adder, each operation on a unit
// other than the one that computes it nominally, using the idle slots of the
// nominal schedule. In the 15th and 16th control steps of the checked set,
// its two outputs are compared with the checking results by a self-checking
// checker. A single faulty unit that the data excite makes the two results
// differ and raises chk_err for one cycle and error until reset.
//
// Ports:
//   in_valid/in_ready, x_in : input set handshake (accepted when both high)
//   coef                    : the 16 multiplication coefficients, held stable
//   out_valid, y27, y28     : outputs of one iteration, valid for the cycle
//                             out_valid is high (they stay until overwritten)
//   out_checked             : with out_valid: these outputs will be checked
//   chk_valid, chk_pair     : a check result; chk_pair is the two-rail output
//   chk_err                 : that check failed (or the checker is faulty)
//   error                   : sticky error flag, cleared by reset only
//   ctrl_step               : schedule row executed now (1..16), for observation
// Reset is asynchronous and active low.
//
// Unit counts, schedule and checking period follow the published AR filter
// example; the handshake, word width and sticky error flag are this
// design's own.
module ar_filter_scsc
  import scsc_pkg::*;
#(
  parameter int unsigned WIDTH       = 16,
  parameter int unsigned CHECK_ITERS = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] x_in [NUM_X],
  input  logic [WIDTH-1:0] coef [NUM_C],
  output logic             out_valid,
  output logic             out_checked,
  output logic [WIDTH-1:0] y27,
  output logic [WIDTH-1:0] y28,
  output logic             chk_valid,
  output logic [1:0]       chk_pair,
  output logic             chk_err,
  output logic             error,
  output logic [4:0]       ctrl_step
);
  ctrl_word_t cw;
  logic       cw_valid, x_load, chk_load;

  sc_controller #(.CHECK_ITERS(CHECK_ITERS)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .x_load, .chk_load,
    .cw, .cw_valid, .step(ctrl_step), .out_valid, .out_checked
  );

  sc_datapath #(.WIDTH(WIDTH)) u_dp (
    .clk, .rst_n, .cw, .cw_valid, .x_load, .chk_load, .x_in, .coef,
    .y27, .y28, .chk_valid, .chk_pair, .chk_err
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       error <= 1'b0;
    else if (chk_err) error <= 1'b1;
  end
endmodule
