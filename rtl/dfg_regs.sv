// dfg_regs: the register set of one copy of the AR filter DFG.
//
// The data path holds two of these: one for the nominal computation and one
// for the checking computation, which share functional units but never
// registers. A set holds the input words of the current input set and one
// register per DFG operation result (28), so every value keeps its own
// register for its whole lifetime. Any of the NUM_FU functional-unit result
// buses can write any operation register: port p writes register wr_op[p]
// when wr_en[p] is high. The control word never lets two units write the same
// operation in one step; should it happen, the highest-numbered port wins.
//
// Timing: writes and the input load take effect at the rising clock edge
// closing the control step; reset (asynchronous, active low) clears all.
// Keeping registers apart for the two computations follows the design
// method; one register per operation (no lifetime-based sharing) is this
// design's simplification.
module dfg_regs
  import scsc_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_load,
  input  logic [WIDTH-1:0]     x_in  [NUM_X],
  input  logic [NUM_FU-1:0]    wr_en,
  input  op_id_t               wr_op [NUM_FU],
  input  logic [WIDTH-1:0]     wr_data [NUM_FU],
  output logic [WIDTH-1:0]     x_q   [NUM_X],
  output logic [WIDTH-1:0]     v_q   [NUM_OPS+1]   // index = operation number, [0] unused
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NUM_X; i++) x_q[i] <= '0;
    end else if (x_load) begin
      for (int unsigned i = 0; i < NUM_X; i++) x_q[i] <= x_in[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k <= NUM_OPS; k++) v_q[k] <= '0;
    end else begin
      for (int unsigned p = 0; p < NUM_FU; p++)
        if (wr_en[p] && wr_op[p] != '0 && 32'(wr_op[p]) <= NUM_OPS)
          v_q[wr_op[p]] <= wr_data[p];
    end
  end
endmodule
