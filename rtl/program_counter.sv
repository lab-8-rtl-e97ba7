// program_counter: the PC register of the datapath.
//
// On a rising clock edge the PC is loaded from the memory data bus when
// pc_load_n is low (jumps), otherwise incremented when pc_inc_n is low,
// otherwise held. Both strobes are active low, as on the block diagram.
// Load wins if both are active (the control unit never asserts both).
// An asynchronous active-low reset sets the PC to RESET_PC.
//
// The load and increment inputs come from the block diagram; the reset
// value and the priority between the strobes are this design's choice.
module program_counter
  import ccu_pkg::*;
#(
  parameter addr_t RESET_PC = '0
) (
  input  logic  clk,
  input  logic  reset_n,
  input  logic  pc_inc_n,
  input  logic  pc_load_n,
  input  data_t d,
  output addr_t pc
);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n)        pc <= RESET_PC;
    else if (!pc_load_n) pc <= d;
    else if (!pc_inc_n)  pc <= pc + 1'b1;
  end

endmodule
