// processor: the datapath of the accumulator computer (the "Processor"
// box of the block diagram).
//
// It holds PC, MAR, IRX, the address mux, ACCA, the ALU and the Z and C
// flag registers, and is steered entirely by the control bundle from the
// control unit. Connections, as drawn:
//   - the memory data bus (mem_rdata) feeds the load inputs of PC, MAR
//     and IRX and the B operand of the ALU;
//   - ACCA feeds the ALU's A operand and the memory write data;
//   - the ALU result feeds ACCA, its zero and carry outputs feed Z and C;
//   - PC, MAR, the constant 0xFF and IRX enter the address mux, whose
//     output addresses the memory;
//   - IRX (INST), Z and C go back to the control unit.
// All registers change on the rising clock edge and are cleared by the
// asynchronous active-low reset (PC to RESET_PC).
// The write strobe mem_w_n of the control bundle is not used here: the
// memory takes it directly, so lint reports that bit of ctrl as unused.
// The datapath connections follow the block diagram; the ALU operand
// order (ACCA as A, memory as B) follows the instruction descriptions.
module processor
  import ccu_pkg::*;
#(
  parameter addr_t RESET_PC = '0
) (
  input  logic  clk,
  input  logic  reset_n,
  input  ctrl_t ctrl,
  input  data_t mem_rdata,
  output addr_t mem_addr,
  output data_t mem_wdata,
  output data_t inst,
  output logic  z_flag,
  output logic  c_flag,
  output addr_t pc,
  output addr_t mar,
  output data_t acca
);

  data_t alu_y;
  logic  alu_c, alu_z;

  program_counter #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .reset_n,
    .pc_inc_n (ctrl.pc_inc_n),
    .pc_load_n(ctrl.pc_load_n),
    .d        (mem_rdata),
    .pc       (pc)
  );

  load_reg #(.WIDTH(DATA_W)) u_mar (
    .clk, .reset_n, .load_n(ctrl.mar_load_n), .d(mem_rdata), .q(mar)
  );

  load_reg #(.WIDTH(DATA_W)) u_irx (
    .clk, .reset_n, .load_n(ctrl.ir_load_n), .d(mem_rdata), .q(inst)
  );

  addr_mux u_addr_mux (
    .pc(pc), .mar(mar), .irx(inst), .sel(ctrl.addr_mux_sel), .addr(mem_addr)
  );

  alu u_alu (
    .a(acca), .b(mem_rdata), .alu_ctrl(ctrl.alu_ctrl),
    .y(alu_y), .c(alu_c), .z(alu_z)
  );

  load_reg #(.WIDTH(DATA_W)) u_acca (
    .clk, .reset_n, .load_n(ctrl.acca_load_n), .d(alu_y), .q(acca)
  );

  load_reg #(.WIDTH(1)) u_z (
    .clk, .reset_n, .load_n(ctrl.z_load_n), .d(alu_z), .q(z_flag)
  );

  load_reg #(.WIDTH(1)) u_c (
    .clk, .reset_n, .load_n(ctrl.c_load_n), .d(alu_c), .q(c_flag)
  );

  assign mem_wdata = acca;

endmodule
