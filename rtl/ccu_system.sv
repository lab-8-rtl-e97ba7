// ccu_system: the complete simple computer - control unit, datapath and
// memory - as in the system block diagram.
//
// The control unit steps each instruction through FETCH, EX1 and, for
// instructions with a memory operand, EX2; the datapath executes the
// strobes it is given; the memory holds program and data and drives the
// output port (writes to address 0xFF).
//
// Ports
//   clk, reset_n      clock (rising edge) and active-low reset; while
//                     reset_n is low the control unit stays in RESET
//   ld_we/ld_addr/ld_data   program-load port into the memory, to be
//                     used while reset_n is low
//   out_port          the output port register
//   state, pc, mar, irx, acca, z_flag, c_flag
//                     architectural state, brought out for observation
//   ctrl_bus          the control signals of the current cycle, in the
//                     field order of ccu_pkg::ctrl_t (active-low strobes)
// Timing: one memory access per clock; an instruction takes 2 cycles
// (FETCH, EX1) or 3 cycles (FETCH, EX1, EX2).
module ccu_system
  import ccu_pkg::*;
#(
  parameter addr_t RESET_PC = '0
) (
  input  logic         clk,
  input  logic         reset_n,
  input  logic         ld_we,
  input  logic [7:0]   ld_addr,
  input  logic [7:0]   ld_data,
  output logic [7:0]   out_port,
  output logic [1:0]   state,
  output logic [7:0]   pc,
  output logic [7:0]   mar,
  output logic [7:0]   irx,
  output logic [7:0]   acca,
  output logic         z_flag,
  output logic         c_flag,
  output logic [$bits(ctrl_t)-1:0] ctrl_bus
);

  ctrl_t  ctrl;
  state_t st;
  addr_t  mem_addr;
  data_t  mem_rdata, mem_wdata;

  control_unit u_ccu (
    .clk, .reset_n,
    .irx   (irx),
    .c_flag(c_flag),
    .z_flag(z_flag),
    .ctrl  (ctrl),
    .state (st)
  );

  processor #(.RESET_PC(RESET_PC)) u_proc (
    .clk, .reset_n,
    .ctrl     (ctrl),
    .mem_rdata(mem_rdata),
    .mem_addr (mem_addr),
    .mem_wdata(mem_wdata),
    .inst     (irx),
    .z_flag   (z_flag),
    .c_flag   (c_flag),
    .pc       (pc),
    .mar      (mar),
    .acca     (acca)
  );

  memory u_mem (
    .clk, .reset_n,
    .addr    (mem_addr),
    .wdata   (mem_wdata),
    .mem_w_n (ctrl.mem_w_n),
    .rdata   (mem_rdata),
    .ld_we   (ld_we),
    .ld_addr (ld_addr),
    .ld_data (ld_data),
    .out_port(out_port)
  );

  assign state    = st;
  assign ctrl_bus = ctrl;

endmodule
