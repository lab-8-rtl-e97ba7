// control_unit: the computer control unit (CCU), a Mealy finite state
// machine with the four states RESET, FETCH, EX1 and EX2.
//
// Operation
//   RESET  entered asynchronously whenever reset_n is low; all control
//          strobes are inactive. The first clock edge with reset_n high
//          moves to FETCH.
//   FETCH  the same for every instruction: address from PC, IR_Load and
//          PC_Inc active, so the opcode is latched into IRX and PC advances.
//   EX1    first execute cycle, decoded from IRX (and C/Z for branches).
//          Memory-operand instructions (LDAA, STAA, ADDA, SUBA, ANDA, ORAA,
//          CMPA) read the address byte at PC into MAR and advance PC.
//          LDAA #num loads the byte at PC into ACCA and advances PC.
//          Accumulator-only instructions (COMA, INCA, LSLA, LSRA, ASRA)
//          update ACCA and flags. JMP loads the byte at PC into PC; JCS,
//          JCC and JEQ do the same when their flag condition holds and
//          otherwise step PC over the address byte. NOP does nothing.
//   EX2    only for the memory-operand instructions: address from MAR,
//          the ALU combines ACCA with the memory byte (or, for STAA, the
//          memory is written with ACCA).
//   After the last execute cycle the machine returns to FETCH.
//
// Interface
//   irx, c_flag, z_flag are the instruction register and flags; ctrl is
//   the control bundle (see ccu_pkg), whose strobes are active low. The
//   outputs are combinational in state and inputs (Mealy); the state
//   register changes on the rising edge of clk. Two assertions check
//   that PC_Load and PC_Inc are never active together and that MEM_W is
//   only active in EX2.
//
// The four states, the FETCH and LDAA/LDAA# sequences and the active-low
// strobes follow the lab description. Our own choices: the opcode
// numbering (ccu_pkg), asynchronous reset, Z_Load asserted for every
// instruction whose table entry says Z changes (STAA sets Z from ACCA),
// unknown opcodes treated as NOP, and branches done in a single EX1 cycle
// by loading PC straight from the memory data bus.
module control_unit
  import ccu_pkg::*;
(
  input  logic   clk,
  input  logic   reset_n,
  input  data_t  irx,
  input  logic   c_flag,
  input  logic   z_flag,
  output ctrl_t  ctrl,
  output state_t state
);

  state_t state_q, state_d;

  // Instructions that take an address operand and need EX2.
  function automatic logic needs_ex2(input data_t op);
    case (op)
      OP_LDAA, OP_STAA, OP_ADDA, OP_SUBA,
      OP_ANDA, OP_ORAA, OP_CMPA: needs_ex2 = 1'b1;
      default:                   needs_ex2 = 1'b0;
    endcase
  endfunction

  // Next state.
  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_RESET: state_d = ST_FETCH;
      ST_FETCH: state_d = ST_EX1;
      ST_EX1:   state_d = needs_ex2(irx) ? ST_EX2 : ST_FETCH;
      ST_EX2:   state_d = ST_FETCH;
    endcase
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) state_q <= ST_RESET;
    else          state_q <= state_d;
  end

  assign state = state_q;

  // Outputs (Mealy: state and IRX/C/Z).
  always_comb begin
    logic take;
    ctrl = CTRL_IDLE;
    take = 1'b0;
    unique case (state_q)
      ST_RESET: ;
      ST_FETCH: begin
        ctrl.addr_mux_sel = SEL_PC;
        ctrl.ir_load_n    = 1'b0;
        ctrl.pc_inc_n     = 1'b0;
      end
      ST_EX1: begin
        ctrl.addr_mux_sel = SEL_PC;
        case (irx)
          OP_LDAA, OP_STAA, OP_ADDA, OP_SUBA,
          OP_ANDA, OP_ORAA, OP_CMPA: begin
            ctrl.mar_load_n = 1'b0;
            ctrl.pc_inc_n   = 1'b0;
          end
          OP_LDAA_IMM: begin
            ctrl.alu_ctrl    = ALU_LOAD;
            ctrl.acca_load_n = 1'b0;
            ctrl.z_load_n    = 1'b0;
            ctrl.pc_inc_n    = 1'b0;
          end
          OP_COMA: begin
            ctrl.alu_ctrl    = ALU_COM;
            ctrl.acca_load_n = 1'b0;
            ctrl.z_load_n    = 1'b0;
            ctrl.c_load_n    = 1'b0;
          end
          OP_INCA: begin
            ctrl.alu_ctrl    = ALU_INC;
            ctrl.acca_load_n = 1'b0;
            ctrl.z_load_n    = 1'b0;
          end
          OP_LSLA, OP_LSRA, OP_ASRA: begin
            ctrl.alu_ctrl    = (irx == OP_LSLA) ? ALU_LSL :
                               (irx == OP_LSRA) ? ALU_LSR : ALU_ASR;
            ctrl.acca_load_n = 1'b0;
            ctrl.z_load_n    = 1'b0;
            ctrl.c_load_n    = 1'b0;
          end
          OP_JMP, OP_JCS, OP_JCC, OP_JEQ: begin
            take = (irx == OP_JMP) ||
                   (irx == OP_JCS &&  c_flag) ||
                   (irx == OP_JCC && !c_flag) ||
                   (irx == OP_JEQ &&  z_flag);
            if (take) ctrl.pc_load_n = 1'b0;
            else      ctrl.pc_inc_n  = 1'b0;
          end
          default: ;  // NOP and unassigned opcodes
        endcase
      end
      ST_EX2: begin
        ctrl.addr_mux_sel = SEL_MAR;
        case (irx)
          OP_LDAA: begin
            ctrl.alu_ctrl    = ALU_LOAD;
            ctrl.acca_load_n = 1'b0;
            ctrl.z_load_n    = 1'b0;
          end
          OP_STAA: begin
            ctrl.alu_ctrl = ALU_PASSA;
            ctrl.mem_w_n  = 1'b0;
            ctrl.z_load_n = 1'b0;
          end
          OP_ADDA, OP_SUBA: begin
            ctrl.alu_ctrl    = (irx == OP_ADDA) ? ALU_ADD : ALU_SUB;
            ctrl.acca_load_n = 1'b0;
            ctrl.z_load_n    = 1'b0;
            ctrl.c_load_n    = 1'b0;
          end
          OP_ANDA, OP_ORAA: begin
            ctrl.alu_ctrl    = (irx == OP_ANDA) ? ALU_AND : ALU_OR;
            ctrl.acca_load_n = 1'b0;
            ctrl.z_load_n    = 1'b0;
          end
          OP_CMPA: begin
            ctrl.alu_ctrl = ALU_SUB;
            ctrl.z_load_n = 1'b0;
            ctrl.c_load_n = 1'b0;
          end
          default: ;
        endcase
      end
    endcase
  end

  // The PC is never told to load and increment in the same cycle, and
  // memory is only written in EX2.
  a_pc_strobes: assert property (@(posedge clk) disable iff (!reset_n)
    !(!ctrl.pc_inc_n && !ctrl.pc_load_n));
  a_write_in_ex2: assert property (@(posedge clk) disable iff (!reset_n)
    !ctrl.mem_w_n |-> state_q == ST_EX2);

endmodule
