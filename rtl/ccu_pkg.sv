// ccu_pkg: types and constants shared by the blocks of the simple 8-bit
// accumulator computer (control unit, datapath, memory).
//
// The machine has one 8-bit accumulator (ACCA), an 8-bit program counter,
// an 8-bit memory address register (MAR), an instruction register (IRX),
// carry (C) and zero (Z) flags and a 256 x 8 memory. The instruction set
// has 18 instructions; opcodes 0x01 (LDAA addr) and 0x02 (LDAA #num) are
// fixed by the worked examples, the remaining opcodes are this design's
// own choice: they are numbered in the order of the instruction table,
// starting at 0x00 for NOP, so that the two given opcodes fall into place.
// Any opcode above 0x11 is executed as a NOP.
//
// Control signals: all load/increment/write strobes are active low (the
// "_n" suffix); only the ALU function and the address mux select are
// encoded values.
package ccu_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned ADDR_W = 8;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Control unit states.
  typedef enum logic [1:0] {
    ST_RESET = 2'd0,
    ST_FETCH = 2'd1,
    ST_EX1   = 2'd2,
    ST_EX2   = 2'd3
  } state_t;

  // Opcodes (NOP..JEQ in instruction-table order).
  typedef enum logic [7:0] {
    OP_NOP      = 8'h00,
    OP_LDAA     = 8'h01,  // LDAA addr
    OP_LDAA_IMM = 8'h02,  // LDAA #num
    OP_STAA     = 8'h03,
    OP_ADDA     = 8'h04,
    OP_SUBA     = 8'h05,
    OP_ANDA     = 8'h06,
    OP_ORAA     = 8'h07,
    OP_CMPA     = 8'h08,
    OP_COMA     = 8'h09,
    OP_INCA     = 8'h0A,
    OP_LSLA     = 8'h0B,
    OP_LSRA     = 8'h0C,
    OP_ASRA     = 8'h0D,
    OP_JMP      = 8'h0E,
    OP_JCS      = 8'h0F,
    OP_JCC      = 8'h10,
    OP_JEQ      = 8'h11
  } opcode_t;

  // ALU functions (Alu_Ctrl). A is ACCA, B is the memory data bus.
  typedef enum logic [3:0] {
    ALU_PASSA = 4'd0,  // result = A (used to set Z on a store)
    ALU_LOAD  = 4'd1,  // result = B
    ALU_ADD   = 4'd2,  // A + B, C = carry out
    ALU_SUB   = 4'd3,  // A - B, C = borrow
    ALU_AND   = 4'd4,
    ALU_OR    = 4'd5,
    ALU_COM   = 4'd6,  // ~A, C = 1
    ALU_INC   = 4'd7,  // A + 1
    ALU_LSL   = 4'd8,  // C = A[7]
    ALU_LSR   = 4'd9,  // C = A[0]
    ALU_ASR   = 4'd10  // C = A[0], sign kept
  } alu_op_t;

  // Address mux select (Addr_Mux_Sel), inputs in the order of the block
  // diagram: PC, MAR, the constant 0xFF, IRX.
  typedef enum logic [1:0] {
    SEL_PC   = 2'd0,
    SEL_MAR  = 2'd1,
    SEL_HIFF = 2'd2,
    SEL_IRX  = 2'd3
  } addr_sel_t;

  // The bundle of control signals from the control unit to the datapath
  // and memory. Strobes are active low.
  typedef struct packed {
    logic      pc_inc_n;
    logic      pc_load_n;
    logic      mar_load_n;
    logic      ir_load_n;
    logic      acca_load_n;
    logic      z_load_n;
    logic      c_load_n;
    logic      mem_w_n;
    alu_op_t   alu_ctrl;
    addr_sel_t addr_mux_sel;
  } ctrl_t;

  // All strobes inactive, address from PC, ALU passing ACCA.
  localparam ctrl_t CTRL_IDLE = '{
    pc_inc_n:     1'b1,
    pc_load_n:    1'b1,
    mar_load_n:   1'b1,
    ir_load_n:    1'b1,
    acca_load_n:  1'b1,
    z_load_n:     1'b1,
    c_load_n:     1'b1,
    mem_w_n:      1'b1,
    alu_ctrl:     ALU_PASSA,
    addr_mux_sel: SEL_PC
  };

endpackage
