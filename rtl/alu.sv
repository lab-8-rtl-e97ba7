// alu: 8-bit arithmetic/logic unit of the accumulator datapath.
//
// Operand A is the accumulator ACCA, operand B is the memory data bus.
// The function is chosen by alu_ctrl (ccu_pkg::alu_op_t). The unit is
// purely combinational; its result feeds ACCA and the Z and C flag
// registers, which load it only when the control unit strobes them.
//
//   LOAD  y = B              ADD  y = A + B, c = carry out
//   PASSA y = A              SUB  y = A - B, c = borrow (A < B unsigned)
//   AND   y = A & B          OR   y = A | B
//   COM   y = ~A, c = 1      INC  y = A + 1
//   LSL   y = A << 1, c = A[7]
//   LSR   y = A >> 1, c = A[0]
//   ASR   y = A >>> 1 (sign kept), c = A[0]
//
// z is 1 when y is zero. For functions whose instruction leaves C
// unchanged, c is still driven (0) but the control unit does not load it.
// The list of functions comes from the instruction table; the carry
// convention for SUB (borrow) and the shifts (bit shifted out) is this
// design's own choice.
module alu
  import ccu_pkg::*;
(
  input  data_t   a,
  input  data_t   b,
  input  alu_op_t alu_ctrl,
  output data_t   y,
  output logic    c,
  output logic    z
);

  always_comb begin
    logic [DATA_W:0] wide;
    wide = '0;
    y    = a;
    c    = 1'b0;
    unique case (alu_ctrl)
      ALU_PASSA: y = a;
      ALU_LOAD:  y = b;
      ALU_ADD: begin
        wide = {1'b0, a} + {1'b0, b};
        y    = wide[DATA_W-1:0];
        c    = wide[DATA_W];
      end
      ALU_SUB: begin
        wide = {1'b0, a} - {1'b0, b};
        y    = wide[DATA_W-1:0];
        c    = wide[DATA_W];
      end
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_COM: begin
        y = ~a;
        c = 1'b1;
      end
      ALU_INC:   y = a + 1'b1;
      ALU_LSL: begin
        y = {a[DATA_W-2:0], 1'b0};
        c = a[DATA_W-1];
      end
      ALU_LSR: begin
        y = {1'b0, a[DATA_W-1:1]};
        c = a[0];
      end
      ALU_ASR: begin
        y = {a[DATA_W-1], a[DATA_W-1:1]};
        c = a[0];
      end
      default:   y = a;
    endcase
    z = (y == '0);
  end

endmodule
