// addr_mux: the memory address multiplexer (ADDR_MUX).
//
// Selects the memory address from one of four sources, in the order the
// block diagram draws them: the PC, the MAR, the constant 0xFF and IRX.
// Purely combinational. The control unit only uses PC (fetch, operand
// and immediate reads) and MAR (data access); the 0xFF and IRX inputs are
// present as drawn, but no instruction of the set selects them.
// The two-bit select encoding is this design's own choice.
module addr_mux
  import ccu_pkg::*;
(
  input  addr_t     pc,
  input  addr_t     mar,
  input  addr_t     irx,
  input  addr_sel_t sel,
  output addr_t     addr
);

  always_comb begin
    unique case (sel)
      SEL_PC:   addr = pc;
      SEL_MAR:  addr = mar;
      SEL_HIFF: addr = 8'hFF;
      SEL_IRX:  addr = irx;
    endcase
  end

endmodule
