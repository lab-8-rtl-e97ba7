// control_unit_tb: checks the control unit's state sequence and the
// control word it produces in every state, for every opcode and every
// combination of the C and Z flags.
//
// Expected control words are written out per instruction below from the
// instruction descriptions (which strobes each cycle needs), not derived
// from the design. The test also holds reset low for several cycles
// (the unit must stay in RESET with all strobes inactive), releases it,
// and checks that each instruction takes 2 or 3 cycles before the next
// FETCH.
module control_unit_tb;
  import ccu_pkg::*;

  logic   clk = 1'b0;
  logic   reset_n;
  logic [7:0] irx;
  logic   c_flag, z_flag;
  ctrl_t  ctrl;
  state_t state;

  control_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int jcs_taken = 0, jcs_not = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Builds a control word from a list of active strobes.
  function automatic ctrl_t cw(input bit inc, input bit ld, input bit mar, input bit ir,
                               input bit acc, input bit zl, input bit cl, input bit w,
                               input alu_op_t f, input addr_sel_t s);
    ctrl_t r;
    r.pc_inc_n = !inc; r.pc_load_n = !ld; r.mar_load_n = !mar; r.ir_load_n = !ir;
    r.acca_load_n = !acc; r.z_load_n = !zl; r.c_load_n = !cl; r.mem_w_n = !w;
    r.alu_ctrl = f; r.addr_mux_sel = s;
    return r;
  endfunction

  // Expected EX1/EX2 words and cycle count per opcode and flags.
  task automatic expected(input logic [7:0] op, input bit c, input bit z,
                          output ctrl_t e1, output ctrl_t e2, output bit two);
    ctrl_t marld;
    marld = cw(1,0,1,0, 0,0,0,0, ALU_PASSA, SEL_PC);   // read address byte into MAR
    two = 1'b1;
    e2  = CTRL_IDLE;
    e1  = marld;
    case (op)
      8'h01: e2 = cw(0,0,0,0, 1,1,0,0, ALU_LOAD,  SEL_MAR);   // LDAA addr
      8'h03: e2 = cw(0,0,0,0, 0,1,0,1, ALU_PASSA, SEL_MAR);   // STAA
      8'h04: e2 = cw(0,0,0,0, 1,1,1,0, ALU_ADD,   SEL_MAR);   // ADDA
      8'h05: e2 = cw(0,0,0,0, 1,1,1,0, ALU_SUB,   SEL_MAR);   // SUBA
      8'h06: e2 = cw(0,0,0,0, 1,1,0,0, ALU_AND,   SEL_MAR);   // ANDA
      8'h07: e2 = cw(0,0,0,0, 1,1,0,0, ALU_OR,    SEL_MAR);   // ORAA
      8'h08: e2 = cw(0,0,0,0, 0,1,1,0, ALU_SUB,   SEL_MAR);   // CMPA
      default: begin
        two = 1'b0;
        case (op)
          8'h02: e1 = cw(1,0,0,0, 1,1,0,0, ALU_LOAD, SEL_PC);  // LDAA #num
          8'h09: e1 = cw(0,0,0,0, 1,1,1,0, ALU_COM,  SEL_PC);  // COMA
          8'h0A: e1 = cw(0,0,0,0, 1,1,0,0, ALU_INC,  SEL_PC);  // INCA
          8'h0B: e1 = cw(0,0,0,0, 1,1,1,0, ALU_LSL,  SEL_PC);  // LSLA
          8'h0C: e1 = cw(0,0,0,0, 1,1,1,0, ALU_LSR,  SEL_PC);  // LSRA
          8'h0D: e1 = cw(0,0,0,0, 1,1,1,0, ALU_ASR,  SEL_PC);  // ASRA
          8'h0E: e1 = cw(0,1,0,0, 0,0,0,0, ALU_PASSA, SEL_PC); // JMP
          8'h0F: e1 = c  ? cw(0,1,0,0, 0,0,0,0, ALU_PASSA, SEL_PC)
                         : cw(1,0,0,0, 0,0,0,0, ALU_PASSA, SEL_PC);  // JCS
          8'h10: e1 = !c ? cw(0,1,0,0, 0,0,0,0, ALU_PASSA, SEL_PC)
                         : cw(1,0,0,0, 0,0,0,0, ALU_PASSA, SEL_PC);  // JCC
          8'h11: e1 = z  ? cw(0,1,0,0, 0,0,0,0, ALU_PASSA, SEL_PC)
                         : cw(1,0,0,0, 0,0,0,0, ALU_PASSA, SEL_PC);  // JEQ
          default: e1 = CTRL_IDLE;                              // NOP, unassigned
        endcase
      end
    endcase
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_t e1, e2, fw;
    bit two;
    fw = CTRL_IDLE; fw.ir_load_n = 1'b0; fw.pc_inc_n = 1'b0;
    irx = 8'h00; c_flag = 1'b0; z_flag = 1'b0;
    reset_n = 1'b0;
    repeat (4) begin
      @(posedge clk); #1;
      check(state == ST_RESET && ctrl == CTRL_IDLE, "stays in RESET while reset low");
    end
    @(negedge clk) reset_n = 1'b1;
    @(posedge clk); #1;
    check(state == ST_FETCH, "RESET -> FETCH after release");

    for (int op = 0; op < 20; op++)
      for (int f = 0; f < 4; f++) begin
        // in FETCH now; IRX still holds the old value
        check(state == ST_FETCH && ctrl == fw, $sformatf("FETCH word op %02h", op));
        @(negedge clk);
        irx = 8'(op); c_flag = f[0]; z_flag = f[1];
        expected(irx, c_flag, z_flag, e1, e2, two);
        @(posedge clk); #1;
        check(state == ST_EX1, "FETCH -> EX1");
        check(ctrl == e1, $sformatf("EX1 word op %02h c%0d z%0d: got %h exp %h", op, c_flag, z_flag, ctrl, e1));
        if (op == 15) begin
          if (c_flag) jcs_taken++; else jcs_not++;
        end
        if (two) begin
          @(posedge clk); #1;
          check(state == ST_EX2, $sformatf("EX1 -> EX2 op %02h", op));
          check(ctrl == e2, $sformatf("EX2 word op %02h: got %h exp %h", op, ctrl, e2));
        end
        @(posedge clk); #1;
        check(state == ST_FETCH, $sformatf("back to FETCH op %02h", op));
      end

    // reset in the middle of EX1: immediate return to RESET
    @(posedge clk); #1;
    check(state == ST_EX1, "in EX1 before reset");
    #2 reset_n = 1'b0;
    #1 check(state == ST_RESET && ctrl == CTRL_IDLE, "asynchronous reset from EX1");

    check(jcs_taken > 0 && jcs_not > 0, "JCS tested with carry set and clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
