// ccu_examples_tb: runs the two worked example programs cycle by cycle and
// then the JCS instruction with the carry clear and with it set.
//
// The program starts at 0x80 (RESET_PC is set to 0x80 here):
//   80: LDAA F5   (opcode 01)   memory[F5] = 3C
//   82: LDAA #F5  (opcode 02)
//   84: JCS 90    (C = 0: falls through to 86)
//   86: COMA      (ACCA = ~F5 = 0A, C = 1)
//   87: JCS 90    (C = 1: jumps)
//   90: JMP 90
// After every clock edge the state, PC, IRX, MAR and ACCA are compared
// with the register snapshots of the worked examples: after FETCH
// IRX = opcode and PC has advanced; after EX1 of LDAA addr MAR = F5 and
// PC = 82; after EX2 ACCA holds memory[F5] and PC is unchanged; LDAA #F5
// has no EX2 cycle.
module ccu_examples_tb;
  import ccu_pkg::*;

  logic       clk = 1'b0, reset_n;
  logic       ld_we;
  logic [7:0] ld_addr, ld_data;
  logic [7:0] out_port, pc, mar, irx, acca;
  logic [1:0] state;
  logic       z_flag, c_flag;
  logic [$bits(ctrl_t)-1:0] ctrl_bus;

  ccu_system #(.RESET_PC(8'h80)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int jcs_taken = 0, jcs_not = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: state=%0d pc=%02h irx=%02h mar=%02h acca=%02h c=%0d",
               what, state, pc, irx, mar, acca, c_flag);
    end
  endtask

  task automatic load(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk);
    ld_we = 1'b1; ld_addr = a; ld_data = d;
    @(negedge clk);
    ld_we = 1'b0;
  endtask

  // one clock edge, then check
  task automatic step(input state_t s, input logic [7:0] e_pc, input string what);
    @(posedge clk); #1;
    chk(state == s && pc == e_pc, what);
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_we = 1'b0; ld_addr = '0; ld_data = '0;
    reset_n = 1'b0;
    load(8'h80, 8'h01); load(8'h81, 8'hF5);
    load(8'h82, 8'h02); load(8'h83, 8'hF5);
    load(8'h84, 8'h0F); load(8'h85, 8'h90);
    load(8'h86, 8'h09);
    load(8'h87, 8'h0F); load(8'h88, 8'h90);
    load(8'h90, 8'h0E); load(8'h91, 8'h90);
    load(8'hF5, 8'h3C);
    // reset state (example 1, before the program begins)
    chk(state == ST_RESET && pc == 8'h80, "RESET, PC at 80");
    @(negedge clk) reset_n = 1'b1;
    step(ST_FETCH, 8'h80, "leave RESET");
    // example 1: LDAA F5
    step(ST_EX1, 8'h81, "ex1 FETCH");
    chk(irx == 8'h01, "ex1 IRX = 01 after FETCH");
    step(ST_EX2, 8'h82, "ex1 EX1");
    chk(mar == 8'hF5, "ex1 MAR = F5 after EX1");
    step(ST_FETCH, 8'h82, "ex1 EX2");
    chk(acca == 8'h3C, "ex1 ACCA = memory[F5]");
    // example 2: LDAA #F5
    step(ST_EX1, 8'h83, "ex2 FETCH");
    chk(irx == 8'h02, "ex2 IRX = 02 after FETCH");
    step(ST_FETCH, 8'h84, "ex2 EX1, no EX2");
    chk(acca == 8'hF5, "ex2 ACCA = F5");
    // JCS with carry clear: not taken, PC steps over the address byte
    chk(!c_flag, "carry clear before first JCS");
    step(ST_EX1, 8'h85, "JCS fetch");
    step(ST_FETCH, 8'h86, "JCS, C=0, falls through");
    if (pc == 8'h86) jcs_not++;
    // COMA sets C
    step(ST_EX1, 8'h87, "COMA fetch");
    step(ST_FETCH, 8'h87, "COMA");
    chk(acca == 8'h0A && c_flag && !z_flag, "COMA result 0A, C=1");
    // JCS with carry set: taken
    step(ST_EX1, 8'h88, "JCS fetch");
    step(ST_FETCH, 8'h90, "JCS, C=1, jumps to 90");
    if (pc == 8'h90) jcs_taken++;
    step(ST_EX1, 8'h91, "JMP fetch");
    step(ST_FETCH, 8'h90, "JMP 90");
    chk(jcs_taken == 1 && jcs_not == 1, "JCS both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
