// processor_tb: drives the datapath with random control words and random
// memory data and checks, every cycle, the address it presents to memory,
// the write data, and the PC, MAR, IRX, ACCA, Z and C registers against a
// register-level model kept in the testbench.
module processor_tb;
  import ccu_pkg::*;
  logic       clk = 1'b0, reset_n;
  ctrl_t      ctrl;
  logic [7:0] mem_rdata, mem_addr, mem_wdata, inst, pc, mar, acca;
  logic       z_flag, c_flag;

  processor dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] e_pc, e_mar, e_ir, e_a;
  logic       e_z, e_c;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // result/carry of the ALU for the model
  task automatic alu_model(input alu_op_t f, input logic [7:0] a, input logic [7:0] b,
                           output logic [7:0] y, output logic c);
    logic [8:0] w;
    c = 1'b0;
    case (f)
      ALU_PASSA: y = a;
      ALU_LOAD:  y = b;
      ALU_ADD:   begin w = a + b; y = w[7:0]; c = w[8]; end
      ALU_SUB:   begin y = a - b; c = a < b; end
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_COM:   begin y = ~a; c = 1'b1; end
      ALU_INC:   y = a + 8'd1;
      ALU_LSL:   begin y = a << 1; c = a[7]; end
      ALU_LSR:   begin y = a >> 1; c = a[0]; end
      default:   begin y = {a[7], a[7:1]}; c = a[0]; end
    endcase
  endtask

  initial begin
    logic [7:0] y, ea;
    logic c;
    reset_n = 1'b0; ctrl = CTRL_IDLE; mem_rdata = '0;
    #12;
    e_pc = 0; e_mar = 0; e_ir = 0; e_a = 0; e_z = 0; e_c = 0;
    chk(pc == 0 && mar == 0 && inst == 0 && acca == 0 && !z_flag && !c_flag, "reset");
    reset_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      ctrl = CTRL_IDLE;
      ctrl.pc_inc_n    = 1'($urandom);
      ctrl.pc_load_n   = ctrl.pc_inc_n ? 1'($urandom) : 1'b1;
      ctrl.mar_load_n  = 1'($urandom);
      ctrl.ir_load_n   = 1'($urandom);
      ctrl.acca_load_n = 1'($urandom);
      ctrl.z_load_n    = 1'($urandom);
      ctrl.c_load_n    = 1'($urandom);
      ctrl.alu_ctrl    = alu_op_t'($urandom_range(0, 10));
      ctrl.addr_mux_sel = addr_sel_t'($urandom_range(0, 3));
      mem_rdata = 8'($urandom);
      #1;
      case (ctrl.addr_mux_sel)
        SEL_PC:  ea = e_pc;
        SEL_MAR: ea = e_mar;
        SEL_HIFF: ea = 8'hFF;
        default: ea = e_ir;
      endcase
      chk(mem_addr == ea, $sformatf("address %02h exp %02h", mem_addr, ea));
      chk(mem_wdata == e_a, "write data is ACCA");
      alu_model(ctrl.alu_ctrl, e_a, mem_rdata, y, c);
      @(posedge clk); #1;
      if (!ctrl.pc_load_n)     e_pc = mem_rdata;
      else if (!ctrl.pc_inc_n) e_pc = e_pc + 8'd1;
      if (!ctrl.mar_load_n)  e_mar = mem_rdata;
      if (!ctrl.ir_load_n)   e_ir = mem_rdata;
      if (!ctrl.acca_load_n) e_a = y;
      if (!ctrl.z_load_n)    e_z = (y == 0);
      if (!ctrl.c_load_n)    e_c = c;
      chk(pc == e_pc && mar == e_mar && inst == e_ir, "PC/MAR/IRX");
      chk(acca == e_a && z_flag == e_z && c_flag == e_c,
          $sformatf("ACCA %02h exp %02h Z %0d/%0d C %0d/%0d", acca, e_a, z_flag, e_z, c_flag, e_c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
