// alu_tb: exhaustive-style check of the ALU. For every function it applies
// a set of corner operands plus random ones and compares result, carry and
// zero with values computed here with plain integer arithmetic.
module alu_tb;
  import ccu_pkg::*;

  logic [7:0] a, b, y;
  alu_op_t    alu_ctrl;
  logic       c, z;

  alu dut (.*);

  int checks = 0, failures = 0;

  task automatic one(input alu_op_t f, input int ia, input int ib);
    int r, ec, ey;
    bit care_c;
    a = 8'(ia); b = 8'(ib); alu_ctrl = f;
    #1;
    care_c = 1'b1;
    ec = 0;
    case (f)
      ALU_PASSA: begin ey = ia; care_c = 0; end
      ALU_LOAD:  begin ey = ib; care_c = 0; end
      ALU_ADD:   begin r = ia + ib; ey = r % 256; ec = int'(r > 255); end
      ALU_SUB:   begin r = ia - ib; ey = (r + 256) % 256; ec = int'(ia < ib); end
      ALU_AND:   begin ey = ia & ib; care_c = 0; end
      ALU_OR:    begin ey = ia | ib; care_c = 0; end
      ALU_COM:   begin ey = 255 - ia; ec = 1; end
      ALU_INC:   begin ey = (ia + 1) % 256; care_c = 0; end
      ALU_LSL:   begin ey = (ia * 2) % 256; ec = ia / 128; end
      ALU_LSR:   begin ey = ia / 2; ec = ia % 2; end
      default:   begin ey = ia / 2 + (ia >= 128 ? 128 : 0); ec = ia % 2; end  // ASR
    endcase
    checks++;
    if (y != 8'(ey) || z != (ey == 0) || (care_c && c != ec[0])) begin
      failures++;
      if (failures < 20)
        $display("FAIL f=%0d a=%02h b=%02h: y=%02h c=%0d z=%0d exp y=%02h c=%0d",
                 f, a, b, y, c, z, ey, ec);
    end
  endtask

  initial begin
    static int corner [6] = '{0, 1, 127, 128, 254, 255};
    for (int f = 0; f <= 10; f++) begin
      foreach (corner[i]) foreach (corner[j]) one(alu_op_t'(f), corner[i], corner[j]);
      repeat (300) one(alu_op_t'(f), $urandom_range(0, 255), $urandom_range(0, 255));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
