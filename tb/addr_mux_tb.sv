// addr_mux_tb: applies random PC, MAR and IRX values with each select and
// checks that the memory address is PC, MAR, 0xFF or IRX respectively.
module addr_mux_tb;
  import ccu_pkg::*;
  logic [7:0] pc, mar, irx, addr, e;
  addr_sel_t  sel;

  addr_mux dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 400; i++) begin
      pc = 8'($urandom); mar = 8'($urandom); irx = 8'($urandom);
      sel = addr_sel_t'(i % 4);
      #1;
      e = (i % 4 == 0) ? pc : (i % 4 == 1) ? mar : (i % 4 == 2) ? 8'hFF : irx;
      checks++;
      if (addr != e) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0d addr=%02h exp %02h", sel, addr, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
