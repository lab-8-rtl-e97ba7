// load_reg_tb: checks the active-low load register in its 8-bit (MAR,
// IRX, ACCA) and 1-bit (Z, C) forms: asynchronous reset to the reset
// value, load on a low strobe, hold on a high strobe.
module load_reg_tb;
  logic       clk = 1'b0, reset_n;
  logic       ld8_n, ld1_n;
  logic [7:0] d8, q8, e8;
  logic [0:0] d1, q1, e1;

  load_reg #(.WIDTH(8), .RESET_VAL(8'hA5)) dut8 (.clk, .reset_n, .load_n(ld8_n), .d(d8), .q(q8));
  load_reg #(.WIDTH(1))                    dut1 (.clk, .reset_n, .load_n(ld1_n), .d(d1), .q(q1));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input string what);
    checks++;
    if (q8 != e8 || q1 != e1) begin
      failures++;
      if (failures < 10) $display("FAIL %s q8=%02h exp %02h q1=%0d exp %0d", what, q8, e8, q1, e1);
    end
  endtask

  initial begin
    reset_n = 1'b0; ld8_n = 1'b1; ld1_n = 1'b1; d8 = '0; d1 = '0;
    #12; e8 = 8'hA5; e1 = 1'b0; chk("reset");
    reset_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ld8_n = 1'($urandom); ld1_n = 1'($urandom);
      d8 = 8'($urandom); d1 = 1'($urandom);
      @(posedge clk); #1;
      if (!ld8_n) e8 = d8;
      if (!ld1_n) e1 = d1;
      chk("load/hold");
    end
    #2 reset_n = 1'b0; #1;
    e8 = 8'hA5; e1 = 1'b0; chk("asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
