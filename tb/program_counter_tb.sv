// program_counter_tb: random sequences of increment, load and hold on the
// PC, compared each cycle with a counter kept in the testbench; covers
// reset, wrap-around from 0xFF to 0x00 and load-over-increment priority.
module program_counter_tb;
  logic       clk = 1'b0, reset_n;
  logic       pc_inc_n, pc_load_n;
  logic [7:0] d, pc;
  logic [7:0] exp_pc;

  program_counter #(.RESET_PC(8'h80)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    reset_n = 1'b0; pc_inc_n = 1'b1; pc_load_n = 1'b1; d = '0;
    #12;
    checks++; if (pc != 8'h80) begin failures++; $display("FAIL reset value %02h", pc); end
    reset_n = 1'b1;
    exp_pc = 8'h80;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      pc_inc_n  = $urandom_range(0, 3) == 0;
      pc_load_n = $urandom_range(0, 4) != 0;
      d = 8'($urandom);
      if (i == 100) begin pc_load_n = 1'b0; d = 8'hFE; pc_inc_n = 1'b1; end
      @(posedge clk); #1;
      if (!pc_load_n)     exp_pc = d;
      else if (!pc_inc_n) exp_pc = exp_pc + 8'd1;
      checks++;
      if (pc != exp_pc) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d pc=%02h exp %02h", i, pc, exp_pc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
