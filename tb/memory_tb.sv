// memory_tb: fills the memory through the load port, then mixes random
// MEM_W writes and asynchronous reads against a shadow array kept in the
// testbench; checks that only writes to 0xFF change the output port and
// that reset clears the port.
module memory_tb;
  logic       clk = 1'b0, reset_n;
  logic [7:0] addr, wdata, rdata, ld_addr, ld_data, out_port;
  logic       mem_w_n, ld_we;
  logic [7:0] shadow [256];
  logic [7:0] e_out;
  int port_writes = 0;

  memory dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    reset_n = 1'b0; mem_w_n = 1'b1; ld_we = 1'b0; addr = '0; wdata = '0; ld_addr = '0; ld_data = '0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      ld_we = 1'b1; ld_addr = 8'(a); ld_data = 8'($urandom);
      shadow[a] = ld_data;
    end
    @(negedge clk) ld_we = 1'b0;
    #1 chk(out_port == 8'h00, "port cleared by reset");
    reset_n = 1'b1;
    e_out = 8'h00;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      addr = (i % 50 == 0) ? 8'hFF : 8'($urandom);
      wdata = 8'($urandom);
      mem_w_n = $urandom_range(0, 2) != 0;
      #1 chk(rdata == shadow[addr], $sformatf("read %02h", addr));
      @(posedge clk); #1;
      if (!mem_w_n) begin
        shadow[addr] = wdata;
        if (addr == 8'hFF) begin e_out = wdata; port_writes++; end
      end
      chk(out_port == e_out, "output port");
      chk(rdata == shadow[addr], "read after write");
    end
    chk(port_writes > 0, "output port written at least once");
    #2 reset_n = 1'b0; #1 chk(out_port == 8'h00, "port cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
