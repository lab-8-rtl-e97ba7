// ccu_system_tb: end-to-end test of the complete computer at its default
// parameters.
//
// An instruction-level reference model (its own copy of memory, PC, ACCA,
// C, Z and the output port) runs beside the design. Every time the design
// enters FETCH, the model's state is compared with the design's and the
// model then executes one instruction; the number of cycles the design
// spent on the previous instruction is checked against 2 (FETCH, EX1) or
// 3 (FETCH, EX1, EX2). The FETCH control word is checked as well.
//
// Programs: a directed program that includes the two worked examples
// (LDAA addr at 0x80, LDAA #num at 0x82), every instruction, every
// conditional branch taken and not taken and a store to the output port,
// with hand-worked end values; then random programs, with reset asserted
// in the middle of execution between them. Each mechanism (every opcode,
// taken/not-taken branches, EX2 cycles, reset hold, output-port write,
// carry and borrow) is counted and must occur at least once.
module ccu_system_tb;
  import ccu_pkg::*;

  logic       clk = 1'b0;
  logic       reset_n;
  logic       ld_we;
  logic [7:0] ld_addr, ld_data;
  logic [7:0] out_port, pc, mar, irx, acca;
  logic [1:0] state;
  logic       z_flag, c_flag;
  logic [$bits(ctrl_t)-1:0] ctrl_bus;

  ccu_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // reference model
  logic [7:0] m_mem [256];
  logic [7:0] m_pc, m_a, m_out;
  logic       m_c, m_z;

  // mechanism counters
  int op_cnt [32];
  int br_taken [3], br_not [3];   // JCS, JCC, JEQ
  int ex2_cnt, reset_hold_cnt, out_wr_cnt, add_carry_cnt, sub_borrow_cnt;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Executes one instruction in the model; returns its cycle count.
  function automatic int model_step();
    logic [7:0] op, opd, ea;
    logic [8:0] w;
    bit take;
    int cyc;
    op = m_mem[m_pc];
    m_pc++;
    cyc = 2;
    if (op <= 8'h11) op_cnt[op[4:0]]++;
    else             op_cnt[31]++;
    case (op)
      OP_LDAA, OP_STAA, OP_ADDA, OP_SUBA, OP_ANDA, OP_ORAA, OP_CMPA: begin
        ea = m_mem[m_pc];
        m_pc++;
        cyc = 3;
        opd = m_mem[ea];
        case (op)
          OP_LDAA: begin m_a = opd; m_z = (m_a == 0); end
          OP_STAA: begin
            m_mem[ea] = m_a; m_z = (m_a == 0);
            if (ea == 8'hFF) begin m_out = m_a; out_wr_cnt++; end
          end
          OP_ADDA: begin
            w = {1'b0, m_a} + {1'b0, opd}; m_a = w[7:0]; m_c = w[8]; m_z = (m_a == 0);
            if (m_c) add_carry_cnt++;
          end
          OP_SUBA, OP_CMPA: begin
            w = {1'b0, m_a} - {1'b0, opd}; m_c = w[8]; m_z = (w[7:0] == 0);
            if (op == OP_SUBA) m_a = w[7:0];
            if (m_c) sub_borrow_cnt++;
          end
          OP_ANDA: begin m_a = m_a & opd; m_z = (m_a == 0); end
          default: begin m_a = m_a | opd; m_z = (m_a == 0); end
        endcase
      end
      OP_LDAA_IMM: begin m_a = m_mem[m_pc]; m_pc++; m_z = (m_a == 0); end
      OP_COMA: begin m_a = ~m_a; m_c = 1'b1; m_z = (m_a == 0); end
      OP_INCA: begin m_a = m_a + 8'd1; m_z = (m_a == 0); end
      OP_LSLA: begin m_c = m_a[7]; m_a = m_a << 1; m_z = (m_a == 0); end
      OP_LSRA: begin m_c = m_a[0]; m_a = m_a >> 1; m_z = (m_a == 0); end
      OP_ASRA: begin m_c = m_a[0]; m_a = {m_a[7], m_a[7:1]}; m_z = (m_a == 0); end
      OP_JMP, OP_JCS, OP_JCC, OP_JEQ: begin
        take = (op == OP_JMP) || (op == OP_JCS && m_c) ||
               (op == OP_JCC && !m_c) || (op == OP_JEQ && m_z);
        if (op != OP_JMP) begin
          logic [7:0] bi;
          bi = op - OP_JCS;
          if (take) br_taken[bi[1:0]]++;
          else      br_not[bi[1:0]]++;
        end
        if (take) m_pc = m_mem[m_pc];
        else      m_pc++;
      end
      default: ;
    endcase
    return cyc;
  endfunction

  task automatic load_byte(input logic [7:0] a, input logic [7:0] d);
    ld_we = 1'b1; ld_addr = a; ld_data = d;
    @(posedge clk); #1;
    ld_we = 1'b0;
    m_mem[a] = d;
  endtask

  // Reset the machine (and model), hold reset a few cycles and check that
  // the control unit stays in RESET with every strobe inactive.
  task automatic hold_reset(input int n);
    bit was_high;
    was_high = reset_n;
    reset_n = 1'b0;
    #1;
    if (was_high) check(state == ST_RESET, "async reset to RESET");
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      check(state == ST_RESET && ctrl_bus == CTRL_IDLE, "RESET held while reset low");
      reset_hold_cnt++;
    end
    m_pc = 8'h00; m_a = 8'h00; m_c = 1'b0; m_z = 1'b0; m_out = 8'h00;
  endtask

  // Run n instructions from reset, comparing at each FETCH.
  task automatic run(input int n);
    int exp_cyc, cyc;
    @(negedge clk);
    reset_n = 1'b1;
    exp_cyc = -1;
    cyc = 0;
    for (int k = 0; k <= n; ) begin
      @(posedge clk); #1;
      cyc++;
      if (state == ST_EX2) ex2_cnt++;
      if (state == ST_FETCH) begin
        if (exp_cyc >= 0) check(cyc == exp_cyc, $sformatf("cycles %0d exp %0d", cyc, exp_cyc));
        check(pc == m_pc,      $sformatf("PC %02h exp %02h", pc, m_pc));
        check(acca == m_a,     $sformatf("ACCA %02h exp %02h", acca, m_a));
        check(c_flag == m_c,   "C flag");
        check(z_flag == m_z,   "Z flag");
        check(out_port == m_out, "output port");
        begin
          ctrl_t f;
          f = CTRL_IDLE;
          f.ir_load_n = 1'b0;
          f.pc_inc_n  = 1'b0;
          check(ctrl_bus == f, "FETCH control word");
        end
        k++;
        if (k <= n) exp_cyc = model_step();
        cyc = 0;
      end
    end
  endtask

  task automatic check_mem();
    for (int a = 0; a < 256; a++)
      check(dut.u_mem.mem[a] == m_mem[a], $sformatf("memory[%02h]", a));
  endtask

  // Directed program: worked examples plus every instruction.
  localparam logic [7:0] PROG [0:51] = '{
    8'h0E, 8'h80,        // 00: JMP 80 (lands in the second half of memory)
    8'h01, 8'hF5,        // 80: LDAA F5    (example 1)
    8'h02, 8'hF5,        // 82: LDAA #F5   (example 2)
    8'h04, 8'hF0,        // 84: ADDA F0    F5+20 = 15, C=1
    8'h0F, 8'h8A,        // 86: JCS 8A     taken
    8'h00, 8'h00,        // 88: NOP NOP    skipped
    8'h10, 8'h00,        // 8A: JCC 00     not taken
    8'h05, 8'hF1,        // 8C: SUBA F1    15-15 = 0, Z=1, C=0
    8'h11, 8'h92,        // 8E: JEQ 92     taken
    8'h00, 8'h00,        // 90: skipped
    8'h10, 8'h96,        // 92: JCC 96     taken
    8'h00, 8'h00,        // 94: skipped
    8'h0F, 8'h00,        // 96: JCS 00     not taken
    8'h09, 8'h0A,        // 98: COMA (FF, C=1); 99: INCA (00, Z=1)
    8'h02, 8'h81,        // 9A: LDAA #81
    8'h11, 8'h00,        // 9C: JEQ 00     not taken
    8'h0B, 8'h0C,        // 9E: LSLA (02, C=1); 9F: LSRA (01, C=0)
    8'h02, 8'h81,        // A0: LDAA #81
    8'h0D, 8'h06,        // A2: ASRA (C0, C=1); A3: ANDA F2
    8'hF2, 8'h07,        //     -> C0 & 0F = 00;  A5: ORAA F3
    8'hF3, 8'h08,        //     -> 5A;            A7: CMPA F4
    8'hF4, 8'h03,        //     5A-5A: Z=1, C=0;  A9: STAA FF
    8'hFF, 8'h03,        //     out port = 5A;    AB: STAA E0
    8'hE0, 8'h05,        //                       AD: SUBA F0
    8'hF0, 8'h00,        //     5A-20 = 3A;       AF: NOP
    8'h0E, 8'hB0         // B0: JMP B0 (loop)
  };

  initial begin
    // watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_we = 1'b0; ld_addr = '0; ld_data = '0;
    reset_n = 1'b0;
    foreach (op_cnt[i]) op_cnt[i] = 0;
    foreach (br_taken[i]) begin br_taken[i] = 0; br_not[i] = 0; end
    ex2_cnt = 0; reset_hold_cnt = 0; out_wr_cnt = 0; add_carry_cnt = 0; sub_borrow_cnt = 0;

    // ---- directed program ----
    hold_reset(3);
    for (int a = 0; a < 256; a++) load_byte(a[7:0], 8'h00);
    load_byte(8'h00, PROG[0]);
    load_byte(8'h01, PROG[1]);
    for (int i = 2; i < 52; i++) load_byte(8'h80 + 8'(i - 2), PROG[i]);
    load_byte(8'hF5, 8'h37);
    load_byte(8'hF0, 8'h20);
    load_byte(8'hF1, 8'h15);
    load_byte(8'hF2, 8'h0F);
    load_byte(8'hF3, 8'h5A);
    load_byte(8'hF4, 8'h5A);
    hold_reset(2);
    // 2 instructions: JMP, LDAA F5 -> ACCA = mem[F5] (example 1)
    run(2);
    check(acca == 8'h37 && pc == 8'h82, "example 1: LDAA F5 loads 37, PC=82");
    hold_reset(1);
    run(3);
    check(acca == 8'hF5 && pc == 8'h84, "example 2: LDAA #F5 loads F5, PC=84");
    hold_reset(1);
    run(32);
    check(out_port == 8'h5A, "directed: out port 5A");
    check(dut.u_mem.mem[8'hE0] == 8'h5A, "directed: memory[E0] = 5A");
    check(acca == 8'h3A && pc == 8'hB0 && !c_flag && !z_flag, "directed: final ACCA 3A at loop");
    check_mem();

    // ---- random programs, reset in mid-execution between them ----
    for (int p = 0; p < 6; p++) begin
      hold_reset(2);
      for (int a = 0; a < 256; a++) begin
        logic [7:0] v;
        v = $urandom_range(0, 3) == 0 ? 8'($urandom) : 8'($urandom_range(0, 8'h12));
        load_byte(a[7:0], v);
      end
      hold_reset(1);
      run(400);
      check_mem();
      // assert reset asynchronously in the middle of a cycle
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #3;
    end
    hold_reset(2);

    // ---- mechanism coverage ----
    for (int o = 0; o <= 8'h11; o++) check(op_cnt[o] > 0, $sformatf("opcode %02h never ran", o));
    for (int b = 0; b < 3; b++) begin
      check(br_taken[b] > 0, $sformatf("branch %0d never taken", b));
      check(br_not[b] > 0,   $sformatf("branch %0d never fell through", b));
    end
    check(ex2_cnt > 0,        "EX2 never entered");
    check(reset_hold_cnt > 0, "reset never held");
    check(out_wr_cnt > 0,     "output port never written");
    check(add_carry_cnt > 0,  "ADDA never carried");
    check(sub_borrow_cnt > 0, "SUBA/CMPA never borrowed");
    $display("coverage: EX2=%0d reset=%0d outwr=%0d JCS %0d/%0d JCC %0d/%0d JEQ %0d/%0d undefined-op=%0d",
             ex2_cnt, reset_hold_cnt, out_wr_cnt, br_taken[0], br_not[0], br_taken[1], br_not[1],
             br_taken[2], br_not[2], op_cnt[31]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
