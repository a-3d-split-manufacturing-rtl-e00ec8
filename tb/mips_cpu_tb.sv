// mips_cpu_tb: runs programs on the multi-cycle MIPS with no control plane
// attached and compares memory, PC and cycle count against the reference
// model in mips_asm_pkg. The program uses every instruction (add, sub, and,
// or, slt, addi, lw, sw, beq taken and not taken, j) with random operands.
// A second phase drives the override posts (MemWrite forced low, read data
// replaced) and the taps, and checks their effect.
module mips_cpu_tb;
  import split3d_pkg::*;
  import mips_asm_pkg::*;

  localparam int WORDS = 256;
  localparam int HALT  = 40;        // word address of the "j HALT" loop

  logic clk = 0, rst = 1;
  logic ld_we = 0;
  logic [31:0] ld_addr = 0, ld_data = 0, pc;
  logic tap_en = 0;
  mips_taps_t taps;
  mips_ovr_t  ovr = MIPS_OVR_NATIVE;
  mips_state_e st;
  int checks = 0, failures = 0;

  mips_cpu #(.MEM_WORDS(WORDS)) dut (.clk, .rst, .ld_we, .ld_addr, .ld_data,
                                     .tap_en, .taps, .ovr, .state_o(st), .pc_o(pc));

  always #5 clk = ~clk;

  logic [31:0] prog [];
  logic [31:0] ref_mem [];
  logic [31:0] ref_regs [32];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic void build(input int x, input int y, input int n);
    prog = new[WORDS];
    foreach (prog[i]) prog[i] = 32'h0;
    prog[0]  = i_type(ADDI, 1, 0, x);
    prog[1]  = i_type(ADDI, 2, 0, y);
    prog[2]  = r_type(3, 1, 2, ADD);
    prog[3]  = r_type(4, 1, 2, SUB);
    prog[4]  = r_type(5, 1, 2, AND_);
    prog[5]  = r_type(6, 1, 2, OR_);
    prog[6]  = r_type(7, 2, 1, SLT);
    prog[7]  = i_type(ADDI, 8, 0, 0);
    prog[8]  = i_type(ADDI, 9, 0, n);
    prog[9]  = r_type(8, 8, 1, ADD);          // loop: sum += x
    prog[10] = i_type(ADDI, 9, 9, -1);
    prog[11] = i_type(BEQ, 0, 9, 1);          // done -> 13
    prog[12] = j_type(9);
    prog[13] = i_type(SW, 8, 0, 32'h100);
    prog[14] = i_type(LW, 10, 0, 32'h100);
    prog[15] = i_type(ADDI, 10, 10, 1);
    prog[16] = i_type(SW, 10, 0, 32'h104);
    for (int r = 3; r <= 7; r++) prog[17 + r - 3] = i_type(SW, r, 0, 32'h108 + 4 * (r - 3));
    prog[22] = i_type(ADDI, 11, 0, 32'h100);
    prog[23] = i_type(LW, 12, 11, 4);         // base register addressing
    prog[24] = i_type(SW, 12, 11, 32'h20);
    prog[25] = i_type(BEQ, 1, 2, 2);          // not taken unless x == y
    prog[26] = j_type(HALT);
    prog[HALT] = j_type(HALT);
  endfunction

  task automatic load_and_reset();
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      ld_we = 1; ld_addr = 32'(i * 4); ld_data = prog[i];
      @(negedge clk);
    end
    ld_we = 0;
    @(negedge clk);
    rst = 0;
  endtask

  task automatic run_ref(output int cycles);
    logic [31:0] rpc;
    ref_mem = new[WORDS];
    foreach (prog[i]) ref_mem[i] = prog[i];
    foreach (ref_regs[i]) ref_regs[i] = 0;
    rpc = 0;
    cycles = 0;
    while (rpc != HALT * 4) cycles += step(rpc, ref_regs, ref_mem, WORDS);
  endtask

  initial begin
    for (int run = 0; run < 4; run++) begin
      int x, y, n, exp_cycles, cyc;
      x = int'($urandom_range(0, 2000)) - 1000;
      y = (run == 3) ? x : int'($urandom_range(0, 2000)) - 1000;
      n = int'($urandom_range(1, 6));
      build(x, y, n);
      run_ref(exp_cycles);
      load_and_reset();
      cyc = 0;
      // count cycles until the processor fetches the halt loop
      while (!(pc == HALT * 4 && st == S0_FETCH) && cyc < 2000) begin
        @(negedge clk); cyc++;
      end
      check(cyc == exp_cycles, $sformatf("run %0d cycles %0d expected %0d", run, cyc, exp_cycles));
      for (int i = 0; i < WORDS; i++)
        check(dut.mem[i] == ref_mem[i], $sformatf("run %0d mem[%0d]=%h expected %h", run, i,
                                                  dut.mem[i], ref_mem[i]));
    end

    // ---- posts: MemWrite overridden low blocks stores; taps follow ----
    build(7, 9, 2);
    load_and_reset();
    tap_en = 1;
    ovr.memwr_n = 0; ovr.memwr_v = 0;
    #1;
    begin
      int cyc = 0, fetches = 0, tap_ok = 1;
      while (!(pc == HALT * 4 && st == S0_FETCH) && cyc < 2000) begin
        if (st == S0_FETCH) begin
          fetches++;
          if (taps.addr != pc || !taps.irwrite) tap_ok = 0;
        end
        @(negedge clk); cyc++;
      end
      check(tap_ok == 1, "address/IRWrite taps during fetch");
      check(fetches > 20, "fetches seen");
      check(dut.mem[64] == 0 && dut.mem[66] == 0, "stores blocked by MemWrite override");
    end
    // read-data override: every fetched instruction replaced by addi $13,$13,1
    ovr = MIPS_OVR_NATIVE;
    build(1, 2, 1);
    load_and_reset();
    ovr.rd_n = 0; ovr.rd_v = i_type(ADDI, 13, 13, 1);
    begin
      logic [31:0] r13_0;
      r13_0 = dut.rf[13];
      repeat (4 * 10) @(negedge clk);
      check(dut.rf[13] == r13_0 + 10, $sformatf("read-data override: $13 advanced by %0d, expected 10",
                                                 dut.rf[13] - r13_0));
    end
    check(dut.rf[1] != 1, "original program not executed under override");
    // controller-reset override holds the FSM in Fetch (instruction skipped)
    ovr = MIPS_OVR_NATIVE;
    load_and_reset();
    ovr.reset_n = 0; ovr.reset_v = 1;
    repeat (6) @(negedge clk);
    check(st == S0_FETCH, "controller reset override");
    ovr = MIPS_OVR_NATIVE;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
