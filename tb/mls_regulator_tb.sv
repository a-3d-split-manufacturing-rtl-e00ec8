// mls_regulator_tb: the regulator bonded to the multi-cycle MIPS.
// Each run labels the instructions and data words at random, runs a first
// part of the program at level TS (writing registers and data labelled TS),
// then lowers the process level at a fixed instruction boundary and runs a
// second part whose ALU operations, loads and stores use those registers,
// randomly labelled data and randomly labelled instructions. A reference
// model of the policy (skip instructions above the level, block register
// writes from higher sources, block loads/stores above the level or through a
// higher address register, relabel written data and executed lower
// instructions) predicts registers, memory, labels, cycle count and the
// number of skip / blocked-load / blocked-store / relabel events.
module mls_regulator_tb;
  import split3d_pkg::*;
  import mips_asm_pkg::*;

  localparam int WORDS  = 256;
  localparam int SWITCH = 8;     // first instruction of part 2
  localparam int HALT   = 40;

  logic clk = 0, rst = 1;
  logic ld_we = 0, tld_we = 0;
  logic [31:0] ld_addr = 0, ld_data = 0, tld_addr = 0, pc;
  level_t tld_data = 0, level = 3;
  logic tap_en;
  mips_taps_t taps;
  mips_ovr_t  ovr;
  mips_state_e st;
  reg_state_e rst_state;
  logic ev_skip, ev_deny_ld, ev_deny_st, ev_creep;
  int checks = 0, failures = 0;
  int tot_skip = 0, tot_dld = 0, tot_dst = 0, tot_creep = 0;

  mips_cpu #(.MEM_WORDS(WORDS)) cpu (.clk, .rst, .ld_we, .ld_addr, .ld_data, .tap_en,
                                     .taps, .ovr, .state_o(st), .pc_o(pc));
  mls_regulator #(.MEM_WORDS(WORDS)) dut (.clk, .rst, .proc_level(level), .tld_we, .tld_addr,
      .tld_data, .tap_en, .taps, .ovr, .state_o(rst_state), .ev_skip, .ev_deny_ld,
      .ev_deny_st, .ev_creep);

  always #5 clk = ~clk;

  logic [31:0] prog [WORDS];
  level_t      tags [WORDS];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic level_t lmax(level_t a, level_t b);
    return (a > b) ? a : b;
  endfunction

  initial begin
    for (int run = 0; run < 24; run++) begin
      logic [31:0] m [WORDS];
      logic [31:0] r [32];
      level_t t [WORDS];
      level_t sr [32];
      level_t low;
      int e_skip, e_dld, e_dst, e_creep, exp_cyc, cyc, n_skip, n_dld, n_dst, n_creep;
      int x, y;

      x = int'($urandom_range(0, 999));
      y = int'($urandom_range(0, 999));
      low = level_t'($urandom_range(0, 3));
      foreach (prog[i]) prog[i] = 0;
      prog[0] = i_type(ADDI, 1, 0, x);
      prog[1] = i_type(ADDI, 2, 0, y);
      prog[2] = i_type(ADDI, 3, 0, 32'h100);
      prog[3] = i_type(SW, 1, 3, 0);
      prog[4] = i_type(SW, 2, 3, 4);
      prog[5] = i_type(ADDI, 10, 0, 0);
      prog[6] = i_type(ADDI, 11, 0, 0);
      prog[7] = j_type(SWITCH);
      prog[8]  = r_type(4, 1, 2, ADD);
      prog[9]  = i_type(ADDI, 5, 1, 7);
      prog[10] = i_type(ADDI, 6, 0, 32'h140);
      prog[11] = i_type(LW, 7, 6, 0);
      prog[12] = i_type(LW, 8, 6, 4);
      prog[13] = i_type(SW, 7, 6, 8);
      prog[14] = i_type(SW, 6, 6, 12);
      prog[15] = i_type(LW, 9, 3, 0);
      prog[16] = i_type(SW, 6, 3, 16);
      for (int i = 17; i <= 24; i++) prog[i] = i_type(ADDI, 10, 10, 1);
      prog[25] = i_type(BEQ, 0, 0, 1);
      prog[26] = i_type(ADDI, 11, 11, 1);
      prog[27] = j_type(HALT);
      prog[HALT] = j_type(HALT);
      for (int i = 80; i < 85; i++) prog[i] = 32'(i * 1000 + run);
      foreach (tags[i]) tags[i] = 0;
      for (int i = SWITCH; i <= 27; i++) tags[i] = level_t'($urandom_range(0, 3));
      tags[10] = 0;                      // keep the data pointer setup
      for (int i = 80; i < 85; i++) tags[i] = level_t'($urandom_range(0, 3));

      // ---------------- reference model ----------------
      foreach (m[i]) begin m[i] = prog[i]; t[i] = tags[i]; end
      foreach (r[i]) begin r[i] = 0; sr[i] = 0; end
      begin
        logic [31:0] rpc, ins, imm;
        logic [4:0] rs, rt, rd;
        int w, a;
        level_t L;
        rpc = 0;
        exp_cyc = 0; e_skip = 0; e_dld = 0; e_dst = 0; e_creep = 0;
        while (rpc != HALT * 4) begin
          w = int'(rpc >> 2);
          ins = m[w];
          rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
          imm = {{16{ins[15]}}, ins[15:0]};
          L = (w >= SWITCH && w < HALT) ? low : 3;
          if (t[w] > L) begin
            e_skip++; exp_cyc += 2; rpc += 4;
            continue;
          end
          if (t[w] < L) begin t[w] = L; e_creep++; end
          rpc += 4;
          case (ins[31:26])
            6'b000000: begin
              exp_cyc += 4;
              if (sr[rs] > L || sr[rt] > L) e_dld++;
              else if (rd != 0) begin r[rd] = r[rs] + r[rt]; sr[rd] = L; end
            end
            ADDI: begin
              exp_cyc += 4;
              if (sr[rs] > L) e_dld++;
              else if (rt != 0) begin r[rt] = r[rs] + imm; sr[rt] = L; end
            end
            LW: begin
              a = int'(((r[rs] + imm) >> 2) % WORDS);
              exp_cyc += 5;
              if (sr[rs] > L || t[a] > L) e_dld++;
              else if (rt != 0) begin r[rt] = m[a]; sr[rt] = L; end
            end
            SW: begin
              a = int'(((r[rs] + imm) >> 2) % WORDS);
              exp_cyc += 4;
              if (sr[rs] > L || t[a] > L) e_dst++;
              else begin m[a] = r[rt]; t[a] = L; end
            end
            BEQ: begin exp_cyc += 3; if (r[rs] == r[rt]) rpc += imm << 2; end
            default: begin exp_cyc += 3; rpc = {rpc[31:28], ins[25:0], 2'b00}; end
          endcase
        end
      end

      // ---------------- hardware ----------------
      rst = 1; level = 3;
      @(negedge clk);
      for (int i = 0; i < WORDS; i++) begin
        ld_we = 1; ld_addr = 32'(4 * i); ld_data = prog[i];
        tld_we = 1; tld_addr = 32'(4 * i); tld_data = tags[i];
        @(negedge clk);
      end
      ld_we = 0; tld_we = 0;
      for (int i = 1; i < 32; i++) cpu.rf[i] = 0;
      @(negedge clk);
      rst = 0;
      cyc = 0; n_skip = 0; n_dld = 0; n_dst = 0; n_creep = 0;
      while (!(pc == HALT * 4 && st == S0_FETCH) && cyc < 3000) begin
        // the process level drops once part 2 is being fetched
        if (st == S0_FETCH && pc == SWITCH * 4) level = low;
        #1;
        n_skip += int'(ev_skip); n_dld += int'(ev_deny_ld);
        n_dst += int'(ev_deny_st); n_creep += int'(ev_creep);
        @(negedge clk); cyc++;
      end
      check(cyc == exp_cyc, $sformatf("run %0d low=%0d cycles %0d expected %0d", run, low, cyc, exp_cyc));
      check(n_skip == e_skip && n_dld == e_dld && n_dst == e_dst && n_creep == e_creep,
            $sformatf("run %0d events skip %0d/%0d deny_ld %0d/%0d deny_st %0d/%0d creep %0d/%0d",
                      run, n_skip, e_skip, n_dld, e_dld, n_dst, e_dst, n_creep, e_creep));
      for (int i = 1; i < 12; i++)
        check(cpu.rf[i] == r[i] && dut.srf[i] == sr[i],
              $sformatf("run %0d $%0d=%0d/%0d label %0d/%0d", run, i, cpu.rf[i], r[i], dut.srf[i], sr[i]));
      for (int i = 0; i < WORDS; i++)
        check(cpu.mem[i] == m[i] && dut.tagmem[i] == t[i],
              $sformatf("run %0d mem[%0d]=%h/%h label %0d/%0d", run, i, cpu.mem[i], m[i],
                        dut.tagmem[i], t[i]));
      tot_skip += n_skip; tot_dld += n_dld; tot_dst += n_dst; tot_creep += n_creep;
    end
    $display("events: skip=%0d deny_ld=%0d deny_st=%0d creep=%0d", tot_skip, tot_dld, tot_dst, tot_creep);
    check(tot_skip > 0 && tot_dld > 0 && tot_dst > 0 && tot_creep > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
