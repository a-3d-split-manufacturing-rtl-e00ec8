// split3d_top_tb: end-to-end test of the whole top at its default sizes, run
// twice: with every control plane bonded and with none. It counts how often
// each mechanism happened and fails if one never did.
//   A  a two-part program under the regulator: part 1 at level TS, part 2 at
//      level C with higher-labelled instructions (skipped), loads/stores of
//      higher-labelled words or through higher-labelled registers (blocked)
//      and lower-labelled instructions (relabelled). Without the regulator
//      everything executes.
//   B  stores/loads through the data region at 0x00400100 (encrypted /
//      decrypted with the stand-in cipher) and outside it.
//   C  process 1 locks all four ways of one set with secure loads; process 2
//      then misses on that set and is denied a line, while process 1 may
//      still replace its own lines. Without the monitor nothing is denied.
//   D  both cores request the shared bus continuously: with the TDMA schedule
//      exactly the slot owner reaches it, without it they collide.
module split3d_top_tb;
  import split3d_pkg::*;
  import mips_asm_pkg::*;

  localparam int HALT = 40;
  localparam logic [31:0] KEY = 32'h5A17_C3E9;

  logic clk = 0, rst = 1, att = 1;
  // A
  level_t a_level = 3, a_tld_data = 0;
  logic a_ld_we = 0, a_tld_we = 0;
  logic [31:0] a_ld_addr = 0, a_ld_data = 0, a_tld_addr = 0, a_pc;
  mips_state_e a_state; reg_state_e a_rstate;
  logic a_skip, a_dld, a_dst, a_creep;
  // B
  logic b_ld_we = 0;
  logic [31:0] b_ld_addr = 0, b_ld_data = 0, b_pc, enc_in, enc_out, dec_in, dec_out;
  mips_state_e b_state;
  logic b_enc, b_dec;
  // C
  logic c_req_valid = 0, c_req_ready, c_req_we = 0, c_req_secure = 0;
  logic [31:0] c_req_addr = 0, c_req_wdata = 0, c_rdata;
  logic [7:0] c_req_pid = 0;
  logic c_resp_valid, c_hit, c_denied, c_mm_ld_we = 0;
  logic [31:0] c_mm_ld_addr = 0, c_mm_ld_data = 0;
  // D
  bus_req_t [1:0] d_core_req;
  logic [1:0] d_core_ack;
  logic [1:0][31:0] d_core_rdata;
  bus_req_t d_l2_req;
  logic d_l2_ack = 1;
  logic [31:0] d_l2_rdata = 32'hCAFE_0000;
  logic d_conflict;
  logic [0:0] d_slot;

  int checks = 0, failures = 0;
  int n_skip = 0, n_dld = 0, n_dst = 0, n_creep = 0, n_enc = 0, n_dec = 0;
  int n_hit = 0, n_miss = 0, n_denied = 0, n_slot_sw = 0, n_conflict = 0, n_detached_runs = 0;

  split3d_top dut (
    .clk, .rst,
    .a_cp_attached(att), .a_proc_level(a_level), .a_ld_we, .a_ld_addr, .a_ld_data,
    .a_tld_we, .a_tld_addr, .a_tld_data, .a_pc, .a_state, .a_reg_state(a_rstate),
    .a_ev_skip(a_skip), .a_ev_deny_ld(a_dld), .a_ev_deny_st(a_dst), .a_ev_creep(a_creep),
    .b_cp_attached(att), .b_ld_we, .b_ld_addr, .b_ld_data, .b_pc, .b_state,
    .b_enc_in(enc_in), .b_enc_out(enc_out), .b_dec_in(dec_in), .b_dec_out(dec_out),
    .b_ev_encrypt(b_enc), .b_ev_decrypt(b_dec),
    .c_cp_attached(att), .c_req_valid, .c_req_ready, .c_req_we, .c_req_addr, .c_req_wdata,
    .c_req_pid, .c_req_secure, .c_resp_valid, .c_resp_rdata(c_rdata), .c_resp_hit(c_hit),
    .c_resp_denied(c_denied), .c_mm_ld_we, .c_mm_ld_addr, .c_mm_ld_data,
    .d_cp_attached(att), .d_core_req, .d_core_ack, .d_core_rdata, .d_l2_req, .d_l2_ack,
    .d_l2_rdata, .d_conflict, .d_slot);

  cipher_model #(.KEY(KEY)) cm (.enc_in, .enc_out, .dec_in, .dec_out);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_enc(input logic [31:0] p);
    logic [31:0] t;
    t = p ^ KEY;
    t = (t << 7) | (t >> 25);
    return t + 32'h0123_4567;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] pa [256], pb [256];
  level_t ta [256];
  int x = 321, y = 654;
  logic [31:0] p1 = 32'h0000_1234, p3 = 32'h89AB_CDEF;

  function automatic void build();
    foreach (pa[i]) begin pa[i] = 0; pb[i] = 0; ta[i] = 0; end
    // A: part 1 at TS
    pa[0] = i_type(ADDI, 1, 0, x);   pa[1] = i_type(ADDI, 2, 0, y);
    pa[2] = i_type(ADDI, 3, 0, 32'h100);
    pa[3] = i_type(SW, 1, 3, 0);     pa[4] = i_type(SW, 2, 3, 4);
    pa[5] = i_type(ADDI, 10, 0, 0);  pa[6] = i_type(ADDI, 11, 0, 0);
    pa[7] = j_type(8);
    // part 2 at C
    pa[8]  = r_type(4, 1, 2, ADD);   pa[9]  = i_type(ADDI, 5, 1, 7);
    pa[10] = i_type(ADDI, 6, 0, 32'h140);
    pa[11] = i_type(LW, 7, 6, 0);    pa[12] = i_type(LW, 8, 6, 4);
    pa[13] = i_type(SW, 6, 6, 8);    pa[14] = i_type(SW, 6, 6, 12);
    pa[15] = i_type(LW, 9, 3, 0);    pa[16] = i_type(SW, 6, 3, 16);
    for (int i = 17; i <= 24; i++) pa[i] = i_type(ADDI, 12, 12, 1);
    pa[25] = j_type(HALT);
    pa[HALT] = j_type(HALT);
    pa[80] = 32'h8080; pa[81] = 32'h8181; pa[82] = 32'h8282; pa[83] = 32'h8383;
    for (int i = 17; i <= 20; i++) ta[i] = 2;
    ta[80] = 3; ta[81] = 0; ta[82] = 2; ta[83] = 1;
    // B
    pb[0] = i_type(ADDI, 1, 0, 32'h4001);
    for (int k = 1; k <= 8; k++) pb[k] = r_type(1, 1, 1, ADD);
    pb[9]  = i_type(ADDI, 2, 0, p1);
    pb[10] = i_type(SW, 2, 1, 0);
    pb[11] = i_type(SW, 2, 0, 32'h200);
    pb[12] = i_type(LW, 4, 1, 4);
    pb[13] = i_type(SW, 4, 0, 32'h204);
    pb[14] = j_type(HALT);
    pb[HALT] = j_type(HALT);
    pb[65] = ref_enc(p3);
  endfunction

  task automatic cache_access(input logic we, input logic [31:0] addr, input int pid,
                              input logic secure, output logic hit, output logic denied,
                              output logic [31:0] data);
    c_req_valid = 1; c_req_we = we; c_req_addr = addr; c_req_pid = 8'(pid);
    c_req_secure = secure; c_req_wdata = addr ^ 32'h5555_0000;
    @(negedge clk);
    c_req_valid = 0;
    while (!c_resp_valid) @(negedge clk);
    hit = c_hit; denied = c_denied; data = c_rdata;
    n_hit += int'(hit); n_miss += int'(!hit); n_denied += int'(denied);
    @(negedge clk);
  endtask

  initial begin
    build();
    for (int pass = 0; pass < 2; pass++) begin
      att = (pass == 0);
      rst = 1; a_level = 3;
      @(negedge clk);
      for (int i = 0; i < 256; i++) begin
        a_ld_we = 1; a_ld_addr = 32'(4 * i); a_ld_data = pa[i];
        a_tld_we = 1; a_tld_addr = 32'(4 * i); a_tld_data = ta[i];
        b_ld_we = 1; b_ld_addr = 32'(4 * i); b_ld_data = pb[i];
        c_mm_ld_we = (i < 32); c_mm_ld_addr = 32'(i * 32'h2000); c_mm_ld_data = 32'hD000_0000 + 32'(i);
        @(negedge clk);
      end
      a_ld_we = 0; a_tld_we = 0; b_ld_we = 0; c_mm_ld_we = 0;
      for (int i = 1; i < 32; i++) begin dut.u_a_cpu.rf[i] = 0; dut.u_b_cpu.rf[i] = 0; end
      @(negedge clk);
      rst = 0;

      // ---------- A and B run side by side ----------
      begin
        int cyc;
        logic a_done, b_done;
        cyc = 0; a_done = 0; b_done = 0;
        while (!(a_done && b_done) && cyc < 5000) begin
          if (a_state == S11_JUMP && a_pc == HALT * 4 + 4) a_done = 1;
          if (b_state == S11_JUMP && b_pc == HALT * 4 + 4) b_done = 1;
          if (a_state == S0_FETCH && a_pc == 8 * 4) a_level = 1;
          #1;
          n_skip += int'(a_skip); n_dld += int'(a_dld); n_dst += int'(a_dst);
          n_creep += int'(a_creep);
          n_enc += int'(b_enc && dut.b_taps.memwrite);
          n_dec += int'(b_dec && b_state == S3_MEMREAD);
          @(negedge clk); cyc++;
        end
        check(cyc < 5000, "A and B reach their halt loops");
        if (cyc >= 5000) $display("a_pc=%h a_state=%s rstate=%s b_pc=%h b_state=%s", a_pc, a_state.name(), a_rstate.name(), b_pc, b_state.name());
      end
      if (att) begin
        check(dut.u_a_cpu.rf[4] == 0 && dut.u_a_cpu.rf[5] == 0, "A: ALU results from TS registers blocked");
        check(dut.u_a_cpu.rf[7] == 0 && dut.u_a_cpu.rf[8] == 32'h8181, "A: load of S word blocked, U word loaded");
        check(dut.u_a_cpu.rf[9] == 0, "A: load through TS address register blocked");
        check(dut.u_a_cpu.mem[82] == 32'h8282 && dut.u_a_cpu.mem[83] == 32'h140, "A: store to S word blocked, to C word done");
        check(dut.u_a_cpu.mem[68] == 0, "A: store through TS address register blocked");
        check(dut.u_a_cpu.rf[12] == 4, $sformatf("A: 4 of 8 increments skipped ($12=%0d)", dut.u_a_cpu.rf[12]));
        check(dut.u_a_reg.tagmem[21] == 1 && dut.u_a_reg.tagmem[17] == 2 && dut.u_a_reg.tagmem[83] == 1,
              "A: labels after the run");
        check(dut.u_b_cpu.mem[64] == ref_enc(p1) && dut.u_b_cpu.mem[128] == p1, "B: store encrypted only in data region");
        check(dut.u_b_cpu.mem[129] == p3, "B: load from data region decrypted");
      end else begin
        check(dut.u_a_cpu.rf[4] == 32'(x + y) && dut.u_a_cpu.rf[7] == 32'h8080 && dut.u_a_cpu.rf[12] == 8,
              $sformatf("A: without regulator everything executes (%h %h %h)", dut.u_a_cpu.rf[4], dut.u_a_cpu.rf[7], dut.u_a_cpu.rf[12]));
        check(dut.u_b_cpu.mem[64] == p1 && dut.u_b_cpu.mem[129] == ref_enc(p3), $sformatf("B: without coprocessor nothing transformed (%h %h)", dut.u_b_cpu.mem[64], dut.u_b_cpu.mem[129]));
      end

      // ---------- C ----------
      while (!c_req_ready) @(negedge clk);
      begin
        logic h, d;
        logic [31:0] data;
        // set 0 lines: addresses i * 0x2000 (2048 sets x 4 B)
        for (int i = 0; i < 4; i++) begin
          cache_access(0, 32'(i * 32'h2000), 1, 1, h, d, data);
          check(!h && !d && data == 32'hD000_0000 + 32'(i), $sformatf("C: secure fill %0d h=%b d=%b data=%h", i, h, d, data));
        end
        cache_access(0, 32'h2000, 1, 0, h, d, data);
        check(h && data == 32'hD000_0001, "C: hit on locked line by owner");
        cache_access(0, 32'h2000, 2, 0, h, d, data);
        check(h && data == 32'hD000_0001, "C: hit by other process does not evict");
        cache_access(0, 32'(5 * 32'h2000), 2, 0, h, d, data);
        check(!h && d == att && data == 32'hD000_0005, "C: other process denied a locked set");
        cache_access(0, 32'(5 * 32'h2000), 2, 0, h, d, data);
        check(h == !att, "C: denied line not cached");
        cache_access(1, 32'(6 * 32'h2000), 1, 0, h, d, data);
        check(!h && !d, "C: owner may replace its own line");
        cache_access(0, 32'(6 * 32'h2000), 1, 0, h, d, data);
        check(h && data == (32'(6 * 32'h2000) ^ 32'h5555_0000), "C: store allocated and read back");
      end

      // ---------- D ----------
      begin
        logic [0:0] last_slot;
        d_core_req[0] = '{valid: 1'b1, we: 1'b1, addr: 32'hA000_0000, wdata: 32'h0};
        d_core_req[1] = '{valid: 1'b1, we: 1'b0, addr: 32'hB000_0000, wdata: 32'h1};
        last_slot = d_slot;
        for (int c = 0; c < 100; c++) begin
          #1;
          if (att) begin
            check(!d_conflict && d_l2_req == d_core_req[d_slot], "D: only the slot owner on the bus");
            check(d_core_ack[d_slot] && !d_core_ack[~d_slot], "D: only the slot owner sees the response");
            if (d_slot != last_slot) n_slot_sw++;
            last_slot = d_slot;
          end else if (d_conflict) n_conflict++;
          @(negedge clk);
        end
        d_core_req = '0;
      end
      if (!att) n_detached_runs++;
    end

    $display("mechanisms: skip=%0d deny_ld=%0d deny_st=%0d creep=%0d encrypt=%0d decrypt=%0d",
             n_skip, n_dld, n_dst, n_creep, n_enc, n_dec);
    $display("mechanisms: cache_hit=%0d cache_miss=%0d evict_denied=%0d tdma_switch=%0d bus_conflict=%0d detached_runs=%0d",
             n_hit, n_miss, n_denied, n_slot_sw, n_conflict, n_detached_runs);
    check(n_skip > 0, "skip happened");          check(n_dld > 0, "blocked load happened");
    check(n_dst > 0, "blocked store happened");  check(n_creep > 0, "relabel happened");
    check(n_enc > 0, "encryption happened");     check(n_dec > 0, "decryption happened");
    check(n_hit > 0, "cache hit happened");      check(n_miss > 0, "cache miss happened");
    check(n_denied > 0, "eviction denial happened");
    check(n_slot_sw > 0, "TDMA slot switch happened");
    check(n_conflict > 0, "bus conflict without control plane happened");
    check(n_detached_runs > 0, "control planes absent mode run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
