// crypto_coproc_tb: the encryption coprocessor bonded to the multi-cycle MIPS
// with a stand-in cipher. A program builds the data-region address
// 0x00400100 with addi and doublings, stores random words into the data
// region and outside it, loads a pre-encrypted word from the data region and
// copies it out, and fetches its own instructions throughout. Checked: data
// region words hold the ciphertext, other words the plaintext, the load
// returns the plaintext, and with the control plane absent nothing is
// transformed. The cipher functions are recomputed here independently.
module crypto_coproc_tb;
  import split3d_pkg::*;
  import mips_asm_pkg::*;

  localparam int WORDS = 256;
  localparam int HALT  = 40;
  localparam logic [31:0] KEY = 32'h5A17_C3E9;

  logic clk = 0, rst = 1, attached = 1;
  logic ld_we = 0;
  logic [31:0] ld_addr = 0, ld_data = 0, pc;
  logic tap_en_cp;
  mips_taps_t taps;
  mips_ovr_t  ovr_cp, ovr;
  mips_state_e st;
  logic [31:0] enc_in, enc_out, dec_in, dec_out;
  logic ev_enc, ev_dec;
  int checks = 0, failures = 0, n_enc = 0, n_dec = 0;

  mips_cpu #(.MEM_WORDS(WORDS)) cpu (.clk, .rst, .ld_we, .ld_addr, .ld_data,
      .tap_en(tap_en_cp & attached), .taps, .ovr, .state_o(st), .pc_o(pc));
  crypto_coproc dut (.tap_en(tap_en_cp), .taps, .ovr(ovr_cp), .enc_in, .enc_out, .dec_in,
                     .dec_out, .ev_encrypt(ev_enc), .ev_decrypt(ev_dec));
  cipher_model #(.KEY(KEY)) cm (.enc_in, .enc_out, .dec_in, .dec_out);
  assign ovr = attached ? ovr_cp : MIPS_OVR_NATIVE;

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

  initial begin
    for (int run = 0; run < 6; run++) begin
      logic [31:0] prog [WORDS];
      logic [31:0] p1, p2, p3;
      int k;
      attached = (run % 3) != 2;
      p1 = 32'($urandom_range(0, 32767));
      p2 = 32'($urandom_range(0, 32767));
      p3 = $urandom;
      foreach (prog[i]) prog[i] = 0;
      prog[0] = i_type(ADDI, 1, 0, 32'h4001);
      for (k = 1; k <= 8; k++) prog[k] = r_type(1, 1, 1, ADD);   // $1 = 0x00400100
      prog[9]  = i_type(ADDI, 2, 0, p1);
      prog[10] = i_type(ADDI, 3, 0, p2);
      prog[11] = i_type(SW, 2, 1, 0);          // data region, word 64
      prog[12] = i_type(SW, 3, 0, 32'h200);    // instruction region, word 128
      prog[13] = i_type(LW, 4, 1, 4);          // data region, word 65 (ciphertext)
      prog[14] = i_type(SW, 4, 0, 32'h204);    // copy out, word 129
      prog[15] = i_type(LW, 5, 0, 32'h208);    // plain word 130
      prog[16] = i_type(SW, 5, 1, 8);          // into data region, word 66
      prog[17] = j_type(HALT);
      prog[HALT] = j_type(HALT);
      prog[65]  = ref_enc(p3);
      prog[130] = p3 ^ 32'hFFFF_0000;

      rst = 1;
      @(negedge clk);
      for (int i = 0; i < WORDS; i++) begin
        ld_we = 1; ld_addr = 32'(4 * i); ld_data = prog[i];
        @(negedge clk);
      end
      ld_we = 0;
      @(negedge clk);
      rst = 0;
      k = 0;
      while (!(pc == HALT * 4 && st == S0_FETCH) && k < 2000) begin
        #1;
        n_enc += int'(ev_enc && attached && cpu.taps.memwrite);
        n_dec += int'(ev_dec && attached && st == S3_MEMREAD);
        @(negedge clk); k++;
      end
      check(k < 2000, "program finished");
      if (attached) begin
        check(cpu.mem[64] == ref_enc(p1), $sformatf("run %0d word 64 %h expected %h", run, cpu.mem[64], ref_enc(p1)));
        check(cpu.mem[128] == p2, $sformatf("run %0d word 128 %h expected %h", run, cpu.mem[128], p2));
        check(cpu.mem[129] == p3, $sformatf("run %0d word 129 %h expected %h", run, cpu.mem[129], p3));
        check(cpu.mem[66] == ref_enc(p3 ^ 32'hFFFF_0000), $sformatf("run %0d word 66", run));
      end else begin
        check(cpu.mem[64] == p1, $sformatf("run %0d (absent) word 64 %h", run, cpu.mem[64]));
        check(cpu.mem[128] == p2, $sformatf("run %0d (absent) word 128", run));
        check(cpu.mem[129] == ref_enc(p3), $sformatf("run %0d (absent) word 129", run));
        check(cpu.mem[66] == (p3 ^ 32'hFFFF_0000), $sformatf("run %0d (absent) word 66", run));
      end
    end
    $display("events: encrypt=%0d decrypt=%0d", n_enc, n_dec);
    check(n_enc > 0 && n_dec > 0, "encryption and decryption exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
