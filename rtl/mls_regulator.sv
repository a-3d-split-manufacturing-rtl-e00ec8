// mls_regulator: multilevel-security regulator on the control plane.
//
// Every word of the processor's memory carries a 2-bit security label
// (U < C < S < TS) held in a shadow tag memory of the same depth, and every
// register carries the label of the data it holds in a shadow register file.
// The running process has a level set from outside (`proc_level`, DIP
// switches on the prototype). The regulator follows the processor through its
// posts, in lock-step with it, and enforces:
//   1. an instruction labelled above the process level is skipped: the
//      controller-reset override sends the processor back to Fetch while it is
//      in Decode, after the PC has already advanced, so execution continues
//      with the next instruction;
//   2. a load from, or store to, a word labelled above the level is blocked
//      (RegWrite or MemWrite overridden to 0), as is an access whose address
//      register or operands carry a higher label;
//   3. data the process writes gets label max(level, source labels); a
//      lower-labelled instruction executed by a higher process is relabelled
//      to the process level (classification creep).
// The shadow control unit has the states Fetch, INST Test, R Exec, RegWrite,
// AddiExec, FindAddr, StoreTest, lw Load and ReadTest. A security-level unit
// (SLU) checks two labels against the level (A/D) and returns their maximum
// with the level (Lvl). Operand A is the memory-side label (SA=0: the fetched
// instruction's label, or with ExtMem the live label at the memory address) or
// the label of rs (SA=1); operand B is the label of rt (SB=0) or the lowest
// level (SB=1).
// Timing: INST Test is evaluated during the processor's Decode cycle; checks
// for a register or memory write are latched one state ahead or evaluated in
// the write cycle itself. The tag-memory load port (tld_*) is for setup only.
// The exact wiring of the shadow datapath and the meaning of its control
// signals are this design's reading; the states, transitions and enforced
// rules follow the regulator's description.
module mls_regulator
  import split3d_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 256
) (
  input  logic       clk,
  input  logic       rst,
  input  level_t     proc_level,
  // tag memory load port (byte address)
  input  logic        tld_we,
  input  logic [31:0] tld_addr,
  input  level_t      tld_data,
  // posts to the processor
  output logic       tap_en,
  input  mips_taps_t taps,
  output mips_ovr_t  ovr,
  // observation
  output reg_state_e state_o,
  output logic       ev_skip,       // instruction skipped (INST Test denied)
  output logic       ev_deny_ld,    // register write of a load/ALU result blocked
  output logic       ev_deny_st,    // memory write blocked
  output logic       ev_creep       // instruction label raised
);
  localparam int unsigned AW = $clog2(MEM_WORDS);

  reg_state_e state, state_nx;
  level_t     tagmem [MEM_WORDS];
  level_t     srf [32];
  level_t     instr_tag_q, lvl_q;
  logic [AW-1:0] pc_q;
  logic       deny_q;
  level_t     live_tag, mem_side, slu_a, slu_b, slu_lvl;
  logic       slu_ad;

  opcode_e    op;
  logic [4:0] rs, rt;
  assign op = opcode_e'(taps.instr[31:26]);
  assign rs = taps.instr[25:21];
  assign rt = taps.instr[20:16];

  // ---------------- shadow control unit ----------------
  logic sa, sb, extmem;
  always_comb begin
    sa = 1'b0; sb = 1'b1; extmem = 1'b0;     state_nx = state;
    unique case (state)
      RG_FETCH: begin
        if (taps.irwrite) state_nx = RG_INST_TEST;
      end
      RG_INST_TEST: begin
        sa = 1'b0; sb = 1'b1;
        if (!slu_ad) state_nx = RG_FETCH;
        else begin
          unique case (op)
            OP_RTYPE:                   state_nx = RG_R_EXEC;
            OP_ADDI:                    state_nx = RG_ADDI_EXEC;
            OP_J, OP_BEQ, OP_SW, OP_LW: state_nx = RG_FIND_ADDR;
            default:                    state_nx = RG_FETCH;
          endcase
        end
      end
      RG_R_EXEC:    begin sa = 1'b1; sb = 1'b0; state_nx = RG_REG_WRITE; end
      RG_REG_WRITE: state_nx = RG_FETCH;
      RG_ADDI_EXEC: begin sa = 1'b1; sb = 1'b1; state_nx = RG_FETCH; end
      RG_FIND_ADDR: begin
        sa = 1'b1; sb = 1'b1;
        unique case (op)
          OP_SW:   state_nx = RG_STORE_TEST;
          OP_LW:   state_nx = RG_LW_LOAD;
          default: state_nx = RG_FETCH;
        endcase
      end
      RG_STORE_TEST: begin sa = 1'b0; sb = 1'b1; extmem = 1'b1; state_nx = RG_FETCH; end
      RG_LW_LOAD:    begin sa = 1'b0; sb = 1'b1; extmem = 1'b1; state_nx = RG_READ_TEST; end
      RG_READ_TEST:  state_nx = RG_FETCH;
      default:       state_nx = RG_FETCH;
    endcase
  end

  // ---------------- security-level unit ----------------
  assign live_tag = tagmem[taps.addr[AW+1:2]];
  assign mem_side = extmem ? live_tag : instr_tag_q;
  assign slu_a    = sa ? srf[rs] : mem_side;
  assign slu_b    = sb ? level_t'(0) : srf[rt];
  always_comb begin
    slu_ad  = (slu_a <= proc_level) && (slu_b <= proc_level);
    slu_lvl = proc_level;
    if (slu_a > slu_lvl) slu_lvl = slu_a;
    if (slu_b > slu_lvl) slu_lvl = slu_b;
  end

  // ---------------- sequential state ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= RG_FETCH;
      instr_tag_q <= '0;
      pc_q        <= '0;
      deny_q      <= 1'b0;
      lvl_q       <= '0;
    end else begin
      state <= state_nx;
      if (state == RG_FETCH && taps.irwrite) begin
        instr_tag_q <= live_tag;
        pc_q        <= taps.addr[AW+1:2];
        deny_q      <= 1'b0;
        lvl_q       <= proc_level;
      end
      unique case (state)
        RG_R_EXEC, RG_ADDI_EXEC: begin
          deny_q <= !slu_ad;
          lvl_q  <= slu_lvl;
        end
        RG_FIND_ADDR: if (op == OP_LW || op == OP_SW) begin
          deny_q <= !slu_ad;
          lvl_q  <= slu_lvl;
        end
        RG_LW_LOAD: begin
          deny_q <= deny_q | !slu_ad;
          lvl_q  <= (slu_lvl > lvl_q) ? slu_lvl : lvl_q;
        end
        default: ;
      endcase
    end
  end

  // shadow memory: load port, classification creep, labels of stored data
  logic creep, st_block;
  assign creep    = (state == RG_INST_TEST) && slu_ad && (instr_tag_q < proc_level);
  assign st_block = (state == RG_STORE_TEST) && (deny_q || !slu_ad);

  always_ff @(posedge clk) begin
    if (tld_we)             tagmem[tld_addr[AW+1:2]] <= tld_data;
    else if (taps.memwrite) tagmem[taps.addr[AW+1:2]] <= slu_lvl;
    else if (creep)         tagmem[pc_q] <= proc_level;
  end

  // shadow register file follows the processor's (permitted) register writes
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) srf[i] <= '0;
    end else if (taps.regwrite && taps.a3 != 5'd0) begin
      srf[taps.a3] <= lvl_q;
    end
  end

  // ---------------- posts ----------------
  always_comb begin
    ovr         = MIPS_OVR_NATIVE;
    // skip an instruction above the process level
    ovr.reset_n = !((state == RG_INST_TEST) && !slu_ad);
    ovr.reset_v = 1'b1;
    // block a register write whose source is above the level
    ovr.regwr_n = !deny_q;
    ovr.regwr_v = 1'b0;
    // block a store to a word above the level
    ovr.memwr_n = !st_block;
    ovr.memwr_v = 1'b0;
  end
  assign tap_en = 1'b1;

  assign state_o    = state;
  assign ev_skip    = (state == RG_INST_TEST) && !slu_ad;
  assign ev_deny_ld = deny_q && (state == RG_REG_WRITE || state == RG_READ_TEST ||
                                (state == RG_FETCH && !taps.irwrite));
  assign ev_deny_st = st_block;
  assign ev_creep   = creep;
endmodule
