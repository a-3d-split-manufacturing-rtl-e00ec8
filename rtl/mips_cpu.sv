// mips_cpu: multi-cycle MIPS processor of the computation plane, with posts.
//
// The classic multi-cycle MIPS datapath: one unified instruction/data memory,
// an instruction register, a data register, a 32 x 32 register file, registers
// A/B after the register file, one ALU used for PC+4, branch targets and
// execution, and the ALUOut register. The controller is the 12-state machine
// S0 Fetch .. S11 Jump; R-type, addi and sw take 4 cycles, lw 5, beq and j 3.
// Instructions: j, beq, addi, R-type add/sub/and/or/slt, lw, sw.
//
// Posts for a control plane (all pass-through when nothing is bonded):
//   taps      memory address, IRWrite, instruction register, register write
//             address A3, RegWrite, MemWrite, memory write data and read data
//             (one tap-enable post `tap_en` gates all of them);
//   overrides controller reset, MemWrite, RegWrite, memory read data (between
//             the memory and the IR/data registers) and memory write data.
// The taps and overrides are built from tsv_tap and tsv_override; the memory
// read data passes a generic receptacle and the write data a re-routing
// receptacle followed by an override, so a control plane can intercept it.
//
// Memory: MEM_WORDS words indexed by address bits above the byte offset,
// written on the clock edge, read combinationally. A back-door load port
// (ld_*) fills it for a program while the processor is held in reset.
// Reset is synchronous; PC starts at 0. Register $0 is never written.
// The memory size and the load port are this design's choices.
module mips_cpu
  import split3d_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst,
  // program/data load port
  input  logic        ld_we,
  input  logic [31:0] ld_addr,     // byte address
  input  logic [31:0] ld_data,
  // posts
  input  logic        tap_en,
  output mips_taps_t  taps,
  input  mips_ovr_t   ovr,
  // observation
  output mips_state_e state_o,
  output logic [31:0] pc_o
);
  localparam int unsigned AW = $clog2(MEM_WORDS);

  // ---------------- state ----------------
  mips_state_e state, state_nx;
  logic [31:0] pc, instr, data_r, a_r, b_r, aluout;
  logic [31:0] rf [32];
  logic [31:0] mem [MEM_WORDS];

  // ---------------- control ----------------
  logic       iord, irwrite, pcwrite, branch, alusrca, regdst, memtoreg;
  logic       memwrite_n, regwrite_n;   // native enables
  logic [1:0] alusrcb, aluop, pcsrc;
  alu_ctl_e   aluctl;
  logic       ctrl_rst;

  opcode_e    op;
  logic [5:0] funct;
  assign op    = opcode_e'(instr[31:26]);
  assign funct = instr[5:0];

  always_comb begin
    iord = 1'b0; irwrite = 1'b0; pcwrite = 1'b0; branch = 1'b0;
    alusrca = 1'b0; regdst = 1'b0; memtoreg = 1'b0;
    memwrite_n = 1'b0; regwrite_n = 1'b0;
    alusrcb = 2'b00; aluop = 2'b00; pcsrc = 2'b00;
    state_nx = S0_FETCH;
    unique case (state)
      S0_FETCH: begin
        alusrcb = 2'b01; irwrite = 1'b1; pcwrite = 1'b1;
        state_nx = S1_DECODE;
      end
      S1_DECODE: begin
        alusrcb = 2'b11;
        unique case (op)
          OP_LW, OP_SW: state_nx = S2_MEMADDR;
          OP_RTYPE:     state_nx = S6_EXECUTE;
          OP_BEQ:       state_nx = S8_BRANCH;
          OP_ADDI:      state_nx = S9_ADDIEX;
          OP_J:         state_nx = S11_JUMP;
          default:      state_nx = S0_FETCH;   // unknown opcode: skipped
        endcase
      end
      S2_MEMADDR: begin
        alusrca = 1'b1; alusrcb = 2'b10;
        state_nx = (op == OP_LW) ? S3_MEMREAD : S5_MEMWR;
      end
      S3_MEMREAD: begin iord = 1'b1; state_nx = S4_MEMWB; end
      S4_MEMWB:   begin memtoreg = 1'b1; regwrite_n = 1'b1; end
      S5_MEMWR:   begin iord = 1'b1; memwrite_n = 1'b1; end
      S6_EXECUTE: begin alusrca = 1'b1; aluop = 2'b10; state_nx = S7_ALUWB; end
      S7_ALUWB:   begin regdst = 1'b1; regwrite_n = 1'b1; end
      S8_BRANCH:  begin alusrca = 1'b1; aluop = 2'b01; pcsrc = 2'b01; branch = 1'b1; end
      S9_ADDIEX:  begin alusrca = 1'b1; alusrcb = 2'b10; state_nx = S10_ADDIWB; end
      S10_ADDIWB: begin regwrite_n = 1'b1; end
      S11_JUMP:   begin pcsrc = 2'b10; pcwrite = 1'b1; end
      default:    state_nx = S0_FETCH;
    endcase
  end

  // ALU decoder
  always_comb begin
    unique case (aluop)
      2'b00:   aluctl = ALU_ADD;
      2'b01:   aluctl = ALU_SUB;
      default: begin
        unique case (funct)
          FN_SUB:  aluctl = ALU_SUB;
          FN_AND:  aluctl = ALU_AND;
          FN_OR:   aluctl = ALU_OR;
          FN_SLT:  aluctl = ALU_SLT;
          default: aluctl = ALU_ADD;
        endcase
      end
    endcase
  end

  // ---------------- overriding posts ----------------
  logic        memwrite, regwrite;
  logic [31:0] mem_rd_raw, mem_rd, mem_wd;

  tsv_override #(.WIDTH(1))  u_ovr_rst (.in(rst),        .ovr_val(ovr.reset_v), .control_n(ovr.reset_n), .out(ctrl_rst));
  tsv_override #(.WIDTH(1))  u_ovr_mw  (.in(memwrite_n), .ovr_val(ovr.memwr_v), .control_n(ovr.memwr_n), .out(memwrite));
  tsv_override #(.WIDTH(1))  u_ovr_rw  (.in(regwrite_n), .ovr_val(ovr.regwr_v), .control_n(ovr.regwr_n), .out(regwrite));

  // read data: a generic receptacle (tap + override; its disable post is not
  // used by either control plane and stays pulled up)
  logic [31:0] tap_rd, tap_wd, wd_native;
  logic        rd_drive_unused, wd_vld_unused, wd_drive_unused;
  tsv_generic_receptacle #(.WIDTH(32)) u_rcp_rd (
    .in(mem_rd_raw), .b(tap_en), .a(tap_rd), .d_n(ovr.rd_n), .c(ovr.rd_v),
    .e_n(1'b1), .out(mem_rd), .out_drive(rd_drive_unused));

  // write data: intercepted (re-routed: tapped and its native path blocked
  // while the override is active), then overridden with the control plane's value
  tsv_reroute #(.WIDTH(32)) u_rrt_wd (
    .c(b_r), .b(tap_en), .d_n(ovr.wd_n), .a(tap_wd), .a_vld(wd_vld_unused),
    .e(wd_native), .e_drive(wd_drive_unused));
  tsv_override #(.WIDTH(32)) u_ovr_wd (.in(wd_native), .ovr_val(ovr.wd_v),
                                       .control_n(ovr.wd_n), .out(mem_wd));

  // ---------------- datapath ----------------
  logic [31:0] addr, srca, srcb, aluresult, signimm, pcnext, wd3, rd1, rd2;
  logic [4:0]  a3;
  logic        zero, pcen;

  assign addr    = iord ? aluout : pc;
  assign signimm = {{16{instr[15]}}, instr[15:0]};
  assign a3      = regdst ? instr[15:11] : instr[20:16];
  assign wd3     = memtoreg ? data_r : aluout;
  assign rd1     = (instr[25:21] == 5'd0) ? 32'd0 : rf[instr[25:21]];
  assign rd2     = (instr[20:16] == 5'd0) ? 32'd0 : rf[instr[20:16]];
  assign srca    = alusrca ? a_r : pc;
  assign mem_rd_raw = mem[addr[AW+1:2]];

  always_comb begin
    unique case (alusrcb)
      2'b00:   srcb = b_r;
      2'b01:   srcb = 32'd4;
      2'b10:   srcb = signimm;
      default: srcb = {signimm[29:0], 2'b00};
    endcase
  end

  always_comb begin
    unique case (aluctl)
      ALU_AND: aluresult = srca & srcb;
      ALU_OR:  aluresult = srca | srcb;
      ALU_SUB: aluresult = srca - srcb;
      ALU_SLT: aluresult = {31'd0, $signed(srca) < $signed(srcb)};
      default: aluresult = srca + srcb;
    endcase
  end
  assign zero = (aluresult == 32'd0);

  always_comb begin
    unique case (pcsrc)
      2'b00:   pcnext = aluresult;
      2'b01:   pcnext = aluout;
      default: pcnext = {pc[31:28], instr[25:0], 2'b00};
    endcase
  end
  assign pcen = pcwrite | (branch & zero);

  always_ff @(posedge clk) begin
    if (ctrl_rst) state <= S0_FETCH;
    else          state <= state_nx;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= '0;
      instr  <= '0;
      data_r <= '0;
      a_r    <= '0;
      b_r    <= '0;
      aluout <= '0;
    end else begin
      if (pcen)    pc    <= pcnext;
      if (irwrite) instr <= mem_rd;
      data_r <= mem_rd;
      a_r    <= rd1;
      b_r    <= rd2;
      aluout <= aluresult;
    end
  end

  always_ff @(posedge clk) begin
    if (regwrite && a3 != 5'd0) rf[a3] <= wd3;
  end

  always_ff @(posedge clk) begin
    if (ld_we)         mem[ld_addr[AW+1:2]] <= ld_data;
    else if (memwrite) mem[addr[AW+1:2]]    <= mem_wd;
  end

  // ---------------- tapping posts ----------------
  logic [31:0] tap_addr, tap_instr;
  logic [4:0]  tap_a3;
  logic [2:0]  tap_ctl;
  logic        tap_vld_unused;
  tsv_tap #(.WIDTH(32 + 32 + 5 + 3)) u_taps (
    .c({addr, instr, a3, irwrite, regwrite, memwrite}), .b(tap_en),
    .a({tap_addr, tap_instr, tap_a3, tap_ctl}), .tap_vld(tap_vld_unused));
  assign taps = '{addr: tap_addr, irwrite: tap_ctl[2], instr: tap_instr, a3: tap_a3,
                  regwrite: tap_ctl[1], memwrite: tap_ctl[0], wd: tap_wd, rd: tap_rd};

  assign state_o = state;
  assign pc_o    = pc;

`ifndef SYNTHESIS
  // a write through the load port must not collide with a running program
  a_ld_in_reset: assert property (@(posedge clk) ld_we |-> rst)
    else $error("mips_cpu: load port used while running");
`endif
endmodule
