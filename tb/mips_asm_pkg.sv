// mips_asm_pkg: instruction encoders and a reference instruction-set model
// of the multi-cycle MIPS subset, for testbenches. The model also returns the
// number of clock cycles the multi-cycle controller needs per instruction
// (R-type, addi, sw: 4; lw: 5; beq, j: 3).
package mips_asm_pkg;
  function automatic logic [31:0] r_type(input int rd, rs, rt, input logic [5:0] funct);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'd0, funct};
  endfunction
  function automatic logic [31:0] i_type(input logic [5:0] op, input int rt, rs, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] j_type(input int word_addr);
    return {6'b000010, 26'(word_addr)};
  endfunction

  localparam logic [5:0] ADD = 6'b100000, SUB = 6'b100010, AND_ = 6'b100100,
                         OR_ = 6'b100101, SLT = 6'b101010;
  localparam logic [5:0] ADDI = 6'b001000, LW = 6'b100011, SW = 6'b101011,
                         BEQ = 6'b000100;

  // Executes one instruction on (pc, regs, mem); returns its cycle count.
  function automatic int step(ref logic [31:0] pc, ref logic [31:0] regs [32],
                              ref logic [31:0] mem [], input int words);
    logic [31:0] ins, a, b, imm, res;
    int cyc;
    ins = mem[(pc >> 2) % words];
    a   = regs[ins[25:21]];
    b   = regs[ins[20:16]];
    imm = {{16{ins[15]}}, ins[15:0]};
    pc  = pc + 4;
    cyc = 4;
    case (ins[31:26])
      6'b000000: begin
        case (ins[5:0])
          SUB:     res = a - b;
          AND_:    res = a & b;
          OR_:     res = a | b;
          SLT:     res = ($signed(a) < $signed(b)) ? 1 : 0;
          default: res = a + b;
        endcase
        if (ins[15:11] != 0) regs[ins[15:11]] = res;
      end
      ADDI: if (ins[20:16] != 0) regs[ins[20:16]] = a + imm;
      LW:   begin if (ins[20:16] != 0) regs[ins[20:16]] = mem[((a + imm) >> 2) % words]; cyc = 5; end
      SW:   mem[((a + imm) >> 2) % words] = b;
      BEQ:  begin if (a == b) pc = pc + (imm << 2); cyc = 3; end
      6'b000010: begin pc = {pc[31:28], ins[25:0], 2'b00}; cyc = 3; end
      default: cyc = 2;
    endcase
    return cyc;
  endfunction
endpackage
