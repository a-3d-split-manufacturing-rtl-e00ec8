// split3d_pkg: types and constants shared by the two-tier (computation plane /
// control plane) designs.
//
// A "post" is a vertical connection between the tiers. Control posts that
// steer a receptacle on the computation plane are active low and pulled up, so
// an unbonded control plane leaves the computation plane in its native
// behaviour. The MIPS opcode, funct and ALU-control encodings are the standard
// MIPS ones; the instruction set (j, beq, addi, add/sub/and/or/slt, lw, sw) is
// the one listed for the computation-plane processor. The 2-bit security level
// orders U < C < S < TS.
package split3d_pkg;

  // ---------------- MIPS ----------------
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b000000,
    OP_J     = 6'b000010,
    OP_BEQ   = 6'b000100,
    OP_ADDI  = 6'b001000,
    OP_LW    = 6'b100011,
    OP_SW    = 6'b101011
  } opcode_e;

  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;
  localparam logic [5:0] FN_AND = 6'b100100;
  localparam logic [5:0] FN_OR  = 6'b100101;
  localparam logic [5:0] FN_SLT = 6'b101010;

  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_ctl_e;

  // Controller states, numbered as in the processor's state diagram.
  typedef enum logic [3:0] {
    S0_FETCH   = 4'd0,
    S1_DECODE  = 4'd1,
    S2_MEMADDR = 4'd2,
    S3_MEMREAD = 4'd3,
    S4_MEMWB   = 4'd4,
    S5_MEMWR   = 4'd5,
    S6_EXECUTE = 4'd6,
    S7_ALUWB   = 4'd7,
    S8_BRANCH  = 4'd8,
    S9_ADDIEX  = 4'd9,
    S10_ADDIWB = 4'd10,
    S11_JUMP   = 4'd11
  } mips_state_e;

  // Signals the MIPS CPU exposes to the control plane through tapping posts.
  typedef struct packed {
    logic [31:0] addr;      // memory address (after the IorD multiplexer)
    logic        irwrite;   // instruction register load (fetch cycle)
    logic [31:0] instr;     // instruction register
    logic [4:0]  a3;        // register-file write address
    logic        regwrite;  // register-file write enable (after override)
    logic        memwrite;  // memory write enable (after override)
    logic [31:0] wd;        // write data leaving the CPU towards memory
    logic [31:0] rd;        // raw read data leaving the memory
  } mips_taps_t;

  // Overriding posts of the MIPS CPU. Each *_n is an active-low, pulled-up
  // Control post; the matching value post is used while it is low.
  typedef struct packed {
    logic        reset_n;   logic        reset_v;     // controller reset
    logic        memwr_n;   logic        memwr_v;     // memory write enable
    logic        regwr_n;   logic        regwr_v;     // register write enable
    logic        rd_n;      logic [31:0] rd_v;        // memory read data
    logic        wd_n;      logic [31:0] wd_v;        // memory write data
  } mips_ovr_t;

  localparam mips_ovr_t MIPS_OVR_NATIVE = '{reset_n: 1'b1, reset_v: 1'b0,
                                            memwr_n: 1'b1, memwr_v: 1'b0,
                                            regwr_n: 1'b1, regwr_v: 1'b0,
                                            rd_n: 1'b1, rd_v: '0,
                                            wd_n: 1'b1, wd_v: '0};

  // ---------------- security levels ----------------
  typedef logic [1:0] level_t;   // 0 = U, 1 = C, 2 = S, 3 = TS

  // Regulator (shadow control unit) states, named as in its state diagram.
  typedef enum logic [3:0] {
    RG_FETCH, RG_INST_TEST, RG_R_EXEC, RG_REG_WRITE, RG_ADDI_EXEC,
    RG_FIND_ADDR, RG_STORE_TEST, RG_LW_LOAD, RG_READ_TEST
  } reg_state_e;

  // ---------------- shared bus (isolation example) ----------------
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
  } bus_req_t;

endpackage
