// lc4_pkg: types and constants shared by the single-cycle LC4 datapath.
//
// The datapath is steered by eleven control signals that the decoder derives
// from each 16-bit instruction. They are bundled here as the struct lc4_ctl_t,
// with one field per control signal and the encodings used on the datapath
// figure: rsMux (0: I[8:6], 1: R7, 2: I[11:9]), rtMux (0: I[2:0], 1: I[11:9]),
// rdMux (0: I[11:9], 1: R7), ALUInputMux (0: RT, 1: instruction word),
// regInputMux (0: ALU, 1: data memory, 2: PC+1), PCMux (0..5) and
// Privilege.CTL (0: clear, 1: set, 2: keep). The numeric ALU.CTL codes follow
// the ALU operation table of the design; codes the table leaves unused make
// the ALU output zero (a choice of this implementation).
package lc4_pkg;

  localparam int unsigned XLEN = 16;  // word width of every datapath bus
  localparam int unsigned NREGS = 8;  // R0..R7

  typedef logic [XLEN-1:0] word_t;
  typedef logic [2:0] reg_addr_t;

  // ALU.CTL, 6 bits
  typedef enum logic [5:0] {
    ALU_ADD    = 6'd0,   // A + B
    ALU_MUL    = 6'd1,   // A * B
    ALU_SUB    = 6'd2,   // A - B
    ALU_DIV    = 6'd3,   // A / B (unsigned)
    ALU_MOD    = 6'd4,   // A % B (unsigned)
    ALU_ADDI5  = 6'd5,   // A + SEXT(B[4:0])
    ALU_ADDI6  = 6'd6,   // A + SEXT(B[5:0])
    ALU_AND    = 6'd8,   // A & B
    ALU_NOT    = 6'd9,   // ~A
    ALU_OR     = 6'd10,  // A | B
    ALU_XOR    = 6'd11,  // A ^ B
    ALU_ANDI5  = 6'd12,  // A & SEXT(B[4:0])
    ALU_CMP    = 6'd16,  // signed-CC(A - B)
    ALU_CMPU   = 6'd17,  // unsigned-CC(A - B)
    ALU_CMPI   = 6'd18,  // signed-CC(A - SEXT(B[6:0]))
    ALU_CMPIU  = 6'd19,  // unsigned-CC(A - SEXT(B[6:0]))
    ALU_SLL    = 6'd24,  // A << B[3:0]
    ALU_SRA    = 6'd25,  // A >>> B[3:0]
    ALU_SRL    = 6'd26,  // A >> B[3:0]
    ALU_CONST  = 6'd32,  // SEXT(B[8:0])
    ALU_HICONST= 6'd33   // (A & 0xFF) | (B[7:0] << 8)
  } alu_ctl_e;

  typedef enum logic [1:0] {
    RS_I8_6  = 2'd0,
    RS_R7    = 2'd1,
    RS_I11_9 = 2'd2
  } rs_mux_e;

  typedef enum logic {
    RT_I2_0  = 1'b0,
    RT_I11_9 = 1'b1
  } rt_mux_e;

  typedef enum logic {
    RD_I11_9 = 1'b0,
    RD_R7    = 1'b1
  } rd_mux_e;

  typedef enum logic {
    ALUB_RT   = 1'b0,
    ALUB_INSN = 1'b1
  } alu_in_mux_e;

  typedef enum logic [1:0] {
    RIN_ALU  = 2'd0,
    RIN_DATA = 2'd1,
    RIN_PC1  = 2'd2
  } reg_in_mux_e;

  typedef enum logic [2:0] {
    PC_BRANCH  = 3'd0,  // PC+1, or PC+1+SEXT(IMM9) when TEST passes
    PC_PLUS1   = 3'd1,  // PC+1
    PC_IMM11   = 3'd2,  // PC+1+SEXT(IMM11)
    PC_RS      = 3'd3,  // RS
    PC_TRAP    = 3'd4,  // 0x8000 | UIMM8
    PC_JSR     = 3'd5   // (PC & 0x8000) | (IMM11 << 4)
  } pc_mux_e;

  typedef enum logic [1:0] {
    PRIV_CLEAR = 2'd0,
    PRIV_SET   = 2'd1,
    PRIV_KEEP  = 2'd2
  } priv_ctl_e;

  // All control signals of one instruction.
  typedef struct packed {
    rs_mux_e     rs_mux;
    rt_mux_e     rt_mux;
    rd_mux_e     rd_mux;
    logic        regfile_we;
    alu_in_mux_e alu_in_mux;
    alu_ctl_e    alu_ctl;
    logic        data_we;
    reg_in_mux_e reg_in_mux;
    logic        nzp_we;
    priv_ctl_e   priv_ctl;
    pc_mux_e     pc_mux;
  } lc4_ctl_t;

  // Opcode field I[15:12]
  localparam logic [3:0] OP_BR      = 4'b0000;
  localparam logic [3:0] OP_ARITH   = 4'b0001;
  localparam logic [3:0] OP_CMP     = 4'b0010;
  localparam logic [3:0] OP_JSR     = 4'b0100;
  localparam logic [3:0] OP_LOGIC   = 4'b0101;
  localparam logic [3:0] OP_LDR     = 4'b0110;
  localparam logic [3:0] OP_STR     = 4'b0111;
  localparam logic [3:0] OP_RTI     = 4'b1000;
  localparam logic [3:0] OP_CONST   = 4'b1001;
  localparam logic [3:0] OP_SHIFT   = 4'b1010;
  localparam logic [3:0] OP_JMP     = 4'b1100;
  localparam logic [3:0] OP_HICONST = 4'b1101;
  localparam logic [3:0] OP_TRAP    = 4'b1111;

endpackage
