// dlx_pkg: types and constants shared by the DLX integer datapath.
//
// Holds the instruction encodings of the implemented DLX subset (primary
// opcodes and the function codes of the SPECIAL group), the internal ALU and
// shifter operation codes, the selectors for the two interchangeable datapath
// units (adder flavour and shifter flavour) and the decoded control word that
// the instruction decoder hands to each pipeline stage.
//
// The opcode and function numbers follow the DLX opcode tables. The internal
// operation codes and the layout of the control word are this design's own.
package dlx_pkg;

  localparam int unsigned XLEN = 32;

  // ------------------------------------------------------------------
  // Interchangeable datapath units (the "design points")
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {
    ADDER_RIPPLE = 2'd0,   // 32-bit ripple carry adder
    ADDER_PPA    = 2'd1,   // 32-bit parallel prefix adder
    ADDER_PPA8X4 = 2'd2    // four 8-bit parallel prefix adders, carries rippled
  } adder_kind_e;

  typedef enum logic {
    SHIFTER_BARREL = 1'b0, // one-cycle barrel shifter
    SHIFTER_LINEAR = 1'b1  // multi-cycle linear shift register
  } shifter_kind_e;

  // ------------------------------------------------------------------
  // Primary opcodes (instruction bits 31:26)
  // ------------------------------------------------------------------
  localparam logic [5:0] OP_SPECIAL = 6'h00;
  localparam logic [5:0] OP_J       = 6'h02;
  localparam logic [5:0] OP_JAL     = 6'h03;
  localparam logic [5:0] OP_BEQZ    = 6'h04;
  localparam logic [5:0] OP_BNEZ    = 6'h05;
  localparam logic [5:0] OP_ADDI    = 6'h08;
  localparam logic [5:0] OP_ADDUI   = 6'h09;
  localparam logic [5:0] OP_SUBI    = 6'h0A;
  localparam logic [5:0] OP_SUBUI   = 6'h0B;
  localparam logic [5:0] OP_ANDI    = 6'h0C;
  localparam logic [5:0] OP_ORI     = 6'h0D;
  localparam logic [5:0] OP_XORI    = 6'h0E;
  localparam logic [5:0] OP_LHI     = 6'h0F;
  localparam logic [5:0] OP_JR      = 6'h12;
  localparam logic [5:0] OP_JALR    = 6'h13;
  localparam logic [5:0] OP_SEQI    = 6'h18;
  localparam logic [5:0] OP_SNEI    = 6'h19;
  localparam logic [5:0] OP_SLTI    = 6'h1A;
  localparam logic [5:0] OP_SGTI    = 6'h1B;
  localparam logic [5:0] OP_SLEI    = 6'h1C;
  localparam logic [5:0] OP_SGEI    = 6'h1D;
  localparam logic [5:0] OP_LB      = 6'h20;
  localparam logic [5:0] OP_LH      = 6'h21;
  localparam logic [5:0] OP_LW      = 6'h23;
  localparam logic [5:0] OP_LBU     = 6'h24;
  localparam logic [5:0] OP_LHU     = 6'h25;
  localparam logic [5:0] OP_SB      = 6'h28;
  localparam logic [5:0] OP_SH      = 6'h29;
  localparam logic [5:0] OP_SW      = 6'h2B;
  localparam logic [5:0] OP_SEQUI   = 6'h30;
  localparam logic [5:0] OP_SNEUI   = 6'h31;
  localparam logic [5:0] OP_SLTUI   = 6'h32;
  localparam logic [5:0] OP_SGTUI   = 6'h33;
  localparam logic [5:0] OP_SLEUI   = 6'h34;
  localparam logic [5:0] OP_SGEUI   = 6'h35;

  // SPECIAL group function codes (instruction bits 5:0)
  localparam logic [5:0] FN_SLLI = 6'h00;
  localparam logic [5:0] FN_SRLI = 6'h02;
  localparam logic [5:0] FN_SRAI = 6'h03;
  localparam logic [5:0] FN_SLL  = 6'h04;
  localparam logic [5:0] FN_SRL  = 6'h06;
  localparam logic [5:0] FN_SRA  = 6'h07;
  localparam logic [5:0] FN_SEQU = 6'h10;
  localparam logic [5:0] FN_SNEU = 6'h11;
  localparam logic [5:0] FN_SLTU = 6'h12;
  localparam logic [5:0] FN_SGTU = 6'h13;
  localparam logic [5:0] FN_SLEU = 6'h14;
  localparam logic [5:0] FN_SGEU = 6'h15;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_SEQ  = 6'h28;
  localparam logic [5:0] FN_SNE  = 6'h29;
  localparam logic [5:0] FN_SLT  = 6'h2A;
  localparam logic [5:0] FN_SGT  = 6'h2B;
  localparam logic [5:0] FN_SLE  = 6'h2C;
  localparam logic [5:0] FN_SGE  = 6'h2D;

  // Register that JAL/JALR write the return address into
  localparam logic [4:0] LINK_REG = 5'd31;

  // ------------------------------------------------------------------
  // Internal operation codes
  // ------------------------------------------------------------------
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_AND  = 4'd2,
    ALU_OR   = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_PASSB = 4'd5,  // result = operand B (LHI, link address)
    ALU_SEQ  = 4'd6,
    ALU_SNE  = 4'd7,
    ALU_SLT  = 4'd8,
    ALU_SGT  = 4'd9,
    ALU_SLE  = 4'd10,
    ALU_SGE  = 4'd11,
    ALU_SLTU = 4'd12,
    ALU_SGTU = 4'd13,
    ALU_SLEU = 4'd14,
    ALU_SGEU = 4'd15
  } alu_op_e;

  typedef enum logic [1:0] {
    SH_SLL = 2'd0,
    SH_SRL = 2'd1,
    SH_SRA = 2'd2
  } shift_op_e;

  typedef enum logic [1:0] {
    MEM_BYTE = 2'd0,
    MEM_HALF = 2'd1,
    MEM_WORD = 2'd2
  } mem_size_e;

  // Decoded control word for one instruction
  typedef struct packed {
    logic        legal;      // instruction belongs to the implemented subset
    logic        rs1_used;
    logic        rs2_used;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [4:0]  rd;
    logic        reg_write;  // writes rd (rd==0 already folded in)
    logic        use_imm;    // operand B is the extended immediate
    logic [31:0] imm;        // extended immediate / shift amount / displacement
    alu_op_e     alu_op;
    logic        is_shift;
    shift_op_e   shift_op;
    logic        is_load;
    logic        is_store;
    mem_size_e   mem_size;
    logic        load_unsigned;
    logic        is_branch;  // BEQZ / BNEZ
    logic        branch_nez; // 1: BNEZ
    logic        is_jump;    // J, JAL, JR, JALR
    logic        jump_reg;   // JR, JALR
    logic        link;       // JAL, JALR
  } ctrl_t;

endpackage
