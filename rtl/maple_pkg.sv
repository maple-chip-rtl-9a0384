// maple_pkg: shared constants and types of the MAPLE processing element.
//
// MAPLE executes an extension of the DLX instruction set. The opcode and
// function-field values below are those of the public DLX definition
// (I-type: op[31:26] rs1[25:21] rd[20:16] imm[15:0]; R-type: op=0,
// rs1[25:21] rs2[20:16] rd[15:11] func[5:0]; FP R-type: op=1 with the same
// fields; J-type: op[31:26] offset[25:0]). The two receive-register
// instructions, SENDRR and MOVRR2I, are this design's own encodings: the
// document names the mechanism but does not give its instruction format.
package maple_pkg;

  // ---------------------------------------------------------------- opcodes
  localparam logic [5:0] OP_SPECIAL = 6'h00;
  localparam logic [5:0] OP_FPARITH = 6'h01;
  localparam logic [5:0] OP_J       = 6'h02;
  localparam logic [5:0] OP_JAL     = 6'h03;
  localparam logic [5:0] OP_BEQZ    = 6'h04;
  localparam logic [5:0] OP_BNEZ    = 6'h05;
  localparam logic [5:0] OP_BFPT    = 6'h06;
  localparam logic [5:0] OP_BFPF    = 6'h07;
  localparam logic [5:0] OP_ADDI    = 6'h08;
  localparam logic [5:0] OP_ADDUI   = 6'h09;
  localparam logic [5:0] OP_SUBI    = 6'h0A;
  localparam logic [5:0] OP_SUBUI   = 6'h0B;
  localparam logic [5:0] OP_ANDI    = 6'h0C;
  localparam logic [5:0] OP_ORI     = 6'h0D;
  localparam logic [5:0] OP_XORI    = 6'h0E;
  localparam logic [5:0] OP_LHI     = 6'h0F;
  localparam logic [5:0] OP_TRAP    = 6'h11;
  localparam logic [5:0] OP_JR      = 6'h12;
  localparam logic [5:0] OP_JALR    = 6'h13;
  localparam logic [5:0] OP_SLLI    = 6'h14;
  localparam logic [5:0] OP_SRLI    = 6'h16;
  localparam logic [5:0] OP_SRAI    = 6'h17;
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
  localparam logic [5:0] OP_LF      = 6'h26;
  localparam logic [5:0] OP_LD      = 6'h27;
  localparam logic [5:0] OP_SB      = 6'h28;
  localparam logic [5:0] OP_SH      = 6'h29;
  localparam logic [5:0] OP_SW      = 6'h2B;
  localparam logic [5:0] OP_SF      = 6'h2E;
  localparam logic [5:0] OP_SD      = 6'h2F;
  // MAPLE extension: send GPR[rs1] to receive register rd[3:0] of PE imm.
  localparam logic [5:0] OP_SENDRR  = 6'h3C;

  // ------------------------------------------------------ SPECIAL functions
  localparam logic [5:0] FN_SLL     = 6'h04;
  localparam logic [5:0] FN_SRL     = 6'h06;
  localparam logic [5:0] FN_SRA     = 6'h07;
  localparam logic [5:0] FN_ADD     = 6'h20;
  localparam logic [5:0] FN_ADDU    = 6'h21;
  localparam logic [5:0] FN_SUB     = 6'h22;
  localparam logic [5:0] FN_SUBU    = 6'h23;
  localparam logic [5:0] FN_AND     = 6'h24;
  localparam logic [5:0] FN_OR      = 6'h25;
  localparam logic [5:0] FN_XOR     = 6'h26;
  localparam logic [5:0] FN_SEQ     = 6'h28;
  localparam logic [5:0] FN_SNE     = 6'h29;
  localparam logic [5:0] FN_SLT     = 6'h2A;
  localparam logic [5:0] FN_SGT     = 6'h2B;
  localparam logic [5:0] FN_SLE     = 6'h2C;
  localparam logic [5:0] FN_SGE     = 6'h2D;
  localparam logic [5:0] FN_MOVI2S  = 6'h30;
  localparam logic [5:0] FN_MOVS2I  = 6'h31;
  localparam logic [5:0] FN_MOVF    = 6'h32;
  localparam logic [5:0] FN_MOVD    = 6'h33;
  localparam logic [5:0] FN_MOVFP2I = 6'h34;
  localparam logic [5:0] FN_MOVI2FP = 6'h35;
  // MAPLE extension: GPR[rd] <- RR[rs1[3:0]].
  localparam logic [5:0] FN_MOVRR2I = 6'h38;

  // ------------------------------------------------------ FPARITH functions
  localparam logic [5:0] FF_ADDF  = 6'h00;
  localparam logic [5:0] FF_SUBF  = 6'h01;
  localparam logic [5:0] FF_MULTF = 6'h02;
  localparam logic [5:0] FF_DIVF  = 6'h03;
  localparam logic [5:0] FF_ADDD  = 6'h04;
  localparam logic [5:0] FF_SUBD  = 6'h05;
  localparam logic [5:0] FF_MULTD = 6'h06;
  localparam logic [5:0] FF_DIVD  = 6'h07;
  localparam logic [5:0] FF_CVTF2D = 6'h08;
  localparam logic [5:0] FF_CVTF2I = 6'h09;
  localparam logic [5:0] FF_CVTD2F = 6'h0A;
  localparam logic [5:0] FF_CVTD2I = 6'h0B;
  localparam logic [5:0] FF_CVTI2F = 6'h0C;
  localparam logic [5:0] FF_CVTI2D = 6'h0D;
  localparam logic [5:0] FF_MULT  = 6'h0E;
  localparam logic [5:0] FF_DIV   = 6'h0F;
  localparam logic [5:0] FF_EQF   = 6'h10;
  localparam logic [5:0] FF_NEF   = 6'h11;
  localparam logic [5:0] FF_LTF   = 6'h12;
  localparam logic [5:0] FF_GTF   = 6'h13;
  localparam logic [5:0] FF_LEF   = 6'h14;
  localparam logic [5:0] FF_GEF   = 6'h15;
  localparam logic [5:0] FF_MULTU = 6'h16;
  localparam logic [5:0] FF_DIVU  = 6'h17;
  localparam logic [5:0] FF_EQD   = 6'h18;
  localparam logic [5:0] FF_NED   = 6'h19;
  localparam logic [5:0] FF_LTD   = 6'h1A;
  localparam logic [5:0] FF_GTD   = 6'h1B;
  localparam logic [5:0] FF_LED   = 6'h1C;
  localparam logic [5:0] FF_GED   = 6'h1D;

  // ------------------------------------------------------- integer unit ops
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL, ALU_SRA,
    ALU_SEQ, ALU_SNE, ALU_SLT, ALU_SGT, ALU_SLE, ALU_SGE, ALU_PASSB
  } alu_op_e;

  // ---------------------------------------------------- floating unit ops
  typedef enum logic [4:0] {
    FPU_ADD, FPU_SUB, FPU_MUL, FPU_DIV,
    FPU_CVTF2D, FPU_CVTD2F, FPU_CVTF2I, FPU_CVTD2I, FPU_CVTI2F, FPU_CVTI2D,
    FPU_IMUL, FPU_IMULU, FPU_IDIV, FPU_IDIVU,
    FPU_EQ, FPU_NE, FPU_LT, FPU_GT, FPU_LE, FPU_GE,
    FPU_MOV
  } fpu_op_e;

  // FP status register (special register 0, MOVI2S/MOVS2I). Layout is this
  // design's choice: [0] compare condition tested by BFPT/BFPF, [2:1] IEEE
  // rounding mode (0 nearest even, 1 toward zero, 2 toward +inf, 3 toward
  // -inf), [7:3] sticky exception flags {invalid, divide-by-zero, overflow,
  // underflow, inexact}.
  localparam int unsigned FPSR_W = 8;

  // Network word carried from a source PE's MEM stage to a destination RR.
  localparam int unsigned RR_NUM   = 16;
  localparam int unsigned RR_IDX_W = 4;
  localparam int unsigned PE_ID_W  = 4;

  typedef struct packed {
    logic                valid;
    logic [PE_ID_W-1:0]  dst;    // destination PE number
    logic [RR_IDX_W-1:0] rr;     // receive register index at the destination
    logic [31:0]         data;
  } rr_msg_t;

  // One-cycle event strobes of a PE, for performance counting and tests.
  typedef struct packed {
    logic retire;      // an instruction left WB
    logic load_stall;  // ID held one cycle behind a load (load-use interlock)
    logic forward;     // an EX operand was taken from EX/MEM or MEM/WB
    logic branch;      // a branch or jump redirected fetch (two slots squashed)
    logic fp_op;       // the floating unit executed an operation in EX
    logic send;        // SENDRR put a word on the network in MEM
    logic receive;     // a word from the network was written into an RR
    logic rr_read;     // MOVRR2I read a receive register in ID
  } pe_events_t;

endpackage
