// maple_chip: the MAPLE processor, a 32-bit DLX-based RISC with a five-stage
// pipeline in which every operation takes a fixed, compile-time-known number
// of clocks, and with receive registers for direct register-to-register
// transfers between processors.
//
// Stages and timing:
//   IF   fetch from the instruction port (combinational read), PC += 4.
//   ID   decode; read the integer, floating-point and receive registers.
//   EX   integer unit or floating unit (both single-cycle, so floating-point
//        operations have the same latency as integer ones); operands are
//        forwarded from EX/MEM and MEM/WB; branches and jumps resolve here.
//   MEM  data-memory access (combinational read, write at the clock edge)
//        over a 64-bit port, so LD/SD move a double in one cycle;
//        SENDRR drives its word onto the network port tx here.
//   WB   write the integer or floating-point register file.
// Hazard rules, all fixed and visible to a static scheduler:
//   * results are forwarded, so dependent ALU/FPU instructions issue
//     back to back;
//   * an instruction that uses the result of the load just ahead of it waits
//     one cycle (load-use interlock);
//   * a taken branch or jump squashes the two instructions behind it (no
//     delay slot, predict not taken);
//   * TRAP stops fetching; halted rises when the TRAP leaves WB.
//
// Receive registers: a word arriving on rx is written into receive register
// rx.rr at the clock edge and can be read in ID by MOVRR2I from the next
// cycle on. SENDRR rs1, rr, pe puts GPR[rs1] on tx during its MEM cycle,
// addressed to receive register rr of processor pe.
//
// What follows the document: a DLX-derived 32-bit RISC, five stages, fixed
// operation latency, 32 integer, 32 floating-point and 16 receive registers,
// receive registers read in ID, transfers sent from MEM and written directly
// into the destination's receive register. This design's own choices: the
// encodings of SENDRR/MOVRR2I, forwarding, the load interlock, branch
// resolution in EX without a delay slot, single-cycle FP operations, TRAP as
// a stop instruction, the FP status register layout (maple_pkg), the
// 64-bit data port, and the omission of RFE and the unsigned set-compare
// instructions. LD/SD need an address that is a multiple of 8.
//
// FP status register (FPSR, special register 0): written in EX by MOVI2S,
// by compares (bit 0) and by every FP operation (its exception flags are
// ORed into bits [7:3]); read in EX by MOVS2I, so a MOVS2I sees the effect
// of every older instruction. The rounding mode bits [2:1] feed the FPU; an
// FP operation right after a MOVI2S already uses the new mode.
module maple_chip
  import maple_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction port
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  // data port: the aligned doubleword at dmem_addr (byte enables: be[7] is
  // the lowest byte address, big-endian; the word with addr[2] = 0 is
  // bits [63:32])
  output logic [31:0] dmem_addr,
  output logic [7:0]  dmem_be,
  output logic [63:0] dmem_wdata,
  input  logic [63:0] dmem_rdata,
  // receive-register transfer network
  output rr_msg_t     tx,
  input  rr_msg_t     rx,
  // status
  output logic        halted,
  output pe_events_t  events
);
  typedef enum logic [2:0] {BR_NONE, BR_EQZ, BR_NEZ, BR_FPT, BR_FPF, BR_J, BR_JR} br_e;
  typedef enum logic [1:0] {MS_B, MS_H, MS_W, MS_D} msize_e;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc4;
    alu_op_e     alu_op;
    logic        use_imm;
    logic [31:0] imm;
    logic        link;
    logic [4:0]  rs1, rs2;
    logic [31:0] rv1, rv2;
    logic [4:0]  fs1, fs2;
    logic        fdbl1, fdbl2;
    logic [63:0] fv1, fv2;
    logic        is_fpu;
    fpu_op_e     fpu_op;
    logic        fpu_dbl;
    logic        set_fpsr;
    logic        movi2s, movs2i;
    logic        fpu_from_gpr;
    logic        gpr_from_fp;
    logic        gpr_we;
    logic [4:0]  gpr_wa;
    logic        fpr_we;
    logic        fpr_dbl;
    logic [4:0]  fpr_wa;
    logic        is_load, is_store, mem_fp, mem_uns;
    msize_e      msize;
    br_e         br;
    logic        is_send;
    logic [RR_IDX_W-1:0] send_rr;
    logic [PE_ID_W-1:0]  send_pe;
    logic        is_trap;
  } idex_t;

  typedef struct packed {
    logic        valid;
    logic        gpr_we;
    logic [4:0]  gpr_wa;
    logic        fpr_we;
    logic        fpr_dbl;
    logic [4:0]  fpr_wa;
    logic [63:0] res;
    logic        is_load, is_store, mem_fp, mem_uns;
    msize_e      msize;
    logic [63:0] sdata;
    logic        is_send;
    logic [RR_IDX_W-1:0] send_rr;
    logic [PE_ID_W-1:0]  send_pe;
    logic        is_trap;
  } exmem_t;

  typedef struct packed {
    logic        valid;
    logic        gpr_we;
    logic [4:0]  gpr_wa;
    logic        fpr_we;
    logic        fpr_dbl;
    logic [4:0]  fpr_wa;
    logic [63:0] wdata;
    logic        is_trap;
  } memwb_t;

  logic [31:0] pc;
  logic        if_valid_q, stopping;
  logic [31:0] ifid_instr, ifid_pc4;
  idex_t       idex, id_dec;
  exmem_t      exmem, ex_out;
  memwb_t      memwb, mem_out;
  logic [FPSR_W-1:0] fpsr;

  logic        stall, redirect, trap_ex;
  logic [31:0] br_target;

  // =================================================================== IF
  assign imem_addr = pc;

  // =================================================================== ID
  logic [31:0] instr;
  logic [5:0]  opc, fn;
  logic [4:0]  f_rs1, f_rs2, f_rd;
  logic [31:0] simm, zimm;
  logic [31:0] gpr_rd1, gpr_rd2, rr_data;
  logic [63:0] fpr_rd1, fpr_rd2;
  logic        rd_dbl1, rd_dbl2;

  assign instr = ifid_instr;
  assign opc   = instr[31:26];
  assign fn    = instr[5:0];
  assign f_rs1 = instr[25:21];
  assign f_rs2 = instr[20:16];
  assign f_rd  = instr[15:11];
  assign simm  = {{16{instr[15]}}, instr[15:0]};
  assign zimm  = {16'h0, instr[15:0]};

  logic uses_rs1, uses_rs2, uses_fs1, uses_fs2;

  always_comb begin
    id_dec          = '0;
    id_dec.pc4      = ifid_pc4;
    id_dec.rs1      = f_rs1;
    id_dec.rs2      = f_rs2;
    id_dec.fs1      = f_rs1;
    id_dec.fs2      = f_rs2;
    id_dec.alu_op   = ALU_ADD;
    id_dec.fpu_op   = FPU_MOV;
    id_dec.msize    = MS_W;
    id_dec.br       = BR_NONE;
    id_dec.valid    = 1'b1;
    uses_rs1 = 1'b0; uses_rs2 = 1'b0; uses_fs1 = 1'b0; uses_fs2 = 1'b0;
    rd_dbl1  = 1'b0; rd_dbl2  = 1'b0;

    unique case (opc)
      OP_SPECIAL: begin
        id_dec.gpr_we = 1'b1;
        id_dec.gpr_wa = f_rd;
        uses_rs1 = 1'b1; uses_rs2 = 1'b1;
        unique case (fn)
          FN_SLL:  id_dec.alu_op = ALU_SLL;
          FN_SRL:  id_dec.alu_op = ALU_SRL;
          FN_SRA:  id_dec.alu_op = ALU_SRA;
          FN_ADD, FN_ADDU: id_dec.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: id_dec.alu_op = ALU_SUB;
          FN_AND:  id_dec.alu_op = ALU_AND;
          FN_OR:   id_dec.alu_op = ALU_OR;
          FN_XOR:  id_dec.alu_op = ALU_XOR;
          FN_SEQ:  id_dec.alu_op = ALU_SEQ;
          FN_SNE:  id_dec.alu_op = ALU_SNE;
          FN_SLT:  id_dec.alu_op = ALU_SLT;
          FN_SGT:  id_dec.alu_op = ALU_SGT;
          FN_SLE:  id_dec.alu_op = ALU_SLE;
          FN_SGE:  id_dec.alu_op = ALU_SGE;
          FN_MOVF, FN_MOVD: begin
            id_dec.gpr_we  = 1'b0;
            uses_rs1 = 1'b0; uses_rs2 = 1'b0; uses_fs1 = 1'b1;
            rd_dbl1        = (fn == FN_MOVD);
            id_dec.is_fpu  = 1'b1;
            id_dec.fpu_op  = FPU_MOV;
            id_dec.fpr_we  = 1'b1;
            id_dec.fpr_dbl = (fn == FN_MOVD);
            id_dec.fpr_wa  = f_rd;
          end
          FN_MOVFP2I: begin
            uses_rs1 = 1'b0; uses_rs2 = 1'b0; uses_fs1 = 1'b1;
            id_dec.gpr_from_fp = 1'b1;
          end
          FN_MOVI2FP: begin
            id_dec.gpr_we  = 1'b0;
            uses_rs2 = 1'b0;
            id_dec.is_fpu  = 1'b1;
            id_dec.fpu_op  = FPU_MOV;
            id_dec.fpu_from_gpr = 1'b1;
            id_dec.fpr_we  = 1'b1;
            id_dec.fpr_wa  = f_rd;
          end
          FN_MOVI2S: begin                 // S[rd] <- GPR[rs1]; only S0 exists
            id_dec.gpr_we = 1'b0;
            uses_rs2      = 1'b0;
            id_dec.movi2s = (f_rd == 5'd0);
          end
          FN_MOVS2I: begin                 // GPR[rd] <- S[rs1]; others read 0
            uses_rs1 = 1'b0; uses_rs2 = 1'b0;
            id_dec.movs2i  = (f_rs1 == 5'd0);
            id_dec.alu_op  = ALU_PASSB;
            id_dec.use_imm = 1'b1;
          end
          FN_MOVRR2I: begin
            uses_rs1 = 1'b0; uses_rs2 = 1'b0;
            id_dec.alu_op  = ALU_PASSB;
            id_dec.use_imm = 1'b1;
            id_dec.imm     = rr_data;
          end
          default: begin                   // unknown function: no operation
            id_dec.gpr_we = 1'b0;
            uses_rs1 = 1'b0; uses_rs2 = 1'b0;
          end
        endcase
      end

      OP_FPARITH: begin
        id_dec.is_fpu  = 1'b1;
        id_dec.fpr_we  = 1'b1;
        id_dec.fpr_wa  = f_rd;
        uses_fs1 = 1'b1; uses_fs2 = 1'b1;
        unique case (fn)
          FF_ADDF, FF_SUBF, FF_MULTF, FF_DIVF, FF_ADDD, FF_SUBD, FF_MULTD, FF_DIVD: begin
            id_dec.fpu_dbl = fn[2];
            id_dec.fpr_dbl = fn[2];
            rd_dbl1 = fn[2]; rd_dbl2 = fn[2];
            unique case (fn[1:0])
              2'd0:    id_dec.fpu_op = FPU_ADD;
              2'd1:    id_dec.fpu_op = FPU_SUB;
              2'd2:    id_dec.fpu_op = FPU_MUL;
              default: id_dec.fpu_op = FPU_DIV;
            endcase
          end
          FF_CVTF2D: begin id_dec.fpu_op = FPU_CVTF2D; uses_fs2 = 1'b0; id_dec.fpr_dbl = 1'b1; end
          FF_CVTF2I: begin id_dec.fpu_op = FPU_CVTF2I; uses_fs2 = 1'b0; end
          FF_CVTD2F: begin id_dec.fpu_op = FPU_CVTD2F; uses_fs2 = 1'b0; rd_dbl1 = 1'b1; end
          FF_CVTD2I: begin id_dec.fpu_op = FPU_CVTD2I; uses_fs2 = 1'b0; rd_dbl1 = 1'b1; end
          FF_CVTI2F: begin id_dec.fpu_op = FPU_CVTI2F; uses_fs2 = 1'b0; end
          FF_CVTI2D: begin id_dec.fpu_op = FPU_CVTI2D; uses_fs2 = 1'b0; id_dec.fpr_dbl = 1'b1; end
          FF_MULT:   id_dec.fpu_op = FPU_IMUL;
          FF_MULTU:  id_dec.fpu_op = FPU_IMULU;
          FF_DIV:    id_dec.fpu_op = FPU_IDIV;
          FF_DIVU:   id_dec.fpu_op = FPU_IDIVU;
          FF_EQF, FF_NEF, FF_LTF, FF_GTF, FF_LEF, FF_GEF,
          FF_EQD, FF_NED, FF_LTD, FF_GTD, FF_LED, FF_GED: begin
            id_dec.fpr_we   = 1'b0;
            id_dec.set_fpsr = 1'b1;
            id_dec.fpu_dbl  = fn[3];
            rd_dbl1 = fn[3]; rd_dbl2 = fn[3];
            unique case (fn[2:0])
              3'd0:    id_dec.fpu_op = FPU_EQ;
              3'd1:    id_dec.fpu_op = FPU_NE;
              3'd2:    id_dec.fpu_op = FPU_LT;
              3'd3:    id_dec.fpu_op = FPU_GT;
              3'd4:    id_dec.fpu_op = FPU_LE;
              default: id_dec.fpu_op = FPU_GE;
            endcase
          end
          default: begin
            id_dec.is_fpu = 1'b0;
            id_dec.fpr_we = 1'b0;
            uses_fs1 = 1'b0; uses_fs2 = 1'b0;
          end
        endcase
      end

      OP_J, OP_JAL: begin
        id_dec.br      = BR_J;
        id_dec.imm     = {{6{instr[25]}}, instr[25:0]};
        id_dec.link    = (opc == OP_JAL);
        id_dec.gpr_we  = (opc == OP_JAL);
        id_dec.gpr_wa  = 5'd31;
      end
      OP_JR, OP_JALR: begin
        id_dec.br      = BR_JR;
        uses_rs1       = 1'b1;
        id_dec.link    = (opc == OP_JALR);
        id_dec.gpr_we  = (opc == OP_JALR);
        id_dec.gpr_wa  = 5'd31;
      end
      OP_BEQZ, OP_BNEZ: begin
        id_dec.br  = (opc == OP_BEQZ) ? BR_EQZ : BR_NEZ;
        id_dec.imm = simm;
        uses_rs1   = 1'b1;
      end
      OP_BFPT, OP_BFPF: begin
        id_dec.br  = (opc == OP_BFPT) ? BR_FPT : BR_FPF;
        id_dec.imm = simm;
      end

      OP_ADDI, OP_ADDUI, OP_SUBI, OP_SUBUI, OP_ANDI, OP_ORI, OP_XORI, OP_LHI,
      OP_SLLI, OP_SRLI, OP_SRAI, OP_SEQI, OP_SNEI, OP_SLTI, OP_SGTI, OP_SLEI,
      OP_SGEI: begin
        id_dec.gpr_we  = 1'b1;
        id_dec.gpr_wa  = f_rs2;
        id_dec.use_imm = 1'b1;
        uses_rs1       = (opc != OP_LHI);
        id_dec.imm     = simm;
        unique case (opc)
          OP_ADDI:  id_dec.alu_op = ALU_ADD;
          OP_ADDUI: begin id_dec.alu_op = ALU_ADD; id_dec.imm = zimm; end
          OP_SUBI:  id_dec.alu_op = ALU_SUB;
          OP_SUBUI: begin id_dec.alu_op = ALU_SUB; id_dec.imm = zimm; end
          OP_ANDI:  begin id_dec.alu_op = ALU_AND; id_dec.imm = zimm; end
          OP_ORI:   begin id_dec.alu_op = ALU_OR;  id_dec.imm = zimm; end
          OP_XORI:  begin id_dec.alu_op = ALU_XOR; id_dec.imm = zimm; end
          OP_LHI:   begin id_dec.alu_op = ALU_PASSB; id_dec.imm = {instr[15:0], 16'h0}; end
          OP_SLLI:  id_dec.alu_op = ALU_SLL;
          OP_SRLI:  id_dec.alu_op = ALU_SRL;
          OP_SRAI:  id_dec.alu_op = ALU_SRA;
          OP_SEQI:  id_dec.alu_op = ALU_SEQ;
          OP_SNEI:  id_dec.alu_op = ALU_SNE;
          OP_SLTI:  id_dec.alu_op = ALU_SLT;
          OP_SGTI:  id_dec.alu_op = ALU_SGT;
          OP_SLEI:  id_dec.alu_op = ALU_SLE;
          default:  id_dec.alu_op = ALU_SGE;
        endcase
      end

      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU, OP_LF, OP_LD: begin
        id_dec.is_load = 1'b1;
        id_dec.use_imm = 1'b1;
        id_dec.imm     = simm;
        uses_rs1       = 1'b1;
        id_dec.mem_uns = (opc == OP_LBU) || (opc == OP_LHU);
        id_dec.msize   = (opc == OP_LB || opc == OP_LBU) ? MS_B :
                         (opc == OP_LH || opc == OP_LHU) ? MS_H :
                         (opc == OP_LD) ? MS_D : MS_W;
        if (opc == OP_LF || opc == OP_LD) begin
          id_dec.mem_fp  = 1'b1;
          id_dec.fpr_we  = 1'b1;
          id_dec.fpr_dbl = (opc == OP_LD);
          id_dec.fpr_wa  = f_rs2;
        end else begin
          id_dec.gpr_we = 1'b1;
          id_dec.gpr_wa = f_rs2;
        end
      end

      OP_SB, OP_SH, OP_SW, OP_SF, OP_SD: begin
        id_dec.is_store = 1'b1;
        id_dec.use_imm  = 1'b1;
        id_dec.imm      = simm;
        uses_rs1        = 1'b1;
        id_dec.msize    = (opc == OP_SB) ? MS_B : (opc == OP_SH) ? MS_H :
                          (opc == OP_SD) ? MS_D : MS_W;
        if (opc == OP_SF || opc == OP_SD) begin
          id_dec.mem_fp = 1'b1;
          uses_fs2      = 1'b1;
          rd_dbl2       = (opc == OP_SD);
        end else begin
          uses_rs2      = 1'b1;
        end
      end

      OP_SENDRR: begin
        id_dec.is_send = 1'b1;
        id_dec.send_rr = f_rs2[RR_IDX_W-1:0];
        id_dec.send_pe = instr[PE_ID_W-1:0];
        uses_rs1       = 1'b1;
      end

      OP_TRAP: id_dec.is_trap = 1'b1;

      default: ;                           // unknown opcode: no operation
    endcase
    id_dec.fdbl1 = rd_dbl1;
    id_dec.fdbl2 = rd_dbl2;
    id_dec.fv1 = fpr_rd1;
    id_dec.fv2 = fpr_rd2;
    id_dec.rv1 = gpr_rd1;
    id_dec.rv2 = gpr_rd2;
  end

  maple_gpr u_gpr (
    .clk, .rst_n,
    .ra1(f_rs1), .rd1(gpr_rd1), .ra2(f_rs2), .rd2(gpr_rd2),
    .we(memwb.valid && memwb.gpr_we), .wa(memwb.gpr_wa), .wd(memwb.wdata[31:0])
  );

  maple_fpr u_fpr (
    .clk, .rst_n,
    .ra1(f_rs1), .rdbl1(rd_dbl1), .rd1(fpr_rd1),
    .ra2(f_rs2), .rdbl2(rd_dbl2), .rd2(fpr_rd2),
    .we(memwb.valid && memwb.fpr_we), .wdbl(memwb.fpr_dbl), .wa(memwb.fpr_wa),
    .wd(memwb.wdata)
  );

  maple_rr u_rr (
    .clk, .rst_n,
    .wr_valid(rx.valid), .wr_idx(rx.rr), .wr_data(rx.data),
    .rd_idx(f_rs1[RR_IDX_W-1:0]), .rd_data(rr_data)
  );

  // Load-use interlock: the load in EX delivers its word only in MEM.
  function automatic logic fp_overlap(input logic [4:0] r, input logic rdbl,
                                      input logic [4:0] w, input logic wdbl);
    return (rdbl || wdbl) ? (r[4:1] == w[4:1]) : (r == w);
  endfunction

  always_comb begin
    stall = 1'b0;
    if (if_valid_q && idex.valid && idex.is_load) begin
      if (idex.gpr_we && idex.gpr_wa != '0 &&
          ((uses_rs1 && f_rs1 == idex.gpr_wa) || (uses_rs2 && f_rs2 == idex.gpr_wa)))
        stall = 1'b1;
      if (idex.fpr_we &&
          ((uses_fs1 && fp_overlap(f_rs1, rd_dbl1, idex.fpr_wa, idex.fpr_dbl)) ||
           (uses_fs2 && fp_overlap(f_rs2, rd_dbl2, idex.fpr_wa, idex.fpr_dbl))))
        stall = 1'b1;
    end
  end

  // =================================================================== EX
  logic        fwd_hit;
  logic [31:0] a_int, b_int, alu_b, alu_y;
  logic [63:0] a_fp, b_fp, fpu_a, fpu_y;
  logic        fpu_cond, br_cond;
  logic [4:0]  fpu_flags;

  // Newest value of one 32-bit floating-point register.
  function automatic logic [31:0] fwd_f32(input logic [4:0] r, input logic [31:0] cur,
                                          input exmem_t em, input memwb_t mw);
    if (em.valid && em.fpr_we && !em.fpr_dbl && em.fpr_wa == r) return em.res[31:0];
    if (em.valid && em.fpr_we &&  em.fpr_dbl && em.fpr_wa[4:1] == r[4:1])
      return r[0] ? em.res[31:0] : em.res[63:32];
    if (mw.valid && mw.fpr_we && !mw.fpr_dbl && mw.fpr_wa == r) return mw.wdata[31:0];
    if (mw.valid && mw.fpr_we &&  mw.fpr_dbl && mw.fpr_wa[4:1] == r[4:1])
      return r[0] ? mw.wdata[31:0] : mw.wdata[63:32];
    return cur;
  endfunction

  function automatic logic [31:0] fwd_gpr(input logic [4:0] r, input logic [31:0] cur,
                                          input exmem_t em, input memwb_t mw);
    if (r == '0) return '0;
    if (em.valid && em.gpr_we && em.gpr_wa == r) return em.res[31:0];
    if (mw.valid && mw.gpr_we && mw.gpr_wa == r) return mw.wdata[31:0];
    return cur;
  endfunction

  function automatic logic fp_hit(input logic [4:0] r, input exmem_t em, input memwb_t mw);
    return (em.valid && em.fpr_we && fp_overlap(r, 1'b0, em.fpr_wa, em.fpr_dbl)) ||
           (mw.valid && mw.fpr_we && fp_overlap(r, 1'b0, mw.fpr_wa, mw.fpr_dbl));
  endfunction

  logic dbl_a, dbl_b;
  always_comb begin
    a_int = fwd_gpr(idex.rs1, idex.rv1, exmem, memwb);
    b_int = fwd_gpr(idex.rs2, idex.rv2, exmem, memwb);
    dbl_a = idex.fdbl1;
    dbl_b = idex.fdbl2;
    // A double operand is the pair {F[2n], F[2n+1]}; a single one is F[n].
    if (dbl_a)
      a_fp = {fwd_f32({idex.fs1[4:1], 1'b0}, idex.fv1[63:32], exmem, memwb),
              fwd_f32({idex.fs1[4:1], 1'b1}, idex.fv1[31:0],  exmem, memwb)};
    else
      a_fp = {32'h0, fwd_f32(idex.fs1, idex.fv1[31:0], exmem, memwb)};
    if (dbl_b)
      b_fp = {fwd_f32({idex.fs2[4:1], 1'b0}, idex.fv2[63:32], exmem, memwb),
              fwd_f32({idex.fs2[4:1], 1'b1}, idex.fv2[31:0],  exmem, memwb)};
    else
      b_fp = {32'h0, fwd_f32(idex.fs2, idex.fv2[31:0], exmem, memwb)};
    fpu_a = idex.fpu_from_gpr ? {32'h0, a_int} : a_fp;
    alu_b = idex.use_imm ? idex.imm : b_int;
  end

  // Forwarding activity, reported as an event.
  always_comb begin
    fwd_hit = 1'b0;
    if (idex.valid) begin
      if (idex.rs1 != '0 && ((exmem.valid && exmem.gpr_we && exmem.gpr_wa == idex.rs1) ||
                             (memwb.valid && memwb.gpr_we && memwb.gpr_wa == idex.rs1)) &&
          (idex.br == BR_EQZ || idex.br == BR_NEZ || idex.br == BR_JR || idex.is_send ||
           idex.is_load || idex.is_store || idex.fpu_from_gpr || idex.movi2s ||
           (!idex.is_fpu && idex.gpr_we && !idex.link && idex.alu_op != ALU_PASSB)))
        fwd_hit = 1'b1;
      if (idex.is_fpu && !idex.fpu_from_gpr && fp_hit(idex.fs1, exmem, memwb))
        fwd_hit = 1'b1;
    end
  end

  maple_alu u_alu (.op(idex.alu_op), .a(a_int), .b(alu_b), .y(alu_y));
  maple_fpu u_fpu (.op(idex.fpu_op), .dbl(idex.fpu_dbl), .a(fpu_a), .b(b_fp),
                   .rm(fpsr[2:1]), .y(fpu_y), .cond(fpu_cond), .flags(fpu_flags));

  always_comb begin
    unique case (idex.br)
      BR_EQZ:  br_cond = (a_int == '0);
      BR_NEZ:  br_cond = (a_int != '0);
      BR_FPT:  br_cond = fpsr[0];
      BR_FPF:  br_cond = !fpsr[0];
      BR_J, BR_JR: br_cond = 1'b1;
      default: br_cond = 1'b0;
    endcase
    redirect  = idex.valid && br_cond;
    br_target = (idex.br == BR_JR) ? a_int : idex.pc4 + idex.imm;
    trap_ex   = idex.valid && idex.is_trap;
  end

  always_comb begin
    ex_out          = '0;
    ex_out.valid    = idex.valid;
    ex_out.gpr_we   = idex.gpr_we;
    ex_out.gpr_wa   = idex.gpr_wa;
    ex_out.fpr_we   = idex.fpr_we;
    ex_out.fpr_dbl  = idex.fpr_dbl;
    ex_out.fpr_wa   = idex.fpr_wa;
    ex_out.is_load  = idex.is_load;
    ex_out.is_store = idex.is_store;
    ex_out.mem_fp   = idex.mem_fp;
    ex_out.mem_uns  = idex.mem_uns;
    ex_out.msize    = idex.msize;
    ex_out.is_send  = idex.is_send;
    ex_out.send_rr  = idex.send_rr;
    ex_out.send_pe  = idex.send_pe;
    ex_out.is_trap  = idex.is_trap;
    ex_out.sdata    = idex.is_send ? {32'h0, a_int} :
                      idex.mem_fp  ? ((idex.msize == MS_D) ? b_fp : {32'h0, b_fp[31:0]}) :
                                     {32'h0, b_int};
    if (idex.link)             ex_out.res = {32'h0, idex.pc4};
    else if (idex.gpr_from_fp) ex_out.res = {32'h0, a_fp[31:0]};
    else if (idex.movs2i)      ex_out.res = {{(64-FPSR_W){1'b0}}, fpsr};
    else if (idex.is_fpu)      ex_out.res = fpu_y;
    else                       ex_out.res = {32'h0, alu_y};
  end

  // ================================================================== MEM
  logic [1:0]  boff;
  logic [31:0] ldata;

  assign boff       = exmem.res[1:0];
  assign dmem_addr  = exmem.res[31:0];

  // Byte lanes within the addressed word, then the word within the
  // doubleword (addr[2] = 0 is the upper, lower-addressed word).
  logic [3:0]  be4;
  logic [31:0] wd32, rword;
  always_comb begin
    be4  = '0;
    wd32 = exmem.sdata[31:0];
    unique case (exmem.msize)
      MS_B:    begin be4 = 4'b1000 >> boff;             wd32 = {4{exmem.sdata[7:0]}};  end
      MS_H:    begin be4 = boff[1] ? 4'b0011 : 4'b1100; wd32 = {2{exmem.sdata[15:0]}}; end
      default: be4 = 4'b1111;
    endcase
    dmem_be    = '0;
    dmem_wdata = {wd32, wd32};
    if (exmem.valid && exmem.is_store) begin
      if (exmem.msize == MS_D) begin
        dmem_be    = 8'hFF;
        dmem_wdata = exmem.sdata;
      end else begin
        dmem_be    = exmem.res[2] ? {4'b0, be4} : {be4, 4'b0};
      end
    end
    rword = exmem.res[2] ? dmem_rdata[31:0] : dmem_rdata[63:32];
  end

  logic [7:0]  lbyte;
  logic [15:0] lhalf;
  always_comb begin
    lbyte = rword[8*(3 - int'(boff)) +: 8];
    lhalf = boff[1] ? rword[15:0] : rword[31:16];
    unique case (exmem.msize)
      MS_B:    ldata = exmem.mem_uns ? {24'h0, lbyte} : {{24{lbyte[7]}}, lbyte};
      MS_H:    ldata = exmem.mem_uns ? {16'h0, lhalf} : {{16{lhalf[15]}}, lhalf};
      default: ldata = rword;
    endcase
  end

  always_comb begin
    mem_out         = '0;
    mem_out.valid   = exmem.valid;
    mem_out.gpr_we  = exmem.gpr_we;
    mem_out.gpr_wa  = exmem.gpr_wa;
    mem_out.fpr_we  = exmem.fpr_we;
    mem_out.fpr_dbl = exmem.fpr_dbl;
    mem_out.fpr_wa  = exmem.fpr_wa;
    mem_out.is_trap = exmem.is_trap;
    mem_out.wdata   = !exmem.is_load        ? exmem.res :
                      (exmem.msize == MS_D) ? dmem_rdata : {32'h0, ldata};
  end

  always_comb begin
    tx       = '0;
    tx.valid = exmem.valid && exmem.is_send;
    tx.dst   = exmem.send_pe;
    tx.rr    = exmem.send_rr;
    tx.data  = exmem.sdata[31:0];
  end

  // ============================================================ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc         <= RESET_PC;
      if_valid_q <= 1'b0;
      ifid_instr <= '0;
      ifid_pc4   <= '0;
      idex       <= '0;
      exmem      <= '0;
      memwb      <= '0;
      fpsr       <= '0;
      stopping   <= 1'b0;
      halted     <= 1'b0;
    end else begin
      // IF and IF/ID
      if (redirect) begin
        pc         <= br_target;
        if_valid_q <= 1'b0;
      end else if (trap_ex || stopping) begin
        if_valid_q <= 1'b0;
      end else if (!stall) begin
        pc         <= pc + 32'd4;
        if_valid_q <= 1'b1;
        ifid_instr <= imem_rdata;
        ifid_pc4   <= pc + 32'd4;
      end
      if (trap_ex) stopping <= 1'b1;

      // ID/EX
      if (redirect || trap_ex || stall || !if_valid_q) idex <= '0;
      else                                           idex <= id_dec;

      // EX/MEM, MEM/WB
      exmem <= ex_out;
      memwb <= mem_out;
      if (idex.valid && idex.movi2s) fpsr <= a_int[FPSR_W-1:0];
      else if (idex.valid && idex.is_fpu) begin
        if (idex.set_fpsr) fpsr[0] <= fpu_cond;
        fpsr[7:3] <= fpsr[7:3] | fpu_flags;
      end
      if (memwb.valid && memwb.is_trap) halted <= 1'b1;
    end
  end

  // ================================================================ events
  always_comb begin
    events            = '0;
    events.retire     = memwb.valid;
    events.load_stall = stall;
    events.forward    = fwd_hit;
    events.branch     = redirect;
    events.fp_op      = idex.valid && idex.is_fpu;
    events.send       = tx.valid;
    events.receive    = rx.valid;
    events.rr_read    = if_valid_q && !stall && !redirect && !trap_ex &&
                        opc == OP_SPECIAL && fn == FN_MOVRR2I;
  end

endmodule
