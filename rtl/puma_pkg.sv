// puma_pkg: types, constants and decode functions shared by the dual-issue
// PowerPC fixed point unit.
//
// The machine translates PowerPC instructions into unit operations (uops).
// A uop names its functional unit (ALU, branch unit, load/store unit), an
// operation, up to two source registers and one destination register. The
// register index space is 6 bits wide: 0..31 are the general purpose
// registers, 32..47 the sixteen miscellaneous registers (condition register,
// link register, count register, XER and scratch registers).
//
// The document specifies the PowerPC instruction set as "130 instructions, of
// which 70 are composed of single unit operations" without listing them. The
// subset decoded here is this design's own choice; it keeps one example of each
// decoding class: single-uop (arithmetic, logic, compare, load, store, branch),
// dual-uop (load/store with update) and multi-uop (load/store multiple word).
package puma_pkg;

  localparam int XLEN      = 32;
  localparam int LINE_W    = 128;          // cache line, 4 instructions
  localparam int NREGS     = 48;           // 32 GPR + 16 miscellaneous
  localparam int RIDX_W    = 6;
  localparam int ROB_N     = 12;           // reorder buffer entries
  localparam int TAG_W     = 4;            // ROB tag width
  localparam int BPIDX_W   = 10;           // gshare index / history width

  // miscellaneous register numbers
  localparam logic [RIDX_W-1:0] R_CR  = 6'd32;
  localparam logic [RIDX_W-1:0] R_LR  = 6'd33;
  localparam logic [RIDX_W-1:0] R_CTR = 6'd34;
  localparam logic [RIDX_W-1:0] R_XER = 6'd35;

  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [RIDX_W-1:0] ridx_t;

  typedef enum logic [1:0] {FU_ALU = 2'd0, FU_BRU = 2'd1, FU_LSU = 2'd2} fu_e;

  typedef enum logic [3:0] {
    OP_ADD, OP_SUBF, OP_AND, OP_OR, OP_XOR, OP_CMP, OP_CMPL, OP_SLW, OP_SRW,
    OP_B, OP_BC, OP_BCLR,
    OP_LW, OP_LB, OP_SW, OP_SB
  } op_e;

  typedef struct packed {
    logic               valid;
    fu_e                fu;
    op_e                op;
    logic               dst_v;
    ridx_t              dst;
    logic               s1_v;
    ridx_t              s1;
    logic               s2_v;
    ridx_t              s2;
    logic               use_imm;   // ALU second operand is imm
    logic [XLEN-1:0]    imm;       // immediate / displacement / branch offset
    logic               lk;        // branch writes LR
    logic               aa;        // absolute branch address
    logic [4:0]         bo;
    logic [4:0]         bi;
    logic [XLEN-1:0]    pc;
    logic               pred_taken;
    logic [XLEN-1:0]    pred_target;
    logic [BPIDX_W-1:0] bp_idx;
  } uop_t;

  // instruction as fetched, with its prediction
  typedef struct packed {
    logic               valid;
    logic [31:0]        instr;
    logic [XLEN-1:0]    pc;
    logic               pred_taken;
    logic [XLEN-1:0]    pred_target;
    logic [BPIDX_W-1:0] bp_idx;
  } finst_t;

  // result broadcast on one of the two completion buses
  typedef struct packed {
    logic            valid;
    tag_t            tag;
    logic [XLEN-1:0] value;
    logic            is_br;
    logic            cond;       // conditional branch (trains the PHT)
    logic            taken;
    logic [XLEN-1:0] target;     // resolved next PC
    logic            exc;        // misprediction: flush at commit
  } cdb_t;

  // operand as read by dispatch: a value or the tag that will produce it
  typedef struct packed {
    logic            ready;
    tag_t            tag;
    logic [XLEN-1:0] value;
  } opnd_t;

  // reservation station entry
  typedef struct packed {
    uop_t  u;
    tag_t  tag;
    opnd_t a;
    opnd_t b;
  } rs_ent_t;

  // reorder buffer entry as seen by the write back unit
  typedef struct packed {
    logic               valid;
    logic               done;
    logic               dst_v;
    ridx_t              dst;
    logic [XLEN-1:0]    value;
    logic               is_br;
    logic               cond;
    logic               taken;
    logic [XLEN-1:0]    target;
    logic               exc;
    logic [XLEN-1:0]    pc;
    logic [BPIDX_W-1:0] bp_idx;
  } rob_ent_t;

  // ------------------------------------------------------------------
  // decoding
  // ------------------------------------------------------------------
  // number of uops an instruction expands to (0 = illegal, treated as nop)
  function automatic int unsigned num_uops(input logic [31:0] ins);
    logic [5:0] opc;
    opc = ins[31:26];
    case (opc)
      6'd33, 6'd35, 6'd37, 6'd39: return 2;           // lwzu lbzu stwu stbu
      6'd46, 6'd47: return 32 - int'(ins[25:21]);     // lmw stmw
      default: return 1;
    endcase
  endfunction

  function automatic logic [31:0] sext16(input logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

  // uop k (0-based) of instruction ins at address pc
  function automatic uop_t decode_uop(input finst_t f, input int unsigned k);
    uop_t u;
    logic [31:0] ins;
    logic [5:0]  opc;
    logic [9:0]  xo;
    logic [4:0]  rt, ra, rb;
    ins = f.instr;
    opc = ins[31:26];
    xo  = ins[10:1];
    rt  = ins[25:21];
    ra  = ins[20:16];
    rb  = ins[15:11];
    u = '0;
    u.valid = f.valid;
    u.pc = f.pc;
    // a prediction belongs to the instruction's last uop
    u.pred_taken = f.pred_taken && (k + 1 == num_uops(f.instr));
    u.pred_target = f.pred_target;
    u.bp_idx = f.bp_idx;
    u.fu = FU_ALU;
    u.op = OP_OR;                         // default: no-op (nothing written)
    case (opc)
      6'd14, 6'd15: begin                 // addi, addis
        u.op = OP_ADD; u.dst_v = 1; u.dst = {1'b0, rt};
        u.s1_v = (ra != 0); u.s1 = {1'b0, ra}; u.use_imm = 1;
        u.imm = (opc == 6'd15) ? {ins[15:0], 16'h0} : sext16(ins[15:0]);
      end
      6'd24, 6'd26, 6'd28: begin          // ori, xori, andi.
        u.op = (opc == 6'd24) ? OP_OR : (opc == 6'd26) ? OP_XOR : OP_AND;
        u.dst_v = 1; u.dst = {1'b0, ra}; u.s1_v = 1; u.s1 = {1'b0, rt};
        u.use_imm = 1; u.imm = {16'h0, ins[15:0]};
      end
      6'd11, 6'd10: begin                 // cmpwi, cmplwi (CR0 only)
        u.op = (opc == 6'd11) ? OP_CMP : OP_CMPL; u.dst_v = 1; u.dst = R_CR;
        u.s1_v = 1; u.s1 = {1'b0, ra}; u.use_imm = 1;
        u.imm = (opc == 6'd11) ? sext16(ins[15:0]) : {16'h0, ins[15:0]};
      end
      6'd31: begin
        u.dst_v = 1; u.dst = {1'b0, rt}; u.s1_v = 1; u.s1 = {1'b0, ra};
        u.s2_v = 1; u.s2 = {1'b0, rb};
        case (xo)
          10'd266: u.op = OP_ADD;
          10'd40:  u.op = OP_SUBF;
          10'd0, 10'd32: begin u.op = (xo == 0) ? OP_CMP : OP_CMPL; u.dst = R_CR; end
          10'd28, 10'd444, 10'd316, 10'd24, 10'd536: begin   // and or xor slw srw
            u.op = (xo == 10'd28) ? OP_AND : (xo == 10'd444) ? OP_OR :
                   (xo == 10'd316) ? OP_XOR : (xo == 10'd24) ? OP_SLW : OP_SRW;
            u.dst = {1'b0, ra}; u.s1 = {1'b0, rt};
          end
          default: begin u = '0; u.valid = f.valid; u.pc = f.pc; u.op = OP_OR; end
        endcase
      end
      6'd18: begin                        // b, ba, bl, bla
        u.fu = FU_BRU; u.op = OP_B;
        u.imm = {{6{ins[25]}}, ins[25:2], 2'b00};
        u.aa = ins[1]; u.lk = ins[0]; u.dst_v = ins[0]; u.dst = R_LR;
      end
      6'd16: begin                        // bc (BO with "no CTR decrement" only)
        u.fu = FU_BRU; u.op = OP_BC; u.imm = {{16{ins[15]}}, ins[15:2], 2'b00};
        u.aa = ins[1]; u.lk = ins[0]; u.dst_v = ins[0]; u.dst = R_LR;
        u.bo = rt; u.bi = ra; u.s1_v = 1; u.s1 = R_CR;
      end
      6'd19: begin                        // bclr
        u.fu = FU_BRU; u.op = OP_BCLR; u.lk = ins[0]; u.dst_v = ins[0]; u.dst = R_LR;
        u.bo = rt; u.bi = ra; u.s1_v = 1; u.s1 = R_CR; u.s2_v = 1; u.s2 = R_LR;
      end
      6'd32, 6'd34, 6'd33, 6'd35: begin   // lwz lbz lwzu lbzu
        if (k == 0) begin
          u.fu = FU_LSU; u.op = (opc == 6'd32 || opc == 6'd33) ? OP_LW : OP_LB;
          u.dst_v = 1; u.dst = {1'b0, rt}; u.s1_v = (ra != 0); u.s1 = {1'b0, ra};
          u.imm = sext16(ins[15:0]);
        end else begin                    // update form: rA = rA + d
          u.op = OP_ADD; u.dst_v = 1; u.dst = {1'b0, ra}; u.s1_v = 1;
          u.s1 = {1'b0, ra}; u.use_imm = 1; u.imm = sext16(ins[15:0]);
        end
      end
      6'd36, 6'd38, 6'd37, 6'd39: begin   // stw stb stwu stbu
        if (k == 0) begin
          u.fu = FU_LSU; u.op = (opc == 6'd36 || opc == 6'd37) ? OP_SW : OP_SB;
          u.s1_v = (ra != 0); u.s1 = {1'b0, ra}; u.s2_v = 1; u.s2 = {1'b0, rt};
          u.imm = sext16(ins[15:0]);
        end else begin
          u.op = OP_ADD; u.dst_v = 1; u.dst = {1'b0, ra}; u.s1_v = 1;
          u.s1 = {1'b0, ra}; u.use_imm = 1; u.imm = sext16(ins[15:0]);
        end
      end
      6'd46, 6'd47: begin                 // lmw, stmw: uop k moves register rt+k
        u.fu = FU_LSU; u.op = (opc == 6'd46) ? OP_LW : OP_SW;
        u.s1_v = (ra != 0); u.s1 = {1'b0, ra};
        u.imm = sext16(ins[15:0]) + 32'(4 * k);
        if (opc == 6'd46) begin u.dst_v = 1; u.dst = 6'(int'(rt) + int'(k)); end
        else begin u.s2_v = 1; u.s2 = 6'(int'(rt) + int'(k)); end
      end
      default: ;                          // unsupported: no-op
    endcase
    return u;
  endfunction

endpackage
