// hera_core: control and datapath of the HERA processor, without memories.
//
// A small multi-cycle machine. Instruction memory is read synchronously at the
// address the PC is about to take (imem_addr = next PC), so the instruction
// word is ready in the cycle after the PC changes and most instructions
// complete in one cycle. The ones that need more than one register write or a
// memory read take extra cycles through fixed sequences:
//
//   one cycle    SETLO SETHI ADD SUB UMULLO UMULHI logic ops INC DEC LSL LSR
//                SETF SAVEF RSTRF STORE BR BRN BR2 NOP SWI RTI
//   LOAD   2     address M[a+o] issued, then d written with the word read
//   CAL    4     M[SP] = PC+1 and PC = a; then OFP = FP; then FP = SP; then SP = SP+o
//   RETURN 3     read M[FP]; then PC = that word and SP = FP; then FP = OFP
//   HALT         the PC stays and the core stops until reset
//
// One cycle after reset fetches the word at address 0. CAL and RETURN are
// split so that every step reads the values before the step's write, giving
// the architecture's simultaneous assignments (RETURN sets SP to the FP of the
// frame being left). SWI and RTI are named by the architecture without a
// definition; here they step the PC like NOP and raise unimpl for one cycle.
// The instruction encoding is this design's own (see hera_pkg).
//
// Interface: a synchronous-read instruction port (imem_addr, imem_rdata), a
// single synchronous data port (dmem_*; rdata one cycle after the address),
// a debug register read port, and status: pc, flags, halted, retire (one
// cycle pulse when an instruction completes), unimpl.
module hera_core
  import hera_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // instruction memory
  output word_t   imem_addr,
  input  word_t   imem_rdata,
  // data memory
  output word_t   dmem_addr,
  output logic    dmem_we,
  output word_t   dmem_wdata,
  input  word_t   dmem_rdata,
  // observation
  input  regnum_t dbg_ra,
  output word_t   dbg_rd,
  output word_t   pc,
  output flags_t  flags,
  output logic    halted,
  output logic    retire,
  output logic    unimpl
);

  typedef enum logic [3:0] {
    S_FETCH, S_EXEC, S_LOADWB, S_CAL1, S_CAL2, S_CAL3, S_RET1, S_RET2, S_HALT
  } state_t;

  state_t state_q, state_d;
  word_t  pc_q, pc_d;
  word_t  ir_q, ir;
  word_t  pc_inc;

  // register file ports
  regnum_t ra1, ra2, wa;
  word_t   rd1, rd2, wd;
  logic    rf_we;

  // ALU
  alu_op_t    alu_op;
  word_t      alu_y, alu_res;
  logic [3:0] alu_flags, alu_fwe;
  logic       alu_wb;  // instruction writes the ALU result and its flags

  // flags
  logic       fl_mask_we;
  logic [4:0] fl_mask, fl_mask_val;

  // branch
  logic br_take;

  opcode_t  op;
  sysop_t   sysop;
  logic [4:0] mem_off;

  assign ir      = (state_q == S_EXEC) ? imem_rdata : ir_q;
  assign op      = opcode_t'(ir[15:12]);
  assign sysop   = sysop_t'(ir[11:8]);
  assign mem_off = ir[12:8];
  assign pc_inc  = pc_q + 16'd1;

  hera_regfile u_rf (
    .clk, .rst_n,
    .ra1, .rd1, .ra2, .rd2,
    .ra3(dbg_ra), .rd3(dbg_rd),
    .we(rf_we), .wa, .wd
  );

  hera_alu u_alu (
    .op(alu_op), .x(rd1), .y(alu_y), .flags_in(flags),
    .result(alu_res), .flags_out(alu_flags), .flag_we(alu_fwe)
  );

  hera_flags u_flags (
    .clk, .rst_n,
    .alu_we(alu_wb && state_q == S_EXEC ? alu_fwe : 4'b0000),
    .alu_val(alu_flags),
    .mask_we(fl_mask_we), .mask(fl_mask), .mask_val(fl_mask_val),
    .flags
  );

  hera_branch_cond u_br (
    .kind(brkind_t'(ir[11:10])), .x1(flagnum_t'(ir[9:8])), .x2(flagnum_t'(ir[7:6])),
    .flags, .take(br_take)
  );

  // Operand selection and ALU operation.
  always_comb begin
    ra1    = ir[11:8];
    ra2    = ir[3:0];
    alu_y  = rd2;
    alu_op = ALU_ADD;
    alu_wb = 1'b0;
    unique case (state_q)
      S_CAL1: ra1 = REG_FP;
      S_CAL2: ra1 = REG_SP;
      S_CAL3: ra1 = REG_SP;
      S_RET1: ra1 = REG_FP;
      S_RET2: ra1 = REG_OFP;
      default: begin
        unique case (op)
          OP_ADD, OP_SUB, OP_MULLO, OP_MULHI: begin
            ra1    = ir[7:4];
            ra2    = ir[3:0];
            alu_wb = 1'b1;
            unique case (op)
              OP_ADD:   alu_op = ALU_ADD;
              OP_SUB:   alu_op = ALU_SUB;
              OP_MULLO: alu_op = ALU_MULLO;
              default:  alu_op = ALU_MULHI;
            endcase
          end
          OP_LOGIC: begin
            ra1    = ir[11:8];
            ra2    = ir[7:4];
            alu_wb = 1'b1;
            unique case (logicfn_t'(ir[3:0]))
              LG_AND:  alu_op = ALU_AND;
              LG_OR:   alu_op = ALU_OR;
              LG_NOT:  alu_op = ALU_NOT;
              LG_XOR:  alu_op = ALU_XOR;
              LG_NAND: alu_op = ALU_NAND;
              default: alu_wb = 1'b0;  // unused function code: no effect
            endcase
          end
          OP_SHIFT: begin
            ra1    = ir[11:8];
            alu_y  = {12'd0, ir[7:4]};
            alu_wb = 1'b1;
            unique case (shiftfn_t'(ir[1:0]))
              SH_INC:  alu_op = ALU_ADD;
              SH_DEC:  alu_op = ALU_SUB;
              SH_LSL:  alu_op = ALU_LSL;
              default: alu_op = ALU_LSR;
            endcase
          end
          OP_SETLO, OP_SETHI: begin
            ra1    = ir[11:8];
            alu_y  = {8'd0, ir[7:0]};
            alu_wb = 1'b1;
            alu_op = (op == OP_SETLO) ? ALU_SETLO : ALU_SETHI;
          end
          OP_LOAD0, OP_LOAD1, OP_STORE0, OP_STORE1: begin
            ra1 = ir[7:4];
            ra2 = ir[3:0];
          end
          OP_BRANCH: ra1 = ir[3:0];
          OP_CAL: begin
            ra1 = ir[3:0];
            ra2 = REG_SP;
          end
          OP_SYS: begin
            ra1 = (sysop == SYS_RETURN) ? REG_FP : ir[3:0];
          end
          default: ;
        endcase
      end
    endcase
  end

  // Sequencing, register and flag writes, memory requests.
  always_comb begin
    state_d     = state_q;
    pc_d        = pc_q;
    rf_we       = 1'b0;
    wa          = ir[11:8];
    wd          = alu_res;
    fl_mask_we  = 1'b0;
    fl_mask     = '0;
    fl_mask_val = '0;
    dmem_addr   = rd1 + {11'd0, mem_off};
    dmem_we     = 1'b0;
    dmem_wdata  = rd2;
    retire      = 1'b0;
    unimpl      = 1'b0;
    unique case (state_q)
      S_FETCH: state_d = S_EXEC;
      S_EXEC: begin
        retire = 1'b1;
        pc_d   = pc_inc;
        if (alu_wb) rf_we = 1'b1;
        unique case (op)
          OP_LOAD0, OP_LOAD1: begin
            retire  = 1'b0;
            pc_d    = pc_q;
            state_d = S_LOADWB;
          end
          OP_STORE0, OP_STORE1: dmem_we = 1'b1;
          OP_BRANCH: if (br_take) pc_d = rd1;
          OP_SETF: begin
            fl_mask_we  = 1'b1;
            fl_mask     = ir[11:7];
            fl_mask_val = ir[6:2];
          end
          OP_CAL: begin
            retire     = 1'b0;
            dmem_addr  = rd2;
            dmem_we    = 1'b1;
            dmem_wdata = pc_inc;
            pc_d       = rd1;
            state_d    = S_CAL1;
          end
          OP_SYS: begin
            unique case (sysop)
              SYS_HALT: begin
                pc_d    = pc_q;
                state_d = S_HALT;
              end
              SYS_RETURN: begin
                retire    = 1'b0;
                pc_d      = pc_q;
                dmem_addr = rd1;
                state_d   = S_RET1;
              end
              SYS_SAVEF: begin
                rf_we = 1'b1;
                wa    = ir[3:0];
                wd    = {11'd0, flags};
              end
              SYS_RSTRF: begin
                fl_mask_we  = 1'b1;
                fl_mask     = 5'h1f;
                fl_mask_val = rd1[4:0];
              end
              SYS_SWI, SYS_RTI: unimpl = 1'b1;
              default: ;
            endcase
          end
          default: ;
        endcase
      end
      S_LOADWB: begin
        rf_we   = 1'b1;
        wa      = ir[3:0];
        wd      = dmem_rdata;
        pc_d    = pc_inc;
        retire  = 1'b1;
        state_d = S_EXEC;
      end
      S_CAL1: begin
        rf_we   = 1'b1;
        wa      = REG_OFP;
        wd      = rd1;
        state_d = S_CAL2;
      end
      S_CAL2: begin
        rf_we   = 1'b1;
        wa      = REG_FP;
        wd      = rd1;
        state_d = S_CAL3;
      end
      S_CAL3: begin
        rf_we   = 1'b1;
        wa      = REG_SP;
        wd      = rd1 + {8'd0, ir[11:4]};
        retire  = 1'b1;
        state_d = S_EXEC;
      end
      S_RET1: begin
        rf_we   = 1'b1;
        wa      = REG_SP;
        wd      = rd1;
        pc_d    = dmem_rdata;
        state_d = S_RET2;
      end
      S_RET2: begin
        rf_we   = 1'b1;
        wa      = REG_FP;
        wd      = rd1;
        retire  = 1'b1;
        state_d = S_EXEC;
      end
      S_HALT: ;
      default: state_d = S_FETCH;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_FETCH;
      pc_q    <= '0;
      ir_q    <= '0;
    end else begin
      state_q <= state_d;
      pc_q    <= pc_d;
      if (state_q == S_EXEC) ir_q <= imem_rdata;
    end
  end

  assign imem_addr = pc_d;
  assign pc        = pc_q;
  assign halted    = (state_q == S_HALT);

  // The sequencer never leaves its defined states, and data memory is written
  // only in the execute cycle (STORE, and the return address of CAL).
  a_state_legal: assert property (@(posedge clk) disable iff (!rst_n)
    state_q inside {S_FETCH, S_EXEC, S_LOADWB, S_CAL1, S_CAL2, S_CAL3, S_RET1, S_RET2, S_HALT});
  a_store_only_in_exec: assert property (@(posedge clk) disable iff (!rst_n)
    dmem_we |-> state_q == S_EXEC);

endmodule
