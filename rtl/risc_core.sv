// risc_core: multi-cycle control unit and datapath of the 16-bit RISC CPU.
//
// Each instruction is fetched from the unified memory (FETCH), latched
// (DECODE) and executed (EXEC); loads take one extra cycle to write back
// (LOAD), divides wait for the sequential divider (DIV), MLX writes its high
// word in a second cycle (MLX2), and the multi-register PSH/POP step through
// their register mask one word per cycle (MPUSH, MPOP_RD/MPOP_WB). So a
// register instruction takes 3 cycles, a load 4, a divide 20, a multi-push
// 3 + one per register and a multi-pop 3 + two per register.
//
// Architectural state: R0-R7 (risc_regfile), PC, SP, LR and the N/Z/C/V
// flags. The behaviour follows the instruction set:
//  - only ALU operations change the flags; MOV, LDR, STR and ADD/SUB SP do
//    not, MVN does;
//  - JMS (address or register form) saves the return address in LR, RET
//    copies LR to PC;
//  - the stack is full-descending: PSH decrements SP then stores, POP loads
//    then increments. Multi-register PSH pushes R0 first and LR last (so R0
//    ends at the highest address); multi-register POP pops PC first, then R7
//    down to R0, undoing it;
//  - ADD/SUB SP,#imm and PSH/POP stop the processor with an error when SP
//    would leave the memory range; MOV SP,Rs and n(SP)/n(Rn) addresses wrap
//    modulo the memory size.
// This design's own choices: SP resets to MEM_WORDS (empty stack) and may
// hold 0..MEM_WORDS; PC and all registers reset to 0; MOV Rd,PC reads the
// address of the next instruction; a divide by zero and a spare encoding
// also stop with an error; error and halted are only left by reset.
//
// Memory port: one synchronous port, read data valid the cycle after the
// address. I/O port: io_rd / io_wr are one-cycle strobes with io_addr the
// 4-bit device number; io_rdata is sampled in the io_rd cycle.
module risc_core
  import risc_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 512,
  parameter int unsigned AW        = $clog2(MEM_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // memory
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output word_t         mem_wdata,
  input  word_t         mem_rdata,
  // I/O devices
  output logic [3:0]    io_addr,
  output word_t         io_wdata,
  output logic          io_wr,
  output logic          io_rd,
  input  word_t         io_rdata,
  // status
  output logic          halted,
  output logic          error,
  output logic          div_busy,   // divider running (core stalled)
  output logic [AW-1:0] pc,
  output logic [AW:0]   sp,
  output flags_t        flags
);

  state_e        state_q;
  word_t         ir_q;
  dec_t          dec;
  logic [AW-1:0] pc_q;
  logic [AW:0]   sp_q;
  word_t         lr_q;
  flags_t        flags_q;
  word_t         hi_q;
  logic [8:0]    mask_q;
  logic [3:0]    pop_tgt_q;      // 0..7: register, 8: PC

  // register file
  logic [2:0] ra1, ra2, wa;
  word_t      rd1, rd2, wd;
  logic       we;

  // ALU / divider / conditions
  word_t   alu_b, alu_y, alu_hi;
  flags_t  alu_f;
  logic    div_start, div_done, div_zero;
  word_t   div_y;
  logic    br_taken, br_call;

  risc_decoder u_dec (.ir(ir_q), .dec(dec));

  risc_regfile u_rf (
    .clk, .rst_n, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd
  );

  risc_alu u_alu (
    .op(dec.alu), .a(rd1), .b(alu_b), .flags_in(flags_q),
    .y(alu_y), .hi(alu_hi), .flags_out(alu_f)
  );

  risc_divider u_div (
    .clk, .rst_n, .start(div_start), .op(dec.alu), .a(rd1), .b(alu_b),
    .busy(div_busy), .done(div_done), .div_zero, .y(div_y)
  );

  risc_cond u_cond (.cond(dec.cond), .f(flags_q), .taken(br_taken), .is_call(br_call));

  // --- helpers ----------------------------------------------------------
  logic [AW:0]  sp_dec;            // SP - 1
  logic [17:0]  sp_imm_sum;        // SP +/- imm, signed
  logic [AW-1:0] off_addr;         // Rn + offset, wrapped
  logic [AW-1:0] sp_off_addr;      // SP + offset, wrapped
  logic [3:0]   push_idx, pop_idx; // next register of a multi push/pop
  logic         stores_rd;         // instruction reads its rd field as a source

  assign sp_dec      = sp_q - 1'b1;
  assign sp_imm_sum  = (dec.alu == ALU_SUB) ? 18'(sp_q) - 18'(dec.imm) : 18'(sp_q) + 18'(dec.imm);
  assign off_addr    = AW'(rd1 + dec.imm);
  assign sp_off_addr = AW'(18'(sp_q) + 18'(dec.imm));

  // lowest set bit of the push mask (R0..R7, then LR), highest of the pop
  // mask (PC, then R7..R0)
  always_comb begin
    push_idx = 4'd8;
    for (int i = 8; i >= 0; i--) if (mask_q[i]) push_idx = 4'(i);
    pop_idx = 4'd0;
    for (int i = 0; i <= 8; i++) if (mask_q[i]) pop_idx = 4'(i);
  end

  assign stores_rd = dec.op inside {OP_STR_OFF, OP_STR_SP, OP_STR_DIR, OP_OUT, OP_PSH,
                                    OP_MOV_TO_SP, OP_BRA_REG, OP_JMS_REG};

  // --- combinational control ---------------------------------------------
  always_comb begin
    ra1       = dec.rs;
    ra2       = stores_rd ? dec.rd : dec.rb;
    if (state_q == S_MPUSH) ra2 = push_idx[2:0];
    alu_b     = dec.b_imm ? dec.imm : (state_q == S_LOAD ? mem_rdata : rd2);
    div_start = (state_q == S_EXEC) && dec.is_div &&
                (dec.op == OP_ALU_IMM || dec.op == OP_ALU_RR);

    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = pc_q;
    mem_wdata = rd2;
    io_addr   = dec.b_imm ? dec.imm[3:0] : rd1[3:0];
    io_wdata  = rd2;
    io_wr     = 1'b0;
    io_rd     = 1'b0;

    unique case (state_q)
      S_FETCH: mem_en = 1'b1;
      S_EXEC: begin
        unique case (dec.op)
          OP_STR_OFF: begin mem_en = 1'b1; mem_we = 1'b1; mem_addr = off_addr; end
          OP_LDR_OFF: begin mem_en = 1'b1; mem_addr = off_addr; end
          OP_STR_SP:  begin mem_en = 1'b1; mem_we = 1'b1; mem_addr = sp_off_addr; end
          OP_LDR_SP:  begin mem_en = 1'b1; mem_addr = sp_off_addr; end
          OP_STR_DIR: begin mem_en = 1'b1; mem_we = 1'b1; mem_addr = dec.addr; end
          OP_LDR_DIR,
          OP_ALU_DIR: begin mem_en = 1'b1; mem_addr = dec.addr; end
          OP_PSH: begin
            mem_en   = (sp_q != '0);
            mem_we   = (sp_q != '0);
            mem_addr = AW'(sp_dec);
          end
          OP_POP: begin
            mem_en   = (sp_q < (AW+1)'(MEM_WORDS));
            mem_addr = AW'(sp_q);
          end
          OP_INP: io_rd = 1'b1;
          OP_OUT: io_wr = 1'b1;
          default: ;
        endcase
      end
      S_MPUSH: begin
        mem_en    = (sp_q != '0);
        mem_we    = (sp_q != '0);
        mem_addr  = AW'(sp_dec);
        mem_wdata = (push_idx == 4'd8) ? lr_q : rd2;
      end
      S_MPOP_RD: begin
        mem_en   = (sp_q < (AW+1)'(MEM_WORDS));
        mem_addr = AW'(sp_q);
      end
      default: ;
    endcase

    // register write port
    we = 1'b0;
    wa = dec.rd;
    wd = alu_y;
    unique case (state_q)
      S_EXEC: begin
        unique case (dec.op)
          OP_ALU_IMM, OP_ALU_RR: we = !dec.no_write && !dec.is_div;
          OP_SHIFT_IMM, OP_ALU_RRR, OP_MLX: we = 1'b1;
          OP_MOV_IMM: begin we = 1'b1; wd = dec.imm; end
          OP_MOV_RR:  begin we = 1'b1; wd = rd2; end
          OP_INP:     begin we = 1'b1; wd = io_rdata; end
          OP_MOV_FROM_SP: begin
            we = 1'b1;
            unique case (spr_e'(dec.spr))
              SPR_FLAGS: wd = {12'b0, flags_q};
              SPR_SP:    wd = 16'(sp_q);
              SPR_LR:    wd = lr_q;
              default:   wd = 16'(pc_q);
            endcase
          end
          default: ;
        endcase
      end
      S_LOAD: begin
        we = 1'b1;
        wd = (dec.op == OP_ALU_DIR) ? alu_y : mem_rdata;
      end
      S_DIV: begin
        we = div_done && !div_zero;
        wd = div_y;
      end
      S_MLX2: begin
        we = 1'b1;
        wa = dec.rb;
        wd = hi_q;
      end
      S_MPOP_WB: begin
        we = (pop_tgt_q != 4'd8);
        wa = pop_tgt_q[2:0];
        wd = mem_rdata;
      end
      default: ;
    endcase
  end

  // --- sequential control ------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_FETCH;
      ir_q      <= '0;
      pc_q      <= '0;
      sp_q      <= (AW+1)'(MEM_WORDS);
      lr_q      <= '0;
      flags_q   <= '0;
      hi_q      <= '0;
      mask_q    <= '0;
      pop_tgt_q <= '0;
    end else begin
      unique case (state_q)
        S_FETCH: begin
          pc_q    <= pc_q + 1'b1;
          state_q <= S_DECODE;
        end
        S_DECODE: begin
          ir_q    <= mem_rdata;
          state_q <= S_EXEC;
        end
        S_EXEC: begin
          state_q <= S_FETCH;
          unique case (dec.op)
            OP_HLT: state_q <= S_HALT;
            OP_UNDEF: state_q <= S_ERROR;
            OP_ALU_IMM, OP_ALU_RR: begin
              if (dec.is_div) state_q <= S_DIV;
              else flags_q <= alu_f;
            end
            OP_SHIFT_IMM, OP_ALU_RRR: flags_q <= alu_f;
            OP_MLX: begin
              flags_q <= alu_f;
              hi_q    <= alu_hi;
              state_q <= S_MLX2;
            end
            OP_SP_IMM: begin
              if (sp_imm_sum[17] || sp_imm_sum > 18'(MEM_WORDS)) state_q <= S_ERROR;
              else sp_q <= (AW+1)'(sp_imm_sum);
            end
            OP_BRANCH: begin
              if (br_taken) pc_q <= dec.addr;
              if (br_call)  lr_q <= 16'(pc_q);
            end
            OP_LDR_OFF, OP_LDR_SP, OP_LDR_DIR, OP_ALU_DIR: state_q <= S_LOAD;
            OP_MOV_TO_SP: begin
              unique case (spr_e'(dec.spr))
                SPR_FLAGS: flags_q <= rd2[3:0];
                SPR_SP:    sp_q    <= {1'b0, rd2[AW-1:0]};
                SPR_LR:    lr_q    <= rd2;
                default:   pc_q    <= rd2[AW-1:0];
              endcase
            end
            OP_PSH: begin
              if (sp_q == '0) state_q <= S_ERROR;
              else sp_q <= sp_dec;
            end
            OP_POP: begin
              if (sp_q >= (AW+1)'(MEM_WORDS)) state_q <= S_ERROR;
              else begin
                sp_q    <= sp_q + 1'b1;
                state_q <= S_LOAD;
              end
            end
            OP_BRA_REG: pc_q <= rd2[AW-1:0];
            OP_JMS_REG: begin
              lr_q <= 16'(pc_q);
              pc_q <= rd2[AW-1:0];
            end
            OP_RET: pc_q <= lr_q[AW-1:0];
            OP_PSH_MULTI: begin
              mask_q <= dec.mask;
              if (dec.mask != '0) state_q <= S_MPUSH;
            end
            OP_POP_MULTI: begin
              mask_q <= dec.mask;
              if (dec.mask != '0) state_q <= S_MPOP_RD;
            end
            default: ;  // MOV, stores, I/O: done in this cycle
          endcase
        end
        S_LOAD: begin
          if (dec.op == OP_ALU_DIR) flags_q <= alu_f;
          state_q <= S_FETCH;
        end
        S_DIV: begin
          if (div_done) begin
            if (div_zero) state_q <= S_ERROR;
            else begin
              flags_q <= '{n: div_y[15], z: (div_y == '0), c: 1'b0, v: 1'b0};
              state_q <= S_FETCH;
            end
          end
        end
        S_MLX2: state_q <= S_FETCH;
        S_MPUSH: begin
          if (sp_q == '0) state_q <= S_ERROR;
          else begin
            sp_q <= sp_dec;
            mask_q[push_idx] <= 1'b0;
            if ((mask_q & ~(9'b1 << push_idx)) == '0) state_q <= S_FETCH;
          end
        end
        S_MPOP_RD: begin
          if (sp_q >= (AW+1)'(MEM_WORDS)) state_q <= S_ERROR;
          else begin
            sp_q      <= sp_q + 1'b1;
            pop_tgt_q <= pop_idx;
            mask_q[pop_idx] <= 1'b0;
            state_q   <= S_MPOP_WB;
          end
        end
        S_MPOP_WB: begin
          if (pop_tgt_q == 4'd8) pc_q <= mem_rdata[AW-1:0];
          state_q <= (mask_q == '0) ? S_FETCH : S_MPOP_RD;
        end
        default: ;  // S_HALT, S_ERROR: stay until reset
      endcase
    end
  end

  assign halted = (state_q == S_HALT);
  assign error  = (state_q == S_ERROR);
  assign pc     = pc_q;
  assign sp     = sp_q;
  assign flags  = flags_q;

  // SP never leaves 0..MEM_WORDS; the memory is never written during fetch.
  a_sp_range: assert property (@(posedge clk) disable iff (!rst_n) sp_q <= (AW+1)'(MEM_WORDS));
  a_no_fetch_write: assert property (@(posedge clk) disable iff (!rst_n)
                                     state_q == S_FETCH |-> !mem_we);

endmodule
