// siwa_core: Siwa main control unit, a multicycle RV32I processor.
// One instruction at a time passes through FETCH, DECODE, EXEC and, for
// loads and stores, MEM:
//   FETCH  : request the word at pc, wait for mem_ready (>= 2 cycles on SRAM)
//   DECODE : latch the instruction fields and read rs1/rs2 from the
//            latch-based register file
//   EXEC   : ALU, branch/jump target, CSR access, custom clock-gating
//            instructions; ALU results are written back from here
//   MEM    : data access, wait for mem_ready; loads write back from here
// So register/immediate ALU ops, jumps and branches take 4 cycles from SRAM
// and loads/stores 6, giving the average CPI of about 4 of the original.
// Interrupts are checked between instructions: if mstatus.MIE and mie.MEIE
// are set and irq is high, mepc takes the next pc, mcause = 0x8000000B and
// execution continues at mtvec; MRET returns. ECALL/EBREAK (cause 11/3) and
// illegal instructions (cause 2) trap the same way. WFI waits in EXEC until
// irq rises. Misaligned accesses are not detected (low address bits are
// dropped by the bus).
// Memory port: mem_req stays high with stable addr/we/be/wdata until a
// one-cycle mem_ready, which also carries read data.
// CSR port: custom CSRs that are not inside the core (GPIO, HV stimulator,
// interrupt handler) are reached through csr_addr/csr_we/csr_wdata, with
// read data on csr_rdata in the same cycle; csr_re marks a read so that the
// peripherals can see accesses with side effects.
// The timer sits inside the core, as in the original block diagram; its
// tick goes out on timer_tick to the interrupt handler. cg_en holds the
// clock enables of the gatable blocks (all on after reset), changed with
// CG.ON / CG.OFF. The stage split, CSR numbers and trap details are this
// design's choices; the original only states a multicycle RV32I core with
// a latch register file, timer, custom CSRs and clock-gating instructions.
module siwa_core
  import siwa_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic            clk,
  input  logic            rst_n,
  // memory / bus
  output logic            mem_req,
  output logic            mem_we,
  output logic [3:0]      mem_be,
  output logic [31:0]     mem_addr,
  output logic [31:0]     mem_wdata,
  input  logic [31:0]     mem_rdata,
  input  logic            mem_ready,
  // external CSRs
  output logic            csr_we,
  output logic            csr_re,
  output logic [11:0]     csr_addr,
  output logic [31:0]     csr_wdata,
  input  logic [31:0]     csr_rdata,
  // interrupts, timer, clock gating
  input  logic            irq,
  output logic            timer_tick,
  output logic [NCG-1:0]  cg_en,
  // status
  output logic            instr_done    // one pulse per retired instruction
);
  typedef enum logic [1:0] { S_FETCH, S_DECODE, S_EXEC, S_MEM } state_e;
  state_e state;

  logic [31:0] pc, ir, op_a, op_b;
  dec_t        dec;
  logic [31:0] rf_r1, rf_r2;
  logic        wb_we;
  logic [4:0]  wb_addr;
  logic [31:0] wb_data;
  logic [31:0] addr_q;

  // CSRs
  logic        mstatus_mie, mstatus_mpie, mie_meie;
  logic [31:0] mtvec, mepc, mcause;
  logic [63:0] mcycle, minstret;
  logic        tmr_en;
  logic [31:0] tmr_cmp, tmr_cnt;

  siwa_decoder u_dec (.instr(ir), .dec(dec));

  siwa_regfile u_rf (
    .clk(clk), .we(wb_we), .waddr(wb_addr), .wdata(wb_data),
    .raddr1(ir[19:15]), .rdata1(rf_r1), .raddr2(ir[24:20]), .rdata2(rf_r2)
  );

  // ---------------- execute datapath ----------------
  logic [31:0] alu_a, alu_b, alu_y;
  always_comb begin
    unique case (dec.a_sel)
      ASEL_PC:   alu_a = pc;
      ASEL_ZERO: alu_a = '0;
      default:   alu_a = op_a;
    endcase
    alu_b = dec.b_imm ? dec.imm : op_b;
  end
  siwa_alu u_alu (.op(dec.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  logic [31:0] pc4, br_tgt, jmp_tgt;
  logic        br_taken;
  assign pc4     = pc + 32'd4;
  assign br_tgt  = pc + dec.imm;
  assign jmp_tgt = dec.jalr ? ((op_a + dec.imm) & ~32'd1) : br_tgt;
  always_comb begin
    unique case (dec.funct3)
      3'b000:  br_taken = (op_a == op_b);
      3'b001:  br_taken = (op_a != op_b);
      3'b100:  br_taken = ($signed(op_a) <  $signed(op_b));
      3'b101:  br_taken = ($signed(op_a) >= $signed(op_b));
      3'b110:  br_taken = (op_a <  op_b);
      3'b111:  br_taken = (op_a >= op_b);
      default: br_taken = 1'b0;
    endcase
  end

  // ---------------- timer ----------------
  logic tmr_cnt_we;
  siwa_timer u_timer (
    .clk(clk), .rst_n(rst_n), .en(tmr_en && cg_en[CG_TMR]), .cmp(tmr_cmp),
    .cnt_we(tmr_cnt_we), .cnt_wdata(csr_wdata), .count(tmr_cnt), .tick(timer_tick)
  );

  // ---------------- CSR read / write ----------------
  logic [11:0] csr_a;
  logic        csr_internal;
  logic [31:0] csr_old, csr_src, csr_new;
  logic        csr_write;
  assign csr_a = ir[31:20];
  always_comb begin
    csr_internal = 1'b1;
    unique case (csr_a)
      CSR_MSTATUS:  csr_old = {24'b0, mstatus_mpie, 3'b0, mstatus_mie, 3'b0};
      CSR_MIE:      csr_old = {20'b0, mie_meie, 11'b0};
      CSR_MTVEC:    csr_old = mtvec;
      CSR_MEPC:     csr_old = mepc;
      CSR_MCAUSE:   csr_old = mcause;
      CSR_MIP:      csr_old = {20'b0, irq, 11'b0};
      CSR_MCYCLE:   csr_old = mcycle[31:0];
      12'hB80:      csr_old = mcycle[63:32];
      CSR_MINSTRET: csr_old = minstret[31:0];
      12'hB82:      csr_old = minstret[63:32];
      CSR_CGATE:    csr_old = {{(32-NCG){1'b0}}, cg_en};
      CSR_TMR_CTRL: csr_old = {31'b0, tmr_en};
      CSR_TMR_CMP:  csr_old = tmr_cmp;
      CSR_TMR_CNT:  csr_old = tmr_cnt;
      default: begin
        csr_internal = 1'b0;
        csr_old      = csr_rdata;
      end
    endcase
    csr_src = dec.funct3[2] ? dec.imm : op_a;
    unique case (dec.funct3[1:0])
      2'b01:   csr_new = csr_src;
      2'b10:   csr_new = csr_old | csr_src;
      default: csr_new = csr_old & ~csr_src;
    endcase
    csr_write = (dec.funct3[1:0] == 2'b01) || (dec.rs1 != 5'd0);
  end

  logic in_csr;
  assign in_csr     = (state == S_EXEC) && dec.cls == CL_SYSTEM && dec.is_csr;
  assign csr_addr   = csr_a;
  assign csr_wdata  = csr_new;
  assign csr_we     = in_csr && csr_write && !csr_internal;
  assign csr_re     = in_csr && !csr_internal;
  assign tmr_cnt_we = in_csr && csr_write && csr_a == CSR_TMR_CNT;

  // ---------------- memory port ----------------
  logic [1:0]  boff;
  logic [31:0] ld_shift, ld_val;
  assign boff = addr_q[1:0];
  always_comb begin
    mem_req   = (state == S_FETCH) || (state == S_MEM);
    mem_we    = (state == S_MEM) && dec.cls == CL_STORE;
    mem_addr  = (state == S_FETCH) ? pc : {addr_q[31:2], 2'b00};
    mem_wdata = op_b << {boff, 3'b000};
    unique case (dec.funct3[1:0])
      2'b00:   mem_be = 4'b0001 << boff;
      2'b01:   mem_be = 4'b0011 << boff;
      default: mem_be = 4'b1111;
    endcase
    if (state == S_FETCH) mem_be = 4'b1111;
    ld_shift = mem_rdata >> {boff, 3'b000};
    unique case (dec.funct3)
      3'b000:  ld_val = {{24{ld_shift[7]}},  ld_shift[7:0]};
      3'b001:  ld_val = {{16{ld_shift[15]}}, ld_shift[15:0]};
      3'b100:  ld_val = {24'b0, ld_shift[7:0]};
      3'b101:  ld_val = {16'b0, ld_shift[15:0]};
      default: ld_val = mem_rdata;
    endcase
  end

  // ---------------- control ----------------
  logic take_irq;
  assign take_irq = irq && mstatus_mie && mie_meie;

  // Each branch of the state machine below sets do_next (continue at npc,
  // or enter the interrupt handler) or do_trap (synchronous trap); these
  // are per-cycle variables local to the process.
  always_ff @(posedge clk or negedge rst_n) begin : p_ctrl
    logic        do_next, do_trap;
    logic [31:0] npc, tcause;
    if (!rst_n) begin
      state        <= S_FETCH;
      pc           <= RESET_PC;
      ir           <= 32'h0000_0013;
      op_a         <= '0;
      op_b         <= '0;
      addr_q       <= '0;
      wb_we        <= 1'b0;
      wb_addr      <= '0;
      wb_data      <= '0;
      mstatus_mie  <= 1'b0;
      mstatus_mpie <= 1'b0;
      mie_meie     <= 1'b0;
      mtvec        <= '0;
      mepc         <= '0;
      mcause       <= '0;
      mcycle       <= '0;
      minstret     <= '0;
      tmr_en       <= 1'b0;
      tmr_cmp      <= '1;
      cg_en        <= '1;
      instr_done   <= 1'b0;
    end else begin
      do_next     = 1'b0;
      do_trap     = 1'b0;
      npc         = pc4;
      tcause      = '0;
      wb_we      <= 1'b0;
      instr_done <= 1'b0;
      mcycle     <= mcycle + 64'd1;
      unique case (state)
        S_FETCH: if (mem_ready) begin
          ir    <= mem_rdata;
          state <= S_DECODE;
        end
        S_DECODE: begin
          op_a  <= rf_r1;
          op_b  <= rf_r2;
          state <= S_EXEC;
        end
        S_EXEC: begin
          unique case (dec.cls)
            CL_ALU: begin
              wb_we   <= dec.rd_we && dec.rd != 5'd0;
              wb_addr <= dec.rd;
              wb_data <= alu_y;
              begin do_next = 1'b1; npc = pc4; end
            end
            CL_LOAD, CL_STORE: begin
              addr_q <= alu_y;
              state  <= S_MEM;
            end
            CL_BRANCH: begin do_next = 1'b1; npc = br_taken ? br_tgt : pc4; end
            CL_JUMP: begin
              wb_we   <= dec.rd != 5'd0;
              wb_addr <= dec.rd;
              wb_data <= pc4;
              begin do_next = 1'b1; npc = jmp_tgt; end
            end
            CL_CGATE: begin
              if (dec.cg_on) cg_en <= cg_en | dec.imm[NCG-1:0];
              else           cg_en <= cg_en & ~dec.imm[NCG-1:0];
              begin do_next = 1'b1; npc = pc4; end
            end
            CL_SYSTEM: begin
              if (dec.is_csr) begin
                wb_we   <= dec.rd != 5'd0;
                wb_addr <= dec.rd;
                wb_data <= csr_old;
                if (csr_write) begin
                  unique case (csr_a)
                    CSR_MSTATUS: begin
                      mstatus_mie  <= csr_new[3];
                      mstatus_mpie <= csr_new[7];
                    end
                    CSR_MIE:      mie_meie <= csr_new[11];
                    CSR_MTVEC:    mtvec    <= csr_new;
                    CSR_MEPC:     mepc     <= {csr_new[31:2], 2'b00};
                    CSR_MCAUSE:   mcause   <= csr_new;
                    CSR_TMR_CTRL: tmr_en   <= csr_new[0];
                    CSR_TMR_CMP:  tmr_cmp  <= csr_new;
                    default: ;
                  endcase
                end
                // an interrupt is only taken after the CSR write settles
                if (csr_write && (csr_a == CSR_MSTATUS || csr_a == CSR_MIE)) begin
                  instr_done <= 1'b1;
                  minstret   <= minstret + 64'd1;
                  pc         <= pc4;
                  state      <= S_FETCH;
                end else begin do_next = 1'b1; npc = pc4; end
              end else if (dec.is_mret) begin
                mstatus_mie  <= mstatus_mpie;
                mstatus_mpie <= 1'b1;
                instr_done   <= 1'b1;
                minstret     <= minstret + 64'd1;
                pc           <= mepc;
                state        <= S_FETCH;
              end else if (dec.is_wfi) begin
                if (irq) begin do_next = 1'b1; npc = pc4; end
              end else begin
                begin do_trap = 1'b1; tcause = ir[20] ? 32'd3 : 32'd11; end
              end
            end
            default: begin do_trap = 1'b1; tcause = 32'd2; end
          endcase
        end
        S_MEM: if (mem_ready) begin
          if (dec.cls == CL_LOAD) begin
            wb_we   <= dec.rd != 5'd0;
            wb_addr <= dec.rd;
            wb_data <= ld_val;
          end
          begin do_next = 1'b1; npc = pc4; end
        end
        default: state <= S_FETCH;
      endcase
      if (do_next) begin
        instr_done <= 1'b1;
        minstret   <= minstret + 64'd1;
        state      <= S_FETCH;
        if (take_irq) begin
          mepc         <= npc;
          mcause       <= 32'h8000_000B;
          mstatus_mpie <= mstatus_mie;
          mstatus_mie  <= 1'b0;
          pc           <= {mtvec[31:2], 2'b00};
        end else pc <= npc;
      end
      if (do_trap) begin
        mepc         <= pc;
        mcause       <= tcause;
        mstatus_mpie <= mstatus_mie;
        mstatus_mie  <= 1'b0;
        pc           <= {mtvec[31:2], 2'b00};
        state        <= S_FETCH;
      end
    end
  end
endmodule
