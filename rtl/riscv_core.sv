// riscv_core: five-stage pipelined RV32IM processor (IF, ID, EX, MEM, WB).
//
// IF  : PC register (reset to 0) addresses the instruction memory.
// ID  : control unit, register file read, immediate generator and the
//       load-use hazard unit.
// EX  : stage-3 forwarding muxes (FA/FB), PCToALU/ALUsrc muxes, ALU with its
//       controller, branch circuit (also the SLT/SLTU result), branch/JAL
//       target adder and the iterative MUL/DIV unit.
// MEM : branch decision, data bus access with the stage-4 store-data
//       forwarding (FDATA), load byte/half/word extraction.
// WB  : register file write.
//
// Control hazards: branches are predicted not taken and resolved in MEM; a
// taken branch or any jump redirects the PC and flushes IF/ID, ID/EX and
// EX/MEM (three instructions). Data hazards: forwarding from MEM and WB, plus
// a one-cycle stall for a load followed by a dependent instruction. An M
// instruction holds PC, IF/ID and ID/EX for 34 cycles while EX/MEM receives
// bubbles. Flush has priority over both kinds of stall.
//
// Data bus: dbus_addr/dbus_wdata/dbus_we (MemWrite)/dbus_re (load strobe)/
// dbus_whb (load size), dbus_rdata returns the four bytes starting at
// dbus_addr in the same cycle (combinational read). The pipeline structure,
// flush and stall rules follow the document; letting MEM/WB drain during a
// MUL/DIV is this design's choice.
module riscv_core
  import riscv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_data,
  output logic [31:0] dbus_addr,
  output logic [31:0] dbus_wdata,
  output logic [1:0]  dbus_we,
  output logic        dbus_re,
  output logic [1:0]  dbus_whb,
  input  logic [31:0] dbus_rdata,
  output logic [31:0] pc_out,
  output logic        wb_valid,
  output logic        stall,
  output logic        flush,
  output logic        muldiv_enable,
  output logic        muldiv_ready
);
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
  } ifid_t;

  typedef struct packed {
    logic        valid;
    ctrl_t       ctrl;
    logic [31:0] pc;
    logic [31:0] rs1v;
    logic [31:0] rs2v;
    logic [31:0] imm;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [4:0]  rd;
    logic [3:0]  alu_in;   // {instr[30], funct3}
  } idex_t;

  typedef struct packed {
    logic        valid;
    ctrl_t       ctrl;
    logic [31:0] pc;
    logic [31:0] result;
    logic [31:0] sdata;
    logic [31:0] imm;
    logic [31:0] target;
    logic        cond;
    logic [4:0]  rs2;
    logic [4:0]  rd;
  } exmem_t;

  typedef struct packed {
    logic        valid;
    logic        regwrite;
    logic [31:0] pc;
    logic [31:0] wdata;
    logic [4:0]  rd;
  } memwb_t;

  logic [31:0] pc_q;
  ifid_t  ifid;
  idex_t  idex;
  exmem_t exmem;
  memwb_t memwb;

  logic stall_ld, stall_md, taken;
  logic [31:0] target_mem;

  // ---------------- IF ----------------
  assign imem_addr = pc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     pc_q <= '0;
    else if (taken)                 pc_q <= target_mem;
    else if (!(stall_ld || stall_md)) pc_q <= pc_q + 32'd4;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       ifid <= '0;
    else if (taken)                   ifid <= '0;
    else if (!(stall_ld || stall_md)) ifid <= '{valid: 1'b1, pc: pc_q, instr: imem_data};
  end

  // ---------------- ID ----------------
  ctrl_t       id_ctrl;
  logic [31:0] id_rs1v, id_rs2v, id_imm;

  control_unit u_cu (.instr(ifid.instr), .ctrl(id_ctrl));
  imm_gen      u_ig (.instr(ifid.instr), .imm(id_imm));
  regfile #(.XLEN(32), .NREG(32)) u_rf (
    .clk, .rst_n,
    .raddr1(ifid.instr[19:15]), .raddr2(ifid.instr[24:20]),
    .rdata1(id_rs1v), .rdata2(id_rs2v),
    .we(memwb.regwrite), .waddr(memwb.rd), .wdata(memwb.wdata)
  );
  hazard_unit u_hz (
    .id_rs1(ifid.instr[19:15]), .id_rs2(ifid.instr[24:20]),
    .id_rs1f(id_ctrl.rs1f), .id_rs2f(id_ctrl.rs2f),
    .id_store(id_ctrl.memwrite != SZ_NONE),
    .ex_load(idex.ctrl.whb != SZ_NONE), .ex_rd(idex.rd),
    .flush(taken), .stall(stall_ld)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  idex <= '0;
    else if (taken)              idex <= '0;
    else if (stall_md)           idex <= idex;
    else if (stall_ld)           idex <= '0;
    else idex <= '{valid: ifid.valid, ctrl: id_ctrl, pc: ifid.pc,
                   rs1v: id_rs1v, rs2v: id_rs2v, imm: id_imm,
                   rs1: ifid.instr[19:15], rs2: ifid.instr[24:20], rd: ifid.instr[11:7],
                   alu_in: {ifid.instr[30], ifid.instr[14:12]}};
  end

  // ---------------- EX ----------------
  logic [1:0]  fa, fb;
  logic [31:0] fwd_mem_alu, fwd_mem_other, in_a, in_b, alu_a, alu_b, alu_y, ex_result;
  logic        z, c, s, v, cond;
  alu_sel_e    alu_sel;
  logic        md_ready;
  logic [31:0] md_result;

  forward_unit_ex u_fx (
    .ex_rs1(idex.rs1), .ex_rs2(idex.rs2),
    .mem_rd(exmem.rd), .mem_regwrite(exmem.ctrl.regwrite), .mem_toreg(exmem.ctrl.toreg),
    .wb_rd(memwb.rd), .wb_regwrite(memwb.regwrite),
    .fa, .fb
  );

  assign fwd_mem_alu   = exmem.result;
  assign fwd_mem_other = (exmem.ctrl.toreg == TOREG_PC4) ? exmem.pc + 32'd4 : exmem.imm;

  always_comb begin
    unique case (fa)
      2'b01:   in_a = fwd_mem_alu;
      2'b10:   in_a = memwb.wdata;
      2'b11:   in_a = fwd_mem_other;
      default: in_a = idex.rs1v;
    endcase
    unique case (fb)
      2'b01:   in_b = fwd_mem_alu;
      2'b10:   in_b = memwb.wdata;
      2'b11:   in_b = fwd_mem_other;
      default: in_b = idex.rs2v;
    endcase
  end

  assign alu_a = idex.ctrl.pctoalu ? idex.pc  : in_a;
  assign alu_b = idex.ctrl.alusrc  ? idex.imm : in_b;

  alu_control    u_ac (.aluop(idex.ctrl.aluop), .ctrl_in(idex.alu_in), .sel(alu_sel));
  alu            u_alu (.a(alu_a), .b(alu_b), .sel(alu_sel), .y(alu_y),
                        .zero(z), .carry(c), .sign(s), .overflow(v));
  branch_circuit u_bc (.funct3(idex.alu_in[2:0]), .zero(z), .carry(c), .sign(s),
                       .overflow(v), .cond);
  muldiv_unit    u_md (.clk, .rst_n, .valid(idex.ctrl.muldiv), .flush(taken),
                       .funct3(idex.alu_in[2:0]), .rs1(in_a), .rs2(in_b),
                       .stall(stall_md), .ready(md_ready), .result(md_result));

  always_comb begin
    if (idex.ctrl.muldiv)  ex_result = md_result;
    else if (idex.ctrl.cx) ex_result = {31'b0, cond};
    else                   ex_result = alu_y;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 exmem <= '0;
    else if (taken || stall_md) exmem <= '0;
    else exmem <= '{valid: idex.valid, ctrl: idex.ctrl, pc: idex.pc, result: ex_result,
                    sdata: in_b, imm: idex.imm,
                    target: idex.ctrl.jmp_i ? {alu_y[31:1], 1'b0} : idex.pc + idex.imm,
                    cond: cond, rs2: idex.rs2, rd: idex.rd};
  end

  // ---------------- MEM ----------------
  logic        fdata;
  logic [31:0] ld_val, mem_wb_val;

  assign taken      = (exmem.ctrl.branch & exmem.cond) | exmem.ctrl.uncond | exmem.ctrl.jmp_i;
  assign target_mem = exmem.target;

  forward_unit_mem u_fm (.mem_rs2(exmem.rs2), .mem_store(exmem.ctrl.memwrite != SZ_NONE),
                         .wb_rd(memwb.rd), .wb_regwrite(memwb.regwrite), .fdata);

  assign dbus_addr  = exmem.result;
  assign dbus_wdata = fdata ? memwb.wdata : exmem.sdata;
  assign dbus_we    = exmem.ctrl.memwrite;
  assign dbus_re    = (exmem.ctrl.whb != SZ_NONE);
  assign dbus_whb   = exmem.ctrl.whb;

  load_ext u_le (.din(dbus_rdata), .whb(exmem.ctrl.whb), .ld_sxt(exmem.ctrl.ld_sxt), .dout(ld_val));

  always_comb begin
    unique case (exmem.ctrl.toreg)
      TOREG_PC4: mem_wb_val = exmem.pc + 32'd4;
      TOREG_MEM: mem_wb_val = ld_val;
      TOREG_ALU: mem_wb_val = exmem.result;
      default:   mem_wb_val = exmem.imm;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) memwb <= '0;
    else memwb <= '{valid: exmem.valid, regwrite: exmem.ctrl.regwrite, pc: exmem.pc,
                    wdata: mem_wb_val, rd: exmem.rd};
  end

  // ---------------- WB / observation ----------------
  assign pc_out        = memwb.pc;
  assign wb_valid      = memwb.valid;
  assign stall         = stall_ld;
  assign flush         = taken;
  assign muldiv_enable = stall_md;
  assign muldiv_ready  = md_ready;
endmodule
