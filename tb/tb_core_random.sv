// tb_core_random: constrained-random instruction test of the core, the
// counterpart of a UVM random-instruction run. 10,000 instructions are
// drawn at random from RV32IM (register and immediate ALU operations,
// LUI/AUIPC, all M operations, byte/halfword/word loads and stores to a
// 248-byte window, forward branches of all six kinds and forward JAL), with
// destinations in x1..x15 so that dependences, forwarding and load-use
// stalls are frequent. A small instruction-set model in this testbench
// executes the same program and records every register write; each write
// the core makes is compared in order with that trace (a scoreboard), and
// when the core reaches the end marker all registers and the data window
// are compared with the model too.
module tb_core_random;
  localparam int N = 10000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] imem_addr, imem_data, dbus_addr, dbus_wdata, dbus_rdata, pc_out;
  logic [1:0] dbus_we, dbus_whb;
  logic dbus_re, wb_valid, stall, flush, muldiv_enable, muldiv_ready;
  logic [31:0] prog [N + 4];
  logic [7:0] dm [256];
  int checks = 0, failures = 0, retired = 0, nw = 0;
  logic [36:0] trace [$];   // {rd, value} of each register write in program order
  int trace_pc [$];         // address of the instruction that made it
  bit done = 0;

  riscv_core dut (.*);

  assign imem_data  = (imem_addr[31:2] < 30'(N + 4)) ? prog[14'(imem_addr[31:2])] : 32'h00000013;
  assign dbus_rdata = {dm[8'(dbus_addr + 3)], dm[8'(dbus_addr + 2)], dm[8'(dbus_addr + 1)], dm[8'(dbus_addr)]};
  always @(posedge clk) begin
    if (rst_n && dbus_we != 0) begin
      if (dbus_addr == 32'd252) done <= 1;
      dm[8'(dbus_addr)] <= dbus_wdata[7:0];
      if (dbus_we != 2'b01) dm[8'(dbus_addr + 1)] <= dbus_wdata[15:8];
      if (dbus_we == 2'b11) begin
        dm[8'(dbus_addr + 2)] <= dbus_wdata[23:16];
        dm[8'(dbus_addr + 3)] <= dbus_wdata[31:24];
      end
    end
    retired += int'(wb_valid);
    if (rst_n && dut.u_rf.we && dut.u_rf.waddr != 0 && !done) begin
      checks++;
      if (nw >= trace.size() || trace[nw] != {dut.u_rf.waddr, dut.u_rf.wdata}) begin
        failures++;
        if (failures < 4) $display("FAIL: write %0d x%0d = %h, model %h (instruction %h at %h)", nw, dut.u_rf.waddr,
                                   dut.u_rf.wdata, nw < trace.size() ? trace[nw] : 37'h0,
                                   nw < trace.size() ? prog[trace_pc[nw] / 4] : 0, nw < trace.size() ? trace_pc[nw] : 0);
      end
      nw++;
    end
  end

  // ---- random program generator ----
  function automatic logic [31:0] gen(input int i);
    int k = (i < N - 3) ? $urandom_range(0, 99) : $urandom_range(0, 83);  // no jump over the end
    logic [4:0] rd = 5'($urandom_range(1, 15)), rs1 = 5'($urandom_range(0, 15)), rs2 = 5'($urandom_range(0, 15));
    logic [2:0] f3 = 3'($urandom);
    logic [11:0] imm = 12'($urandom);
    if (k < 25) begin                               // OP
      logic [6:0] f7 = (f3 == 0 || f3 == 5) && ($urandom_range(0, 1) != 0) ? 7'h20 : 7'h00;
      return {f7, rs2, rs1, f3, rd, 7'b0110011};
    end else if (k < 45) begin                      // OP-IMM
      if (f3 == 1) imm = {7'h00, imm[4:0]};
      if (f3 == 5) imm = {($urandom_range(0, 1) != 0) ? 7'h20 : 7'h00, imm[4:0]};
      return {imm, rs1, f3, rd, 7'b0010011};
    end else if (k < 54) begin
      return {20'($urandom), rd, ($urandom_range(0, 1) != 0) ? 7'b0110111 : 7'b0010111};
    end else if (k < 64) begin                      // M
      return {7'h01, rs2, rs1, f3, rd, 7'b0110011};
    end else if (k < 72) begin                      // load
      logic [2:0] lf [5] = '{3'd0, 3'd1, 3'd2, 3'd4, 3'd5};
      f3 = lf[$urandom_range(0, 4)];
      return {12'($urandom_range(0, 244)), 5'd0, f3, rd, 7'b0000011};
    end else if (k < 84) begin                      // store
      imm = 12'($urandom_range(0, 244));
      f3 = 3'($urandom_range(0, 2));
      return {imm[11:5], rs2, 5'd0, f3, imm[4:0], 7'b0100011};
    end else if (k < 96) begin                      // forward branch, skip 0..2
      logic [12:0] off = 13'(4 * $urandom_range(1, 3));
      if (f3 == 2 || f3 == 3) f3 = 3'd0;
      return {off[12], off[10:5], rs2, rs1, f3, off[4:1], off[11], 7'b1100011};
    end else begin                                  // forward jal
      logic [20:0] off = 21'(4 * $urandom_range(1, 3));
      return {off[20], off[10:1], off[11], off[19:12], rd, 7'b1101111};
    end
  endfunction

  // ---- instruction-set model ----
  logic [31:0] x [32];
  logic [7:0] mm [256];

  function automatic logic [31:0] mulop(input logic [2:0] f, input logic [31:0] a, input logic [31:0] b);
    logic [63:0] ss = 64'($signed(a)) * 64'($signed(b));
    logic [63:0] su = 64'($signed(a)) * {32'b0, b};
    logic [63:0] uu = {32'b0, a} * {32'b0, b};
    case (f)
      0: return ss[31:0];
      1: return ss[63:32];
      2: return su[63:32];
      3: return uu[63:32];
      default: begin
        if (b == 0) return f[1] ? a : 32'hffffffff;
        if (a == 32'h80000000 && b == 32'hffffffff && !f[0]) return f[1] ? 0 : a;
        case (f)
          4: return 32'($signed(a) / $signed(b));
          5: return a / b;
          6: return 32'($signed(a) % $signed(b));
          default: return a % b;
        endcase
      end
    endcase
  endfunction

  function automatic logic [31:0] aluop(input logic [2:0] f, input logic alt, input logic [31:0] a, input logic [31:0] b);
    case (f)
      0: return alt ? a - b : a + b;
      1: return a << b[4:0];
      2: return 32'($signed(a) < $signed(b));
      3: return 32'(a < b);
      4: return a ^ b;
      5: return alt ? 32'($signed(a) >>> b[4:0]) : a >> b[4:0];
      6: return a | b;
      default: return a & b;
    endcase
  endfunction

  task automatic model_run;
    int pc = 0;
    foreach (x[i]) x[i] = 0;
    foreach (mm[i]) mm[i] = 0;
    while (pc < 4 * N) begin
      logic [31:0] in = prog[pc / 4];
      logic [4:0] rd = in[11:7], r1 = in[19:15], r2 = in[24:20];
      logic [2:0] f3 = in[14:12];
      logic [31:0] a = x[r1], b = x[r2], iimm = 32'($signed(in[31:20]));
      logic [31:0] simm = 32'($signed({in[31:25], in[11:7]}));
      logic [31:0] bimm = 32'($signed({in[31], in[7], in[30:25], in[11:8], 1'b0}));
      logic [31:0] jimm = 32'($signed({in[31], in[19:12], in[20], in[30:21], 1'b0}));
      logic [31:0] res = 0, ad;
      bit wr = 0, tk;
      int npc = pc + 4;
      case (in[6:0])
        7'b0110011: begin wr = 1; res = in[25] ? mulop(f3, a, b) : aluop(f3, in[30], a, b); end
        7'b0010011: begin wr = 1; res = aluop(f3, f3 == 5 && in[30], a, iimm); end
        7'b0110111: begin wr = 1; res = {in[31:12], 12'b0}; end
        7'b0010111: begin wr = 1; res = 32'(pc) + {in[31:12], 12'b0}; end
        7'b0000011: begin
          wr = 1; ad = a + iimm;
          res = {mm[8'(ad + 3)], mm[8'(ad + 2)], mm[8'(ad + 1)], mm[8'(ad)]};
          case (f3)
            0: res = 32'($signed(res[7:0]));
            1: res = 32'($signed(res[15:0]));
            4: res = {24'b0, res[7:0]};
            5: res = {16'b0, res[15:0]};
            default: ;
          endcase
        end
        7'b0100011: begin
          ad = a + simm;
          for (int k = 0; k < (1 << f3); k++) mm[8'(ad + k)] = b[8*k +: 8];
        end
        7'b1100011: begin
          case (f3)
            0: tk = a == b;
            1: tk = a != b;
            4: tk = $signed(a) < $signed(b);
            5: tk = $signed(a) >= $signed(b);
            6: tk = a < b;
            default: tk = a >= b;
          endcase
          if (tk) npc = pc + int'($signed(bimm));
        end
        7'b1101111: begin wr = 1; res = 32'(pc + 4); npc = pc + int'($signed(jimm)); end
        default: ;
      endcase
      if (wr && rd != 0) begin x[rd] = res; trace.push_back({rd, res}); trace_pc.push_back(pc); end
      pc = npc;
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, pc=%h", pc_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (dm[i]) dm[i] = 0;
    for (int i = 0; i < N; i++) prog[i] = gen(i);
    prog[N]     = {7'd7, 5'd1, 5'd0, 3'd2, 5'd28, 7'b0100011};  // sw x1, 252(x0): end marker
    prog[N + 1] = 32'h00000063;                                 // beq x0, x0, 0
    prog[N + 2] = 32'h00000013;
    prog[N + 3] = 32'h00000013;
    model_run();
    repeat (3) @(negedge clk); rst_n = 1;
    while (!done) @(negedge clk);
    repeat (5) @(negedge clk);
    for (int r = 1; r < 16; r++) begin
      checks++;
      if (dut.u_rf.regs[r] != x[r]) begin failures++; $display("FAIL: x%0d = %h, model %h", r, dut.u_rf.regs[r], x[r]); end
    end
    mm[252] = x[1][7:0]; mm[253] = x[1][15:8]; mm[254] = x[1][23:16]; mm[255] = x[1][31:24];
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (dm[i] != mm[i]) begin failures++; $display("FAIL: mem[%0d] = %h, model %h", i, dm[i], mm[i]); end
    end
    checks++;
    if (nw != trace.size()) begin failures++; $display("FAIL: %0d register writes, model %0d", nw, trace.size()); end
    $display("COUNT retired = %0d, register writes = %0d", retired, nw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
