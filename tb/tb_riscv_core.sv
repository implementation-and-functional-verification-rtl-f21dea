// tb_riscv_core: the core alone with testbench memories. A program of
// RV32IM instructions is assembled here by small encoder functions and
// run; it covers ALU and immediate operations, SLT/SLTU, LUI/AUIPC, all
// load and store sizes, JAL/JALR, a counted loop with taken and
// not-taken branches, MUL/MULHU/DIV/REM, a branch that squashes an M
// instruction, a load-use pair and a load followed by a store of the same
// register. Results are stored to data memory and compared with values
// computed here. The run also counts load-use stalls, flushes, stage-3 and
// stage-4 forwards and M operations, and fails if any of them is zero.
module tb_riscv_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] imem_addr, imem_data, dbus_addr, dbus_wdata, dbus_rdata, pc_out;
  logic [1:0] dbus_we, dbus_whb;
  logic dbus_re, wb_valid, stall, flush, muldiv_enable, muldiv_ready;
  logic [31:0] prog [128];
  logic [7:0] dm [256];
  int checks = 0, failures = 0, n = 0;
  int c_stall = 0, c_flush = 0, c_fwd3 = 0, c_fwd4 = 0, c_md = 0, c_retire = 0;
  bit done = 0;

  riscv_core dut (.*);

  // ---- instruction encoders ----
  function automatic logic [31:0] r_t(input logic [6:0] f7, input int rs2, input int rs1, input logic [2:0] f3, input int rd);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), 7'b0110011};
  endfunction
  function automatic logic [31:0] i_t(input logic [6:0] op, input int imm, input int rs1, input logic [2:0] f3, input int rd);
    return {12'(imm), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] s_t(input int imm, input int rs2, input int rs1, input logic [2:0] f3);
    logic [11:0] m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(rs1), f3, m[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_t(input int off, input int rs2, input int rs1, input logic [2:0] f3);
    logic [12:0] m = 13'(off);
    return {m[12], m[10:5], 5'(rs2), 5'(rs1), f3, m[4:1], m[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] j_t(input int off, input int rd);
    logic [20:0] m = 21'(off);
    return {m[20], m[10:1], m[11], m[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] addi(input int rd, input int rs1, input int imm); return i_t(7'b0010011, imm, rs1, 3'd0, rd); endfunction
  function automatic logic [31:0] sw(input int rs2, input int off); return s_t(off, rs2, 0, 3'd2); endfunction
  function automatic logic [31:0] lw(input int rd, input int off); return i_t(7'b0000011, off, 0, 3'd2, rd); endfunction
  task automatic emit(input logic [31:0] w); prog[n] = w; n++; endtask

  // ---- memories ----
  assign imem_data = prog[imem_addr[8:2]];
  assign dbus_rdata = {dm[8'(dbus_addr + 3)], dm[8'(dbus_addr + 2)], dm[8'(dbus_addr + 1)], dm[8'(dbus_addr)]};
  always @(posedge clk) begin
    if (rst_n && dbus_we != 0) begin
      dm[8'(dbus_addr)] <= dbus_wdata[7:0];
      if (dbus_we != 2'b01) dm[8'(dbus_addr + 1)] <= dbus_wdata[15:8];
      if (dbus_we == 2'b11) begin
        dm[8'(dbus_addr + 2)] <= dbus_wdata[23:16];
        dm[8'(dbus_addr + 3)] <= dbus_wdata[31:24];
      end
      if (dbus_addr == 32'd124) done <= 1;
    end
    if (rst_n) begin
      c_stall += int'(stall);
      c_flush += int'(flush);
      c_fwd3  += int'(dut.fa != 0 || dut.fb != 0);
      c_fwd4  += int'(dut.fdata);
      c_md    += int'(muldiv_ready);
      c_retire += int'(wb_valid);
    end
  end

  function automatic logic [31:0] rd32(input int a);
    return {dm[a+3], dm[a+2], dm[a+1], dm[a]};
  endfunction
  task automatic expect_word(input int a, input logic [31:0] e, input string what);
    checks++;
    if (rd32(a) != e) begin failures++; $display("FAIL: %s: mem[%0d] = %h, expected %h", what, a, rd32(a), e); end
  endtask
  task automatic expect_count(input int c, input string what);
    checks++;
    $display("COUNT %s = %0d", what, c);
    if (c == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] K = 32'h12345678;
  initial begin
    foreach (prog[i]) prog[i] = 32'h00000013;
    foreach (dm[i]) dm[i] = 0;
    emit(addi(1, 0, 5));                               // x1 = 5
    emit(addi(2, 0, -3));                              // x2 = -3
    emit(r_t(0, 2, 1, 3'd0, 3));                       // add  x3 = x1 + x2 (forward MEM + WB)
    emit(r_t(7'h20, 2, 1, 3'd0, 4));                   // sub  x4 = x1 - x2
    emit(sw(3, 0));
    emit(lw(5, 0));
    emit(addi(6, 5, 1));                               // load-use stall
    emit(sw(6, 4));
    emit(lw(7, 0));
    emit(sw(7, 8));                                    // store data forwarded in MEM
    emit(r_t(0, 1, 2, 3'd2, 8));                       // slt  x8 = (-3 < 5)
    emit(r_t(0, 1, 2, 3'd3, 9));                       // sltu x9 = (0xfffffffd < 5)
    emit({20'h12345, 5'd10, 7'b0110111});              // lui x10
    emit(addi(10, 10, 12'h678));                       // forward of the LUI value
    emit(sw(10, 12));
    emit(r_t(7'h01, 2, 10, 3'd0, 11));                 // mul
    emit(sw(11, 16));
    emit(r_t(7'h01, 2, 10, 3'd4, 12));                 // div
    emit(r_t(7'h01, 1, 10, 3'd6, 13));                 // rem
    emit(sw(12, 20));
    emit(sw(13, 24));
    emit(r_t(7'h01, 10, 10, 3'd3, 14));                // mulhu
    emit(sw(14, 28));
    emit(b_t(12, 0, 0, 3'd0));                         // beq taken, squashes the div below
    emit(r_t(7'h01, 1, 10, 3'd4, 15));
    emit(addi(15, 0, 77));
    emit(addi(15, 0, 0));
    emit(addi(16, 0, 10));
    emit(addi(15, 15, 1));                             // loop:
    emit(b_t(-4, 16, 15, 3'd4));                       // blt x15, x16, loop
    emit(sw(15, 32));
    emit(j_t(12, 17));                                 // jal x17, +12
    emit(addi(15, 0, 99));
    emit(addi(15, 0, 98));
    emit(sw(17, 36));
    emit({20'h0, 5'd18, 7'b0010111});                  // auipc x18, 0
    emit(i_t(7'b1100111, 16, 18, 3'd0, 19));           // jalr x19, 16(x18)
    emit(addi(15, 0, 97));
    emit(addi(15, 0, 96));
    emit(sw(19, 40));
    emit(sw(15, 44));
    emit(s_t(48, 2, 0, 3'd0));                         // sb x2
    emit(i_t(7'b0000011, 48, 0, 3'd0, 20));            // lb
    emit(i_t(7'b0000011, 48, 0, 3'd4, 21));            // lbu
    emit(s_t(53, 10, 0, 3'd1));                        // sh x10 (unaligned)
    emit(i_t(7'b0000011, 53, 0, 3'd1, 22));            // lh
    emit(sw(20, 56));
    emit(sw(21, 60));
    emit(sw(22, 64));
    emit(i_t(7'b0010011, 12'h401, 2, 3'd5, 23));       // srai x23, x2, 1
    emit(i_t(7'b0010011, 28, 2, 3'd5, 24));            // srli x24, x2, 28
    emit(r_t(0, 1, 1, 3'd1, 25));                      // sll
    emit(r_t(0, 2, 1, 3'd4, 26));                      // xor
    emit(sw(23, 68));
    emit(sw(24, 72));
    emit(sw(25, 76));
    emit(sw(26, 80));
    emit(sw(4, 84));
    emit(sw(8, 88));
    emit(sw(9, 92));
    emit(b_t(8, 1, 2, 3'd7));                          // bgeu 0xfffffffd >= 5: taken
    emit(addi(27, 0, 1));
    emit(b_t(8, 1, 2, 3'd5));                          // bge -3 >= 5: not taken
    emit(addi(27, 27, 2));
    emit(sw(27, 96));
    emit(sw(1, 124));                                  // done marker
    emit(b_t(0, 0, 0, 3'd0));                          // stay here

    repeat (3) @(negedge clk); rst_n = 1;
    wait (done);
    repeat (5) @(negedge clk);
    expect_word(0, 2, "add");
    expect_word(4, 3, "load-use");
    expect_word(8, 2, "store-data forward");
    expect_word(12, K, "lui/addi");
    expect_word(16, K * 32'hfffffffd, "mul");
    expect_word(20, 32'($signed(K) / -3), "div");
    expect_word(24, K % 5, "rem");
    expect_word(28, 32'((64'(K) * 64'(K)) >> 32), "mulhu");
    expect_word(32, 10, "loop");
    expect_word(36, 32 * 4, "jal link");
    expect_word(40, 37 * 4, "jalr link");
    expect_word(44, 10, "jump skipped");
    expect_word(48, 32'h000000fd, "sb");
    expect_word(56, 32'hfffffffd, "lb");
    expect_word(60, 32'h000000fd, "lbu");
    expect_word(64, 32'h00005678, "lh");
    expect_word(68, 32'hfffffffe, "srai");
    expect_word(72, 32'h0000000f, "srli");
    expect_word(76, 32'd160, "sll");
    expect_word(80, 32'hfffffff8, "xor");
    expect_word(84, 8, "sub");
    expect_word(88, 1, "slt");
    expect_word(92, 0, "sltu");
    expect_word(96, 2, "branches");
    expect_count(c_stall, "load-use stall");
    expect_count(c_flush, "flush");
    expect_count(c_fwd3, "stage-3 forward");
    expect_count(c_fwd4, "stage-4 forward");
    expect_count(c_md, "muldiv");
    expect_count(c_retire, "retired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
