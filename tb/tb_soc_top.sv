// tb_soc_top: end-to-end test of the SoC at its full default size (256 KB
// memories, UART divisor 27), with three unrelated clocks. The testbench
// assembles a program, loads it through the instruction-memory load port
// while the core is held in reset, then releases reset. The software:
//   1. encrypts the test vector (key 55..64, nonce b0..bf, AD a0..af,
//      message "Mentor Graphics"): it stores all 17 PDI words and then the
//      6 SDI words back to back, with no polling, then polls DO_empty (CSR
//      bit 3) and copies the eleven output words to data memory at 0x100;
//   2. decrypts, feeding back the ciphertext and tag it just stored, this
//      time polling the PDI/SDI full flags before each store, and copies
//      the six output words to 0x200;
//   3. sends the 16 ciphertext bytes out of the UART, polling Tx_full;
//   4. runs MUL, DIV and REMU on the ciphertext and stores the results;
//   5. reads from region 3, which must raise the sticky address error;
//   6. writes a done marker.
// The UART output is decoded serially by the testbench and also looped
// back to the receiver. Memory contents, the serial bytes and the error
// flag are checked, and each mechanism (load-use stall, flush, stage-3 and
// stage-4 forwarding, MUL/DIV, PDI/SDI/DO FIFO traffic across clock
// domains, cipher output words, UART transmit and receive, address error)
// is counted; the test fails if any count is zero.
module tb_soc_top;
  logic clk = 0, uart_clk = 0, sec_clk = 0;
  logic arst_n = 1, uart_arst_n = 1, sec_arst_n = 1;
  initial #1 {arst_n, uart_arst_n, sec_arst_n} = 3'b000;  // reset edge before the first clock
  always #5 clk = ~clk;
  always #4 uart_clk = ~uart_clk;
  always #3.7 sec_clk = ~sec_clk;
  logic line, addr_error, load_we = 0, wb_valid, stall, flush, muldiv_enable, muldiv_ready;
  logic [15:0] load_addr = 0;
  logic [31:0] load_data = 0, pc_out;
  logic [31:0] prog [$];
  logic [7:0] uart_bytes [$];
  int checks = 0, failures = 0;
  int c_stall = 0, c_flush = 0, c_fwd3 = 0, c_fwd4 = 0, c_md = 0, c_pdi = 0, c_sdi = 0;
  int c_do_pop = 0, c_do_push = 0, c_rx = 0;

  soc_top dut (.clk, .arst_n, .uart_clk, .uart_arst_n, .sec_clk, .sec_arst_n, .rx(line), .tx(line),
               .addr_error, .load_we, .load_addr, .load_data, .pc_out, .wb_valid, .stall, .flush,
               .muldiv_enable, .muldiv_ready);

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
  task automatic emit(input logic [31:0] w); prog.push_back(w); endtask
  task automatic li(input int rd, input logic [31:0] v);
    logic [31:0] hi = (v + 32'h800) >> 12;
    emit({hi[19:0], 5'(rd), 7'b0110111});
    emit(i_t(7'b0010011, int'(v[11:0]), rd, 3'd0, rd));
  endtask
  task automatic lw(input int rd, input int off, input int base); emit(i_t(7'b0000011, off, base, 3'd2, rd)); endtask
  task automatic sw(input int rs2, input int off, input int base); emit(s_t(off, rs2, base, 3'd2)); endtask
  task automatic andi(input int rd, input int rs1, input int imm); emit(i_t(7'b0010011, imm, rs1, 3'd7, rd)); endtask
  task automatic addi(input int rd, input int rs1, input int imm); emit(i_t(7'b0010011, imm, rs1, 3'd0, rd)); endtask
  // wait while a status bit is set: x8 = [base+off] & mask, loop while non-zero
  task automatic poll(input int base, input int off, input int mask);
    lw(8, off, base); andi(8, 8, mask); emit(b_t(-8, 0, 8, 3'd1));
  endtask
  // push register x7 to PDI (x5+0, full = CSR bit 5) or SDI (x5+4, bit 4)
  task automatic push_reg(input bit sdi);
    poll(5, 12, sdi ? 32'h10 : 32'h20); sw(7, sdi ? 4 : 0, 5);
  endtask
  task automatic push(input bit sdi, input logic [31:0] v); li(7, v); push_reg(sdi); endtask
  // copy n DO words to memory at address a
  task automatic drain(input int a, input int n);
    addi(9, 0, a); addi(10, 0, n);
    poll(5, 12, 8);
    lw(11, 8, 5); sw(11, 0, 9); addi(9, 9, 4); addi(10, 10, -1);
    emit(b_t(-28, 0, 10, 3'd1));
  endtask

  localparam logic [31:0] KEY[4] = '{32'h55565758, 32'h595a5b5c, 32'h5d5e5f60, 32'h61626364};
  localparam logic [31:0] NPUB[4] = '{32'hb0b1b2b3, 32'hb4b5b6b7, 32'hb8b9babb, 32'hbcbdbebf};
  localparam logic [31:0] AD[4] = '{32'ha0a1a2a3, 32'ha4a5a6a7, 32'ha8a9aaab, 32'hacadaeaf};
  localparam logic [31:0] MSG[4] = '{32'h4d656e74, 32'h6f722047, 32'h72617068, 32'h69637300};
  localparam logic [31:0] CT[4] = '{32'h23604eff, 32'h0972a461, 32'h2d5f2d2f, 32'h4026cf00};
  localparam logic [31:0] TAG[4] = '{32'hab5a1f55, 32'h5facc365, 32'hc4ed4c9c, 32'h260234d3};

  task automatic common(input logic [31:0] op);
    push(1, 32'h40000000); push(1, 32'hc7000010);
    foreach (KEY[i]) push(1, KEY[i]);
    push(0, 32'h70000000); push(0, op); push(0, 32'hd2000010);
    foreach (NPUB[i]) push(0, NPUB[i]);
    push(0, 32'h12000010);
    foreach (AD[i]) push(0, AD[i]);
  endtask

  task automatic build;
    emit({20'h00080, 5'd5, 7'b0110111});                 // x5 = 0x80000 security module
    emit({20'h00040, 5'd6, 7'b0110111});                 // x6 = 0x40000 UART
    // encryption in the order of the reference program: all PDI words, then
    // the SDI words, stored back to back without polling
    begin
      logic [31:0] pdi[$], sdi[$];
      pdi = '{32'h70000000, 32'h20000000, 32'hd2000010};
      foreach (NPUB[i]) pdi.push_back(NPUB[i]);
      pdi.push_back(32'h12000010);
      foreach (AD[i]) pdi.push_back(AD[i]);
      pdi.push_back(32'h4700000f);
      foreach (MSG[i]) pdi.push_back(MSG[i]);
      sdi = '{32'h40000000, 32'hc7000010};
      foreach (KEY[i]) sdi.push_back(KEY[i]);
      foreach (pdi[i]) begin li(7, pdi[i]); sw(7, 0, 5); end
      foreach (sdi[i]) begin li(7, sdi[i]); sw(7, 4, 5); end
    end
    drain(32'h100, 11);
    common(32'h30000000);
    push(0, 32'h5200000f);
    for (int i = 0; i < 4; i++) begin lw(7, 32'h104 + 4 * i, 0); push_reg(0); end
    push(0, 32'h83000010);
    for (int i = 0; i < 4; i++) begin lw(7, 32'h118 + 4 * i, 0); push_reg(0); end
    drain(32'h200, 6);
    for (int i = 0; i < 4; i++) begin
      lw(7, 32'h104 + 4 * i, 0);
      for (int s = 24; s >= 0; s -= 8) begin
        emit(i_t(7'b0010011, s, 7, 3'd5, 12));           // srli x12, x7, s
        poll(6, 2, 4);                                   // wait while Tx_full
        emit(s_t(0, 12, 6, 3'd0));                       // sb x12, 0(x6)
      end
    end
    lw(15, 32'h104, 0);
    li(16, 12345);
    emit(r_t(7'h01, 16, 15, 3'd0, 17));                  // mul
    emit(r_t(7'h01, 16, 17, 3'd4, 18));                  // div
    emit(r_t(7'h01, 16, 17, 3'd7, 19));                  // remu
    sw(17, 32'h300, 0); sw(18, 32'h304, 0); sw(19, 32'h308, 0);
    emit({20'h000c0, 5'd20, 7'b0110111});                // x20 = 0xC0000 (region 3)
    lw(21, 0, 20);
    addi(1, 0, 1);
    sw(1, 32'h3fc, 0);                                   // done marker
    emit(b_t(0, 0, 0, 3'd0));
  endtask

  function automatic logic [31:0] mem(input int a);
    return dut.u_mmio.u_dmem.mem[a / 4];
  endfunction
  task automatic expect_word(input int a, input logic [31:0] e, input string what);
    checks++;
    if (mem(a) != e) begin failures++; $display("FAIL: %s: mem[%h] = %h, expected %h", what, a, mem(a), e); end
  endtask
  task automatic expect_count(input int c, input string what);
    checks++;
    $display("COUNT %s = %0d", what, c);
    if (c == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  // ---- monitors ----
  always @(posedge clk) if (dut.rst_n) begin
    c_stall += int'(stall);
    c_flush += int'(flush);
    c_fwd3  += int'(dut.u_core.fa != 0 || dut.u_core.fb != 0);
    c_fwd4  += int'(dut.u_core.fdata);
    c_md    += int'(muldiv_ready);
    c_pdi   += int'(dut.u_mmio.u_sec.pdi_wr);
    c_sdi   += int'(dut.u_mmio.u_sec.sdi_wr);
    c_do_pop += int'(dut.u_mmio.u_sec.do_rd);
  end
  always @(posedge sec_clk) c_do_push += int'(dut.u_mmio.u_sec.do_wr);
  always @(posedge uart_clk) if (dut.uart_rst_n) c_rx += int'(dut.u_mmio.u_uart.rx_done);

  localparam int BIT = 16 * 27 * 8;  // UART clock period is 8 time units
  initial begin : serial_monitor
    forever begin
      logic [7:0] b;
      @(negedge line);
      #(BIT + BIT / 2);
      for (int i = 0; i < 8; i++) begin b[i] = line; #(BIT); end
      if (!line) begin failures++; $display("FAIL: UART stop bit missing"); end
      uart_bytes.push_back(b);
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, pc=%h", pc_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p, q;
    logic [7:0] exp_bytes [$];
    build();
    foreach (prog[i]) begin
      @(negedge clk); load_we = 1; load_addr = 16'(i); load_data = prog[i];
    end
    @(negedge clk); load_we = 0;
    repeat (3) @(negedge clk);
    arst_n = 1; uart_arst_n = 1; sec_arst_n = 1;
    while (mem(32'h3fc) != 1) @(negedge clk);
    for (int t = 0; t < 100000 && uart_bytes.size() < 16; t++) @(negedge clk);
    repeat (20) @(negedge clk);
    expect_word(32'h100, 32'h5700000f, "ciphertext header");
    foreach (CT[i]) expect_word(32'h104 + 4 * i, CT[i], "ciphertext");
    expect_word(32'h114, 32'h83000010, "tag header");
    foreach (TAG[i]) expect_word(32'h118 + 4 * i, TAG[i], "tag");
    expect_word(32'h128, 32'he0000000, "encrypt status");
    expect_word(32'h200, 32'h4200000f, "plaintext header");
    foreach (MSG[i]) expect_word(32'h204 + 4 * i, MSG[i], "plaintext");
    expect_word(32'h214, 32'he0000000, "decrypt status");
    p = CT[0] * 32'd12345;
    expect_word(32'h300, p, "mul");
    expect_word(32'h304, 32'($signed(p) / 12345), "div");
    expect_word(32'h308, p % 32'd12345, "remu");
    foreach (CT[i]) for (int s = 24; s >= 0; s -= 8) exp_bytes.push_back(CT[i][s +: 8]);
    checks++;
    if (uart_bytes.size() != 16) begin failures++; $display("FAIL: %0d UART bytes", uart_bytes.size()); end
    foreach (uart_bytes[i]) begin
      checks++;
      if (i < 16 && uart_bytes[i] != exp_bytes[i]) begin
        failures++; $display("FAIL: UART byte %0d = %h, expected %h", i, uart_bytes[i], exp_bytes[i]);
      end
    end
    checks++;
    if (!addr_error) begin failures++; $display("FAIL: address error not flagged"); end
    expect_count(c_stall, "load-use stall");
    expect_count(c_flush, "flush");
    expect_count(c_fwd3, "stage-3 forward");
    expect_count(c_fwd4, "stage-4 forward");
    expect_count(c_md, "muldiv");
    expect_count(c_pdi, "PDI FIFO write");
    expect_count(c_sdi, "SDI FIFO write");
    expect_count(c_do_push, "cipher output word");
    expect_count(c_do_pop, "DO FIFO read");
    expect_count(uart_bytes.size(), "UART transmit");
    expect_count(c_rx, "UART receive");
    expect_count(int'(addr_error), "address error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
