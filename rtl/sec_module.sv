// sec_module: the hardware security module (crypto accelerator) of the SoC.
// The ACORN AEAD core runs on its own clock (sec_clk); the bus side runs on
// the core clock. Three 32-bit async FIFOs cross the domains: PDI and SDI
// (core writes, AEAD reads) and DO (AEAD writes, core reads). Registers at
// byte offsets from the module base:
//   0  PDI : word store writes the register and pushes it into the PDI FIFO;
//            byte/halfword stores only update the addressed bytes
//   4  SDI : same for the SDI FIFO
//   8  DO  : reads the head of the DO FIFO; a word load also pops it
//   12 CSR : {2'b00, PDI_full, SDI_full, DO_empty, PDI_fifo_wr, SDI_fifo_wr,
//            DO_fifo_rd}; writing 1 to a write bit pushes the PDI or SDI
//            register or pops DO; write bits read as 0
// Reads return the bytes starting at the addressed byte in rdata[7:0] up.
// The FIFOs hold 2**FIFO_AW = 32 words (own choice): enough for a whole
// encryption request (17 PDI words) written before the key, since the cipher
// takes only the first PDI word until the key arrives on SDI.
// The register map and CSR follow the document (its program polls bit 3,
// DO_empty, at base+12); the push/pop side effects are this design's reading.
module sec_module #(
  parameter int FIFO_AW = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sec_clk,
  input  logic        sec_rst_n,
  input  logic        sel,
  input  logic [3:0]  addr,
  input  logic [1:0]  we,
  input  logic        re,
  input  logic [1:0]  whb,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  logic [31:0] pdi_q, sdi_q, pdi_n, sdi_n, do_head;
  logic [31:0] pdi_h, sdi_h, do_d;
  logic        pdi_full, sdi_full, do_empty, pdi_empty, sdi_empty, do_full;
  logic        pdi_wr, sdi_wr, do_rd, pdi_rd, sdi_rd, do_wr;
  logic        pdi_v, sdi_v, do_v, pdi_rdy, sdi_rdy, do_rdy;
  logic [1:0]  reg_sel;
  logic        st, st_word, wr_csr;
  logic [7:0]  csr;

  assign reg_sel = addr[3:2];
  assign st      = sel && (we != 2'b00);
  assign st_word = st && (we == 2'b11);
  assign wr_csr  = st && (reg_sel == 2'd3);

  // byte-lane update of a 32-bit register at byte offset addr[1:0]
  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [1:0] sz, input logic [1:0] ofs);
    logic [31:0] r;
    r = old;
    for (int b = 0; b < 4; b++) begin
      logic [2:0] rel;
      rel = 3'(b) - 3'(ofs);
      if (b >= int'(ofs) && ((sz == 2'b01 && rel < 1) || (sz == 2'b10 && rel < 2) || (sz == 2'b11 && rel < 4)))
        r[8*b +: 8] = d[8*rel[1:0] +: 8];
    end
    return r;
  endfunction

  assign pdi_n = merge(pdi_q, wdata, we, addr[1:0]);
  assign sdi_n = merge(sdi_q, wdata, we, addr[1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pdi_q <= '0;
      sdi_q <= '0;
    end else begin
      if (st && reg_sel == 2'd0) pdi_q <= pdi_n;
      if (st && reg_sel == 2'd1) sdi_q <= sdi_n;
    end
  end

  assign pdi_wr = (st_word && reg_sel == 2'd0) || (wr_csr && wdata[2]);
  assign sdi_wr = (st_word && reg_sel == 2'd1) || (wr_csr && wdata[1]);
  assign do_rd  = (sel && re && whb == 2'b11 && reg_sel == 2'd2) || (wr_csr && wdata[0]);

  async_fifo #(.W(32), .AW(FIFO_AW)) u_pdif (
    .wclk(clk), .wrst_n(rst_n), .wr(pdi_wr), .wdata(st_word ? wdata : pdi_q), .full(pdi_full),
    .rclk(sec_clk), .rrst_n(sec_rst_n), .rd(pdi_rd), .rdata(pdi_h), .empty(pdi_empty));
  async_fifo #(.W(32), .AW(FIFO_AW)) u_sdif (
    .wclk(clk), .wrst_n(rst_n), .wr(sdi_wr), .wdata(st_word ? wdata : sdi_q), .full(sdi_full),
    .rclk(sec_clk), .rrst_n(sec_rst_n), .rd(sdi_rd), .rdata(sdi_h), .empty(sdi_empty));
  async_fifo #(.W(32), .AW(FIFO_AW)) u_dof (
    .wclk(sec_clk), .wrst_n(sec_rst_n), .wr(do_wr), .wdata(do_d), .full(do_full),
    .rclk(clk), .rrst_n(rst_n), .rd(do_rd), .rdata(do_head), .empty(do_empty));

  assign pdi_v  = !pdi_empty;
  assign sdi_v  = !sdi_empty;
  assign pdi_rd = pdi_v && pdi_rdy;
  assign sdi_rd = sdi_v && sdi_rdy;
  assign do_rdy = !do_full;
  assign do_wr  = do_v && do_rdy;

  acorn_aead u_aead (.clk(sec_clk), .rst_n(sec_rst_n),
                     .pdi_data(pdi_h), .pdi_valid(pdi_v), .pdi_ready(pdi_rdy),
                     .sdi_data(sdi_h), .sdi_valid(sdi_v), .sdi_ready(sdi_rdy),
                     .do_data(do_d), .do_valid(do_v), .do_ready(do_rdy));

  assign csr = {2'b00, pdi_full, sdi_full, do_empty, 3'b000};

  always_comb begin
    unique case (reg_sel)
      2'd0:    rdata = pdi_q >> (8 * addr[1:0]);
      2'd1:    rdata = sdi_q >> (8 * addr[1:0]);
      2'd2:    rdata = do_head >> (8 * addr[1:0]);
      default: rdata = 32'(csr) >> (8 * addr[1:0]);
    endcase
  end
endmodule
