// acorn_aead: authenticated-encryption core (AEAD) around the ACORN-128
// data path, with the structure of the CAESAR hardware API: a pre-processor
// that reads the public data input (PDI) and secret data input (SDI) word
// streams and parses instructions and segment headers, a cipher-core
// controller that sequences acorn_datapath, and a post-processor that builds
// the data output (DO) stream. Segment headers for the output travel through
// the bypass FIFO; in decryption the plaintext words wait in the aux FIFO
// and are released only if the received tag equals the computed one.
//
// Word formats (32 bits): instruction = opcode in [31:28] (0111 activate
// key, 0010 encrypt, 0011 decrypt; on SDI 0100 load key). Segment header =
// type [31:28] (1100 key, 1101 Npub, 0001 AD, 0100 message/plaintext,
// 0101 ciphertext, 1000 tag), flags [27:24], length in bytes [15:0]. Data
// bytes are big-endian within a word; a partial last word is zero-padded.
// PDI order: activate key, encrypt|decrypt, Npub header + 4 words, AD header +
// words, message/ciphertext header + words, and for decryption a tag header
// + 4 words. SDI order: load key, key header + 4 words.
// DO for encryption: ciphertext header, words, tag header 0x83000010, 4 tag
// words, status 0xE0000000. For decryption: plaintext header, words and
// 0xE0000000, or only 0xF0000000 if the tag does not match.
//
// Timing: one byte (8 ACORN steps) per cycle; initialisation 224 cycles, each
// padding 32 cycles, finalisation 96 cycles. All streams use valid/ready.
// The stream formats follow the document's programs; the internal
// sequencing and the FIFO sizes are this design's.
module acorn_aead #(
  parameter int AUX_AW = 6,   // aux FIFO: 64 words, longest decrypted message 256 bytes
  parameter int BYP_AW = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] pdi_data,
  input  logic        pdi_valid,
  output logic        pdi_ready,
  input  logic [31:0] sdi_data,
  input  logic        sdi_valid,
  output logic        sdi_ready,
  output logic [31:0] do_data,
  output logic        do_valid,
  input  logic        do_ready
);
  localparam logic [3:0] INS_ACTKEY = 4'b0111, INS_ENC = 4'b0010, INS_DEC = 4'b0011, INS_LDKEY = 4'b0100;
  localparam logic [3:0] SEG_MSG = 4'b0100, SEG_CT = 4'b0101;
  localparam logic [31:0] TAG_HDR  = 32'h8300_0010;
  localparam logic [31:0] ST_PASS  = 32'hE000_0000;
  localparam logic [31:0] ST_FAIL  = 32'hF000_0000;

  typedef enum logic [4:0] {
    IDLE, KEY_INSTR, KEY_HDR, KEY_DATA, NPUB_HDR, NPUB_DATA, INIT,
    AD_HDR, AD_DATA, AD_PAD, MSG_HDR, OUT_HDR, MSG_DATA, MSG_OUT, MSG_PAD,
    FINAL, TAG_HDR_OUT, TAG_OUT, TAG_HDR_IN, TAG_IN, DEC_HDR_OUT, DEC_DRAIN, STATUS
  } state_e;
  state_e state;

  logic [127:0] key_q, iv_q, tag_q;
  logic [31:0]  wbuf, obuf, status_q;
  logic [2:0]   wbytes;
  logic [1:0]   oidx, wcnt;
  logic [15:0]  remain;
  logic [7:0]   bcnt;
  logic         dec_q, tag_ok;

  // data path controls
  logic       dp_clr, dp_en, dp_ca, dp_cb, dp_dec;
  logic [7:0] dp_din, dp_dout;

  acorn_datapath u_dp (.clk, .rst_n, .clr(dp_clr), .en(dp_en), .din(dp_din),
                       .ca(dp_ca), .cb(dp_cb), .dec(dp_dec), .dout(dp_dout));

  // bypass FIFO (output headers) and aux FIFO (plaintext awaiting the tag)
  logic        byp_wr, byp_rd, byp_full, byp_empty;
  logic [31:0] byp_wdata, byp_rdata;
  logic        aux_wr, aux_rd, aux_clr, aux_full, aux_empty;
  logic [31:0] aux_rdata;

  sync_fifo #(.W(32), .AW(BYP_AW)) u_bypass (.clk, .rst_n, .clr(1'b0), .wr(byp_wr), .wdata(byp_wdata),
                                             .full(byp_full), .rd(byp_rd), .rdata(byp_rdata), .empty(byp_empty));
  sync_fifo #(.W(32), .AW(AUX_AW)) u_aux (.clk, .rst_n, .clr(aux_clr), .wr(aux_wr), .wdata(obuf),
                                          .full(aux_full), .rd(aux_rd), .rdata(aux_rdata), .empty(aux_empty));

  function automatic logic [7:0] byte_of(input logic [127:0] v, input logic [3:0] k);
    return v[127 - 8*k -: 8];
  endfunction

  function automatic logic [2:0] first_bytes(input logic [15:0] rem);
    return (rem >= 16'd4) ? 3'd4 : rem[2:0];
  endfunction

  // ---------------- combinational controls ----------------
  always_comb begin
    pdi_ready = 1'b0; sdi_ready = 1'b0;
    do_valid  = 1'b0; do_data   = '0;
    dp_clr = 1'b0; dp_en = 1'b0; dp_din = '0; dp_ca = 1'b1; dp_cb = 1'b1; dp_dec = 1'b0;
    byp_wr = 1'b0; byp_rd = 1'b0; byp_wdata = '0;
    aux_wr = 1'b0; aux_rd = 1'b0; aux_clr = 1'b0;
    unique case (state)
      IDLE, NPUB_HDR, NPUB_DATA, AD_HDR, TAG_HDR_IN, TAG_IN: pdi_ready = 1'b1;
      KEY_INSTR, KEY_HDR, KEY_DATA: sdi_ready = 1'b1;
      MSG_HDR: begin
        pdi_ready = ~byp_full;
        byp_wr    = pdi_valid & ~byp_full;
        byp_wdata = {dec_q ? SEG_MSG : SEG_CT, pdi_data[27:24], 8'h00, pdi_data[15:0]};
      end
      INIT: begin
        dp_en = 1'b1;
        if (bcnt < 8'd16)      dp_din = byte_of(key_q, bcnt[3:0]);
        else if (bcnt < 8'd32) dp_din = byte_of(iv_q, bcnt[3:0]);
        else                   dp_din = byte_of(key_q, bcnt[3:0]) ^ {7'b0, bcnt == 8'd32};
      end
      AD_DATA: begin
        if (wbytes == 3'd0) pdi_ready = 1'b1;
        else begin
          dp_en = 1'b1; dp_din = wbuf[31:24];
        end
      end
      AD_PAD, MSG_PAD: begin
        dp_en  = 1'b1;
        dp_din = {7'b0, bcnt == 8'd0};
        dp_ca  = (bcnt < 8'd16);
        dp_cb  = (state == AD_PAD);
      end
      OUT_HDR, DEC_HDR_OUT: begin
        do_valid = 1'b1; do_data = byp_rdata;
        byp_rd   = do_ready;
      end
      MSG_DATA: begin
        if (wbytes == 3'd0) pdi_ready = 1'b1;
        else begin
          dp_en = 1'b1; dp_din = wbuf[31:24]; dp_cb = 1'b0; dp_dec = dec_q;
        end
      end
      MSG_OUT: begin
        if (dec_q) aux_wr = ~aux_full;
        else begin
          do_valid = 1'b1; do_data = obuf;
        end
      end
      FINAL: dp_en = 1'b1;
      TAG_HDR_OUT: begin do_valid = 1'b1; do_data = TAG_HDR; end
      TAG_OUT:     begin do_valid = 1'b1; do_data = tag_q[127 - 32*wcnt -: 32]; end
      DEC_DRAIN: begin
        do_valid = ~aux_empty; do_data = aux_rdata;
        aux_rd   = do_ready & ~aux_empty;
      end
      STATUS: begin do_valid = 1'b1; do_data = status_q; end
      default: ;
    endcase
    if (state == NPUB_HDR) dp_clr = pdi_valid;
    if (state == TAG_IN && pdi_valid && wcnt == 2'd3 &&
        !(tag_ok && pdi_data == tag_q[31:0])) begin
      aux_clr = 1'b1;    // authentication failed: drop plaintext and its header
      byp_rd  = 1'b1;
    end
  end

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      key_q <= '0; iv_q <= '0; tag_q <= '0; wbuf <= '0; obuf <= '0; status_q <= '0;
      wbytes <= '0; oidx <= '0; wcnt <= '0; remain <= '0; bcnt <= '0;
      dec_q <= 1'b0; tag_ok <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (pdi_valid) begin
          unique case (pdi_data[31:28])
            INS_ACTKEY: state <= KEY_INSTR;
            INS_ENC:    begin dec_q <= 1'b0; state <= NPUB_HDR; end
            INS_DEC:    begin dec_q <= 1'b1; state <= NPUB_HDR; end
            default:    state <= IDLE;
          endcase
        end
        KEY_INSTR: if (sdi_valid && sdi_data[31:28] == INS_LDKEY) state <= KEY_HDR;
        KEY_HDR:   if (sdi_valid) begin wcnt <= '0; state <= KEY_DATA; end
        KEY_DATA:  if (sdi_valid) begin
          key_q <= {key_q[95:0], sdi_data};
          wcnt  <= wcnt + 1'b1;
          if (wcnt == 2'd3) state <= IDLE;
        end
        NPUB_HDR:  if (pdi_valid) begin wcnt <= '0; state <= NPUB_DATA; end
        NPUB_DATA: if (pdi_valid) begin
          iv_q <= {iv_q[95:0], pdi_data};
          wcnt <= wcnt + 1'b1;
          if (wcnt == 2'd3) begin bcnt <= '0; state <= INIT; end
        end
        INIT: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == 8'd223) state <= AD_HDR;
        end
        AD_HDR: if (pdi_valid) begin
          remain <= pdi_data[15:0];
          wbytes <= '0;
          bcnt   <= '0;
          state  <= (pdi_data[15:0] == '0) ? AD_PAD : AD_DATA;
        end
        AD_DATA: begin
          if (wbytes == 3'd0) begin
            if (pdi_valid) begin wbuf <= pdi_data; wbytes <= first_bytes(remain); end
          end else begin
            wbuf   <= {wbuf[23:0], 8'h00};
            wbytes <= wbytes - 1'b1;
            remain <= remain - 1'b1;
            if (remain == 16'd1) begin bcnt <= '0; state <= AD_PAD; end
          end
        end
        AD_PAD: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == 8'd31) state <= MSG_HDR;
        end
        MSG_HDR: if (pdi_valid && !byp_full) begin
          remain <= pdi_data[15:0];
          wbytes <= '0;
          bcnt   <= '0;
          if (!dec_q)                   state <= OUT_HDR;
          else if (pdi_data[15:0] == '0) state <= MSG_PAD;
          else                           state <= MSG_DATA;
        end
        OUT_HDR: if (do_ready) state <= (remain == '0) ? MSG_PAD : MSG_DATA;
        MSG_DATA: begin
          if (wbytes == 3'd0) begin
            if (pdi_valid) begin
              wbuf <= pdi_data; wbytes <= first_bytes(remain); obuf <= '0; oidx <= '0;
            end
          end else begin
            obuf[31 - 8*oidx -: 8] <= dp_dout;
            oidx   <= oidx + 1'b1;
            wbuf   <= {wbuf[23:0], 8'h00};
            wbytes <= wbytes - 1'b1;
            remain <= remain - 1'b1;
            if (wbytes == 3'd1) state <= MSG_OUT;
          end
        end
        MSG_OUT: if (dec_q ? !aux_full : do_ready) begin
          bcnt  <= '0;
          state <= (remain == '0) ? MSG_PAD : MSG_DATA;
        end
        MSG_PAD: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == 8'd31) begin bcnt <= '0; state <= FINAL; end
        end
        FINAL: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt >= 8'd80) tag_q <= {tag_q[119:0], dp_dout};
          if (bcnt == 8'd95) begin
            wcnt  <= '0;
            state <= dec_q ? TAG_HDR_IN : TAG_HDR_OUT;
          end
        end
        TAG_HDR_OUT: if (do_ready) state <= TAG_OUT;
        TAG_OUT: if (do_ready) begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == 2'd3) begin status_q <= ST_PASS; state <= STATUS; end
        end
        TAG_HDR_IN: if (pdi_valid) begin tag_ok <= 1'b1; wcnt <= '0; state <= TAG_IN; end
        TAG_IN: if (pdi_valid) begin
          tag_ok <= tag_ok & (pdi_data == tag_q[127 - 32*wcnt -: 32]);
          wcnt   <= wcnt + 1'b1;
          if (wcnt == 2'd3) begin
            if (tag_ok && pdi_data == tag_q[31:0]) state <= DEC_HDR_OUT;
            else begin status_q <= ST_FAIL; state <= STATUS; end
          end
        end
        DEC_HDR_OUT: if (do_ready) state <= DEC_DRAIN;
        DEC_DRAIN: if (aux_empty) begin status_q <= ST_PASS; state <= STATUS; end
        STATUS: if (do_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
