// tb_acorn_aead: self-checking test of the ACORN AEAD core with the vector
// of the design's reference run: key 55565758..61626364, Npub b0b1..bebf,
// AD a0a1..aeaf, message "Mentor Graphics" (15 bytes). The expected
// ciphertext 23604eff 0972a461 2d5f2d2f 4026cf and tag ab5a1f55 5facc365
// c4ed4c9c 260234d3 are ACORN-128 results computed outside this design.
// It runs encryption, decryption with the right tag (plaintext released,
// status E0) and decryption with a wrong tag (only status F0). DO ready is
// toggled pseudo-randomly to exercise back-pressure.
module tb_acorn_aead;
  logic clk = 0, rst_n = 0;
  initial begin pdi_valid = 0; sdi_valid = 0; pdi_data = 0; sdi_data = 0; do_ready = 0; end
  always #5 clk = ~clk;

  logic [31:0] pdi_data, sdi_data, do_data;
  logic pdi_valid, pdi_ready, sdi_valid, sdi_ready, do_valid, do_ready;
  int checks = 0, failures = 0;

  acorn_aead dut (.*);

  logic [31:0] pdi_q[$], sdi_q[$], do_q[$];

  // stream drivers: inputs change on the falling edge, sampled on the rising
  always @(negedge clk) begin
    pdi_valid <= pdi_q.size() > 0;
    pdi_data  <= (pdi_q.size() > 0) ? pdi_q[0] : '0;
    sdi_valid <= sdi_q.size() > 0;
    sdi_data  <= (sdi_q.size() > 0) ? sdi_q[0] : '0;
  end

  always @(posedge clk) begin
    if (pdi_valid && pdi_ready) void'(pdi_q.pop_front());
    if (sdi_valid && sdi_ready) void'(sdi_q.pop_front());
    if (do_valid && do_ready) do_q.push_back(do_data);
    do_ready <= ($urandom % 4) != 0;
  end

  localparam logic [31:0] KEY[4] = '{32'h55565758, 32'h595a5b5c, 32'h5d5e5f60, 32'h61626364};
  localparam logic [31:0] NPUB[4] = '{32'hb0b1b2b3, 32'hb4b5b6b7, 32'hb8b9babb, 32'hbcbdbebf};
  localparam logic [31:0] AD[4] = '{32'ha0a1a2a3, 32'ha4a5a6a7, 32'ha8a9aaab, 32'hacadaeaf};
  localparam logic [31:0] MSG[4] = '{32'h4d656e74, 32'h6f722047, 32'h72617068, 32'h69637300};
  localparam logic [31:0] CT[4] = '{32'h23604eff, 32'h0972a461, 32'h2d5f2d2f, 32'h4026cf00};
  localparam logic [31:0] TAG[4] = '{32'hab5a1f55, 32'h5facc365, 32'hc4ed4c9c, 32'h260234d3};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load_common(input logic [31:0] op);
    pdi_q.push_back(32'h70000000);          // activate key
    pdi_q.push_back(op);
    pdi_q.push_back(32'hd2000010);          // Npub header
    foreach (NPUB[i]) pdi_q.push_back(NPUB[i]);
    pdi_q.push_back(32'h12000010);          // AD header, 16 bytes
    foreach (AD[i]) pdi_q.push_back(AD[i]);
    sdi_q.push_back(32'h40000000);          // load key
    sdi_q.push_back(32'hc7000010);          // key header
    foreach (KEY[i]) sdi_q.push_back(KEY[i]);
  endtask

  task automatic wait_words(input int n);
    int t = 0;
    while (do_q.size() < n && t < 5000) begin @(posedge clk); t++; end
    repeat (20) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp[$];
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- encryption ----
    load_common(32'h20000000);
    pdi_q.push_back(32'h4700000f);
    foreach (MSG[i]) pdi_q.push_back(MSG[i]);
    exp = '{32'h5700000f};
    foreach (CT[i]) exp.push_back(CT[i]);
    exp.push_back(32'h83000010);
    foreach (TAG[i]) exp.push_back(TAG[i]);
    exp.push_back(32'he0000000);
    wait_words(exp.size());
    check(do_q.size() == exp.size(), $sformatf("enc: %0d output words, expected %0d", do_q.size(), exp.size()));
    foreach (exp[i]) if (i < do_q.size())
      check(do_q[i] == exp[i], $sformatf("enc word %0d = %h, expected %h", i, do_q[i], exp[i]));
    do_q.delete();

    // ---- decryption, correct tag ----
    load_common(32'h30000000);
    pdi_q.push_back(32'h5200000f);
    foreach (CT[i]) pdi_q.push_back(CT[i]);
    pdi_q.push_back(32'h83000010);
    foreach (TAG[i]) pdi_q.push_back(TAG[i]);
    exp = '{32'h4200000f};
    foreach (MSG[i]) exp.push_back(MSG[i]);
    exp.push_back(32'he0000000);
    wait_words(exp.size());
    check(do_q.size() == exp.size(), $sformatf("dec: %0d output words, expected %0d", do_q.size(), exp.size()));
    foreach (exp[i]) if (i < do_q.size())
      check(do_q[i] == exp[i], $sformatf("dec word %0d = %h, expected %h", i, do_q[i], exp[i]));
    do_q.delete();

    // ---- decryption, corrupted tag ----
    load_common(32'h30000000);
    pdi_q.push_back(32'h5200000f);
    foreach (CT[i]) pdi_q.push_back(CT[i]);
    pdi_q.push_back(32'h83000010);
    foreach (TAG[i]) pdi_q.push_back(i == 3 ? TAG[i] ^ 32'h1 : TAG[i]);
    wait_words(1);
    check(do_q.size() == 1, $sformatf("bad tag: %0d output words, expected 1", do_q.size()));
    if (do_q.size() > 0) check(do_q[0] == 32'hf0000000, $sformatf("bad tag status %h", do_q[0]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
