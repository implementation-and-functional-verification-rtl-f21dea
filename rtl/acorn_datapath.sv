// acorn_datapath: data path of the ACORN-128 cipher core. Holds the 293-bit
// ACORN state S and performs eight state-update steps per cycle when en is
// high, consuming din one bit per step, LSB first. Each step:
//   S289 ^= S235^S230, S230 ^= S196^S193, S193 ^= S160^S154,
//   S154 ^= S111^S107, S107 ^= S66^S61,   S61  ^= S23^S0;
//   ks = S12 ^ S154 ^ maj(S235,S61,S193) ^ ch(S230,S111,S66);
//   f  = S0 ^ ~S107 ^ maj(S244,S23,S160) ^ (ca & S196) ^ (cb & ks) ^ m;
//   shift S down by one and put f into S292.
// m is the input bit, or in decryption (dec = 1) the recovered plaintext bit
// din ^ ks. dout = din ^ ks for every step: ciphertext when encrypting,
// plaintext when decrypting, and the keystream (tag bits) when din = 0.
// dout is combinational from the current state; the state updates on the
// clock edge. clr zeroes the state. The controller (acorn_aead) supplies
// key, IV, data and padding bytes and the ca/cb control bits. The equations
// are those of the published ACORN-128 v3 cipher, which the document selects
// but does not list; the byte-per-cycle width is this design's choice.
module acorn_datapath (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       en,
  input  logic [7:0] din,
  input  logic       ca,
  input  logic       cb,
  input  logic       dec,
  output logic [7:0] dout
);
  logic [292:0] s_q, s_n;

  function automatic logic maj(input logic x, input logic y, input logic z);
    return (x & y) ^ (x & z) ^ (y & z);
  endfunction
  function automatic logic ch(input logic x, input logic y, input logic z);
    return (x & y) ^ (~x & z);
  endfunction

  always_comb begin
    logic [292:0] s;
    logic ks, f, m;
    s = s_q;
    dout = '0;
    for (int j = 0; j < 8; j++) begin
      s[289] = s[289] ^ s[235] ^ s[230];
      s[230] = s[230] ^ s[196] ^ s[193];
      s[193] = s[193] ^ s[160] ^ s[154];
      s[154] = s[154] ^ s[111] ^ s[107];
      s[107] = s[107] ^ s[66]  ^ s[61];
      s[61]  = s[61]  ^ s[23]  ^ s[0];
      ks = s[12] ^ s[154] ^ maj(s[235], s[61], s[193]) ^ ch(s[230], s[111], s[66]);
      m  = dec ? (din[j] ^ ks) : din[j];
      f  = s[0] ^ ~s[107] ^ maj(s[244], s[23], s[160]) ^ (ca & s[196]) ^ (cb & ks) ^ m;
      dout[j] = din[j] ^ ks;
      s = {f, s[292:1]};
    end
    s_n = s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   s_q <= '0;
    else if (clr) s_q <= '0;
    else if (en)  s_q <= s_n;
  end
endmodule
