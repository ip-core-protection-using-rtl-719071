// aes128_enc: AES-128 encryption core (FIPS-197), one round per clock cycle.
//
// start loads the plaintext, adds the key and begins ten rounds.  Each cycle
// applies SubBytes, ShiftRows, MixColumns (not in the last round) and
// AddRoundKey, with the round key expanded on the fly from the previous one.
// The S-box is built at elaboration from its definition: the multiplicative
// inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, followed by the affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.
// Byte 0 of a block is bits [127:120]; bytes fill the state column by column.
//
// Interface: clk, rst_n, en (the core stalls while low), start, key, pt;
// ct and done (one-cycle pulse, ct valid from then until the next start),
// busy.  Timing: done comes 10 enabled cycles after start; start is ignored
// while busy.
//
// The published design only names a 128-bit AES core; the iterative
// architecture, the key schedule on the fly and the en/start/done handshake
// are this design's own choices.
module aes128_enc (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] pt,
  output logic [127:0] ct,
  output logic         done,
  output logic         busy
);
  timeunit 1ns; timeprecision 1ps;

  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic logic [255:0][7:0] make_sbox();
    logic [255:0][7:0] t;
    logic [7:0] inv, sq, s;
    for (int v = 0; v < 256; v++) begin
      // inverse = v^254 by square-and-multiply (0 maps to 0)
      inv = 8'h01;
      sq  = 8'(v);
      for (int k = 1; k < 8; k++) begin
        sq  = gmul(sq, sq);       // v^(2^k)
        inv = gmul(inv, sq);      // 254 = 2+4+...+128
      end
      s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^
          {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
      t[v] = s;
    end
    return t;
  endfunction

  localparam logic [255:0][7:0] SBOX = make_sbox();

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  function automatic logic [127:0] next_key(input logic [127:0] k, input logic [7:0] rc);
    logic [31:0] w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = k;
    t  = sub_word({w3[23:0], w3[31:24]}) ^ {rc, 24'h0};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  function automatic logic [127:0] round_fn(input logic [127:0] s, input logic last);
    logic [15:0][7:0] b, r;
    logic [7:0] a0, a1, a2, a3;
    for (int i = 0; i < 16; i++) b[i] = SBOX[s[127-8*i -: 8]];
    // ShiftRows: row r of column c takes row r of column c+r.
    for (int c = 0; c < 4; c++)
      for (int rr = 0; rr < 4; rr++)
        r[4*c+rr] = b[4*((c+rr)%4)+rr];
    if (!last) begin
      for (int c = 0; c < 4; c++) begin
        a0 = r[4*c]; a1 = r[4*c+1]; a2 = r[4*c+2]; a3 = r[4*c+3];
        r[4*c]   = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
        r[4*c+1] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
        r[4*c+2] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
        r[4*c+3] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
      end
    end
    for (int i = 0; i < 16; i++) round_fn[127-8*i -: 8] = r[i];
  endfunction

  logic [127:0] state, rkey, rkey_n;
  logic [7:0]   rcon;
  logic [3:0]   round;

  assign rkey_n = next_key(rkey, rcon);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      rkey  <= '0;
      rcon  <= 8'h01;
      round <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      ct    <= '0;
    end else if (en) begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state <= pt ^ key;
          rkey  <= key;
          rcon  <= 8'h01;
          round <= 4'd1;
          busy  <= 1'b1;
        end
      end else begin
        state <= round_fn(state, round == 4'd10) ^ rkey_n;
        rkey  <= rkey_n;
        rcon  <= xtime(rcon);
        if (round == 4'd10) begin
          busy <= 1'b0;
          done <= 1'b1;
          ct   <= round_fn(state, 1'b1) ^ rkey_n;
        end
        round <= round + 1'b1;
      end
    end
  end
endmodule
