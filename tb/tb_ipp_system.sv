// tb_ipp_system: end-to-end proof of authorship with every parameter at its
// default.  The verifier probes a database of five codewords (one unknown,
// then those of the AES, VGA, LFSR and RS-232 cores), each followed by the
// commands off, zeros, normal and deselect.  During every hold time the PC
// model sends a block and the VGA pins are watched; the observed behaviour
// must match the core that the active codeword belongs to.  The test also
// counts how often each receiver mechanism occurred (rising and falling
// supply edges, repeated reports of one slow edge, boundary edges, end of
// frame, rejected codeword, every command) and fails if one never did.
//
// The probing order (codeword, then off, zeros, normal, deselect) follows the
// published procedure; the database contents and hold time are chosen here.
module tb_ipp_system;
  timeunit 1ns; timeprecision 1ps;
  import ipp_pkg::*;
  localparam logic [127:0] CT0 = 128'hc6a13b37878f5b826f4f8162a1c8d879;
  localparam logic [CW_BITS-1:0] CW_UNKNOWN = 80'h1234_5678_9ABC_DEF0_1357;
  typedef enum int {C_NONE, C_AES, C_VGA, C_LFSR, C_RS232} core_t;
  localparam core_t MAP[5] = '{C_NONE, C_AES, C_VGA, C_LFSR, C_RS232};

  logic clk = 0, rst_n = 0, start = 0, poff = 0;
  logic [3:0] ncw = 4'd5;
  logic [7:0][CW_BITS-1:0] db;
  logic busy, done, strobe;
  logic [3:0] idx;
  cmd_t cmd;
  logic pc_tx, txd, hs, vs;
  logic [3:0] rgb;
  prot_state_t s_u, s_a, s_l, s_v;
  logic [15:0] vcc;
  int checks = 0, failures = 0;

  // mechanism counters (AES core's receiver is watched)
  int n_rise = 0, n_fall = 0, n_repeat = 0, n_boundary = 0, n_frame_end = 0;
  int n_reject = 0, n_cmd[4] = '{0, 0, 0, 0};
  int n_vreset = 0;

  always #10 clk = ~clk;

  ipp_system dut (.clk(clk), .rst_n(rst_n), .start(start), .cw_db(db), .cw_count(ncw),
    .power_off(poff), .busy(busy), .done(done), .cur_index(idx), .cur_cmd(cmd),
    .cmd_strobe(strobe), .rxd(pc_tx), .txd(txd), .vga_hsync_n(hs), .vga_vsync_n(vs),
    .vga_rgb(rgb), .st_rs232(s_u), .st_aes(s_a), .st_lfsr(s_l), .st_vga(s_v), .vcc_mv(vcc));

  tb_uart_pc pc  (.clk(clk), .txd(pc_tx), .rxd(txd));
  tb_vga_mon mon (.clk(clk), .hsync_n(hs), .rgb(rgb));

  // receiver mechanisms
  logic fa_d = 0;
  always @(posedge clk) if (rst_n) begin
    fa_d <= dut.u_fpga.u_prot_aes.u_rx.frame_active;
    if (fa_d && !dut.u_fpga.u_prot_aes.u_rx.frame_active) n_frame_end++;
    if (dut.u_fpga.u_prot_aes.u_rx.edge_valid) begin
      if (dut.u_fpga.u_prot_aes.u_rx.edge_kind == EDGE_RISE) n_rise++;
      if (dut.u_fpga.u_prot_aes.u_rx.edge_kind == EDGE_FALL) n_fall++;
      if (dut.u_fpga.u_prot_aes.u_rx.edge_kind != EDGE_SAME) begin
        if ((dut.u_fpga.u_prot_aes.u_rx.edge_kind == EDGE_RISE) ==
            dut.u_fpga.u_prot_aes.u_rx.u_dec.level)
          n_repeat++;
        else if (dut.u_fpga.u_prot_aes.u_rx.frame_active &&
                 dut.u_fpga.u_prot_aes.u_rx.u_dec.since_mid < 12'(3 * SC_HALF_BIT_CYCLES / 2))
          n_boundary++;
      end
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t entry %0d cmd %0d: %s", $time, idx, cmd, msg); end
  endtask

  function automatic prot_state_t exp_state(input cmd_t c);
    unique case (c)
      CMD_OFF:    return ST_OFF;
      CMD_ZEROS:  return ST_ZEROS;
      CMD_NORMAL: return ST_NORMAL;
      default:    return ST_AUTH;
    endcase
  endfunction

  // what one hold time must show
  task automatic observe(input core_t core, input cmd_t c);
    logic [127:0] pt, got, exp_ct;
    int n;
    prot_state_t e;
    e = (core == C_NONE) ? ST_AUTH : exp_state(c);
    check(s_a == ((core == C_AES)   ? e : ST_AUTH) &&
          s_v == ((core == C_VGA)   ? e : ST_AUTH) &&
          s_l == ((core == C_LFSR)  ? e : ST_AUTH) &&
          s_u == ((core == C_RS232) ? e : ST_AUTH),
          $sformatf("states %0d %0d %0d %0d", s_u, s_a, s_l, s_v));
    n_cmd[c] += (core != C_NONE);
    if (core == C_NONE && c == CMD_OFF) n_reject++;
    pt = {$urandom, $urandom, $urandom, $urandom};
    mon.clear();
    pc.rx_q.delete();
    pc.send_block(pt);
    repeat (90000) @(posedge clk);
    n = pc.rx_q.size();
    got = (n == 16) ? pc.pop_block() : '0;
    pc.rx_q.delete();
    // encryption path
    if ((core == C_AES || core == C_RS232) && c == CMD_OFF)
      check(n == 0, $sformatf("link silent, got %0d bytes", n));
    else if (core == C_AES && c == CMD_ZEROS)
      check(n == 16 && got == '0, $sformatf("all-zero reply, got %0d bytes %h", n, got));
    else if (core == C_RS232 && c == CMD_ZEROS)
      check(n == 16 && got == CT0, $sformatf("cipher of a zero block, got %h", got));
    else begin
      exp_ct = ref_aes(pt);
      check(n == 16 && got == exp_ct, $sformatf("ciphertext %h, expected %h", got, exp_ct));
    end
    // display path
    if (core == C_VGA && c == CMD_OFF)
      check(mon.hs_pulses == 0, "no signal on the monitor");
    else if ((core == C_VGA || core == C_LFSR) && c == CMD_ZEROS)
      check(mon.hs_pulses > 10 && mon.only_black(), "black picture");
    else if (core == C_LFSR && c == CMD_OFF)
      check(mon.hs_pulses > 10 && mon.colours() <= 2, "one-colour picture");
    else
      check(mon.hs_pulses > 10 && mon.colours() > 4, "pseudo-random picture");
  endtask

  // Independent AES-128 reference for key 00 01 .. 0f, written as the
  // textbook byte-wise algorithm with a computed S-box.
  function automatic logic [7:0] xt(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction
  function automatic logic [7:0] sb(input logic [7:0] x);
    logic [7:0] inv = 0, p, q, r;
    if (x != 0)
      for (int c = 1; c < 256; c++) begin
        p = 0; q = x; r = 8'(c);
        for (int i = 0; i < 8; i++) begin if (r[i]) p ^= q; q = xt(q); end
        if (p == 1) begin inv = 8'(c); break; end
      end
    return inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]} ^
           {inv[3:0], inv[7:4]} ^ 8'h63;
  endfunction
  function automatic logic [127:0] ref_aes(input logic [127:0] pt);
    logic [7:0] s[16], t[16], w[176], rc;
    logic [7:0] tmp[4];
    logic [127:0] o;
    for (int i = 0; i < 16; i++) w[i] = 8'(i);
    rc = 1;
    for (int i = 16; i < 176; i += 4) begin
      for (int j = 0; j < 4; j++) tmp[j] = w[i - 4 + j];
      if (i % 16 == 0) begin
        tmp = '{sb(w[i - 3]) ^ rc, sb(w[i - 2]), sb(w[i - 1]), sb(w[i - 4])};
        rc = xt(rc);
      end
      for (int j = 0; j < 4; j++) w[i + j] = w[i - 16 + j] ^ tmp[j];
    end
    for (int i = 0; i < 16; i++) s[i] = pt[127 - 8 * i -: 8] ^ w[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) t[i] = sb(s[(i + 4 * (i % 4)) % 16]);
      for (int c = 0; c < 4; c++) begin
        if (r < 10) begin
          s[4*c]   = xt(t[4*c]) ^ xt(t[4*c+1]) ^ t[4*c+1] ^ t[4*c+2] ^ t[4*c+3];
          s[4*c+1] = t[4*c] ^ xt(t[4*c+1]) ^ xt(t[4*c+2]) ^ t[4*c+2] ^ t[4*c+3];
          s[4*c+2] = t[4*c] ^ t[4*c+1] ^ xt(t[4*c+2]) ^ xt(t[4*c+3]) ^ t[4*c+3];
          s[4*c+3] = xt(t[4*c]) ^ t[4*c] ^ t[4*c+1] ^ t[4*c+2] ^ xt(t[4*c+3]);
        end else
          for (int j = 0; j < 4; j++) s[4*c+j] = t[4*c+j];
      end
      for (int i = 0; i < 16; i++) s[i] ^= w[16 * r + i];
    end
    for (int i = 0; i < 16; i++) o[127 - 8 * i -: 8] = s[i];
    return o;
  endfunction

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    db = '0;
    db[0] = CW_UNKNOWN; db[1] = CW_AES; db[2] = CW_VGA; db[3] = CW_LFSR; db[4] = CW_RS232;
    check(ref_aes(128'h00112233445566778899aabbccddeeff) == 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
          "reference model");
    #35 rst_n = 1;
    repeat (1000) @(posedge clk);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    fork
      forever begin
        @(posedge clk);
        if (strobe) observe(MAP[idx], cmd);
      end
      wait (done);
    join_any
    disable fork;

    // Phase 2: V_reset resets the chip.  The AES core is authenticated and
    // turned off, then the supply is cut during the hold time.  Afterwards
    // every layer must be back in authentication and must ignore the
    // remaining commands of the sequence.
    db[0] = CW_AES; ncw = 4'd1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    @(posedge clk iff (strobe && cmd == CMD_OFF));
    repeat (20000) @(posedge clk);
    check(s_a == ST_OFF, "AES core off before the supply is cut");
    poff = 1;
    wait (vcc == 16'(VRESET_MV));
    repeat (100) @(posedge clk);
    check(s_u == ST_AUTH && s_a == ST_AUTH && s_l == ST_AUTH && s_v == ST_AUTH,
          "V_reset returns every layer to authentication");
    if (s_a == ST_AUTH) n_vreset++;
    poff = 0;
    wait (vcc == 16'(V1_MV));
    fork
      forever begin
        @(posedge clk);
        if (strobe) begin
          repeat (20000) @(posedge clk);
          check(s_a == ST_AUTH, $sformatf("command %0d ignored after reset", cmd));
        end
      end
      wait (done);
    join_any
    disable fork;
    repeat (20000) @(posedge clk);
    check(s_a == ST_AUTH, "still in authentication at the end");
    $display("rise=%0d fall=%0d repeat=%0d boundary=%0d frame_end=%0d reject=%0d vreset=%0d off=%0d zeros=%0d normal=%0d deselect=%0d",
             n_rise, n_fall, n_repeat, n_boundary, n_frame_end, n_reject, n_vreset,
             n_cmd[0], n_cmd[1], n_cmd[2], n_cmd[3]);
    check(n_rise > 0,      "rising edges seen");
    check(n_fall > 0,      "falling edges seen");
    check(n_repeat > 0,    "a slow edge reported twice");
    check(n_boundary > 0,  "boundary edges between equal bits");
    check(n_frame_end >= 25, "end of frame detected");
    check(n_reject > 0,    "unknown codeword rejected");
    check(n_vreset > 0,    "chip reset through V_reset");
    for (int c = 0; c < 4; c++) check(n_cmd[c] == 4, $sformatf("command %0d applied to each core", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
