// tb_rotsym_top: end-to-end test of the top level. The unprotected and the
// masked AES-128 cores encrypt at the same time (FIPS-197 vector plus random
// blocks with fresh random input masks), the masked core alternately with its
// PRNG running and stopped, while the byte-parallel S-box is swept over all
// 256 inputs. Ciphertexts and S-box outputs are compared with a software
// reference. Each mechanism of the design is counted through hierarchical
// probes and a mechanism that never happened counts as a failure:
//   shared S-box used by the round function and by the key schedule,
//   ShiftRows, MixColumns (and never in round 10), the G*/F* switch of the
//   masked S-box, pre-charge of the nonlinear inputs while the clock is high,
//   fresh randomness when the PRNG is enabled and constant randomness when
//   it is stopped, and encryption latency (4384 / 6384 cycles).
module tb_rotsym_top;
  import tb_ref_pkg::*;
  import aes_bs_pkg::*;
  localparam int NBLK = 3;

  logic clk = 0, rst_n = 0;
  logic aes_start = 0, aes_pt_i = 0, aes_key_i = 0, aes_ct_o, aes_ct_valid, aes_load_req, aes_done;
  logic aesm_start = 0, aesm_prng_en = 0;
  logic [1:0] aesm_pt_i = 0, aesm_key_i = 0, aesm_ct_o;
  logic aesm_ct_valid, aesm_load_req, aesm_done;
  logic sbox_start = 0;
  logic [7:0] sbox_x = 0, sbox_y;
  logic sbox_done;
  int checks = 0, failures = 0;

  rotsym_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int bitpos(int n);   // AES byte n/8, bit n%8 in a 128-bit word
    return 127 - 8 * (n / 8) - 7 + (n % 8);
  endfunction

  // ---- mechanism counters --------------------------------------------------
  int n_sb_round = 0, n_sb_key = 0, n_sr = 0, n_mc = 0, n_mc_last = 0;
  int n_g = 0, n_f = 0, n_pre_zero = 0, n_pre_bad = 0;
  int n_rnd_change_on = 0, n_rnd_change_off = 0;
  logic [5:0] rnd_prev = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_aes.sb_start && dut.u_aes.sb_src == SB_STATE) n_sb_round++;
      if (dut.u_aes.sb_start && dut.u_aes.sb_src == SB_KEY)   n_sb_key++;
      if (dut.u_aes.phase == PH_SR && dut.u_aes.st_shift != 0) n_sr++;
      if (dut.u_aes.phase == PH_MC) begin
        n_mc++;
        if (dut.u_aes.u_ctrl.round == 4'd10) n_mc_last++;
      end
      if (dut.u_aes_m.u_core.g_sbox.u_sbox.busy) begin
        if (dut.u_aes_m.u_core.g_sbox.u_sbox.sel) n_g++;
        else n_f++;
      end
    end
  end

  // pre-charge: the nonlinear inputs are zero throughout the high clock phase
  always @(negedge clk) rnd_prev <= dut.u_aes_m.rnd;
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (dut.u_aes_m.u_core.g_sbox.u_sbox.pre == 16'h0) n_pre_zero++;
      else n_pre_bad++;
    end
  end
  always @(posedge clk) begin
    if (rst_n) begin
      if (aesm_prng_en && dut.u_aes_m.rnd != rnd_prev) n_rnd_change_on++;
      if (!aesm_prng_en && dut.u_aes_m.rnd != rnd_prev) n_rnd_change_off++;
    end
  end

  // ---- stimulus ----------------------------------------------------------
  task automatic run_aes(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] ct = '0;
    int n = 0, m = 0, cycles = 0;
    @(negedge clk) aes_start = 1;
    @(negedge clk) aes_start = 0;
    while (m < 128) begin
      if (aes_load_req) begin
        aes_pt_i = pt[bitpos(n)]; aes_key_i = key[bitpos(n)]; n++;
      end
      if (n > 0) cycles++;
      if (aes_ct_valid) begin ct[bitpos(m)] = aes_ct_o; m++; end
      @(negedge clk);
    end
    chk(ct === ref_aes128(pt, key), $sformatf("unprotected ct %032x exp %032x", ct, ref_aes128(pt, key)));
    chk(cycles == 4384, $sformatf("unprotected latency %0d", cycles));
  endtask

  task automatic run_aesm(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] ct = '0, ct0 = '0;
    logic [127:0] mp = {$urandom, $urandom, $urandom, $urandom};
    logic [127:0] mk = {$urandom, $urandom, $urandom, $urandom};
    int n = 0, m = 0, cycles = 0;
    @(negedge clk) aesm_start = 1;
    @(negedge clk) aesm_start = 0;
    while (m < 128) begin
      if (aesm_load_req) begin
        aesm_pt_i  = {mp[bitpos(n)], pt[bitpos(n)] ^ mp[bitpos(n)]};
        aesm_key_i = {mk[bitpos(n)], key[bitpos(n)] ^ mk[bitpos(n)]};
        n++;
      end
      if (n > 0) cycles++;
      if (aesm_ct_valid) begin
        ct[bitpos(m)] = ^aesm_ct_o; ct0[bitpos(m)] = aesm_ct_o[0]; m++;
      end
      @(negedge clk);
    end
    chk(ct === ref_aes128(pt, key), $sformatf("masked ct %032x exp %032x", ct, ref_aes128(pt, key)));
    chk(ct0 !== ct, "masked ciphertext share 0 is unmasked");
    chk(cycles == 6384, $sformatf("masked latency %0d", cycles));
  endtask

  task automatic run_sbox();
    for (int v = 0; v < 256; v++) begin
      @(negedge clk) sbox_start = 1; sbox_x = 8'(v);
      @(negedge clk) sbox_start = 0; sbox_x = 8'($urandom);
      while (!sbox_done) @(negedge clk);
      chk(sbox_y === ref_sbox(8'(v)), $sformatf("parallel sbox(%02x) = %02x", v, sbox_y));
    end
  endtask

  initial begin
    logic [127:0] pts [NBLK+1], keys [NBLK+1];
    pts[0]  = 128'h00112233445566778899aabbccddeeff;
    keys[0] = 128'h000102030405060708090a0b0c0d0e0f;
    for (int i = 1; i <= NBLK; i++) begin
      pts[i]  = {$urandom, $urandom, $urandom, $urandom};
      keys[i] = {$urandom, $urandom, $urandom, $urandom};
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i <= NBLK; i++) begin
      aesm_prng_en = (i % 2 == 0);
      fork
        run_aes(pts[i], keys[i]);
        run_aesm(pts[i], keys[i]);
        if (i == 0) run_sbox();
      join
    end
    // mechanism report
    $display("round-function S-box uses   %0d", n_sb_round);
    $display("key-schedule S-box uses     %0d", n_sb_key);
    $display("ShiftRows cycles            %0d", n_sr);
    $display("MixColumns cycles           %0d (round 10: %0d)", n_mc, n_mc_last);
    $display("masked S-box G*/F* cycles   %0d / %0d", n_g, n_f);
    $display("pre-charged high phases     %0d (not zero: %0d)", n_pre_zero, n_pre_bad);
    $display("randomness changes on/off   %0d / %0d", n_rnd_change_on, n_rnd_change_off);
    chk(n_sb_round == 160 * (NBLK + 1), "round-function S-box uses");
    chk(n_sb_key == 40 * (NBLK + 1), "key-schedule S-box uses");
    chk(n_sr == 24 * 10 * (NBLK + 1), "ShiftRows happened");
    chk(n_mc == 32 * 9 * (NBLK + 1) && n_mc_last == 0, "MixColumns in rounds 1-9 only");
    chk(n_g > 0 && n_f > 0, "masked S-box used both G* and F*");
    chk(n_pre_zero > 0 && n_pre_bad == 0, "pre-charge");
    chk(n_rnd_change_on > 0, "randomness refreshed with PRNG enabled");
    chk(n_rnd_change_off == 0, "randomness frozen with PRNG disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
