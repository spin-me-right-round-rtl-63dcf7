// tb_aes_ctrl: runs the controller alone for two encryptions at both S-box
// latencies (16 and 26) and checks the schedule: total cycles, phase lengths
// and order, 128 load and 128 output cycles, 200 S-box starts per
// encryption (160 round function + 40 key schedule), MixColumns in rounds
// 1-9 only, the round constant bits of every round, and the ShiftRows and
// key-read patterns.
module tb_aes_ctrl;
  import aes_bs_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  phase_t         phase [2];
  logic [3:0]     st_shift [2], key_shift [2];
  st_src_t [3:0]  st_src [2];
  key_src_t [3:0] key_src [2];
  logic [1:0]     st_row [2], key_row [2];
  logic [4:0]     key_addr [2];
  logic           rcon_bit [2], sb_start [2], load_req [2], ct_valid [2], done [2];
  logic [2:0]     bit_idx [2];
  sb_src_t        sb_src [2];
  logic [3:0]     round [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    aes_ctrl #(.SB_LAT(g == 0 ? 16 : 26)) dut (
      .clk, .rst_n, .start,
      .phase(phase[g]), .st_shift(st_shift[g]), .st_src(st_src[g]), .st_row(st_row[g]),
      .key_shift(key_shift[g]), .key_src(key_src[g]), .key_row(key_row[g]),
      .key_addr(key_addr[g]), .rcon_bit(rcon_bit[g]), .bit_idx(bit_idx[g]),
      .sb_start(sb_start[g]), .sb_src(sb_src[g]), .load_req(load_req[g]),
      .ct_valid(ct_valid[g]), .done(done[g]), .round(round[g])
    );
  end

  task automatic run(int g, int lat);
    int total = 0, n_load = 0, n_out = 0, n_sb = 0, n_sbk = 0, n_mc = 0, n_done = 0;
    int n_sub = 0, n_key = 0, n_acc = 0, n_sr = 0, n_mc_r10 = 0;
    int sr_shifts [4] = '{0, 0, 0, 0};
    logic [7:0] rc_got [11];
    logic [7:0] rc_exp = 8'h01;
    phase_t prev = PH_IDLE;
    for (int r = 0; r < 11; r++) rc_got[r] = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!(phase[g] == PH_IDLE && total > 0)) begin
      total++;
      if (load_req[g]) n_load++;
      if (ct_valid[g]) n_out++;
      if (done[g]) n_done++;
      if (sb_start[g]) begin n_sb++; if (sb_src[g] == SB_KEY) n_sbk++; end
      if (phase[g] == PH_SUB) n_sub++;
      if (phase[g] == PH_KEY) n_key++;
      if (phase[g] == PH_ACC) n_acc++;
      if (phase[g] == PH_SR) begin n_sr++; for (int i = 0; i < 4; i++) sr_shifts[i] += st_shift[g][i]; end
      if (phase[g] == PH_MC) begin n_mc++; if (round[g] == 10) n_mc_r10++; end
      if (rcon_bit[g]) rc_got[round[g]][bit_idx[g]] = 1'b1;
      if (phase[g] == PH_KEY && sb_start[g])
        chk(key_addr[g] == ((key_row[g] == 3) ? 16 : 24), "key read address");
      if (phase[g] != prev) begin
        // allowed transitions
        chk((prev == PH_IDLE && phase[g] == PH_LOAD) || (prev == PH_LOAD && phase[g] == PH_SUB) ||
            (prev == PH_SUB && phase[g] == PH_KEY) || (prev == PH_KEY && phase[g] == PH_ACC) ||
            (prev == PH_ACC && phase[g] == PH_SR) || (prev == PH_SR && phase[g] == PH_MC) ||
            (prev == PH_SR && phase[g] == PH_OUT && round[g] == 10) ||
            (prev == PH_MC && phase[g] == PH_SUB), "phase order");
        prev = phase[g];
      end
      @(negedge clk);
      if (total > 10000) break;
    end
    chk(total == 128 + 10 * (16 * lat + 8 + 4 * lat + 8 + 48) + 9 * 32 + 128, $sformatf("total %0d", total));
    chk(n_load == 128, "load cycles");
    chk(n_out == 128, "output cycles");
    chk(n_done == 1, "done pulses");
    chk(n_sb == 200, $sformatf("sbox starts %0d", n_sb));
    chk(n_sbk == 40, "key-schedule sbox starts");
    chk(n_sub == 10 * (16 * lat + 8), "SUB length");
    chk(n_key == 10 * (4 * lat + 8), "KEY length");
    chk(n_acc == 240 && n_sr == 240, "ACC/SR length");
    chk(n_mc == 9 * 32 && n_mc_r10 == 0, "MixColumns rounds 1-9 only");
    for (int i = 0; i < 4; i++) chk(sr_shifts[i] == 10 * 8 * i, $sformatf("ShiftRows row %0d", i));
    for (int r = 1; r <= 10; r++) begin
      chk(rc_got[r] == rc_exp, $sformatf("rcon round %0d got %02x exp %02x", r, rc_got[r], rc_exp));
      rc_exp = {rc_exp[6:0], 1'b0} ^ (rc_exp[7] ? 8'h1b : 8'h00);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2; k++) begin
      fork
        run(0, 16);
        run(1, 26);
      join
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
