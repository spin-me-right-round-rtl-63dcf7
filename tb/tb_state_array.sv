// tb_state_array: loads a random state through the plaintext input, applies
// ShiftRows (row i shifted 8i times) and MixColumns (32 cycles) with the
// controls the controller would use, and compares the rows with a byte-level
// model; then shifts random S-box bits into single rows and checks the
// selected serial output every cycle.
module tb_state_array;
  import tb_ref_pkg::*;
  import aes_bs_pkg::*;
  logic clk = 0;
  logic [3:0] shift = 0;
  st_src_t [3:0] src = {4{ST_REC}};
  logic pt_i = 0, sb_i = 0;
  logic [2:0] bit_idx = 0;
  logic [1:0] row_sel = 0;
  logic head;
  logic [3:0] heads;
  int checks = 0, failures = 0;

  state_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] rows [4];   // model, column c in bits [8c+7:8c]
  logic [7:0] st [4][4];   // st[row][col]

  function automatic logic [7:0] getb(int r, int c);
    return rows[r][8*c +: 8];
  endfunction

  task automatic compare_rows(string what);
    // read the rows back through recirculation, 32 cycles
    logic [31:0] got [4];
    for (int b = 0; b < 32; b++) begin
      @(negedge clk);
      shift = 4'hf; src = {4{ST_REC}};
      for (int i = 0; i < 4; i++) got[i][b] = heads[i];
    end
    @(negedge clk);
    shift = 0;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (got[i] !== rows[i]) begin
        failures++;
        $display("%s row %0d got %08x exp %08x", what, i, got[i], rows[i]);
      end
    end
  endtask

  initial begin
    // load
    for (int n = 0; n < 16; n++) begin
      logic [7:0] v;
      v = 8'($urandom);
      for (int b = 0; b < 8; b++) begin
        @(negedge clk);
        shift = 4'(1 << (n % 4)); src = {4{ST_LOAD}}; pt_i = v[b];
        rows[n % 4] = {v[b], rows[n % 4][31:1]};
      end
    end
    @(negedge clk); shift = 0;
    compare_rows("load");
    // ShiftRows
    for (int c = 0; c < 24; c++) begin
      @(negedge clk);
      src = {4{ST_REC}};
      for (int i = 0; i < 4; i++) shift[i] = (c < 8 * i);
    end
    @(negedge clk); shift = 0;
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < 8 * i; k++) rows[i] = {rows[i][0], rows[i][31:1]};
    compare_rows("shiftrows");
    // MixColumns
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) st[r][c] = getb(r, c);
    for (int k = 0; k < 32; k++) begin
      @(negedge clk);
      shift = 4'hf; src = {4{ST_MC}}; bit_idx = 3'(k % 8);
    end
    @(negedge clk); shift = 0;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        rows[r][8*c +: 8] = ref_xtime(st[r][c]) ^ ref_xtime(st[(r+1)%4][c]) ^ st[(r+1)%4][c]
                            ^ st[(r+2)%4][c] ^ st[(r+3)%4][c];
    compare_rows("mixcolumns");
    // S-box input into single rows, with the selected head checked
    for (int k = 0; k < 200; k++) begin
      int r;
      r = $urandom % 4;
      @(negedge clk);
      row_sel = 2'(r);
      #1;
      checks++;
      if (head !== rows[r][0]) begin failures++; $display("head of row %0d wrong", r); end
      shift = 4'(1 << r); src = {4{ST_SBOX}}; sb_i = 1'($urandom);
      rows[r] = {sb_i, rows[r][31:1]};
    end
    @(negedge clk); shift = 0;
    compare_rows("sbox");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
