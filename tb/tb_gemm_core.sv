// tb_gemm_core: runs the dense multiplier on random matrices of several
// shapes in all three precisions, back to back, and compares every result
// with an independently computed product (16 bit, wrapping). Shapes include
// a last block narrower than BW and a shared dimension that is not a
// multiple of BH. Runs with stall-free streams also check the cycle count:
// per block of n columns n*sm + sn*(sm + ceil(sm/BH) + 1 + n) busy cycles.
// Other runs stall the input and output streams at random.
module tb_gemm_core;
  import tb_ref_pkg::*;

  localparam int BW = 4, BH = 2, SM_MAX = 64;
  localparam int MAXW = 4096;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start;
  logic [1:0]  precision;
  logic [31:0] sn, sm, sp;
  logic        busy, done;
  logic        a_valid, a_ready, b_valid, b_ready, c_valid, c_ready;
  logic [31:0] a_data, b_data;
  logic [15:0] c_data;

  gemm_core #(.BW(BW), .BH(BH), .SM_MAX(SM_MAX)) dut (.*);

  int checks = 0, failures = 0;

  bit [31:0] amat [16][SM_MAX];      // A[i][k]
  bit [31:0] bmat [SM_MAX][16];      // B[k][j]
  bit [31:0] a_str [MAXW], b_str [MAXW];
  bit [15:0] c_exp [MAXW];
  int a_len, b_len, c_len, a_idx, b_idx, c_idx;
  bit stall, clr = 0;
  int busy_cycles;

  // stream sources and result sink
  always @(posedge clk) begin
    int na, nb;
    na = a_idx + ((a_valid && a_ready) ? 1 : 0);
    nb = b_idx + ((b_valid && b_ready) ? 1 : 0);
    if (clr) begin
      na = 0;
      nb = 0;
    end
    a_idx   <= na;
    b_idx   <= nb;
    a_valid <= (na < a_len) && (!stall || (a_valid && !a_ready) || ($urandom % 3 != 0));
    b_valid <= (nb < b_len) && (!stall || (b_valid && !b_ready) || ($urandom % 3 != 0));
    a_data  <= a_str[na % MAXW];
    b_data  <= b_str[nb % MAXW];
    c_ready <= !stall || ($urandom % 3 != 0);
    if (rst_n && c_valid && c_ready) begin
      checks++;
      if (c_idx >= c_len || c_data != c_exp[c_idx]) begin
        failures++;
        if (failures < 10) $display("FAIL result %0d: got %h exp %h", c_idx, c_data, c_exp[c_idx]);
      end
      c_idx <= c_idx + 1;
    end
    if (busy) busy_cycles <= busy_cycles + 1;
    if (clr) begin
      c_idx       <= 0;
      busy_cycles <= 0;
    end
  end

  task automatic run(int p, int n, int m, int q, bit st);
    int exp_cycles = 0;
    int steps = (m + BH - 1) / BH;
    $display("run prec=%0d sn=%0d sm=%0d sp=%0d stall=%0d", p, n, m, q, st);
    for (int i = 0; i < n; i++) for (int k = 0; k < m; k++) amat[i][k] = rand_word(p, 30);
    for (int k = 0; k < m; k++) for (int j = 0; j < q; j++) bmat[k][j] = rand_word(p, 30);
    a_len = 0; b_len = 0; c_len = 0;
    for (int j0 = 0; j0 < q; j0 += BW) begin
      int nc = (q - j0 < BW) ? q - j0 : BW;
      for (int j = j0; j < j0 + nc; j++) for (int k = 0; k < m; k++) b_str[b_len++] = bmat[k][j];
      for (int i = 0; i < n; i++) begin
        for (int k = 0; k < m; k++) a_str[a_len++] = amat[i][k];
        for (int j = j0; j < j0 + nc; j++) begin
          int s = 0;
          for (int k = 0; k < m; k++) s += ref_dot(p, amat[i][k], bmat[k][j]);
          c_exp[c_len++] = 16'(s);
        end
      end
      exp_cycles += nc * m + n * (m + steps + 1 + nc);
    end
    @(posedge clk);
    clr <= 1;
    stall <= st;
    @(posedge clk);
    clr <= 0;
    @(posedge clk);
    precision <= 2'(p); sn <= n; sm <= m; sp <= q;
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk iff done);
    @(posedge clk);
    checks++;
    if (c_idx != c_len || a_idx != a_len || b_idx != b_len) begin
      failures++;
      $display("FAIL stream counts c %0d/%0d a %0d/%0d b %0d/%0d", c_idx, c_len, a_idx, a_len, b_idx, b_len);
    end
    if (!st) begin
      checks++;
      if (busy_cycles != exp_cycles) begin
        failures++;
        $display("FAIL cycles %0d expected %0d", busy_cycles, exp_cycles);
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired state=%0d a_idx=%0d/%0d b_idx=%0d/%0d c_idx=%0d/%0d", dut.state, a_idx, a_len, b_idx, b_len, c_idx, c_len);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; precision = 0; sn = 0; sm = 0; sp = 0; stall = 0;
    a_len = 0; b_len = 0; c_len = 0;
    a_idx = 0; b_idx = 0; c_idx = 0; busy_cycles = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 3, 5, 6, 0);     // 8 bit, odd sm, narrow last block
    run(1, 4, 8, 4, 0);     // 4 bit, one full block
    run(2, 2, 7, 9, 0);     // 2 bit (ternary)
    run(0, 5, 16, 10, 1);   // random stalls everywhere
    run(2, 6, 3, 5, 1);
    run(1, 1, 1, 1, 0);     // smallest shape
    run(3, 2, 4, 3, 0);     // code 3 acts as 8 bit
    run(1, 7, SM_MAX, 8, 1); // full shared dimension
    // zero-sized shape: done at once, nothing produced
    @(posedge clk);
    sn <= 0; start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    checks++;
    if (!done || busy) begin failures++; $display("FAIL empty shape"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
