// tb_spmm_core: multiplies random sparse matrices in CSR form (with empty
// rows) by random dense matrices in all three precisions and compares every
// result of every thread with an independently computed product (16 bit,
// wrapping). A memory model serves each thread's col_index/values reads
// from the base offset the core announces. Runs with random stalls on all
// streams are mixed with stall-free runs; the test also checks that loading
// the next column of B overlapped the work on the current one.
module tb_spmm_core;
  import tb_ref_pkg::*;

  localparam int NT = 4, SM_MAX = 32;
  localparam int MAXR = 64, MAXNZ = 2048, MAXS = 4096;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              start, busy, done;
  logic [1:0]        precision;
  logic [31:0]       sn, sm, sp, nnz;
  logic              rp_valid, rp_ready, b_valid, b_ready;
  logic [31:0]       rp_data, b_data;
  logic [NT-1:0]     a_base_valid, col_valid, col_ready, val_valid, val_ready, c_valid, c_ready;
  logic [31:0]       a_base [NT];
  logic [31:0]       col_data [NT], val_data [NT];
  logic [15:0]       c_data [NT];

  spmm_core #(.NT(NT), .SM_MAX(SM_MAX), .RL_DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;

  // the matrices
  bit [31:0] bmat [SM_MAX][16];
  int        rowptr [MAXR + 1];
  int        colidx [MAXNZ];
  bit [31:0] vals [MAXNZ];
  int        total;
  // streams
  bit [31:0] b_str [MAXS];
  int        rp_str [MAXS];
  int        b_len, rp_len, b_idx, rp_idx;
  int        ptr [NT];
  bit [15:0] c_exp [NT][MAXS];
  int        c_len [NT], c_idx [NT];
  bit        stall, clr = 0;
  int        overlaps;

  always @(posedge clk) begin
    int nb, nr;
    nb = b_idx + ((b_valid && b_ready) ? 1 : 0);
    nr = rp_idx + ((rp_valid && rp_ready) ? 1 : 0);
    if (clr) begin nb = 0; nr = 0; end
    b_idx    <= nb;
    rp_idx   <= nr;
    b_valid  <= (nb < b_len) && (!stall || (b_valid && !b_ready) || ($urandom % 3 != 0));
    rp_valid <= (nr < rp_len) && (!stall || (rp_valid && !rp_ready) || ($urandom % 3 != 0));
    b_data   <= b_str[nb % MAXS];
    rp_data  <= rp_str[nr % MAXS];
    for (int t = 0; t < NT; t++) begin
      int np;
      np = ptr[t] + ((col_valid[t] && col_ready[t]) ? 1 : 0);
      if (a_base_valid[t]) np = int'(a_base[t]);
      ptr[t]       <= np;
      col_valid[t] <= (np < total) && (!stall || (col_valid[t] && !col_ready[t]) || ($urandom % 4 != 0));
      val_valid[t] <= (np < total) && (!stall || (val_valid[t] && !val_ready[t]) || ($urandom % 4 != 0));
      col_data[t]  <= colidx[np % MAXNZ];
      val_data[t]  <= vals[np % MAXNZ];
      c_ready[t]   <= !stall || ($urandom % 3 != 0);
      if (rst_n && c_valid[t] && c_ready[t]) begin
        checks++;
        if (c_idx[t] >= c_len[t] || c_data[t] != c_exp[t][c_idx[t]]) begin
          failures++;
          if (failures < 10) $display("FAIL thread %0d result %0d: got %h exp %h", t, c_idx[t], c_data[t], c_exp[t][c_idx[t]]);
        end
        c_idx[t] <= c_idx[t] + 1;
      end
      if (clr) c_idx[t] <= 0;
    end
    // B words accepted while the threads work on an earlier column
    if (b_valid && b_ready && dut.cstate >= 2'd2) overlaps++;
  end

  task automatic run(int p, int n, int m, int q, int density, bit st);
    b_len = 0; rp_len = 0;
    repeat (2) @(posedge clk);
    // sparse A in CSR, dense B
    total = 0;
    for (int i = 0; i < n; i++) begin
      rowptr[i] = total;
      if (i % 5 != 2)                       // every fifth row is empty
        for (int k = 0; k < m; k++)
          if (int'($urandom % 100) < density) begin
            bit [31:0] w;
            w = rand_word(p, 50);
            if (w == 0) w = 32'h1;
            colidx[total] = k;
            vals[total] = w;
            total++;
          end
    end
    rowptr[n] = total;
    for (int k = 0; k < m; k++) for (int j = 0; j < q; j++) bmat[k][j] = rand_word(p, 20);
    // streams and expected results
    for (int t = 0; t < NT; t++) c_len[t] = 0;
    begin
      int nb = 0, nr = 0;
      for (int j = 0; j < q; j++) begin
        for (int k = 0; k < m; k++) b_str[nb++] = bmat[k][j];
        for (int i = 0; i <= n; i++) rp_str[nr++] = rowptr[i];
        for (int i = 0; i < n; i++) begin
          int t = (total == 0) ? 0 : (rowptr[i] * NT) / total;
          int s = 0;
          if (t > NT - 1) t = NT - 1;
          for (int e = rowptr[i]; e < rowptr[i+1]; e++) s += ref_dot(p, vals[e], bmat[colidx[e]][j]);
          c_exp[t][c_len[t]++] = 16'(s);
        end
      end
      stall <= st; clr <= 1;
      @(posedge clk);
      clr <= 0;
      b_len = nb;
      rp_len = nr;
    end
    precision <= 2'(p); sn <= n; sm <= m; sp <= q; nnz <= total;
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    @(posedge clk iff done);
    @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      checks++;
      if (c_idx[t] != c_len[t]) begin failures++; $display("FAIL thread %0d gave %0d of %0d results", t, c_idx[t], c_len[t]); end
    end
    checks++;
    if (b_idx != b_len || rp_idx != rp_len) begin failures++; $display("FAIL B %0d/%0d rowptr %0d/%0d", b_idx, b_len, rp_idx, rp_len); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; precision = 0; sn = 0; sm = 0; sp = 0; nnz = 0; stall = 0;
    b_len = 0; rp_len = 0; b_idx = 0; rp_idx = 0; total = 0; overlaps = 0;
    for (int t = 0; t < NT; t++) begin ptr[t] = 0; c_len[t] = 0; c_idx[t] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 24, 16, 5, 30, 0);
    run(1, 40, 32, 4, 10, 1);
    run(2, 17, 9, 6, 50, 1);
    run(0, 3, 4, 3, 100, 0);     // fewer rows than threads
    run(2, 30, 32, 3, 2, 0);     // very sparse
    run(1, 12, 20, 7, 40, 1);
    checks++;
    if (overlaps == 0) begin failures++; $display("FAIL loading of B never overlapped computing"); end
    $display("B words loaded during computing: %0d", overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
