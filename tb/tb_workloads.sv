// tb_workloads: runs the weight matrices of a small activity-recognition
// network (a dense layer with 384 inputs and 6 outputs, and the input and
// recurrent weights of an LSTM layer with 32 inputs and 128 units, i.e.
// 512 x 32 and 512 x 128 with the four gates stacked, and two 1-D
// convolutions, 512 -> 64 and 64 -> 32 channels, unrolled to 64 x 1536 and
// 32 x 192 with a kernel width of 3 taken as an example) through both engines
// at the default configuration, with a batch of 4 activation columns. Each
// layer is tried at 8, 4 and 2 bit, at 90, 95 and 99 % sparsity, with
// weights pruned one by one and pruned in blocks of one whole word (4, 8 or
// 16 consecutive weights). Every result of both engines is checked against
// an independent reference, and the busy cycles of the two are printed side
// by side. Streams never stall, so the counts show the engines' own speed.
module tb_workloads;
  import tb_ref_pkg::*;

  localparam int NT = 4, BW = 16;
  localparam int P = 4;                       // activation columns
  localparam int MAXA = 32768, MAXR = 512, MAXM = 384;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        gemm_start, gemm_busy, gemm_done;
  logic [1:0]  gemm_precision;
  logic [31:0] gemm_sn, gemm_sm, gemm_sp;
  logic        gemm_a_valid, gemm_a_ready, gemm_b_valid, gemm_b_ready, gemm_c_valid, gemm_c_ready;
  logic [31:0] gemm_a_data, gemm_b_data;
  logic [15:0] gemm_c_data;
  logic        spmm_start, spmm_busy, spmm_done;
  logic [1:0]  spmm_precision;
  logic [31:0] spmm_sn, spmm_sm, spmm_sp, spmm_nnz;
  logic        spmm_rp_valid, spmm_rp_ready, spmm_b_valid, spmm_b_ready;
  logic [31:0] spmm_rp_data, spmm_b_data;
  logic [NT-1:0] spmm_a_base_valid, spmm_col_valid, spmm_col_ready, spmm_val_valid, spmm_val_ready;
  logic [NT-1:0] spmm_c_valid, spmm_c_ready;
  logic [31:0] spmm_a_base [NT];
  logic [31:0] spmm_col_data [NT], spmm_val_data [NT];
  logic [15:0] spmm_c_data [NT];

  mp_matmul_top dut (.*);

  int checks = 0, failures = 0;

  bit [31:0] amat [MAXR][MAXM];
  bit [31:0] bmat [MAXM][P];
  int        cref [MAXR][P];
  int        rowptr [MAXR + 1];
  int        colidx [MAXA];
  bit [31:0] vals [MAXA];
  int        total;

  bit [31:0] ga_str [MAXA], gb_str [MAXM * P], sb_str [MAXM * P];
  int        rp_str [(MAXR + 1) * P];
  bit [15:0] gc_exp [MAXR * P];
  bit [15:0] sc_exp [NT][MAXR * P];
  int ga_len, gb_len, gc_len, sb_len, rp_len;
  int ga_idx, gb_idx, gc_idx, sb_idx, rp_idx;
  int sc_len [NT], sc_idx [NT], ptr [NT];
  int g_cycles, s_cycles;
  bit clr = 0;
  int n_sparse_wins, n_dense_wins;

  always @(posedge clk) begin
    int na, nb, nsb, nr;
    na  = ga_idx + ((gemm_a_valid && gemm_a_ready) ? 1 : 0);
    nb  = gb_idx + ((gemm_b_valid && gemm_b_ready) ? 1 : 0);
    nsb = sb_idx + ((spmm_b_valid && spmm_b_ready) ? 1 : 0);
    nr  = rp_idx + ((spmm_rp_valid && spmm_rp_ready) ? 1 : 0);
    if (clr) begin na = 0; nb = 0; nsb = 0; nr = 0; end
    ga_idx <= na; gb_idx <= nb; sb_idx <= nsb; rp_idx <= nr;
    gemm_a_valid  <= (na < ga_len);
    gemm_b_valid  <= (nb < gb_len);
    spmm_b_valid  <= (nsb < sb_len);
    spmm_rp_valid <= (nr < rp_len);
    gemm_a_data   <= ga_str[na % MAXA];
    gemm_b_data   <= gb_str[nb % (MAXM * P)];
    spmm_b_data   <= sb_str[nsb % (MAXM * P)];
    spmm_rp_data  <= rp_str[nr % ((MAXR + 1) * P)];
    gemm_c_ready  <= 1'b1;
    if (rst_n && gemm_c_valid && gemm_c_ready) begin
      checks++;
      if (gc_idx >= gc_len || gemm_c_data != gc_exp[gc_idx]) begin
        failures++;
        if (failures < 10) $display("FAIL gemm result %0d: got %h exp %h", gc_idx, gemm_c_data, gc_exp[gc_idx]);
      end
      gc_idx <= gc_idx + 1;
    end
    if (clr) gc_idx <= 0;
    for (int t = 0; t < NT; t++) begin
      int np;
      np = ptr[t] + ((spmm_col_valid[t] && spmm_col_ready[t]) ? 1 : 0);
      if (spmm_a_base_valid[t]) np = int'(spmm_a_base[t]);
      ptr[t] <= np;
      spmm_col_valid[t] <= (np < total);
      spmm_val_valid[t] <= (np < total);
      spmm_col_data[t]  <= colidx[np % MAXA];
      spmm_val_data[t]  <= vals[np % MAXA];
      spmm_c_ready[t]   <= 1'b1;
      if (rst_n && spmm_c_valid[t] && spmm_c_ready[t]) begin
        checks++;
        if (sc_idx[t] >= sc_len[t] || spmm_c_data[t] != sc_exp[t][sc_idx[t]]) begin
          failures++;
          if (failures < 10) $display("FAIL spmm thread %0d result %0d: got %h exp %h", t, sc_idx[t], spmm_c_data[t], sc_exp[t][sc_idx[t]]);
        end
        sc_idx[t] <= sc_idx[t] + 1;
      end
      if (clr) sc_idx[t] <= 0;
    end
    if (gemm_busy) g_cycles <= g_cycles + 1;
    if (spmm_busy) s_cycles <= s_cycles + 1;
    if (clr) begin g_cycles <= 0; s_cycles <= 0; end
  end

  // n x e weights (e elements along the shared dimension), precision p,
  // sparsity in %, block = 1 prunes whole words.
  task automatic run(string name, int n, int e, int p, int sparsity, bit block);
    int lanes = 32 / bits_of(p);
    int m = e / lanes;
    int nga = 0, ngb = 0, ngc = 0, nsb = 0, nr = 0;
    ga_len = 0; gb_len = 0; sb_len = 0; rp_len = 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < n; i++)
      for (int k = 0; k < m; k++) begin
        bit [31:0] w = '0;
        if (block) begin
          if (int'($urandom % 1000) >= sparsity * 10) w = rand_word(p, 0);
        end else begin
          for (int f = 0; f < lanes; f++)
            if (int'($urandom % 1000) >= sparsity * 10)
              w |= ($urandom & ((32'd1 << bits_of(p)) - 1)) << (bits_of(p) * f);
        end
        amat[i][k] = w;
      end
    for (int k = 0; k < m; k++) for (int j = 0; j < P; j++) bmat[k][j] = rand_word(p, 0);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < P; j++) begin
        cref[i][j] = 0;
        for (int k = 0; k < m; k++) cref[i][j] += ref_dot(p, amat[i][k], bmat[k][j]);
      end
    total = 0;
    for (int i = 0; i < n; i++) begin
      rowptr[i] = total;
      for (int k = 0; k < m; k++)
        if (amat[i][k] != 0) begin colidx[total] = k; vals[total] = amat[i][k]; total++; end
    end
    rowptr[n] = total;
    for (int j0 = 0; j0 < P; j0 += BW) begin
      int nc = (P - j0 < BW) ? P - j0 : BW;
      for (int j = j0; j < j0 + nc; j++) for (int k = 0; k < m; k++) gb_str[ngb++] = bmat[k][j];
      for (int i = 0; i < n; i++) begin
        for (int k = 0; k < m; k++) ga_str[nga++] = amat[i][k];
        for (int j = j0; j < j0 + nc; j++) gc_exp[ngc++] = 16'(cref[i][j]);
      end
    end
    for (int t = 0; t < NT; t++) sc_len[t] = 0;
    for (int j = 0; j < P; j++) begin
      for (int k = 0; k < m; k++) sb_str[nsb++] = bmat[k][j];
      for (int i = 0; i <= n; i++) rp_str[nr++] = rowptr[i];
      for (int i = 0; i < n; i++) begin
        int t = (total == 0) ? 0 : (rowptr[i] * NT) / total;
        if (t > NT - 1) t = NT - 1;
        sc_exp[t][sc_len[t]++] = 16'(cref[i][j]);
      end
    end
    clr <= 1;
    @(posedge clk);
    clr <= 0;
    ga_len = nga; gb_len = ngb; gc_len = ngc; sb_len = nsb; rp_len = nr;
    gemm_precision <= 2'(p); gemm_sn <= n; gemm_sm <= m; gemm_sp <= P;
    spmm_precision <= 2'(p); spmm_sn <= n; spmm_sm <= m; spmm_sp <= P; spmm_nnz <= total;
    gemm_start <= 1; spmm_start <= 1;
    @(posedge clk);
    gemm_start <= 0; spmm_start <= 0;
    @(posedge clk);
    fork
      @(posedge clk iff gemm_done);
      @(posedge clk iff spmm_done);
    join
    @(posedge clk);
    checks++;
    if (gc_idx != gc_len) begin failures++; $display("FAIL gemm gave %0d of %0d results", gc_idx, gc_len); end
    for (int t = 0; t < NT; t++) begin
      checks++;
      if (sc_idx[t] != sc_len[t]) begin failures++; $display("FAIL spmm thread %0d gave %0d of %0d", t, sc_idx[t], sc_len[t]); end
    end
    if (s_cycles < g_cycles) n_sparse_wins++; else n_dense_wins++;
    $display("%-16s %4dx%-4d %2d bit %2d%% %-7s words %6d stored %6d | GEMM %7d SPMM %7d cycles",
             name, n, e, bits_of(p), sparsity, block ? "block" : "element", n * m, total, g_cycles, s_cycles);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gemm_start = 0; spmm_start = 0; gemm_precision = 0; spmm_precision = 0;
    gemm_sn = 0; gemm_sm = 0; gemm_sp = 0; spmm_sn = 0; spmm_sm = 0; spmm_sp = 0; spmm_nnz = 0;
    ga_len = 0; gb_len = 0; gc_len = 0; sb_len = 0; rp_len = 0; total = 0;
    ga_idx = 0; gb_idx = 0; gc_idx = 0; sb_idx = 0; rp_idx = 0; g_cycles = 0; s_cycles = 0;
    n_sparse_wins = 0; n_dense_wins = 0;
    for (int t = 0; t < NT; t++) begin sc_len[t] = 0; sc_idx[t] = 0; ptr[t] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 3; p++)
      for (int b = 0; b < 2; b++) begin
        run("dense 384->6", 6, 384, p, 90, 1'(b));
        run("lstm input", 512, 32, p, 95, 1'(b));
        run("conv 512->64", 64, 512 * 3, p, 90, 1'(b));
        run("conv 64->32", 32, 64 * 3, p, 90, 1'(b));
        for (int s = 0; s < 3; s++)
          run("lstm recurrent", 512, 128, p, (s == 0) ? 90 : (s == 1) ? 95 : 99, 1'(b));
      end
    $display("runs where SPMM was faster: %0d, GEMM faster: %0d", n_sparse_wins, n_dense_wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
