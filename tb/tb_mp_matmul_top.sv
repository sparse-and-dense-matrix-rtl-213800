// tb_mp_matmul_top: end-to-end test of both engines at the default
// configuration (BW = 16, BH = 2, four sparse threads, 4096-word shared
// dimension). For each precision in turn, one random weight matrix A is
// pruned, packed densely for the GEMM engine and in CSR form for the SPMM
// engine, and both engines multiply it with the same dense B at the same
// time. Every result of both is compared with an independently computed
// product, so the two engines must also agree with each other.
//
// The test counts how often each mechanism of the design occurred and
// fails if one never did: precision switches between operations, both
// engines busy at once, a last GEMM block narrower than BW, a shared
// dimension that is not a multiple of BH, stalled inputs and outputs of
// both engines, empty sparse rows, and loading of the next B column by the
// sparse engine while it still computes the current one.
module tb_mp_matmul_top;
  import tb_ref_pkg::*;

  localparam int NT = 4, BW = 16, BH = 2;
  localparam int N = 12, M = 37, P = 20;       // A is N x M words, B is M x P
  localparam int MAXS = 8192, MAXNZ = 1024;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // dense engine
  logic        gemm_start, gemm_busy, gemm_done;
  logic [1:0]  gemm_precision;
  logic [31:0] gemm_sn, gemm_sm, gemm_sp;
  logic        gemm_a_valid, gemm_a_ready, gemm_b_valid, gemm_b_ready, gemm_c_valid, gemm_c_ready;
  logic [31:0] gemm_a_data, gemm_b_data;
  logic [15:0] gemm_c_data;
  // sparse engine
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

  bit [31:0] amat [N][M];
  bit [31:0] bmat [M][P];
  int        cref [N][P];
  int        rowptr [N + 1];
  int        colidx [MAXNZ];
  bit [31:0] vals [MAXNZ];
  int        total;

  bit [31:0] ga_str [MAXS], gb_str [MAXS], sb_str [MAXS];
  int        rp_str [MAXS];
  bit [15:0] gc_exp [MAXS];
  bit [15:0] sc_exp [NT][MAXS];
  int ga_len, gb_len, gc_len, sb_len, rp_len;
  int ga_idx, gb_idx, gc_idx, sb_idx, rp_idx;
  int sc_len [NT], sc_idx [NT], ptr [NT];
  bit clr = 0, stall = 0;

  // mechanism counters
  int n_prec_switch, n_both_busy, n_narrow_block, n_odd_sm;
  int n_gemm_in_stall, n_gemm_out_stall, n_spmm_in_stall, n_spmm_out_stall;
  int n_empty_rows, n_overlap;

  always @(posedge clk) begin
    int na, nb, nc, nsb, nr;
    na  = ga_idx + ((gemm_a_valid && gemm_a_ready) ? 1 : 0);
    nb  = gb_idx + ((gemm_b_valid && gemm_b_ready) ? 1 : 0);
    nsb = sb_idx + ((spmm_b_valid && spmm_b_ready) ? 1 : 0);
    nr  = rp_idx + ((spmm_rp_valid && spmm_rp_ready) ? 1 : 0);
    if (clr) begin na = 0; nb = 0; nsb = 0; nr = 0; end
    ga_idx <= na; gb_idx <= nb; sb_idx <= nsb; rp_idx <= nr;
    gemm_a_valid  <= (na < ga_len) && (!stall || (gemm_a_valid && !gemm_a_ready) || ($urandom % 4 != 0));
    gemm_b_valid  <= (nb < gb_len) && (!stall || (gemm_b_valid && !gemm_b_ready) || ($urandom % 4 != 0));
    spmm_b_valid  <= (nsb < sb_len) && (!stall || (spmm_b_valid && !spmm_b_ready) || ($urandom % 4 != 0));
    spmm_rp_valid <= (nr < rp_len) && (!stall || (spmm_rp_valid && !spmm_rp_ready) || ($urandom % 4 != 0));
    gemm_a_data   <= ga_str[na % MAXS];
    gemm_b_data   <= gb_str[nb % MAXS];
    spmm_b_data   <= sb_str[nsb % MAXS];
    spmm_rp_data  <= rp_str[nr % MAXS];
    gemm_c_ready  <= !stall || ($urandom % 3 != 0);
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
      spmm_col_valid[t] <= (np < total) && (!stall || (spmm_col_valid[t] && !spmm_col_ready[t]) || ($urandom % 4 != 0));
      spmm_val_valid[t] <= (np < total) && (!stall || (spmm_val_valid[t] && !spmm_val_ready[t]) || ($urandom % 4 != 0));
      spmm_col_data[t]  <= colidx[np % MAXNZ];
      spmm_val_data[t]  <= vals[np % MAXNZ];
      spmm_c_ready[t]   <= !stall || ($urandom % 3 != 0);
      if (rst_n && spmm_c_valid[t] && spmm_c_ready[t]) begin
        checks++;
        if (sc_idx[t] >= sc_len[t] || spmm_c_data[t] != sc_exp[t][sc_idx[t]]) begin
          failures++;
          if (failures < 10) $display("FAIL spmm thread %0d result %0d: got %h exp %h", t, sc_idx[t], spmm_c_data[t], sc_exp[t][sc_idx[t]]);
        end
        sc_idx[t] <= sc_idx[t] + 1;
      end
      if (clr) sc_idx[t] <= 0;
      if (spmm_c_valid[t] && !spmm_c_ready[t]) n_spmm_out_stall++;
      if (spmm_col_ready[t] && !spmm_col_valid[t]) n_spmm_in_stall++;
    end
    if (gemm_busy && spmm_busy) n_both_busy++;
    if ((gemm_a_ready && !gemm_a_valid) || (gemm_b_ready && !gemm_b_valid)) n_gemm_in_stall++;
    if (gemm_c_valid && !gemm_c_ready) n_gemm_out_stall++;
    if (spmm_b_valid && spmm_b_ready && dut.u_spmm.cstate >= 2'd2) n_overlap++;
  end

  task automatic run(int p, int sparsity, bit st);
    int nga = 0, ngb = 0, ngc = 0, nsb = 0, nr = 0;
    ga_len = 0; gb_len = 0; sb_len = 0; rp_len = 0;
    repeat (2) @(posedge clk);
    // pruned weights: a word survives with probability 100 - sparsity %
    for (int i = 0; i < N; i++)
      for (int k = 0; k < M; k++)
        amat[i][k] = (i % 4 != 1 && int'($urandom % 100) >= sparsity) ? rand_word(p, 30) : 32'h0;
    for (int k = 0; k < M; k++) for (int j = 0; j < P; j++) bmat[k][j] = rand_word(p, 10);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < P; j++) begin
        cref[i][j] = 0;
        for (int k = 0; k < M; k++) cref[i][j] += ref_dot(p, amat[i][k], bmat[k][j]);
      end
    // CSR of the non-zero words
    total = 0;
    for (int i = 0; i < N; i++) begin
      rowptr[i] = total;
      for (int k = 0; k < M; k++)
        if (amat[i][k] != 0) begin colidx[total] = k; vals[total] = amat[i][k]; total++; end
      if (rowptr[i] == total) n_empty_rows++;
    end
    rowptr[N] = total;
    // dense engine streams
    for (int j0 = 0; j0 < P; j0 += BW) begin
      int nc = (P - j0 < BW) ? P - j0 : BW;
      if (nc < BW) n_narrow_block++;
      for (int j = j0; j < j0 + nc; j++) for (int k = 0; k < M; k++) gb_str[ngb++] = bmat[k][j];
      for (int i = 0; i < N; i++) begin
        for (int k = 0; k < M; k++) ga_str[nga++] = amat[i][k];
        for (int j = j0; j < j0 + nc; j++) gc_exp[ngc++] = 16'(cref[i][j]);
      end
    end
    if (M % BH != 0) n_odd_sm++;
    // sparse engine streams; row i belongs to thread floor(rowptr[i]*NT/nnz)
    for (int t = 0; t < NT; t++) sc_len[t] = 0;
    for (int j = 0; j < P; j++) begin
      for (int k = 0; k < M; k++) sb_str[nsb++] = bmat[k][j];
      for (int i = 0; i <= N; i++) rp_str[nr++] = rowptr[i];
      for (int i = 0; i < N; i++) begin
        int t = (total == 0) ? 0 : (rowptr[i] * NT) / total;
        if (t > NT - 1) t = NT - 1;
        sc_exp[t][sc_len[t]++] = 16'(cref[i][j]);
      end
    end
    stall <= st; clr <= 1;
    @(posedge clk);
    clr <= 0;
    ga_len = nga; gb_len = ngb; gc_len = ngc; sb_len = nsb; rp_len = nr;
    if (p != int'(gemm_precision)) n_prec_switch++;
    gemm_precision <= 2'(p); gemm_sn <= N; gemm_sm <= M; gemm_sp <= P;
    spmm_precision <= 2'(p); spmm_sn <= N; spmm_sm <= M; spmm_sp <= P; spmm_nnz <= total;
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
  endtask

  task automatic need(string what, int count);
    checks++;
    $display("%-40s %0d", what, count);
    if (count == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gemm_start = 0; spmm_start = 0; gemm_precision = 0; spmm_precision = 0;
    gemm_sn = 0; gemm_sm = 0; gemm_sp = 0; spmm_sn = 0; spmm_sm = 0; spmm_sp = 0; spmm_nnz = 0;
    ga_len = 0; gb_len = 0; gc_len = 0; sb_len = 0; rp_len = 0; total = 0;
    ga_idx = 0; gb_idx = 0; gc_idx = 0; sb_idx = 0; rp_idx = 0;
    for (int t = 0; t < NT; t++) begin sc_len[t] = 0; sc_idx[t] = 0; ptr[t] = 0; end
    n_prec_switch = 0; n_both_busy = 0; n_narrow_block = 0; n_odd_sm = 0;
    n_gemm_in_stall = 0; n_gemm_out_stall = 0; n_spmm_in_stall = 0; n_spmm_out_stall = 0;
    n_empty_rows = 0; n_overlap = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 80, 0);    // 8 bit weights, 80 % of words pruned
    run(1, 90, 1);    // 4 bit, with stalls
    run(2, 70, 1);    // ternary
    run(0, 95, 0);
    need("precision switches", n_prec_switch);
    need("cycles with both engines busy", n_both_busy);
    need("GEMM blocks narrower than BW", n_narrow_block);
    need("runs with sm not a multiple of BH", n_odd_sm);
    need("GEMM input stall cycles", n_gemm_in_stall);
    need("GEMM output stall cycles", n_gemm_out_stall);
    need("SPMM non-zero stream stall cycles", n_spmm_in_stall);
    need("SPMM output stall cycles", n_spmm_out_stall);
    need("empty sparse rows", n_empty_rows);
    need("B words loaded while computing", n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
