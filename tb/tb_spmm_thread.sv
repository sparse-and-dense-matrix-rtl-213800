// tb_spmm_thread: drives one sparse compute thread with random CSR rows
// (including empty rows) against two different x vectors held in the two
// banks of its local memory, in all three precisions, and compares each y
// with an independently computed row sum (16 bit, wrapping). Stall-free runs
// also check the cost of len + 3 cycles per row (2 for an empty row); other
// runs stall the col/value and result streams at random.
module tb_spmm_thread;
  import mp_pkg::*;
  import tb_ref_pkg::*;

  localparam int SM_MAX = 64;
  localparam int MAXN = 2048;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]  prec;
  logic        x_we, x_wbank, x_rbank;
  logic [31:0] x_waddr, x_wdata;
  logic        rl_valid, rl_ready, col_valid, col_ready, val_valid, val_ready;
  logic [31:0] rl_data, col_data, val_data;
  logic        y_valid, y_ready, idle;
  logic [15:0] y_data;

  spmm_thread #(.SM_MAX(SM_MAX)) dut (
    .clk, .rst_n, .prec(prec_e'(prec)),
    .x_we, .x_wbank, .x_waddr, .x_wdata, .x_rbank,
    .rl_valid, .rl_ready, .rl_data,
    .col_valid, .col_ready, .col_data,
    .val_valid, .val_ready, .val_data,
    .y_valid, .y_ready, .y_data, .idle
  );

  int checks = 0, failures = 0;
  bit [31:0] xv [2][SM_MAX];
  int rl_str [MAXN];
  bit [31:0] col_str [MAXN], val_str [MAXN];
  bit [15:0] y_exp [MAXN];
  int rl_len, nz_len, y_len, rl_idx, nz_idx, y_idx, cycles;
  bit stall, clr = 0;

  always @(posedge clk) begin
    int nr, nz;
    nr = rl_idx + ((rl_valid && rl_ready) ? 1 : 0);
    nz = nz_idx + ((col_valid && col_ready) ? 1 : 0);
    if (clr) begin nr = 0; nz = 0; end
    rl_idx    <= nr;
    nz_idx    <= nz;
    rl_valid  <= (nr < rl_len);
    rl_data   <= rl_str[nr % MAXN];
    col_valid <= (nz < nz_len) && (!stall || (col_valid && !col_ready) || ($urandom % 3 != 0));
    val_valid <= (nz < nz_len) && (!stall || (val_valid && !val_ready) || ($urandom % 3 != 0));
    col_data  <= col_str[nz % MAXN];
    val_data  <= val_str[nz % MAXN];
    y_ready   <= !stall || ($urandom % 3 != 0);
    if (rst_n && y_valid && y_ready) begin
      checks++;
      if (y_idx >= y_len || y_data != y_exp[y_idx]) begin
        failures++;
        if (failures < 10) $display("FAIL y %0d: got %h exp %h", y_idx, y_data, y_exp[y_idx]);
      end
      y_idx <= y_idx + 1;
    end
    if (!idle || (rl_valid && rl_ready)) cycles <= cycles + 1;
    if (clr) begin y_idx <= 0; cycles <= 0; end
  end

  task automatic load_x(int p, int bank, int m);
    for (int k = 0; k < m; k++) begin
      xv[bank][k] = rand_word(p, 20);
      @(posedge clk);
      x_we <= 1; x_wbank <= 1'(bank); x_waddr <= k; x_wdata <= xv[bank][k];
    end
    @(posedge clk);
    x_we <= 0;
  endtask

  task automatic run(int p, int bank, int m, int rows, int maxlen, bit st);
    int exp_cycles = 0;
    int nrl = 0, nnz = 0;
    rl_len = 0; nz_len = 0; y_len = 0;
    repeat (2) @(posedge clk);
    for (int r = 0; r < rows; r++) begin
      int len = int'($urandom % (maxlen + 1));
      int s = 0;
      if (r == 1) len = 0;
      rl_str[nrl++] = len;
      for (int e = 0; e < len; e++) begin
        int c = int'($urandom % m);
        bit [31:0] v = rand_word(p, 10);
        col_str[nnz] = c;
        val_str[nnz] = v;
        nnz++;
        s += ref_dot(p, v, xv[bank][c]);
      end
      y_exp[y_len++] = 16'(s);
      exp_cycles += (len == 0) ? 2 : len + 3;
    end
    @(posedge clk);
    prec <= 2'(p); x_rbank <= 1'(bank); stall <= st; clr <= 1;
    @(posedge clk);
    clr <= 0;
    rl_len = nrl;
    nz_len = nnz;
    @(posedge clk);
    while (y_idx < y_len) @(posedge clk);
    @(posedge clk);
    checks++;
    if (nz_idx != nz_len || !idle) begin failures++; $display("FAIL pair count %0d/%0d", nz_idx, nz_len); end
    if (!st) begin
      checks++;
      if (cycles != exp_cycles) begin failures++; $display("FAIL cycles %0d expected %0d", cycles, exp_cycles); end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prec = 0; x_we = 0; x_wbank = 0; x_rbank = 0; x_waddr = 0; x_wdata = 0;
    rl_len = 0; nz_len = 0; y_len = 0; stall = 0;
    rl_idx = 0; nz_idx = 0; y_idx = 0; cycles = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      load_x(p, 0, SM_MAX);
      load_x(p, 1, SM_MAX);
      run(p, 0, SM_MAX, 20, 12, 0);
      run(p, 1, SM_MAX, 20, 12, 0);
      run(p, p % 2, SM_MAX, 30, 20, 1);
    end
    // a long row: one non-zero per cycle
    run(0, 1, SM_MAX, 1, 300, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
