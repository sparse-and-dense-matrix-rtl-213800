// tb_spmm_row_mapper: feeds random CSR row_index arrays (with empty rows,
// very long rows and the all-empty matrix) to the row mapper with random
// stalls on every stream, and checks that each thread receives exactly the
// lengths of the rows it owns, in order, and one base offset equal to the
// first non-zero of its band. The owner of a row is worked out here by
// division: floor(rp[i] * 4 / nnz), at most 3.
module tb_spmm_row_mapper;
  localparam int NT = 4;
  localparam int MAXN = 512;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              start, busy, done;
  logic [31:0]       sn, nnz;
  logic              rp_valid, rp_ready;
  logic [31:0]       rp_data;
  logic [NT-1:0]     rl_valid, rl_ready, base_valid;
  logic [31:0]       rl_data, base_data;

  spmm_row_mapper #(.NT(NT)) dut (.*);

  int checks = 0, failures = 0;
  int rp [MAXN + 1];
  int exp_len [NT][MAXN];
  int exp_n [NT];
  int exp_base [NT];
  int got_n [NT];
  int got_base [NT];
  int got_nbase [NT];
  int rp_len, rp_idx;
  bit stall, clr = 0;
  int dones;

  always @(posedge clk) begin
    int nr;
    nr = rp_idx + ((rp_valid && rp_ready) ? 1 : 0);
    if (clr) nr = 0;
    rp_idx   <= nr;
    rp_valid <= (nr < rp_len) && (!stall || (rp_valid && !rp_ready) || ($urandom % 3 != 0));
    rp_data  <= rp[nr % (MAXN + 1)];
    for (int t = 0; t < NT; t++) begin
      rl_ready[t] <= !stall || ($urandom % 2 != 0);
      if (rst_n && rl_valid[t] && rl_ready[t]) begin
        checks++;
        if (got_n[t] >= exp_n[t] || int'(rl_data) != exp_len[t][got_n[t]]) begin
          failures++;
          if (failures < 10) $display("FAIL thread %0d row %0d: got %0d", t, got_n[t], rl_data);
        end
        got_n[t]++;
      end
      if (base_valid[t]) begin
        got_nbase[t]++;
        got_base[t] = int'(base_data);
      end
    end
    if (done) dones++;
  end

  task automatic run(int n, int total, bit st);
    int k;
    rp_len = 0;
    repeat (2) @(posedge clk);
    // random non-decreasing row_index ending at total
    rp[0] = 0;
    for (int i = 1; i < n; i++) rp[i] = (total == 0) ? 0 : int'($urandom % (total + 1));
    rp[n] = total;
    for (int i = 1; i < n; i++)        // sort
      for (int j = i; j > 1 && rp[j] < rp[j-1]; j--) begin
        k = rp[j]; rp[j] = rp[j-1]; rp[j-1] = k;
      end
    if (n > 3) rp[2] = rp[1];          // an empty row
    for (int t = 0; t < NT; t++) begin
      exp_n[t] = 0; exp_base[t] = -1; got_n[t] = 0; got_nbase[t] = 0;
    end
    for (int i = 0; i < n; i++) begin
      int t = (total == 0) ? 0 : (rp[i] * NT) / total;
      if (t > NT - 1) t = NT - 1;
      if (exp_n[t] == 0) exp_base[t] = rp[i];
      exp_len[t][exp_n[t]++] = rp[i+1] - rp[i];
    end
    dones = 0;
    stall <= st; clr <= 1;
    @(posedge clk);
    clr <= 0;
    sn <= n; nnz <= total; start <= 1;
    @(posedge clk);
    start <= 0;
    rp_len = n + 1;
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      checks++;
      if (got_n[t] != exp_n[t] || (exp_n[t] > 0 && (got_nbase[t] != 1 || got_base[t] != exp_base[t]))
          || (exp_n[t] == 0 && got_nbase[t] != 0)) begin
        failures++;
        $display("FAIL thread %0d: rows %0d/%0d bases %0d base %0d/%0d", t, got_n[t], exp_n[t],
                 got_nbase[t], got_base[t], exp_base[t]);
      end
    end
    checks++;
    if (dones != 1 || rp_idx != n + 1) begin failures++; $display("FAIL done %0d rp %0d", dones, rp_idx); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; sn = 0; nnz = 0; stall = 0; rp_len = 0; rp_idx = 0; dones = 0;
    for (int t = 0; t < NT; t++) begin exp_n[t] = 0; got_n[t] = 0; got_nbase[t] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(40, 400, 0);
    run(40, 400, 1);
    run(100, 37, 1);      // fewer non-zeros than rows
    run(8, 1000, 1);      // long rows
    run(20, 0, 0);        // all rows empty
    run(1, 5, 0);         // one row
    run(300, 3000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
