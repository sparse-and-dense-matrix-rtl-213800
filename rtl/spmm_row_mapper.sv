// spmm_row_mapper: input stage and row mapping layer of the sparse
// multiplier. It turns the CSR row_index stream into per-thread streams of
// row lengths and spreads the rows over NT hardware threads so that each
// thread gets about nnz/NT of the non-zeros.
//
// How it works. After start the mapper takes sn+1 row_index entries. For
// each row i it forms the length rp[i+1]-rp[i] and hands it to the thread
// t that owns the row. A row belongs to the thread whose share of the
// non-zeros contains the row's first non-zero: t is the number of
// thresholds j*nnz/NT (j = 1..NT-1) that rp[i] has reached, which the
// hardware finds with NT-1 comparisons of rp[i]*NT with j*nnz rather than a
// division. As rp never decreases, every thread gets one contiguous band of
// rows, the bands follow each other in thread order, and rows of length
// zero go with the band they fall in. When a thread receives the first row
// of its band, base_valid[t] pulses with base_data[t] = rp[i], the offset of
// the band's first non-zero, so that the thread's col_index/values reader
// can start there.
//
// Interface: valid/ready stream rp_* in; one valid/ready stream rl_*[t] per
// thread out, fed straight from rp_* (one row per cycle when the target
// thread can accept). done pulses for one cycle after the last entry.
//
// From the published design: that the hardware distributes equal numbers
// of non-zeros to the threads itself, that a row's length is the difference
// of two adjacent row_index entries, and the number of threads (4). The
// assignment rule and the base offsets are this design's own.
module spmm_row_mapper
  import mp_pkg::*;
#(
  parameter int unsigned NT = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [DIM_W-1:0]     sn,
  input  logic [DIM_W-1:0]     nnz,
  output logic                 busy,
  output logic                 done,
  input  logic                 rp_valid,
  output logic                 rp_ready,
  input  logic [DIM_W-1:0]     rp_data,
  output logic [NT-1:0]        rl_valid,
  input  logic [NT-1:0]        rl_ready,
  output logic [DIM_W-1:0]     rl_data,
  output logic [NT-1:0]        base_valid,
  output logic [DIM_W-1:0]     base_data
);

  localparam int unsigned TW = (NT > 1) ? $clog2(NT) : 1;

  typedef enum logic [1:0] {M_IDLE, M_FIRST, M_ROWS} mstate_e;

  mstate_e          state;
  logic [DIM_W-1:0] sn_q, nnz_q;
  logic [DIM_W-1:0] prev;       // rp[i]
  logic [DIM_W-1:0] row;        // i
  logic [NT-1:0]    seen;       // thread already has a row in this pass
  logic [TW-1:0]    tsel;       // owner of row i

  // Owner of a row whose first non-zero has offset r.
  always_comb begin
    tsel = '0;
    if (nnz_q != '0)
      for (int j = 1; j < NT; j++)
        if (64'(prev) * 64'(NT) >= 64'(j) * 64'(nnz_q)) tsel = TW'(j);
  end

  wire fire = rp_valid && rp_ready;

  assign busy      = (state != M_IDLE);
  assign rp_ready  = (state == M_FIRST) || ((state == M_ROWS) && rl_ready[tsel]);
  assign rl_data   = rp_data - prev;
  assign base_data = prev;

  always_comb begin
    rl_valid   = '0;
    base_valid = '0;
    if (state == M_ROWS) begin
      rl_valid[tsel]   = rp_valid;
      base_valid[tsel] = fire && !seen[tsel];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_IDLE;
      done  <= 1'b0;
      sn_q  <= '0;
      nnz_q <= '0;
      prev  <= '0;
      row   <= '0;
      seen  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        M_IDLE: if (start) begin
          sn_q  <= sn;
          nnz_q <= nnz;
          row   <= '0;
          seen  <= '0;
          state <= M_FIRST;
        end
        M_FIRST: if (fire) begin
          prev <= rp_data;
          if (sn_q == '0) begin
            state <= M_IDLE;
            done  <= 1'b1;
          end else begin
            state <= M_ROWS;
          end
        end
        M_ROWS: if (fire) begin
          prev       <= rp_data;
          seen[tsel] <= 1'b1;
          row        <= row + 1'b1;
          if (row == sn_q - 1) begin
            state <= M_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  // row_index must never decrease.
  a_rp_monotonic: assert property (@(posedge clk) disable iff (!rst_n)
    (state == M_ROWS && rp_valid) |-> (rp_data >= prev));

endmodule
