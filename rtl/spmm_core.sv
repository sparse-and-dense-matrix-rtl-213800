// spmm_core: sparse times dense matrix multiplier C = A * B with run-time
// precision. A (the weights) is sparse and given in CSR form over packed
// 32 bit words; B (the activations) is dense and packed the same way along
// the shared dimension.
//
// How it works. The product is computed one column x of B at a time. A
// loader takes the sm words of x from the b_* stream and writes them into
// the local x memory of every thread. A row mapper (spmm_row_mapper) then
// reads the sn+1 row_index entries, splits the rows into NT bands holding
// about nnz/NT non-zeros each and sends every row length to the thread that
// owns it, together with the offset of the first non-zero of each band.
// Each thread (spmm_thread) streams its band's col_index and values, looks
// up x and accumulates one 16 bit result per row on its own output. The x
// memories have two banks, so the loader fills the next column of B while
// the threads still work on the current one; the columns of B thus overlap
// as a two-stage dataflow.
//
// Interface. start (one cycle, while idle) latches precision, sn (rows of
// A), sm (words per row of A, i.e. per column of B), sp (columns of B) and
// nnz (stored words of A). Then, for each column p of B in order:
//   b_*        the sm words of column p (accepted up to one column ahead);
//   rp_*       the sn+1 entries of row_index, again for every column;
//   a_base_*   per thread, a pulse with the offset of its first non-zero;
//              from there col_*[t] and val_*[t] must deliver col_index and
//              values in order, one pair per handshake;
//   c_*[t]     per thread, the results of its rows in increasing row order.
// done pulses one cycle after the last column is finished.
//
// Timing: the threads take one non-zero per cycle each; see spmm_thread and
// spmm_row_mapper for the per-row costs.
//
// From the published design: the CSR streams, the four threads with equal
// shares of the non-zeros assigned by the hardware, one rowptr input, one
// col_index and one values input per thread, a single B input shared by the
// threads, one 16 bit output per thread, the shape and nnz inputs, the
// 4096-word limit and the overlap of the columns of B. This design's own
// choices: the handshakes, the base offsets, re-reading row_index and the
// non-zeros for every column of B, and the two-bank x memory.
module spmm_core
  import mp_pkg::*;
#(
  parameter int unsigned NT       = 4,      // hardware threads
  parameter int unsigned SM_MAX   = 4096,   // largest sm, in 32 bit words
  parameter int unsigned RL_DEPTH = 8       // row-length buffer per thread
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [1:0]        precision,
  input  logic [DIM_W-1:0]  sn,
  input  logic [DIM_W-1:0]  sm,
  input  logic [DIM_W-1:0]  sp,
  input  logic [DIM_W-1:0]  nnz,
  output logic              busy,
  output logic              done,
  // row_index (rowptr)
  input  logic              rp_valid,
  output logic              rp_ready,
  input  logic [DIM_W-1:0]  rp_data,
  // dense matrix B
  input  logic              b_valid,
  output logic              b_ready,
  input  logic [WORD_W-1:0] b_data,
  // per thread: start offset, col_index and values of sparse matrix A
  output logic [NT-1:0]     a_base_valid,
  output logic [DIM_W-1:0]  a_base [NT],
  input  logic [NT-1:0]     col_valid,
  output logic [NT-1:0]     col_ready,
  input  logic [DIM_W-1:0]  col_data [NT],
  input  logic [NT-1:0]     val_valid,
  output logic [NT-1:0]     val_ready,
  input  logic [WORD_W-1:0] val_data [NT],
  // per thread: results
  output logic [NT-1:0]     c_valid,
  input  logic [NT-1:0]     c_ready,
  output logic [OUT_W-1:0]  c_data [NT]
);

  typedef enum logic [1:0] {C_IDLE, C_WAIT, C_RUN, C_FIN} cstate_e;

  prec_e            prec_q;
  logic [DIM_W-1:0] sn_q, sm_q, sp_q, nnz_q;

  // loader
  logic             ld_act;       // columns left to load
  logic [DIM_W-1:0] ld_col, ld_k;
  logic [1:0]       bank_full;

  // compute sequencer
  cstate_e          cstate;
  logic [DIM_W-1:0] cp_col;
  logic             map_start, map_busy, map_done, map_seen_done;

  // mapper to threads
  logic [NT-1:0]    m_rl_valid, m_rl_ready;
  logic [DIM_W-1:0] m_rl_data;
  logic [NT-1:0]    m_base_valid;
  logic [DIM_W-1:0] m_base_data;
  logic [NT-1:0]    t_rl_valid, t_rl_ready, t_idle;
  logic [DIM_W-1:0] t_rl_data [NT];

  wire b_fire = b_valid && b_ready;
  wire ld_bank = ld_col[0];

  assign b_ready = ld_act && !bank_full[ld_bank];
  assign busy    = ld_act || (cstate != C_IDLE);

  spmm_row_mapper #(.NT(NT)) u_mapper (
    .clk, .rst_n,
    .start      (map_start),
    .sn         (sn_q),
    .nnz        (nnz_q),
    .busy       (map_busy),
    .done       (map_done),
    .rp_valid, .rp_ready, .rp_data,
    .rl_valid   (m_rl_valid),
    .rl_ready   (m_rl_ready),
    .rl_data    (m_rl_data),
    .base_valid (m_base_valid),
    .base_data  (m_base_data)
  );

  for (genvar t = 0; t < NT; t++) begin : g_thread
    stream_fifo #(.WIDTH(DIM_W), .DEPTH(RL_DEPTH)) u_rl_fifo (
      .clk, .rst_n,
      .flush     (1'b0),
      .in_valid  (m_rl_valid[t]),
      .in_ready  (m_rl_ready[t]),
      .in_data   (m_rl_data),
      .out_valid (t_rl_valid[t]),
      .out_ready (t_rl_ready[t]),
      .out_data  (t_rl_data[t])
    );

    spmm_thread #(.SM_MAX(SM_MAX)) u_thread (
      .clk, .rst_n,
      .prec      (prec_q),
      .x_we      (b_fire),
      .x_wbank   (ld_bank),
      .x_waddr   (ld_k),
      .x_wdata   (b_data),
      .x_rbank   (cp_col[0]),
      .rl_valid  (t_rl_valid[t]),
      .rl_ready  (t_rl_ready[t]),
      .rl_data   (t_rl_data[t]),
      .col_valid (col_valid[t]),
      .col_ready (col_ready[t]),
      .col_data  (col_data[t]),
      .val_valid (val_valid[t]),
      .val_ready (val_ready[t]),
      .val_data  (val_data[t]),
      .y_valid   (c_valid[t]),
      .y_ready   (c_ready[t]),
      .y_data    (c_data[t]),
      .idle      (t_idle[t])
    );

    assign a_base[t] = m_base_data;
  end

  assign a_base_valid = m_base_valid;

  // The pass over one column is over when the mapper has sent every row and
  // every thread has emptied its buffer and handed out its last result.
  wire pass_over = map_seen_done && !map_busy && (&t_idle) && !(|t_rl_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prec_q        <= PREC_8;
      sn_q          <= '0;
      sm_q          <= '0;
      sp_q          <= '0;
      nnz_q         <= '0;
      ld_act        <= 1'b0;
      ld_col        <= '0;
      ld_k          <= '0;
      bank_full     <= '0;
      cstate        <= C_IDLE;
      cp_col        <= '0;
      map_start     <= 1'b0;
      map_seen_done <= 1'b0;
      done          <= 1'b0;
    end else begin
      done      <= 1'b0;
      map_start <= 1'b0;

      // Loader: one word of B per cycle into the free bank.
      if (b_fire) begin
        if (ld_k == sm_q - 1) begin
          ld_k <= '0;
          bank_full[ld_bank] <= 1'b1;
          ld_col <= ld_col + 1'b1;
          if (ld_col == sp_q - 1) ld_act <= 1'b0;
        end else begin
          ld_k <= ld_k + 1'b1;
        end
      end

      if (map_done) map_seen_done <= 1'b1;

      unique case (cstate)
        C_IDLE: if (start && !ld_act) begin
          prec_q    <= prec_e'(precision);
          sn_q      <= sn;
          sm_q      <= sm;
          sp_q      <= sp;
          nnz_q     <= nnz;
          ld_col    <= '0;
          ld_k      <= '0;
          bank_full <= '0;
          cp_col    <= '0;
          if (sn == '0 || sm == '0 || sp == '0) begin
            done <= 1'b1;
          end else begin
            ld_act <= 1'b1;
            cstate <= C_WAIT;
          end
        end
        C_WAIT: if (bank_full[cp_col[0]]) begin
          map_start     <= 1'b1;
          map_seen_done <= 1'b0;
          cstate        <= C_RUN;
        end
        C_RUN: if (map_seen_done) cstate <= C_FIN;
        C_FIN: if (pass_over) begin
          bank_full[cp_col[0]] <= 1'b0;
          cp_col <= cp_col + 1'b1;
          if (cp_col == sp_q - 1) begin
            cstate <= C_IDLE;
            done   <= 1'b1;
          end else begin
            cstate <= C_WAIT;
          end
        end
        default: cstate <= C_IDLE;
      endcase
    end
  end

  // The loader never writes the bank the threads are reading.
  a_bank_safe: assert property (@(posedge clk) disable iff (!rst_n)
    (b_fire && cstate != C_IDLE && cstate != C_WAIT) |-> (ld_bank != cp_col[0]));

endmodule
