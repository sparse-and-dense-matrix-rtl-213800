// gemm_core: tiled and vectorized dense matrix multiplier C = A * B with
// run-time precision (8, 4 or 2 bit values packed in 32 bit words).
//
// How it works. Instead of holding both matrices on chip, the core keeps a
// block of B that is BW columns wide and SM words deep, and one row of A.
// Every compute cycle it reads BH consecutive words of the A row and, for
// each of the BW columns, the BH matching words of the B block, so that
// BW*BH packed dot products (each 4, 8 or 16 multiply-adds, see mp_dot32)
// feed BW accumulators. After ceil(SM/BH) cycles the row is done and the BW
// results leave one per cycle. The next row of A is then loaded into the
// same buffer; when all SN rows are done, the next block of B is loaded.
// The B block sits in BW*BH banks and the A row in BH banks so that all the
// words needed in one cycle come from different banks.
//
// Interface. start (one cycle, while idle) latches precision and the shape:
// sn rows of A, sp columns of B, sm words along the shared dimension (one
// word holds 4, 8 or 16 values). The data then moves on three valid/ready
// streams:
//   b_*  for each block of BW columns (fewer for the last block), column by
//        column, the sm words of that column of B, packed along the shared
//        dimension in the same way as the rows of A;
//   a_*  for each block of B, the whole of A again, row by row, sm words each;
//   c_*  for each block, for each row i, the results C[i][j] for the block's
//        columns j in increasing order, 16 bit two's complement, wrapping.
// done pulses for one cycle after the last result is accepted; a shape
// with a zero dimension finishes at once.
//
// Timing, with streams that never stall: per block of n columns, n*sm
// cycles to load B, then per row sm cycles to load A, ceil(sm/BH) compute
// cycles, one cycle for the last accumulation and n output cycles.
//
// From the published design: the row/block tiling, BW, BH and their values
// (16 and 2), the limit of 4096 words along the shared dimension, the 32 bit
// packed inputs, the 2 bit precision input and the unpacked 16 bit output.
// This design's own choices: the stream order above, the handshakes, the
// loading of each row before computing it (no overlap of loading and
// computing), the wrap-around 16 bit accumulators and the banking.
module gemm_core
  import mp_pkg::*;
#(
  parameter int unsigned BW     = 16,    // columns of B per block
  parameter int unsigned BH     = 2,     // words of the A row per cycle
  parameter int unsigned SM_MAX = 4096   // largest sm, in 32 bit words
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [1:0]        precision,
  input  logic [DIM_W-1:0]  sn,
  input  logic [DIM_W-1:0]  sm,
  input  logic [DIM_W-1:0]  sp,
  output logic              busy,
  output logic              done,
  input  logic              a_valid,
  output logic              a_ready,
  input  logic [WORD_W-1:0] a_data,
  input  logic              b_valid,
  output logic              b_ready,
  input  logic [WORD_W-1:0] b_data,
  output logic              c_valid,
  input  logic              c_ready,
  output logic [OUT_W-1:0]  c_data
);

  localparam int unsigned DEPTH = (SM_MAX + BH - 1) / BH;   // words per bank
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned HW    = (BH > 1) ? $clog2(BH) : 1;
  localparam int unsigned JW    = (BW > 1) ? $clog2(BW) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_LOADB, S_LOADA, S_COMP, S_LAST, S_OUT
  } state_e;

  state_e             state;
  prec_e              prec_q;
  logic [DIM_W-1:0]   sn_q, sm_q, sp_q;
  logic [DIM_W-1:0]   col0;        // first column of the current block
  logic [JW:0]        ncols;       // columns in the current block
  logic [DIM_W-1:0]   row;         // current row of A
  logic [DIM_W-1:0]   kcnt;        // words loaded of the current column/row
  logic [HW-1:0]      hcnt;        // bank of the next word
  logic [AW-1:0]      acnt;        // address of the next word
  logic [JW-1:0]      jcnt;        // column being loaded / result being sent
  logic [AW-1:0]      kk;          // compute step
  logic [DIM_W-1:0]   nsteps;      // ceil(sm / BH)

  // Pipeline register between the buffer reads and the accumulators.
  logic [WORD_W-1:0]  rd_a [BH];
  logic [WORD_W-1:0]  rd_b [BW][BH];
  logic [BH-1:0]      rd_mask;
  logic               rd_v;

  logic [OUT_W-1:0]   acc [BW];
  logic signed [17:0] dots [BW][BH];

  wire a_fire = a_valid && a_ready;
  wire b_fire = b_valid && b_ready;
  wire c_fire = c_valid && c_ready;

  assign busy    = (state != S_IDLE);
  assign a_ready = (state == S_LOADA);
  assign b_ready = (state == S_LOADB);
  assign c_valid = (state == S_OUT);
  assign c_data  = acc[jcnt];

  // The BW x BH array of packed multipliers.
  for (genvar j = 0; j < BW; j++) begin : g_col
    for (genvar h = 0; h < BH; h++) begin : g_lane
      mp_dot32 u_dot (
        .prec (prec_q),
        .a    (rd_a[h]),
        .b    (rd_b[j][h]),
        .dot  (dots[j][h])
      );
    end
  end

  // Width of the block that starts at column c.
  function automatic logic [JW:0] block_cols(logic [DIM_W-1:0] p, logic [DIM_W-1:0] c);
    return ((p - c) >= DIM_W'(BW)) ? (JW+1)'(BW) : (JW+1)'(p - c);
  endfunction

  // Sum over the BH unmasked lanes of each column.
  logic [OUT_W-1:0]   acc_add [BW];

  always_comb begin
    for (int j = 0; j < BW; j++) begin
      acc_add[j] = '0;
      for (int h = 0; h < BH; h++)
        if (rd_mask[h]) acc_add[j] = acc_add[j] + OUT_W'(dots[j][h]);
    end
  end

  // Buffers: the B block in BW x BH banks, the A row in BH banks. Word k
  // of a column (or of the row) lives in bank k mod BH at address k / BH.
  // All banks are read at address kk every cycle.
  for (genvar h = 0; h < BH; h++) begin : g_abank
    logic [WORD_W-1:0] amem [DEPTH];
    always_ff @(posedge clk) begin
      if (a_fire && hcnt == HW'(h)) amem[acnt] <= a_data;
      rd_a[h] <= amem[kk];
    end
    for (genvar j = 0; j < BW; j++) begin : g_bbank
      logic [WORD_W-1:0] bmem [DEPTH];
      always_ff @(posedge clk) begin
        if (b_fire && jcnt == JW'(j) && hcnt == HW'(h)) bmem[acnt] <= b_data;
        rd_b[j][h] <= bmem[kk];
      end
    end
  end

  // Control.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      done    <= 1'b0;
      prec_q  <= PREC_8;
      sn_q    <= '0;
      sm_q    <= '0;
      sp_q    <= '0;
      col0    <= '0;
      ncols   <= '0;
      row     <= '0;
      kcnt    <= '0;
      hcnt    <= '0;
      acnt    <= '0;
      jcnt    <= '0;
      kk      <= '0;
      nsteps  <= '0;
      rd_v    <= 1'b0;
      rd_mask <= '0;
      for (int j = 0; j < BW; j++) acc[j] <= '0;
    end else begin
      done <= 1'b0;
      rd_v <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            prec_q <= prec_e'(precision);
            sn_q   <= sn;
            sm_q   <= sm;
            sp_q   <= sp;
            nsteps <= (sm + DIM_W'(BH - 1)) / DIM_W'(BH);
            col0   <= '0;
            ncols  <= block_cols(sp, '0);
            kcnt   <= '0;
            hcnt   <= '0;
            acnt   <= '0;
            jcnt   <= '0;
            if (sn == '0 || sm == '0 || sp == '0) done  <= 1'b1;
            else                                  state <= S_LOADB;
          end
        end

        S_LOADB: if (b_fire) begin
          if (kcnt == sm_q - 1) begin
            kcnt <= '0;
            hcnt <= '0;
            acnt <= '0;
            if (JW'(jcnt) == JW'(ncols - 1'b1)) begin
              jcnt  <= '0;
              row   <= '0;
              state <= S_LOADA;
            end else begin
              jcnt <= jcnt + 1'b1;
            end
          end else begin
            kcnt <= kcnt + 1'b1;
            if (hcnt == HW'(BH - 1)) begin
              hcnt <= '0;
              acnt <= acnt + 1'b1;
            end else begin
              hcnt <= hcnt + 1'b1;
            end
          end
        end

        S_LOADA: if (a_fire) begin
          if (kcnt == sm_q - 1) begin
            kcnt  <= '0;
            hcnt  <= '0;
            acnt  <= '0;
            kk    <= '0;
            for (int j = 0; j < BW; j++) acc[j] <= '0;
            state <= S_COMP;
          end else begin
            kcnt <= kcnt + 1'b1;
            if (hcnt == HW'(BH - 1)) begin
              hcnt <= '0;
              acnt <= acnt + 1'b1;
            end else begin
              hcnt <= hcnt + 1'b1;
            end
          end
        end

        S_COMP: begin
          // Issue the reads of step kk; lanes past the end of the row are
          // masked off.
          rd_v <= 1'b1;
          for (int h = 0; h < BH; h++)
            rd_mask[h] <= ((DIM_W'(kk) * DIM_W'(BH) + DIM_W'(h)) < sm_q);
          kk <= kk + 1'b1;
          if (DIM_W'(kk) == nsteps - 1) state <= S_LAST;
        end

        S_LAST: begin
          jcnt  <= '0;
          state <= S_OUT;
        end

        S_OUT: if (c_fire) begin
          if (JW'(jcnt) == JW'(ncols - 1'b1)) begin
            jcnt <= '0;
            if (row == sn_q - 1) begin
              if (col0 + DIM_W'(BW) >= sp_q) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else begin
                col0  <= col0 + DIM_W'(BW);
                ncols <= block_cols(sp_q, col0 + DIM_W'(BW));
                state <= S_LOADB;
              end
            end else begin
              row   <= row + 1'b1;
              state <= S_LOADA;
            end
          end else begin
            jcnt <= jcnt + 1'b1;
          end
        end

        default: state <= S_IDLE;
      endcase

      // Accumulate the products read in the previous cycle.
      if (rd_v)
        for (int j = 0; j < BW; j++) acc[j] <= acc[j] + acc_add[j];
    end
  end

  // Handshake rule: a result that is offered stays offered, unchanged,
  // until it is taken.
  a_c_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (c_valid && !c_ready) |=> (c_valid && $stable(c_data)));

endmodule
