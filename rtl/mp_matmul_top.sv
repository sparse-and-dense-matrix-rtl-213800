// mp_matmul_top: the dense (GEMM) and the sparse (SPMM) multi-precision
// matrix multipliers side by side, as a host processor sees them.
//
// The two accelerators are independent: a host offloads each matrix
// product, layer by layer, to whichever engine suits its shape, sparsity
// and precision, and may run both at once. Each keeps its own control
// inputs, its own precision and its own data streams, brought out here
// with the prefixes gemm_ and spmm_. See gemm_core and spmm_core for the
// stream orders and timing. The memory system and the host itself are
// outside this design; every stream is a plain valid/ready port.
//
// Parameters default to the published configuration: BW = 16, BH = 2,
// four sparse threads and 4096 words along the shared dimension for both.
module mp_matmul_top
  import mp_pkg::*;
#(
  parameter int unsigned BW       = 16,
  parameter int unsigned BH       = 2,
  parameter int unsigned NT       = 4,
  parameter int unsigned SM_MAX   = 4096,
  parameter int unsigned RL_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // dense engine
  input  logic              gemm_start,
  input  logic [1:0]        gemm_precision,
  input  logic [DIM_W-1:0]  gemm_sn,
  input  logic [DIM_W-1:0]  gemm_sm,
  input  logic [DIM_W-1:0]  gemm_sp,
  output logic              gemm_busy,
  output logic              gemm_done,
  input  logic              gemm_a_valid,
  output logic              gemm_a_ready,
  input  logic [WORD_W-1:0] gemm_a_data,
  input  logic              gemm_b_valid,
  output logic              gemm_b_ready,
  input  logic [WORD_W-1:0] gemm_b_data,
  output logic              gemm_c_valid,
  input  logic              gemm_c_ready,
  output logic [OUT_W-1:0]  gemm_c_data,
  // sparse engine
  input  logic              spmm_start,
  input  logic [1:0]        spmm_precision,
  input  logic [DIM_W-1:0]  spmm_sn,
  input  logic [DIM_W-1:0]  spmm_sm,
  input  logic [DIM_W-1:0]  spmm_sp,
  input  logic [DIM_W-1:0]  spmm_nnz,
  output logic              spmm_busy,
  output logic              spmm_done,
  input  logic              spmm_rp_valid,
  output logic              spmm_rp_ready,
  input  logic [DIM_W-1:0]  spmm_rp_data,
  input  logic              spmm_b_valid,
  output logic              spmm_b_ready,
  input  logic [WORD_W-1:0] spmm_b_data,
  output logic [NT-1:0]     spmm_a_base_valid,
  output logic [DIM_W-1:0]  spmm_a_base [NT],
  input  logic [NT-1:0]     spmm_col_valid,
  output logic [NT-1:0]     spmm_col_ready,
  input  logic [DIM_W-1:0]  spmm_col_data [NT],
  input  logic [NT-1:0]     spmm_val_valid,
  output logic [NT-1:0]     spmm_val_ready,
  input  logic [WORD_W-1:0] spmm_val_data [NT],
  output logic [NT-1:0]     spmm_c_valid,
  input  logic [NT-1:0]     spmm_c_ready,
  output logic [OUT_W-1:0]  spmm_c_data [NT]
);

  gemm_core #(.BW(BW), .BH(BH), .SM_MAX(SM_MAX)) u_gemm (
    .clk, .rst_n,
    .start     (gemm_start),
    .precision (gemm_precision),
    .sn        (gemm_sn),
    .sm        (gemm_sm),
    .sp        (gemm_sp),
    .busy      (gemm_busy),
    .done      (gemm_done),
    .a_valid   (gemm_a_valid),
    .a_ready   (gemm_a_ready),
    .a_data    (gemm_a_data),
    .b_valid   (gemm_b_valid),
    .b_ready   (gemm_b_ready),
    .b_data    (gemm_b_data),
    .c_valid   (gemm_c_valid),
    .c_ready   (gemm_c_ready),
    .c_data    (gemm_c_data)
  );

  spmm_core #(.NT(NT), .SM_MAX(SM_MAX), .RL_DEPTH(RL_DEPTH)) u_spmm (
    .clk, .rst_n,
    .start        (spmm_start),
    .precision    (spmm_precision),
    .sn           (spmm_sn),
    .sm           (spmm_sm),
    .sp           (spmm_sp),
    .nnz          (spmm_nnz),
    .busy         (spmm_busy),
    .done         (spmm_done),
    .rp_valid     (spmm_rp_valid),
    .rp_ready     (spmm_rp_ready),
    .rp_data      (spmm_rp_data),
    .b_valid      (spmm_b_valid),
    .b_ready      (spmm_b_ready),
    .b_data       (spmm_b_data),
    .a_base_valid (spmm_a_base_valid),
    .a_base       (spmm_a_base),
    .col_valid    (spmm_col_valid),
    .col_ready    (spmm_col_ready),
    .col_data     (spmm_col_data),
    .val_valid    (spmm_val_valid),
    .val_ready    (spmm_val_ready),
    .val_data     (spmm_val_data),
    .c_valid      (spmm_c_valid),
    .c_ready      (spmm_c_ready),
    .c_data       (spmm_c_data)
  );

endmodule
