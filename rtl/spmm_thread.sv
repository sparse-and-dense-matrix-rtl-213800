// spmm_thread: compute engine of one hardware thread of the sparse
// multiplier. It computes y = A_rows * x for a band of rows of a CSR
// matrix A and one dense column x of B.
//
// How it works. The thread keeps its own copy of x (SM_MAX words, packed
// like the values). It takes the length of its next row from the row stream
// (the difference of two adjacent row_index entries, worked out upstream),
// then takes that many (col_index, value) pairs. For each pair it reads
// x[col_index] from the local memory, multiplies it with the packed value
// (4, 8 or 16 multiply-adds, see mp_dot32) and adds the sum to an
// accumulator. When the row is complete the accumulator leaves as one 16 bit
// y on the output stream; a row of length zero yields 0.
//
// The x memory is one array holding two banks (bank b, word k at address
// b*SM_MAX + k) so that the next column of B can be written
// (x_we, x_wbank, x_waddr, x_wdata) while the current one is read (x_rbank).
//
// Interface: valid/ready streams rl_* (row lengths), col_* and val_* (taken
// together, one pair per cycle) and y_*. idle is high when no row is in
// progress and no result waits.
//
// Timing: one non-zero per cycle inside a row; a row costs its length plus
// three cycles (take the length, last accumulation, hand out y).
//
// From the published design: the structure (row_index, col_index and values
// streams, x in local memory, multiply, accumulate, row-done test, y out)
// and the 16 bit results. This design's own
// choices: the handshakes, the double-banked x memory, the one-cycle memory
// read and the wrap-around 16 bit accumulator.
module spmm_thread
  import mp_pkg::*;
#(
  parameter int unsigned SM_MAX = 4096   // words of x per bank, a power of two
) (
  input  logic              clk,
  input  logic              rst_n,
  input  prec_e             prec,
  // write port of the local copy of x
  input  logic              x_we,
  input  logic              x_wbank,
  input  logic [DIM_W-1:0]  x_waddr,
  input  logic [WORD_W-1:0] x_wdata,
  input  logic              x_rbank,
  // row lengths
  input  logic              rl_valid,
  output logic              rl_ready,
  input  logic [DIM_W-1:0]  rl_data,
  // CSR col_index and values
  input  logic              col_valid,
  output logic              col_ready,
  input  logic [DIM_W-1:0]  col_data,
  input  logic              val_valid,
  output logic              val_ready,
  input  logic [WORD_W-1:0] val_data,
  // results
  output logic              y_valid,
  input  logic              y_ready,
  output logic [OUT_W-1:0]  y_data,
  output logic              idle
);

  localparam int unsigned XAW = (SM_MAX > 1) ? $clog2(SM_MAX) : 1;

  typedef enum logic [1:0] {T_IDLE, T_MAC, T_LAST, T_OUT} tstate_e;

  tstate_e            state;
  logic [DIM_W-1:0]   rem;          // pairs of the row still to take
  logic [OUT_W-1:0]   acc;
  logic [WORD_W-1:0]  xmem [2*SM_MAX];   // bank b, word k at b*SM_MAX + k
  logic [WORD_W-1:0]  x_q;          // x[col] read for the pair in flight
  logic [WORD_W-1:0]  v_q;          // value of the pair in flight
  logic               p_v;          // a pair is in flight
  logic signed [17:0] dot;

  wire take = (state == T_MAC) && col_valid && val_valid;

  assign rl_ready  = (state == T_IDLE);
  assign col_ready = (state == T_MAC) && val_valid;
  assign val_ready = (state == T_MAC) && col_valid;
  assign y_valid   = (state == T_OUT);
  assign y_data    = acc;
  assign idle      = (state == T_IDLE);

  mp_dot32 u_dot (.prec(prec), .a(v_q), .b(x_q), .dot(dot));

  always_ff @(posedge clk) begin
    if (x_we) xmem[{x_wbank, XAW'(x_waddr)}] <= x_wdata;
    if (take) begin
      x_q <= xmem[{x_rbank, XAW'(col_data)}];
      v_q <= val_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      rem   <= '0;
      acc   <= '0;
      p_v   <= 1'b0;
    end else begin
      p_v <= take;
      if (p_v) acc <= acc + OUT_W'(dot);
      unique case (state)
        T_IDLE: if (rl_valid) begin
          acc <= '0;
          rem <= rl_data;
          state <= (rl_data == '0) ? T_OUT : T_MAC;
        end
        T_MAC: if (take) begin
          rem <= rem - 1'b1;
          if (rem == DIM_W'(1)) state <= T_LAST;
        end
        T_LAST: state <= T_OUT;
        T_OUT:  if (y_ready) state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

  a_y_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (y_valid && !y_ready) |=> (y_valid && $stable(y_data)));

endmodule
