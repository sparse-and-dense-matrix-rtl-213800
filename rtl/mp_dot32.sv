// mp_dot32: multi-precision packed dot product of two 32 bit words.
//
// Each word is split into signed fields of the selected precision (4 x 8 bit,
// 8 x 4 bit or 16 x 2 bit, field 0 in the least significant bits). The fields
// of a and b are multiplied pairwise and the products summed, so one
// instance performs 4, 8 or 16 multiply-adds: the fine, word-level
// vectorization that both accelerators build on. The result is the exact sum
// (at most 4 * 128 * 128 = 65536 in magnitude, hence 18 bits).
//
// Purely combinational. Splitting by precision and summing follows the
// published description; the field order and signed coding are this
// design's choices (see mp_pkg).
module mp_dot32
  import mp_pkg::*;
(
  input  prec_e                 prec,
  input  logic [WORD_W-1:0]     a,
  input  logic [WORD_W-1:0]     b,
  output logic signed [17:0]    dot
);

  // Pairwise products, one set per precision. A size cast of a signed
  // field sign-extends it.
  logic signed [17:0] p8 [4];
  logic signed [17:0] p4 [8];
  logic signed [17:0] p2 [16];

  for (genvar i = 0; i < 4; i++) begin : g_p8
    assign p8[i] = 18'(signed'(a[8*i +: 8])) * 18'(signed'(b[8*i +: 8]));
  end
  for (genvar i = 0; i < 8; i++) begin : g_p4
    assign p4[i] = 18'(signed'(a[4*i +: 4])) * 18'(signed'(b[4*i +: 4]));
  end
  for (genvar i = 0; i < 16; i++) begin : g_p2
    assign p2[i] = 18'(signed'(a[2*i +: 2])) * 18'(signed'(b[2*i +: 2]));
  end

  logic signed [17:0] sum8, sum4, sum2;

  assign sum8 = p8[0] + p8[1] + p8[2] + p8[3];
  assign sum4 = (p4[0] + p4[1]) + (p4[2] + p4[3]) + (p4[4] + p4[5]) + (p4[6] + p4[7]);
  assign sum2 = ((p2[0]  + p2[1])  + (p2[2]  + p2[3]))  + ((p2[4]  + p2[5])  + (p2[6]  + p2[7]))
              + ((p2[8]  + p2[9])  + (p2[10] + p2[11])) + ((p2[12] + p2[13]) + (p2[14] + p2[15]));

  always_comb begin
    case (prec)
      PREC_4:  dot = sum4;
      PREC_2:  dot = sum2;
      default: dot = sum8;
    endcase
  end

endmodule
