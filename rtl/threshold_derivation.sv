// threshold_derivation: derives the filter limits from the quantisation
// parameter QP and the boundary strength bS.
//
// alpha bounds the step |p0-q0| across an edge, beta bounds the activity
// |p1-p0| and |q1-q0| on each side, and tc0 bounds how far a pixel may be
// moved. All three grow with QP: coarser quantisation leaves larger block
// artefacts, so stronger smoothing is allowed. The tables are those of the
// H.264/AVC deblocking filter, indexed by QP (no slice offsets) and, for tc0,
// by bS = 1..3. bS = 0 turns filtering off (enable = 0). Purely combinational.
//
// That the limits are derived from QP follows the deblocking-filter
// architecture; the concrete tables and the fixed-bS interface are this
// design's choice, taken from H.264/AVC. QP above 51 is treated as 51.
module threshold_derivation
  import dbf_pkg::*;
(
  input  logic [5:0] qp,
  input  logic [1:0] bs,
  output thresh_t    th
);
  localparam logic [7:0] ALPHA [36] = '{
      4,   4,   5,   6,   7,   8,   9,  10,  12,  13,  15,  17,
     20,  22,  25,  28,  32,  36,  40,  45,  50,  56,  63,  71,
     80,  90, 101, 113, 127, 144, 162, 182, 203, 226, 255, 255 };
  localparam logic [4:0] BETA [36] = '{
      2,   2,   2,   3,   3,   3,   3,   4,   4,   4,   6,   6,
      7,   7,   8,   8,   9,   9,  10,  10,  11,  11,  12,  12,
     13,  13,  14,  14,  15,  15,  16,  16,  17,  17,  18,  18 };
  // tc0 for QP 17..51, one row per bS = 1, 2, 3.
  localparam logic [4:0] TC0_BS1 [35] = '{
      0,  0,  0,  0,  0,  0,  1,  1,  1,  1,  1,  1,
      1,  1,  1,  1,  2,  2,  2,  2,  3,  3,  3,  4,
      4,  4,  5,  6,  6,  7,  8,  9, 10, 11, 13 };
  localparam logic [4:0] TC0_BS2 [35] = '{
      0,  0,  0,  0,  1,  1,  1,  1,  1,  1,  1,  1,
      1,  1,  2,  2,  2,  2,  3,  3,  3,  4,  4,  5,
      5,  6,  7,  8,  8, 10, 11, 12, 13, 15, 17 };
  localparam logic [4:0] TC0_BS3 [35] = '{
      1,  1,  1,  1,  1,  1,  1,  1,  1,  1,  2,  2,
      2,  2,  3,  3,  3,  4,  4,  4,  5,  6,  6,  7,
      8,  9, 10, 11, 13, 14, 16, 18, 20, 23, 25 };

  logic [5:0] q;

  always_comb begin
    q = (qp > 6'd51) ? 6'd51 : qp;
    th.enable = (bs != 2'd0);
    th.alpha  = (q >= 6'd16) ? ALPHA[q - 6'd16] : 8'd0;
    th.beta   = (q >= 6'd16) ? BETA[q - 6'd16]  : 5'd0;
    th.tc0    = 5'd0;
    if (q >= 6'd17) begin
      unique case (bs)
        2'd1:    th.tc0 = TC0_BS1[q - 6'd17];
        2'd2:    th.tc0 = TC0_BS2[q - 6'd17];
        2'd3:    th.tc0 = TC0_BS3[q - 6'd17];
        default: th.tc0 = 5'd0;
      endcase
    end
  end

endmodule
