// bsc_pe: multi-bit-width processing element using bit-split-and-combination.
//
// One 8-bit feature lane and one 8-bit weight lane are each split into four
// 2-bit slices. Sixteen small signed multipliers form every slice product
// F_a * K_b; the products are shifted by 2*(a+b) bit positions and summed,
// which is the BSC combination sum_a 2^a sum_b 2^b f_calc of the design
// (in units of one slice). The precision selects how the slices group:
//   PREC_8 : one 8x8 product, all 16 slice products used;
//   PREC_4 : the lane holds two 4-bit operands; slices 0-1 and 2-3 form two
//            4x4 products (8 slice products), which are added;
//   PREC_2 : four 2x2 products (the 4 diagonal slice products), added.
// The output is therefore the dot product of the packed operands, giving
// 1, 2 or 4 multiply-accumulates per PE per cycle. Operands are signed two's
// complement: the top slice of each operand is sign-extended, lower slices are
// zero-extended, so each slice multiplier is 3 bits by 3 bits signed.
// Purely combinational; pe_array registers the result.
// The slice width, the signed handling and the dot-product use of the
// narrow modes are choices of this implementation.
module bsc_pe
  import acc_pkg::*;
(
  input  prec_e                       prec,
  input  logic [LANE_W-1:0]           feat,
  input  logic [LANE_W-1:0]           wgt,
  output logic signed [PE_OUT_W-1:0]  psum
);

  always_comb begin
    int unsigned spl;          // slices per operand
    logic signed [PE_OUT_W-1:0] acc;
    case (prec)
      PREC_4:  spl = 2;
      PREC_2:  spl = 1;
      default: spl = 4;
    endcase
    acc = '0;
    for (int unsigned a = 0; a < NSLICE; a++) begin
      for (int unsigned b = 0; b < NSLICE; b++) begin
        int unsigned pa, pb;
        logic signed [2:0] fa, kb;
        logic signed [5:0] prod;
        pa = a % spl;
        pb = b % spl;
        fa = (pa == spl - 1) ? {feat[2*a+1], feat[2*a +: 2]} : {1'b0, feat[2*a +: 2]};
        kb = (pb == spl - 1) ? {wgt[2*b+1],  wgt[2*b +: 2]}  : {1'b0, wgt[2*b +: 2]};
        prod = fa * kb;
        // only slices of the same operand pair contribute
        if ((a / spl) == (b / spl))
          acc = acc + (PE_OUT_W'(prod) <<< (2 * (pa + pb)));
      end
    end
    psum = acc;
  end

endmodule
