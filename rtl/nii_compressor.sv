// NII metric compressor.
//
// Reduces the eight backward state metrics found at a sliding-window
// boundary to one NII word: the range delta = max - min (saturated to 8 bits),
// and the indexes IMAX and IMIN of the largest and smallest state. Maximum
// and minimum are searched together so that comparators are shared:
//   level 1: four MAX-MIN modules on the pairs (0,1) (2,3) (4,5) (6,7)
//   level 2: two MAX modules on the pair maxima, two MIN modules on the
//            pair minima
//   level 3: one MAX and one MIN module
// ten comparisons in all, followed by the SUB/CLIP unit. The indexes are
// carried through the same multiplexers. Combinational; clipped_o marks a
// range that did not fit into delta.
module nii_compressor
  import turbo_pkg::*;
(
  input  sm_vec_t metrics_i,
  output nii_t    nii_o,
  output logic    clipped_o
);
  sm_t   l1_max [4];
  sidx_t l1_imax[4];
  sm_t   l1_min [4];
  sidx_t l1_imin[4];
  sm_t   l2_max [2];
  sidx_t l2_imax[2];
  sm_t   l2_min [2];
  sidx_t l2_imin[2];
  sm_t   l3_max, l3_min;
  sidx_t l3_imax, l3_imin;

  for (genvar p = 0; p < 4; p++) begin : g_l1
    max_min_unit u_mm (
      .a     (metrics_i[2*p]),   .ia (sidx_t'(2*p)),
      .b     (metrics_i[2*p+1]), .ib (sidx_t'(2*p+1)),
      .max_o (l1_max[p]),  .imax_o (l1_imax[p]),
      .min_o (l1_min[p]),  .imin_o (l1_imin[p])
    );
  end

  for (genvar p = 0; p < 2; p++) begin : g_l2
    max_unit u_max (
      .a (l1_max[2*p]), .ia (l1_imax[2*p]), .b (l1_max[2*p+1]), .ib (l1_imax[2*p+1]),
      .max_o (l2_max[p]), .imax_o (l2_imax[p])
    );
    min_unit u_min (
      .a (l1_min[2*p]), .ia (l1_imin[2*p]), .b (l1_min[2*p+1]), .ib (l1_imin[2*p+1]),
      .min_o (l2_min[p]), .imin_o (l2_imin[p])
    );
  end

  max_unit u_max3 (
    .a (l2_max[0]), .ia (l2_imax[0]), .b (l2_max[1]), .ib (l2_imax[1]),
    .max_o (l3_max), .imax_o (l3_imax)
  );
  min_unit u_min3 (
    .a (l2_min[0]), .ia (l2_imin[0]), .b (l2_min[1]), .ib (l2_imin[1]),
    .min_o (l3_min), .imin_o (l3_imin)
  );

  sub_clip u_sub_clip (
    .max_i (l3_max), .min_i (l3_min),
    .delta_o (nii_o.delta), .clipped_o (clipped_o)
  );

  assign nii_o.imax = l3_imax;
  assign nii_o.imin = l3_imin;
endmodule
