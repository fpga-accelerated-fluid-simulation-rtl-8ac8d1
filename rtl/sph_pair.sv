// sph_pair: smoothing-kernel value and gradient for one particle pair.
//
// For d = p_i - p_j and kernel radius h (all 12.6):
//   s      = h^2 - |d|^2                      (zero outside the kernel)
//   W      = c_w * s^3                        density kernel (poly6 shape)
//   gradW  = c_g * s^2 * d                    its gradient with respect to p_i
// c_w and c_g are host-supplied Q16 coefficients with the particle mass and
// the normalisation folded in (for the poly6 kernel c_g = -6 c_w).  W and
// gradW are Q16.  With h = 1.0 and |d| < h every intermediate fits easily in
// 64 bits; for much larger radii the coefficients must be scaled down.
// Purely combinational; the step units register its results.
//
// Which kernel to use is this design's choice: the poly6 shape and its own
// gradient avoid a square root per neighbour pair, which a fixed-point
// datapath would otherwise need for the usual "spiky" gradient kernel.
module sph_pair
  import pbf_pkg::*;
(
  input  vec_t  pi,
  input  vec_t  pj,
  input  fx_t   h,
  input  acc_t  c_w,
  input  acc_t  c_g,
  output logic  in_range,
  output acc_t  w,
  output avec_t gw
);

  wide_t dx, dy, dz, r2, h2, s, s2, s3, wk, gx, gy, gz;

  always_comb begin
    dx = wide_t'(pi.x) - wide_t'(pj.x);           // Q6
    dy = wide_t'(pi.y) - wide_t'(pj.y);
    dz = wide_t'(pi.z) - wide_t'(pj.z);
    r2 = dx * dx + dy * dy + dz * dz;              // Q12
    h2 = wide_t'(h) * wide_t'(h);                  // Q12
    in_range = (r2 < h2);
    s  = in_range ? (h2 - r2) : '0;                // Q12
    s2 = s * s;                                    // Q24
    s3 = rshr(s2 * s, 20);                         // Q36 -> Q16
    wk = qmul(wide_t'(c_w), s3);                   // Q16
    gx = rshr(s2 * dx, 14);                        // Q30 -> Q16
    gy = rshr(s2 * dy, 14);
    gz = rshr(s2 * dz, 14);
    w    = sat_acc(wk);
    gw.x = sat_acc(qmul(wide_t'(c_g), gx));
    gw.y = sat_acc(qmul(wide_t'(c_g), gy));
    gw.z = sat_acc(qmul(wide_t'(c_g), gz));
  end

endmodule
