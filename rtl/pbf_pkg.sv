// pbf_pkg: types, sizes and arithmetic helpers shared by the position-based
// fluid (PBF) accelerator.
//
// Number formats.  Particle positions and velocities are stored as signed
// 12.6 fixed point (18 bits: 12 integer bits including the sign, 6 fraction
// bits), the storage format the accelerator is built around; 18 bits is also
// the natural width of an FPGA block-RAM lane.  Intermediate kernel values,
// Lagrange multipliers, corrections and host-supplied coefficients use a
// wider signed Q16 format (32 bits, 16 fraction bits); that internal width is
// this design's own choice.
//
// Defaults: 512 particles and a bounded voxel space of 4 x 4 x 8 voxels of
// one simulation unit each follow the accelerator's main configuration; the
// per-voxel capacity and the number of sphere colliders are this design's
// choices.
package pbf_pkg;

  // ---- sizes -------------------------------------------------------------
  localparam int N_PART_DEF   = 512;  // particles held on chip
  localparam int GX_DEF       = 4;    // voxel space, x
  localparam int GY_DEF       = 4;    // voxel space, y
  localparam int GZ_DEF       = 8;    // voxel space, z
  localparam int CAP_DEF      = 32;   // particle ids per voxel
  localparam int VOX_SHIFT    = 6;    // voxel edge = 2^6 LSB = 1.0 unit
  localparam int MAX_SPHERES  = 4;    // sphere colliders

  // ---- number formats ----------------------------------------------------
  localparam int POS_W    = 18;
  localparam int POS_FRAC = 6;
  localparam int ACC_W    = 32;
  localparam int ACC_FRAC = 16;
  localparam int FSHIFT   = ACC_FRAC - POS_FRAC;  // 12.6 -> Q16

  typedef logic signed [POS_W-1:0] fx_t;    // 12.6
  typedef logic signed [ACC_W-1:0] acc_t;   // Q16
  typedef logic signed [63:0]      wide_t;  // intermediate products

  typedef struct packed { fx_t  z; fx_t  y; fx_t  x; } vec_t;   // 54 bits
  typedef struct packed { acc_t z; acc_t y; acc_t x; } avec_t;  // 96 bits

  // One particle as held in the block RAMs.
  typedef struct packed {
    logic  alive;  // cleared when the particle leaves the voxel space
    vec_t  x;      // position at the start of the time step
    vec_t  p;      // predicted position x*
    vec_t  v;      // velocity
    vec_t  vt;     // velocity after XSPH viscosity (step 4 scratch)
    acc_t  lam;    // Lagrange multiplier lambda, Q16
    avec_t dp;     // position correction, Q16
    avec_t w;      // vorticity omega, Q16
    acc_t  wmag;   // |omega|, Q16
  } prec_t;

  // Field write enables for the particle store.
  typedef struct packed {
    logic alive, x, p, v, vt, lam, dp, w, wmag;
  } pmask_t;

  localparam pmask_t MASK_NONE = '0;

  // Sphere collider: centre and collision radius (sphere radius plus
  // particle radius), both 12.6.
  typedef struct packed { vec_t c; fx_t r; } sphere_t;

  // Host-written constants (held in LUT-RAM registers by axil_ctrl_regs).
  typedef struct packed {
    logic [15:0] n_part;       // particles in use
    logic [7:0]  iters;        // solver iterations per time step
    acc_t        dt;           // time step, Q16
    acc_t        inv_dt;       // 1/dt, Q16
    avec_t       grav;         // external acceleration, Q16
    fx_t         h;            // kernel radius, 12.6
    acc_t        c_w;          // density kernel coefficient (mass folded in)
    acc_t        c_g;          // gradient kernel coefficient
    acc_t        inv_rho0;     // 1/rest density, Q16
    acc_t        eps_lam;      // constraint relaxation epsilon, Q16
    acc_t        k_corr;       // artificial pressure strength, Q16
    acc_t        inv_wdq;      // 1/W(dq), Q16
    acc_t        c_xsph;       // XSPH viscosity constant, Q16
    acc_t        eps_vort;     // vorticity confinement strength, Q16
    vec_t        origin;       // lower corner of the voxel space
    logic [2:0]  n_spheres;    // spheres in use (0..MAX_SPHERES)
    sphere_t [MAX_SPHERES-1:0] sph;
  } consts_t;

  // Which unit owns the particle store (set by fabric_ctrl).
  typedef enum logic [2:0] {
    PH_IDLE, PH_LOAD, PH_STEP1, PH_STEP5, PH_SOLVE, PH_STEP4, PH_STORE
  } phase_t;

  // ---- helpers -----------------------------------------------------------
  // Arithmetic right shift with round-half-up.
  function automatic wide_t rshr(wide_t a, int n);
    wide_t half;
    half = (n > 0) ? (wide_t'(1) <<< (n - 1)) : '0;
    return (a + half) >>> n;
  endfunction

  // Saturate a wide value to the 12.6 storage format.
  function automatic fx_t sat_fx(wide_t a);
    if (a > wide_t'(131071))       return fx_t'(18'sh1FFFF);
    else if (a < wide_t'(-131072)) return fx_t'(18'sh20000);
    else                           return fx_t'(a);
  endfunction

  // Saturate a wide value to Q16 accumulator width.
  function automatic acc_t sat_acc(wide_t a);
    if (a > wide_t'(64'sh7FFF_FFFF))         return acc_t'(32'sh7FFF_FFFF);
    else if (a < -wide_t'(64'sh8000_0000))   return acc_t'(32'sh8000_0000);
    else                                     return acc_t'(a);
  endfunction

  // Q16 x Q16 -> Q16 with rounding.
  function automatic wide_t qmul(wide_t a, wide_t b);
    return rshr(a * b, ACC_FRAC);
  endfunction

  function automatic wide_t fx2q(fx_t a);
    return wide_t'(a) <<< FSHIFT;
  endfunction

  // Q16 -> 12.6 with rounding and saturation.
  function automatic fx_t q2fx(wide_t a);
    return sat_fx(rshr(a, FSHIFT));
  endfunction

endpackage
