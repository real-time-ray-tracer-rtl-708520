// rt_pkg: shared types and scene constants of the ray tracer.
//
// Every scalar in the datapath is a signed 24-bit fixed-point word with 10
// fractional bits (Q13.10: one sign bit, 13 integer bits, 10 fraction bits),
// so 1.0 is 1024 and the range is [-8192, 8192). Vectors are xyz triples of
// such words (72 bits). Colours use the same format with 1.0 meaning full
// intensity; the last stage converts them to 8 bits per channel.
//
// The word format, the obj_id encoding (00 miss, 01 plane, 10 sphere), the
// 480x360 frame, the six lanes and the scene (unit sphere resting on an
// infinite checkerboard plane, one point light) follow the design document.
// The camera, the colours, the ambient and reflection weights and the shadow
// offset are not given there; the values below are this design's choice,
// picked to reproduce the look of the published example frame.
package rt_pkg;

  localparam int FW   = 24;            // word width
  localparam int FRAC = 10;            // fractional bits
  typedef logic signed [FW-1:0] fix_t;

  localparam fix_t FIX_ONE = fix_t'(1 << FRAC);
  localparam fix_t FIX_MAX = fix_t'({1'b0, {(FW-1){1'b1}}});
  localparam fix_t FIX_MIN = fix_t'({1'b1, {(FW-1){1'b0}}});

  typedef struct packed {
    fix_t x;
    fix_t y;
    fix_t z;
  } vec3_t;

  typedef enum logic [1:0] {
    OBJ_MISS   = 2'b00,
    OBJ_PLANE  = 2'b01,
    OBJ_SPHERE = 2'b10
  } obj_id_t;

  // Frame geometry
  localparam int IMG_W = 480;
  localparam int IMG_H = 360;
  localparam int XW    = 9;            // pixel_x / col_addr width
  localparam int YW    = 9;            // pixel_y / row_y width

  // Saturate a wide signed value to a word.
  function automatic fix_t sat(logic signed [47:0] v);
    if (v > 48'sd8388607)       return FIX_MAX;
    else if (v < -48'sd8388608) return FIX_MIN;
    else                        return fix_t'(v);
  endfunction

  function automatic fix_t fadd(fix_t a, fix_t b);
    return sat(48'(a) + 48'(b));
  endfunction

  function automatic fix_t fsub(fix_t a, fix_t b);
    return sat(48'(a) - 48'(b));
  endfunction

  function automatic vec3_t vadd(vec3_t a, vec3_t b);
    vec3_t r;
    r.x = fadd(a.x, b.x);
    r.y = fadd(a.y, b.y);
    r.z = fadd(a.z, b.z);
    return r;
  endfunction

  function automatic vec3_t vsub(vec3_t a, vec3_t b);
    vec3_t r;
    r.x = fsub(a.x, b.x);
    r.y = fsub(a.y, b.y);
    r.z = fsub(a.z, b.z);
    return r;
  endfunction

  // ---------------------------------------------------------------- camera
  // Pinhole camera at CAM_EYE looking along +z. The raw ray direction of
  // pixel (x, y) is CAM_U*(x-240) + CAM_V*(y-180) + CAM_W, then normalized.
  localparam vec3_t CAM_EYE = '{x: 24'sd0, y: 24'sd1536, z: -24'sd7168};   // (0, 1.5, -7)
  localparam vec3_t CAM_U   = '{x: 24'sd2, y: 24'sd0,    z: 24'sd0};       // (1/512, 0, 0)
  localparam vec3_t CAM_V   = '{x: 24'sd0, y: -24'sd2,   z: 24'sd0};       // (0, -1/512, 0)
  localparam vec3_t CAM_W   = '{x: 24'sd0, y: 24'sd0,    z: 24'sd1024};    // (0, 0, 1)

  // ----------------------------------------------------------------- scene
  localparam vec3_t SPH_C   = '{x: 24'sd0, y: 24'sd1024, z: 24'sd0};       // unit sphere on the plane
  localparam fix_t  SPH_R   = 24'sd1024;
  localparam vec3_t PLN_P   = '{x: 24'sd0, y: 24'sd0,    z: 24'sd0};       // plane y = 0
  localparam vec3_t PLN_N   = '{x: 24'sd0, y: 24'sd1024, z: 24'sd0};

  // ---------------------------------------------------------------- colours
  localparam vec3_t COL_SPHERE = '{x: 24'sd256, y: 24'sd358, z: 24'sd1024}; // (0.25, 0.35, 1.0)
  localparam vec3_t COL_CHK_HI = '{x: 24'sd922, y: 24'sd922, z: 24'sd922};  // 0.9 grey
  localparam vec3_t COL_CHK_LO = '{x: 24'sd307, y: 24'sd307, z: 24'sd307};  // 0.3 grey
  localparam vec3_t COL_SKY    = '{x: 24'sd666, y: 24'sd788, z: 24'sd1024}; // (0.65, 0.77, 1.0) at horizon
  localparam vec3_t SKY_GRAD   = '{x: 24'sd205, y: 24'sd154, z: 24'sd0};    // added per unit of dir.y
  localparam fix_t  K_AMBIENT  = 24'sd205;    // 0.2
  localparam fix_t  K_REFLECT  = 24'sd256;    // 0.25 of the reflected colour
  localparam fix_t  K_OWN      = 24'sd768;    // 0.75 of the sphere's own shading
  localparam fix_t  SHADOW_EPS = 24'sd20;     // ~0.02 offset along the normal

  // Checkerboard: unit squares, parity of floor(x) xor floor(z).
  function automatic vec3_t checker_col(fix_t hx, fix_t hz);
    return (hx[FRAC] ^ hz[FRAC]) ? COL_CHK_LO : COL_CHK_HI;
  endfunction

  // Sky gradient for a ray with vertical direction component dy.
  function automatic vec3_t sky_col(fix_t dy);
    logic signed [47:0] px, py, pz;
    vec3_t c;
    px  = (48'(SKY_GRAD.x) * 48'(dy)) >>> FRAC;
    py  = (48'(SKY_GRAD.y) * 48'(dy)) >>> FRAC;
    pz  = (48'(SKY_GRAD.z) * 48'(dy)) >>> FRAC;
    c.x = sat(48'(COL_SKY.x) + px);
    c.y = sat(48'(COL_SKY.y) + py);
    c.z = sat(48'(COL_SKY.z) + pz);
    return c;
  endfunction

  // One colour channel, clamped to [0, 1.0], as an 8-bit value (c*255).
  function automatic logic [7:0] to_u8(fix_t c);
    logic [FW+7:0] w;
    if (c <= 0)            return 8'd0;
    else if (c >= FIX_ONE) return 8'd255;
    w = ((FW+8)'(c) << 8) - (FW+8)'(c);
    return w[FRAC+7:FRAC];
  endfunction

  // Pack a colour as 0xRRGGBB.
  function automatic logic [23:0] to_rgb888(vec3_t c);
    return {to_u8(c.x), to_u8(c.y), to_u8(c.z)};
  endfunction

endpackage
