// rt_ref_pkg: floating-point reference model of the scene, for testbenches.
//
// It traces the same scene as the hardware (camera, unit sphere on the
// checkerboard floor, point light, ambient + diffuse shading, shadow ray for
// the floor, one mirror bounce for the sphere) with `real` arithmetic, so it
// is independent of the fixed-point datapath. Besides the expected colour it
// reports which object was hit, whether the floor point was shadowed or the
// bounce hit the floor, and a `fragile` flag for pixels so close to an edge
// (sphere silhouette, checker line, shadow edge, horizon) that the rounding
// of the 10-fraction-bit hardware may legitimately land on the other side.
package rt_ref_pkg;
  import rt_pkg::*;

  typedef struct {
    real x;
    real y;
    real z;
  } rvec_t;

  typedef struct {
    int    r, g, b;
    int    obj;        // 0 miss, 1 plane, 2 sphere
    bit    shadow;     // floor pixel in shadow
    bit    refl_floor; // sphere pixel whose bounce hits the floor
    bit    fragile;
    // stage-boundary values
    rvec_t d;          // S1: unit ray direction
    rvec_t hp, n;      // S2: hit point, unit normal
    rvec_t ca, cb;     // S3: ambient / sky term, diffuse term
    rvec_t so, sd;     // S3: secondary ray origin and direction
  } ref_pix_t;

  function automatic real fr(fix_t v);
    return real'(v) / 1024.0;
  endfunction

  function automatic fix_t fx(real r);
    return fix_t'($rtoi($floor(r * 1024.0 + 0.5)));
  endfunction

  function automatic vec3_t fv(rvec_t r);
    vec3_t v;
    v.x = fx(r.x); v.y = fx(r.y); v.z = fx(r.z);
    return v;
  endfunction

  function automatic rvec_t rv(fix_t x, fix_t y, fix_t z);
    rvec_t r;
    r.x = fr(x); r.y = fr(y); r.z = fr(z);
    return r;
  endfunction

  function automatic rvec_t rvv(vec3_t v);
    return rv(v.x, v.y, v.z);
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic real dot(rvec_t a, rvec_t b);
    return a.x * b.x + a.y * b.y + a.z * b.z;
  endfunction

  function automatic rvec_t add(rvec_t a, rvec_t b);
    rvec_t r;
    r.x = a.x + b.x; r.y = a.y + b.y; r.z = a.z + b.z;
    return r;
  endfunction

  function automatic rvec_t sub(rvec_t a, rvec_t b);
    rvec_t r;
    r.x = a.x - b.x; r.y = a.y - b.y; r.z = a.z - b.z;
    return r;
  endfunction

  function automatic rvec_t scl(rvec_t a, real s);
    rvec_t r;
    r.x = a.x * s; r.y = a.y * s; r.z = a.z * s;
    return r;
  endfunction

  function automatic rvec_t unit(rvec_t a);
    return scl(a, 1.0 / $sqrt(dot(a, a)));
  endfunction

  // sum of the component differences of two vectors
  function automatic real verr(rvec_t a, rvec_t b);
    return rabs(a.x - b.x) + rabs(a.y - b.y) + rabs(a.z - b.z);
  endfunction

  // distance of v to the nearest integer
  function automatic real int_dist(real v);
    real f;
    f = v - $floor(v);
    return (f < 0.5) ? f : 1.0 - f;
  endfunction

  // Ray/sphere: returns hit, nearest positive t, and the discriminant h*h-a*c.
  function automatic bit sphere_hit(rvec_t o, rvec_t d, output real t, output real disc);
    rvec_t oc;
    real a, h, c, s, t0, t1;
    oc   = sub(o, rvv(SPH_C));
    a    = dot(d, d);
    h    = dot(oc, d);
    c    = dot(oc, oc) - fr(SPH_R) * fr(SPH_R);
    disc = h * h - a * c;
    t    = 0.0;
    if (disc < 0.0) return 0;
    s  = $sqrt(disc);
    t0 = (-h - s) / a;
    t1 = (-h + s) / a;
    if (t0 > 0.0) begin t = t0; return 1; end
    if (t1 > 0.0) begin t = t1; return 1; end
    return 0;
  endfunction

  function automatic bit plane_hit(rvec_t o, rvec_t d, output real t);
    rvec_t n;
    real   den;
    n   = rvv(PLN_N);
    den = dot(n, d);
    t   = 0.0;
    if (den >= 0.0) return 0;
    t = dot(n, sub(rvv(PLN_P), o)) / den;
    return t > 0.0;
  endfunction

  function automatic rvec_t sky(real dy);
    return add(rvv(COL_SKY), scl(rvv(SKY_GRAD), dy));
  endfunction

  function automatic rvec_t checker_ref(real x, real z);
    int ix, iz;
    ix = $rtoi($floor(x));
    iz = $rtoi($floor(z));
    return (((ix ^ iz) & 1) != 0) ? rvv(COL_CHK_LO) : rvv(COL_CHK_HI);
  endfunction

  function automatic int u8(real c);
    if (c <= 0.0) return 0;
    if (c >= 1.0) return 255;
    return $rtoi($floor(c * 255.0));
  endfunction

  // Unit camera ray of pixel (x, y).
  function automatic rvec_t ray_dir(int x, int y);
    rvec_t raw;
    raw = add(add(scl(rvv(CAM_U), real'(x - IMG_W / 2)), scl(rvv(CAM_V), real'(y - IMG_H / 2))), rvv(CAM_W));
    return unit(raw);
  endfunction

  function automatic ref_pix_t trace(int x, int y, rvec_t light);
    ref_pix_t p;
    rvec_t eye, d, hp, n, l, base, ca, cb, col, r, o2, bp;
    real   ts, tp, disc, t, lum, t2, disc2, tb;
    bit    hs, hpl;
    p.fragile    = 0;
    p.shadow     = 0;
    p.refl_floor = 0;
    p.hp = '{0.0, 0.0, 0.0};
    p.n  = '{0.0, 0.0, 0.0};
    p.cb = '{0.0, 0.0, 0.0};
    eye = rvv(CAM_EYE);
    d   = ray_dir(x, y);
    hs  = sphere_hit(eye, d, ts, disc);
    hpl = plane_hit(eye, d, tp);
    if (rabs(disc) < 0.03) p.fragile = 1;
    if (hs && (!hpl || ts <= tp)) begin p.obj = 2; t = ts; end
    else if (hpl)                 begin p.obj = 1; t = tp; end
    else                          begin p.obj = 0; t = 0.0; end
    p.d  = d;
    p.so = '{0.0, 0.0, 0.0};
    p.sd = d;
    if (p.obj == 0) begin
      col  = sky(d.y);
      p.ca = col;
    end else begin
      hp = add(eye, scl(d, t));
      n  = (p.obj == 2) ? unit(sub(hp, rvv(SPH_C))) : rvv(PLN_N);
      l  = unit(sub(light, hp));
      lum = dot(n, l);
      if (lum < 0.0) lum = 0.0;
      if (p.obj == 2) base = rvv(COL_SPHERE);
      else begin
        base = checker_ref(hp.x, hp.z);
        if (int_dist(hp.x) < 0.02 + 0.004 * t + 0.0005 * t * t || int_dist(hp.z) < 0.02 + 0.004 * t + 0.0005 * t * t) p.fragile = 1;
      end
      ca = scl(base, fr(K_AMBIENT));
      cb = scl(base, lum);
      p.hp = hp; p.n = n; p.ca = ca; p.cb = cb; p.so = hp;
      if (p.obj == 1) begin
        p.sd = l;
        o2 = add(hp, scl(l, fr(SHADOW_EPS)));
        p.shadow = sphere_hit(o2, l, t2, disc2);
        if (rabs(disc2) < 0.03 + 0.004 * t + 0.0005 * t * t) p.fragile = 1;
        col = p.shadow ? ca : add(ca, cb);
      end else begin
        r  = sub(d, scl(n, 2.0 * dot(d, n)));
        p.sd = r;
        o2 = add(hp, scl(r, fr(SHADOW_EPS)));
        p.refl_floor = plane_hit(o2, r, tb);
        if (rabs(r.y) < 0.02) p.fragile = 1;
        if (p.refl_floor) begin
          bp = add(o2, scl(r, tb));
          // near the outline the normal, and with it the bounce point, is least certain
          if (disc < 0.1) p.fragile = 1;
          if (int_dist(bp.x) < 0.05 + 0.03 * tb + 0.01 * tb / rabs(r.y) ||
              int_dist(bp.z) < 0.05 + 0.03 * tb + 0.01 * tb / rabs(r.y)) p.fragile = 1;
          col = checker_ref(bp.x, bp.z);
        end else col = sky(r.y);
        col = add(scl(add(ca, cb), fr(K_OWN)), scl(col, fr(K_REFLECT)));
      end
    end
    p.r = u8(col.x);
    p.g = u8(col.y);
    p.b = u8(col.z);
    return p;
  endfunction
endpackage
