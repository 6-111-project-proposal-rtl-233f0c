// rt_ref_pkg: reference model for the testbenches. It ray-traces one pixel
// in floating point by a different route from the hardware: intersect the
// ray with each triangle's plane, then test the hit point against the three
// edges with barycentric weights. A reflective hit gets one bounce, whose
// fixed-point hit point and direction follow the hardware's definition. It returns the expected colour and hit
// bit, and flags pixels whose answer hinges on a rounding-level tie (ray
// exactly on an edge with a different neighbour, or two equally near
// triangles of different colour), which callers skip.
package rt_ref_pkg;
  import rt_pkg::*;

  localparam real EPS_IN  = 1e-12;  // is_in if weight >= -EPS_IN
  localparam real EPS_AMB = 1e-9;   // rounding-level band

  typedef struct {
    color_t color;
    logic   hit;
    logic   ambiguous;
    logic   reflected;     // a reflection bounce was traced
    logic   sec_hit;       // the reflected ray met a triangle
  } ref_t;

  function automatic color_t shade(poly_t p, unorm_t l, int ambient);
    int d, s;
    color_t c;
    d = (int'(p.n.x) * int'(l.x) + int'(p.n.y) * int'(l.y) + int'(p.n.z) * int'(l.z)) >>> 7;
    if (d < 0) d = 0;
    if (d > 128) d = 128;
    s = ambient + (((128 - ambient) * d) >>> 7);
    c.r = chan_t'((int'(p.color.r) * s) >>> 7);
    c.g = chan_t'((int'(p.color.g) * s) >>> 7);
    c.b = chan_t'((int'(p.color.b) * s) >>> 7);
    return c;
  endfunction

  // Nearest triangle along the ray (o, d), skipping index skip. Returns its
  // index (-1 for none) and sets amb on a rounding-level tie.
  function automatic int nearest(real ox, real oy, real oz, real dx, real dy, real dz,
                                 poly_t polys[$], unorm_t l, int ambient, int skip,
                                 inout logic amb);
    real best_t;
    int  best;
    best = -1; best_t = 0.0;
    foreach (polys[i]) begin
      real ax, ay, az, bx, by, bz, cx, cy, cz, nx, ny, nz, den, t, px, py, pz, nn;
      real w0, w1, w2;
      logic is_in, near_edge;
      if (i == skip) continue;
      ax = real'(polys[i].v0.x); ay = real'(polys[i].v0.y); az = real'(polys[i].v0.z);
      bx = real'(polys[i].v1.x); by = real'(polys[i].v1.y); bz = real'(polys[i].v1.z);
      cx = real'(polys[i].v2.x); cy = real'(polys[i].v2.y); cz = real'(polys[i].v2.z);
      nx = (by - ay) * (cz - az) - (bz - az) * (cy - ay);
      ny = (bz - az) * (cx - ax) - (bx - ax) * (cz - az);
      nz = (bx - ax) * (cy - ay) - (by - ay) * (cx - ax);
      nn = nx * nx + ny * ny + nz * nz;
      den = dx * nx + dy * ny + dz * nz;
      if (nn == 0.0 || den == 0.0) continue;
      t = ((ax - ox) * nx + (ay - oy) * ny + (az - oz) * nz) / den;
      if (t <= 0.0) continue;
      px = ox + t * dx; py = oy + t * dy; pz = oz + t * dz;
      // barycentric weight of the vertex opposite each edge
      w0 = (((cx - bx) * (py - by) - (cy - by) * (px - bx)) * nz
          + ((cy - by) * (pz - bz) - (cz - bz) * (py - by)) * nx
          + ((cz - bz) * (px - bx) - (cx - bx) * (pz - bz)) * ny) / nn;
      w1 = (((ax - cx) * (py - cy) - (ay - cy) * (px - cx)) * nz
          + ((ay - cy) * (pz - cz) - (az - cz) * (py - cy)) * nx
          + ((az - cz) * (px - cx) - (ax - cx) * (pz - cz)) * ny) / nn;
      w2 = 1.0 - w0 - w1;
      is_in = (w0 >= -EPS_IN) && (w1 >= -EPS_IN) && (w2 >= -EPS_IN);
      near_edge = ((w0 < EPS_AMB && w0 > -EPS_AMB) || (w1 < EPS_AMB && w1 > -EPS_AMB)
                   || (w2 < EPS_AMB && w2 > -EPS_AMB))
                  && (w0 > -EPS_AMB) && (w1 > -EPS_AMB) && (w2 > -EPS_AMB);
      if (near_edge) amb = 1'b1;
      if (!is_in) continue;
      if (best < 0 || t < best_t * (1.0 - EPS_AMB)) begin
        best = i; best_t = t;
      end else if (t < best_t * (1.0 + EPS_AMB)) begin
        if (shade(polys[i], l, ambient) != shade(polys[best], l, ambient)
            || polys[i].refl != polys[best].refl) amb = 1'b1;
      end
    end
    return best;
  endfunction

  // Expected pixel: primary ray, then one reflection bounce off a reflective
  // nearest triangle. The hit point and reflected direction follow the
  // hardware's fixed-point definition: k = floor(t*2^16/det) for the exact
  // ray parameter t/det, H = O + round(D*k/2^16), R = D*128^2 - 2(D.n)n.
  function automatic ref_t trace(vec3_t cam, poly_t polys[$], unorm_t l, int x, int y,
                                 int focal, int ambient);
    longint dx, dy, dz, e1x, e1y, e1z, e2x, e2y, e2z, gx, gy, gz, num, den, dn;
    longint k, hx, hy, hz, rx, ry, rz;
    int     best, sec;
    logic signed [127:0] q;
    color_t cp, cs;
    ref_t   r;
    dx = longint'(x - H_RES / 2); dy = longint'(V_RES / 2 - y); dz = longint'(focal);
    r.ambiguous = 1'b0;
    r.reflected = 1'b0;
    r.sec_hit   = 1'b0;
    best = nearest(real'(cam.x), real'(cam.y), real'(cam.z), real'(dx), real'(dy), real'(dz),
                   polys, l, ambient, -1, r.ambiguous);
    r.hit   = (best >= 0);
    r.color = '0;
    if (best < 0) return r;
    cp = shade(polys[best], l, ambient);
    r.color = cp;
    if (polys[best].refl == 0) return r;
    r.reflected = 1'b1;
    // exact ray parameter of the hit from the plane equation
    e1x = longint'(polys[best].v1.x) - longint'(polys[best].v0.x);
    e1y = longint'(polys[best].v1.y) - longint'(polys[best].v0.y);
    e1z = longint'(polys[best].v1.z) - longint'(polys[best].v0.z);
    e2x = longint'(polys[best].v2.x) - longint'(polys[best].v0.x);
    e2y = longint'(polys[best].v2.y) - longint'(polys[best].v0.y);
    e2z = longint'(polys[best].v2.z) - longint'(polys[best].v0.z);
    gx = e1y * e2z - e1z * e2y; gy = e1z * e2x - e1x * e2z; gz = e1x * e2y - e1y * e2x;
    num = (longint'(polys[best].v0.x) - longint'(cam.x)) * gx
        + (longint'(polys[best].v0.y) - longint'(cam.y)) * gy
        + (longint'(polys[best].v0.z) - longint'(cam.z)) * gz;
    den = dx * gx + dy * gy + dz * gz;
    if (den < 0) begin num = -num; den = -den; end
    q = (128'(num) <<< 16) / 128'(den);
    k = longint'(q);
    hx = longint'(cam.x) + ((dx * k + 32768) >>> 16);
    hy = longint'(cam.y) + ((dy * k + 32768) >>> 16);
    hz = longint'(cam.z) + ((dz * k + 32768) >>> 16);
    dn = dx * longint'(polys[best].n.x) + dy * longint'(polys[best].n.y) + dz * longint'(polys[best].n.z);
    rx = dx * 16384 - 2 * dn * longint'(polys[best].n.x);
    ry = dy * 16384 - 2 * dn * longint'(polys[best].n.y);
    rz = dz * 16384 - 2 * dn * longint'(polys[best].n.z);
    sec = nearest(real'(hx), real'(hy), real'(hz), real'(rx), real'(ry), real'(rz),
                  polys, l, ambient, best, r.ambiguous);
    cs = (sec >= 0) ? shade(polys[sec], l, ambient) : color_t'('0);
    r.sec_hit = (sec >= 0);
    r.color.r = chan_t'((int'(cp.r) * (8 - int'(polys[best].refl)) + int'(cs.r) * int'(polys[best].refl)) / 8);
    r.color.g = chan_t'((int'(cp.g) * (8 - int'(polys[best].refl)) + int'(cs.g) * int'(polys[best].refl)) / 8);
    r.color.b = chan_t'((int'(cp.b) * (8 - int'(polys[best].refl)) + int'(cs.b) * int'(polys[best].refl)) / 8);
    return r;
  endfunction

endpackage
