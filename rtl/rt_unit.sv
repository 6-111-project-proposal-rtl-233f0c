// rt_unit: one ray tracer unit. Given a screen pixel it casts a primary ray
// from the camera through that pixel, finds the nearest scene triangle the
// ray meets, and returns the pixel's shaded colour. When that triangle is
// reflective it also traces one reflected ray and blends in what it sees.
//
// Ray/triangle test. A ray has an origin O and an integer direction D. For
// the primary ray O is the camera and D = (x - H_RES/2, V_RES/2 - y, FOCAL):
// the screen is a plane FOCAL world units in front of the camera, looking
// along +z, with +y up. Each triangle (v0, v1, v2) is tested with the
// Moller-Trumbore method in exact integer arithmetic and without division:
//   e1 = v1-v0, e2 = v2-v0, T = O-v0, P = D x e2, Q = T x e1,
//   det = e1.P, u = T.P, v = D.Q, t = e2.Q.
// After all four are negated when det < 0, the ray hits the triangle when
// det > 0, u >= 0, v >= 0, u+v <= det and t > 0; the hit lies at O + D*t/det.
// Two hits are compared by cross-multiplying (t_a*det_b < t_b*det_a), so the
// nearest one is found without a divider.
//
// Shading. With n the triangle's unit normal and L the unit direction
// towards the light (UNIT = 1.0),
//   shade = AMBIENT + (UNIT-AMBIENT) * clamp(n.L, 0, 1)
// and each 6-bit channel is scaled by shade/UNIT.
//
// Reflection. If the nearest triangle has reflectivity r > 0 (in eighths),
// a restoring divider finds k = floor(t * 2^KFRAC / det), one quotient bit
// per cycle, and the hit point is H = O + round(D*k / 2^KFRAC), rounded to
// whole world units. The reflected direction, scaled by UNIT^2 so that it
// stays an exact integer, is R = D*UNIT^2 - 2*(D.n)*n. The ray (H, R) is
// traced against every triangle except the one it leaves. The pixel colour
// is (c_primary*(8-r) + c_reflected*r)/8, where c_reflected is the shaded
// colour of the triangle the reflected ray meets, or black if it meets none.
// Only one bounce is traced. A primary ray that meets nothing returns black
// with hit = 0; the background processor downstream replaces it.
//
// Schedule. A multi-cycle machine spends four cycles on each triangle
// (edges, cross products, dot products, test). A pixel takes
// 4*N_POLY + 2 cycles from start to done, and a pixel whose primary hit is
// reflective takes 8*N_POLY + QW + 3, QW being the quotient width.
//
// Interface. start (one cycle, only while busy is low) hands in a pixel.
// busy is high from the cycle after start until the result is taken. done
// stays high with result held until ack is high in the same cycle; the unit
// is idle again in the next cycle. cam, polys and light come straight from
// the game logic and must be stable while a pixel is being traced.
//
// The busy/done/colour/x/y/hit outputs, the camera, polygon and light inputs,
// shading with reflectivity, and a divider follow the project description.
// The intersection method, the single-bounce blend, the four-cycle schedule,
// the lighting model and the number formats are this design's own choices.
// Textures, planned in the description only as a later addition, are not
// modelled.
module rt_unit
  import rt_pkg::*;
#(
  parameter int N_POLY  = 8,      // triangles in the scene
  parameter int FOCAL   = 512,    // screen distance in world units
  parameter int AMBIENT = 32,     // ambient light, UNIT = full brightness
  parameter int QW      = 24      // quotient bits of the hit-point divider
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  pixel_t  pix,
  input  vec3_t   cam,
  input  poly_t   polys [N_POLY],
  input  unorm_t  light,
  output logic    busy,
  output logic    done,
  output result_t result,
  input  logic    ack
);

  localparam int IW = (N_POLY > 1) ? $clog2(N_POLY) : 1;
  localparam int CW = $clog2(QW);

  typedef struct packed {
    logic signed [63:0] x;
    logic signed [63:0] y;
    logic signed [63:0] z;
  } wvec_t;

  typedef enum logic [3:0] {
    S_IDLE, S_EDGE, S_CROSS, S_DOT, S_TEST, S_DIV, S_HIT, S_SHADE, S_DONE
  } state_t;

  state_t  state;
  pixel_t  pix_q;
  logic    pass;                              // 0 primary ray, 1 reflected ray
  wvec_t   org_q, d_q;                        // current ray
  wvec_t   e1_q, e2_q, t_q, p_q, q_q;
  logic signed [63:0] det_q, u_q, v_q, tt_q;
  logic [IW-1:0]      idx;
  logic               any_hit;                // nearest hit of this pass
  logic [IW-1:0]      best_idx;
  logic signed [63:0] best_t, best_det;
  logic               prim_hit;               // primary result, kept for pass 1
  logic [IW-1:0]      prim_idx;
  // divider
  logic [127:0]       rem_q;
  logic [QW-1:0]      quo_q;
  logic [CW-1:0]      bit_q;

  function automatic wvec_t cross3(wvec_t a, wvec_t b);
    wvec_t r;
    r.x = a.y * b.z - a.z * b.y;
    r.y = a.z * b.x - a.x * b.z;
    r.z = a.x * b.y - a.y * b.x;
    return r;
  endfunction

  function automatic logic signed [63:0] dot3(wvec_t a, wvec_t b);
    return a.x * b.x + a.y * b.y + a.z * b.z;
  endfunction

  function automatic wvec_t widen(vec3_t a);
    wvec_t r;
    r.x = 64'(a.x);
    r.y = 64'(a.y);
    r.z = 64'(a.z);
    return r;
  endfunction

  function automatic wvec_t widen_n(unorm_t a);
    wvec_t r;
    r.x = 64'(a.x);
    r.y = 64'(a.y);
    r.z = 64'(a.z);
    return r;
  endfunction

  function automatic wvec_t sub3(wvec_t a, wvec_t b);
    wvec_t r;
    r.x = a.x - b.x;
    r.y = a.y - b.y;
    r.z = a.z - b.z;
    return r;
  endfunction

  function automatic color_t shade_of(poly_t p, unorm_t l);
    logic signed [31:0] ndotl, diff, s;
    color_t c;
    ndotl = 32'(p.n.x) * 32'(l.x) + 32'(p.n.y) * 32'(l.y) + 32'(p.n.z) * 32'(l.z);
    diff  = ndotl >>> $clog2(UNIT);
    if (diff < 0)    diff = 0;
    if (diff > UNIT) diff = UNIT;
    s   = AMBIENT + (((UNIT - AMBIENT) * diff) >>> $clog2(UNIT));
    c.r = chan_t'((32'(p.color.r) * s) >>> $clog2(UNIT));
    c.g = chan_t'((32'(p.color.g) * s) >>> $clog2(UNIT));
    c.b = chan_t'((32'(p.color.b) * s) >>> $clog2(UNIT));
    return c;
  endfunction

  function automatic chan_t blend(chan_t a, chan_t b, logic [2:0] r);
    return chan_t'((32'(a) * (8 - 32'(r)) + 32'(b) * 32'(r)) >> 3);
  endfunction

  // Intersection test on the sign-normalised dot products. In the reflected
  // pass the triangle the ray leaves is not a candidate.
  logic hit_now, nearer;
  logic signed [127:0] lhs, rhs;
  always_comb begin
    hit_now = (det_q > 0) && (u_q >= 0) && (v_q >= 0) && (u_q + v_q <= det_q) && (tt_q > 0)
              && !(pass && idx == prim_idx);
    lhs     = 128'(tt_q) * 128'(best_det);
    rhs     = 128'(best_t) * 128'(det_q);
    nearer  = !any_hit || (lhs < rhs);
  end

  // Hit point and reflected direction of the primary ray.
  poly_t              pp;
  wvec_t              pn, hit_pt, refl_d;
  logic signed [63:0] dn, kq;
  always_comb begin
    kq       = signed'(64'(quo_q));
    pp       = polys[prim_idx];
    pn       = widen_n(pp.n);
    hit_pt.x = org_q.x + ((d_q.x * kq + 64'(2 ** (KFRAC - 1))) >>> KFRAC);
    hit_pt.y = org_q.y + ((d_q.y * kq + 64'(2 ** (KFRAC - 1))) >>> KFRAC);
    hit_pt.z = org_q.z + ((d_q.z * kq + 64'(2 ** (KFRAC - 1))) >>> KFRAC);
    dn       = dot3(d_q, pn);
    refl_d.x = d_q.x * 64'(UNIT * UNIT) - 2 * dn * pn.x;
    refl_d.y = d_q.y * 64'(UNIT * UNIT) - 2 * dn * pn.y;
    refl_d.z = d_q.z * 64'(UNIT * UNIT) - 2 * dn * pn.z;
  end

  // Final colour.
  color_t c_prim, c_sec, c_out;
  always_comb begin
    c_prim = shade_of(pp, light);
    c_sec  = (pass && any_hit) ? shade_of(polys[best_idx], light) : color_t'('0);
    c_out  = c_prim;
    if (pass) begin
      c_out.r = blend(c_prim.r, c_sec.r, pp.refl);
      c_out.g = blend(c_prim.g, c_sec.g, pp.refl);
      c_out.b = blend(c_prim.b, c_sec.b, pp.refl);
    end
  end

  poly_t cur;
  assign cur = polys[idx];

  logic [127:0] dsub;
  assign dsub = 128'(best_det) << bit_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      done    <= 1'b0;
      any_hit <= 1'b0;
      pass    <= 1'b0;
      idx     <= '0;
      result  <= '0;
      prim_hit <= 1'b0;
      prim_idx <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          pix_q   <= pix;
          org_q   <= widen(cam);
          d_q.x   <= 64'(signed'({1'b0, pix.x})) - 64'(H_RES / 2);
          d_q.y   <= 64'(V_RES / 2) - 64'(signed'({1'b0, pix.y}));
          d_q.z   <= 64'(FOCAL);
          idx     <= '0;
          any_hit <= 1'b0;
          pass    <= 1'b0;
          state   <= S_EDGE;
        end
        S_EDGE: begin
          e1_q  <= sub3(widen(cur.v1), widen(cur.v0));
          e2_q  <= sub3(widen(cur.v2), widen(cur.v0));
          t_q   <= sub3(org_q, widen(cur.v0));
          state <= S_CROSS;
        end
        S_CROSS: begin
          p_q   <= cross3(d_q, e2_q);
          q_q   <= cross3(t_q, e1_q);
          state <= S_DOT;
        end
        S_DOT: begin
          if (dot3(e1_q, p_q) < 0) begin
            det_q <= -dot3(e1_q, p_q);
            u_q   <= -dot3(t_q, p_q);
            v_q   <= -dot3(d_q, q_q);
            tt_q  <= -dot3(e2_q, q_q);
          end else begin
            det_q <= dot3(e1_q, p_q);
            u_q   <= dot3(t_q, p_q);
            v_q   <= dot3(d_q, q_q);
            tt_q  <= dot3(e2_q, q_q);
          end
          state <= S_TEST;
        end
        S_TEST: begin
          if (hit_now && nearer) begin
            any_hit  <= 1'b1;
            best_idx <= idx;
            best_t   <= tt_q;
            best_det <= det_q;
          end
          if (32'(idx) != N_POLY - 1) begin
            idx   <= idx + 1'b1;
            state <= S_EDGE;
          end else if (pass) begin
            state <= S_SHADE;
          end else begin
            // end of the primary pass
            prim_hit <= any_hit || hit_now;
            prim_idx <= (hit_now && nearer) ? idx : best_idx;
            if (hit_now && nearer) begin
              rem_q <= 128'(tt_q) << KFRAC;
              best_det <= det_q;
            end else begin
              rem_q <= 128'(best_t) << KFRAC;
            end
            quo_q <= '0;
            bit_q <= CW'(QW - 1);
            if ((hit_now && nearer) ? (polys[idx].refl != 0) : (any_hit && polys[best_idx].refl != 0))
              state <= S_DIV;
            else
              state <= S_SHADE;
          end
        end
        S_DIV: begin
          // restoring division, one quotient bit per cycle, MSB first
          if (rem_q >= dsub) begin
            rem_q        <= rem_q - dsub;
            quo_q[bit_q] <= 1'b1;
          end
          if (bit_q == '0) state <= S_HIT;
          else             bit_q <= bit_q - 1'b1;
        end
        S_HIT: begin
          org_q   <= hit_pt;
          d_q     <= refl_d;
          pass    <= 1'b1;
          idx     <= '0;
          any_hit <= 1'b0;
          state   <= S_EDGE;
        end
        S_SHADE: begin
          result.x     <= pix_q.x;
          result.y     <= pix_q.y;
          result.hit   <= prim_hit;
          result.color <= prim_hit ? c_out : color_t'('0);
          done         <= 1'b1;
          state        <= S_DONE;
        end
        S_DONE: if (ack) begin
          done  <= 1'b0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // A pixel may only be handed to an idle unit.
  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !busy);

endmodule
