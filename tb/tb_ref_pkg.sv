// Reference model of the junction controllers, for the testbenches.
//
// Describes each junction type as a list of phases (roads with straight
// right of way, roads with turning right of way, green and yellow seconds)
// and predicts lights and down-counts at second s of a phase by walking the
// cycle forward in time. P is the clock period factor (1, 2, 3, 4 or 6):
// basic/Y green 15P, class-2 cross 5P and straight 9P (special: 14P+2),
// T-shape main road 30P with 4 s yellow, turning and side road 15P.
package tb_ref_pkg;
  import tlc_pkg::*;

  typedef struct {
    int n;
    int str  [4];
    int trn  [4];
    int grn  [4];
    int yel  [4];
    int present;
    int cross_inst;
  } jdesc_t;

  function automatic jdesc_t describe(int sel, bit sub, int p);
    jdesc_t d;
    for (int i = 0; i < 4; i++) begin d.str[i] = 0; d.trn[i] = 0; d.grn[i] = 0; d.yel[i] = 0; end
    case (sel)
      0: begin
        d.n = 4; d.present = 'hF; d.cross_inst = 0;
        for (int i = 0; i < 4; i++) begin d.str[i] = 1 << i; d.grn[i] = 15 * p; d.yel[i] = 2; end
      end
      1: begin
        d.present = 'hF; d.cross_inst = 'hF;
        if (!sub) begin
          d.n = 4;
          d.trn[0] = 'b0101; d.grn[0] = 5 * p; d.yel[0] = 2;
          d.str[1] = 'b0101; d.grn[1] = 9 * p; d.yel[1] = 2;
          d.trn[2] = 'b1010; d.grn[2] = 5 * p; d.yel[2] = 2;
          d.str[3] = 'b1010; d.grn[3] = 9 * p; d.yel[3] = 2;
        end else begin
          d.n = 2;
          d.str[0] = 'b0101; d.grn[0] = 14 * p + 2; d.yel[0] = 2;
          d.str[1] = 'b1010; d.grn[1] = 14 * p + 2; d.yel[1] = 2;
        end
      end
      2: begin
        d.n = 3; d.present = 'h7; d.cross_inst = 0;
        for (int i = 0; i < 3; i++) begin d.str[i] = 1 << i; d.grn[i] = 15 * p; d.yel[i] = 2; end
      end
      default: begin
        d.n = 3; d.present = 'h7; d.cross_inst = 'h1;
        d.str[0] = 'b0011; d.grn[0] = 30 * p; d.yel[0] = 4;
        d.trn[1] = 'b0001; d.grn[1] = 15 * p; d.yel[1] = 2;
        d.str[2] = 'b0100; d.grn[2] = 15 * p; d.yel[2] = 2;
      end
    endcase
    return d;
  endfunction

  function automatic int cycle_len(jdesc_t d);
    int c = 0;
    for (int i = 0; i < d.n; i++) c += d.grn[i] + d.yel[i];
    return c;
  endfunction

  // Expected outputs in phase ph at second s (0 = first second of the
  // phase). dc describes the timing in force, dn the nominal timing.
  function automatic junction_out_t expect_out(jdesc_t dc, jdesc_t dn, int ph, int s, bit walk_en);
    junction_out_t o;
    int rem, g_left;
    o = '0;
    rem    = dc.grn[ph] + dc.yel[ph] - s;
    g_left = dc.grn[ph] - s;
    for (int k = 0; k < 4; k++) begin
      bit st, tr, moving;
      int acc, q, nl;
      if (!dc.present[k]) continue;
      st = dc.str[ph][k];
      tr = dc.trn[ph][k];
      moving = st || tr;
      o.lights[k].green  = st && g_left > 0;
      o.lights[k].yellow = st && g_left <= 0;
      o.lights[k].red    = !st;
      o.lights[k].walk   = st && walk_en && g_left > 0 && (g_left > 4 || g_left % 2 == 0);
      if (dc.cross_inst[k]) begin
        o.lights[k].green_cross  = tr && g_left > 0;
        o.lights[k].yellow_cross = tr && g_left <= 0;
        o.lights[k].red_cross    = !tr;
      end
      // green display
      if (moving) o.count_green[k] = GCNT_W'(rem);
      else begin
        nl = 0;
        for (int j = 1; j <= dn.n; j++) begin
          q = (ph + j) % dn.n;
          if ((dn.str[q][k] || dn.trn[q][k]) && nl == 0) nl = dn.grn[q] + dn.yel[q];
        end
        o.count_green[k] = GCNT_W'(nl);
      end
      // red display
      if (st) begin
        acc = 0;
        for (int q2 = 0; q2 < dn.n; q2++) if (!dn.str[q2][k]) acc += dn.grn[q2] + dn.yel[q2];
        o.count_red[k] = RCNT_W'(acc);
      end else begin
        acc = rem;
        for (int j = 1; j < dn.n; j++) begin
          q = (ph + j) % dn.n;
          if (dn.str[q][k]) break;
          acc += dn.grn[q] + dn.yel[q];
        end
        o.count_red[k] = RCNT_W'(acc);
      end
    end
    return o;
  endfunction

  // Phase and second within the phase reached t seconds after the cycle start.
  function automatic void locate(jdesc_t d, int t, output int ph, output int s);
    int tt = t % cycle_len(d);
    ph = 0;
    while (tt >= d.grn[ph] + d.yel[ph]) begin
      tt -= d.grn[ph] + d.yel[ph];
      ph++;
    end
    s = tt;
  endfunction

  // Night-mode picture: present roads' straight yellow only.
  function automatic junction_out_t night_out(jdesc_t d, bit on);
    junction_out_t o = '0;
    for (int k = 0; k < 4; k++) if (d.present[k]) o.lights[k].yellow = on;
    return o;
  endfunction

endpackage
