// tb_ref_pkg: reference models used by the testbenches.
//
// The models work at sample granularity with 64-bit integers and are written
// from the defining equations, not from the RTL schedule:
//   bq_ref  second-order section, transposed direct form II, output truncated
//           to 32 bits (arithmetic shift) and saturated
//   dl_ref  delay line returning the input of `d` samples ago, zero before
//           that input exists
//   line_ref   bidirectional cable section (filters, then delay line)
//   bbb_ref    building block: line, 3x3 node matrix, open-ended tap and the
//              three bypass switches
//   dac_ref    converter rounding and clipping
package tb_ref_pkg;
  import emu_pkg::*;

  function automatic longint sat32(longint v);
    if (v > 64'sd2147483647)  return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  function automatic coef_t q16(real v);
    return coef_t'($rtoi(v * 65536.0));
  endfunction

  class bq_ref;
    longint s1 = 0, s2 = 0;
    function longint step(bq_coef_t c, longint x);
      longint y;
      y  = sat32((longint'(c.b0) * x + s1) >>> 16);
      s1 = longint'(c.b1) * x - longint'(c.a1) * y + s2;
      s2 = longint'(c.b2) * x - longint'(c.a2) * y;
      return y;
    endfunction
  endclass

  class dl_ref;
    longint h[$];
    int     depth;
    function new(int depth);
      this.depth = depth;
    endfunction
    function longint step(int d, longint x);
      h.push_back(x);
      if (h.size() > depth) void'(h.pop_front());
      if (d == 0) return x;
      if (h.size() - 1 >= d) return h[h.size() - 1 - d];
      return 0;
    endfunction
  endclass

  // Bidirectional line section at sample level: every stage and both delay
  // lines are registers updated together on each strobe.
  class line_ref;
    int     stages;
    bq_ref  fq[], bq[];
    dl_ref  fd, bd;
    longint fy[], by[];
    longint a_out = 0, b_del = 0;
    function new(int stages, int depth);
      this.stages = stages;
      fq = new[stages]; bq = new[stages];
      fy = new[stages]; by = new[stages];
      foreach (fq[k]) begin
        fq[k] = new(); bq[k] = new(); fy[k] = 0; by[k] = 0;
      end
      fd = new(depth); bd = new(depth);
    endfunction
    function longint b_out();
      return by[0];
    endfunction
    // One strobe with inputs a_in and b_in (values presented at the strobe).
    function void step(bq_coef_t c[], int d, longint a_in, longint b_in);
      longint nfy[], nby[];
      longint na_out, nb_del;
      nfy = new[stages]; nby = new[stages];
      for (int k = 0; k < stages; k++) begin
        nfy[k] = fq[k].step(c[k], (k == 0) ? a_in : fy[k-1]);
        nby[k] = bq[k].step(c[k], (k == stages-1) ? b_del : by[k+1]);
      end
      na_out = fd.step(d, fy[stages-1]);
      nb_del = bd.step(d, b_in);
      fy = nfy; by = nby; a_out = na_out; b_del = nb_del;
    endfunction
  endclass

  // Building block at sample level. out_f/out_b give the block's outputs
  // for the given inputs from the present register values; step() advances
  // all registers by one strobe.
  class bbb_ref;
    int       stages;
    bq_coef_t line_c[], tap_c[];
    bq_coef_t node_c [3][3];
    int       ld = 0, td = 0;
    bit       line_bypass = 0, node_bypass = 1, tap_en = 0;
    line_ref  line, tap;
    bq_ref    nq [3][3];
    longint   h [3][3];

    function new(int stages, int depth);
      this.stages = stages;
      line_c = new[stages]; tap_c = new[stages];
      foreach (line_c[k]) begin
        line_c[k] = '0; line_c[k].b0 = COEF_ONE; tap_c[k] = '0;
      end
      foreach (nq[j, i]) begin
        nq[j][i] = new(); h[j][i] = 0; node_c[j][i] = '0;
      end
      line = new(stages, depth);
      tap  = new(stages, depth);
    endfunction

    function longint n_out(int j);
      return sat32(h[j][0] + h[j][1] + h[j][2]);
    endfunction
    function longint line_f(longint in_f);
      return line_bypass ? in_f : line.a_out;
    endfunction
    function longint to_line_b(longint in_b);
      return node_bypass ? in_b : n_out(0);
    endfunction
    function longint out_f(longint in_f);
      return node_bypass ? line_f(in_f) : n_out(1);
    endfunction
    function longint out_b(longint in_b);
      return line_bypass ? to_line_b(in_b) : line.b_out();
    endfunction

    function void step(longint in_f, longint in_b);
      longint nin [3];
      longint tin;
      nin[0] = line_f(in_f);
      nin[1] = in_b;
      nin[2] = tap_en ? tap.b_out() : 0;
      tin    = tap_en ? n_out(2) : 0;
      line.step(line_c, ld, in_f, to_line_b(in_b));
      tap.step(tap_c, td, tin, tap.a_out);
      foreach (h[j, i]) h[j][i] = nq[j][i].step(node_c[j][i], nin[i]);
    endfunction
  endclass

  // DAC code for a 32-bit sample: round to the converter LSB, clip to 14 bits.
  function automatic longint dac_ref(longint v, output bit clip);
    longint r;
    r = (v + (1 << (CONV_SHIFT - 1))) >>> CONV_SHIFT;
    clip = 0;
    if (r > 8191)  begin r = 8191;  clip = 1; end
    if (r < -8192) begin r = -8192; clip = 1; end
    return r;
  endfunction

endpackage
