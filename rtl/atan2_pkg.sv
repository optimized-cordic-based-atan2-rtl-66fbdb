// atan2_pkg: constants and elaboration-time functions shared by the CORDIC
// atan2 operator.
//
// Direction numbering. The operator resolves W+1 rotation directions for a
// W-bit result: d[-1] from the +-pi/2 pre-rotation, then d[0] .. d[W-1] from
// the regular CORDIC iterations. Inside the RTL they are held as a (W+1)-bit
// vector whose bit b carries d[b-1]; a bit is 1 when the y value it was taken
// from was negative (d = +1) and 0 otherwise (d = -1).
//
// z-path grouping. The directions are split into consecutive groups, each
// served by one look-up table (a "LUTn"): the first group covers N0
// directions (N0 = 6: a plain 6-input LUT, since nothing has been accumulated
// yet), every further group N directions (N = 5: a 5-input LUT feeding the
// carry chain), the last one whatever is left. The number of groups is
// 1 + ceil((W+1-N0)/N).
//
// LUTn contents. Entry idx of the table for directions d[s] .. d[s+n-1] is
//   round( -sum_k d[s+k] * a[s+k] * 2^(W+ZG) ) mod 2^(W+ZG)
// with a[-1] = 1/4 (pi/2 expressed in turns) and a[i] = atan(2^-i)/(2*pi).
// The first table also holds the rounding constant 2^-(W+1), so that the
// final result only has to be truncated to W bits.
//
// Pipeline placement. The W+1 steps (pre-rotation, W-1 x/y iterations, final
// sign extraction) are spread over CYC register stages; step k sits in stage
// (k*CYC)/(W+1). Each z-path group is added as late as possible: the last
// group in the final stage, every earlier group one stage before the next
// unless its directions are not known until later. z is therefore carried in
// only a few stages while the direction bits travel as plain delay lines.
package atan2_pkg;

  localparam real PI = 3.14159265358979323846;

  // number of LUTn groups for W+1 directions, first group N0 wide, others N
  function automatic int num_groups(input int w, input int n0, input int n);
    return 1 + (w + 1 - n0 + n - 1) / n;
  endfunction

  // first direction bit (vector bit index, 0 = d[-1]) of group j
  function automatic int group_first(input int j, input int n0, input int n);
    return (j == 0) ? 0 : n0 + (j - 1) * n;
  endfunction

  // number of directions in group j
  function automatic int group_len(input int w, input int j, input int n0, input int n);
    int first, last;
    first = group_first(j, n0, n);
    last  = (j == 0) ? n0 - 1 : first + n - 1;
    if (last > w) last = w;
    return last - first + 1;
  endfunction

  // group that holds direction bit b
  function automatic int group_of_bit(input int b, input int n0, input int n);
    return (b < n0) ? 0 : 1 + (b - n0) / n;
  endfunction

  // register stage that holds step k
  function automatic int stage_of_step(input int w, input int cyc, input int k);
    return (k * cyc) / (w + 1);
  endfunction

  // last step that belongs to register stage s
  function automatic int last_step_of_stage(input int w, input int cyc, input int s);
    int r;
    r = 0;
    for (int k = 0; k <= w; k++)
      if (stage_of_step(w, cyc, k) == s) r = k;
    return r;
  endfunction

  // a pipeline register follows step k
  function automatic bit reg_after_step(input int w, input int cyc, input int k);
    return (k == w) || (stage_of_step(w, cyc, k + 1) != stage_of_step(w, cyc, k));
  endfunction

  // register stage in which group j is added to z
  function automatic int group_stage(input int w, input int cyc, input int n0, input int n,
                                     input int j);
    int ng, s, last_bit, ready;
    ng = num_groups(w, n0, n);
    s  = stage_of_step(w, cyc, w);
    for (int g = ng - 1; g >= j; g--) begin
      last_bit = group_first(g, n0, n) + group_len(w, g, n0, n) - 1;
      // direction bit b is produced by step b
      ready = stage_of_step(w, cyc, last_bit);
      if (g != ng - 1) s = s - 1;
      if (s < ready) s = ready;
    end
    return s;
  endfunction

  // step after which group j has been added to z
  function automatic int group_step(input int w, input int cyc, input int n0, input int n,
                                    input int j);
    return last_step_of_stage(w, cyc, group_stage(w, cyc, n0, n, j));
  endfunction

  // one LUTn entry, returned in the low zw bits
  function automatic longint lut_entry(input int zw, input int zg, input int first_dir,
                                       input int len, input int idx, input bit add_round);
    real    v, a;
    longint r;
    int     i;
    v = 0.0;
    for (int k = 0; k < len; k++) begin
      i = first_dir + k;  // iteration number, -1 = pre-rotation
      a = (i == -1) ? 0.25 : $atan(2.0 ** (-i)) / (2.0 * PI);
      if (((idx >> k) & 1) != 0) v = v - a;
      else                v = v + a;
    end
    r = longint'($floor(v * (2.0 ** zw) + 0.5));
    if (add_round && zg > 0) r = r + (longint'(1) << (zg - 1));
    return r & ((longint'(1) << zw) - 1);
  endfunction

endpackage
