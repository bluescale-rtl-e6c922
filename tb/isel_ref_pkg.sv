// isel_ref_pkg: reference model of the interface selection, for testbenches.
// Exact integer arithmetic: utilisations are scaled by the common multiple
// LCM of all periods used (the caller must keep periods dividing it). For a
// VE it enumerates Pi = 1 .. min(min T_i, min T_i / (2 (U - U_X))), scans
// Theta = 1 .. Pi linearly for the first Theta with Theta/Pi > U_X whose
// supply bound covers the demand bound at every integer t below beta, and
// keeps the pair of smallest bandwidth Theta/Pi (smaller Pi on a tie).
package isel_ref_pkg;
  typedef struct { int id; longint T; longint C; } rtask_t;
  typedef rtask_t tq_t [$];

  function automatic longint sbf(longint t, longint pi, longint th);
    longint tp, q, eps;
    tp = t - (pi - th);
    if (tp < 0) return 0;
    q = tp / pi;
    eps = tp - pi * q - (pi - th);
    if (eps < 0) eps = 0;
    return q * th + eps;
  endfunction

  function automatic longint num_of(tq_t ts, longint lcm);
    longint n = 0;
    foreach (ts[i]) n += ts[i].C * (lcm / ts[i].T);
    return n;
  endfunction

  function automatic logic schedulable(tq_t ts, longint pi, longint th, longint nx, longint lcm);
    longint slack;
    slack = th * lcm - pi * nx;
    for (longint t = 1; t * slack < 2 * th * (pi - th) * lcm; t++) begin
      longint d = 0;
      foreach (ts[i]) d += (t / ts[i].T) * ts[i].C;
      if (d > sbf(t, pi, th)) return 1'b0;
    end
    return 1'b1;
  endfunction

  // ts_x: tasks of VE X; ntot: sum of C*LCM/T over the tasks of all four VEs
  function automatic logic ref_select(tq_t ts_x, longint ntot, longint lcm,
                                      output longint best_th, output longint best_pi);
    longint nx, mint, pimax;
    logic found = 1'b0;
    best_th = 0; best_pi = 0;
    if (ts_x.size() == 0) return 1'b0;
    nx = num_of(ts_x, lcm);
    mint = ts_x[0].T;
    foreach (ts_x[i]) if (ts_x[i].T < mint) mint = ts_x[i].T;
    if (ntot == nx) pimax = mint;
    else begin
      pimax = (mint * lcm) / (2 * (ntot - nx));
      if (pimax > mint) pimax = mint;
    end
    for (longint pi = 1; pi <= pimax; pi++) begin
      for (longint th = 1; th <= pi; th++) begin
        if (th * lcm > pi * nx && (th == pi || schedulable(ts_x, pi, th, nx, lcm))) begin
          if (!found || th * best_pi < best_th * pi) begin
            found = 1'b1; best_th = th; best_pi = pi;
          end
          break;
        end
      end
    end
    return found;
  endfunction
endpackage
