// mimo_ref_pkg: reference arithmetic for the detector testbenches.
//
// Written independently of the RTL: products by plain multiplication, child
// lists by sorting constellation points by distance, K-best by a stable
// selection sort. Fixed-point conventions are those documented in mimo_pkg.
package mimo_ref_pkg;
  import mimo_pkg::*;

  function automatic int ref_omega(int modi);
    return (modi == 0) ? 2 : (modi == 1) ? 4 : 8;
  endfunction

  function automatic int ref_fold(int modi);
    return modi + 1;
  endfunction

  // X = floor(r * round(4096/sqrt(E)) / 4096)
  function automatic longint ref_x(longint r, int modi);
    longint sc;
    longint pr;
    sc = (modi == 0) ? 2896 : (modi == 1) ? 1295 : 632;
    pr = r * sc;
    return pr >>> 12;
  endfunction

  // PED increment for distance d (Q.8): floor(d^2 / 2^12)
  function automatic longint ref_inc(longint d);
    return (d * d) >> 12;
  endfunction

  function automatic longint ref_abs(longint v);
    return (v < 0) ? -v : v;
  endfunction

  // Active symbols sorted by distance |p - x*s| (ties: larger symbol first).
  function automatic void ref_zigzag(longint p, longint x, int modi,
                                     output int list[8], output int n);
    int vmax;
    int tmp;
    vmax = ref_omega(modi) - 1;
    n = 0;
    for (int v = -vmax; v <= vmax; v += 2) begin
      list[n] = v;
      n++;
    end
    for (int i = 0; i < n; i++)
      for (int j = 0; j + 1 < n - i; j++) begin
        longint da, db;
        da = ref_abs(p - x * list[j]);
        db = ref_abs(p - x * list[j+1]);
        if (da > db || (da == db && list[j] < list[j+1])) begin
          tmp = list[j]; list[j] = list[j+1]; list[j+1] = tmp;
        end
      end
  endfunction

  function automatic longint node_key(node_t n);
    return (n.valid ? 0 : 4096) + longint'(n.ped);
  endfunction

  // Stable ascending sort by key of the first cnt entries.
  function automatic void ref_sort(inout node_t a[], input int cnt);
    node_t t;
    for (int i = 1; i < cnt; i++) begin
      int j;
      t = a[i];
      j = i - 1;
      while (j >= 0 && node_key(a[j]) > node_key(t)) begin
        a[j+1] = a[j];
        j--;
      end
      a[j+1] = t;
    end
  endfunction
endpackage
