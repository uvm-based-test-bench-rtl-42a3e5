// axi4_ref_pkg: reference functions shared by the AXI4 testbenches.
//
// ref_next gives the address of the next beat of a burst, worked out with
// integer division rather than masks: FIXED keeps the address, INCR goes to
// the next multiple of the beat size, WRAP falls back to the start of the
// aligned block of (beats * bytes) bytes at its upper end.
// beat_addr gives the address of beat n of a burst by stepping ref_next.
package axi4_ref_pkg;
  import axi4_pkg::*;

  function automatic longint unsigned ref_next(longint unsigned a, int sz, int ln, burst_t bt);
    longint unsigned bytes, total, lower, nxt;
    bytes = 64'd1 << sz;
    nxt   = (a / bytes) * bytes + bytes;
    if (bt == BURST_FIXED) return a;
    if (bt == BURST_WRAP) begin
      total = bytes * (ln + 1);
      lower = (a / total) * total;
      if (nxt >= lower + total) nxt = lower;
    end
    return nxt & 64'hFFFF_FFFF;
  endfunction

  function automatic addr_t beat_addr(addr_t start, int sz, int ln, burst_t bt, int n);
    longint unsigned a;
    a = start;
    for (int i = 0; i < n; i++) a = ref_next(a, sz, ln, bt);
    return addr_t'(a);
  endfunction

  // byte strobes of the lanes a narrow or full beat at address a occupies
  function automatic strb_t lane_strb(addr_t a, int sz);
    strb_t s;
    int bytes = 1 << sz;
    int lo;
    s  = '0;
    lo = int'(a[1:0]);
    for (int i = 0; i < 4; i++)
      if (i >= (lo / bytes) * bytes && i < (lo / bytes) * bytes + bytes && i >= lo) s[i] = 1'b1;
    return s;
  endfunction
endpackage
