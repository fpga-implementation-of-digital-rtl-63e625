// fir_ref_pkg: reference model used by the FIR testbenches.
//
// Holds an independent copy of the three coefficient tables (first half of
// each symmetric response), sign-magnitude encode/decode helpers, and a small
// class that keeps the input history of one filter and returns the exact
// integer output y(n) = sum h(k) x(n-k) to compare with the hardware.
package fir_ref_pkg;

  localparam int LPF_H [27] = '{-45,-64,0,92,89,-61,-204,-99,229,370,0,-553,-511,332,1037,473,
                                -1039,-1617,0,2330,2178,-1468,-4948,-2586,7289,19239,24616};
  localparam int BPF_H [37] = '{-650,-2283,-693,1595,1199,-249,0,268,-1386,-1983,927,3289,1009,
                                -2351,-1789,377,0,-418,2203,3216,-1537,-5586,-1761,4230,3333,-731,
                                0,895,-5019,-7900,4141,16917,6217,-18468,-20131,8086,26604};
  localparam int HPF_H [27] = '{-16,-34,0,48,31,-57,-88,33,161,52,-213,-211,180,418,0,-595,-367,
                                618,905,-326,-1537,-496,2139,2385,-2572,-10040,19112};

  // kind: 0 low-pass, 1 band-pass, 2 high-pass
  function automatic int ref_taps(int kind);
    return (kind == 1) ? 73 : 53;
  endfunction

  function automatic int ref_coef(int kind, int k);
    int n = ref_taps(kind);
    int j = (k < n / 2 + 1) ? k : n - 1 - k;
    case (kind)
      1:       return BPF_H[j];
      2:       return HPF_H[j];
      default: return LPF_H[j];
    endcase
  endfunction

  // 4-bit sign-magnitude sample -> integer -7 .. 7
  function automatic int sm4_val(logic [3:0] x);
    return x[3] ? -int'(x[2:0]) : int'(x[2:0]);
  endfunction

  // integer -> 32-bit sign-magnitude with positive zero
  function automatic logic [31:0] sm32(longint v);
    longint m = (v < 0) ? -v : v;
    return {logic'(v < 0), m[30:0]};
  endfunction

  function automatic longint sm32_val(logic [31:0] w);
    return w[31] ? -longint'(w[30:0]) : longint'(w[30:0]);
  endfunction

  class fir_model;
    int kind;
    int n;
    int hist [$];   // hist[0] = newest sample value

    function new(int kind);
      this.kind = kind;
      this.n    = ref_taps(kind);
      clear();
    endfunction

    function void clear();
      hist.delete();
      repeat (n) hist.push_back(0);
    endfunction

    function void push(logic [3:0] x);
      hist.push_front(sm4_val(x));
      void'(hist.pop_back());
    endfunction

    function longint y();
      longint acc = 0;
      for (int k = 0; k < n; k++) acc += longint'(ref_coef(kind, k)) * hist[k];
      return acc;
    endfunction
  endclass

endpackage
