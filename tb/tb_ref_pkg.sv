// Reference arithmetic and test-data generators shared by the testbenches.
//
// act_ref recomputes bias + leaky ReLU + requantisation with plain integer
// arithmetic (explicit floor division instead of shifts), so it does not
// share code with the activation unit it checks. The gen_* functions give
// deterministic small Q8.8 test values from a hash of their indices.
package tb_ref_pkg;

  function automatic longint floor_div(input longint a, input longint b);
    if (a >= 0) return a / b;
    return -((-a + b - 1) / b);
  endfunction

  function automatic int act_ref(input longint acc, input int bias, input bit leaky);
    longint t;
    t = acc + longint'(bias) * 256;
    if (leaky && t < 0) t = floor_div(t * 13, 128);
    t = floor_div(t, 256);
    if (t > 32767) t = 32767;
    if (t < -32768) t = -32768;
    return int'(t);
  endfunction

  function automatic int hash(input int a, input int b, input int c, input int d);
    int unsigned h;
    h = 32'h9e3779b9 ^ a;
    h = h * 32'h85ebca6b + b;
    h = (h ^ (h >> 13)) * 32'hc2b2ae35 + c;
    h = (h ^ (h >> 16)) * 32'h27d4eb2f + d;
    h = h ^ (h >> 15);
    return int'(h & 32'h7fffffff);
  endfunction

  // weight of layer l, filter f, depth c, tap k: about -0.5 .. +0.5
  function automatic int gen_w(input int l, input int f, input int c, input int k);
    return (hash(l, f, c, k) % 257) - 128;
  endfunction

  function automatic int gen_bias(input int l, input int f);
    return (hash(l, f, 77, 5) % 129) - 64;
  endfunction

  // picture pixel: 0 .. 1.0 (Q8.8)
  function automatic int gen_px(input int c, input int y, input int x);
    return hash(c, y, x, 3) % 257;
  endfunction

endpackage
