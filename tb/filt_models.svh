// filt_models.svh: bit-exact software models of the receive filters, for
// test benches. Each class keeps the state of one filter and its step()
// takes one input sample (called only when the hardware is enabled) and
// returns the new output, using the same fixed-point steps as the hardware:
// IIR state scaled by 2^16 with 32-bit wrap, output bits [30:15]; the FIR
// output is the full 21-bit sum of taps 1 3 5 7 7 5 3 1.
class lpf_model;
  int shift; int x0 = 0, y0 = 0;
  function new(int s); shift = s; endfunction
  function int step(int din);
    int yy = y0 - (y0 >>> shift) + (x0 >>> shift);
    x0 = din <<< 16; y0 = yy;
    return out();
  endfunction
  function int out(); return int'(16'(y0 >>> 15)) <<< 16 >>> 16; endfunction
endclass

class hpf_model;
  int shift; int x0 = 0, x1 = 0, y0 = 0;
  function new(int s); shift = s; endfunction
  function int step(int din);
    int yy = y0 - (y0 >>> shift) + (x0 - x1);
    x1 = x0; x0 = din <<< 16; y0 = yy;
    return out();
  endfunction
  function int out(); return int'(16'(y0 >>> 15)) <<< 16 >>> 16; endfunction
endclass

class fir_model;
  int h [8] = '{0, 0, 0, 0, 0, 0, 0, 0};
  function int step(int din);
    for (int j = 7; j > 0; j--) h[j] = h[j-1];
    h[0] = din;
    return out();
  endfunction
  function int out();
    int s = h[0] + 3*h[1] + 5*h[2] + 7*h[3] + 7*h[4] + 5*h[5] + 3*h[6] + h[7];
    return (s <<< 11) >>> 11;   // 21-bit wrap
  endfunction
endclass
