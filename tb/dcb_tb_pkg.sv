// dcb_tb_pkg -- testbench-only models for the single-bit DC blocker.
//
// dcb_ref     cycle-accurate reference of the whole blocker, written
//             directly from the loop equations in plain integer
//             arithmetic (no shared code with the RTL):
//               s(n)   = sgn v(n-1)  (first order) or sgn v2(n) (second)
//               u(n)   = x(n) - s(n),  y(n+1) = (u(n) >= 0) ? +1 : -1
//               w(n+1) = clip(w(n) + alpha*y(n))
//               v(n)   = clip(v(n-1) + w(n) - beta*s(n))          (order 1)
//               v1(n)  = clip(v1(n-1) + w(n) - beta*s(n)),
//               v2(n+1)= clip(v2(n) + v1(n) - beta*s(n))          (order 2)
//             with clip() saturating to a signed DATA_W-bit range.
// sdm_source  an ideal (floating-point) second-order sigma-delta encoder
//             that turns a real test signal into the single-bit input
//             stream, standing in for the converter that would feed the
//             blocker.
// gauss()     approximately normal random numbers (sum of 12 uniforms).
package dcb_tb_pkg;

  class dcb_ref;
    int order, data_w, alpha_q, beta_q;
    longint w, v, v1, v2;
    int y;              // +1 / -1, the registered output
    int s;              // feedback bit of the current sample
    int u;              // x - s of the current sample
    bit sat;            // a clip happened in the current sample

    function new(int order, int data_w, int alpha_q, int beta_q);
      this.order   = order;
      this.data_w  = data_w;
      this.alpha_q = alpha_q;
      this.beta_q  = beta_q;
      reset();
    endfunction

    function void reset();
      w = 0; v = 0; v1 = 0; v2 = 0; y = 1;
      eval_s();
    endfunction

    function longint clip(longint a, ref bit hit);
      longint hi = (longint'(1) <<< (data_w - 1)) - 1;
      longint lo = -(longint'(1) <<< (data_w - 1));
      if (a > hi) begin hit = 1; return hi; end
      if (a < lo) begin hit = 1; return lo; end
      return a;
    endfunction

    // Feedback bit as seen before the clock edge of the current sample.
    function void eval_s();
      if (order == 1) s = (v  >= 0) ? 1 : -1;
      else            s = (v2 >= 0) ? 1 : -1;
    endfunction

    // Combinational view of sample n for input x (+1/-1): sets u and sat.
    function void peek(int x);
      bit h = 0;
      longint t1;
      void'(clip(w + alpha_q * y, h));
      if (order == 1) begin
        void'(clip(v + w - beta_q * s, h));
      end else begin
        t1 = clip(v1 + w - beta_q * s, h);
        void'(clip(v2 + t1 - beta_q * s, h));
      end
      u = x - s;
      sat = h;
    endfunction

    // Advance one sample (a clock edge with en = 1).
    function void step(int x);
      bit h = 0;
      longint nw, t1;
      peek(x);
      nw = clip(w + alpha_q * y, h);
      if (order == 1) begin
        v = clip(v + w - beta_q * s, h);
      end else begin
        t1 = clip(v1 + w - beta_q * s, h);
        v2 = clip(v2 + t1 - beta_q * s, h);
        v1 = t1;
      end
      y = (u >= 0) ? 1 : -1;
      w = nw;
      eval_s();
    endfunction
  endclass

  class sdm_source;
    real i1, i2;
    function new();
      i1 = 0.0; i2 = 0.0;
    endfunction
    // Encode one sample of a signal in (-1, 1); returns 1 for +1, 0 for -1.
    function bit next(real a);
      bit b = (i2 >= 0.0);
      real q = b ? 1.0 : -1.0;
      i1 = i1 + a - q;
      i2 = i2 + i1 - q;
      return b;
    endfunction
  endclass

  function automatic real gauss();
    real acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom) / 4294967296.0;
    return acc - 6.0;
  endfunction

endpackage
