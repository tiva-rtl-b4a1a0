// tiva_ref_pkg: behavioural reference of the TIVA permutation and checksum,
// written independently of the RTL for the testbenches.
//
// toffoli_ref applies Toffoli function number f (0..54) to a 5-bit value
// directly from its control set and target, rpu_ref evaluates the whole
// permutation network bit by bit, and term_ref gives one sign-extended
// checksum term.
package tiva_ref_pkg;

  // control mask and target of function f, numbered by control-set size
  // (2, 3, 4), then mask value, then target bit
  function automatic void toffoli_def(input int f, output int ctrl, output int tgt);
    int list_c[$];
    int list_t[$];
    for (int k = 2; k <= 4; k++)
      for (int m = 0; m < 32; m++)
        if ($countones(5'(m)) == k)
          for (int t = 0; t < 5; t++)
            if (((m >> t) & 1) == 0) begin
              list_c.push_back(m);
              list_t.push_back(t);
            end
    ctrl = list_c[f % 55];
    tgt  = list_t[f % 55];
  endfunction

  // row r of a generic LUT holds function r mod 55
  function automatic logic [4:0] toffoli_ref(input int row, input logic [4:0] x);
    int c, t;
    toffoli_def(row % 55, c, t);
    if ((int'(x) & c) == c) return x ^ 5'(1 << t);
    return x;
  endfunction

  // 160-bit table of a LUT row, in the RTL's column layout (bit j*32 + x)
  function automatic logic [159:0] table_ref(input int row);
    logic [159:0] v;
    logic [4:0]   y;
    for (int x = 0; x < 32; x++) begin
      y = toffoli_ref(row, 5'(x));
      for (int j = 0; j < 5; j++) v[j*32 + x] = y[j];
    end
    return v;
  endfunction

  // permutation network: rows[k] = function row of LUT k, xb = exchanger bits
  function automatic logic [9:0] rpu_ref(input int rows[6], input logic [2:0] xb,
                                         input logic [9:0] a);
    logic [4:0] y0, y1, y2, y3, y4, y5, i2, i3, i4, i5;
    logic [2:0] u0, u1;
    logic [1:0] w0, w1;
    logic [9:0] ar, pr;
    for (int n = 0; n < 10; n++) ar[9-n] = a[n];
    y0 = toffoli_ref(rows[0], ar[9:5]);
    y1 = toffoli_ref(rows[1], ar[4:0]);
    u0 = xb[0] ? y1[4:2] : y0[4:2];
    u1 = xb[0] ? y0[4:2] : y1[4:2];
    w0 = xb[1] ? y1[1:0] : y0[1:0];
    w1 = xb[1] ? y0[1:0] : y1[1:0];
    i2 = {u0[2], u0[1], u0[0], u1[2], u1[1]};
    i3 = {u1[0], w0[1], w0[0], w1[1], w1[0]};
    y2 = toffoli_ref(rows[2], i2);
    y3 = toffoli_ref(rows[3], i3);
    i4 = xb[2] ? y3 : y2;
    i5 = xb[2] ? y2 : y3;
    y4 = toffoli_ref(rows[4], i4);
    y5 = toffoli_ref(rows[5], i5);
    pr = {y4, y5};
    for (int n = 0; n < 10; n++) a[n] = pr[9-n];
    return a;
  endfunction

  function automatic logic [63:0] term_ref(input logic [31:0] w, input logic [9:0] p);
    logic [31:0] t;
    t = w ^ {22'd0, p};
    return {{32{t[31]}}, t};
  endfunction

endpackage
