// cgp_ref_pkg - reference model used by the testbenches.
//
// Plain, unpipelined functions for one CFB function, a whole VRC and the
// fitness of a VRC configuration on an image. They restate the behaviour
// described in the RTL headers (function codes, selector rule, output node,
// window layout, sum of absolute differences) without sharing code with it.
package cgp_ref_pkg;

  localparam int RCOLS = 8;
  localparam int RROWS = 4;
  localparam int RNPRI = 9;

  typedef logic [RCOLS-1:0][63:0] bitstream_t;   // column word c at [c]

  function automatic int ref_fn(input int fn, input int a, input int b);
    case (fn)
      0:  return (a + b) & 255;
      1:  return (a - b + 256) & 255;
      2:  return a / 2;
      3:  return (a <= b) ? a : b;
      4:  return (a >= b) ? a : b;
      5:  return (a >= b) ? a - b : b - a;
      6:  return a;
      7:  return 255 - a;
      8:  return a & b;
      9:  return a | b;
      10: return a ^ b;
      11: return 255 & ~(a & b);
      12: return 255 & ~(a | b);
      13: return 255 & ~(a ^ b);
      14: return a & (255 & ~b);
      default: return a | (255 & ~b);
    endcase
  endfunction

  // operand selected by a 4-bit selector in column col
  function automatic int ref_sel(input int sel, input int col,
                                 input int x[RNPRI], input int prev[RROWS]);
    if (sel < RNPRI) return x[sel];
    if (col == 0)    return x[(sel - RNPRI) % RNPRI];
    return prev[(sel - RNPRI) % RROWS];
  endfunction

  // combinational value of the VRC output for window x
  function automatic int ref_vrc(input bitstream_t bs, input int x[RNPRI]);
    int prev[RROWS];
    int cur[RROWS];
    for (int r = 0; r < RROWS; r++) prev[r] = 0;
    for (int c = 0; c < RCOLS; c++) begin
      for (int r = 0; r < RROWS; r++) begin
        int sa, sb, fn;
        sa = int'(bs[c][12*r +: 4]);
        sb = int'(bs[c][12*r + 4 +: 4]);
        fn = int'(bs[c][12*r + 8 +: 4]);
        cur[r] = ref_fn(fn, ref_sel(sa, c, x, prev), ref_sel(sb, c, x, prev));
      end
      prev = cur;
    end
    return prev[0];
  endfunction

  // sum of |VRC(window) - target(centre)| over all interior pixels
  function automatic int ref_fitness(input bitstream_t bs, input int w, input int h,
                                     ref byte unsigned img[], ref byte unsigned tgt[]);
    int x[RNPRI];
    int acc, y, t;
    acc = 0;
    for (int r = 1; r <= h - 2; r++)
      for (int c = 1; c <= w - 2; c++) begin
        for (int dr = 0; dr < 3; dr++)
          for (int dc = 0; dc < 3; dc++)
            x[3*dr + dc] = int'(img[(r - 1 + dr) * w + (c - 1 + dc)]);
        y = ref_vrc(bs, x);
        t = int'(tgt[r * w + c]);
        acc += (y > t) ? y - t : t - y;
      end
    return acc;
  endfunction

  // random bitstream: 48 used bits per column, upper 16 bits zero
  function automatic bitstream_t rand_bitstream();
    bitstream_t bs;
    for (int c = 0; c < RCOLS; c++) bs[c] = {16'h0, 16'($urandom), $urandom};
    return bs;
  endfunction

endpackage
