// idct_ref_pkg: reference model of the multistandard 1-D IDCT for the
// testbenches. It is written independently of the RTL: it builds each
// transform matrix entry from the cosine index of the DCT-II basis,
// cos((2n+1) k pi / 2N), and looks the integer value up per standard, or,
// for MPEG, rounds 256 * cos() itself. The H.264 4-point transform is
// modelled by the standard's own butterfly equations.
package idct_ref_pkg;
  import idct_pkg::*;

  localparam real PI = 3.14159265358979323846;

  // Value of cos(j*pi/16), j = 1..7, as the standard's integer constant.
  function automatic longint k8(idct_mode_e m, int j);
    longint avc [8] = '{8, 12, 8, 10, 8, 6, 4, 3};
    longint vc1 [8] = '{12, 16, 16, 15, 12, 9, 6, 4};
    case (m)
      MODE_MPEG8: return longint'($rtoi($floor(256.0 * $cos(j * PI / 16.0) + 0.5)));
      MODE_AVC8:  return avc[j];
      MODE_VC1_8: return vc1[j];
      default:    return 0;
    endcase
  endfunction

  // Entry (n, k) of the 8-point inverse matrix.
  function automatic longint m8(idct_mode_e m, int n, int k);
    int p;
    if (k == 0) return k8(m, 4);
    p = ((2 * n + 1) * k) % 32;
    if (p > 16) p = 32 - p;
    if (p > 8) return -k8(m, 16 - p);
    return k8(m, p);
  endfunction

  // Value of cos(j*pi/8), j = 1..3, for the 4-point transforms.
  function automatic longint k4(idct_mode_e m, int j);
    case (m)
      MODE_VC1_4: return (j == 1) ? 22 : (j == 2) ? 17 : 10;
      MODE_HAD4:  return 1;
      MODE_AVC4:  return (j == 3) ? 0 : 1;   // g = 1/2 handled apart
      default:    return 0;
    endcase
  endfunction

  function automatic longint m4(idct_mode_e m, int n, int k);
    int p;
    if (k == 0) return k4(m, 2);
    p = ((2 * n + 1) * k) % 16;
    if (p > 8) p = 16 - p;
    if (p > 4) return -k4(m, 8 - p);
    return k4(m, p);
  endfunction

  // Constant a, f, g, b, c, d, e of a mode (for the subunit testbenches).
  // 'g' of H.264 4-point is 1/2 and is returned as 0 here.
  function automatic longint konst(idct_mode_e m, byte name);
    logic four = (m == MODE_VC1_4) || (m == MODE_AVC4) || (m == MODE_HAD4);
    if (four) begin
      case (name)
        "a": return k4(m, 2);
        "f": return k4(m, 1);
        "g": return k4(m, 3);
        default: return 0;
      endcase
    end
    case (name)
      "a": return k8(m, 4);
      "b": return k8(m, 1);
      "f": return k8(m, 2);
      "c": return k8(m, 3);
      "d": return k8(m, 5);
      "g": return k8(m, 6);
      "e": return k8(m, 7);
      default: return 0;
    endcase
  endfunction

  // One row through the transform. For 4-point modes x[0..3] is the row.
  // The loop bound is a variable on purpose: the row is computed by one
  // generic loop rather than unrolled per mode.
  function automatic void ref_row(idct_mode_e m, input longint x [8], output longint y [8]);
    longint e0, e1, e2, e3;
    int     len;
    for (int n = 0; n < 8; n++) y[n] = 0;
    if (m == MODE_AVC4) begin
      e0 = x[0] + x[2];
      e1 = x[0] - x[2];
      e2 = (x[1] >>> 1) - x[3];
      e3 = x[1] + (x[3] >>> 1);
      y[0] = e0 + e3;
      y[1] = e1 + e2;
      y[2] = e1 - e2;
      y[3] = e0 - e3;
      return;
    end
    len = (m == MODE_VC1_4 || m == MODE_HAD4) ? 4 : 8;
    for (int n = 0; n < len; n++)
      for (int k = 0; k < len; k++)
        y[n] += ((len == 8) ? m8(m, n, k) : m4(m, n, k)) * x[k];
  endfunction

  function automatic idct_mode_e mode_of(int i);
    case (i % 6)
      0: return MODE_MPEG8;
      1: return MODE_AVC8;
      2: return MODE_VC1_8;
      3: return MODE_VC1_4;
      4: return MODE_AVC4;
      default: return MODE_HAD4;
    endcase
  endfunction

endpackage
