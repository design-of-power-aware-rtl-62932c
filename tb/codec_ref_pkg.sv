// Reference model of the bus codec for the testbenches.
//
// Written as plain behavioural functions, independent of the RTL structure:
// the bit count of a word, the per-group choice among transparent, INV, XOR
// and XNOR (fewest bus toggles, ties resolved in that order) and the inverse.
// Words are carried in 32-bit vectors with an explicit width w.
package codec_ref_pkg;

  localparam int MODE_TRANS = 0;
  localparam int MODE_INV   = 1;
  localparam int MODE_XOR   = 2;
  localparam int MODE_XNOR  = 3;

  function automatic logic [31:0] mask(int w);
    return (w >= 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 32'd1);
  endfunction

  function automatic int ones(logic [31:0] v, int w);
    int n = 0;
    for (int i = 0; i < w; i++) if (v[i]) n++;
    return n;
  endfunction

  function automatic int hd(logic [31:0] a, logic [31:0] b, int w);
    return ones(a ^ b, w);
  endfunction

  function automatic logic [31:0] apply(int mode, logic [31:0] x, logic [31:0] prev, int w);
    case (mode)
      MODE_INV:  return ~x & mask(w);
      MODE_XOR:  return (x ^ prev) & mask(w);
      MODE_XNOR: return ~(x ^ prev) & mask(w);
      default:   return x & mask(w);
    endcase
  endfunction

  function automatic logic [31:0] undo(int mode, logic [31:0] y, logic [31:0] prev, int w);
    case (mode)
      MODE_INV:  return ~y & mask(w);
      MODE_XOR:  return (y ^ prev) & mask(w);
      MODE_XNOR: return ~(y ^ prev) & mask(w);
      default:   return y & mask(w);
    endcase
  endfunction

  // Mode the adaptive group encoder must pick.
  function automatic int choose(logic [31:0] x, logic [31:0] prev, int w);
    int best = MODE_TRANS;
    int best_cost = hd(x, prev, w);
    for (int m = 1; m < 4; m++) begin
      int c = hd(apply(m, x, prev, w), prev, w);
      if (c < best_cost) begin
        best = m;
        best_cost = c;
      end
    end
    return best;
  endfunction

  // Whole-word encoding: ngroups groups of w/ngroups bits, two mode bits each.
  function automatic void encode_word(input logic [31:0] x, input logic [31:0] prev,
                                      input int w, input int ngroups,
                                      output logic [31:0] y, output logic [31:0] extra);
    int gw = w / ngroups;
    y = '0;
    extra = '0;
    for (int g = 0; g < ngroups; g++) begin
      logic [31:0] xg = (x >> (g * gw)) & mask(gw);
      logic [31:0] pg = (prev >> (g * gw)) & mask(gw);
      int m = choose(xg, pg, gw);
      y |= apply(m, xg, pg, gw) << (g * gw);
      extra |= 32'(m) << (2 * g);
    end
  endfunction

endpackage
