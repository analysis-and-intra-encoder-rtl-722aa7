// svc_pkg: types, constants and shared arithmetic of the SVC intra encoder.
//
// Holds the pixel and coefficient types, the block-size and transform-mode
// encodings, the edge-intensity record produced by the cost units, the
// quantization / inverse-quantization / normalization tables, and three pure
// functions that several modules share:
//   * traded_nxn   - the transform-domain edge-detection mode decision for
//                    4x4 and 8x8 blocks (the thresholds are arguments),
//   * pred_dir     - one pixel of an H.264 directional intra prediction, for
//                    a 4x4 or 8x8 block, from a flat edge array,
//   * the QP split into QP/6 and QP%6.
// The tables are the standard H.264 factors as printed in the design's
// tables; the functions' structure (edge array, flat formulas) is this
// implementation's own.
//
// Lint notes: checked on its own, the package reports its tables as unused
// (the quantizer, dequantizer and normalization modules read them) and
// some index bits of the position-class functions as unused (a class only
// depends on the low bits of i and j). The struct-typed argument of
// traded_nxn is not read in full either: the SATD field plays no part in
// the decision.
package svc_pkg;

  typedef logic [7:0]         pix_t;
  typedef logic signed [15:0] coef_t;
  typedef logic [21:0]        cost_t;

  // Block class handled by a unit.
  typedef enum logic [1:0] {
    BLK_4X4    = 2'd0,
    BLK_8X8    = 2'd1,
    BLK_16X16  = 2'd2,
    BLK_CHROMA = 2'd3
  } blk_e;

  // Forward 4x4 transform variant of tran4dc.
  typedef enum logic [1:0] {
    TR_DCT  = 2'd0,   // 4x4 integer core transform
    TR_DHT  = 2'd1,   // 4x4 Hadamard on luma DC terms, result halved
    TR_DHT2 = 2'd2    // 2x2 Hadamard on chroma DC terms (top-left 2x2)
  } tmode_e;

  // Edge intensities and SATD of one block (sums of absolute coefficients).
  typedef struct packed {
    cost_t dc;
    cost_t v;
    cost_t h;
    cost_t d;
    cost_t dv;
    cost_t dh;
    cost_t ac;
    cost_t satd;
  } intens_t;

  // Intra 4x4 / 8x8 prediction modes.
  localparam logic [3:0] M_V   = 4'd0;
  localparam logic [3:0] M_H   = 4'd1;
  localparam logic [3:0] M_DC  = 4'd2;
  localparam logic [3:0] M_DDL = 4'd3;
  localparam logic [3:0] M_DDR = 4'd4;
  localparam logic [3:0] M_VR  = 4'd5;
  localparam logic [3:0] M_HD  = 4'd6;
  localparam logic [3:0] M_VL  = 4'd7;
  localparam logic [3:0] M_HU  = 4'd8;

  // Edge array used by the directional predictors:
  //   e[EC]        = corner p[-1,-1]
  //   e[EC+1+k]    = top    p[k,-1],  k = 0..15
  //   e[EC-1-j]    = left   p[-1,j],  j = 0..7
  localparam int EC   = 8;
  localparam int ELEN = 25;
  typedef logic [ELEN-1:0][7:0] edge_t;

  // ---------------------------------------------------------------- tables
  // Forward quantization factors, 4x4: columns (even,even) (odd,odd) other.
  localparam logic [13:0] QF4 [6][3] = '{
    '{14'd13107, 14'd5243, 14'd8066},
    '{14'd11916, 14'd4660, 14'd7490},
    '{14'd10082, 14'd4194, 14'd6554},
    '{14'd9362,  14'd3647, 14'd5825},
    '{14'd8192,  14'd3355, 14'd5243},
    '{14'd7282,  14'd2893, 14'd4559}};
  // Forward quantization factors, 8x8: six position classes (see pos_class8).
  localparam logic [14:0] QF8 [6][6] = '{
    '{15'd13107, 15'd11428, 15'd20972, 15'd12222, 15'd16777, 15'd15481},
    '{15'd11916, 15'd10826, 15'd19174, 15'd11058, 15'd14980, 15'd14290},
    '{15'd10082, 15'd8943,  15'd15978, 15'd9675,  15'd12710, 15'd11985},
    '{15'd9362,  15'd8228,  15'd14913, 15'd8931,  15'd11984, 15'd11259},
    '{15'd8192,  15'd7346,  15'd13159, 15'd7740,  15'd10486, 15'd9777},
    '{15'd7282,  15'd6428,  15'd11570, 15'd6830,  15'd9118,  15'd8640}};
  // Inverse quantization factors, 4x4 and 8x8.
  localparam logic [5:0] DQ4 [6][3] = '{
    '{6'd10, 6'd16, 6'd13}, '{6'd11, 6'd18, 6'd14}, '{6'd13, 6'd20, 6'd16},
    '{6'd14, 6'd23, 6'd18}, '{6'd16, 6'd25, 6'd20}, '{6'd18, 6'd29, 6'd23}};
  localparam logic [5:0] DQ8 [6][6] = '{
    '{6'd20, 6'd18, 6'd32, 6'd19, 6'd25, 6'd24},
    '{6'd22, 6'd19, 6'd35, 6'd21, 6'd28, 6'd26},
    '{6'd26, 6'd23, 6'd42, 6'd24, 6'd33, 6'd31},
    '{6'd28, 6'd25, 6'd45, 6'd26, 6'd35, 6'd33},
    '{6'd32, 6'd28, 6'd51, 6'd30, 6'd40, 6'd38},
    '{6'd36, 6'd32, 6'd58, 6'd34, 6'd46, 6'd43}};
  // Normalization matrices of the quality-enhancement unit.
  localparam logic [6:0] NRM4 [3] = '{7'd16, 7'd25, 7'd20};
  localparam logic [6:0] NRM8 [6] = '{7'd64, 7'd81, 7'd25, 7'd72, 7'd40, 7'd45};

  // ------------------------------------------------------------- functions
  // Position class of a 4x4 coefficient (i = row, j = column).
  function automatic logic [1:0] pos_class4(input logic [1:0] i, input logic [1:0] j);
    if (!i[0] && !j[0])     return 2'd0;
    else if (i[0] && j[0])  return 2'd1;
    else                    return 2'd2;
  endfunction

  // Position class of an 8x8 coefficient, H.264 grouping.
  function automatic logic [2:0] pos_class8(input logic [2:0] i, input logic [2:0] j);
    if (i[1:0] == 2'd0 && j[1:0] == 2'd0)                          return 3'd0;
    else if (i[0] && j[0])                                         return 3'd1;
    else if (i[1:0] == 2'd2 && j[1:0] == 2'd2)                     return 3'd2;
    else if ((i[1:0] == 2'd0 && j[0]) || (i[0] && j[1:0] == 2'd0)) return 3'd3;
    else if ((i[1:0] == 2'd0 && j[1:0] == 2'd2) ||
             (i[1:0] == 2'd2 && j[1:0] == 2'd0))                   return 3'd4;
    else                                                           return 3'd5;
  endfunction

  function automatic logic [3:0] qp_div6(input logic [5:0] qp);
    return 4'(qp / 6);
  endfunction
  function automatic logic [2:0] qp_mod6(input logic [5:0] qp);
    return 3'(qp % 6);
  endfunction

  function automatic cost_t cabs(input coef_t c);
    return (c < 0) ? cost_t'(-32'(c)) : cost_t'(c);
  endfunction

  // Edge intensities of a 4x4 coefficient block c (row-major, c[4*i+j]),
  // category sets as in the cost units' input assignment.
  function automatic intens_t intens4x4(input coef_t c [16]);
    intens_t r;
    r = '0;
    r.dc = cabs(c[0]);
    r.v  = cabs(c[1])  + cabs(c[2])  + cabs(c[3]);
    r.h  = cabs(c[4])  + cabs(c[8])  + cabs(c[12]);
    r.d  = cabs(c[5])  + cabs(c[10]) + cabs(c[15]);
    r.dv = cabs(c[6])  + cabs(c[7])  + cabs(c[11]);
    r.dh = cabs(c[9])  + cabs(c[13]) + cabs(c[14]);
    for (int k = 1; k < 16; k++) r.ac += cabs(c[k]);
    r.satd = r.ac + r.dc;
    return r;
  endfunction

  // TraDED decision for a 4x4 or 8x8 block. Ratios are compared as
  // products: I_DC/I_AC < th_off  <=>  I_DC < th_off*I_AC, and so on.
  // boundary: some neighbour is missing; top_ok / left_ok mask the modes
  // that need those neighbours; mpm is the most probable mode.
  function automatic logic [8:0] traded_nxn(
      input intens_t   it,
      input logic [7:0] th_dom,
      input logic [7:0] th_off,
      input logic [3:0] mpm,
      input logic       top_ok,
      input logic       left_ok);
    logic [8:0]  ac;
    logic [8:0]  avail;
    logic        dc_on;
    logic [31:0] dcv, acv;
    int          n;
    dcv = 32'(it.dc);
    acv = 32'(it.ac);
    ac  = '0;
    // DC candidate
    if (!(top_ok && left_ok))            dc_on = 1'b1;
    else if (dcv < 32'(th_off) * acv)    dc_on = 1'b0;
    else                                 dc_on = 1'b1;
    // AC candidates
    if (dcv > 32'(th_dom) * acv) begin
      if (it.v >= it.h) ac[M_V] = 1'b1; else ac[M_H] = 1'b1;
    end else if (it.v >= it.h && it.v >= it.d && 32'(it.v) > 2 * 32'(it.h)) begin
      ac[M_V] = 1'b1; ac[M_VR] = 1'b1; ac[M_VL] = 1'b1;
    end else if (it.h >= it.v && it.h >= it.d && 2 * 32'(it.v) < 32'(it.h)) begin
      ac[M_H] = 1'b1; ac[M_HD] = 1'b1; ac[M_HU] = 1'b1;
    end else begin
      ac[M_DDL] = 1'b1; ac[M_DDR] = 1'b1;
      if (32'(it.v) + 32'(it.dv) >= 32'(it.h) + 32'(it.dh)) begin
        ac[M_VR] = 1'b1; ac[M_VL] = 1'b1;
      end else begin
        ac[M_HD] = 1'b1; ac[M_HU] = 1'b1;
      end
    end
    n = 0;
    for (int k = 0; k < 9; k++) n += int'(ac[k]);
    if (n < 4 && mpm <= 4'd8 && mpm != M_DC) ac[mpm] = 1'b1;
    else if (n < 4 && mpm == M_DC) dc_on = 1'b1;
    // availability: V, DDL, VL need the top row; H, HU the left column;
    // DDR, VR, HD need both.
    avail = 9'h1FF;
    if (!top_ok)  begin avail[M_V] = 1'b0; avail[M_DDL] = 1'b0; avail[M_VL] = 1'b0; end
    if (!left_ok) begin avail[M_H] = 1'b0; avail[M_HU] = 1'b0; end
    if (!(top_ok && left_ok)) begin
      avail[M_DDR] = 1'b0; avail[M_VR] = 1'b0; avail[M_HD] = 1'b0;
    end
    ac = ac & avail;
    ac[M_DC] = dc_on;
    return ac;
  endfunction

  function automatic pix_t f3(input pix_t a, input pix_t b, input pix_t c);
    return pix_t'((10'(a) + 10'(b) * 10'd2 + 10'(c) + 10'd2) >> 2);
  endfunction
  function automatic pix_t f2(input pix_t a, input pix_t b);
    return pix_t'((9'(a) + 9'(b) + 9'd1) >> 1);
  endfunction

  // One pixel (x, y) of a directional prediction of an n x n block
  // (n = 4 or 8). Mode DC is not handled here (pg_dc).
  function automatic pix_t pred_dir(input logic [3:0] mode, input logic is8,
                                    input int x, input int y, input edge_t e);
    int c, z, nn, zmax;
    c    = EC;
    nn   = is8 ? 8 : 4;
    zmax = 2 * nn - 3;
    case (mode)
      M_V:   return e[c+1+x];
      M_H:   return e[c-1-y];
      M_DDL: if (x == nn-1 && y == nn-1)
               return pix_t'((10'(e[c+2*nn-1]) + 10'(e[c+2*nn]) * 10'd3 + 10'd2) >> 2);
             else
               return f3(e[c+1+x+y], e[c+2+x+y], e[c+3+x+y]);
      M_DDR: return f3(e[c-1+x-y], e[c+x-y], e[c+1+x-y]);
      M_VR: begin
        z = 2 * x - y;
        if (z >= 0 && z % 2 == 0)  return f2(e[c+x-(y>>1)], e[c+1+x-(y>>1)]);
        else if (z > 0)            return f3(e[c-1+x-(y>>1)], e[c+x-(y>>1)], e[c+1+x-(y>>1)]);
        else if (z == -1)          return f3(e[c-1], e[c], e[c+1]);
        else                       return f3(e[c+2*x-y], e[c+1+2*x-y], e[c+2+2*x-y]);
      end
      M_HD: begin
        z = 2 * y - x;
        if (z >= 0 && z % 2 == 0)  return f2(e[c-1-y+(x>>1)], e[c-y+(x>>1)]);
        else if (z > 0)            return f3(e[c-1-y+(x>>1)], e[c-y+(x>>1)], e[c+1-y+(x>>1)]);
        else if (z == -1)          return f3(e[c-1], e[c], e[c+1]);
        else                       return f3(e[c-2+x-2*y], e[c-1+x-2*y], e[c+x-2*y]);
      end
      M_VL: if (y % 2 == 0) return f2(e[c+1+x+(y>>1)], e[c+2+x+(y>>1)]);
            else            return f3(e[c+1+x+(y>>1)], e[c+2+x+(y>>1)], e[c+3+x+(y>>1)]);
      M_HU: begin
        z = x + 2 * y;
        if (z < zmax && z % 2 == 0) return f2(e[c-1-y-(x>>1)], e[c-2-y-(x>>1)]);
        else if (z < zmax)          return f3(e[c-1-y-(x>>1)], e[c-2-y-(x>>1)], e[c-3-y-(x>>1)]);
        else if (z == zmax)         return pix_t'((10'(e[c-nn+1]) + 10'(e[c-nn]) * 10'd3 + 10'd2) >> 2);
        else                        return e[c-nn];
      end
      default: return e[c+1+x];
    endcase
  endfunction

endpackage
