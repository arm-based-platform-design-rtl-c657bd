// dbf_pkg: types and constants shared by the deblocking and IQ-IDCT accelerators.
//
// A 32-bit bus word carries four 8-bit pixels of one row (or, once transposed,
// one column) of a 4x4 block; pixel 0 (leftmost / topmost) sits in bits 7:0.
// Side information for the boundary-strength unit is one 32-bit word per 4x4
// block (blk_info_t). The alpha, beta and tC0 threshold tables and the
// dequantisation scales are those of the H.264/MPEG-4 AVC standard; the
// document names the thresholds but does not print them. Eight macroblock
// filtering modes follow the document's classification (left boundary, top
// boundary, inner edges).
package dbf_pkg;

  typedef logic [7:0]       pix_t;
  typedef pix_t [3:0]       pix4_t;   // one 4-pixel row or column, element 0 in bits 7:0
  typedef logic [2:0]       bs_t;     // boundary strength 0..4
  typedef logic [5:0]       qp_t;     // quantisation parameter 0..51

  // Per-4x4-block side information, written by the CPU for the bS unit.
  typedef struct packed {
    logic [1:0]         rsv;
    logic               avail;   // block exists (picture border otherwise)
    logic               intra;   // the macroblock holding the block is intra coded
    logic signed [11:0] mvy;     // quarter-pel motion vector
    logic signed [11:0] mvx;
    logic [2:0]         ref_id;  // reference picture identifier (up to 5 frames)
    logic               nz;      // block has non-zero transform coefficients
  } blk_info_t;

  // Filtering mode of a macroblock, numbered as the document numbers them.
  typedef enum logic [2:0] {
    MODE_SKIP = 3'd0,
    MODE_1    = 3'd1,  // left, top, current
    MODE_2    = 3'd2,  // top, current
    MODE_3    = 3'd3,  // left, current
    MODE_4    = 3'd4,  // current only
    MODE_5    = 3'd5,  // left, top
    MODE_6    = 3'd6,  // top only
    MODE_7    = 3'd7   // left only
  } dbf_mode_e;

  function automatic dbf_mode_e mode_of(input logic l, input logic t, input logic c);
    unique case ({l, t, c})
      3'b111:  return MODE_1;
      3'b011:  return MODE_2;
      3'b101:  return MODE_3;
      3'b001:  return MODE_4;
      3'b110:  return MODE_5;
      3'b010:  return MODE_6;
      3'b100:  return MODE_7;
      default: return MODE_SKIP;
    endcase
  endfunction

  // Number of 32-bit words the CPU transfers in each direction for a mode.
  function automatic int unsigned mode_words(input dbf_mode_e m);
    unique case (m)
      MODE_1:  return 160;
      MODE_2:  return 128;
      MODE_3:  return 128;
      MODE_4:  return 96;
      MODE_5:  return 116;
      MODE_6:  return 64;
      MODE_7:  return 64;
      default: return 0;
    endcase
  endfunction

  // alpha(indexA), standard table for indexA 16..51; zero below 16.
  localparam logic [7:0] ALPHA_T [36] = '{4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,32,36,40,45,
                                          50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
  function automatic logic [7:0] alpha_tab(input qp_t idx);
    if (idx < 6'd16) return 8'd0;
    if (idx > 6'd51) return ALPHA_T[35];
    return ALPHA_T[idx - 6'd16];
  endfunction

  // beta(indexB), standard table for indexB 16..51; zero below 16.
  localparam logic [7:0] BETA_T [36] = '{2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,9,9,10,10,
                                         11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
  function automatic logic [7:0] beta_tab(input qp_t idx);
    if (idx < 6'd16) return 8'd0;
    if (idx > 6'd51) return BETA_T[35];
    return BETA_T[idx - 6'd16];
  endfunction

  // tC0(indexA, bS) for bS 1..3, standard table; zero below indexA 17.
  localparam logic [4:0] TC0_T1 [35] = '{0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13};
  localparam logic [4:0] TC0_T2 [35] = '{0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,5,5,6,7,8,8,10,11,12,13,15,17};
  localparam logic [4:0] TC0_T3 [35] = '{1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13,14,16,18,20,23,25};
  function automatic logic [4:0] tc0_tab(input qp_t idx, input bs_t bs);
    logic [5:0] i;
    if (idx < 6'd17) return 5'd0;
    i = (idx > 6'd51) ? 6'd34 : idx - 6'd17;
    unique case (bs)
      3'd1:    return TC0_T1[i];
      3'd2:    return TC0_T2[i];
      3'd3:    return TC0_T3[i];
      default: return 5'd0;
    endcase
  endfunction

  // Dequantisation scale v(qp%6, class) of the standard (flat scaling matrix).
  // class 0: row and column both even; 1: both odd; 2: mixed.
  localparam logic [4:0] DQ_V0 [6] = '{10,11,13,14,16,18};
  localparam logic [4:0] DQ_V1 [6] = '{16,18,20,23,25,29};
  localparam logic [4:0] DQ_V2 [6] = '{13,14,16,18,20,23};
  function automatic logic [4:0] dq_scale(input logic [2:0] qmod, input logic [1:0] cls);
    logic [2:0] m;
    m = (qmod > 3'd5) ? 3'd5 : qmod;
    unique case (cls)
      2'd0:    return DQ_V0[m];
      2'd1:    return DQ_V1[m];
      default: return DQ_V2[m];
    endcase
  endfunction

endpackage
