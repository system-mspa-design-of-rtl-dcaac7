// h263_pkg: types, constants and code tables shared by the encoder modules.
//
// Word formats on the shared 16-bit DRAM data bus, the module identifiers the
// address generation unit (AGU) uses to strobe a module, the H.263 variable
// length code tables (TCOEF, MCBPC, CBPY, MVD), the zigzag scan and the
// deblocking-filter strength table. The tables are those of ITU-T H.263; they
// are written as functions so that the encoder (vlc) and the decoder CAMs
// (vld) share one copy.
package h263_pkg;

  localparam int unsigned WORD_W = 16;   // external DRAM word: 256K x 16
  localparam int unsigned ADDR_W = 18;   // 256K words
  localparam int unsigned PIX_W  = 8;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [PIX_W-1:0]  pix_t;

  // Dedicated modules on the data bus (AGU "unit" field).
  typedef enum logic [3:0] {
    MOD_NONE   = 4'd0,
    MOD_ME     = 4'd1,
    MOD_ERR    = 4'd2,
    MOD_DCTQ   = 4'd3,
    MOD_IQIDCT = 4'd4,
    MOD_PRECON = 4'd5,
    MOD_DB     = 4'd6,
    MOD_VLC    = 4'd7,
    MOD_RC     = 4'd8,
    MOD_AGU    = 4'd15   // AGU register load from DRAM
  } mod_id_e;

  localparam int unsigned NUM_MOD = 9;

  // Macroblock type as decided by the half pel processor.
  typedef enum logic [1:0] {MB_INTER = 2'd0, MB_INTRA = 2'd3} mbtype_e;

  // Motion word written by ME and read by Err/Precon/VLC:
  // [15] intra, [14:8] mvx, [7:1] mvy (half pel units, two's complement,
  // range -32..31), [0] reserved.
  typedef struct packed {
    logic       intra;
    logic [6:0] mvx;
    logic [6:0] mvy;
    logic       rsv;
  } mvword_t;

  // Block header word read by DCT-Q / IQ-IDCT / VLC:
  // [15] intra, [4:0] QP.
  typedef struct packed {
    logic        intra;
    logic [9:0]  rsv;
    logic [4:0]  qp;
  } hdrword_t;

  // A variable length code: value left aligned in 'code', 'len' bits long.
  typedef struct packed {
    logic [4:0]  len;
    logic [15:0] code;   // right aligned: the code is code[len-1:0]
  } vlc_t;

  // -------------------------------------------------------------------------
  // Zigzag scan: position k in scan order -> raster index (row*8+col).
  function automatic logic [5:0] zigzag(input logic [5:0] k);
    int r, c, idx;
    r = 0; c = 0;
    for (idx = 0; idx < 64; idx++) begin
      if (idx == int'(k)) return 6'(r * 8 + c);
      if (((r + c) % 2) == 0) begin
        if (c == 7) r++;
        else if (r == 0) c++;
        else begin r--; c++; end
      end else begin
        if (r == 7) c++;
        else if (c == 0) r++;
        else begin r++; c--; end
      end
    end
    return 6'd0;
  endfunction

  // -------------------------------------------------------------------------
  // Deblocking filter strength as a function of QP (H.263 Annex J).
  function automatic logic [3:0] db_strength(input logic [4:0] qp);
    case (qp)
      5'd1, 5'd2: return 4'd1;
      5'd3, 5'd4: return 4'd2;
      5'd5, 5'd6: return 4'd3;
      5'd7, 5'd8, 5'd9: return 4'd4;
      5'd10, 5'd11: return 4'd5;
      5'd12, 5'd13: return 4'd6;
      5'd14, 5'd15, 5'd16: return 4'd7;
      5'd17, 5'd18, 5'd19: return 4'd8;
      5'd20, 5'd21, 5'd22: return 4'd9;
      5'd23, 5'd24, 5'd25: return 4'd10;
      5'd26, 5'd27, 5'd28: return 4'd11;
      default: return 4'd12;  // 29..31 (0 is not a legal QP)
    endcase
  endfunction

  // -------------------------------------------------------------------------
  // TCOEF: 102 (LAST, RUN, LEVEL) events plus ESCAPE (index 102).
  // Codes are given without the trailing sign bit.
  localparam int unsigned TCOEF_N   = 103;
  localparam int unsigned TCOEF_ESC = 102;

  typedef struct packed {
    logic       last;
    logic [5:0] run;
    logic [3:0] level;
    logic [3:0] len;     // length without sign bit, 2..12
    logic [11:0] code;   // right aligned
  } tcoef_t;

  function automatic tcoef_t tc(input int l, input int r, input int lv,
                                input int n, input int c);
    tcoef_t t;
    t.last = 1'(l); t.run = 6'(r); t.level = 4'(lv);
    t.len = 4'(n); t.code = 12'(c);
    return t;
  endfunction

  function automatic tcoef_t tcoef_entry(input int i);
    case (i)
      0:   return tc(0, 0, 1,  2, 'b10);
      1:   return tc(0, 0, 2,  4, 'b1111);
      2:   return tc(0, 0, 3,  6, 'b010101);
      3:   return tc(0, 0, 4,  7, 'b0010111);
      4:   return tc(0, 0, 5,  8, 'b00011111);
      5:   return tc(0, 0, 6,  9, 'b000100101);
      6:   return tc(0, 0, 7,  9, 'b000100100);
      7:   return tc(0, 0, 8, 10, 'b0000100001);
      8:   return tc(0, 0, 9, 10, 'b0000100000);
      9:   return tc(0, 0,10, 11, 'b00000000111);
      10:  return tc(0, 0,11, 11, 'b00000000110);
      11:  return tc(0, 0,12, 11, 'b00000100000);
      12:  return tc(0, 1, 1,  3, 'b110);
      13:  return tc(0, 1, 2,  6, 'b010100);
      14:  return tc(0, 1, 3,  8, 'b00011110);
      15:  return tc(0, 1, 4, 10, 'b0000001111);
      16:  return tc(0, 1, 5, 11, 'b00000100001);
      17:  return tc(0, 1, 6, 12, 'b000001010000);
      18:  return tc(0, 2, 1,  4, 'b1110);
      19:  return tc(0, 2, 2,  8, 'b00011101);
      20:  return tc(0, 2, 3, 10, 'b0000001110);
      21:  return tc(0, 2, 4, 12, 'b000001010001);
      22:  return tc(0, 3, 1,  5, 'b01101);
      23:  return tc(0, 3, 2,  9, 'b000100011);
      24:  return tc(0, 3, 3, 10, 'b0000001101);
      25:  return tc(0, 4, 1,  5, 'b01100);
      26:  return tc(0, 4, 2,  9, 'b000100010);
      27:  return tc(0, 4, 3, 12, 'b000001010010);
      28:  return tc(0, 5, 1,  5, 'b01011);
      29:  return tc(0, 5, 2, 10, 'b0000001100);
      30:  return tc(0, 5, 3, 12, 'b000001010011);
      31:  return tc(0, 6, 1,  6, 'b010011);
      32:  return tc(0, 6, 2, 10, 'b0000001011);
      33:  return tc(0, 6, 3, 12, 'b000001010100);
      34:  return tc(0, 7, 1,  6, 'b010010);
      35:  return tc(0, 7, 2, 10, 'b0000001010);
      36:  return tc(0, 8, 1,  6, 'b010001);
      37:  return tc(0, 8, 2, 10, 'b0000001001);
      38:  return tc(0, 9, 1,  6, 'b010000);
      39:  return tc(0, 9, 2, 10, 'b0000001000);
      40:  return tc(0,10, 1,  7, 'b0010110);
      41:  return tc(0,10, 2, 12, 'b000001010101);
      42:  return tc(0,11, 1,  7, 'b0010101);
      43:  return tc(0,12, 1,  7, 'b0010100);
      44:  return tc(0,13, 1,  8, 'b00011100);
      45:  return tc(0,14, 1,  8, 'b00011011);
      46:  return tc(0,15, 1,  9, 'b000100001);
      47:  return tc(0,16, 1,  9, 'b000100000);
      48:  return tc(0,17, 1,  9, 'b000011111);
      49:  return tc(0,18, 1,  9, 'b000011110);
      50:  return tc(0,19, 1,  9, 'b000011101);
      51:  return tc(0,20, 1,  9, 'b000011100);
      52:  return tc(0,21, 1,  9, 'b000011011);
      53:  return tc(0,22, 1,  9, 'b000011010);
      54:  return tc(0,23, 1, 11, 'b00000100010);
      55:  return tc(0,24, 1, 11, 'b00000100011);
      56:  return tc(0,25, 1, 12, 'b000001010110);
      57:  return tc(0,26, 1, 12, 'b000001010111);
      58:  return tc(1, 0, 1,  4, 'b0111);
      59:  return tc(1, 0, 2,  9, 'b000011001);
      60:  return tc(1, 0, 3, 11, 'b00000000101);
      61:  return tc(1, 1, 1,  6, 'b001111);
      62:  return tc(1, 1, 2, 11, 'b00000000100);
      63:  return tc(1, 2, 1,  6, 'b001110);
      64:  return tc(1, 3, 1,  6, 'b001101);
      65:  return tc(1, 4, 1,  6, 'b001100);
      66:  return tc(1, 5, 1,  7, 'b0010011);
      67:  return tc(1, 6, 1,  7, 'b0010010);
      68:  return tc(1, 7, 1,  7, 'b0010001);
      69:  return tc(1, 8, 1,  7, 'b0010000);
      70:  return tc(1, 9, 1,  8, 'b00011010);
      71:  return tc(1,10, 1,  8, 'b00011001);
      72:  return tc(1,11, 1,  8, 'b00011000);
      73:  return tc(1,12, 1,  8, 'b00010111);
      74:  return tc(1,13, 1,  8, 'b00010110);
      75:  return tc(1,14, 1,  8, 'b00010101);
      76:  return tc(1,15, 1,  8, 'b00010100);
      77:  return tc(1,16, 1,  8, 'b00010011);
      78:  return tc(1,17, 1,  9, 'b000011000);
      79:  return tc(1,18, 1,  9, 'b000010111);
      80:  return tc(1,19, 1,  9, 'b000010110);
      81:  return tc(1,20, 1,  9, 'b000010101);
      82:  return tc(1,21, 1,  9, 'b000010100);
      83:  return tc(1,22, 1,  9, 'b000010011);
      84:  return tc(1,23, 1,  9, 'b000010010);
      85:  return tc(1,24, 1,  9, 'b000010001);
      86:  return tc(1,25, 1, 10, 'b0000000111);
      87:  return tc(1,26, 1, 10, 'b0000000110);
      88:  return tc(1,27, 1, 10, 'b0000000101);
      89:  return tc(1,28, 1, 10, 'b0000000100);
      90:  return tc(1,29, 1, 11, 'b00000100100);
      91:  return tc(1,30, 1, 11, 'b00000100101);
      92:  return tc(1,31, 1, 11, 'b00000100110);
      93:  return tc(1,32, 1, 11, 'b00000100111);
      94:  return tc(1,33, 1, 12, 'b000001011000);
      95:  return tc(1,34, 1, 12, 'b000001011001);
      96:  return tc(1,35, 1, 12, 'b000001011010);
      97:  return tc(1,36, 1, 12, 'b000001011011);
      98:  return tc(1,37, 1, 12, 'b000001011100);
      99:  return tc(1,38, 1, 12, 'b000001011101);
      100: return tc(1,39, 1, 12, 'b000001011110);
      101: return tc(1,40, 1, 12, 'b000001011111);
      default: return tc(0, 0, 0, 7, 'b0000011);   // ESCAPE
    endcase
  endfunction

  // -------------------------------------------------------------------------
  // MCBPC for P pictures. mbtype: 0 INTER, 3 INTRA. cbpc = {Cb, Cr} coded.
  function automatic vlc_t mcbpc_p(input logic intra, input logic [1:0] cbpc);
    vlc_t v;
    case ({intra, cbpc})
      3'b0_00: v = '{len: 5'd1, code: 16'b1};
      3'b0_01: v = '{len: 5'd4, code: 16'b0011};
      3'b0_10: v = '{len: 5'd4, code: 16'b0010};
      3'b0_11: v = '{len: 5'd6, code: 16'b000101};
      3'b1_00: v = '{len: 5'd5, code: 16'b00011};
      3'b1_01: v = '{len: 5'd8, code: 16'b00000100};
      3'b1_10: v = '{len: 5'd8, code: 16'b00000011};
      default: v = '{len: 5'd6, code: 16'b000011};
    endcase
    return v;
  endfunction

  // MCBPC for I pictures (MB type 3, INTRA).
  function automatic vlc_t mcbpc_i(input logic [1:0] cbpc);
    vlc_t v;
    case (cbpc)
      2'b00: v = '{len: 5'd1, code: 16'b1};
      2'b01: v = '{len: 5'd3, code: 16'b001};
      2'b10: v = '{len: 5'd3, code: 16'b010};
      default: v = '{len: 5'd3, code: 16'b011};
    endcase
    return v;
  endfunction

  // CBPY, indexed by the intra pattern {Y0,Y1,Y2,Y3}; inter MBs index with
  // the inverted pattern.
  function automatic vlc_t cbpy_code(input logic [3:0] idx);
    vlc_t v;
    case (idx)
      4'd0:  v = '{len: 5'd4, code: 16'b0011};
      4'd1:  v = '{len: 5'd5, code: 16'b00101};
      4'd2:  v = '{len: 5'd5, code: 16'b00100};
      4'd3:  v = '{len: 5'd4, code: 16'b1001};
      4'd4:  v = '{len: 5'd5, code: 16'b00011};
      4'd5:  v = '{len: 5'd4, code: 16'b0111};
      4'd6:  v = '{len: 5'd6, code: 16'b000010};
      4'd7:  v = '{len: 5'd4, code: 16'b1011};
      4'd8:  v = '{len: 5'd5, code: 16'b00010};
      4'd9:  v = '{len: 5'd6, code: 16'b000011};
      4'd10: v = '{len: 5'd4, code: 16'b0101};
      4'd11: v = '{len: 5'd4, code: 16'b1010};
      4'd12: v = '{len: 5'd4, code: 16'b0100};
      4'd13: v = '{len: 5'd4, code: 16'b1000};
      4'd14: v = '{len: 5'd4, code: 16'b0110};
      default: v = '{len: 5'd2, code: 16'b11};
    endcase
    return v;
  endfunction

  // MVD magnitude prefix for |d| = 0..32 half pel units; a sign bit
  // (1 = negative) follows every code except that of 0.
  function automatic vlc_t mvd_mag(input logic [5:0] m);
    vlc_t v;
    case (m)
      6'd0:  v = '{len: 5'd1,  code: 16'b1};
      6'd1:  v = '{len: 5'd2,  code: 16'b01};
      6'd2:  v = '{len: 5'd3,  code: 16'b001};
      6'd3:  v = '{len: 5'd4,  code: 16'b0001};
      6'd4:  v = '{len: 5'd6,  code: 16'b000011};
      6'd5:  v = '{len: 5'd7,  code: 16'b0000101};
      6'd6:  v = '{len: 5'd7,  code: 16'b0000100};
      6'd7:  v = '{len: 5'd7,  code: 16'b0000011};
      6'd8:  v = '{len: 5'd9,  code: 16'b000001011};
      6'd9:  v = '{len: 5'd9,  code: 16'b000001010};
      6'd10: v = '{len: 5'd9,  code: 16'b000001001};
      6'd11: v = '{len: 5'd10, code: 16'b0000010001};
      6'd12: v = '{len: 5'd10, code: 16'b0000010000};
      6'd13: v = '{len: 5'd10, code: 16'b0000001111};
      6'd14: v = '{len: 5'd10, code: 16'b0000001110};
      6'd15: v = '{len: 5'd10, code: 16'b0000001101};
      6'd16: v = '{len: 5'd10, code: 16'b0000001100};
      6'd17: v = '{len: 5'd10, code: 16'b0000001011};
      6'd18: v = '{len: 5'd10, code: 16'b0000001010};
      6'd19: v = '{len: 5'd10, code: 16'b0000001001};
      6'd20: v = '{len: 5'd10, code: 16'b0000001000};
      6'd21: v = '{len: 5'd10, code: 16'b0000000111};
      6'd22: v = '{len: 5'd10, code: 16'b0000000110};
      6'd23: v = '{len: 5'd10, code: 16'b0000000101};
      6'd24: v = '{len: 5'd10, code: 16'b0000000100};
      6'd25: v = '{len: 5'd11, code: 16'b00000000111};
      6'd26: v = '{len: 5'd11, code: 16'b00000000110};
      6'd27: v = '{len: 5'd11, code: 16'b00000000101};
      6'd28: v = '{len: 5'd11, code: 16'b00000000100};
      6'd29: v = '{len: 5'd11, code: 16'b00000000011};
      6'd30: v = '{len: 5'd12, code: 16'b000000000101};
      6'd31: v = '{len: 5'd12, code: 16'b000000000100};
      default: v = '{len: 5'd12, code: 16'b000000000011};
    endcase
    return v;
  endfunction

  // -------------------------------------------------------------------------
  // Distributed-arithmetic DCT coefficients: (c_k/2) cos((2n+1)k pi/16)
  // scaled by 2^13, n = 0..3 (the other half follows by symmetry).
  localparam int DA_FRAC = 13;
  function automatic int dct_coef(input int k, input int n);
    int t [8][4];
    t[0] = '{2896,  2896,  2896,  2896};
    t[1] = '{4017,  3406,  2276,   799};
    t[2] = '{3784,  1567, -1567, -3784};
    t[3] = '{3406,  -799, -4017, -2276};
    t[4] = '{2896, -2896, -2896,  2896};
    t[5] = '{2276, -4017,   799,  3406};
    t[6] = '{1567, -3784,  3784, -1567};
    t[7] = '{ 799, -2276,  3406, -4017};
    return t[k][n];
  endfunction

  // Clip to 0..255.
  function automatic pix_t clip_pix(input logic signed [15:0] v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

  // Bilinear half pel prediction from the four neighbours (H.263 rounding).
  function automatic pix_t hp_pred(input pix_t a, input pix_t b, input pix_t c,
                                   input pix_t d, input logic hx, input logic hy);
    logic [9:0] s;
    unique case ({hx, hy})
      2'b00: s = {a, 2'b00};
      2'b10: s = ({2'b0, a} + {2'b0, b} + 10'd1) << 1;
      2'b01: s = ({2'b0, a} + {2'b0, c} + 10'd1) << 1;
      default: s = {2'b0, a} + {2'b0, b} + {2'b0, c} + {2'b0, d} + 10'd2;
    endcase
    return s[9:2];
  endfunction

  // Chrominance vector from the luminance vector (half pel units): the
  // quarter pel positions of v/2 are rounded to the half pel position.
  function automatic logic signed [6:0] chroma_mv(input logic signed [6:0] v);
    logic [6:0] a, c;
    a = v[6] ? 7'(-v) : 7'(v);
    c = (a >> 1) | {6'd0, a[0]};
    return v[6] ? -7'(c) : 7'(c);
  endfunction

endpackage
