// scp_pkg: types, stream-word encodings and shared arithmetic of the soft
// coprocessor (SCP) system.
//
// Every SCP talks AXI-Stream with a 32-bit TDATA, a 4-bit TDEST and TLAST.
// A frame travels as one packet: a parameter header followed by the pixels.
// The top four bits of TDATA tag each word:
//   TAG_DATA  (0) pixel or result word, value in [27:0] (pixels in [7:0])
//   TAG_FRAME (1) frame size: width in [27:16], height in [11:0]
//   TAG_TYPE  (2) start of one SCP's section: type in [23:16], SCP ID in [7:0]
//   TAG_OP    (3) one operand of that SCP, value in [27:0] (signed where noted)
//   TAG_TDEST (4) output channel of that SCP in [3:0]
//   TAG_END   (5) end of that SCP's section
// The section layout Type / OPs / TDEST / End follows the parameter-stream
// figure of the design; the tag values, word width and field positions are
// this implementation's choice. TLAST marks the last word of the frame.
package scp_pkg;

  localparam int DW    = 32;   // TDATA width
  localparam int DESTW = 4;    // TDEST width: 16 channels

  typedef logic [3:0] tag_t;
  localparam tag_t TAG_DATA  = 4'h0;
  localparam tag_t TAG_FRAME = 4'h1;
  localparam tag_t TAG_TYPE  = 4'h2;
  localparam tag_t TAG_OP    = 4'h3;
  localparam tag_t TAG_TDEST = 4'h4;
  localparam tag_t TAG_END   = 4'h5;

  // One AXI-Stream beat (TVALID/TREADY travel beside it).
  typedef struct packed {
    logic [DW-1:0]    data;
    logic [DESTW-1:0] dest;
    logic             last;
  } axis_word_t;

  // SCP type codes carried in the TYPE word.
  typedef enum logic [7:0] {
    T_STREAMER = 8'd0,
    T_POINT_IS = 8'd1,
    T_POINT_II = 8'd2,
    T_NEIGH    = 8'd3,
    T_CNEIGH   = 8'd4,
    T_R2S      = 8'd5,
    T_R2V      = 8'd6,
    T_BLOCK    = 8'd7,
    T_SOBEL    = 8'd8,
    T_OTSU     = 8'd9
  } scp_type_e;

  // Point functions (image-scalar and image-image SCPs).
  typedef enum logic [3:0] {
    P_ADD = 4'd0, P_SUB = 4'd1, P_MUL = 4'd2, P_ABSDIFF = 4'd3,
    P_AND = 4'd4, P_OR  = 4'd5, P_XOR = 4'd6, P_MIN = 4'd7, P_MAX = 4'd8,
    P_GT  = 4'd9, P_GE  = 4'd10, P_LT = 4'd11, P_LE = 4'd12,
    P_EQ  = 4'd13, P_NE = 4'd14
  } point_op_e;

  // Pairwise pixel-weight functions of a neighbourhood operation.
  typedef enum logic [2:0] {
    W_MUL = 3'd0, W_ADD = 3'd1, W_SUB = 3'd2, W_AND = 3'd3, W_OR = 3'd4
  } pair_op_e;

  // Reductions of a neighbourhood operation, also the final operation that
  // combines the rotated results of the complex neighbourhood SCP.
  typedef enum logic [2:0] {
    R_SUM = 3'd0, R_ABSSUM = 3'd1, R_MAX = 3'd2, R_MIN = 3'd3,
    R_AND = 3'd4, R_OR = 3'd5
  } red_op_e;

  // Global (R2S) reductions.
  typedef enum logic [2:0] {
    G_SUM = 3'd0, G_ABSSUM = 3'd1, G_MAX = 3'd2, G_MIN = 3'd3,
    G_COUNT = 3'd4, G_AVG = 3'd5
  } glob_op_e;

  // Intermediate precision of neighbourhood arithmetic: 8-bit pixel times
  // 8-bit signed weight, summed over nine positions and up to eight
  // orientations, fits comfortably in 24 signed bits.
  localparam int ACCW = 24;
  typedef logic signed [ACCW-1:0] acc_t;

  // ---------------------------------------------------------------- words
  function automatic logic [DW-1:0] w_data(input logic [27:0] v);
    return {TAG_DATA, v};
  endfunction
  function automatic logic [DW-1:0] w_frame(input logic [11:0] w, input logic [11:0] h);
    return {TAG_FRAME, w, 4'h0, h};
  endfunction
  function automatic logic [DW-1:0] w_type(input scp_type_e t, input logic [7:0] id);
    return {TAG_TYPE, 4'h0, t, 8'h00, id};
  endfunction
  function automatic logic [DW-1:0] w_op(input logic [27:0] v);
    return {TAG_OP, v};
  endfunction
  function automatic logic [DW-1:0] w_tdest(input logic [DESTW-1:0] d);
    return {TAG_TDEST, 24'h0, d};
  endfunction
  function automatic logic [DW-1:0] w_end();
    return {TAG_END, 28'h0};
  endfunction

  function automatic tag_t tag_of(input logic [DW-1:0] d);
    return d[DW-1 -: 4];
  endfunction

  // ------------------------------------------------------------ arithmetic
  function automatic logic [7:0] sat8(input acc_t v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  // Point function of two pixels; relational functions return vt or vf.
  function automatic logic [7:0] point_fn(input point_op_e op, input logic [7:0] a,
                                          input logic [7:0] b, input logic [7:0] vt,
                                          input logic [7:0] vf);
    acc_t sa, sb;
    sa = acc_t'({1'b0, a});
    sb = acc_t'({1'b0, b});
    unique case (op)
      P_ADD:     return sat8(sa + sb);
      P_SUB:     return sat8(sa - sb);
      P_MUL:     return sat8(sa * sb);
      P_ABSDIFF: return (a > b) ? a - b : b - a;
      P_AND:     return a & b;
      P_OR:      return a | b;
      P_XOR:     return a ^ b;
      P_MIN:     return (a < b) ? a : b;
      P_MAX:     return (a > b) ? a : b;
      P_GT:      return (a >  b) ? vt : vf;
      P_GE:      return (a >= b) ? vt : vf;
      P_LT:      return (a <  b) ? vt : vf;
      P_LE:      return (a <= b) ? vt : vf;
      P_EQ:      return (a == b) ? vt : vf;
      P_NE:      return (a != b) ? vt : vf;
      default:   return 8'd0;
    endcase
  endfunction

  // Pairwise function of a pixel and a signed 8-bit weight.
  function automatic acc_t pair_fn(input pair_op_e op, input logic [7:0] p,
                                   input logic signed [7:0] w);
    acc_t sp, sw;
    sp = acc_t'({1'b0, p});
    sw = acc_t'(w);
    unique case (op)
      W_MUL:   return sp * sw;
      W_ADD:   return sp + sw;
      W_SUB:   return sp - sw;
      W_AND:   return acc_t'({1'b0, p & w});
      W_OR:    return acc_t'({1'b0, p | w});
      default: return '0;
    endcase
  endfunction

  function automatic acc_t abs_acc(input acc_t v);
    return (v < 0) ? -v : v;
  endfunction

  // Reduce nine values.
  function automatic acc_t reduce9(input red_op_e op, input acc_t v [9]);
    acc_t r;
    r = (op == R_ABSSUM) ? '0 : v[0];
    if (op == R_SUM || op == R_ABSSUM) r = '0;
    for (int i = 0; i < 9; i++) begin
      unique case (op)
        R_SUM, R_ABSSUM: r = r + v[i];
        R_MAX:           r = (v[i] > r) ? v[i] : r;
        R_MIN:           r = (v[i] < r) ? v[i] : r;
        R_AND:           r = r & v[i];
        R_OR:            r = r | v[i];
        default:         r = r;
      endcase
    end
    if (op == R_ABSSUM) r = abs_acc(r);
    return r;
  endfunction

  // Combine two partial results with a reduction operator.
  function automatic acc_t combine2(input red_op_e op, input acc_t a, input acc_t b);
    unique case (op)
      R_SUM, R_ABSSUM: return a + b;
      R_MAX:           return (a > b) ? a : b;
      R_MIN:           return (a < b) ? a : b;
      R_AND:           return a & b;
      R_OR:            return a | b;
      default:         return a;
    endcase
  endfunction

endpackage
