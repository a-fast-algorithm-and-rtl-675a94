// fme_pkg: types, constants and arithmetic shared by the fractional motion
// estimation (FME) engine.
//
// Positions are quarter-pel offsets from the best integer motion vector, each
// component in -3..+3.  Step 1 always evaluates the centre and the four
// half-pel points of a diamond (up, left, right, down); step 2 evaluates three
// or four quarter-pel points chosen from the ranking of the step-1 costs.
// The 6-tap filter and the rounding follow the H.264 luma interpolation rules.
package fme_pkg;

  localparam int PIX_W  = 8;     // luma sample width
  localparam int COST_W = 20;    // SATD of a 16x16 partition fits in 20 bits
  localparam int RAW_W  = 15;    // unrounded 6-tap result (signed)
  localparam int NPU    = 5;     // processing units, one per step-1 candidate
  localparam int HG_COLS = 11;   // half-pel grid columns around a 4-pixel row
  localparam int HG_ROWS = 5;    // half-pel grid rows around one pixel row
  localparam int SAD_W  = 16;    // integer-ME SAD input width
  localparam int QP_W   = 6;     // quantisation parameter 0..51

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [COST_W-1:0] cost_t;
  typedef logic signed [RAW_W-1:0] raw_t;

  // quarter-pel offset of a candidate
  typedef struct packed {
    logic signed [2:0] dx;
    logic signed [2:0] dy;
  } qmv_t;

  // sideband that travels with a reference row through the pipeline
  typedef struct packed {
    logic       v;        // the row is a pixel row of the partition (not margin)
    logic [1:0] brow;     // row inside its 4x4 block
    logic       first;    // row belongs to the first 4x4 block of the partition
    logic       last;     // row belongs to the last 4x4 block of the partition
    logic [3:0] cur_row;  // row inside the partition
    logic [1:0] x4;       // 4-pixel column strip
  } row_tag_t;
  localparam int TAG_W = $bits(row_tag_t);

  // second-step search cases of the algorithm
  typedef enum logic [2:0] {
    CASE_NONE = 3'd0,  // early terminated, no second step
    CASE_1    = 3'd1,  // centre best, 2nd and 3rd opposite
    CASE_2    = 3'd2,  // centre best, 2nd and 3rd perpendicular
    CASE_3    = 3'd3,  // half-pel best, 2nd a perpendicular half-pel
    CASE_4    = 3'd4   // half-pel best, 2nd opposite or the centre
  } fme_case_e;

  // Step-1 candidate index -> position.  0 centre, 1 up, 2 left, 3 right, 4 down.
  function automatic qmv_t step1_pos(input logic [2:0] idx);
    qmv_t p;
    unique case (idx)
      3'd1:    p = '{dx: 3'sd0,  dy: -3'sd2};
      3'd2:    p = '{dx: -3'sd2, dy: 3'sd0};
      3'd3:    p = '{dx: 3'sd2,  dy: 3'sd0};
      3'd4:    p = '{dx: 3'sd0,  dy: 3'sd2};
      default: p = '{dx: 3'sd0,  dy: 3'sd0};
    endcase
    return p;
  endfunction

  // Two half-pel diamond points are opposite when their indices sum to 5.
  function automatic logic step1_opposite(input logic [2:0] a, input logic [2:0] b);
    return (a + b) == 3'd5;
  endfunction

  // 6-tap filter (1,-5,20,20,-5,1) on unsigned pixels, unrounded.
  function automatic raw_t fir6_pix(input pix_t a, input pix_t b, input pix_t c,
                                    input pix_t d, input pix_t e, input pix_t f);
    logic signed [RAW_W-1:0] s;
    s = $signed({7'd0, a}) + $signed({7'd0, f})
      - 5 * $signed({7'd0, b}) - 5 * $signed({7'd0, e})
      + 20 * $signed({7'd0, c}) + 20 * $signed({7'd0, d});
    return s;
  endfunction

  // 6-tap filter on unrounded intermediate values (for the centre half-pel j).
  function automatic logic signed [21:0] fir6_raw(input raw_t a, input raw_t b, input raw_t c,
                                                 input raw_t d, input raw_t e, input raw_t f);
    logic signed [21:0] s;
    s = 22'(a) + 22'(f) - 5 * 22'(b) - 5 * 22'(e) + 20 * 22'(c) + 20 * 22'(d);
    return s;
  endfunction

  function automatic pix_t clip_pix(input logic signed [21:0] v);
    if (v < 0)        return '0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  // half-pel sample from one filter pass: (x + 16) >> 5, clipped
  function automatic pix_t round_half(input raw_t v);
    return clip_pix((22'(v) + 22'sd16) >>> 5);
  endfunction

  // centre half-pel from two filter passes: (x + 512) >> 10, clipped
  function automatic pix_t round_center(input logic signed [21:0] v);
    return clip_pix((v + 22'sd512) >>> 10);
  endfunction

  // bilinear quarter-pel filter: rounded average of two samples
  function automatic pix_t avg2(input pix_t a, input pix_t b);
    logic [PIX_W:0] s;
    s = {1'b0, a} + {1'b0, b} + 9'd1;
    return s[PIX_W:1];
  endfunction

  // Early-termination threshold (QP-adaptive piecewise-linear, shift-and-add).
  //   SAD <= 500        : 1.25*SAD + 16*(QP-28) + 36
  //   500 < SAD <= 1000 : SAD      + 16*(QP-28) + 161
  //   SAD > 1000        : 0.75*SAD + 16*(QP-28) + 411
  function automatic logic signed [SAD_W+2:0] et_threshold(input logic [SAD_W-1:0] sad,
                                                          input logic [QP_W-1:0] qp);
    logic signed [SAD_W+2:0] s, q, base;
    s = $signed({3'b000, sad});
    q = $signed((SAD_W+3)'(qp));
    q = (q - 28) <<< 4;
    if (sad > SAD_W'(1000))     base = s - (s >>> 2) + 411;
    else if (sad > SAD_W'(500)) base = s + 161;
    else                        base = s + (s >>> 2) + 36;
    return base + q;
  endfunction

endpackage
