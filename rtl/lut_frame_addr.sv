// lut_frame_addr: locate the truth table of one LUT in the configuration memory.
//
// Given the slice coordinates SLICE_X<x>Y<y> and the LUT letter (A..D) reported by
// the implemented netlist, it returns the frame address (FAR) of the first of the
// four adjacent frames that hold the LUT, the word inside those frames, and which
// 16-bit half of that word belongs to the LUT. Frame FAR+j holds bits
// [16j+15:16j] of the 64-bit truth table, so a whole LUT is 4 x 16 bits.
//
// How the address is formed:
//   * plane 000 (interconnect and block configuration);
//   * Y 0..79 is the bottom half (HALF=1), Y 80..159 the top half (HALF=0);
//     a configuration row (LINE) spans 20 CLB rows and is numbered from the middle
//     of the die outwards;
//   * COLUMN is the major column of the CLB column holding slice X (two slices per
//     CLB, see fi_pkg::clb_to_major);
//   * FRAME is 26 for odd Y and 32 for even Y;
//   * the 20 CLB rows of a configuration row are split by the HCLK word (word 20):
//     each pair of rows owns four words, the lower five pairs words 0..19 and the
//     upper five words 21..40. Within a pair's four words the even-X slice comes
//     first; in a slice's two words LUT A/B share the first word and LUT C/D the
//     second, A and C in bits [15:0], B and D in bits [31:16].
// The frame ranges, the word counts, the HCLK word and the A/B/C/D layout follow
// the published frame layout; the word order inside a pair of rows is this
// design's reading of it.
//
// Purely combinational; valid is low for coordinates outside the 108 x 160 slices.
module lut_frame_addr
  import fi_pkg::*;
(
  input  lut_site_t  site,
  output far_t       faddr,  // address of the first of the four LUT frames
  output logic [5:0] word,   // word 0..40 inside each of the four frames
  output logic       hi,     // 1: LUT bits sit in [31:16], 0: in [15:0]
  output logic       valid
);

  logic       bottom;
  logic [7:0] yoff;     // distance from the middle of the die, in rows
  logic [1:0] line;
  logic [4:0] r;        // row inside the configuration row, 0 = lowest
  logic [3:0] pair;
  logic [5:0] base;

  always_comb begin
    bottom = (site.y < 8'd80);
    yoff   = bottom ? (8'd79 - site.y) : (site.y - 8'd80);
    if      (yoff >= 8'd60) line = 2'd3;
    else if (yoff >= 8'd40) line = 2'd2;
    else if (yoff >= 8'd20) line = 2'd1;
    else                    line = 2'd0;
    // row counted upwards from the lower edge of the configuration row
    if (bottom) r = 5'(site.y - 8'(8'd20 * (8'd3 - {6'd0, line})));
    else        r = 5'(site.y - 8'd80 - 8'(8'd20 * {6'd0, line}));
    pair = 4'(r >> 1);
    base = 6'({pair, 2'b00}) + ((pair >= 4'd5) ? 6'd1 : 6'd0);

    faddr        = '0;
    faddr.plane  = 3'b000;
    faddr.half   = bottom;
    faddr.line   = {3'b000, line};
    faddr.column = clb_to_major(site.x[6:1]);
    faddr.frame  = site.y[0] ? 7'(LUT_FRAME_ODD) : 7'(LUT_FRAME_EVEN);

    word  = base + (site.x[0] ? 6'd2 : 6'd0)
                 + ((site.lut == LUT_C || site.lut == LUT_D) ? 6'd1 : 6'd0);
    hi    = (site.lut == LUT_B || site.lut == LUT_D);
    valid = (site.x < 7'(SLICE_X_NUM)) && (site.y < 8'(SLICE_Y_NUM));
  end

endmodule
