// fi_pkg: types and constants shared by the LUT fault-injection design.
//
// It holds the geometry of the Virtex-5 XC5VLX110T configuration memory as far as
// the LUTs are concerned: the 32-bit frame address word (FAR) with its fields, the
// 41-word frame, the 36-frame CLB column stack in which frames 26-29 and 32-35 hold
// the LUT truth tables, and the order of the 65 major columns (IOB, CLB, BRAM, DSP,
// clock and GTP columns) across the die. It also holds the fault-list entry and the
// injection result encodings, and the placement of the case-study counter's LUTs.
//
// Device numbers (41 words, 36-frame stack, the frame ranges, the FAR field
// positions, the 54 CLB columns and the column order) follow the published device
// description. Encodings of results and LUT letters and the CUT placement are this
// design's own choices.
package fi_pkg;

  // ---------------- configuration memory geometry ----------------
  localparam int FRAME_WORDS    = 41;  // words of 32 bits per frame
  localparam int HCLK_WORD      = 20;  // word that configures the HCLK row
  localparam int CLB_STACK      = 36;  // frames in a CLB column stack
  localparam int LUT_FRAME_ODD  = 26;  // first LUT frame for odd Y rows
  localparam int LUT_FRAME_EVEN = 32;  // first LUT frame for even Y rows
  localparam int LUT_FRAMES     = 4;   // frames that hold one LUT (16 bits each)
  localparam int CLB_COLS       = 54;  // CLB columns
  localparam int MAJOR_COLS     = 65;  // major columns 0..64
  localparam int LINES_PER_HALF = 4;   // configuration rows per half
  localparam int ROWS_PER_LINE  = 20;  // CLB rows per configuration row
  localparam int SLICE_X_NUM    = 108; // slice X coordinates 0..107
  localparam int SLICE_Y_NUM    = 160; // slice Y coordinates 0..159
  // LUT frames stored per CLB column and configuration row (26-29 and 32-35)
  localparam int LUT_FRAMES_PER_COL = 2 * LUT_FRAMES;
  // frames held by the configuration model: half x line x CLB column x LUT frame
  localparam int CFG_FRAMES = 2 * LINES_PER_HALF * CLB_COLS * LUT_FRAMES_PER_COL;

  // Frame address word (FAR), bit 31 first.
  typedef struct packed {
    logic [7:0] unused;  // [31:24]
    logic [2:0] plane;   // [23:21] block type, 000 = interconnect and block config
    logic       half;    // [20]    0 = top, 1 = bottom
    logic [4:0] line;    // [19:15] row, 0 next to the middle
    logic [7:0] column;  // [14:7]  major column, 0 on the left
    logic [6:0] frame;   // [6:0]   minor frame within the column stack
  } far_t;

  typedef enum logic [1:0] {LUT_A = 2'd0, LUT_B = 2'd1, LUT_C = 2'd2, LUT_D = 2'd3} lut_id_t;

  // One LUT location as the netlist reports it: SLICE_X<x>Y<y>, LUT letter.
  typedef struct packed {
    logic [6:0] x;
    logic [7:0] y;
    lut_id_t    lut;
  } lut_site_t;

  // Outcome of one injection, as annotated in the fault list.
  typedef enum logic [1:0] {
    RES_NONE    = 2'd0,  // not injected yet
    RES_ERROR   = 2'd1,  // the comparator saw the outputs differ
    RES_TIMEOUT = 2'd2   // latent or silent until the timer ran out
  } fi_result_t;

  typedef struct packed {
    lut_site_t  site;
    fi_result_t result;
  } fault_entry_t;

  // Major column of the CLB column that holds slice X (two slices per CLB).
  // Columns: 0 IOB, 1-4 CLB, 5 BRAM, 6-15 CLB, 16 BRAM, 17-18 CLB, 19 DSP,
  // 20-27 CLB, 28 IOB, 29 CLK, 30-41 CLB, 42 BRAM, 43-52 CLB, 53 BRAM,
  // 54-57 CLB, 58 IOB, 59-62 CLB, 63 BRAM, 64 GTP.
  function automatic logic [7:0] clb_to_major(input logic [5:0] k);
    logic [7:0] kk;
    kk = {2'b00, k};
    if      (k < 6'd4)  return kk + 8'd1;
    else if (k < 6'd14) return kk + 8'd2;
    else if (k < 6'd16) return kk + 8'd3;
    else if (k < 6'd24) return kk + 8'd4;
    else if (k < 6'd36) return kk + 8'd6;
    else if (k < 6'd46) return kk + 8'd7;
    else if (k < 6'd50) return kk + 8'd8;
    else                return kk + 8'd9;
  endfunction

  // Inverse: CLB column index of a major column; ok = 0 for non-CLB columns.
  function automatic logic [6:0] major_to_clb(input logic [7:0] c);
    // result {ok, index[5:0]}
    if      (c >= 8'd1  && c <= 8'd4)  return {1'b1, 6'(c - 8'd1)};
    else if (c >= 8'd6  && c <= 8'd15) return {1'b1, 6'(c - 8'd2)};
    else if (c >= 8'd17 && c <= 8'd18) return {1'b1, 6'(c - 8'd3)};
    else if (c >= 8'd20 && c <= 8'd27) return {1'b1, 6'(c - 8'd4)};
    else if (c >= 8'd30 && c <= 8'd41) return {1'b1, 6'(c - 8'd6)};
    else if (c >= 8'd43 && c <= 8'd52) return {1'b1, 6'(c - 8'd7)};
    else if (c >= 8'd54 && c <= 8'd57) return {1'b1, 6'(c - 8'd8)};
    else if (c >= 8'd59 && c <= 8'd62) return {1'b1, 6'(c - 8'd9)};
    else                               return 7'd0;
  endfunction

  // ---------------- case-study CUT: 4-bit counter ----------------
  localparam int CNT_BITS = 4;
  // Truth tables: 3-input majority on I0..I2 (TMR copy) and identity of I0.
  localparam logic [63:0] INIT_MAJ3 = 64'hE8E8_E8E8_E8E8_E8E8;
  localparam logic [63:0] INIT_BUF  = 64'hAAAA_AAAA_AAAA_AAAA;

  // Placement: one slice per counter copy, LUT A..D = counter bits 0..3.
  // FAULTY instance in the bottom half, GOLDEN in the top half.
  localparam logic [6:0] FAULTY_X [3] = '{7'd81, 7'd80, 7'd81};
  localparam logic [7:0] FAULTY_Y [3] = '{8'd19, 8'd19, 8'd18};
  localparam logic [6:0] GOLDEN_X [3] = '{7'd81, 7'd80, 7'd81};
  localparam logic [7:0] GOLDEN_Y [3] = '{8'd141, 8'd141, 8'd140};

endpackage
