// fi_ref_pkg: reference model of the LUT frame layout for the testbenches.
//
// Written independently of the RTL: the major column of a CLB is found by walking
// a string of column types across the die, and the row, word and half-word are
// worked out with plain integer division. Also holds a shadow of configuration
// words that testbenches fill and then download.
package fi_ref_pkg;
  // column types from left to right: I=IOB C=CLB B=BRAM D=DSP K=clock G=GTP
  localparam string COLS =
    "ICCCCBCCCCCCCCCCBCCDCCCCCCCCIKCCCCCCCCCCCCBCCCCCCCCCCBCCCCICCCCBG";

  function automatic int ref_column(int x);
    int n = 0;
    for (int c = 0; c < COLS.len(); c++)
      if (COLS[c] == "C") begin
        if (n == x / 2) return c;
        n++;
      end
    return -1;
  endfunction

  // FAR of the first frame, word and half (0: [15:0], 1: [31:16])
  function automatic void ref_locate(input int x, input int y, input int lut,
                                     output logic [31:0] far, output int word,
                                     output int hi);
    int half, line, r, pair;
    half = (y < 80) ? 1 : 0;
    line = (half != 0) ? (79 - y) / 20 : (y - 80) / 20;
    r    = y % 20;
    pair = r / 2;
    word = pair * 4 + (pair >= 5 ? 1 : 0) + 2 * (x % 2) + (lut / 2);
    hi   = lut % 2;
    far  = (half << 20) | (line << 15) | (ref_column(x) << 7) | ((y % 2 != 0) ? 26 : 32);
  endfunction

  // shadow configuration: key = {far, word}
  typedef logic [37:0] key_t;
  function automatic key_t key_of(logic [31:0] far, int word);
    return {far, 6'(word)};
  endfunction

  // place a 64-bit truth table into the shadow
  function automatic void place_lut(ref logic [31:0] shadow [key_t], input int x,
                                    input int y, input int lut, input logic [63:0] init);
    logic [31:0] far;
    int word, hi;
    ref_locate(x, y, lut, far, word, hi);
    for (int j = 0; j < 4; j++) begin
      key_t k = key_of(far + j, word);
      logic [31:0] w = shadow.exists(k) ? shadow[k] : 32'd0;
      if (hi != 0) w[31:16] = init[16*j +: 16];
      else    w[15:0]  = init[16*j +: 16];
      shadow[k] = w;
    end
  endfunction
endpackage
