// cfg_mem: behavioural model of the FPGA configuration memory (LUT frames only)
// and of its internal configuration access port (ICAP).
//
// The device itself is not logic of this design: this model stands in for it so
// that the injector and the CUT can be simulated together. It stores, for every
// CLB column (54), configuration row (2 halves x 4) and LUT frame (26-29, 32-35),
// a frame of 41 words of 32 bits, which is all the configuration that the LUTs of
// the device use. Frames of other types are not stored: writes to them are
// dropped and reads return zero.
//
// Interfaces:
//   icap      word-level frame access (cfg_if), reads return one cycle later;
//   load_*    bitstream download port, one word per cycle, used before a campaign;
//   site/lut_init  the live truth table of each LUT site in the design, gathered
//             from the four frames that hold it (16 bits each), so every write
//             through either port reaches the logic right away.
// An ICAP write wins over a load write to the same word in the same cycle. The
// word-level port replaces the real configuration packet protocol, which is not
// modelled.
module cfg_mem
  import fi_pkg::*;
#(
  parameter int NSITES = 24
) (
  input  logic        clk,
  cfg_if.slave        icap,
  input  logic        load_we,
  input  far_t        load_far,
  input  logic [5:0]  load_word,
  input  logic [31:0] load_data,
  input  lut_site_t   site     [NSITES],
  output logic [63:0] lut_init [NSITES]
);
  localparam int FW = $clog2(CFG_FRAMES);

  logic [31:0] mem [CFG_FRAMES][FRAME_WORDS];

  // Storage index of a frame address; ok is low for frames that are not stored.
  function automatic logic [FW:0] frame_index(input far_t f);
    logic [6:0]  clb;
    logic [2:0]  lf;
    logic        ok;
    clb = major_to_clb(f.column);
    ok  = (f.plane == 3'b000) && (f.line < 5'(LINES_PER_HALF)) && clb[6];
    if (f.frame >= 7'(LUT_FRAME_ODD) && f.frame < 7'(LUT_FRAME_ODD + LUT_FRAMES))
      lf = 3'(f.frame - 7'(LUT_FRAME_ODD));
    else if (f.frame >= 7'(LUT_FRAME_EVEN) && f.frame < 7'(LUT_FRAME_EVEN + LUT_FRAMES))
      lf = 3'(f.frame - 7'(LUT_FRAME_EVEN)) + 3'd4;
    else begin
      lf = 3'd0;
      ok = 1'b0;
    end
    return {ok, FW'(((int'({f.half, f.line[1:0]}) * CLB_COLS) + int'(clb[5:0])) * LUT_FRAMES_PER_COL + int'(lf))};
  endfunction

  logic [FW:0] icap_idx, load_idx;
  assign icap_idx = frame_index(icap.faddr);
  assign load_idx = frame_index(load_far);

  always_ff @(posedge clk) begin
    if (load_we && load_idx[FW] && load_word < 6'(FRAME_WORDS) &&
        !(icap.req && icap.we && icap_idx == load_idx && icap.word == load_word))
      mem[load_idx[FW-1:0]][load_word] <= load_data;
    if (icap.req && icap.we && icap_idx[FW] && icap.word < 6'(FRAME_WORDS))
      mem[icap_idx[FW-1:0]][icap.word] <= icap.wdata;
  end

  always_ff @(posedge clk) begin
    icap.rvalid <= icap.req && !icap.we;
    if (icap.req && !icap.we)
      icap.rdata <= (icap_idx[FW] && icap.word < 6'(FRAME_WORDS))
                    ? mem[icap_idx[FW-1:0]][icap.word] : 32'd0;
  end

  // live truth tables of the design's LUT sites
  for (genvar s = 0; s < NSITES; s++) begin : g_site
    far_t       sfar;
    logic [5:0] sword;
    logic       shi, sok;
    lut_frame_addr u_addr (.site(site[s]), .faddr(sfar), .word(sword), .hi(shi), .valid(sok));
    for (genvar j = 0; j < LUT_FRAMES; j++) begin : g_frame
      far_t        fj;
      logic [FW:0] idx;
      logic [31:0] w;
      always_comb begin
        fj       = sfar;
        fj.frame = sfar.frame + 7'(j);
      end
      assign idx = frame_index(fj);
      assign w   = (sok && idx[FW]) ? mem[idx[FW-1:0]][sword] : 32'd0;
      assign lut_init[s][16*j +: 16] = shi ? w[31:16] : w[15:0];
    end
  end
endmodule
