// tb_lut_frame_addr: checks the LUT-to-frame mapping against the reference model
// for the fixed example SLICE_X81Y19 (column 47, bottom half, row 3, frames 26-29,
// words 39 and 40) and for every slice and LUT letter of the device. It also checks
// the column map against the published frame totals of the configuration plane
// (18,576 frames, 15,552 of them in CLB columns).
module tb_lut_frame_addr;
  import fi_pkg::*;
  import fi_ref_pkg::*;

  lut_site_t  site;
  far_t       faddr;
  logic [5:0] word;
  logic       hi, valid;
  int checks = 0, failures = 0;

  lut_frame_addr dut (.site(site), .faddr(faddr), .word(word), .hi(hi), .valid(valid));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rfar;
    int rword, rhi;
    // the worked example
    site = '{x: 7'd81, y: 8'd19, lut: LUT_A};
    #1;
    check(faddr.column == 8'd47 && faddr.half && faddr.line == 5'd3 &&
          faddr.frame == 7'd26 && word == 6'd39 && !hi, "X81Y19 A");
    site.lut = LUT_D;
    #1;
    check(word == 6'd40 && hi, "X81Y19 D");
    site = '{x: 7'd0, y: 8'd80, lut: LUT_B};
    #1;
    check(faddr.column == 8'd1 && !faddr.half && faddr.line == 5'd0 &&
          faddr.frame == 7'd32 && word == 6'd0 && hi, "X0Y80 B");
    site = '{x: 7'd107, y: 8'd159, lut: LUT_C};
    #1;
    check(faddr.column == 8'd62 && faddr.line == 5'd3 && word == 6'd40, "X107Y159 C");
    // every location
    for (int x = 0; x < 108; x++)
      for (int y = 0; y < 160; y++)
        for (int l = 0; l < 4; l++) begin
          site = '{x: 7'(x), y: 8'(y), lut: lut_id_t'(l)};
          #1;
          ref_locate(x, y, l, rfar, rword, rhi);
          check(valid && faddr == rfar && int'(word) == rword && int'(hi) == rhi,
                $sformatf("X%0dY%0d L%0d got %h/%0d/%0d want %h/%0d/%0d", x, y, l,
                          faddr, word, hi, rfar, rword, rhi));
        end
    site = '{x: 7'd108, y: 8'd0, lut: LUT_A};
    #1;
    check(!valid, "X108 invalid");
    site = '{x: 7'd0, y: 8'd160, lut: LUT_A};
    #1;
    check(!valid, "Y160 invalid");
    // column map against the published frame counts of plane 0: per line
    // 3 IOB x 54 + 54 CLB x 36 + 5 BRAM x 30 + DSP 28 + clock 4 + GTP 32 + 2 dummy
    // frames, 8 lines, 18,576 frames; 15,552 of them CLB frames
    begin
      int n_i, n_c, n_b, n_d, n_k, n_g, per_line;
      n_i = 0; n_c = 0; n_b = 0; n_d = 0; n_k = 0; n_g = 0;
      for (int c = 0; c < COLS.len(); c++) begin
        logic [6:0] m;
        m = major_to_clb(8'(c));
        check(m[6] == (COLS[c] == "C"), $sformatf("column %0d type", c));
        case (COLS[c])
          "I": n_i++;
          "C": n_c++;
          "B": n_b++;
          "D": n_d++;
          "K": n_k++;
          "G": n_g++;
          default: ;
        endcase
      end
      per_line = n_i * 54 + n_c * CLB_STACK + n_b * 30 + n_d * 28 + n_k * 4 + n_g * 32 + 2;
      check(COLS.len() == MAJOR_COLS && n_c == CLB_COLS, "65 columns, 54 of them CLB");
      check(per_line * 2 * LINES_PER_HALF == 18576, $sformatf("plane 0 frames %0d", per_line * 8));
      check(n_c * CLB_STACK * 2 * LINES_PER_HALF == 15552, "CLB frames");
      check(n_c * LUT_FRAMES_PER_COL * 2 * LINES_PER_HALF == CFG_FRAMES, "LUT frames");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
