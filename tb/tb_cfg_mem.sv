// tb_cfg_mem: downloads random truth tables for random LUT sites (placed by the
// reference model), checks the live truth tables and ICAP read-back, then rewrites
// single words through ICAP and checks that the change reaches the right LUT.
module tb_cfg_mem;
  import fi_pkg::*;
  import fi_ref_pkg::*;
  localparam int NS = 8;

  logic clk = 0;
  logic rst_n = 1;
  always #5 clk = ~clk;

  cfg_if icap (.clk(clk), .rst_n(rst_n));
  logic        load_we = 0;
  far_t        load_far;
  logic [5:0]  load_word;
  logic [31:0] load_data;
  lut_site_t   site [NS];
  logic [63:0] lut_init [NS];
  logic [63:0] want [NS];
  logic [31:0] shadow [key_t];
  int checks = 0, failures = 0;

  cfg_mem #(.NSITES(NS)) dut (
    .clk(clk), .icap(icap), .load_we(load_we), .load_far(load_far),
    .load_word(load_word), .load_data(load_data), .site(site), .lut_init(lut_init));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic icap_read(input logic [31:0] f, input int w, output logic [31:0] d);
    @(negedge clk);
    icap.req = 1; icap.we = 0; icap.faddr = far_t'(f); icap.word = 6'(w);
    @(negedge clk);
    icap.req = 0;
    d = icap.rdata;
    checks++;
    if (!icap.rvalid) failures++;
  endtask

  task automatic icap_write(input logic [31:0] f, input int w, input logic [31:0] d);
    @(negedge clk);
    icap.req = 1; icap.we = 1; icap.faddr = far_t'(f); icap.word = 6'(w); icap.wdata = d;
    @(negedge clk);
    icap.req = 0; icap.we = 0;
  endtask

  initial begin
    logic [31:0] f, d;
    int w, h;
    icap.req = 0; icap.we = 0; icap.faddr = '0; icap.word = 0; icap.wdata = 0;
    load_far = '0; load_word = 0; load_data = 0;
    // distinct random sites (distinct slices so each site is alone in its half-word)
    for (int s = 0; s < NS; s++) begin
      site[s] = '{x: 7'(s * 13 + $urandom_range(0, 12)), y: 8'($urandom_range(0, 159)),
                  lut: lut_id_t'(s % 4)};
      if (s >= 4) site[s].y = site[s - 4].y ^ 8'd1;  // neighbour row, other frames
      if (site[s].y > 8'd159) site[s].y = 8'd158;
      want[s] = {$urandom(), $urandom()};
    end
    for (int s = 0; s < NS; s++)
      place_lut(shadow, site[s].x, site[s].y, int'(site[s].lut), want[s]);
    // download
    foreach (shadow[k]) begin
      @(negedge clk);
      load_we = 1; load_far = far_t'(k[37:6]); load_word = k[5:0]; load_data = shadow[k];
    end
    @(negedge clk);
    load_we = 0;
    #1;
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (lut_init[s] !== want[s]) begin
        failures++;
        $display("FAIL site %0d init %h want %h", s, lut_init[s], want[s]);
      end
    end
    // read back every downloaded word
    foreach (shadow[k]) begin
      icap_read(k[37:6], int'(k[5:0]), d);
      checks++;
      if (d !== shadow[k]) failures++;
    end
    // complement 16 bits of one frame of each site through ICAP
    for (int s = 0; s < NS; s++) begin
      int j = s % 4;
      ref_locate(site[s].x, site[s].y, int'(site[s].lut), f, w, h);
      icap_read(f + j, w, d);
      icap_write(f + j, w, d ^ (h ? 32'hFFFF_0000 : 32'h0000_FFFF));
      #1;
      want[s][16*j +: 16] = ~want[s][16*j +: 16];
      for (int t = 0; t < NS; t++) begin
        checks++;
        if (lut_init[t] !== want[t]) failures++;
      end
    end
    // a frame that is not a LUT frame is not stored
    icap_write(32'h0000_2E00 | 32'd5, 3, 32'hDEAD_BEEF);   // column 92, routing frame 5
    icap_read(32'h0000_2E00 | 32'd5, 3, d);
    checks++;
    if (d !== 32'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
