// cfg_if: word-level access port to the FPGA configuration memory.
//
// This is the bundle between the fault-injection controller and the internal
// configuration access port (ICAP) model. A transfer is one word of one frame:
// the master raises req with the frame address (far), the word index (0..40) and
// we. A write takes effect at the clock edge; a read returns rdata with rvalid one
// cycle later. The master may issue one transfer per cycle. clk and rst_n only
// time the protocol assertions. The word-level
// handshake replaces the configuration packet stream of the real port, which is
// outside the scope of this design.
interface cfg_if (input logic clk, input logic rst_n);
  import fi_pkg::*;

  logic        req;
  logic        we;
  far_t        faddr;
  logic [5:0]  word;
  logic [31:0] wdata;
  logic [31:0] rdata;
  logic        rvalid;

  modport master (output req, we, faddr, word, wdata, input rdata, rvalid);
  modport slave  (input req, we, faddr, word, wdata, output rdata, rvalid);

  // Every transfer addresses an existing word of a plane-0 frame.
  a_word_range : assert property (@(posedge clk) disable iff (!rst_n) req |-> (word < 6'(FRAME_WORDS)))
    else $error("cfg_if: word index %0d out of range", word);
  a_plane : assert property (@(posedge clk) disable iff (!rst_n) req |-> (faddr.plane == 3'b000))
    else $error("cfg_if: access outside plane 0");
endinterface
