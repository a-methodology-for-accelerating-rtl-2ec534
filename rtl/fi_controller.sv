// fi_controller: runs a fault-injection campaign over the LUTs in the fault list.
//
// For every entry of the list it
//   1. resets both CUT instances and the comparator (RST_CYCLES cycles of reset
//      request, then SETTLE_CYCLES for the synchronizers to drain);
//   2. computes the frame address of the LUT (lut_frame_addr) and reads the four
//      frames that hold its truth table, 4 x 41 words, into a frame buffer;
//   3. writes the four frames back with the LUT's 16 bits inverted in each of them,
//      which complements the whole 64-bit truth table, and starts the timeout timer;
//   4. after set_cycles cycles (the length of the emulated transient) writes the
//      original frames back;
//   5. waits for the comparator interrupt (outcome ERROR) or the timer (outcome
//      TIMEOUT: latent or silent), annotates the outcome in the fault list and
//      moves to the next entry.
// A comparator interrupt during step 4's wait cuts the transient short, but the
// original frames are always restored before the outcome is stored. An entry whose
// coordinates lie outside the device is skipped and keeps RES_NONE.
//
// The sequence of steps follows the published flow, where it runs as software on
// a soft processor; doing it in a state machine, the buffer of whole frames and
// the reset and settle lengths are this design's choices.
// Timing per fault (clk cycles, no interrupt): about 2 + RST_CYCLES + SETTLE_CYCLES
// + 165 (read) + 164 (faulty write) + set_cycles + 164 (restore) + waiting for the
// timer, which was started with the faulty write, + 1 (store).
module fi_controller
  import fi_pkg::*;
#(
  parameter int DEPTH         = 8192,
  parameter int RST_CYCLES    = 16,
  parameter int SETTLE_CYCLES = 8,
  localparam int AW           = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // campaign control
  input  logic          start,
  input  logic [AW:0]   num_faults,
  input  logic [15:0]   set_cycles,
  output logic          busy,
  output logic          done,
  output logic [AW:0]   n_error,
  output logic [AW:0]   n_timeout,
  output logic [AW:0]   n_skipped,
  // fault list, port B of fault_list_ram
  output logic          list_we,
  output logic [AW-1:0] list_addr,
  output fault_entry_t  list_wdata,
  input  fault_entry_t  list_rdata,
  // CUT side (synchronized outside)
  output logic          cut_rst_req,
  input  logic          mismatch,
  // timeout timer
  output logic          tmr_start,
  output logic          tmr_stop,
  input  logic          tmr_timeout,
  // configuration memory
  cfg_if.master         icap
);
  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_FETCH_W, S_RESET, S_SETTLE, S_READ,
    S_WR_FLT, S_HOLD, S_WR_ORIG, S_WAIT, S_STORE, S_DONE
  } state_t;

  state_t       state;
  logic [AW:0]  idx;
  lut_site_t    site;
  fi_result_t   result;
  logic [15:0]  cnt;

  // frame buffer: four frames of 41 words
  logic [31:0]  fbuf [LUT_FRAMES][FRAME_WORDS];
  logic [1:0]   iss_f, rsp_f;      // frame index of the next issue / response
  logic [5:0]   iss_w, rsp_w;      // word index of the next issue / response
  logic         iss_done;

  far_t         lut_far;
  logic [5:0]   lut_word;
  logic         lut_hi, lut_ok;

  lut_frame_addr u_addr (
    .site(site), .faddr(lut_far), .word(lut_word), .hi(lut_hi), .valid(lut_ok)
  );

  logic [31:0] flip_mask;
  assign flip_mask = lut_hi ? 32'hFFFF_0000 : 32'h0000_FFFF;

  // configuration port drive
  always_comb begin
    icap.req   = 1'b0;
    icap.we    = 1'b0;
    icap.faddr   = lut_far;
    icap.word  = iss_w;
    icap.wdata = fbuf[iss_f][iss_w];
    icap.faddr.frame = lut_far.frame + 7'(iss_f);
    case (state)
      S_READ:    icap.req = !iss_done;
      S_WR_FLT: begin
        icap.req = 1'b1;
        icap.we  = 1'b1;
        if (iss_w == lut_word) icap.wdata = fbuf[iss_f][iss_w] ^ flip_mask;
      end
      S_WR_ORIG: begin
        icap.req = 1'b1;
        icap.we  = 1'b1;
      end
      default: ;
    endcase
  end

  assign list_addr  = idx[AW-1:0];
  assign list_we    = (state == S_STORE);
  assign list_wdata = '{site: site, result: result};
  assign busy       = (state != S_IDLE) && (state != S_DONE);
  assign done       = (state == S_DONE);
  assign tmr_start  = (state == S_WR_FLT) && (iss_f == 2'd0) && (iss_w == 6'd0);
  assign tmr_stop   = (state == S_WAIT) && (mismatch || tmr_timeout);

  wire last_word = (iss_w == 6'(FRAME_WORDS - 1));
  wire last_all  = last_word && (iss_f == 2'(LUT_FRAMES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      idx         <= '0;
      site        <= '0;
      result      <= RES_NONE;
      cnt         <= '0;
      iss_f       <= '0;
      iss_w       <= '0;
      rsp_f       <= '0;
      rsp_w       <= '0;
      iss_done    <= 1'b0;
      cut_rst_req <= 1'b1;
      n_error     <= '0;
      n_timeout   <= '0;
      n_skipped   <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE: if (start) begin
          idx       <= '0;
          n_error   <= '0;
          n_timeout <= '0;
          n_skipped <= '0;
          state     <= (num_faults == '0) ? S_DONE : S_FETCH;
        end
        S_FETCH: state <= S_FETCH_W;       // list read issued on list_addr
        S_FETCH_W: begin
          site        <= list_rdata.site;
          result      <= RES_NONE;
          cnt         <= '0;
          cut_rst_req <= 1'b1;
          state       <= S_RESET;
        end
        S_RESET: begin
          cnt <= cnt + 16'd1;
          if (cnt == 16'(RST_CYCLES - 1)) begin
            cut_rst_req <= 1'b0;
            cnt         <= '0;
            state       <= S_SETTLE;
          end
        end
        S_SETTLE: begin
          cnt <= cnt + 16'd1;
          if (cnt == 16'(SETTLE_CYCLES - 1)) begin
            iss_f    <= '0;
            iss_w    <= '0;
            rsp_f    <= '0;
            rsp_w    <= '0;
            iss_done <= 1'b0;
            state    <= lut_ok ? S_READ : S_STORE;
            if (!lut_ok) n_skipped <= n_skipped + 1'b1;
          end
        end
        S_READ: begin
          if (!iss_done) begin
            if (last_word) begin
              iss_w <= '0;
              iss_f <= iss_f + 2'd1;
            end else iss_w <= iss_w + 6'd1;
            if (last_all) iss_done <= 1'b1;
          end
          if (icap.rvalid) begin
            fbuf[rsp_f][rsp_w] <= icap.rdata;
            if (rsp_w == 6'(FRAME_WORDS - 1)) begin
              rsp_w <= '0;
              rsp_f <= rsp_f + 2'd1;
              if (rsp_f == 2'(LUT_FRAMES - 1)) begin
                iss_f <= '0;
                iss_w <= '0;
                state <= S_WR_FLT;
              end
            end else rsp_w <= rsp_w + 6'd1;
          end
        end
        S_WR_FLT: begin
          if (last_word) begin
            iss_w <= '0;
            iss_f <= iss_f + 2'd1;
          end else iss_w <= iss_w + 6'd1;
          if (last_all) begin
            cnt   <= '0;
            state <= S_HOLD;
          end
        end
        S_HOLD: begin
          cnt <= cnt + 16'd1;
          if (cnt >= set_cycles || mismatch) state <= S_WR_ORIG;
        end
        S_WR_ORIG: begin
          if (last_word) begin
            iss_w <= '0;
            iss_f <= iss_f + 2'd1;
          end else iss_w <= iss_w + 6'd1;
          if (last_all) state <= S_WAIT;
        end
        S_WAIT: begin
          if (mismatch) begin
            result  <= RES_ERROR;
            n_error <= n_error + 1'b1;
            state   <= S_STORE;
          end else if (tmr_timeout) begin
            result    <= RES_TIMEOUT;
            n_timeout <= n_timeout + 1'b1;
            state     <= S_STORE;
          end
        end
        S_STORE: begin
          idx   <= idx + 1'b1;
          state <= (idx + 1'b1 == num_faults) ? S_DONE : S_FETCH;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The buffer is complete before any write-back starts.
  a_no_read_in_write : assert property (@(posedge clk) disable iff (!rst_n)
      (state == S_WR_FLT || state == S_WR_ORIG) |-> !icap.rvalid)
    else $error("fi_controller: read data returned during write-back");
endmodule
