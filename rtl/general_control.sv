// general_control: general control part of the reception machine.
//
// Sequences one reception. In IDLE the start-of-message detector is
// enabled; its flag starts the parser (start, combinational, same cycle).
// A flag that arrives in place of the address field (in_addr_field) is
// taken as one more opening flag and restarts the frame, so repeated flags
// between frames are skipped (this design's own rule).
// In RUN the frame is parsed until the CRC unit detects the end of the FCS
// (stop to the parser, crc_ok status) or the parser reaches the end of its
// skeleton without that detection (length error). frame_end marks that
// cycle for the data receiving unit and the flag detector. One REPORT cycle
// follows, which collects the last byte count and FIFO overflow, then
// frame_done pulses with the frame's status held in status until the next
// frame is done. The reception machine names this part only; the three
// states and the status word are this design's own.
module general_control
  import parser_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flag,
  input  logic          crc_ok,
  input  logic          skel_end,
  input  logic          in_addr_field,
  input  logic          addr_match,
  input  logic          fifo_overflow,
  input  logic [15:0]   info_count,
  output logic          som_enable,
  output logic          start,
  output logic          stop,
  output logic          frame_end,
  output logic          frame_done,
  output frame_status_t status
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_REPORT} state_e;
  state_e state;
  logic   ok_q, len_err_q, ovf_q;

  assign som_enable = (state == S_IDLE) || (state == S_RUN && in_addr_field);
  assign start      = som_enable && flag;
  assign stop       = (state == S_RUN) && crc_ok;
  assign frame_end  = (state == S_RUN) && (crc_ok || skel_end);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ok_q       <= 1'b0;
      len_err_q  <= 1'b0;
      ovf_q      <= 1'b0;
      frame_done <= 1'b0;
      status     <= '0;
    end else begin
      frame_done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state     <= S_RUN;
          ok_q      <= 1'b0;
          len_err_q <= 1'b0;
          ovf_q     <= 1'b0;
        end
        S_RUN: begin
          if (fifo_overflow) ovf_q <= 1'b1;
          if (start) begin
            ovf_q <= 1'b0;
          end else if (frame_end) begin
            state     <= S_REPORT;
            ok_q      <= crc_ok;
            len_err_q <= !crc_ok;
          end
        end
        default: begin  // S_REPORT
          state             <= S_IDLE;
          frame_done        <= 1'b1;
          status.crc_ok     <= ok_q;
          status.len_error  <= len_err_q;
          status.addr_match <= addr_match;
          status.overflow   <= ovf_q || fifo_overflow;
          status.info_bytes <= info_count;
        end
      endcase
    end
  end

endmodule
