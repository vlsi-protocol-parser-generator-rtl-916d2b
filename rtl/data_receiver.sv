// data_receiver: data receiving unit of the HDLC reception machine.
//
// The data field is loaded into the skeleton with its largest allowed size
// and includes the two FCS bytes, whose start cannot be known while they
// arrive. This unit takes each byte of the data field at any of its parallel
// activation pulses, counts it, and holds the last two bytes back: a byte is
// validated (written towards the FIFO) only when two more have followed it.
// At frame end the two bytes still held - the FCS - are dropped. Writes are
// made only while enable (address recognised) is high; info_count counts the
// validated bytes of the frame either way.
//
// Timing: wr_en/wr_data are registered, one cycle after the pulse. A pulse
// and frame_end in the same cycle are handled in that order.
module data_receiver
  import parser_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [PA_LINES-1:0] act,
  input  logic [W-1:0]        data,
  input  logic                enable,
  input  logic                frame_end,
  output logic                wr_en,
  output logic [W-1:0]        wr_data,
  output logic [15:0]         info_count
);

  logic [W-1:0] hold0, hold1;   // hold0 is the older byte
  logic [1:0]   held;
  logic         take;

  assign take = |act;

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      hold0      <= '0;
      hold1      <= '0;
      held       <= '0;
      wr_en      <= 1'b0;
      wr_data    <= '0;
      info_count <= '0;
    end else begin
      wr_en <= 1'b0;
      if (take) begin
        hold0 <= hold1;
        hold1 <= data;
        if (held == 2'd2) begin
          wr_en      <= enable;
          wr_data    <= hold0;
          info_count <= info_count + 16'd1;
        end else begin
          held <= held + 2'd1;
        end
      end
      if (frame_end) held <= '0;
    end
  end

endmodule
