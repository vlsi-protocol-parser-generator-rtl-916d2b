// address_recognition: address recognition processing unit.
//
// A parallel comparator: at the parallel activation pulse of the address
// field it compares the word on its field data input (D) with the station
// address (parameter P) and registers the result R: addr_match is high when
// the frame is for this station, or for all stations (address 0xFF, HDLC
// practice and this design's addition). addr_valid tells that the address of
// the current frame has been seen; start clears both. The result is
// available in the cycle after the pulse.
module address_recognition
  import parser_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         act,
  input  logic [W-1:0] data,
  input  logic [W-1:0] station_addr,
  output logic         addr_match,
  output logic         addr_valid
);

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      addr_match <= 1'b0;
      addr_valid <= 1'b0;
    end else if (act) begin
      addr_valid <= 1'b1;
      addr_match <= (data == station_addr) || (data == W'(HDLC_ALL_STAT));
    end
  end

endmodule
