// reception_machine: HDLC reception machine built around the protocol
// parser.
//
// Receives HDLC frames from a serial line (after zero elimination) and
// splits syntax from semantics: the protocol parser cuts each frame into its
// fields from a skeleton ROM and activates the real-time processing units,
// which do the field work. Flow of one frame:
//   som_detector        sees the opening flag 01111110;
//   general_control     starts the parser, later stops it;
//   protocol_parser     fields: 0 address, 1 command, 2 data (the data
//                       field is loaded with its largest allowed size and
//                       holds the FCS); serial and parallel activations;
//   address_recognition address field against station_addr;
//   command_recognition decodes the command field (I / S / U formats);
//   skeleton_code_recognition  reads the format bits of the command field
//                       and re-selects the skeleton stage: every frame
//                       starts in stage 0 (data frame) and moves to stage 1
//                       (no information field) for S frames and U frames
//                       that carry no information;
//   crc_unit            detects the end of the FCS (frame end);
//   data_receiver       validates data bytes, drops the two FCS bytes;
//   fifo_buffer, dma_unit  carry validated bytes to the shared memory.
//
// Interface: one bit per cycle with line_valid; stage shows the skeleton
// stage chosen for the current frame. The serial and parallel activations and the parallel bus are
// brought out for further real-time units. frame_done pulses once per frame
// with frame_status. The shared-memory write port uses mem_req/mem_gnt.
// The partitioning follows the reception machine architecture; the sizes
// (256 information bytes, 16-word FIFO, 16-bit memory address) and the
// handshakes are this design's own.
module reception_machine
  import parser_pkg::*;
#(
  parameter int unsigned W              = 8,
  parameter int unsigned NSKEL          = 2,
  parameter int unsigned MAX_INFO_BYTES = 256,
  parameter int unsigned FIFO_DEPTH     = 16,
  parameter int unsigned MEM_AW         = 16,
  parameter int unsigned IW             = (NSKEL > 1) ? $clog2(NSKEL) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         line_in,
  input  logic                         line_valid,
  input  logic [W-1:0]                 station_addr,
  input  logic [MEM_AW-1:0]            dma_base,
  input  logic                         dma_base_load,
  output logic                         mem_req,
  output logic [MEM_AW-1:0]            mem_addr,
  output logic [W-1:0]                 mem_wdata,
  input  logic                         mem_gnt,
  output logic [2:0]                   sr_act,
  output logic [2:0]                   sr_data,
  output logic [2:0][PA_LINES-1:0]     pr_act,
  output logic [W-1:0]                 pr_data,
  output logic                         pr_valid,
  output hdlc_cmd_t                    cmd,
  output logic                         cmd_valid,
  output logic                         addr_match,
  output logic [IW-1:0]                stage,
  output logic                         frame_done,
  output frame_status_t                frame_status
);

  localparam int unsigned NF    = 3;
  localparam int unsigned CNT_W = 16;
  localparam int unsigned F_ADDR = 0, F_CMD = 1, F_DATA = 2;
  // data field: information bytes plus the two FCS bytes
  localparam logic [CNT_W-1:0] DATA_END = CNT_W'(16 + 8 * (MAX_INFO_BYTES + 2));

  localparam logic [CNT_W-1:0] TERMS [NSKEL*NF] = skeleton_terms();

  // Stage 0: data frame; stage 1: no information field; further stages
  // repeat stage 0.
  function automatic logic [CNT_W-1:0] skel_term(int unsigned k);
    case (k % NF)
      0:       return CNT_W'(8);
      1:       return CNT_W'(16);
      default: return (k / NF == 1) ? CNT_W'(32) : DATA_END;
    endcase
  endfunction

  typedef logic [CNT_W-1:0] terms_t [NSKEL*NF];
  function automatic terms_t skeleton_terms();
    terms_t t;
    for (int unsigned k = 0; k < NSKEL*NF; k++) t[k] = skel_term(k);
    return t;
  endfunction

  logic             flag, som_enable, start, stop, frame_end;
  logic             skel_end, busy, frame_bit, crc_ok;
  logic [15:0]      crc;
  logic [NF-1:0][W-1:0] pf_data;
  logic [$clog2(NF+1)-1:0] field_idx;
  logic [CNT_W-1:0] bit_count;
  logic             addr_valid;
  logic             sk_reload;
  logic [IW-1:0]    sk_index, parser_index;
  logic             fifo_wr, fifo_rd, fifo_empty, fifo_full, fifo_ovf;
  logic [W-1:0]     fifo_wdata, fifo_rdata;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;
  logic [15:0]      info_count;

  som_detector u_som (
    .clk, .rst_n, .enable(som_enable), .clear(frame_end),
    .din(line_in), .din_valid(line_valid), .flag
  );

  general_control u_gctl (
    .clk, .rst_n, .flag, .crc_ok, .skel_end, .in_addr_field(busy && field_idx == '0), .addr_match,
    .fifo_overflow(fifo_ovf), .info_count,
    .som_enable, .start, .stop, .frame_end, .frame_done, .status(frame_status)
  );

  protocol_parser #(.W(W), .NF(NF), .NSKEL(NSKEL), .CNT_W(CNT_W), .IW(IW), .TERMS(TERMS)) u_parser (
    .clk, .rst_n, .start, .index(parser_index), .reload(sk_reload), .din(line_in), .din_valid(line_valid), .stop,
    .sr_act, .sr_data, .pr_act, .pf_data, .data_bus(pr_data), .data_valid(pr_valid),
    .busy, .skel_end, .frame_bit, .field_idx, .bit_count
  );

  address_recognition #(.W(W)) u_addr (
    .clk, .rst_n, .start, .act(pr_act[F_ADDR][PA_FIRST]), .data(pf_data[F_ADDR]),
    .station_addr, .addr_match, .addr_valid
  );

  command_recognition u_cmd (
    .clk, .rst_n, .start, .act(pr_act[F_CMD][PA_FIRST]), .data(pf_data[F_CMD][7:0]),
    .cmd, .cmd_valid
  );

  // every frame starts in stage 0 (largest skeleton); the command field's
  // format bits then re-select the stage
  skeleton_code_recognition #(.IW(IW)) u_skc (
    .clk, .rst_n, .start, .act(pr_act[F_CMD][PA_FIRST]), .data(pf_data[F_CMD][7:0]),
    .reload(sk_reload), .index(sk_index), .stage
  );

  assign parser_index = sk_reload ? sk_index : '0;

  crc_unit u_crc (
    .clk, .rst_n, .start, .bit_en(frame_bit), .din(line_in), .crc, .crc_ok
  );

  data_receiver #(.W(W)) u_data (
    .clk, .rst_n, .start, .act(pr_act[F_DATA]), .data(pf_data[F_DATA]),
    .enable(addr_match), .frame_end, .wr_en(fifo_wr), .wr_data(fifo_wdata), .info_count
  );

  fifo_buffer #(.W(W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(fifo_wr), .wr_data(fifo_wdata), .rd_en(fifo_rd),
    .rd_data(fifo_rdata), .empty(fifo_empty), .full(fifo_full), .overflow(fifo_ovf),
    .count(fifo_count)
  );

  dma_unit #(.W(W), .MEM_AW(MEM_AW)) u_dma (
    .clk, .rst_n, .base(dma_base), .base_load(dma_base_load),
    .fifo_empty, .fifo_data(fifo_rdata), .fifo_rd,
    .mem_req, .mem_addr, .mem_wdata, .mem_gnt
  );

endmodule
