// wib_frame_rx: receiver for one WIB link (one front-end board).
//
// Each 2 MHz tick the link delivers one frame of 16-bit words: a header, 96
// words holding 128 packed 12-bit ADC samples and a CRC word (layout in
// rce_pkg). The receiver deserializes the packed samples into groups of four
// channels (48 bits = three link words) and checks the frame: CRC-16/CCITT,
// header sequence number (must count up by one per frame), frame length and
// the front-end error bits in the header.
//
// Interface: in_valid/in_sof/in_data come from the transceiver after 8b/10b
// decoding, one word per clock at most, no back-pressure. frame_start pulses
// with the header word. grp_valid pulses with a finished group of 4 samples
// (sample k of the group in grp_data[12k+11:12k]), grp_idx is its group number
// 0..31. frame_done pulses once per frame, on the CRC word or when a new sof
// cuts a frame short, with frame_err holding what was found. Samples are
// passed on as they arrive (cut-through); the error verdict of a tick comes
// with frame_done. Latency from a data word to its group is one clock.
//
// What is checked follows the requirement to "receive and error-check" the
// front-end stream; the frame layout and check methods are this design's own.
module wib_frame_rx
  import rce_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic                in_sof,
  input  logic [LINK_W-1:0]   in_data,
  output logic                frame_start,
  output logic                grp_valid,
  output logic [4:0]          grp_idx,
  output logic [GRP_W-1:0]    grp_data,
  output logic                frame_done,
  output rx_err_t             frame_err,
  output logic [31:0]         frames_ok,
  output logic [31:0]         frames_bad
);

  logic [6:0]   widx;      // index of the next expected word in the frame
  logic         in_frame;
  logic [15:0]  crc;
  logic [31:0]  pack;      // first two words of a group
  logic [1:0]   wpos;      // word position within the group
  logic [4:0]   gidx;
  logic [7:0]   exp_seq;
  logic         seq_known;
  rx_err_t      err_acc;
  frame_hdr_t   hdr;

  assign hdr = frame_hdr_t'(in_data);

  always_ff @(posedge clk) begin
    if (rst) begin
      widx        <= '0;
      in_frame    <= 1'b0;
      crc         <= 16'hFFFF;
      pack        <= '0;
      wpos        <= '0;
      gidx        <= '0;
      exp_seq     <= '0;
      seq_known   <= 1'b0;
      err_acc     <= '0;
      frame_start <= 1'b0;
      grp_valid   <= 1'b0;
      grp_idx     <= '0;
      grp_data    <= '0;
      frame_done  <= 1'b0;
      frame_err   <= '0;
      frames_ok   <= '0;
      frames_bad  <= '0;
    end else begin
      frame_start <= 1'b0;
      grp_valid   <= 1'b0;
      frame_done  <= 1'b0;
      if (in_valid && in_sof) begin
        // a new frame; a frame still open is reported as cut short
        if (in_frame) begin
          frame_done <= 1'b1;
          frame_err  <= '{len_err: 1'b1, seq_err: err_acc.seq_err,
                          crc_err: 1'b0, feb_err: err_acc.feb_err};
          frames_bad <= frames_bad + 1;
        end
        frame_start     <= 1'b1;
        in_frame        <= 1'b1;
        widx            <= 7'd1;
        wpos            <= '0;
        gidx            <= '0;
        crc             <= crc16_step(16'hFFFF, in_data);
        err_acc         <= '0;
        err_acc.feb_err <= |hdr.feb_err;
        err_acc.seq_err <= seq_known && (hdr.seq != exp_seq);
        exp_seq         <= hdr.seq + 8'd1;
        seq_known       <= 1'b1;
      end else if (in_valid && in_frame) begin
        if (widx <= 7'(FRAME_DATA_WORDS)) begin
          crc <= crc16_step(crc, in_data);
          if (wpos == 2'd2) begin
            grp_valid <= 1'b1;
            grp_idx   <= gidx;
            grp_data  <= {in_data, pack};
            gidx      <= gidx + 1'b1;
            wpos      <= '0;
          end else begin
            pack[16*wpos +: 16] <= in_data;
            wpos <= wpos + 1'b1;
          end
          widx <= widx + 1'b1;
        end else begin
          // CRC word closes the frame
          frame_done        <= 1'b1;
          frame_err         <= err_acc;
          frame_err.crc_err <= (in_data != crc);
          if (err_acc != '0 || in_data != crc) frames_bad <= frames_bad + 1;
          else                                 frames_ok  <= frames_ok + 1;
          in_frame <= 1'b0;
        end
      end
    end
  end

endmodule
