// trigger_listener: decodes the timing stream and keeps the global timestamp.
//
// The timing system encodes timestamps and triggers on its clock; a CDR chip
// recovers clock and data and the COB fans both out to every RCE. This block
// receives that data stream one bit at a time (bit_valid marks a bit) and
// decodes messages of MSG_BITS = 88 bits, most significant bit first:
//   0xA5 start byte | type byte | 64-bit value | check byte
// where the check byte is the XOR of the type byte and the eight value bytes.
// Between messages the receiver hunts for the start byte bit by bit.
//   type 0x01 (sync):    the timestamp counter is loaded with the value;
//   type 0x02 (trigger): the value (trigger time) is queued for the
//                        processor, which selects the buffered chunks that
//                        cover it.
// A message with a wrong check byte or an unknown type is counted in
// msg_errs and ignored; a trigger that finds the queue full in trig_lost.
// The timestamp ts_now counts sys_tick pulses (the 50 MHz system clock as a
// clock enable) and is what the RCE stamps on incoming data.
// That the RCE decodes timestamps and triggers from this stream is the
// document's; the message layout is this design's own, as the real timing
// protocol is specified elsewhere.
module trigger_listener
  import rce_pkg::*;
#(
  parameter int TRIG_DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            sys_tick,
  input  logic            bit_valid,
  input  logic            bit_in,
  output logic [TS_W-1:0] ts_now,
  output logic            trig_valid,
  output logic [TS_W-1:0] trig_ts,
  input  logic            trig_ready,
  output logic [31:0]     syncs,
  output logic [31:0]     trigs,
  output logic [31:0]     msg_errs,
  output logic [31:0]     trig_lost
);
  typedef enum logic {T_HUNT, T_BODY} tstate_t;

  tstate_t              st;
  logic [MSG_BITS-10:0] sr;     // the last 79 bits received
  logic [MSG_BITS-9:0]  sr_n;
  logic [6:0]           cnt;
  logic                 msg_end;
  logic [7:0]           m_type;
  logic [63:0]          m_val;
  logic [7:0]           m_chk;
  logic                 m_ok;
  logic                 push;
  logic                 q_full;
  logic                 q_empty;
  logic                 q_afull_unused;
  logic [$clog2(TRIG_DEPTH):0] q_cnt_unused;

  assign sr_n    = {sr, bit_in};  // 80 bits: a message after its start byte
  assign msg_end = bit_valid && (st == T_BODY) && (cnt == 7'(MSG_BITS - 9));
  assign m_type  = sr_n[79:72];
  assign m_val   = sr_n[71:8];
  assign m_chk   = sr_n[7:0];
  assign m_ok    = (m_chk == msg_check(m_type, m_val)) &&
                   (m_type == MSG_SYNC || m_type == MSG_TRIG);
  assign push    = msg_end && m_ok && (m_type == MSG_TRIG) && !q_full;

  sync_fifo #(.W(TS_W), .DEPTH(TRIG_DEPTH)) u_trigq (
    .clk         (clk),
    .rst         (rst),
    .wr_en       (push),
    .wr_data     (m_val),
    .rd_en       (trig_ready),
    .rd_data     (trig_ts),
    .empty       (q_empty),
    .full        (q_full),
    .almost_full (q_afull_unused),
    .count       (q_cnt_unused)
  );
  assign trig_valid = !q_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= T_HUNT;
      sr        <= '0;
      cnt       <= '0;
      ts_now    <= '0;
      syncs     <= '0;
      trigs     <= '0;
      msg_errs  <= '0;
      trig_lost <= '0;
    end else begin
      if (sys_tick) ts_now <= ts_now + 1'b1;
      if (bit_valid) begin
        sr <= sr_n[MSG_BITS-10:0];
        unique case (st)
          T_HUNT: if (sr_n[7:0] == MSG_START) begin
            st  <= T_BODY;
            cnt <= '0;
          end
          T_BODY: begin
            cnt <= cnt + 1'b1;
            if (msg_end) begin
              st <= T_HUNT;
              sr <= '0;   // a start byte must not be found inside this message
              if (!m_ok) msg_errs <= msg_errs + 1;
              else if (m_type == MSG_SYNC) begin
                ts_now <= m_val;
                syncs  <= syncs + 1;
              end else begin
                trigs <= trigs + 1;
                if (q_full) trig_lost <= trig_lost + 1;
              end
            end
          end
          default: st <= T_HUNT;
        endcase
      end
    end
  end

endmodule
