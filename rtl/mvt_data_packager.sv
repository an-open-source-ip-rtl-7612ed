// mvt_data_packager: builds the AXI-Stream of the MVT-Quad core.
//
// Every system-clock cycle it receives one tdc_hit_t per channel. Channels
// whose bit in chan_mask is 0, and all channels while enable is 0, count as
// silent. A transmission (one AXI-Stream packet) starts in the first period
// in which any channel has a transition: its first word is the system-clock
// counter value (timestamp_i), and from then on one 32-bit payload word per
// period follows, channel c in bits [8c+7:8c] laid out as tdc_hit_t
// ({fall_valid, fall_pos[2:0], rise_valid, rise_pos[2:0]}). The first period
// without any transition ends the packet: the last payload word carries
// TLAST = 1. To know that a word is the last one, each payload word is held
// for one cycle before it is written to the output FIFO, so a packet of N
// payload words takes N+1 cycles to write, one word per cycle.
//
// Payload k of a packet whose timestamp word is T describes the period that
// the packager saw while the counter read T+k.
//
// Back-pressure (this design's choice; the published core does not describe
// it): words go through a small FIFO. A packet is only started if two
// entries are free, and a non-last payload word is only written if two
// entries are free, so one entry is always kept for the closing word. When
// space runs out the packet is closed early (the held word is written with
// TLAST) and the periods that follow are dropped until a period without
// transitions; a packet that cannot start at all is dropped likewise. Every
// emitted packet is therefore well framed and correctly timed, only shorter.
// drop_o pulses once per lost period.
module mvt_data_packager
  import mvt_pkg::*;
#(
  parameter int FIFO_DEPTH = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  input  logic [NUM_CH-1:0]     chan_mask,
  input  logic [TS_W-1:0]       timestamp_i,
  input  tdc_hit_t [NUM_CH-1:0] hits_i,
  output logic                  drop_o,
  output logic                  busy_o,      // a packet is in progress
  output logic [AXIS_W-1:0]     m_axis_tdata,
  output logic                  m_axis_tlast,
  output logic                  m_axis_tvalid,
  input  logic                  m_axis_tready
);

  typedef enum logic [1:0] {IDLE, PACKET, SKIP} state_e;

  state_e                   state_q;
  logic [AXIS_W-1:0]        hold_q;     // payload word waiting for its successor
  tdc_hit_t [NUM_CH-1:0]    masked;
  logic                     any_hit;
  logic [AXIS_W-1:0]        payload;
  logic [$clog2(FIFO_DEPTH):0] free;
  logic                     push, push_last;
  logic [AXIS_W-1:0]        push_data;
  state_e                   state_d;
  logic                     room;

  always_comb begin
    any_hit = 1'b0;
    for (int c = 0; c < NUM_CH; c++) begin
      masked[c] = (enable && chan_mask[c]) ? hits_i[c] : '0;
      any_hit   = any_hit || masked[c].rise_valid || masked[c].fall_valid;
    end
    payload = AXIS_W'(masked);
  end

  assign room = (free >= 2);

  always_comb begin
    state_d   = state_q;
    push      = 1'b0;
    push_last = 1'b0;
    push_data = hold_q;
    drop_o    = 1'b0;
    unique case (state_q)
      IDLE: if (any_hit) begin
        if (room) begin
          push      = 1'b1;
          push_data = AXIS_W'(timestamp_i);
          state_d   = PACKET;
        end else begin
          drop_o  = 1'b1;
          state_d = SKIP;
        end
      end
      PACKET: begin
        push = 1'b1;               // the held word always leaves now
        if (!any_hit) begin
          push_last = 1'b1;        // regular end of the packet
          state_d   = IDLE;
        end else if (!room) begin
          push_last = 1'b1;        // close early, lose this period
          drop_o    = 1'b1;
          state_d   = SKIP;
        end
      end
      SKIP: begin
        if (!any_hit) state_d = IDLE;
        else          drop_o  = 1'b1;
      end
      default: state_d = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= IDLE;
      hold_q  <= '0;
    end else begin
      state_q <= state_d;
      if (state_d == PACKET) hold_q <= payload;
    end
  end

  assign busy_o = (state_q == PACKET);

  mvt_axis_fifo #(.DEPTH(FIFO_DEPTH), .W(AXIS_W)) u_fifo (
    .clk          (clk),
    .rst_n        (rst_n),
    .push         (push),
    .push_data    (push_data),
    .push_last    (push_last),
    .free_o       (free),
    .m_axis_tdata (m_axis_tdata),
    .m_axis_tlast (m_axis_tlast),
    .m_axis_tvalid(m_axis_tvalid),
    .m_axis_tready(m_axis_tready)
  );

endmodule
