// bat_output_control: Output Control (one per Input Interface) of an Output
// Interface.
//
// It carries one packet at a time from its Input Interface to the output
// link, in five steps:
//   IDLE   a header is pending (req_outport_i differs from ack_outport_o):
//          raise arbiter_request_o (the set/reset latch LT4) and record the
//          current phases of the shared req_data_i (FF1/LT2, the programmable
//          phase matcher) and of last_flit_i (FF3, the last-flit detector).
//   GRANT  once arbiter_grant_i is high, toggle req_o to send the header.
//   HEADER when the link acknowledges (ack_i moves away from the phase
//          recorded when req_o toggled), toggle ack_outport_o.
//   WAIT   a data flit is pending when req_data_i differs from the recorded
//          phase; toggle req_o to send it.
//   DATA   on the link's acknowledge toggle ack_data_o and advance the
//          recorded phase. If last_flit_i now differs from its recorded
//          value this was the last flit: drop arbiter_request_o and go idle;
//          otherwise wait for the next flit.
// req_data_i is shared by all OIs, so its phase at packet start is arbitrary;
// recording it is what keeps an old transition from being taken as a new
// flit. ack_i is shared by the four Output Controls of the OI, so each one
// records its phase when it sends. req_o is XOR merged with the other
// Output Controls' req_o in the OI. Flit acknowledges go back to the II only
// after the link accepted the flit, so the II's register holds the data
// until then (bundled data).
// The three mechanisms and their roles are the published design's; the state
// sequence and the clocked evaluation are this design's choice.
module bat_output_control (
  input  logic clk,
  input  logic rst_n,
  input  logic req_outport_i,
  output logic ack_outport_o,
  input  logic req_data_i,
  output logic ack_data_o,
  input  logic last_flit_i,
  output logic arbiter_request_o,
  input  logic arbiter_grant_i,
  output logic req_o,
  input  logic ack_i
);

  typedef enum logic [2:0] {
    S_IDLE   = 3'd0,
    S_GRANT  = 3'd1,
    S_HEADER = 3'd2,
    S_WAIT   = 3'd3,
    S_DATA   = 3'd4
  } state_e;

  state_e state_q;
  logic   rd_phase_q;    // FF1/LT2: expected idle phase of req_data_i
  logic   last_ref_q;    // FF3: last_flit_i at packet start
  logic   ack_ref_q;     // phase of ack_i when req_o last toggled

  logic link_acked;
  assign link_acked = (ack_i != ack_ref_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q           <= S_IDLE;
      rd_phase_q        <= 1'b0;
      last_ref_q        <= 1'b0;
      ack_ref_q         <= 1'b0;
      ack_outport_o     <= 1'b0;
      ack_data_o        <= 1'b0;
      arbiter_request_o <= 1'b0;
      req_o             <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (req_outport_i != ack_outport_o) begin
          arbiter_request_o <= 1'b1;
          rd_phase_q        <= req_data_i;
          last_ref_q        <= last_flit_i;
          state_q           <= S_GRANT;
        end
        S_GRANT: if (arbiter_grant_i) begin
          req_o     <= ~req_o;
          ack_ref_q <= ack_i;
          state_q   <= S_HEADER;
        end
        S_HEADER: if (link_acked) begin
          ack_outport_o <= ~ack_outport_o;
          state_q       <= S_WAIT;
        end
        S_WAIT: if (req_data_i != rd_phase_q) begin
          req_o     <= ~req_o;
          ack_ref_q <= ack_i;
          state_q   <= S_DATA;
        end
        S_DATA: if (link_acked) begin
          ack_data_o <= ~ack_data_o;
          rd_phase_q <= ~rd_phase_q;
          if (last_flit_i != last_ref_q) begin
            arbiter_request_o <= 1'b0;
            state_q           <= S_IDLE;
          end else begin
            state_q <= S_WAIT;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The output link is only driven while the arbiter grants it.
  property p_req_needs_grant;
    @(posedge clk) disable iff (!rst_n) $changed(req_o) |-> $past(arbiter_grant_i);
  endproperty
  assert property (p_req_needs_grant);

endmodule
