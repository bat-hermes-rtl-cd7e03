// bat_ib_control: Input Buffer Control of an Input Interface.
//
// It sits between the FIFO and the Output Interfaces and does three jobs.
//  * Pipeline stage (LT1/REG1 in the published circuit): when the FIFO offers a flit
//    (req_i differs from ack_o) and the stage is free, the flit is copied into
//    REG1 and ack_o toggles at once, freeing a FIFO slot while the flit waits
//    here for its output.
//  * Flit counter (FF1, FF2, REG2, FF3): packets are a header flit, a
//    payload-size flit and then that many payload flits. The flit after a
//    header loads REG2 with the size; each payload flit decrements it, and the
//    flit seen while REG2 holds 1 is the last one (a size of 0 makes the size
//    flit itself the last). last_flit_o toggles on the same edge as the
//    request of that last flit.
//  * Request steering (LT2, LT3, FF4): FF4 (`first_q`) is 0 while a header
//    is expected. A header is offered with a transition on req_header_o
//    (toward Routing Control, answered on ack_header_i once an OI granted and
//    forwarded it); every other flit with a transition on req_data_o (shared
//    by all OIs, answered on ack_data_i). FF4 then follows the printed rule:
//    header -> 1; 1 and last -> 0; otherwise unchanged.
// The stage is freed on the edge that sees the acknowledge, and a waiting
// flit is captured on that same edge, so back-to-back flits cost two edges.
// All handshakes are 2-phase: one transition per request or acknowledge.
// The algorithm is the published design's; evaluating it on a clock with edge
// registers in place of latches and delay lines is this design's choice.
module bat_ib_control #(
  parameter int unsigned FLIT_SIZE = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_i,
  output logic                 ack_o,
  input  logic [FLIT_SIZE-1:0] data_i,
  output logic                 req_header_o,
  input  logic                 ack_header_i,
  output logic                 req_data_o,
  input  logic                 ack_data_i,
  output logic [FLIT_SIZE-1:0] data_o,
  output logic                 last_flit_o
);

  logic                 busy_q;       // REG1 holds a flit awaiting its acknowledge
  logic                 cur_hdr_q;    // that flit is a header
  logic                 cur_last_q;   // that flit is the last one of its packet
  logic                 first_q;      // FF4: 0 = next flit is a header
  logic                 size_next_q;  // FF2: next data flit carries the payload size
  logic [FLIT_SIZE-1:0] cnt_q;        // REG2: flits left in the packet
  logic [FLIT_SIZE-1:0] reg1_q;       // REG1

  logic done, free, take;
  logic first_n, size_next_n, is_last;

  assign done = busy_q && (cur_hdr_q ? (req_header_o == ack_header_i)
                                     : (req_data_o   == ack_data_i));
  assign free = !busy_q || done;
  assign take = free && (req_i != ack_o);

  // State as it stands once the current flit, if any, is acknowledged.
  always_comb begin
    first_n     = first_q;
    size_next_n = size_next_q;
    if (done) begin
      if (cur_hdr_q) begin
        first_n     = 1'b1;
        size_next_n = 1'b1;
      end else begin
        size_next_n = 1'b0;
        if (cur_last_q) first_n = 1'b0;
      end
    end
  end

  assign is_last = size_next_n ? (data_i == '0) : (cnt_q == FLIT_SIZE'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q       <= 1'b0;
      cur_hdr_q    <= 1'b0;
      cur_last_q   <= 1'b0;
      first_q      <= 1'b0;
      size_next_q  <= 1'b0;
      cnt_q        <= '0;
      reg1_q       <= '0;
      ack_o        <= 1'b0;
      req_header_o <= 1'b0;
      req_data_o   <= 1'b0;
      last_flit_o  <= 1'b0;
    end else begin
      first_q     <= first_n;
      size_next_q <= size_next_n;
      if (done) busy_q <= 1'b0;
      if (take) begin
        busy_q <= 1'b1;
        reg1_q <= data_i;
        ack_o  <= ~ack_o;
        if (!first_n) begin
          cur_hdr_q    <= 1'b1;
          cur_last_q   <= 1'b0;
          req_header_o <= ~req_header_o;
        end else begin
          cur_hdr_q  <= 1'b0;
          cur_last_q <= is_last;
          cnt_q      <= size_next_n ? data_i : cnt_q - FLIT_SIZE'(1);
          req_data_o <= ~req_data_o;
          if (is_last) last_flit_o <= ~last_flit_o;
        end
      end
    end
  end

  assign data_o = reg1_q;

  // At most one of the two output requests is outstanding at any time.
  property p_one_request;
    @(posedge clk) disable iff (!rst_n)
      !((req_header_o != ack_header_i) && (req_data_o != ack_data_i));
  endproperty
  assert property (p_one_request);

endmodule
