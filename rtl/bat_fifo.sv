// bat_fifo: circular input buffer of the Input Interface, with 2-phase
// (transition-signaling) handshakes on both sides.
//
// Write side: a request is pending while req_wr_i differs from ack_wr_o. When
// a slot is free the flit on data_i is written at the write pointer and
// ack_wr_o toggles on the same edge; a full buffer leaves the request
// pending, which is how backpressure reaches the link.
// Read side: while the buffer holds a flit and no read is outstanding,
// req_rd_o toggles with the head flit on data_o (bundled data). The
// consumer answers by toggling ack_rd_i; on that edge the head is removed
// and, if another flit is stored, req_rd_o toggles again at once, so a
// full-speed reader sees one flit every two clock cycles.
//
// Timing: a write is acknowledged one edge after its request is seen; a
// flit written into an empty buffer is offered on the following edge.
// The circular organisation and the port names follow the published design, which
// takes the FIFO's insides from earlier work; pointers, occupancy counter
// and the clocked evaluation are this design's choice.
module bat_fifo #(
  parameter int unsigned FLIT_SIZE    = 16,
  parameter int unsigned BUFFER_DEPTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_wr_i,
  output logic                 ack_wr_o,
  input  logic [FLIT_SIZE-1:0] data_i,
  output logic                 req_rd_o,
  input  logic                 ack_rd_i,
  output logic [FLIT_SIZE-1:0] data_o
);

  localparam int unsigned PW = (BUFFER_DEPTH > 1) ? $clog2(BUFFER_DEPTH) : 1;
  localparam int unsigned CW = $clog2(BUFFER_DEPTH + 1);

  logic [FLIT_SIZE-1:0] mem [BUFFER_DEPTH];
  logic [PW-1:0]        wr_ptr, rd_ptr;
  logic [CW-1:0]        count;
  logic                 busy;      // a read request is outstanding

  logic do_wr, do_rd;
  logic [CW-1:0] count_after_rd;

  assign do_wr = (req_wr_i != ack_wr_o) && (count < CW'(BUFFER_DEPTH));
  assign do_rd = busy && (req_rd_o == ack_rd_i);
  assign count_after_rd = do_rd ? count - CW'(1) : count;

  function automatic logic [PW-1:0] ptr_inc(logic [PW-1:0] p);
    return (p == PW'(BUFFER_DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      busy     <= 1'b0;
      ack_wr_o <= 1'b0;
      req_rd_o <= 1'b0;
    end else begin
      if (do_wr) begin
        wr_ptr   <= ptr_inc(wr_ptr);
        ack_wr_o <= ~ack_wr_o;
      end
      if (do_rd) rd_ptr <= ptr_inc(rd_ptr);
      count <= count_after_rd + (do_wr ? CW'(1) : CW'(0));
      // Offer the next head flit: it must already be stored (not the one
      // being written on this edge).
      if ((!busy || do_rd) && count_after_rd != '0) begin
        req_rd_o <= ~req_rd_o;
        busy     <= 1'b1;
      end else if (do_rd) begin
        busy     <= 1'b0;
      end
    end
  end

  assign data_o = mem[rd_ptr];

  // A new read request is never issued while one is outstanding.
  property p_one_outstanding;
    @(posedge clk) disable iff (!rst_n) (busy && req_rd_o != ack_rd_i) |=> $stable(req_rd_o);
  endproperty
  assert property (p_one_outstanding);

endmodule
