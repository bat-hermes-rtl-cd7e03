// bat_router: five-port wormhole NoC router with transition-signaling
// (2-phase) bundled-data links and distributed control.
//
// Each port has an Input Interface (II), which buffers flits and routes each
// packet by XY routing, and an Output Interface (OI), which arbitrates among
// the IIs that want its link. There is no central controller: the II of
// every port is wired directly to the OIs of the four other ports, with a
// header request/acknowledge pair per OI, and a data request, a last-flit
// line and a flit bus that all four OIs share. A packet is a header flit
// whose low FLIT_SIZE/2 bits are the target address (X above Y), a flit
// holding the payload size N, and N payload flits; it holds its path
// (wormhole) until its last flit has left.
//
// Every link is 2-phase: the sender toggles req_* with the flit stable on
// data_*, the receiver toggles ack_* once it has taken the flit. Ports are
// numbered EAST=0, WEST=1, NORTH=2, SOUTH=3, LOCAL=4; ADDRESS holds the
// router's X (upper nibble) and Y (lower nibble) for 16-bit flits.
//
// PORTS_PRESENT (bit per port, default all five) removes the II and OI of
// ports that do not exist, as at the edges and corners of a mesh (an
// optimisation the original design points out): their
// link outputs are held at 0, their request lines toward other OIs never
// move, and their inputs are ignored. XY routing in a mesh never selects a
// missing port.
//
// Concurrent assertions check the 2-phase rules on every present port: one
// outstanding output request, output data stable while it is outstanding,
// and input acknowledges only for pending requests.
//
// Timing of this rendition: all handshakes are sampled on clk. With no
// contention a header crosses the router (rx_req toggle to tx_req toggle) in
// seven edges, and a stream of flits moves at one flit per three edges per
// connection (capture in the II register, forward on the link, acknowledge
// back to the II) as long as the environment answers within one edge.
// The architecture, packet format and handshake signalling follow the
// published design. Its circuit is clockless (latches, XOR phase
// matchers, MUTEX arbiters, delay lines); evaluating the same control on a
// clock, the port numbering and the address layout are this design's choice.
module bat_router
  import bat_pkg::*;
#(
  parameter int unsigned            FLIT_SIZE    = 16,
  parameter int unsigned            BUFFER_DEPTH = 8,
  parameter logic [FLIT_SIZE/2-1:0] ADDRESS      = 'h11,
  parameter logic [NPORTS-1:0]      PORTS_PRESENT = '1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NPORTS-1:0]    rx_req,
  output logic [NPORTS-1:0]    rx_ack,
  input  logic [FLIT_SIZE-1:0] rx_data [NPORTS],
  output logic [NPORTS-1:0]    tx_req,
  input  logic [NPORTS-1:0]    tx_ack,
  output logic [FLIT_SIZE-1:0] tx_data [NPORTS]
);

  // Seen from the II of port i.
  logic [NOTHER-1:0]    ii_req_outport [NPORTS];
  logic [NOTHER-1:0]    ii_ack_outport [NPORTS];
  logic [NOTHER-1:0]    ii_ack_data    [NPORTS];
  logic                 ii_req_data    [NPORTS];
  logic                 ii_last_flit   [NPORTS];
  logic [FLIT_SIZE-1:0] ii_data        [NPORTS];

  // Seen from the OI of port p.
  logic [NOTHER-1:0]    oi_req_outport [NPORTS];
  logic [NOTHER-1:0]    oi_ack_outport [NPORTS];
  logic [NOTHER-1:0]    oi_req_data    [NPORTS];
  logic [NOTHER-1:0]    oi_ack_data    [NPORTS];
  logic [NOTHER-1:0]    oi_last_flit   [NPORTS];
  logic [FLIT_SIZE-1:0] oi_data        [NPORTS][NOTHER];

  for (genvar i = 0; i < NPORTS; i++) begin : g_port
    if (PORTS_PRESENT[i]) begin : g_ii
      bat_input_interface #(
        .FLIT_SIZE    (FLIT_SIZE),
        .BUFFER_DEPTH (BUFFER_DEPTH),
        .MY_PORT      (i),
        .ADDRESS      (ADDRESS)
      ) u_ii (
        .clk           (clk),
        .rst_n         (rst_n),
        .req_i         (rx_req[i]),
        .ack_o         (rx_ack[i]),
        .data_i        (rx_data[i]),
        .req_outport_o (ii_req_outport[i]),
        .ack_outport_i (ii_ack_outport[i]),
        .req_data_o    (ii_req_data[i]),
        .ack_data_i    (ii_ack_data[i]),
        .data_o        (ii_data[i]),
        .last_flit_o   (ii_last_flit[i])
      );
    end else begin : g_no_ii
      assign rx_ack[i]         = 1'b0;
      assign ii_req_outport[i] = '0;
      assign ii_req_data[i]    = 1'b0;
      assign ii_data[i]        = '0;
      assign ii_last_flit[i]   = 1'b0;
    end

    if (PORTS_PRESENT[i]) begin : g_oi
      bat_output_interface #(.FLIT_SIZE(FLIT_SIZE)) u_oi (
        .clk           (clk),
        .rst_n         (rst_n),
        .req_outport_i (oi_req_outport[i]),
        .ack_outport_o (oi_ack_outport[i]),
        .req_data_i    (oi_req_data[i]),
        .ack_data_o    (oi_ack_data[i]),
        .last_flit_i   (oi_last_flit[i]),
        .data_i        (oi_data[i]),
        .req_o         (tx_req[i]),
        .ack_i         (tx_ack[i]),
        .data_o        (tx_data[i])
      );
    end else begin : g_no_oi
      assign tx_req[i]         = 1'b0;
      assign tx_data[i]        = '0;
      assign oi_ack_outport[i] = '0;
      assign oi_ack_data[i]    = '0;
    end

    // Rules of the 2-phase links of this port.
    if (PORTS_PRESENT[i]) begin : g_rules
      // A new output request only once the previous one was acknowledged.
      a_tx_one : assert property (@(posedge clk) disable iff (!rst_n)
        $changed(tx_req[i]) |-> $past(tx_req[i] == tx_ack[i]));
      // Bundled data: the flit stays put while its request is outstanding.
      a_tx_data : assert property (@(posedge clk) disable iff (!rst_n)
        (tx_req[i] != tx_ack[i]) && $past(tx_req[i] != tx_ack[i]) |-> $stable(tx_data[i]));
      // An input acknowledge answers a pending request only.
      a_rx_ack : assert property (@(posedge clk) disable iff (!rst_n)
        $changed(rx_ack[i]) |-> $past(rx_req[i] != rx_ack[i]));
    end

    // Point-to-point wiring between II i and the OIs of the other ports.
    for (genvar j = 0; j < NOTHER; j++) begin : g_link
      localparam int unsigned P = outport_port(i, j);   // OI reached
      localparam int unsigned K = outport_index(P, i);  // its input index
      assign oi_req_outport[P][K] = ii_req_outport[i][j];
      assign ii_ack_outport[i][j] = oi_ack_outport[P][K];
      assign oi_req_data[P][K]    = ii_req_data[i];
      assign ii_ack_data[i][j]    = oi_ack_data[P][K];
      assign oi_last_flit[P][K]   = ii_last_flit[i];
      assign oi_data[P][K]        = ii_data[i];
    end
  end

endmodule
