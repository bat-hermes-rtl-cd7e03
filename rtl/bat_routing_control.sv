// bat_routing_control: Routing Control of an Input Interface.
//
// A header is pending while req_route_i differs from the XOR of the four
// req_outport_o lines (the phase matcher of the published diagram). While it
// is pending the Routing Unit is enabled, and on the next edge the request
// line of the chosen Output Interface toggles (the latches LT1..LT4); that
// line then holds its phase until the next header. The four ack_outport_i
// lines, of which only one moves per header, are XOR merged into
// ack_route_o, which therefore toggles when the chosen OI has granted and
// forwarded the header. The target address and the header flit stay stable
// in the Input Buffer Control's register for the whole exchange.
// Structure (routing unit, per-OI request latches, XOR phase matching) is
// the published design's; the clocked evaluation is this design's choice.
module bat_routing_control
  import bat_pkg::*;
#(
  parameter int unsigned            FLIT_SIZE = 16,
  parameter int unsigned            MY_PORT   = 0,
  parameter logic [FLIT_SIZE/2-1:0] ADDRESS   = 'h11
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   req_route_i,
  output logic                   ack_route_o,
  input  logic [FLIT_SIZE/2-1:0] target_address_i,
  output logic [NOTHER-1:0]      req_outport_o,
  input  logic [NOTHER-1:0]      ack_outport_i
);

  logic              en;
  logic [NOTHER-1:0] route;

  assign en = req_route_i ^ (^req_outport_o);

  bat_routing_unit #(
    .FLIT_SIZE (FLIT_SIZE),
    .MY_PORT   (MY_PORT),
    .ADDRESS   (ADDRESS)
  ) u_routing_unit (
    .en_i             (en),
    .target_address_i (target_address_i),
    .req_outport_o    (route)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) req_outport_o <= '0;
    else        req_outport_o <= req_outport_o ^ route;
  end

  assign ack_route_o = ^ack_outport_i;

  // Every pending header selects exactly one OI (no route back to MY_PORT).
  property p_routed;
    @(posedge clk) disable iff (!rst_n) en |-> $onehot(route);
  endproperty
  assert property (p_routed);

endmodule
