// bat_routing_unit: combinational XY routing decision of one Input Interface.
//
// The target address in the header is split into X (upper half) and Y (lower
// half) and compared with the router's own ADDRESS: X is corrected first
// (EAST when the target X is larger, WEST when smaller), then Y (NORTH when
// larger, SOUTH when smaller); a target equal to ADDRESS goes to LOCAL. The
// chosen port is turned into a one-hot request over the four ports other than
// MY_PORT, the port this Input Interface belongs to, and is only driven while
// en_i is high. A route back to MY_PORT cannot occur under XY routing in a
// mesh; it produces no request (Routing Control asserts that this never
// happens).
// XY routing by comparison with the router address is the published design's; the
// address layout and port numbering are this design's choice.
module bat_routing_unit
  import bat_pkg::*;
#(
  parameter int unsigned         FLIT_SIZE = 16,
  parameter int unsigned         MY_PORT   = 0,
  parameter logic [FLIT_SIZE/2-1:0] ADDRESS = 'h11
) (
  input  logic                   en_i,
  input  logic [FLIT_SIZE/2-1:0] target_address_i,
  output logic [NOTHER-1:0]      req_outport_o
);

  localparam int unsigned HW = FLIT_SIZE / 4;

  logic [HW-1:0] tx, ty, lx, ly;
  port_e         dest;

  assign tx = target_address_i[2*HW-1:HW];
  assign ty = target_address_i[HW-1:0];
  assign lx = ADDRESS[2*HW-1:HW];
  assign ly = ADDRESS[HW-1:0];

  always_comb begin
    if      (tx > lx) dest = EAST;
    else if (tx < lx) dest = WEST;
    else if (ty > ly) dest = NORTH;
    else if (ty < ly) dest = SOUTH;
    else              dest = LOCAL;
  end

  always_comb begin
    req_outport_o = '0;
    for (int unsigned j = 0; j < NOTHER; j++) begin
      if (en_i && int'(dest) == outport_port(MY_PORT, j)) req_outport_o[j] = 1'b1;
    end
  end

endmodule
