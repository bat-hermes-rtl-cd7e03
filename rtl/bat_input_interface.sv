// bat_input_interface: Input Interface (II) of one router port.
//
// Flits arrive on a 2-phase link (req_i / ack_o / data_i) and are stored in
// the circular FIFO. The Input Buffer Control takes them one at a time into
// its register and tells header flits from the rest by counting: the header
// goes to Routing Control, which toggles the request line of the one Output
// Interface selected by XY routing (req_outport_o, one per other port); the
// payload-size flit and the payload follow on the single req_data_o line that
// all four OIs see, together with last_flit_o, which toggles with the request
// of the packet's last flit. Only the OI that owns the packet answers a data
// flit, so the four ack_data_i lines are XOR merged into one acknowledge.
// data_o carries the flit in the control's register for the header and the
// data alike.
// Timing: a header entering an idle II reaches req_outport_o four edges
// after req_i toggles (FIFO write, FIFO offer, control capture, routing).
// The composition follows the published diagram of the II; the clocked
// evaluation is this design's choice.
module bat_input_interface
  import bat_pkg::*;
#(
  parameter int unsigned            FLIT_SIZE    = 16,
  parameter int unsigned            BUFFER_DEPTH = 8,
  parameter int unsigned            MY_PORT      = 0,
  parameter logic [FLIT_SIZE/2-1:0] ADDRESS      = 'h11
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_i,
  output logic                 ack_o,
  input  logic [FLIT_SIZE-1:0] data_i,
  output logic [NOTHER-1:0]    req_outport_o,
  input  logic [NOTHER-1:0]    ack_outport_i,
  output logic                 req_data_o,
  input  logic [NOTHER-1:0]    ack_data_i,
  output logic [FLIT_SIZE-1:0] data_o,
  output logic                 last_flit_o
);

  logic                 fifo_req, fifo_ack;
  logic [FLIT_SIZE-1:0] fifo_data;
  logic                 req_header, ack_header;

  bat_fifo #(
    .FLIT_SIZE    (FLIT_SIZE),
    .BUFFER_DEPTH (BUFFER_DEPTH)
  ) u_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .req_wr_i (req_i),
    .ack_wr_o (ack_o),
    .data_i   (data_i),
    .req_rd_o (fifo_req),
    .ack_rd_i (fifo_ack),
    .data_o   (fifo_data)
  );

  bat_ib_control #(.FLIT_SIZE(FLIT_SIZE)) u_control (
    .clk          (clk),
    .rst_n        (rst_n),
    .req_i        (fifo_req),
    .ack_o        (fifo_ack),
    .data_i       (fifo_data),
    .req_header_o (req_header),
    .ack_header_i (ack_header),
    .req_data_o   (req_data_o),
    .ack_data_i   (^ack_data_i),
    .data_o       (data_o),
    .last_flit_o  (last_flit_o)
  );

  bat_routing_control #(
    .FLIT_SIZE (FLIT_SIZE),
    .MY_PORT   (MY_PORT),
    .ADDRESS   (ADDRESS)
  ) u_routing (
    .clk              (clk),
    .rst_n            (rst_n),
    .req_route_i      (req_header),
    .ack_route_o      (ack_header),
    .target_address_i (data_o[FLIT_SIZE/2-1:0]),
    .req_outport_o    (req_outport_o),
    .ack_outport_i    (ack_outport_i)
  );

endmodule
