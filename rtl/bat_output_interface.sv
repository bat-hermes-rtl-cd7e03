// bat_output_interface: Output Interface (OI) of one router port.
//
// Four Output Controls, one per Input Interface that can reach this port,
// compete for the output link through the arbiter. The granted one drives
// the link: the four req_o transitions are XOR merged into the single link
// request req_o (only the granted one ever moves), data_o is the flit of the
// granted Input Interface chosen by a one-hot multiplexer, and the link
// acknowledge ack_i is sent to all four Output Controls. Input index k of
// this OI belongs to the Input Interface wired to it by the router.
// Timing: header request to link request takes three edges when the output
// is free (request, grant, send); each data flit one edge after its request.
// The structure follows the published diagram of the OI; the clocked
// evaluation is this design's choice.
module bat_output_interface
  import bat_pkg::*;
#(
  parameter int unsigned FLIT_SIZE = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NOTHER-1:0]    req_outport_i,
  output logic [NOTHER-1:0]    ack_outport_o,
  input  logic [NOTHER-1:0]    req_data_i,
  output logic [NOTHER-1:0]    ack_data_o,
  input  logic [NOTHER-1:0]    last_flit_i,
  input  logic [FLIT_SIZE-1:0] data_i [NOTHER],
  output logic                 req_o,
  input  logic                 ack_i,
  output logic [FLIT_SIZE-1:0] data_o
);

  logic [NOTHER-1:0] arb_req, arb_grant, ctrl_req;

  for (genvar k = 0; k < NOTHER; k++) begin : g_ctrl
    bat_output_control u_ctrl (
      .clk               (clk),
      .rst_n             (rst_n),
      .req_outport_i     (req_outport_i[k]),
      .ack_outport_o     (ack_outport_o[k]),
      .req_data_i        (req_data_i[k]),
      .ack_data_o        (ack_data_o[k]),
      .last_flit_i       (last_flit_i[k]),
      .arbiter_request_o (arb_req[k]),
      .arbiter_grant_i   (arb_grant[k]),
      .req_o             (ctrl_req[k]),
      .ack_i             (ack_i)
    );
  end

  bat_arbiter #(.N(NOTHER)) u_arbiter (
    .clk     (clk),
    .rst_n   (rst_n),
    .req_i   (arb_req),
    .grant_o (arb_grant)
  );

  always_comb begin
    data_o = '0;
    for (int unsigned k = 0; k < NOTHER; k++) begin
      if (arb_grant[k]) data_o = data_i[k];
    end
  end

  assign req_o = ^ctrl_req;

endmodule
