// tb_bat_routing_control: self-checking test of Routing Control.
//
// For the Input Interface of the LOCAL port (router X=1, Y=1) the testbench
// toggles req_route_i with a random target address, checks that exactly the
// request line of the expected OI toggles one edge later and nothing else
// moves, answers on that OI's acknowledge after a random delay and checks
// that ack_route_o follows. Repeated headers to the same OI exercise the
// phase matching (its line toggles back).
module tb_bat_routing_control;
  import bat_pkg::*;
  localparam int unsigned FS = 16;
  localparam int unsigned ME = 4;
  localparam logic [7:0] ADDR = 8'h11;

  logic clk = 0, rst_n = 0;
  logic req_route = 0, ack_route;
  logic [7:0] addr = '0;
  logic [NOTHER-1:0] req_out, ack_out = '0;
  int checks = 0, failures = 0;
  int hits [NOTHER] = '{default: 0};

  bat_routing_control #(.FLIT_SIZE(FS), .MY_PORT(ME), .ADDRESS(ADDR)) dut (
    .clk(clk), .rst_n(rst_n), .req_route_i(req_route), .ack_route_o(ack_route),
    .target_address_i(addr), .req_outport_o(req_out), .ack_outport_i(ack_out));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int xy(logic [7:0] t);
    if (t[7:4] > ADDR[7:4]) return 0;
    if (t[7:4] < ADDR[7:4]) return 1;
    if (t[3:0] > ADDR[3:0]) return 2;
    if (t[3:0] < ADDR[3:0]) return 3;
    return 4;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      logic [NOTHER-1:0] prev_req;
      int d;
      do addr = 8'($urandom_range(0, 255)); while (xy(addr) == ME);
      d = xy(addr);
      prev_req = req_out;
      req_route = ~req_route;
      check(ack_route != req_route, "ack_route_o waits for the OI");
      @(negedge clk);
      check((req_out ^ prev_req) == NOTHER'(1) << d, $sformatf("header to port %0d toggled %b", d, req_out ^ prev_req));
      hits[d]++;
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        check((req_out ^ prev_req) == NOTHER'(1) << d, "request line stays stable");
      end
      check(ack_route != req_route, "no acknowledge prev_req the OI answers");
      ack_out[d] = ~ack_out[d];
      #1;
      check(ack_route == req_route, "ack_route_o follows the OI acknowledge");
      @(negedge clk);
    end
    for (int d = 0; d < NOTHER; d++) check(hits[d] > 0, $sformatf("port %0d never chosen", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
