// tb_bat_output_control: self-checking test of one Output Control.
//
// The testbench plays an Input Interface (header request, shared data
// request, last-flit line), the arbiter (granting after a random delay) and
// the output link (acknowledging after a random delay). Before some packets
// it toggles req_data_i on its own, as happens when the II's previous packet
// went to another OI, so the phase matcher must absorb the mismatch. It
// checks: the arbiter request rises for a header and falls only after the
// last flit; req_o moves only under grant, once per flit; the header and
// every data flit are acknowledged to the II only after the link
// acknowledged them; the number of link transfers equals the flits sent.
module tb_bat_output_control;
  logic clk = 0, rst_n = 0;
  logic req_outport = 0, req_data = 0, last_flit = 0, grant = 0, ack_link = 0;
  logic ack_outport, ack_data, arb_req, req_link;
  int checks = 0, failures = 0;
  int link_xfers = 0, flits_sent = 0, mismatched = 0;

  bat_output_control dut (
    .clk(clk), .rst_n(rst_n), .req_outport_i(req_outport), .ack_outport_o(ack_outport),
    .req_data_i(req_data), .ack_data_o(ack_data), .last_flit_i(last_flit),
    .arbiter_request_o(arb_req), .arbiter_grant_i(grant), .req_o(req_link), .ack_i(ack_link));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Link: acknowledges each transition of req_o after a random delay.
  initial begin
    forever begin
      @(negedge clk);
      if (rst_n && req_link != ack_link) begin
        check(grant, "link request without grant");
        repeat ($urandom_range(0, 3)) @(negedge clk);
        link_xfers++;
        ack_link = ~ack_link;
      end
    end
  end

  // Arbiter: grants a raised request after a delay, withdraws when dropped.
  initial begin
    forever begin
      @(negedge clk);
      if (!arb_req) grant = 0;
      else if (!grant) begin
        repeat ($urandom_range(0, 4)) @(negedge clk);
        grant = arb_req;
      end
    end
  end

  task automatic packet(int nflits);   // nflits data flits after the header
    flits_sent++;
    req_outport = ~req_outport;
    @(negedge clk);
    check(arb_req, "arbiter request after a header");
    while (ack_outport != req_outport) begin
      @(negedge clk);
      check(arb_req, "arbiter request held during the header");
    end
    check(link_xfers == flits_sent, "header acknowledged after the link took it");
    for (int n = 1; n <= nflits; n++) begin
      repeat ($urandom_range(0, 2)) @(negedge clk);
      flits_sent++;
      req_data = ~req_data;
      if (n == nflits) last_flit = ~last_flit;
      while (ack_data != (req_data ^ mismatch_phase)) @(negedge clk);
      check(link_xfers == flits_sent, "data acknowledged after the link took it");
      if (n < nflits) check(arb_req, "arbiter request held inside the packet");
    end
    @(negedge clk);
    check(!arb_req, "arbiter released after the last flit");
  endtask

  logic mismatch_phase = 0;   // req_data_i phase relative to ack_data_o

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    packet(2);
    packet(1);
    for (int p = 0; p < 40; p++) begin
      if ($urandom_range(0, 1) == 1) begin
        // The II sent a flit to some other OI meanwhile.
        req_data = ~req_data;
        mismatch_phase = ~mismatch_phase;
        mismatched++;
        repeat (2) @(negedge clk);
        check(req_link == ack_link && link_xfers == flits_sent, "foreign data request ignored while idle");
      end
      packet($urandom_range(1, 8));
    end
    check(mismatched > 0, "phase mismatch never exercised");
    check(link_xfers == flits_sent, $sformatf("link transfers %0d flits %0d", link_xfers, flits_sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
