// tb_bat_ib_control: self-checking test of the Input Buffer Control.
//
// The testbench plays the FIFO (offering flits of whole packets on
// req_i/data_i) and the two consumers (Routing Control on the header
// handshake, the OIs on the data handshake), each answering after a random
// delay. Packets have payload sizes 0, 1, 2 and random values. It checks
// that every header and only headers use req_header_o, that all other flits
// use req_data_o in order with the right data, that last_flit_o toggles
// exactly with the request of each packet's last flit, that ack_o toggles
// one edge after an idle stage sees a flit, and that only one request is
// outstanding at a time.
module tb_bat_ib_control;
  localparam int unsigned FS = 16;

  logic clk = 0, rst_n = 0;
  logic req_i = 0, ack_header = 0, ack_data = 0;
  logic ack_o, req_header, req_data, last_flit;
  logic [FS-1:0] din = '0, dout;
  int checks = 0, failures = 0;

  typedef struct { logic [FS-1:0] d; bit hdr; bit last; } exp_t;
  exp_t exp_q[$];
  int nhdr = 0, ndata = 0, nlast = 0;

  bat_ib_control #(.FLIT_SIZE(FS)) dut (
    .clk(clk), .rst_n(rst_n), .req_i(req_i), .ack_o(ack_o), .data_i(din),
    .req_header_o(req_header), .ack_header_i(ack_header), .req_data_o(req_data),
    .ack_data_i(ack_data), .data_o(dout), .last_flit_o(last_flit));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Consumer of both handshakes.
  initial begin
    logic last_prev = 0;
    forever begin
      @(negedge clk);
      if (rst_n && (req_header != ack_header || req_data != ack_data)) begin
        exp_t e;
        check(!(req_header != ack_header && req_data != ack_data), "two requests outstanding");
        check(exp_q.size() > 0, "unexpected request");
        if (exp_q.size() > 0) begin
          e = exp_q.pop_front();
          check(dout == e.d, $sformatf("flit data %h expected %h", dout, e.d));
          check((req_header != ack_header) == e.hdr, "header/data steering");
          check((last_flit != last_prev) == e.last, $sformatf("last_flit_o on flit %h", e.d));
          last_prev = last_flit;
          if (e.last) nlast++;
        end
        repeat ($urandom_range(0, 3)) @(negedge clk);
        if (req_header != ack_header) begin ack_header = ~ack_header; nhdr++; end
        else begin ack_data = ~ack_data; ndata++; end
      end
    end
  end

  task automatic offer(logic [FS-1:0] d, bit hdr, bit last);
    exp_t e;
    e.d = d; e.hdr = hdr; e.last = last;
    exp_q.push_back(e);
    din   = d;
    req_i = ~req_i;
    while (ack_o != req_i) @(negedge clk);
    repeat ($urandom_range(0, 1)) @(negedge clk);
  endtask

  task automatic packet(int size);
    offer(FS'($urandom_range(0, 255)), 1, 0);
    offer(FS'(size), 0, size == 0);
    for (int n = 1; n <= size; n++) offer(FS'($urandom), 0, n == size);
  endtask

  int total_data;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Pipeline-stage latency: ack_o one edge after the request.
    exp_q.push_back('{d: 16'h0022, hdr: 1, last: 0});
    din = 16'h0022; req_i = 1;
    @(negedge clk);
    check(ack_o == 1'b1 && req_header == 1'b1, "ack_o and req_header_o one edge after req_i");
    while (req_header != ack_header) @(negedge clk);
    offer(16'd3, 0, 0);
    offer(16'h1111, 0, 0); offer(16'h2222, 0, 0); offer(16'h3333, 0, 1);
    total_data = 4;
    packet(0); total_data += 1;
    packet(1); total_data += 2;
    packet(2); total_data += 3;
    for (int p = 0; p < 30; p++) begin
      int s;
      s = $urandom_range(0, 12);
      packet(s);
      total_data += s + 1;
    end
    while (exp_q.size() != 0 || req_header != ack_header || req_data != ack_data) @(negedge clk);
    check(nhdr == 34, $sformatf("headers %0d", nhdr));
    check(ndata == total_data, $sformatf("data flits %0d expected %0d", ndata, total_data));
    check(nlast == 34, $sformatf("last flits %0d", nlast));
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
