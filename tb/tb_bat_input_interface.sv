// tb_bat_input_interface: self-checking test of an Input Interface.
//
// The Input Interface of the LOCAL port of router (1,1) receives packets
// for all four other ports on its 2-phase link. The testbench models the
// four OIs: it checks that each header raises the request line of the OI
// chosen by XY routing and no other, that every following flit appears on
// the shared data request in order with intact data, that last_flit_o
// toggles exactly with each packet's last flit, and that the data
// acknowledge of whichever OI owns the packet completes the handshake.
// The OI models sometimes stall for a long time; the testbench then checks
// that the link is held back after BUFFER_DEPTH + 1 flits (FIFO plus the
// control's register) and resumes without loss. It also measures the
// header latency from the link request to the OI request (4 edges).
module tb_bat_input_interface;
  import bat_pkg::*;
  localparam int unsigned FS = 16;
  localparam int unsigned BD = 8;
  localparam int unsigned ME = 4;
  localparam int NPKT = 40;

  logic clk = 0, rst_n = 0;
  logic req_in = 0, ack_in;
  logic [FS-1:0] data_in = '0, data_out;
  logic [NOTHER-1:0] req_outport, ack_outport = '0, ack_data = '0;
  logic req_data, last_flit;
  int checks = 0, failures = 0;
  int stalls = 0, held = 0;
  int route_hits [NOTHER] = '{default: 0};
  bit stall_now = 0;

  typedef struct { logic [FS-1:0] d; int dest; bit hdr; bit last; } flit_t;
  flit_t exp_q[$];

  bat_input_interface #(.FLIT_SIZE(FS), .BUFFER_DEPTH(BD), .MY_PORT(ME), .ADDRESS(8'h11)) dut (
    .clk(clk), .rst_n(rst_n), .req_i(req_in), .ack_o(ack_in), .data_i(data_in),
    .req_outport_o(req_outport), .ack_outport_i(ack_outport), .req_data_o(req_data),
    .ack_data_i(ack_data), .data_o(data_out), .last_flit_o(last_flit));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] addr_of(int port);
    case (port)
      0: return 8'h21;   // EAST
      1: return 8'h01;   // WEST
      2: return 8'h12;   // NORTH
      default: return 8'h10;   // SOUTH
    endcase
  endfunction

  // OI models.
  initial begin
    logic [NOTHER-1:0] seen_req;
    logic seen_data, seen_last;
    int owner;
    seen_req = '0; seen_data = 0; seen_last = 0; owner = 0;
    forever begin
      @(negedge clk);
      if (!rst_n || stall_now) continue;
      if (req_outport != seen_req || req_data != seen_data) begin
        flit_t e;
        check(exp_q.size() > 0, "request without a flit");
        e = exp_q.pop_front();
        check(data_out == e.d, $sformatf("flit %h expected %h", data_out, e.d));
        if (e.hdr) begin
          check((req_outport ^ seen_req) == NOTHER'(1) << e.dest && req_data == seen_data,
                $sformatf("header for port %0d raised %b", e.dest, req_outport ^ seen_req));
          route_hits[e.dest]++;
          owner = e.dest;
          seen_req = req_outport;
          repeat ($urandom_range(0, 3)) @(negedge clk);
          ack_outport[owner] = ~ack_outport[owner];
        end else begin
          check(req_outport == seen_req, "header line moved during data");
          check((last_flit != seen_last) == e.last, "last_flit_o with the last flit");
          seen_last = last_flit;
          seen_data = req_data;
          repeat ($urandom_range(0, 2)) @(negedge clk);
          ack_data[owner] = ~ack_data[owner];
        end
      end
    end
  end

  task automatic send(flit_t f);
    bit full;
    full = stall_now && exp_q.size() == BD + 1;
    exp_q.push_back(f);
    data_in = f.d;
    req_in  = ~req_in;
    if (full) begin
      // Buffer and control register are full: this flit must wait.
      repeat (20) @(negedge clk);
      check(ack_in != req_in, "link held back while the buffer is full");
      held++;
      stall_now = 0;
    end
    while (ack_in != req_in) @(negedge clk);
  endtask

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Header latency on an idle interface.
    t0 = 0;
    send('{d: 16'h0021, dest: 0, hdr: 1, last: 0});
    while (req_outport == '0) begin @(negedge clk); t0++; end
    check(t0 + 1 == 4, $sformatf("header latency %0d edges", t0 + 1));
    send('{d: 16'd0, dest: 0, hdr: 0, last: 1});
    for (int p = 0; p < NPKT; p++) begin
      int dest, size;
      dest = $urandom_range(0, 3);
      size = $urandom_range(0, 20);
      if (p % 10 == 5) begin
        // Stall the OIs and fill the buffer.
        stall_now = 1;
        stalls++;
      end
      send('{d: {8'(p), addr_of(dest)}, dest: dest, hdr: 1, last: 0});
      send('{d: FS'(size), dest: dest, hdr: 0, last: size == 0});
      for (int n = 1; n <= size; n++)
        send('{d: FS'($urandom), dest: dest, hdr: 0, last: n == size});
      stall_now = 0;
    end
    while (exp_q.size() != 0) @(negedge clk);
    repeat (5) @(negedge clk);
    for (int d = 0; d < NOTHER; d++) check(route_hits[d] > 0, $sformatf("port %0d never used", d));
    check(held > 0, "buffer never filled");
    $display("held %0d times", held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog q=%0d req_in=%b ack_in=%b stall=%0d ro=%b ao=%b rd=%b ad=%b", exp_q.size(), req_in, ack_in, stall_now, req_outport, ack_outport, req_data, ack_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
