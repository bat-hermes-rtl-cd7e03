// tb_bat_mesh: nine routers in a 3x3 mesh, traffic between all local ports.
//
// Router (x,y) has ADDRESS {x,y} and only the ports that exist at its place
// in the mesh (PORTS_PRESENT): corners have three ports, edges four, the
// centre five. Neighbouring links are wired EAST<->WEST and NORTH<->SOUTH.
// The IP on every LOCAL port sends NPKT packets of random size to random
// other nodes, and its sink acknowledges after random delays. Each sink
// checks that a packet is addressed to its node, arrives whole, in order
// per source, with every payload flit intact. The test also requires
// packets that cross the whole mesh (four hops) and packets that turn from
// X to Y, and it ends only when every packet has been delivered.
module tb_bat_mesh;
  import bat_pkg::*;
  localparam int unsigned FS = 16;
  localparam int DIM  = 3;
  localparam int NN   = DIM * DIM;
  localparam int NPKT = 30;

  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] rreq [DIM][DIM], rack [DIM][DIM], treq [DIM][DIM], tack [DIM][DIM];
  logic [FS-1:0]     rdata [DIM][DIM][NPORTS], tdata [DIM][DIM][NPORTS];
  logic              lreq [DIM][DIM], lack [DIM][DIM];
  logic [FS-1:0]     ldata [DIM][DIM];
  int checks = 0, failures = 0;
  int delivered = 0, far = 0, turned = 0;
  int exp_size [NN][NN][$];
  int exp_seq  [NN][NN][$];

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [FS-1:0] payload(int src, int seq, int n);
    return FS'({4'(src), 6'(seq), 6'(n)}) ^ FS'(n * 16'h2d3);
  endfunction

  for (genvar x = 0; x < DIM; x++) begin : g_x
    for (genvar y = 0; y < DIM; y++) begin : g_y
      localparam logic [NPORTS-1:0] MASK = {1'b1, y > 0, y < DIM - 1, x > 0, x < DIM - 1};
      localparam int ME = x * DIM + y;

      bat_router #(
        .ADDRESS       ({4'(x), 4'(y)}),
        .PORTS_PRESENT (MASK)
      ) u_router (
        .clk(clk), .rst_n(rst_n),
        .rx_req(rreq[x][y]), .rx_ack(rack[x][y]), .rx_data(rdata[x][y]),
        .tx_req(treq[x][y]), .tx_ack(tack[x][y]), .tx_data(tdata[x][y]));

      // Links toward the neighbours; missing ports are held idle.
      if (x < DIM - 1) begin : g_e
        assign rreq[x][y][EAST]  = treq[x+1][y][WEST];
        assign rdata[x][y][EAST] = tdata[x+1][y][WEST];
        assign tack[x][y][EAST]  = rack[x+1][y][WEST];
      end else begin : g_ne
        assign rreq[x][y][EAST]  = 1'b0;
        assign rdata[x][y][EAST] = '0;
        assign tack[x][y][EAST]  = 1'b0;
      end
      if (x > 0) begin : g_w
        assign rreq[x][y][WEST]  = treq[x-1][y][EAST];
        assign rdata[x][y][WEST] = tdata[x-1][y][EAST];
        assign tack[x][y][WEST]  = rack[x-1][y][EAST];
      end else begin : g_nw
        assign rreq[x][y][WEST]  = 1'b0;
        assign rdata[x][y][WEST] = '0;
        assign tack[x][y][WEST]  = 1'b0;
      end
      if (y < DIM - 1) begin : g_n
        assign rreq[x][y][NORTH]  = treq[x][y+1][SOUTH];
        assign rdata[x][y][NORTH] = tdata[x][y+1][SOUTH];
        assign tack[x][y][NORTH]  = rack[x][y+1][SOUTH];
      end else begin : g_nn
        assign rreq[x][y][NORTH]  = 1'b0;
        assign rdata[x][y][NORTH] = '0;
        assign tack[x][y][NORTH]  = 1'b0;
      end
      if (y > 0) begin : g_s
        assign rreq[x][y][SOUTH]  = treq[x][y-1][NORTH];
        assign rdata[x][y][SOUTH] = tdata[x][y-1][NORTH];
        assign tack[x][y][SOUTH]  = rack[x][y-1][NORTH];
      end else begin : g_ns
        assign rreq[x][y][SOUTH]  = 1'b0;
        assign rdata[x][y][SOUTH] = '0;
        assign tack[x][y][SOUTH]  = 1'b0;
      end
      assign rreq[x][y][LOCAL]  = lreq[x][y];
      assign rdata[x][y][LOCAL] = ldata[x][y];
      assign tack[x][y][LOCAL]  = lack[x][y];

      // Local source.
      initial begin
        lreq[x][y]  = 0;
        ldata[x][y] = '0;
        @(posedge rst_n);
        @(negedge clk);
        for (int p = 0; p < NPKT; p++) begin
          int dest, size, dx, dy;
          do dest = $urandom_range(0, NN - 1); while (dest == ME);
          size = $urandom_range(0, 12);
          dx = dest / DIM; dy = dest % DIM;
          if ((dx > x ? dx - x : x - dx) + (dy > y ? dy - y : y - dy) == 4) far++;
          if (dx != x && dy != y) turned++;
          exp_size[ME][dest].push_back(size);
          exp_seq[ME][dest].push_back(p);
          repeat ($urandom_range(0, 8)) @(negedge clk);
          for (int n = -1; n <= size; n++) begin
            ldata[x][y] = (n == -1) ? {4'(ME), 4'(p), 4'(dx), 4'(dy)}
                        : (n == 0)  ? FS'(size) : payload(ME, p, n);
            lreq[x][y] = ~lreq[x][y];
            while (rack[x][y][LOCAL] != lreq[x][y]) @(negedge clk);
          end
        end
      end

      // Local sink.
      initial begin
        int pos, src, seq, size;
        lack[x][y] = 0;
        pos = -2; src = 0; seq = 0; size = 0;
        @(posedge rst_n);
        forever begin
          @(negedge clk);
          if (treq[x][y][LOCAL] != lack[x][y]) begin
            logic [FS-1:0] d;
            d = tdata[x][y][LOCAL];
            if (pos == -2) begin
              src = int'(d[15:12]);
              check(d[7:0] == {4'(x), 4'(y)}, $sformatf("node %0d got header %h", ME, d));
              check(src < NN && exp_seq[src][ME].size() > 0 && exp_seq[src][ME][0] % 16 == int'(d[11:8]),
                    $sformatf("node %0d unexpected packet %h", ME, d));
              seq = (src < NN && exp_seq[src][ME].size() > 0) ? exp_seq[src][ME][0] : 0;
              pos = -1;
            end else if (pos == -1) begin
              size = int'(d);
              if (src < NN && exp_size[src][ME].size() > 0) begin
                check(size == exp_size[src][ME][0], $sformatf("node %0d size %0d", ME, size));
                void'(exp_size[src][ME].pop_front());
                void'(exp_seq[src][ME].pop_front());
              end
              if (size == 0) begin pos = -2; delivered++; end else pos = 1;
            end else begin
              check(d == payload(src, seq, pos), $sformatf("node %0d payload %h pos %0d", ME, d, pos));
              if (pos == size) begin pos = -2; delivered++; end else pos++;
            end
            repeat ($urandom_range(0, 3)) @(negedge clk);
            lack[x][y] = ~lack[x][y];
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (delivered < NN * NPKT) @(negedge clk);
    repeat (20) @(negedge clk);
    check(delivered == NN * NPKT, $sformatf("delivered %0d packets", delivered));
    for (int s = 0; s < NN; s++)
      for (int d = 0; d < NN; d++)
        check(exp_size[s][d].size() == 0, $sformatf("packets %0d->%0d missing", s, d));
    check(far > 0, "no packet crossed the whole mesh");
    check(turned > 0, "no packet turned from X to Y");
    $display("delivered %0d packets, %0d over four hops, %0d with a turn", delivered, far, turned);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (delivered %0d)", delivered);
    for (int x = 0; x < DIM; x++) for (int y = 0; y < DIM; y++)
      $display("node %0d%0d rx %b/%b tx %b/%b", x, y, rreq[x][y], rack[x][y], treq[x][y], tack[x][y]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
