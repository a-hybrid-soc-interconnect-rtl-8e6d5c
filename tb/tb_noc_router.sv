// tb_noc_router: a router at mesh position (2,2) with random 4-flit packets
// entering on all five ports and random back-pressure on all outputs.
// Checks: each packet leaves on the port given by XY routing (x first, then
// y), its flits stay together and in order on that link, packets from one
// input to one output keep their order, nothing is lost or duplicated, and
// a flit crosses an idle router in one cycle.
module tb_noc_router;
  import hybrid_pkg::*;
  localparam int RX = 2, RY = 2;
  logic clk = 0, rst_n = 0;
  flit_t in_flit [NPORTS], out_flit [NPORTS];
  logic [NPORTS-1:0] in_valid, in_ready, out_valid, out_ready;
  int checks = 0, failures = 0, cyc = 0;

  logic [COORD_W-1:0] my_x = COORD_W'(RX), my_y = COORD_W'(RY);
  noc_router dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output port, written out from the mesh geometry
  function automatic int exp_port(input int dx, input int dy);
    if (dx != RX) return (dx > RX) ? 2 : 4;     // east : west
    if (dy != RY) return (dy > RY) ? 3 : 1;     // south : north
    return 0;
  endfunction

  flit_t src_q [NPORTS][$];
  int sent = 0, delivered = 0, contention = 0;
  bit in_pkt [NPORTS];
  int cur_in [NPORTS], cur_seq [NPORTS], cur_idx [NPORTS];
  int last_seq [NPORTS][NPORTS];
  int seqn [NPORTS];

  task automatic make_pkt(input int i, input int dx, input int dy);
    for (int k = 0; k < FLITS_PER_MSG; k++) begin
      flit_t f;
      f.head = (k == 0);
      f.tail = (k == FLITS_PER_MSG - 1);
      f.dst  = '{x: COORD_W'(dx), y: COORD_W'(dy), sub: '0};
      f.data = {FLIT_W'(0) | {8'(dy), 8'(dx), 8'(k), 32'(seqn[i]), 8'(i)}};
      src_q[i].push_back(f);
    end
    seqn[i]++;
  endtask

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      in_valid[i] = src_q[i].size() > 0;
      in_flit[i]  = in_valid[i] ? src_q[i][0] : '0;
    end
  end

  // output monitor
  always @(posedge clk) if (rst_n) begin
    int want [NPORTS];
    for (int o = 0; o < NPORTS; o++) want[o] = 0;
    for (int i = 0; i < NPORTS; i++)
      if (in_valid[i] && in_flit[i].head) want[exp_port(int'(in_flit[i].dst.x), int'(in_flit[i].dst.y))]++;
    for (int o = 0; o < NPORTS; o++) if (want[o] > 1) contention++;
    for (int o = 0; o < NPORTS; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        flit_t f;
        int i, sq, k, dx, dy;
        f  = out_flit[o];
        i  = int'(f.data[7:0]);  sq = int'(f.data[39:8]);  k = int'(f.data[47:40]);
        dx = int'(f.data[55:48]); dy = int'(f.data[63:56]);
        delivered++;
        chk(exp_port(dx, dy) == o, $sformatf("route of packet %0d.%0d to (%0d,%0d) on port %0d", i, sq, dx, dy, o));
        if (k == 0) begin
          chk(!in_pkt[o] && f.head, "head flit starts a packet");
          chk(sq > last_seq[i][o], "packet order per input/output");
          last_seq[i][o] = sq;
          cur_in[o] = i; cur_seq[o] = sq; cur_idx[o] = 0;
          in_pkt[o] = 1;
        end else begin
          chk(in_pkt[o] && cur_in[o] == i && cur_seq[o] == sq && cur_idx[o] + 1 == k && !f.head,
              "flits of a packet stay together");
          cur_idx[o] = k;
        end
        if (f.tail) begin
          chk(k == FLITS_PER_MSG - 1, "tail position");
          in_pkt[o] = 0;
        end
      end
    end
    for (int i = 0; i < NPORTS; i++)
      if (in_valid[i] && in_ready[i]) begin void'(src_q[i].pop_front()); sent++; end
  end

  initial begin
    out_ready = '1;
    for (int i = 0; i < NPORTS; i++) begin
      in_pkt[i] = 0; seqn[i] = 0;
      for (int o = 0; o < NPORTS; o++) last_seq[i][o] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // one flit through an idle router: in at this edge, out in the next cycle
    make_pkt(1, 4, 2);                     // north input, going east
    @(negedge clk);
    chk(out_valid[2] && out_flit[2].head, "one-cycle hop");
    repeat (10) @(negedge clk);
    // random traffic
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < NPORTS; i++)
        if (src_q[i].size() < 8 && $urandom_range(0, 99) < 20)
          make_pkt(i, $urandom_range(0, 4), $urandom_range(0, 4));
      out_ready = NPORTS'($urandom) | NPORTS'($urandom);
      @(negedge clk);
    end
    out_ready = '1;
    repeat (200) @(negedge clk);
    for (int i = 0; i < NPORTS; i++) chk(src_q[i].size() == 0, "all injected");
    chk(sent == delivered && sent > 1000, $sformatf("flits in %0d out %0d", sent, delivered));
    chk(contention > 100, "output contention exercised");
    $display("flits=%0d contention=%0d", delivered, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
