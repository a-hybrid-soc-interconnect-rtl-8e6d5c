// tb_noc_mesh: a 3 x 3 mesh. First one packet at a time from corner to
// corner: the head must arrive hops+1 cycles after injection (one cycle per
// router). Then random packets from every node to every node under random
// ejection stalls: every packet arrives whole, at the right node, in order
// per source/destination pair.
module tb_noc_mesh;
  import hybrid_pkg::*;
  localparam int MX = 3, MY = 3, NN = MX * MY;
  logic clk = 0, rst_n = 0;
  flit_t loc_in_flit [NN], loc_out_flit [NN];
  logic [NN-1:0] loc_in_valid, loc_in_ready, loc_out_valid, loc_out_ready;
  int checks = 0, failures = 0, cyc = 0;

  noc_mesh #(.MX(MX), .MY(MY)) dut (.*);

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

  flit_t src_q [NN][$];
  int seqn [NN], last_seq [NN][NN], idx [NN], cur_src [NN];
  int sent = 0, got = 0, inj_cyc = 0, arr_cyc = -1;

  task automatic make_pkt(input int s, input int d);
    for (int k = 0; k < FLITS_PER_MSG; k++)
      src_q[s].push_back('{head: k == 0, tail: k == FLITS_PER_MSG - 1,
                           dst: '{x: COORD_W'(d % MX), y: COORD_W'(d / MX), sub: '0},
                           data: FLIT_W'({8'(k), 32'(seqn[s]), 8'(s)})});
    seqn[s]++;
    sent++;
  endtask

  always_comb
    for (int s = 0; s < NN; s++) begin
      loc_in_valid[s] = src_q[s].size() > 0;
      loc_in_flit[s]  = loc_in_valid[s] ? src_q[s][0] : '0;
    end

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < NN; d++) if (loc_out_valid[d] && loc_out_ready[d]) begin
      int s, sq, k;
      s = int'(loc_out_flit[d].data[7:0]); sq = int'(loc_out_flit[d].data[39:8]);
      k = int'(loc_out_flit[d].data[47:40]);
      chk(loc_out_flit[d].dst.x == COORD_W'(d % MX) && loc_out_flit[d].dst.y == COORD_W'(d / MX) ||
          !loc_out_flit[d].head, "delivered at its destination");
      chk(k == idx[d], "flit order");
      if (k == 0) begin
        chk(sq > last_seq[s][d], "packet order per pair");
        last_seq[s][d] = sq; cur_src[d] = s;
        if (arr_cyc < 0) arr_cyc = cyc;
      end else chk(cur_src[d] == s, "packet not interleaved");
      idx[d] = loc_out_flit[d].tail ? 0 : idx[d] + 1;
      if (loc_out_flit[d].tail) got++;
    end
    for (int s = 0; s < NN; s++) if (loc_in_valid[s] && loc_in_ready[s]) void'(src_q[s].pop_front());
  end

  initial begin
    loc_out_ready = '1;
    for (int s = 0; s < NN; s++) begin
      seqn[s] = 0; idx[s] = 0;
      for (int d = 0; d < NN; d++) last_seq[s][d] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency of a lone packet
    for (int pair = 0; pair < 4; pair++) begin
      int s, d, hops;
      s = (pair == 0) ? 0 : (pair == 1) ? NN - 1 : (pair == 2) ? MX - 1 : 4;
      d = (pair == 0) ? NN - 1 : (pair == 1) ? 0 : (pair == 2) ? NN - MX : 5;
      hops = ((s % MX > d % MX) ? s % MX - d % MX : d % MX - s % MX) +
             ((s / MX > d / MX) ? s / MX - d / MX : d / MX - s / MX);
      @(negedge clk);
      make_pkt(s, d);
      arr_cyc = -1;
      @(posedge clk); inj_cyc = cyc;
      repeat (20) @(negedge clk);
      chk(arr_cyc - inj_cyc == hops + 1, $sformatf("latency %0d for %0d hops", arr_cyc - inj_cyc, hops));
    end
    // random all-to-all
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int s = 0; s < NN; s++)
        if (src_q[s].size() < 8 && $urandom_range(0, 99) < 6) make_pkt(s, $urandom_range(0, NN - 1));
      loc_out_ready = NN'($urandom) | NN'($urandom);
    end
    loc_out_ready = '1;
    repeat (300) @(negedge clk);
    chk(got == sent && sent > 1000, $sformatf("packets sent %0d received %0d", sent, got));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
