// tb_hybrid_soc: end-to-end test of the whole hybrid system at its default
// size (four 9-node dTDMA groups, 32 NoC PEs, 6 x 6 mesh).
//
// Every PE sends tagged messages; a scoreboard holds, per receiving PE, the
// tags it must get (each exactly once). Traffic phases use bridge rates of
// 10 %, 30 % and 50 % (share of a group PE's messages that leave its group),
// then a saturation burst. Message kinds: unicast and multicast inside a
// group, group -> NoC PE, group -> other group, NoC PE -> group PE and
// NoC PE -> NoC PE. Also checked: a lone message inside a group reaches its
// receiver two cycles after it is written (one cycle to the bus, one to be
// received). Counted, each of which must happen: timeslot growth and
// shrinkage, receiver reprogramming on a destination change, multicast,
// bridge traffic both ways, full transmit buffers, NoC back-pressure and
// receive buffers holding senders back.
module tb_hybrid_soc;
  import hybrid_pkg::*;
  localparam int MX = 6, MY = 6, N = 9, NPG = 8, N_AG = 4;
  localparam int N_AGPE = 32, N_NP = 32, CW = $clog2(N + 1);
  logic clk = 0, rst_n = 0;

  logic [N_AGPE-1:0] ag_in_valid, ag_in_ready, ag_out_valid, ag_out_ready;
  logic [N-1:0]      ag_in_dest [N_AGPE];
  gaddr_t            ag_in_gdst [N_AGPE];
  logic [DATA_W-1:0] ag_in_data [N_AGPE];
  bus_word_t         ag_out_word [N_AGPE];
  logic [N_NP-1:0]   np_in_valid, np_in_ready, np_out_valid, np_out_ready;
  gaddr_t            np_in_dst [N_NP];
  logic [DATA_W-1:0] np_in_data [N_NP];
  logic [DATA_W-1:0] np_out_data [N_NP];
  logic [CW-1:0]     ag_n_slots [N_AG];
  logic [N_AG-1:0]   ag_load;
  logic [N-1:0]      ag_rx_overflow [N_AG];

  hybrid_soc dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- addressing, worked out from the floorplan ----------------
  // receivers: 0..31 group PEs (g*8+j), 32..63 NoC PEs
  function automatic gaddr_t corner(input int g);
    gaddr_t a;
    a.x = COORD_W'((g % 2) ? MX - 1 : 0);
    a.y = COORD_W'((g / 2) ? MY - 1 : 0);
    a.sub = '0;
    return a;
  endfunction
  function automatic gaddr_t np_addr(input int k);
    int n = 0;
    for (int y = 0; y < MY; y++)
      for (int x = 0; x < MX; x++) begin
        bit c;
        c = (x == 0 || x == MX - 1) && (y == 0 || y == MY - 1);
        if (!c) begin
          if (n == k) return '{x: COORD_W'(x), y: COORD_W'(y), sub: '0};
          n++;
        end
      end
    return '0;
  endfunction
  function automatic gaddr_t rcv_addr(input int r);
    gaddr_t a;
    if (r < N_AGPE) begin a = corner(r / NPG); a.sub = SUB_W'(r % NPG); end
    else a = np_addr(r - N_AGPE);
    return a;
  endfunction

  // ---------------- scoreboard ----------------
  int exp_cnt [64][logic [47:0]];
  int outstanding = 0, delivered = 0;

  function automatic logic [DATA_W-1:0] mk_data(input logic [47:0] tag);
    return {{(DATA_W-48){1'b0}} | {10{tag}}, tag};
  endfunction

  task automatic expect_tag(input int r, input logic [47:0] tag);
    if (exp_cnt[r].exists(tag)) exp_cnt[r][tag]++; else exp_cnt[r][tag] = 1;
    outstanding++;
  endtask

  task automatic got_tag(input int r, input logic [DATA_W-1:0] d);
    logic [47:0] tag;
    tag = d[47:0];
    checks++;
    if (d != mk_data(tag) || !exp_cnt[r].exists(tag)) begin
      failures++;
      $display("FAIL receiver %0d got unexpected message %h at cycle %0d", r, tag, cyc);
    end else begin
      exp_cnt[r][tag]--;
      if (exp_cnt[r][tag] == 0) exp_cnt[r].delete(tag);
      outstanding--;
      delivered++;
    end
  endtask

  // mechanism counters
  int c_grow = 0, c_shrink = 0, c_reprog = 0, c_mcast = 0, c_br_out = 0, c_br_in = 0;
  int c_txfull = 0, c_noc_bp = 0, c_rx_hold = 0, c_n2n = 0, c_ag2ag = 0;
  logic [CW-1:0] prev_slots [N_AG];

  logic [N-1:0] rxfull [N_AG];
  logic [N_AG-1:0] reprog;      // a load with no transmitter added or removed
  for (genvar g = 0; g < N_AG; g++) begin : g_mon
    assign reprog[g] = ag_load[g] && dut.g_ag[g].u_bus.u_arb.n_new == 0 &&
                       (dut.g_ag[g].u_bus.u_arb.alloc_q & ~dut.g_ag[g].u_bus.u_arb.active) == 0;
    for (genvar p = 0; p < N; p++) begin : g_p
      assign rxfull[g][p] = dut.g_ag[g].u_bus.g_node[p].u_rx.full;
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < N_AGPE; r++) if (ag_out_valid[r] && ag_out_ready[r]) got_tag(r, ag_out_word[r].data);
    for (int k = 0; k < N_NP; k++) if (np_out_valid[k] && np_out_ready[k]) got_tag(N_AGPE + k, np_out_data[k]);
    for (int g = 0; g < N_AG; g++) begin
      if (ag_n_slots[g] > prev_slots[g]) c_grow++;
      if (ag_n_slots[g] < prev_slots[g]) c_shrink++;
      if (reprog[g]) c_reprog++;
      prev_slots[g] <= ag_n_slots[g];
      if (rxfull[g] != 0) c_rx_hold++;
      chk(ag_rx_overflow[g] == '0, "no receive overflow");
    end
    for (int r = 0; r < N_AGPE; r++) if (ag_in_valid[r] && !ag_in_ready[r]) c_txfull++;
    for (int k = 0; k < N_NP; k++) if (np_in_valid[k] && !np_in_ready[k]) c_noc_bp++;
  end

  // ---------------- traffic ----------------
  logic [31:0] seq [64];
  int br_pct = 10, inj_pct = 5;

  // pick a message for group PE r (g*8+j) and record what it must produce
  task automatic gen_ag(input int r);
    int g, j, kind, d;
    logic [47:0] tag;
    logic [N-1:0] mask;
    g = r / NPG; j = r % NPG;
    tag = {8'hA0, 8'(r), seq[r]}; seq[r]++;
    ag_in_data[r] = mk_data(tag);
    ag_in_gdst[r] = '0;
    if ($urandom_range(0, 99) < br_pct) begin
      // leave the group: a NoC PE or a PE of another group
      ag_in_dest[r] = N'(1) << (N - 1);
      if ($urandom_range(0, 1) == 0) begin
        d = N_AGPE + $urandom_range(0, N_NP - 1);
      end else begin
        d = ((g + $urandom_range(1, N_AG - 1)) % N_AG) * NPG + $urandom_range(0, NPG - 1);
        c_ag2ag++;
      end
      ag_in_gdst[r] = rcv_addr(d);
      expect_tag(d, tag);
      c_br_out++;
    end else if ($urandom_range(0, 4) == 0) begin
      mask = N'($urandom) & N'(8'hFF) & ~(N'(1) << j);
      if ($countones(mask) < 2) mask = mask | (N'(1) << ((j + 1) % NPG)) | (N'(1) << ((j + 2) % NPG));
      ag_in_dest[r] = mask;
      for (int k = 0; k < NPG; k++) if (mask[k]) expect_tag(g * NPG + k, tag);
      c_mcast++;
    end else begin
      d = (j + $urandom_range(1, NPG - 1)) % NPG;
      ag_in_dest[r] = N'(1) << d;
      expect_tag(g * NPG + d, tag);
    end
  endtask

  task automatic gen_np(input int k);
    int d;
    logic [47:0] tag;
    tag = {8'hB0, 8'(N_AGPE + k), seq[N_AGPE + k]}; seq[N_AGPE + k]++;
    np_in_data[k] = mk_data(tag);
    if ($urandom_range(0, 1) == 0) begin
      d = $urandom_range(0, N_AGPE - 1);
      c_br_in++;
    end else begin
      d = N_AGPE + ((k + $urandom_range(1, N_NP - 1)) % N_NP);
      c_n2n++;
    end
    np_in_dst[k] = rcv_addr(d);
    expect_tag(d, tag);
  endtask

  task automatic run_phase(input int cycles, input bit slow_np_readers);
    logic [N_AGPE-1:0] acc_ag;
    logic [N_NP-1:0]   acc_np;
    for (int t = 0; t < cycles; t++) begin
      for (int r = 0; r < N_AGPE; r++)
        if (!ag_in_valid[r] && $urandom_range(0, 99) < inj_pct) begin gen_ag(r); ag_in_valid[r] = 1; end
      for (int k = 0; k < N_NP; k++)
        if (!np_in_valid[k] && $urandom_range(0, 99) < inj_pct) begin gen_np(k); np_in_valid[k] = 1; end
      np_out_ready = slow_np_readers ? N_NP'($urandom) & N_NP'($urandom) : '1;
      #1;
      acc_ag = ag_in_valid & ag_in_ready;
      acc_np = np_in_valid & np_in_ready;
      @(negedge clk);
      ag_in_valid &= ~acc_ag;
      np_in_valid &= ~acc_np;
    end
    // finish the offered messages
    np_out_ready = '1;
    while (ag_in_valid != 0 || np_in_valid != 0) begin
      #1;
      acc_ag = ag_in_valid & ag_in_ready;
      acc_np = np_in_valid & np_in_ready;
      @(negedge clk);
      ag_in_valid &= ~acc_ag;
      np_in_valid &= ~acc_np;
    end
    np_out_ready = '1;
  endtask

  task automatic drain(input string what);
    int w = 0;
    while (outstanding > 0 && w < 3000) begin @(negedge clk); w++; end
    chk(outstanding == 0, $sformatf("%s: all delivered (%0d missing)", what, outstanding));
  endtask

  initial begin
    int t0;
    ag_in_valid = '0; np_in_valid = '0; ag_out_ready = '1; np_out_ready = '1;
    for (int r = 0; r < N_AGPE; r++) begin ag_in_dest[r] = '0; ag_in_gdst[r] = '0; ag_in_data[r] = '0; end
    for (int k = 0; k < N_NP; k++) begin np_in_dst[k] = '0; np_in_data[k] = '0; end
    for (int i = 0; i < 64; i++) seq[i] = 0;
    for (int g = 0; g < N_AG; g++) prev_slots[g] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // lone message inside group 1: PE 9 -> PE 12, two cycles to the receiver
    ag_in_valid[9] = 1; ag_in_dest[9] = N'(1) << 4; ag_in_gdst[9] = '0;
    ag_in_data[9] = mk_data({8'hC0, 8'd9, 32'd0});
    expect_tag(12, {8'hC0, 8'd9, 32'd0});
    t0 = cyc;
    @(negedge clk); ag_in_valid[9] = 0;
    wait (ag_out_valid[12]);
    chk(cyc - t0 == 2, $sformatf("bus latency %0d cycles", cyc - t0));
    drain("lone message");

    // bridge-rate phases
    $display("phase 10%% at %0d", cyc);
    br_pct = 10; inj_pct = 5;  run_phase(1500, 0); drain("bridge rate 10%");
    $display("phase 30%% at %0d", cyc);
    br_pct = 30;               run_phase(1500, 1); drain("bridge rate 30%");
    $display("phase 50%% at %0d", cyc);
    br_pct = 50;               run_phase(1500, 0); drain("bridge rate 50%");
    $display("saturation at %0d", cyc);
    // saturation: every PE offers a message in every cycle, half leave the group
    br_pct = 50; inj_pct = 100; run_phase(400, 0); drain("saturation");

    $display("delivered=%0d grow=%0d shrink=%0d reprogram=%0d multicast=%0d bridge_out=%0d bridge_in=%0d group_to_group=%0d noc_to_noc=%0d txfull=%0d noc_backpressure=%0d rx_hold=%0d",
             delivered, c_grow, c_shrink, c_reprog, c_mcast, c_br_out, c_br_in, c_ag2ag, c_n2n,
             c_txfull, c_noc_bp, c_rx_hold);
    chk(c_grow > 0,     "timeslots added");
    chk(c_shrink > 0,   "timeslots removed");
    chk(c_reprog > 0,   "receivers reprogrammed on a destination change");
    chk(c_mcast > 0,    "multicast");
    chk(c_br_out > 0,   "group -> NoC through a bridge");
    chk(c_br_in > 0,    "NoC -> group through a bridge");
    chk(c_ag2ag > 0,    "group -> group over the backbone");
    chk(c_n2n > 0,      "NoC PE -> NoC PE");
    chk(c_txfull > 0,   "full transmit buffer");
    chk(c_noc_bp > 0,   "NoC back-pressure");
    chk(c_rx_hold > 0,  "full receive buffer holds senders");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
