// tb_dtdma_bus: end-to-end test of one 9-node dTDMA bus.
//  1. The two-master example: A writes two words starting in cycle T1, B two
//     words starting in T2. Expected: A1, B1, A2, B2 on the bus in T2..T5 and
//     1, 2, 2, 1, 0 timeslots in T2..T6 (request to data in one cycle).
//  2. Random unicast and multicast traffic between all nodes, checked by a
//     scoreboard (per sender and receiver, in order, nothing lost, nothing
//     extra), with destination changes that must reprogram the receivers and
//     slow readers whose full receive buffers must hold the senders back.
//  3. Saturation: all nodes keep their buffers full; the bus must carry a
//     word in every cycle and each node must get exactly every 9th cycle.
module tb_dtdma_bus;
  import hybrid_pkg::*;
  localparam int N = 9, CW = $clog2(N + 1);
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_ready, out_valid, out_ready, rx_overflow;
  logic [N-1:0] in_dest [N];
  gaddr_t in_gdst [N];
  logic [DATA_W-1:0] in_data [N];
  bus_word_t out_word [N];
  bus_word_t bus;
  logic load;
  logic [CW-1:0] n_slots;
  int checks = 0, failures = 0;
  int cyc = 0;

  dtdma_bus #(.N(N)) dut (.*);

  logic [N-1:0] fullv;      // receive buffers reported full
  for (genvar p = 0; p < N; p++) begin : g_full
    assign fullv[p] = dut.g_node[p].u_rx.full;
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scoreboard ----------------
  logic [63:0] exp_q [N][N][$];   // [sender][receiver] tags
  int received = 0, mcasts = 0, dchg = 0, grow = 0, shrink = 0, held = 0;
  logic [CW-1:0] prev_slots = '0;

  function automatic logic [DATA_W-1:0] mk_data(input logic [63:0] tag);
    return {8{tag}};
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < N; r++) begin
      if (out_valid[r] && out_ready[r]) begin
        int s;
        s = int'(out_word[r].src);
        checks++;
        if (s >= N || exp_q[s][r].size() == 0) begin
          failures++; $display("FAIL unexpected word at node %0d from %0d, cycle %0d", r, s, cyc);
        end else if (out_word[r].data != mk_data(exp_q[s][r][0])) begin
          failures++; $display("FAIL wrong word at node %0d from %0d, cycle %0d", r, s, cyc);
          void'(exp_q[s][r].pop_front());
        end else begin
          void'(exp_q[s][r].pop_front());
          received++;
        end
      end
    end
    for (int p = 0; p < N; p++) if (fullv[p]) held++;
    if (load && n_slots != 0 && prev_slots == n_slots) dchg++;
    if (n_slots > prev_slots) grow++;
    if (n_slots < prev_slots) shrink++;
    prev_slots <= n_slots;
  end

  function automatic int pending();
    int n = 0;
    for (int s = 0; s < N; s++) for (int r = 0; r < N; r++) n += exp_q[s][r].size();
    return n;
  endfunction

  // write one message (call after negedge); returns when accepted
  task automatic send(input int p, input logic [N-1:0] dst, input logic [63:0] tag);
    in_valid[p] = 1; in_dest[p] = dst; in_data[p] = mk_data(tag);
    in_gdst[p] = gaddr_t'(tag[9:0]);
    for (int r = 0; r < N; r++) if (dst[r]) exp_q[p][r].push_back(tag);
  endtask

  initial begin
    logic [63:0] seq [N];
    int last [N];
    bit sat_ok;
    logic [N-1:0] acc;
    in_valid = '0; out_ready = '1;
    for (int p = 0; p < N; p++) begin
      in_dest[p] = '0; in_gdst[p] = '0; in_data[p] = '0; seq[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // ---- 1. the two-master example ----
    // T1
    send(0, N'(1) << 2, 64'hA1);
    #1 chk(n_slots == 0 && !bus.vld, "T1 idle");
    @(negedge clk); in_valid = '0;
    // T2
    send(0, N'(1) << 2, 64'hA2);
    send(1, N'(1) << 3, 64'hB1);
    #1 chk(bus.vld && bus.src == 0 && bus.data == mk_data(64'hA1) && n_slots == 1, "T2 A1, 1 slot");
    @(negedge clk); in_valid = '0;
    // T3
    send(1, N'(1) << 3, 64'hB2);
    #1 chk(bus.vld && bus.src == 1 && bus.data == mk_data(64'hB1) && n_slots == 2, "T3 B1, 2 slots");
    @(negedge clk); in_valid = '0;
    // T4
    #1 chk(bus.vld && bus.src == 0 && bus.data == mk_data(64'hA2) && n_slots == 2, "T4 A2, 2 slots");
    @(negedge clk);
    #1 chk(bus.vld && bus.src == 1 && bus.data == mk_data(64'hB2) && n_slots == 1, "T5 B2, 1 slot");
    @(negedge clk);
    #1 chk(!bus.vld && n_slots == 0, "T6 idle, 0 slots");
    repeat (2) @(negedge clk);
    chk(pending() == 0, "example delivered");

    // ---- 2. random traffic ----
    for (int t = 0; t < 6200; t++) begin
      for (int p = 0; p < N; p++) begin
        if (!in_valid[p] && t < 6000 && $urandom_range(0, 99) < 8 + 30 * ((t / 1000) % 2)) begin
          logic [N-1:0] d;
          int k;
          if ($urandom_range(0, 4) == 0) begin
            d = N'($urandom) & ~(N'(1) << p);        // multicast
            if (d == 0) d = N'(1) << ((p + 1) % N);
            if ($countones(d) > 1) mcasts++;
          end else begin
            k = (p + $urandom_range(1, N - 1)) % N;
            d = N'(1) << k;
          end
          send(p, d, {32'(p), 32'(seq[p])});
          seq[p]++;
        end
      end
      out_ready = (t / 1500) % 2 ? N'($urandom) & N'($urandom) & N'($urandom) : '1;   // slow readers half the time
      #1 acc = in_valid & in_ready;    // taken at the coming edge
      @(negedge clk);
      in_valid = in_valid & ~acc;
    end
    in_valid = '0;
    out_ready = '1;
    repeat (200) @(negedge clk);
    chk(pending() == 0, $sformatf("random traffic delivered (%0d left)", pending()));
    chk(rx_overflow == '0, "no receive overflow");
    chk(received > 1000 && mcasts > 50 && dchg > 20 && grow > 20 && shrink > 20 && held > 20, "coverage");
    $display("received=%0d multicasts=%0d dest-change reloads=%0d grows=%0d shrinks=%0d full-cycles=%0d",
             received, mcasts, dchg, grow, shrink, held);

    // ---- 3. saturation ----
    for (int p = 0; p < N; p++) begin
      in_valid[p] = 1; in_dest[p] = N'(1) << ((p + 1) % N); last[p] = -1;
    end
    sat_ok = 1;
    for (int t = 0; t < 300; t++) begin
      for (int p = 0; p < N; p++) in_data[p] = mk_data({32'(p), 32'(seq[p])});
      #1;
      for (int p = 0; p < N; p++) if (in_ready[p]) begin
        exp_q[p][(p + 1) % N].push_back({32'(p), 32'(seq[p])});
        seq[p]++;
      end
      if (t >= 50) begin
        int s;
        chk(bus.vld, "saturated bus busy");
        s = int'(bus.src);
        if (last[s] >= 0) chk(t - last[s] == N, "one slot in every N cycles");
        last[s] = t;
      end
      @(negedge clk);
    end
    in_valid = '0;
    repeat (100) @(negedge clk);
    chk(pending() == 0, "saturation traffic delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
