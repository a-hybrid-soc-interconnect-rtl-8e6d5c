// tb_dtdma_arbiter: drives the arbiter with the example request sequence of
// four transmitters A..D and with random request and destination patterns.
// One dtdma_slot_sr per node, loaded from tx_cfg, shows which node owns each
// cycle; a reference list model (new transmitters first, survivors keep
// their cyclic order from the one due next) gives the expected owner, slot
// count and receiver programming.
module tb_dtdma_arbiter;
  localparam int N = 9, LW = $clog2(N), CW = $clog2(N + 1);
  logic clk = 0, rst_n = 0;
  logic [N-1:0] active;
  logic [N-1:0] dest_req [N];
  logic load;
  logic [N-1:0] tx_cfg [N];
  logic [N-1:0] rx_cfg [N];
  logic [LW-1:0] len_m1;
  logic [CW-1:0] n_slots;
  logic [N-1:0] head, rhead;
  int checks = 0, failures = 0;

  dtdma_arbiter #(.N(N)) dut (.*);

  for (genvar p = 0; p < N; p++) begin : g_sr
    dtdma_slot_sr #(.N(N)) u_t (.clk, .rst_n, .load, .cfg(tx_cfg[p]), .len_m1, .slot_en(head[p]));
    dtdma_slot_sr #(.N(N)) u_r (.clk, .rst_n, .load, .cfg(rx_cfg[p]), .len_m1, .slot_en(rhead[p]));
  end

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  int cur[$];                 // cur[0] owns the current cycle
  logic [N-1:0] mdest [N];

  // apply `active`/`dest_req` for one cycle, advance the model, then check
  // the owner of the following cycle
  task automatic step();
    int nxt[$], nl[$];
    bit chg;
    chg = 0;
    for (int p = 0; p < N; p++) begin
      bit inl;
      inl = 0;
      foreach (cur[i]) if (cur[i] == p) inl = 1;
      if (active[p] != inl) chg = 1;
      if (active[p] && inl && dest_req[p] != mdest[p]) chg = 1;
    end
    // old schedule, one step on
    foreach (cur[i]) nxt.push_back(cur[(i + 1) % cur.size()]);
    if (chg) begin
      for (int p = 0; p < N; p++) begin
        bit inl;
        inl = 0;
        foreach (cur[i]) if (cur[i] == p) inl = 1;
        if (active[p] && !inl) nl.push_back(p);
      end
      foreach (nxt[i]) if (active[nxt[i]]) nl.push_back(nxt[i]);
      for (int p = 0; p < N; p++) mdest[p] = dest_req[p];
      cur = nl;
    end else begin
      cur = nxt;
    end
    #1 chk(load == chg, "load");
    @(negedge clk);
    chk(n_slots == CW'(cur.size()), "n_slots");
    for (int p = 0; p < N; p++) begin
      bit exp_rx;
      chk(head[p] == (cur.size() > 0 && cur[0] == p), $sformatf("owner p=%0d", p));
      exp_rx = cur.size() > 0 && mdest[cur[0]][p];
      chk(rhead[p] == exp_rx, $sformatf("rx p=%0d", p));
    end
  endtask

  function automatic string owner_name();
    for (int p = 0; p < N; p++) if (head[p]) return string'(8'("A" + p));
    return "-";
  endfunction

  initial begin
    string seq;
    active = '0;
    for (int p = 0; p < N; p++) begin dest_req[p] = '0; mdest[p] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // example: A, then B, then C and D together, then B finishes
    seq = "";
    for (int p = 0; p < 4; p++) dest_req[p] = N'(1) << (p + 4);
    for (int t = 0; t < 15; t++) begin
      case (t)
        0: active[0] = 1;
        2: active[1] = 1;
        4: begin active[2] = 1; active[3] = 1; end
        11: active[1] = 0;
        default: ;
      endcase
      step();
      seq = {seq, owner_name()};
    end
    chk(seq == "AABACDBACDBACDA", {"example sequence ", seq});
    // random requests and destination changes
    for (int t = 0; t < 3000; t++) begin
      for (int p = 0; p < N; p++) begin
        if ($urandom_range(0, 99) < 15) active[p] = ~active[p];
        if ($urandom_range(0, 99) < 5)  dest_req[p] = N'($urandom);
      end
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
