// tb_tree4x4: reconfiguration between two topologies on the default 4 x 4
// network. Application 0 is the 2-D mesh with XY routing; application 1 is
// a binary tree rooted at node 5 whose edges are mesh neighbours (parents:
// 0<-4, 1<-0, 2<-6, 3<-2, 4<-5, 6<-5, 7<-3, 8<-4, 9<-8, 10<-6, 11<-10,
// 12<-8, 13<-12, 14<-10, 15<-14), with every other switch link switched
// off and routes going up to the common ancestor and down again. On each
// topology it times one transfer 1 -> 3 (2 hops on the mesh, 6 on the tree)
// and then runs all 16 nodes at once, node s sending 10 words to node
// (5s + 3) mod 16. Every word is checked at its receiver.
module tb_tree4x4;
  import noc_pkg::*;

  localparam int M = 4, N = 4, NODES = 16, GW = 7, GH = 7, NPOS = 49, LEN = 10;
  // binary tree over mesh neighbours, rooted at node 5
  localparam int PARENT [16] = '{4, 0, 6, 2, 5, -1, 5, 3, 4, 8, 6, 10, 8, 12, 10, 14};

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [7:0] cfg_pos = '0;
  logic cfg_app = 1'b0;
  logic [NODE_W-1:0] cfg_idx = '0;
  logic [15:0] cfg_data = '0;
  logic app_req = 1'b0, app_next = 1'b0, app_sel, app_done;
  logic [15:0] switch_cycles;
  logic [NODES-1:0] tx_start = '0, tx_pop, tx_busy, tx_done, rx_ready = '1, rx_vld, rx_done;
  logic [NODE_W-1:0] tx_dest [NODES];
  logic [15:0] tx_len [NODES];
  logic [DW_DEF-1:0] tx_data [NODES], rx_data [NODES];
  logic [NPOS-1:0][3:0] fault = '0;
  logic [NPOS-1:0] ev_sw_alt, ev_sw_nack;
  logic [NODES-1:0] ev_rt_bt, ev_retry;

  int checks = 0, failures = 0, n_rt_bt = 0, n_retry = 0;
  int sent [NODES], rcvd [NODES], rx_k [NODES], done_cnt [NODES], dst [NODES];

  noc_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  for (genvar s = 0; s < NODES; s++) begin : g_src
    assign tx_data[s] = {16'hC0DE, 8'(s), 8'(dst[s]), 32'(sent[s])};
  end

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NODES; s++) begin
      if (tx_pop[s]) sent[s] <= sent[s] + 1;
      if (tx_done[s]) done_cnt[s] <= done_cnt[s] + 1;
      if (ev_retry[s]) n_retry++;
      if (ev_rt_bt[s]) n_rt_bt++;
      if (rx_vld[s]) begin
        checks++;
        if (rx_data[s][63:48] != 16'hC0DE || rx_data[s][39:32] != 8'(s)
            || rx_data[s][31:0] != 32'(rx_k[s])) begin
          failures++;
          $display("FAIL: node %0d got word %h, expected index %0d", s, rx_data[s], rx_k[s]);
        end
        rx_k[s] <= rx_k[s] + 1;
        rcvd[s] <= rcvd[s] + 1;
      end
      if (rx_done[s]) rx_k[s] <= 0;
    end
  end

  function automatic logic [7:0] sw_word(input int sn, input int se, input int ss, input int sw);
    logic [7:0] w;
    w[1:0] = (sn < 0) ? 2'd0 : 2'(sn);
    w[3:2] = (se < 0) ? 2'd1 : 2'(se);
    w[5:4] = (ss < 0) ? 2'd2 : 2'(ss);
    w[7:6] = (sw < 0) ? 2'd3 : 2'(sw);
    return w;
  endfunction

  task automatic wr(input logic app, input int pos, input int idx, input logic [15:0] data);
    @(negedge clk);
    cfg_we = 1'b1; cfg_pos = 8'(pos); cfg_app = app; cfg_idx = NODE_W'(idx); cfg_data = data;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  function automatic logic [5:0] xy(input int me, input int d);
    int r = me / N, c = me % N, dr = d / N, dc = d % N;
    rport_e p, a;
    if (dc > c) p = RP_E; else if (dc < c) p = RP_W; else if (dr > r) p = RP_S; else p = RP_N;
    a = RP_NONE;
    if (dc != c && dr != r) a = (dr > r) ? RP_S : RP_N;
    return {3'(a), 3'(p)};
  endfunction

  function automatic rport_e toward(input int me, input int nb);
    if (nb == me - N) return RP_N;
    if (nb == me + N) return RP_S;
    if (nb == me + 1) return RP_E;
    return RP_W;
  endfunction

  function automatic logic [5:0] tree(input int me, input int d);
    int a;
    a = d;
    while (a != -1 && PARENT[a] != me && a != me) a = PARENT[a];
    if (a != -1 && a != me && PARENT[a] == me) return {3'(RP_NONE), 3'(toward(me, a))};
    return {3'(RP_NONE), 3'(toward(me, PARENT[me]))};
  endfunction

  // one transfer alone; returns clocks from start to the first word sent
  task automatic single(input int s, input int d, output int setup);
    int d0, r0;
    d0 = done_cnt[s]; r0 = rcvd[d];
    dst[s] = d;
    @(negedge clk);
    sent[s] = 0;
    tx_dest[s] = NODE_W'(d); tx_len[s] = 16'(LEN); tx_start[s] = 1'b1;
    @(negedge clk);
    tx_start[s] = 1'b0;
    setup = 1;
    while (!tx_pop[s] && setup < 1000) begin @(negedge clk); setup++; end
    while ((done_cnt[s] == d0 || rcvd[d] < r0 + LEN) && setup < 2000) begin @(negedge clk); setup += 0; end
    chk(rcvd[d] == r0 + LEN, $sformatf("single transfer %0d->%0d delivered", s, d));
  endtask

  // all nodes at once, node s to (5s+3) mod 16
  task automatic all_to_all(input string name);
    int c, d0 [NODES], r0 [NODES];
    for (int s = 0; s < NODES; s++) begin
      d0[s] = done_cnt[s]; r0[s] = rcvd[s];
      dst[s] = (5 * s + 3) % NODES;
    end
    @(negedge clk);
    for (int s = 0; s < NODES; s++) begin
      tx_dest[s] = NODE_W'(dst[s]); tx_len[s] = 16'(LEN); sent[s] = 0;
    end
    tx_start = '1;
    @(negedge clk);
    tx_start = '0;
    c = 0;
    while (c < 30000) begin
      int all;
      all = 1;
      for (int s = 0; s < NODES; s++) if (done_cnt[s] == d0[s] || rcvd[dst[s]] < r0[dst[s]] + LEN) all = 0;
      if (all) break;
      @(negedge clk); c++;
    end
    repeat (20) @(negedge clk);
    $display("%s: all 16 transfers done after %0d clocks", name, c);
    for (int s = 0; s < NODES; s++) begin
      chk(done_cnt[s] == d0[s] + 1, $sformatf("%s: node %0d finished", name, s));
      chk(rcvd[s] == r0[s] + LEN, $sformatf("%s: node %0d received %0d words", name, s, LEN));
    end
  endtask

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int su_mesh, su_tree, b0;
    for (int s = 0; s < NODES; s++) begin
      tx_dest[s] = '0; tx_len[s] = '0; dst[s] = 0;
      sent[s] = 0; rcvd[s] = 0; rx_k[s] = 0; done_cnt[s] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // application 0: mesh; application 1: binary tree
    for (int y = 0; y < GH; y++)
      for (int x = 0; x < GW; x++) begin
        logic [7:0] t;
        t = 8'hE4;
        if (y % 2 == 0 && x % 2 == 1) begin
          wr(0, y * GW + x, 0, {8'hE4, sw_word(-1, 3, -1, 1)});
          if (PARENT[(y / 2) * N + x / 2] == (y / 2) * N + x / 2 + 1
              || PARENT[(y / 2) * N + x / 2 + 1] == (y / 2) * N + x / 2)
            t = sw_word(-1, 3, -1, 1);
          wr(1, y * GW + x, 0, {8'hE4, t});
        end
        if (y % 2 == 1 && x % 2 == 0) begin
          wr(0, y * GW + x, 0, {8'hE4, sw_word(2, -1, 0, -1)});
          if (PARENT[(y / 2) * N + x / 2] == (y / 2 + 1) * N + x / 2
              || PARENT[(y / 2 + 1) * N + x / 2] == (y / 2) * N + x / 2)
            t = sw_word(2, -1, 0, -1);
          wr(1, y * GW + x, 0, {8'hE4, t});
        end
      end
    for (int me = 0; me < NODES; me++)
      for (int d = 0; d < NODES; d++) begin
        wr(0, (me / N) * 2 * GW + (me % N) * 2, d, {10'd0, xy(me, d)});
        wr(1, (me / N) * 2 * GW + (me % N) * 2, d, {10'd0, tree(me, d)});
      end

    single(1, 3, su_mesh);
    all_to_all("mesh");
    b0 = n_rt_bt;
    @(negedge clk);
    app_next = 1'b1; app_req = 1'b1;
    @(negedge clk);
    app_req = 1'b0;
    repeat (10) @(negedge clk);
    chk(app_sel == 1'b1, "switched to the tree configuration");
    single(1, 3, su_tree);
    $display("1->3 set-up: mesh %0d clocks, tree %0d clocks", su_mesh, su_tree);
    chk(su_tree > su_mesh, "tree path 1-0-4-5-6-2-3 is longer than the mesh path");
    all_to_all("tree");
    chk(n_rt_bt > 0, "mechanism: router back-tracking under load");
    chk(n_retry > 0, "mechanism: source retry under load");
    $display("router back-tracks %0d, retries %0d", n_rt_bt, n_retry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
