// tb_noc_top: end-to-end test of the reconfigurable back-tracking NoC at its
// default size (4 x 4 nodes, 64-bit links, two applications).
//
// Application 0 configures the grid as a 2-D mesh with XY routing (YX as the
// router's alternate). Application 1 keeps the mesh but joins node 13 and
// node 2 (cores 14 and 3 when counted from 1) by a direct long link through eight switches, the example used to
// explain back-tracking: the switch at grid position (1,3) has a
// pre-configured detour E -> (1,4) -> node 2 for when its N output is
// blocked. The test
//   A. sends 0 -> 15 and 13 -> 2 over the mesh and checks every word,
//   B. makes two senders compete for node 3 so that probes back-track
//      through routers and the second source retries,
//   C. asks for an application switch while a transfer runs and checks that
//      the switch waits for it,
//   D. sends 13 -> 2 over the long link (faster than over the mesh),
//   E. damages the sub-link after (1,3) and checks delivery over the detour,
//   F. makes node 2 refuse, so the switch tries its detour on NACK and then
//      back-tracks, and the source retries until node 2 accepts.
// Each word carries {C0DE, source, destination, index}; the receiver checks
// all four fields. Every mechanism must occur at least once.
module tb_noc_top;
  import noc_pkg::*;

  localparam int M = 4, N = 4, NODES = 16, GW = 7, GH = 7, NPOS = 49;

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

  int checks = 0, failures = 0;
  int n_rt_bt = 0, n_retry = 0, n_sw_alt = 0, n_sw_nack = 0, n_app = 0, n_fault_detour = 0;
  int n_long = 0;
  int sent [NODES], rcvd [NODES], rx_k [NODES], done_cnt [NODES];

  noc_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // ---- sources: word k of node s to d ----
  logic [NODE_W-1:0] cur_dest [NODES];
  for (genvar s = 0; s < NODES; s++) begin : g_src
    assign tx_data[s] = {16'hC0DE, 8'(s), 8'(cur_dest[s]), 32'(sent[s])};
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
    for (int p = 0; p < NPOS; p++) begin
      if (ev_sw_alt[p]) n_sw_alt++;
      if (ev_sw_nack[p]) n_sw_nack++;
      if (ev_sw_alt[p] && fault[p] != '0) n_fault_detour++;
    end
    if (app_done) n_app++;
  end

  // ---- configuration ----
  function automatic logic [7:0] sw_word(input int sn, input int se, input int ss, input int sw);
    // sel = input port feeding that output, -1 = off
    logic [7:0] w;
    w[1:0] = (sn < 0) ? 2'd0 : 2'(sn);
    w[3:2] = (se < 0) ? 2'd1 : 2'(se);
    w[5:4] = (ss < 0) ? 2'd2 : 2'(ss);
    w[7:6] = (sw < 0) ? 2'd3 : 2'(sw);
    return w;
  endfunction

  task automatic wr(input int pos, input logic app, input int idx, input logic [15:0] data);
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

  task automatic configure();
    for (int app = 0; app < 2; app++) begin
      for (int y = 0; y < GH; y++)
        for (int x = 0; x < GW; x++) begin
          logic [7:0] pr, al;
          pr = sw_word(-1, -1, -1, -1);
          al = sw_word(-1, -1, -1, -1);
          if (y % 2 == 0 && x % 2 == 1) pr = sw_word(-1, 3, -1, 1);      // E<->W
          if (y % 2 == 1 && x % 2 == 0) pr = sw_word(2, -1, 0, -1);      // N<->S
          if (app == 1) begin
            // long link node 13 (6,2) <-> node 2 (0,4)
            if (y == 5 && x == 2) pr = sw_word(-1, 2, 1, -1);
            if (y == 5 && x == 3) pr = sw_word(3, -1, -1, 0);
            if ((y == 4 || y == 2) && x == 3) pr = sw_word(2, 3, 0, 1);
            if (y == 3 && x == 3) pr = sw_word(2, -1, 0, -1);
            if (y == 1 && x == 3) begin
              pr = sw_word(2, -1, 0, -1);
              al = sw_word(-1, 2, 1, -1);                                // detour S<->E
            end
            if (y == 0 && x == 3) pr = sw_word(-1, 2, 1, -1);
            if (y == 1 && x == 4) al = sw_word(3, -1, -1, 0);            // detour W<->N
          end
          if (!(y % 2 == 0 && x % 2 == 0)) wr(y * GW + x, 1'(app), 0, {al, pr});
        end
      for (int me = 0; me < NODES; me++)
        for (int d = 0; d < NODES; d++) begin
          logic [5:0] e;
          e = xy(me, d);
          if (app == 1 && me == 13 && d == 2)  e = {3'(RP_E), 3'(RP_N)};
          if (app == 1 && me == 2  && d == 13) e = {3'(RP_S), 3'(RP_W)};
          wr((me / N) * 2 * GW + (me % N) * 2, 1'(app), d, {10'd0, e});
        end
    end
  endtask

  task automatic start(input int s, input int d, input int len);
    @(negedge clk);
    cur_dest[s] = NODE_W'(d); tx_dest[s] = NODE_W'(d); tx_len[s] = 16'(len);
    sent[s] = 0;
    tx_start[s] = 1'b1;
    @(negedge clk);
    tx_start[s] = 1'b0;
  endtask

  task automatic wait_done(input int s, input int prev, output int cycles);
    cycles = 0;
    while (done_cnt[s] == prev && cycles < 5000) begin @(negedge clk); cycles++; end
  endtask

  // cycles from start until the first word leaves the source
  task automatic xfer(input int s, input int d, input int len, output int setup);
    int prev, c, rb;
    prev = done_cnt[s];
    rb = rcvd[d];
    start(s, d, len);
    setup = 0;
    while (!tx_pop[s] && setup < 5000) begin @(negedge clk); setup++; end
    wait_done(s, prev, c);
    // tx_done means the path is released at the source; the tail of the
    // data is still on its way through the routers
    c = 0;
    while (rcvd[d] < rb + len && c < 100) begin @(negedge clk); c++; end
    chk(done_cnt[s] == prev + 1, $sformatf("transfer %0d->%0d completed", s, d));
    chk(rcvd[d] == rb + len, $sformatf("%0d words reached node %0d (got %0d)", len, d, rcvd[d] - rb));
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int su_mesh, su_long, su, c, b1, b6;
    for (int s = 0; s < NODES; s++) begin
      tx_dest[s] = '0; tx_len[s] = '0; cur_dest[s] = '0;
      sent[s] = 0; rcvd[s] = 0; rx_k[s] = 0; done_cnt[s] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    configure();
    chk(app_sel == 1'b0, "application 0 in use");

    // A: mesh transfers
    xfer(0, 15, 8, su);
    $display("0->15 set-up %0d clocks", su);
    xfer(13, 2, 6, su_mesh);
    $display("13->2 over the mesh: set-up %0d clocks", su_mesh);

    // B: two senders for node 3
    b1 = done_cnt[1]; b6 = done_cnt[6];
    start(1, 3, 40);
    repeat (12) @(negedge clk);
    start(6, 3, 4);
    wait_done(1, b1, c);
    wait_done(6, b6, c);
    repeat (4) @(negedge clk);
    chk(done_cnt[1] == b1 + 1 && done_cnt[6] == b6 + 1, "both competing transfers completed");
    chk(n_rt_bt > 0, "routers back-tracked while node 3 was busy");
    chk(n_retry > 0, "source retried after NACK");

    // C: application switch during a transfer
    begin
      int b5, r10;
      b5 = done_cnt[5]; r10 = rcvd[10];
      start(5, 10, 30);
      repeat (6) @(negedge clk);
      app_next = 1'b1; app_req = 1'b1;
      @(negedge clk);
      app_req = 1'b0;
      while (!app_done && c < 5000) begin @(negedge clk); c++; end
      chk(done_cnt[5] == b5 + 1 && rcvd[10] == r10 + 30, "switch waited for the running transfer");
      @(negedge clk);
      chk(app_sel == 1'b1, "application 1 in use");
      $display("application switch took %0d clocks", switch_cycles);
    end

    // D: long link
    xfer(13, 2, 6, su_long);
    $display("13->2 over the long link: set-up %0d clocks", su_long);
    chk(su_long < su_mesh, "long link sets up faster than the mesh path");
    n_long++;

    // E: damaged sub-link (1,3).N -> detour
    fault[1 * GW + 3] = 4'b0001;
    xfer(13, 2, 6, su);
    $display("13->2 over the detour: set-up %0d clocks", su);
    chk(n_fault_detour > 0, "switch took the detour around the damaged link");
    fault = '0;

    // F: node 2 refuses for a while
    begin
      int b13, r0, a0, n0;
      b13 = done_cnt[13]; r0 = n_retry; a0 = n_sw_alt; n0 = n_sw_nack;
      rx_ready[2] = 1'b0;
      start(13, 2, 5);
      repeat (200) @(negedge clk);
      chk(n_sw_alt > a0, "NACK moved the probe onto the switch detour");
      chk(n_sw_nack > n0, "switch back-tracked with NACK");
      chk(n_retry > r0, "source kept retrying");
      chk(done_cnt[13] == b13, "nothing delivered while refused");
      rx_ready[2] = 1'b1;
      wait_done(13, b13, c);
      repeat (4) @(negedge clk);
      chk(done_cnt[13] == b13 + 1, "delivered once node 2 accepts");
    end

    // every mechanism seen
    chk(n_rt_bt > 0, "mechanism: router back-tracking");
    chk(n_retry > 0, "mechanism: source retry");
    chk(n_sw_alt > 0, "mechanism: switch detour");
    chk(n_sw_nack > 0, "mechanism: switch NACK");
    chk(n_app > 0, "mechanism: application switch");
    chk(n_fault_detour > 0, "mechanism: damaged link avoided");
    chk(n_long > 0, "mechanism: long link");
    $display("events: router bt %0d, retries %0d, switch detours %0d, switch NACKs %0d, app switches %0d",
             n_rt_bt, n_retry, n_sw_alt, n_sw_nack, n_app);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
