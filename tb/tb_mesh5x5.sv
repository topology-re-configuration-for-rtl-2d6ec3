// tb_mesh5x5: the network built with 5 x 5 nodes (9 x 9 grid) and
// configured as a plain 2-D mesh with XY routing (YX as alternate), the
// first example topology of the design. All 25 nodes start a transfer at
// the same time, node (r, c) sending 12 words to node (c, r) (diagonal
// nodes send to the mirror node (r, 4-c); the centre node sends to node 0),
// so paths compete for links and destinations. Every word is checked at its
// receiver; every transfer must complete, and back-tracking and retries are
// counted and must occur.
module tb_mesh5x5;
  import noc_pkg::*;

  localparam int M = 5, N = 5, NODES = 25, GW = 9, GH = 9, NPOS = 81, LEN = 12;

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

  noc_top #(.M(M), .N(N)) dut (.*);

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

  task automatic wr(input int pos, input int idx, input logic [15:0] data);
    @(negedge clk);
    cfg_we = 1'b1; cfg_pos = 8'(pos); cfg_app = 1'b0; cfg_idx = NODE_W'(idx); cfg_data = data;
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

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    for (int s = 0; s < NODES; s++) begin
      int r, q;
      r = s / N; q = s % N;
      tx_dest[s] = '0; tx_len[s] = '0;
      sent[s] = 0; rcvd[s] = 0; rx_k[s] = 0; done_cnt[s] = 0;
      dst[s] = (r != q) ? q * N + r : (s == 12 ? 0 : r * N + (N - 1 - q));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int y = 0; y < GH; y++)
      for (int x = 0; x < GW; x++) begin
        if (y % 2 == 0 && x % 2 == 1) wr(y * GW + x, 0, {8'hE4, sw_word(-1, 3, -1, 1)});
        if (y % 2 == 1 && x % 2 == 0) wr(y * GW + x, 0, {8'hE4, sw_word(2, -1, 0, -1)});
      end
    for (int me = 0; me < NODES; me++)
      for (int d = 0; d < NODES; d++)
        wr((me / N) * 2 * GW + (me % N) * 2, d, {10'd0, xy(me, d)});

    @(negedge clk);
    for (int s = 0; s < NODES; s++) begin
      tx_dest[s] = NODE_W'(dst[s]); tx_len[s] = 16'(LEN);
    end
    tx_start = '1;
    @(negedge clk);
    tx_start = '0;
    c = 0;
    while (c < 60000) begin
      int all;
      all = 1;
      for (int s = 0; s < NODES; s++) if (done_cnt[s] == 0 || rcvd[dst[s]] < LEN) all = 0;
      if (all) break;
      @(negedge clk); c++;
    end
    repeat (20) @(negedge clk);
    $display("all transfers done after %0d clocks; router back-tracks %0d, retries %0d", c, n_rt_bt, n_retry);
    for (int s = 0; s < NODES; s++) begin
      chk(done_cnt[s] == 1, $sformatf("node %0d finished its transfer", s));
      chk(sent[s] == LEN, $sformatf("node %0d sent %0d words", s, LEN));
    end
    // node 0 receives from two senders (its mirror and the centre)
    for (int d = 0; d < NODES; d++) begin
      int n;
      n = 0;
      for (int s = 0; s < NODES; s++) if (dst[s] == d) n++;
      chk(rcvd[d] == n * LEN, $sformatf("node %0d received %0d words", d, n * LEN));
    end
    chk(n_rt_bt > 0, "mechanism: router back-tracking under load");
    chk(n_retry > 0, "mechanism: source retry under load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
