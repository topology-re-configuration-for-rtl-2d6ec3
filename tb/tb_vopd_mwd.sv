// tb_vopd_mwd: two multimedia applications on the default 4 x 4 network,
// one after the other, with an application switch in between. The flow sets
// have the shape of the VOPD (video object plane decoder, 12 cores) and MWD
// (multi-window display, 12 cores) benchmarks: their edges and bandwidths
// are approximate values of the commonly published task graphs, not taken
// from a listing here. Core k sits on node SNAKE[k], a snake through the
// first three rows. Each flow becomes one circuit of bandwidth/8 words; all
// sources start together and send their flows in order, so paths compete
// and back-track. Every word is checked at its receiver and every node must
// receive exactly its flows' words.
module tb_vopd_mwd;
  import noc_pkg::*;

  localparam int M = 4, N = 4, NODES = 16, GW = 7, GH = 7, NPOS = 49, LEN = 10;
  localparam int NF = 14;   // flows per application
  // core k of either application sits on node SNAKE[k]
  localparam int SNAKE [12] = '{0, 1, 2, 3, 7, 6, 5, 4, 8, 9, 10, 11};
  // flows {source core, destination core, bandwidth in MB/s}; 0 MB/s = unused
  localparam int VOPD [NF][3] = '{
    '{0, 1, 70}, '{1, 2, 362}, '{2, 3, 362}, '{3, 4, 362}, '{3, 5, 49},
    '{5, 3, 27}, '{4, 6, 357}, '{6, 7, 353}, '{7, 8, 300}, '{8, 9, 313},
    '{9, 10, 313}, '{10, 9, 94}, '{11, 6, 16}, '{11, 9, 16}};
  localparam int MWD [NF][3] = '{
    '{0, 1, 64}, '{0, 3, 128}, '{1, 2, 64}, '{2, 1, 64}, '{3, 4, 96},
    '{4, 5, 96}, '{5, 6, 96}, '{6, 7, 96}, '{7, 8, 96}, '{8, 9, 64},
    '{9, 10, 64}, '{10, 11, 64}, '{11, 10, 64}, '{2, 3, 64}};

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

  // Run one application: every source sends its flows one after another,
  // bandwidth/8 words each (at least 2); all sources start together.
  task automatic run_app(input string name, input int app);
    int flows_left, c, d0 [NODES], r0 [NODES], exp_rx [NODES];
    int fq [NODES][NF], fl [NODES][NF], nq [NODES], qi [NODES];
    for (int s = 0; s < NODES; s++) begin
      nq[s] = 0; qi[s] = 0; exp_rx[s] = rcvd[s];
      d0[s] = done_cnt[s]; r0[s] = rcvd[s];
    end
    for (int f = 0; f < NF; f++) begin
      int s, d, w;
      s = SNAKE[(app == 0) ? VOPD[f][0] : MWD[f][0]];
      d = SNAKE[(app == 0) ? VOPD[f][1] : MWD[f][1]];
      w = ((app == 0) ? VOPD[f][2] : MWD[f][2]) / 8;
      if (w < 2) w = 2;
      fq[s][nq[s]] = d; fl[s][nq[s]] = w; nq[s]++;
      exp_rx[d] += w;
    end
    flows_left = NF;
    c = 0;
    while (c < 40000) begin
      int idle;
      @(negedge clk);
      c++;
      tx_start = '0;
      for (int s = 0; s < NODES; s++) begin
        if (!tx_busy[s] && !tx_start[s] && qi[s] < nq[s] && done_cnt[s] == d0[s] + 0) begin
          dst[s] = fq[s][qi[s]];
          tx_dest[s] = NODE_W'(fq[s][qi[s]]); tx_len[s] = 16'(fl[s][qi[s]]);
          sent[s] = 0;
          tx_start[s] = 1'b1;
          qi[s]++;
          d0[s] = done_cnt[s] + 1;   // next flow only after this one is done
        end
      end
      idle = 1;
      for (int s = 0; s < NODES; s++) begin
        if (qi[s] < nq[s] || tx_busy[s]) idle = 0;
        if (rcvd[s] < exp_rx[s]) idle = 0;
      end
      if (idle && c > 2) break;
    end
    tx_start = '0;
    repeat (10) @(negedge clk);
    $display("%s: %0d flows done in %0d clocks", name, NF, c);
    for (int s = 0; s < NODES; s++)
      chk(rcvd[s] == exp_rx[s], $sformatf("%s: node %0d received %0d words", name, s, exp_rx[s] - r0[s]));
  endtask

  initial begin
    for (int s = 0; s < NODES; s++) begin
      tx_dest[s] = '0; tx_len[s] = '0; dst[s] = 0;
      sent[s] = 0; rcvd[s] = 0; rx_k[s] = 0; done_cnt[s] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // both applications: mesh links, XY routing with YX alternate
    for (int app = 0; app < 2; app++) begin
      for (int y = 0; y < GH; y++)
        for (int x = 0; x < GW; x++) begin
          if (y % 2 == 0 && x % 2 == 1) wr(1'(app), y * GW + x, 0, {8'hE4, sw_word(-1, 3, -1, 1)});
          if (y % 2 == 1 && x % 2 == 0) wr(1'(app), y * GW + x, 0, {8'hE4, sw_word(2, -1, 0, -1)});
        end
      for (int me = 0; me < NODES; me++)
        for (int d = 0; d < NODES; d++)
          wr(1'(app), (me / N) * 2 * GW + (me % N) * 2, d, {10'd0, xy(me, d)});
    end
    run_app("VOPD", 0);
    @(negedge clk);
    app_next = 1'b1; app_req = 1'b1;
    @(negedge clk);
    app_req = 1'b0;
    repeat (10) @(negedge clk);
    chk(app_sel == 1'b1, "switched to the second application");
    run_app("MWD", 1);
    chk(n_rt_bt > 0 || n_retry > 0, "mechanism: contention resolved by back-tracking or retry");
    $display("router back-tracks %0d, retries %0d", n_rt_bt, n_retry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
