// tb_bt_router: self-checking test of the back-tracking router (node 5 of
// 16, two applications).
//
// Routing table of application 0: destination 6 -> E then N, destination 9
// -> S then W, destination 1 -> N only. The test sends probes into the
// router, plays the neighbours' ACK/NACK by hand and checks: the two-clock
// probe latency through the router, ACK and data forwarding (one clock per
// word, one clock latency), a busy output making a probe take its alternate,
// a NACK making the router try the alternate, back-tracking (NACK upstream)
// once all candidates failed, delivery to the local port, tear-down and the
// application-1 table.
module tb_bt_router;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic app_sel = 1'b0, cfg_we = 1'b0, cfg_app = 1'b0;
  logic [NODE_W-1:0] cfg_idx = '0;
  logic [5:0] cfg_route = '0;
  fwd_t i_fwd [5], o_fwd [5];
  bwd_t i_bwd [5], o_bwd [5];
  logic busy, ev_bt;
  int checks = 0, failures = 0, n_bt = 0;

  bt_router #(.NAPP(2), .NODES(16), .MY_ID(5)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && ev_bt) n_bt++;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic fwd_t probe(input logic [NODE_W-1:0] d);
    fwd_t f = '0; f.req = 1'b1; f.data[NODE_W-1:0] = d; return f;
  endfunction

  task automatic wr(input logic a, input int d, input rport_e p, input rport_e q);
    @(negedge clk);
    cfg_we = 1'b1; cfg_app = a; cfg_idx = NODE_W'(d); cfg_route = {3'(q), 3'(p)};
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    for (int i = 0; i < 5; i++) begin i_fwd[i] = '0; i_bwd[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wr(0, 6, RP_E, RP_N);
    wr(0, 9, RP_S, RP_W);
    wr(0, 1, RP_N, RP_NONE);
    wr(1, 6, RP_S, RP_NONE);
    chk(!busy, "idle after configuration");

    // probe W -> dest 6 -> E, latency
    i_fwd[RP_W] = probe(6);
    lat = 0;
    while (!o_fwd[RP_E].req && lat < 10) begin @(negedge clk); lat++; end
    chk(lat == 2, "probe crosses the router in two clocks");
    chk(o_fwd[RP_E].data[NODE_W-1:0] == 8'd6, "header forwarded");
    chk(busy, "busy while a path is set up");
    i_bwd[RP_E].ack = 1'b1;
    @(negedge clk);
    chk(o_bwd[RP_W].ack, "ACK back to the input one clock later");
    for (int w = 0; w < 4; w++) begin
      i_fwd[RP_W].vld = 1'b1; i_fwd[RP_W].data = 64'h1000 + 64'(w);
      @(negedge clk);
      chk(o_fwd[RP_E].vld && o_fwd[RP_E].data == 64'h1000 + 64'(w), "data word forwarded one clock later");
    end
    i_fwd[RP_W].vld = 1'b0;

    // second probe for 6 from S: E is busy -> alternate N
    i_fwd[RP_S] = probe(6);
    repeat (2) @(negedge clk);
    chk(o_fwd[RP_N].req && o_fwd[RP_N].data[NODE_W-1:0] == 8'd6, "busy primary: probe on alternate N");
    // N answers NACK: no candidate left -> back-track
    i_bwd[RP_N].nack = 1'b1;
    @(negedge clk);
    chk(!o_fwd[RP_N].req, "N released after NACK");
    @(negedge clk);
    chk(o_bwd[RP_S].nack, "NACK sent upstream (back-track)");
    chk(n_bt == 1, "back-track event counted");
    i_fwd[RP_S] = '0; i_bwd[RP_N].nack = 1'b0;
    @(negedge clk);
    chk(!o_bwd[RP_S].nack, "NACK removed after req drops");

    // tear down the W->E path
    i_fwd[RP_W] = '0;
    @(negedge clk);
    chk(!o_fwd[RP_E].req, "E released");
    chk(!o_bwd[RP_W].ack, "ACK removed");
    i_bwd[RP_E].ack = 1'b0;
    @(negedge clk);

    // dest 9 from N: primary S answers NACK -> alternate W
    i_fwd[RP_N] = probe(9);
    repeat (2) @(negedge clk);
    chk(o_fwd[RP_S].req, "probe on primary S");
    i_bwd[RP_S].nack = 1'b1;
    @(negedge clk);
    i_bwd[RP_S].nack = 1'b0;
    @(negedge clk);
    chk(o_fwd[RP_W].req && !o_fwd[RP_S].req, "NACK on primary: probe retried on W");
    chk(n_bt == 2, "retry event counted");
    chk(!o_bwd[RP_N].nack && !o_bwd[RP_N].ack, "upstream still waiting");
    i_bwd[RP_W].ack = 1'b1;
    @(negedge clk);
    chk(o_bwd[RP_N].ack, "ACK over the alternate");
    i_fwd[RP_N] = '0;
    @(negedge clk);
    i_bwd[RP_W].ack = 1'b0;
    @(negedge clk);

    // probe for this node from E goes to the local port
    i_fwd[RP_E] = probe(5);
    repeat (2) @(negedge clk);
    chk(o_fwd[RP_L].req && o_fwd[RP_L].data[NODE_W-1:0] == 8'd5, "own destination: local port");
    i_fwd[RP_E] = '0;
    repeat (2) @(negedge clk);

    // unknown destination: immediate NACK
    i_fwd[RP_L] = probe(12);
    repeat (2) @(negedge clk);
    chk(o_bwd[RP_L].nack, "no table entry: NACK");
    i_fwd[RP_L] = '0;
    repeat (2) @(negedge clk);

    // application 1 routes 6 to S
    app_sel = 1'b1;
    i_fwd[RP_W] = probe(6);
    repeat (2) @(negedge clk);
    chk(o_fwd[RP_S].req && !o_fwd[RP_E].req, "application 1 table used");
    i_fwd[RP_W] = '0;
    repeat (3) @(negedge clk);
    chk(!busy, "idle at the end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
